// tb_hnfg: exhaustive self-checking test of the HNFG gate, including its
// use as a double copying circuit (C = D = 0).
module tb_hnfg;
  logic a, b, c, d, p, q, r, s;
  int checks = 0, failures = 0;

  hnfg dut (.a, .b, .c, .d, .p, .q, .r, .s);

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      {a, b, c, d} = 4'(i);
      #1;
      checks++;
      if (p !== a || q !== (a != c) || r !== b || s !== (b != d)) begin
        failures++;
        $display("FAIL abcd=%04b pqrs=%0b%0b%0b%0b", i[3:0], p, q, r, s);
      end
      if (!c && !d) begin
        checks++;
        if ({p, q, r, s} !== {a, a, b, b}) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
