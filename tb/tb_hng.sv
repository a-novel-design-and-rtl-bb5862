// tb_hng: exhaustive self-checking test of the HNG gate. R and S are
// checked against the binary sum A + B + C (S is its carry, xor D).
module tb_hng;
  logic a, b, c, d, p, q, r, s;
  int checks = 0, failures = 0;

  hng dut (.a, .b, .c, .d, .p, .q, .r, .s);

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tot;
    for (int i = 0; i < 16; i++) begin
      {a, b, c, d} = 4'(i);
      #1;
      tot = 32'(a) + 32'(b) + 32'(c);
      checks++;
      if (p !== a || q !== b || r !== 1'(tot % 2) || s !== (1'(tot / 2) ^ d)) begin
        failures++;
        $display("FAIL abcd=%04b pqrs=%0b%0b%0b%0b", i[3:0], p, q, r, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
