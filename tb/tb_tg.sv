// tb_tg: exhaustive self-checking test of the Toffoli gate. The target is
// expected to flip exactly when A + B = 2.
module tb_tg;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;

  tg dut (.a, .b, .c, .p, .q, .r);

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      checks++;
      if (p !== a || q !== b || r !== ((32'(a) + 32'(b) == 2) ? ~c : c)) begin
        failures++;
        $display("FAIL abc=%0b%0b%0b pqr=%0b%0b%0b", a, b, c, p, q, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
