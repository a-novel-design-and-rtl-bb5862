// tb_fg: exhaustive self-checking test of the Feynman gate. Expected values
// are worked out arithmetically (Q is the low bit of A + B).
module tb_fg;
  logic a, b, p, q;
  int checks = 0, failures = 0;

  fg dut (.a, .b, .p, .q);

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if (p !== a || q !== 1'((32'(a) + 32'(b)) % 2)) begin
        failures++;
        $display("FAIL a=%0b b=%0b p=%0b q=%0b", a, b, p, q);
      end
    end
    // Copying use: B = 0 gives two copies of A.
    for (int i = 0; i < 2; i++) begin
      a = 1'(i); b = 1'b0;
      #1;
      checks++;
      if (p !== a || q !== a) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
