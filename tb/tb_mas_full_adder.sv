// tb_mas_full_adder: exhaustive self-checking test of the one-gate MAS full
// adder against integer addition.
module tb_mas_full_adder;
  logic a, b, cin, sum, cout;
  logic [2:0] garbage;
  int checks = 0, failures = 0;

  mas_full_adder dut (.a, .b, .cin, .sum, .cout, .garbage);

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, cin} = 3'(i);
      #1;
      checks++;
      if (32'({cout, sum}) != 32'(a) + 32'(b) + 32'(cin)) begin
        failures++;
        $display("FAIL a=%0b b=%0b cin=%0b -> cout=%0b sum=%0b", a, b, cin, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
