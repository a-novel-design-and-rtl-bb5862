// tb_hng_rca4: exhaustive self-checking test of the 4-bit HNG ripple-carry
// adder (all 512 operand and carry combinations) against integer addition,
// and of its garbage outputs, which must be copies of the operand bits.
module tb_hng_rca4;
  import rev_pkg::*;
  logic [3:0] a, b, sum;
  logic       cin, cout;
  logic [RCA4_GARBAGE-1:0] garbage;
  int checks = 0, failures = 0;

  hng_rca4 dut (.a, .b, .cin, .sum, .cout, .garbage);

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp_g;
    for (int i = 0; i < 512; i++) begin
      {cin, a, b} = 9'(i);
      #1;
      checks++;
      if (32'({cout, sum}) != 32'(a) + 32'(b) + 32'(cin)) begin
        failures++;
        $display("FAIL %0d + %0d + %0d -> %0d", a, b, cin, {cout, sum});
      end
      for (int k = 0; k < 4; k++) exp_g[2*k +: 2] = {b[k], a[k]};
      checks++;
      if (garbage !== exp_g) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
