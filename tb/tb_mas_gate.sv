// tb_mas_gate: exhaustive self-checking test of the MAS gate over all 32
// input patterns. Expected outputs: P = A; Q and R the sum and carry of
// A + B + C (R xor D); S = (A or B) xor E; T = (C or D) xor E, which are the
// published equations rewritten with De Morgan. Also checks the OR use
// (E = 0) that the BCD correction logic relies on.
module tb_mas_gate;
  logic a, b, c, d, e, p, q, r, s, t;
  int checks = 0, failures = 0;

  mas_gate dut (.a, .b, .c, .d, .e, .p, .q, .r, .s, .t);

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tot;
    logic [4:0] exp_o;
    for (int i = 0; i < 32; i++) begin
      {a, b, c, d, e} = 5'(i);
      #1;
      tot   = 32'(a) + 32'(b) + 32'(c);
      exp_o = {a, 1'(tot % 2), 1'(tot >= 2) ^ d, (a || b) != e, (c || d) != e};
      checks++;
      if ({p, q, r, s, t} !== exp_o) begin
        failures++;
        $display("FAIL abcde=%05b pqrst=%05b expected %05b", i[4:0],
                 {p, q, r, s, t}, exp_o);
      end
      if (!e) begin
        checks++;
        if (s !== (a | b) || t !== (c | d)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
