// tb_bcd_digit_adder: exhaustive self-checking test of the one-digit BCD
// adder: every pair of digits 0..9 with carry in 0 and 1 (200 cases). The
// expected digit and carry come from integer division of a + b + cin by 10.
// It also counts how often each path of the correction logic is taken: no
// correction, correction for a binary sum of 10..15, and correction for a
// sum of 16..19 (carry out of the first adder); each must occur.
module tb_bcd_digit_adder;
  import rev_pkg::*;
  bcd_digit_t a, b, sum;
  logic       cin, cout;
  logic [DIGIT_GARBAGE-1:0] garbage;
  int checks = 0, failures = 0;
  int n_plain = 0, n_corr_10_15 = 0, n_corr_16_19 = 0;

  bcd_digit_adder dut (.a, .b, .cin, .sum, .cout, .garbage);

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tot;
    for (int ci = 0; ci < 2; ci++)
      for (int i = 0; i < 10; i++)
        for (int j = 0; j < 10; j++) begin
          a = 4'(i); b = 4'(j); cin = 1'(ci);
          #1;
          tot = i + j + ci;
          if (tot < 10)      n_plain++;
          else if (tot < 16) n_corr_10_15++;
          else               n_corr_16_19++;
          checks++;
          if (32'(sum) != tot % 10 || 32'(cout) != tot / 10) begin
            failures++;
            $display("FAIL %0d + %0d + %0d -> cout=%0b sum=%0d", i, j, ci, cout, sum);
          end
        end
    $display("paths: no correction %0d, sum 10..15 %0d, sum 16..19 %0d",
             n_plain, n_corr_10_15, n_corr_16_19);
    if (n_plain == 0)      failures++;
    if (n_corr_10_15 == 0) failures++;
    if (n_corr_16_19 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
