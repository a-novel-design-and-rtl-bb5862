// tb_bcd_2digit_reversible_adder: end-to-end self-checking test of the
// two-digit reversible BCD adder at its default size (no parameter
// overrides). It first applies the five operand pairs of the published
// simulation waveform, then every pair 00..99 + 00..99 with carry in 0 and 1
// (20,000 cases), comparing {cout, sum} with the decimal sum worked out in
// integers. It counts how often each mechanism of the design is exercised and
// fails if one never is: correction of the low digit for a binary sum of
// 10..15 and of 16..19, the same two for the high digit, a decimal carry from
// the low digit into the high digit, the high digit's sum of exactly 9 with
// an incoming decimal carry, and a carry out of the adder. The stand-alone
// MAS full adder of the top is checked over its eight input patterns.
module tb_bcd_2digit_reversible_adder;
  import rev_pkg::*;
  logic [7:0] bcd_2digit_a, bcd_2digit_b, bcd_2digit_sum;
  logic       cin_2digit, cout_2digit;
  logic [2*DIGIT_GARBAGE-1:0] garbage;
  logic       fa_a, fa_b, fa_cin, fa_sum, fa_cout;
  logic [2:0] fa_garbage;
  int n_fa = 0;
  int checks = 0, failures = 0;
  int n_lo_10_15 = 0, n_lo_16_19 = 0, n_hi_10_15 = 0, n_hi_16_19 = 0;
  int n_mid_carry = 0, n_hi_nine_carry = 0, n_cout = 0;

  bcd_2digit_reversible_adder dut (
    .bcd_2digit_a, .bcd_2digit_b, .cin_2digit,
    .bcd_2digit_sum, .cout_2digit, .garbage,
    .fa_a, .fa_b, .fa_cin, .fa_sum, .fa_cout, .fa_garbage
  );

  function automatic logic [7:0] to_bcd(int v);
    return {4'(v / 10), 4'(v % 10)};
  endfunction

  task automatic apply(int x, int y, int ci);
    int lo, hi, tot;
    bcd_2digit_a = to_bcd(x);
    bcd_2digit_b = to_bcd(y);
    cin_2digit   = 1'(ci);
    #1;
    tot = x + y + ci;
    lo  = x % 10 + y % 10 + ci;
    hi  = x / 10 + y / 10 + (lo >= 10 ? 1 : 0);
    if (lo >= 10 && lo < 16) n_lo_10_15++;
    if (lo >= 16)            n_lo_16_19++;
    if (hi >= 10 && hi < 16) n_hi_10_15++;
    if (hi >= 16)            n_hi_16_19++;
    if (lo >= 10)            n_mid_carry++;
    if (lo >= 10 && hi == 10 && (x / 10 + y / 10) == 9) n_hi_nine_carry++;
    if (tot >= 100)          n_cout++;
    checks++;
    if (bcd_2digit_sum !== to_bcd(tot % 100) || 32'(cout_2digit) != tot / 100) begin
      failures++;
      if (failures < 10)
        $display("FAIL %02d + %02d + %0d -> cout=%0b sum=%02h (expected %0d)",
                 x, y, ci, cout_2digit, bcd_2digit_sum, tot);
    end
  endtask

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Operand pairs of the published waveform (packed BCD, carry in 0):
    // 13+12=25, 95+55=150, 33+20=53, 99+99=198, 82+90=172.
    apply(13, 12, 0);
    if (bcd_2digit_sum !== 8'b0010_0101 || cout_2digit !== 1'b0) failures++;
    apply(95, 55, 0);
    if (bcd_2digit_sum !== 8'b0101_0000 || cout_2digit !== 1'b1) failures++;
    apply(33, 20, 0);
    if (bcd_2digit_sum !== 8'b0101_0011 || cout_2digit !== 1'b0) failures++;
    apply(99, 99, 0);
    if (bcd_2digit_sum !== 8'b1001_1000 || cout_2digit !== 1'b1) failures++;
    apply(82, 90, 0);
    if (bcd_2digit_sum !== 8'b0111_0010 || cout_2digit !== 1'b1) failures++;
    checks += 5;

    // The stand-alone MAS full adder, all eight input patterns.
    for (int i = 0; i < 8; i++) begin
      {fa_a, fa_b, fa_cin} = 3'(i);
      #1;
      n_fa++;
      checks++;
      if (32'({fa_cout, fa_sum}) != 32'(fa_a) + 32'(fa_b) + 32'(fa_cin)) failures++;
    end

    for (int ci = 0; ci < 2; ci++)
      for (int x = 0; x < 100; x++)
        for (int y = 0; y < 100; y++)
          apply(x, y, ci);

    $display("mechanisms: low corr 10..15 %0d, low corr 16..19 %0d, high corr 10..15 %0d, high corr 16..19 %0d",
             n_lo_10_15, n_lo_16_19, n_hi_10_15, n_hi_16_19);
    $display("mechanisms: digit carry %0d, high 9 + digit carry %0d, carry out %0d",
             n_mid_carry, n_hi_nine_carry, n_cout);
    $display("garbage outputs %0d", $bits(garbage));
    if (n_lo_10_15 == 0)      failures++;
    if (n_lo_16_19 == 0)      failures++;
    if (n_hi_10_15 == 0)      failures++;
    if (n_hi_16_19 == 0)      failures++;
    if (n_mid_carry == 0)     failures++;
    if (n_hi_nine_carry == 0) failures++;
    if (n_cout == 0)          failures++;
    if (n_fa == 0)            failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
