// tb_hm_bfp: self-checking testbench for the body fat percentage unit.
//
// Reference: b = 1.20*BMI + 0.23*Age - 5.4 and BFP = b - 10.8 for a male,
// both rounded down and clamped to 0..255, evaluated in tenths of percent
// by a separate formulation (12*BMI + 2.3*Age - 54 in tenths, with the age
// term kept in hundredths). Hand-worked cases come first, then every
// BMI/age pair for both sexes.
module tb_hm_bfp;

  logic       a;
  logic [7:0] bmi, age, b, bfp;
  int checks = 0, failures = 0;

  hm_bfp #(.W(8)) dut (.a(a), .bmi(bmi), .age(age), .b(b), .bfp(bfp));

  // floor of (value in hundredths)/100 clamped to 0..255
  function automatic int clamp_pct(int hundredths);
    int q;
    if (hundredths < 0) return 0;
    q = hundredths / 100;
    return (q > 255) ? 255 : q;
  endfunction

  task automatic check(bit ai, int bi, int agei, int exp_b, int exp_bfp);
    a = ai; bmi = 8'(bi); age = 8'(agei);
    #1;
    checks += 2;
    if (int'(b) != exp_b) begin
      failures++;
      if (failures < 10) $display("FAIL b a=%0d bmi=%0d age=%0d got %0d exp %0d", ai, bi, agei, b, exp_b);
    end
    if (int'(bfp) != exp_bfp) begin
      failures++;
      if (failures < 10) $display("FAIL bfp a=%0d bmi=%0d age=%0d got %0d exp %0d", ai, bi, agei, bfp, exp_bfp);
    end
  endtask

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t;
    // 1.2*24 + 0.23*30 - 5.4 = 30.3 ; male 19.5
    check(1'b1, 24, 30, 30, 19);
    check(1'b0, 24, 30, 30, 30);
    // 1.2*18 + 0.23*20 - 5.4 = 20.8 ; male 10.0
    check(1'b1, 18, 20, 20, 10);
    // small values clamp to 0
    check(1'b1, 5, 0, 0, 0);
    check(1'b0, 0, 0, 0, 0);
    // large values clamp to 255
    check(1'b0, 255, 255, 255, 255);
    for (int s = 0; s < 2; s++)
      for (int bi = 0; bi < 256; bi++)
        for (int ai = 0; ai < 256; ai++) begin
          t = 10 * (12 * bi) + 23 * ai - 10 * 54;   // hundredths
          check(s[0], bi, ai, clamp_pct(t), clamp_pct(t - s * 1080));
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
