// tb_healthmonitor: end-to-end testbench of the health monitor at its
// default sizes (8-bit inputs, 12-bit BMR).
//
// Applies worked examples for a typical man and woman, then 100000 random
// people with realistic measurements and 100000 vectors over the whole
// input range, and compares all five outputs with a reference model held
// here. The reference keeps every quantity in hundredths and rounds down
// once, so it does not share the unit's arithmetic. The test also counts how
// often each behaviour of the design occurs (male and female branches, BMI
// clamping at 255, BFP, RFM and BMR clamping at 0) and fails if one never
// occurs.
module tb_healthmonitor;

  logic        a;
  logic [7:0]  w, h, age, waist;
  logic [7:0]  bmi, b, bfp, rfm;
  logic [11:0] bmr;

  int checks = 0, failures = 0;
  int n_male = 0, n_female = 0, n_bmi_sat = 0, n_bfp_zero = 0,
      n_rfm_zero = 0, n_bmr_zero = 0;

  healthmonitor dut (
    .a(a), .w(w), .h(h), .age(age), .waist(waist),
    .bmi(bmi), .b(b), .bfp(bfp), .rfm(rfm), .bmr(bmr)
  );

  function automatic int fdiv_clamp(longint num, longint den, int maxv);
    longint q;
    if (num <= 0) return 0;
    q = num / den;
    return (q > longint'(maxv)) ? maxv : int'(q);
  endfunction

  task automatic apply(bit ai, int wi, int hi, int agei, int wai);
    int e_bmi, e_b, e_bfp, e_rfm, e_bmr;
    longint hund;
    a = ai; w = 8'(wi); h = 8'(hi); age = 8'(agei); waist = 8'(wai);
    #1;
    // BMI in kg/m^2: w / (h/100)^2
    if (hi == 0) e_bmi = 255;
    else         e_bmi = fdiv_clamp(longint'(wi) * 100 * 100, longint'(hi) * hi, 255);
    // BFP in hundredths of a percent
    hund  = longint'(e_bmi) * 120 + longint'(agei) * 23 - 540;
    e_b   = fdiv_clamp(hund, 100, 255);
    e_bfp = fdiv_clamp(hund - (ai ? 1080 : 0), 100, 255);
    // RFM: C - 20 h / waist, C = 64 male / 76 female
    if (wai == 0) e_rfm = 0;
    else e_rfm = fdiv_clamp(longint'(ai ? 64 : 76) * wai - 20 * longint'(hi), longint'(wai), 255);
    // BMR
    e_bmr = 10 * wi + 6 * hi - 5 * agei + (ai ? 5 : -161);
    if (e_bmr < 0) e_bmr = 0;
    if (e_bmr > 4095) e_bmr = 4095;

    if (ai) n_male++; else n_female++;
    if (e_bmi == 255 && (hi == 0 || wi * 10000 >= 256 * hi * hi)) n_bmi_sat++;
    if (e_bfp == 0 && hund - (ai ? 1080 : 0) < 0) n_bfp_zero++;
    if (wai != 0 && (ai ? 64 : 76) * wai < 20 * hi) n_rfm_zero++;
    if (10 * wi + 6 * hi - 5 * agei + (ai ? 5 : -161) < 0) n_bmr_zero++;

    checks += 5;
    if (int'(bmi) != e_bmi) begin failures++; report("bmi", int'(bmi), e_bmi); end
    if (int'(b)   != e_b)   begin failures++; report("b",   int'(b),   e_b);   end
    if (int'(bfp) != e_bfp) begin failures++; report("bfp", int'(bfp), e_bfp); end
    if (int'(rfm) != e_rfm) begin failures++; report("rfm", int'(rfm), e_rfm); end
    if (int'(bmr) != e_bmr) begin failures++; report("bmr", int'(bmr), e_bmr); end
  endtask

  task automatic report(string what, int got, int expv);
    if (failures < 10)
      $display("FAIL %s a=%0d w=%0d h=%0d age=%0d waist=%0d: got %0d exp %0d",
               what, a, w, h, age, waist, got, expv);
  endtask

  task automatic expect_outputs(int e_bmi, int e_b, int e_bfp, int e_rfm, int e_bmr);
    checks++;
    if (!(int'(bmi) == e_bmi && int'(b) == e_b && int'(bfp) == e_bfp &&
          int'(rfm) == e_rfm && int'(bmr) == e_bmr)) begin
      failures++;
      $display("FAIL worked example a=%0d: %0d %0d %0d %0d %0d", a, bmi, b, bfp, rfm, bmr);
    end
  endtask

  task automatic need(string what, int n);
    checks++;
    $display("  %-22s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL behaviour never exercised: %s", what);
    end
  endtask

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Man, 70 kg, 175 cm, 30 years, waist 90 cm:
    //   BMI 22.86 -> 22; b = 26.4+6.9-5.4 = 27.9 -> 27; BFP 17.1 -> 17;
    //   RFM 64 - 38.9 = 25.1 -> 25; BMR 700+1050-150+5 = 1605
    apply(1'b1, 70, 175, 30, 90);
    expect_outputs(22, 27, 17, 25, 1605);
    // Woman, 60 kg, 160 cm, 25 years, waist 80 cm:
    //   BMI 23.4 -> 23; b = 27.6+5.75-5.4 = 27.95 -> 27; BFP 27;
    //   RFM 76 - 40 = 36; BMR 600+960-125-161 = 1274
    apply(1'b0, 60, 160, 25, 80);
    expect_outputs(23, 27, 27, 36, 1274);
    // realistic population
    for (int i = 0; i < 100000; i++)
      apply(i[0], int'($urandom_range(30, 150)), int'($urandom_range(140, 200)),
            int'($urandom_range(18, 80)), int'($urandom_range(60, 130)));
    // whole input range, including the clamping corners
    for (int i = 0; i < 100000; i++)
      apply($urandom_range(0, 1) == 1, int'($urandom_range(0, 255)), int'($urandom_range(0, 255)),
            int'($urandom_range(0, 255)), int'($urandom_range(0, 255)));
    apply(1'b1, 200, 0, 40, 100);   // zero height
    apply(1'b0, 5, 180, 90, 0);     // zero waist
    $display("behaviours exercised:");
    need("male branch", n_male);
    need("female branch", n_female);
    need("BMI clamped at 255", n_bmi_sat);
    need("BFP clamped at 0", n_bfp_zero);
    need("RFM clamped at 0", n_rfm_zero);
    need("BMR clamped at 0", n_bmr_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
