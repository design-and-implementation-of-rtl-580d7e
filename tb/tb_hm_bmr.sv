// tb_hm_bmr: self-checking testbench for the basal metabolic rate unit.
//
// Reference: BMR = 10*w + 6*h - 5*age + 5 (male) or - 161 (female),
// clamped to 0..4095. Hand-worked cases first, then the corners of the
// input space and 200000 random vectors.
module tb_hm_bmr;

  logic        a;
  logic [7:0]  w, h, age;
  logic [11:0] bmr;
  int checks = 0, failures = 0;

  hm_bmr #(.W(8), .OW(12)) dut (.a(a), .w(w), .h(h), .age(age), .bmr(bmr));

  function automatic int ref_bmr(bit male, int wi, int hi, int agei);
    int v;
    v = wi * 10 + hi * 6 - agei * 5 + (male ? 5 : -161);
    if (v < 0) v = 0;
    if (v > 4095) v = 4095;
    return v;
  endfunction

  task automatic check(bit ai, int wi, int hi, int agei, int expv);
    a = ai; w = 8'(wi); h = 8'(hi); age = 8'(agei);
    #1;
    checks++;
    if (int'(bmr) != expv) begin
      failures++;
      if (failures < 10) $display("FAIL bmr a=%0d w=%0d h=%0d age=%0d got %0d exp %0d", ai, wi, hi, agei, bmr, expv);
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
    int wi, hi, agei;
    check(1'b1, 70, 175, 30, 1605);
    check(1'b0, 60, 160, 25, 1274);
    check(1'b1, 255, 255, 0, 4085);
    check(1'b0, 0, 0, 255, 0);
    check(1'b0, 10, 20, 0, 59);
    for (int s = 0; s < 2; s++)
      for (int c = 0; c < 8; c++) begin
        wi = c[0] ? 255 : 0; hi = c[1] ? 255 : 0; agei = c[2] ? 255 : 0;
        check(s[0], wi, hi, agei, ref_bmr(s[0], wi, hi, agei));
      end
    for (int i = 0; i < 200000; i++) begin
      wi = int'($urandom_range(0, 255));
      hi = int'($urandom_range(0, 255));
      agei = int'($urandom_range(0, 255));
      check(i[0], wi, hi, agei, ref_bmr(i[0], wi, hi, agei));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
