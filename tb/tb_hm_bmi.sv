// tb_hm_bmi: self-checking testbench for the BMI unit.
//
// Checks a few hand-worked cases (e.g. 70 kg at 170 cm gives 24) and then
// every one of the 65536 weight/height pairs against a reference that
// searches for the largest integer n with n*h^2 <= 10000*w, clamped to 255.
// The unit is combinational; each vector is checked 1 ns after it is applied.
module tb_hm_bmi;

  logic [7:0] w, h, bmi;
  int checks = 0, failures = 0;

  hm_bmi #(.W(8)) dut (.w(w), .h(h), .bmi(bmi));

  function automatic int ref_bmi(int wi, int hi);
    int n;
    if (hi == 0) return 255;
    n = 0;
    // largest n with n*h*h <= 10000*w, found by stepping
    while ((n + 1) * hi * hi <= 10000 * wi && n < 255) n++;
    return n;
  endfunction

  task automatic check(int wi, int hi, int expv);
    w = 8'(wi); h = 8'(hi);
    #1;
    checks++;
    if (int'(bmi) != expv) begin
      failures++;
      if (failures < 10) $display("FAIL bmi w=%0d h=%0d got %0d exp %0d", wi, hi, bmi, expv);
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
    check(70, 170, 24);
    check(100, 200, 25);
    check(50, 255, 7);
    check(255, 50, 255);
    check(80, 0, 255);
    check(0, 180, 0);
    for (int wi = 0; wi < 256; wi++)
      for (int hi = 0; hi < 256; hi++)
        check(wi, hi, ref_bmi(wi, hi));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
