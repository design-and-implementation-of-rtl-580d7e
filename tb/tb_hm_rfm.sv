// tb_hm_rfm: self-checking testbench for the relative fat mass unit.
//
// Reference: RFM = C - 20*h/waist, C = 64 male and 76 female, rounded down
// and clamped at 0 (a zero waist gives 0). The reference works on the ratio
// in 1/waist units: it subtracts 20*h from C*waist and steps down the
// quotient. Hand-worked cases first, then every height/waist pair for both
// sexes.
module tb_hm_rfm;

  logic       a;
  logic [7:0] h, waist, rfm;
  int checks = 0, failures = 0;

  hm_rfm #(.W(8)) dut (.a(a), .h(h), .waist(waist), .rfm(rfm));

  function automatic int ref_rfm(bit male, int hi, int wi);
    int c, n;
    c = male ? 64 : 76;
    if (wi == 0) return 0;
    // largest n >= 0 with n*waist + 20*h <= c*waist
    if (20 * hi > c * wi) return 0;
    n = 0;
    while ((n + 1) * wi + 20 * hi <= c * wi) n++;
    return n;
  endfunction

  task automatic check(bit ai, int hi, int wi, int expv);
    a = ai; h = 8'(hi); waist = 8'(wi);
    #1;
    checks++;
    if (int'(rfm) != expv) begin
      failures++;
      if (failures < 10) $display("FAIL rfm a=%0d h=%0d waist=%0d got %0d exp %0d", ai, hi, wi, rfm, expv);
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
    check(1'b1, 175, 90, 25);   // 64 - 38.89 = 25.11
    check(1'b0, 160, 80, 36);   // 76 - 40
    check(1'b1, 160, 80, 24);   // 64 - 40
    check(1'b0, 200, 40, 0);    // 76 - 100 < 0
    check(1'b1, 170, 0, 0);     // no waist
    check(1'b0, 0, 100, 76);
    for (int s = 0; s < 2; s++)
      for (int hi = 0; hi < 256; hi++)
        for (int wi = 0; wi < 256; wi++)
          check(s[0], hi, wi, ref_rfm(s[0], hi, wi));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
