// healthmonitor: body-composition indicators from five basic measurements.
//
// From sex, weight, height, age and waist the monitor derives four indices
// at once: body mass index (hm_bmi), body fat percentage (hm_bfp, which uses
// the BMI), relative fat mass (hm_rfm) and basal metabolic rate (hm_bmr).
// The data flow follows the description: BMI from weight and height; BFP
// from BMI, age and sex; RFM from height, waist and sex; BMR from weight,
// height, age and sex. The bone-mineral-density output of the description is
// not built, because the chart it is read from is not given.
//
// Interface: all inputs and outputs are plain unsigned buses; a = 0 means
// female and a = 1 male. The whole monitor is combinational: outputs follow
// the inputs after the propagation delay, with no clock or reset. The 8-bit
// inputs follow the description; the 12-bit BMR output is this design's
// choice (it holds the largest possible value, 4085). Two deferred
// assertions check invariants of the formulas during simulation.
module healthmonitor #(
  parameter int unsigned W     = 8,
  parameter int unsigned BMR_W = 12
) (
  input  logic             a,      // sex: 0 female, 1 male
  input  logic [W-1:0]     w,      // weight, kg
  input  logic [W-1:0]     h,      // height, cm
  input  logic [W-1:0]     age,    // age, years
  input  logic [W-1:0]     waist,  // waist circumference, cm
  output logic [W-1:0]     bmi,    // body mass index, kg/m^2
  output logic [W-1:0]     b,      // BFP before the sex term, percent
  output logic [W-1:0]     bfp,    // body fat percentage, percent
  output logic [W-1:0]     rfm,    // relative fat mass, percent
  output logic [BMR_W-1:0] bmr     // basal metabolic rate, kcal/day
);

  hm_bmi #(.W(W)) u_bmi (
    .w   (w),
    .h   (h),
    .bmi (bmi)
  );

  hm_bfp #(.W(W)) u_bfp (
    .a   (a),
    .bmi (bmi),
    .age (age),
    .b   (b),
    .bfp (bfp)
  );

  hm_rfm #(.W(W)) u_rfm (
    .a     (a),
    .h     (h),
    .waist (waist),
    .rfm   (rfm)
  );

  hm_bmr #(.W(W), .OW(BMR_W)) u_bmr (
    .a   (a),
    .w   (w),
    .h   (h),
    .age (age),
    .bmr (bmr)
  );

  // Invariants of the formulas: the sex correction only ever lowers the body
  // fat percentage, and the relative fat mass never exceeds the larger of its
  // two constants (76).
  always_comb begin
    assert final (bfp <= b)
      else $error("bfp %0d above its uncorrected value %0d", bfp, b);
    assert final (rfm <= W'(hm_pkg::RFM_C_FEMALE))
      else $error("rfm %0d above %0d", rfm, hm_pkg::RFM_C_FEMALE);
  end

endmodule
