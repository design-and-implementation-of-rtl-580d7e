// hm_bfp: body fat percentage unit.
//
// Evaluates BFP = 1.20*BMI + 0.23*Age - 10.8*S - 5.4, S = 1 for a male, in
// two steps like the description's flow: first the sex-independent part
// b = 1.20*BMI + 0.23*Age - 5.4, then bfp = b for a female and b - 10.8 for
// a male. The coefficients are held scaled by 100, the sum is formed exactly
// and divided by 100 once at the end, rounding down. Negative results are
// clamped to 0 and results above 2^W-1 to 2^W-1; the scaling, rounding and
// clamping are this implementation's choices.
//
// Interface: a (sex, 1 = male), bmi (integer BMI from hm_bmi) and age in;
// b and bfp out, W bits unsigned, in percent. Purely combinational.
module hm_bfp #(
  parameter int unsigned W = 8
) (
  input  logic         a,     // sex: 0 female, 1 male
  input  logic [W-1:0] bmi,   // body mass index, kg/m^2
  input  logic [W-1:0] age,   // age, years
  output logic [W-1:0] b,     // sex-independent part of BFP, percent
  output logic [W-1:0] bfp    // body fat percentage, percent
);

  // 120*bmi + 23*age < 2^(W+8), plus a sign bit and a guard bit
  localparam int unsigned SW = W + 10;

  typedef logic signed [SW-1:0] acc_t;

  acc_t b_x100;    // b scaled by 100
  acc_t bfp_x100;  // bfp scaled by 100

  // x/100 rounded down, clamped to 0 .. 2^W-1
  function automatic logic [W-1:0] scale_sat(acc_t x);
    acc_t q;
    if (x <= 0) return '0;
    q = x / acc_t'(hm_pkg::BFP_SCALE);
    if (q > acc_t'({W{1'b1}})) return '1;
    return q[W-1:0];
  endfunction

  always_comb begin
    b_x100 = acc_t'(hm_pkg::BFP_K_BMI) * acc_t'(bmi)
           + acc_t'(hm_pkg::BFP_K_AGE) * acc_t'(age)
           - acc_t'(hm_pkg::BFP_OFFSET);
    if (hm_pkg::sex_e'(a) == hm_pkg::MALE)
      bfp_x100 = b_x100 - acc_t'(hm_pkg::BFP_K_SEX);
    else
      bfp_x100 = b_x100;
    b   = scale_sat(b_x100);
    bfp = scale_sat(bfp_x100);
  end

endmodule
