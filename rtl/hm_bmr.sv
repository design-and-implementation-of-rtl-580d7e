// hm_bmr: basal metabolic rate unit.
//
// Evaluates BMR = 10*w + 6*h - 5*age + 5 for a male and
// 10*w + 6*h - 5*age - 161 for a female (w in kg, h in cm, age in years),
// the integer coefficients of the description's flow. The output is OW bits
// wide; a negative result is clamped to 0 and one above 2^OW-1 to 2^OW-1.
// The output width and the clamping are this implementation's choices: with
// 8-bit inputs the largest value is 10*255 + 6*255 + 5 = 4085, so the default
// 12 bits never clamp from above.
//
// Interface: a (sex, 1 = male), w, h, age in; bmr out in kcal/day. Purely
// combinational.
module hm_bmr #(
  parameter int unsigned W  = 8,
  parameter int unsigned OW = 12
) (
  input  logic          a,     // sex: 0 female, 1 male
  input  logic [W-1:0]  w,     // weight, kg
  input  logic [W-1:0]  h,     // height, cm
  input  logic [W-1:0]  age,   // age, years
  output logic [OW-1:0] bmr    // basal metabolic rate, kcal/day
);

  // 16*(2^W-1) + 5 < 2^(W+5), plus a sign bit; wide enough for OW too
  localparam int unsigned SW = ((W + 6) > (OW + 1)) ? (W + 6) : (OW + 1);

  typedef logic signed [SW-1:0] acc_t;

  acc_t c;

  always_comb begin
    c = acc_t'(hm_pkg::BMR_K_W) * acc_t'(w)
      + acc_t'(hm_pkg::BMR_K_H) * acc_t'(h)
      - acc_t'(hm_pkg::BMR_K_AGE) * acc_t'(age);
    if (hm_pkg::sex_e'(a) == hm_pkg::MALE) c = c + acc_t'(hm_pkg::BMR_C_MALE);
    else                                   c = c - acc_t'(hm_pkg::BMR_C_FEMALE);
    if (c <= 0)                        bmr = '0;
    else if (c > acc_t'({OW{1'b1}}))   bmr = '1;
    else                               bmr = c[OW-1:0];
  end

endmodule
