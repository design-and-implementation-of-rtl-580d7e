// hm_pkg: types and constants shared by the health-monitor units.
//
// The monitor works on four 8-bit anthropometric inputs (weight in kg,
// height in cm, age in years, waist circumference in cm) and a sex bit.
// The sex encoding (0 = female, 1 = male) and the formula constants below
// are those of the design description; where a constant is fractional it is
// held scaled by 100 so that every unit can stay in integer arithmetic.
// The scaling, and the choice of 10000 to turn cm^2 into m^2 for BMI, are
// this implementation's own.
package hm_pkg;

  // Sex input 'a': 0 is female, 1 is male.
  typedef enum logic {
    FEMALE = 1'b0,
    MALE   = 1'b1
  } sex_e;

  // BMI = weight[kg] / height[m]^2 = 10000 * weight[kg] / height[cm]^2
  localparam int unsigned CM2_PER_M2 = 10000;

  // BFP = 1.20*BMI + 0.23*Age - 10.8*S - 5.4   (S = 1 for male)
  // coefficients scaled by 100
  localparam int unsigned BFP_K_BMI   = 120;
  localparam int unsigned BFP_K_AGE   = 23;
  localparam int unsigned BFP_K_SEX   = 1080;
  localparam int unsigned BFP_OFFSET  = 540;
  localparam int unsigned BFP_SCALE   = 100;

  // RFM = C - 20 * (height / waist), C = 64 for male, 76 for female
  localparam int unsigned RFM_C_MALE   = 64;
  localparam int unsigned RFM_C_FEMALE = 76;
  localparam int unsigned RFM_K_RATIO  = 20;

  // BMR = 10*w + 6*h - 5*age + 5 (male) or - 161 (female)
  localparam int unsigned BMR_K_W      = 10;
  localparam int unsigned BMR_K_H      = 6;
  localparam int unsigned BMR_K_AGE    = 5;
  localparam int unsigned BMR_C_MALE   = 5;
  localparam int unsigned BMR_C_FEMALE = 161;

endpackage
