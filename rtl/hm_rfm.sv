// hm_rfm: relative fat mass unit.
//
// Evaluates RFM = C - 20 * (height / waist), with C = 64 for a male and 76
// for a female, heights and waists in cm. To keep the ratio's fraction the
// unit forms (C*waist - 20*height) / waist, which equals the formula exactly,
// and rounds the quotient down. A negative result, and a zero waist, give 0;
// this clamping and the rounding are this implementation's choices, the
// formula and its constants follow the design description.
//
// Interface: a (sex, 1 = male), h and waist in; rfm out, W bits unsigned, in
// percent. Purely combinational.
module hm_rfm #(
  parameter int unsigned W = 8
) (
  input  logic         a,      // sex: 0 female, 1 male
  input  logic [W-1:0] h,      // height, cm
  input  logic [W-1:0] waist,  // waist circumference, cm
  output logic [W-1:0] rfm     // relative fat mass, percent
);

  // 76*waist < 2^(W+7), plus a sign bit
  localparam int unsigned SW = W + 8;

  typedef logic signed [SW-1:0] acc_t;

  acc_t cst;
  acc_t num;
  acc_t quo;

  always_comb begin
    cst = (hm_pkg::sex_e'(a) == hm_pkg::MALE) ? acc_t'(hm_pkg::RFM_C_MALE)
                                              : acc_t'(hm_pkg::RFM_C_FEMALE);
    num = cst * acc_t'(waist) - acc_t'(hm_pkg::RFM_K_RATIO) * acc_t'(h);
    quo = '0;
    if (waist == '0 || num <= 0) rfm = '0;
    else begin
      quo = num / acc_t'(waist);
      if (quo > acc_t'({W{1'b1}})) rfm = '1;
      else                         rfm = quo[W-1:0];
    end
  end

endmodule
