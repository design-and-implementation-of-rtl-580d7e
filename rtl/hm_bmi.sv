// hm_bmi: body mass index unit.
//
// Computes BMI = weight / height^2 with weight in kg and height in cm, i.e.
// bmi = floor(10000 * w / h^2), the index in kg/m^2 rounded down to an
// integer. The definition (weight over the square of height) follows the
// design description; the integer rounding, the cm-to-m scaling and the
// saturation are this implementation's choices: a result above 2^W-1, and a
// zero height, give the largest value 2^W-1.
//
// Interface: w, h in; bmi out, all W bits unsigned. Purely combinational,
// no clock and no latency.
module hm_bmi #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] w,    // weight, kg
  input  logic [W-1:0] h,    // height, cm
  output logic [W-1:0] bmi   // body mass index, kg/m^2
);

  // 10000 < 2^14, so the scaled weight needs W+14 bits
  localparam int unsigned NW = W + 14;

  logic [NW-1:0]  num;
  logic [2*W-1:0] hsq;
  logic [NW-1:0]  quo;

  always_comb begin
    num = NW'(w) * NW'(hm_pkg::CM2_PER_M2);
    hsq = (2*W)'(h) * (2*W)'(h);
    if (hsq == '0) quo = '1;
    else           quo = num / NW'(hsq);
    if (quo > NW'({W{1'b1}})) bmi = '1;
    else                      bmi = quo[W-1:0];
  end

endmodule
