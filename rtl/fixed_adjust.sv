// fixed_adjust: bias, leaky ReLU, rescale and saturation of one lane result.
//
// The convolution sum arrives in a 32-bit accumulator whose scale is
// frac_w + frac_din fractional bits. This block
//   1. adds the 16-bit bias shifted left by bias_shift (= frac_w + frac_din),
//      so the bias enters at the accumulator's scale, before any rescale;
//   2. if relu is set and the biased sum is negative, divides it by RELU_DIV
//      (FlowNet-S multiplies negative activations by 0.1), truncating toward
//      zero like an integer division;
//   3. shifts right by out_shift - 1 (out_shift = frac_w + frac_din -
//      frac_dout), adds one rounding bit and drops the last bit, which
//      rounds half up to frac_dout fractional bits;
//   4. saturates the result to [OUT_MIN, OUT_MAX] = [-32767, 32767].
// The ordering of steps and the symmetric saturation limits follow the
// design description; the out_shift = 0 case (no fractional reduction) is
// handled by skipping the rounding step, which is this design's own choice.
// Purely combinational.
module fixed_adjust
  import pipecnn_pkg::*;
#(
  parameter int unsigned RELU_DIV = 10
) (
  input  logic signed [ACC_W-1:0]  acc,
  input  logic signed [DATA_W-1:0] bias,
  input  logic [5:0]               bias_shift,
  input  logic [5:0]               out_shift,
  input  logic                     relu,
  output logic signed [DATA_W-1:0] result
);

  localparam int unsigned WW = ACC_W + 2;  // room for the rounding bit

  logic signed [ACC_W-1:0] sum_bias;
  logic signed [ACC_W-1:0] activated;
  logic signed [WW-1:0]    with_rnd;
  logic signed [WW-1:0]    rounded;

  always_comb begin
    sum_bias  = acc + (ACC_W'(bias) <<< bias_shift);
    if (relu && sum_bias < 0) activated = sum_bias / $signed(ACC_W'(RELU_DIV));
    else                      activated = sum_bias;

    with_rnd = (WW'(activated) >>> (out_shift - 6'd1)) + WW'(1);
    if (out_shift == '0) rounded = WW'(activated);
    else                 rounded = with_rnd >>> 1;

    if (rounded > WW'(OUT_MAX))      result = DATA_W'(OUT_MAX);
    else if (rounded < WW'(OUT_MIN)) result = DATA_W'(OUT_MIN);
    else                             result = DATA_W'(rounded);
  end

endmodule
