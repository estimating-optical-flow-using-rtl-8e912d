// vec_mac: the multiply-accumulate step of one convolution lane.
//
// Multiplies a VEC_SIZE-wide vector of input features with the matching
// vector of weights (16-bit signed, element 0 in the low bits) and sums the
// products into one ACC_W-bit signed value. Purely combinational: the lane
// around it adds this sum to its accumulator once per accepted word. Inputs
// and weights may carry different numbers of fractional bits; no alignment is
// done here, the rescale after accumulation accounts for both.
// The multiply-and-add step of each lane and its 16-bit by 16-bit into
// 32-bit arithmetic follow the original design; the purely combinational
// form is this design's own choice.
module vec_mac #(
  parameter int unsigned VEC_SIZE = 4,
  parameter int unsigned DATA_W   = 16,
  parameter int unsigned ACC_W    = 32
) (
  input  logic [VEC_SIZE-1:0][DATA_W-1:0] data,
  input  logic [VEC_SIZE-1:0][DATA_W-1:0] weight,
  output logic signed [ACC_W-1:0]         sum
);

  always_comb begin
    logic signed [ACC_W-1:0] s;
    s = '0;
    for (int i = 0; i < VEC_SIZE; i++) begin
      s = s + ACC_W'($signed(data[i]) * $signed(weight[i]));
    end
    sum = s;
  end

endmodule
