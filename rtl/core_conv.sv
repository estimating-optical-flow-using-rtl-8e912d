// core_conv: LANE_NUM parallel convolution pipelines.
//
// Every cycle in which a data vector (data_ch), a weight word (weight_ch, one
// VEC_SIZE weight vector per lane) and room in the output channel (conv_ch)
// are all available, each lane multiplies the shared data vector with its
// own weight vector (vec_mac) and adds the sum to its accumulator. After
// acc_len words -- in_vecs * k * k for a k x k window over in_vecs input
// vectors -- the window is complete: each lane takes its bias from the bias
// word (bias_ch, one bias per lane, popped with the last data word), runs its
// sum through fixed_adjust and the LANE_NUM 16-bit results leave as one word
// on conv_ch the next cycle. Lane l therefore produces output channel
// m * LANE_NUM + l of every pixel, as in the lane partitioning of the design.
// Throughput: one data word per cycle, i.e. LANE_NUM * VEC_SIZE MACs per
// cycle, with no bubbles between windows. Latency: one cycle from the last
// word of a window to its push on conv_ch.
// The handshake (pop on the FIFO head, space check via out_count) and the
// one-cycle output register are this design's own choices.
module core_conv
  import pipecnn_pkg::*;
#(
  parameter int unsigned LANE_NUM  = 8,
  parameter int unsigned VEC_SIZE  = 4,
  parameter int unsigned OUT_DEPTH = 8,
  parameter int unsigned RELU_DIV  = 10
) (
  input  logic                                     clk,
  input  logic                                     rst_n,
  // layer settings, stable while a layer runs
  input  logic [15:0]                              acc_len,
  input  logic                                     relu,
  input  logic [5:0]                               bias_shift,
  input  logic [5:0]                               out_shift,
  // data_ch
  input  logic                                     d_empty,
  input  logic [VEC_SIZE-1:0][DATA_W-1:0]          d_data,
  output logic                                     d_pop,
  // weight_ch
  input  logic                                     w_empty,
  input  logic [LANE_NUM-1:0][VEC_SIZE-1:0][DATA_W-1:0] w_data,
  output logic                                     w_pop,
  // bias_ch
  input  logic                                     b_empty,
  input  logic [LANE_NUM-1:0][DATA_W-1:0]          b_data,
  output logic                                     b_pop,
  // conv_ch
  output logic                                     o_push,
  output logic [LANE_NUM-1:0][DATA_W-1:0]          o_data,
  input  logic [$clog2(OUT_DEPTH+1)-1:0]           o_count
);

  logic [15:0]                          word_cnt;
  logic                                 last, out_room, fire;
  logic signed [LANE_NUM-1:0][ACC_W-1:0] acc;
  logic signed [ACC_W-1:0]              dot   [LANE_NUM];
  logic signed [ACC_W-1:0]              total [LANE_NUM];
  logic signed [DATA_W-1:0]             adj   [LANE_NUM];

  assign last     = (word_cnt == acc_len - 16'd1);
  assign out_room = (32'(o_count) + (o_push ? 32'd1 : 32'd0)) < OUT_DEPTH;
  assign fire     = !d_empty && !w_empty && (!last || !b_empty) && out_room;
  assign d_pop    = fire;
  assign w_pop    = fire;
  assign b_pop    = fire && last;

  for (genvar l = 0; l < LANE_NUM; l++) begin : g_lane
    vec_mac #(.VEC_SIZE(VEC_SIZE), .DATA_W(DATA_W), .ACC_W(ACC_W)) u_mac (
      .data   (d_data),
      .weight (w_data[l]),
      .sum    (dot[l])
    );
    assign total[l] = acc[l] + dot[l];
    fixed_adjust #(.RELU_DIV(RELU_DIV)) u_adj (
      .acc        (total[l]),
      .bias       (b_data[l]),
      .bias_shift (bias_shift),
      .out_shift  (out_shift),
      .relu       (relu),
      .result     (adj[l])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word_cnt <= '0;
      acc      <= '0;
      o_push   <= 1'b0;
      o_data   <= '0;
    end else begin
      o_push <= fire && last;
      if (fire) begin
        word_cnt <= last ? '0 : word_cnt + 16'd1;
        for (int l = 0; l < LANE_NUM; l++) begin
          acc[l] <= last ? '0 : total[l];
          if (last) o_data[l] <= adj[l];
        end
      end
    end
  end

  a_acc_len_nonzero: assert property (@(posedge clk) disable iff (!rst_n) fire |-> acc_len != '0);

endmodule
