// pipecnn_top: layer-by-layer CNN accelerator for FlowNet-S optical flow.
//
// The host runs the network one layer at a time: it loads the pre-processed
// image pair (both frames stacked along the channel axis), the weights and
// the biases into the global buffers, then for each layer presents a layer
// descriptor (cfg) with a one-cycle start pulse and waits for done. A
// convolution or transposed-convolution layer runs three engines at once,
// linked by channels:
//   mem_read  --data_ch/weight_ch/bias_ch-->  core_conv  --conv_ch-->  mem_write
// mem_read fetches the windows (making all padding and transposed-convolution
// zeros on the fly), core_conv computes LANE_NUM output channels in parallel
// with VEC_SIZE-wide dot products and applies bias, leaky ReLU, rounding and
// saturation, and mem_write stores the results in the output buffer. A
// concatenation layer runs concat_engine alone, copying up to three buffers
// one after the other into a destination buffer. Feature buffers share one
// memory (the layer table's numbered buffers are address ranges in it); the
// weights and biases have memories of their own.
//
// Host ports: the feature memory can be written and read by the host while no
// layer runs (busy low); weight and bias memories can be written while no
// convolution layer runs (an assertion checks this). done pulses for one cycle when a layer has
// completely been written back. A convolution layer of G output groups,
// H x W output pixels and an L = in_vecs * k * k word window takes about
// G * H * W * L cycles plus a few cycles of pipeline latency.
// LANE_NUM = 8 is the largest configuration built in the design study;
// VEC_SIZE = 4 is the vector width of its data-layout illustration. Memory
// depths are this design's own choice, sized for FlowNet-S at 384 x 384.
module pipecnn_top
  import pipecnn_pkg::*;
#(
  parameter int unsigned LANE_NUM = 8,
  parameter int unsigned VEC_SIZE = 4,
  parameter int unsigned DAW      = 21,  // feature memory: 2**DAW vector words
  parameter int unsigned WAW      = 18,  // weight memory: 2**WAW words
  parameter int unsigned BAW      = 9,   // bias memory: 2**BAW words
  parameter int unsigned CH_DEPTH = 8,   // depth of every channel
  parameter int unsigned RELU_DIV = 10   // leaky ReLU divisor (slope 0.1)
) (
  input  logic                                          clk,
  input  logic                                          rst_n,
  // layer control
  input  logic                                          start,
  input  layer_cfg_t                                    cfg,
  output logic                                          busy,
  output logic                                          done,
  // host access to the feature buffers (only while busy is low)
  input  logic                                          h_wr_en,
  input  logic [DAW-1:0]                                h_wr_addr,
  input  logic [VEC_SIZE-1:0][DATA_W-1:0]               h_wr_data,
  input  logic                                          h_rd_en,
  input  logic [DAW-1:0]                                h_rd_addr,
  output logic [VEC_SIZE-1:0][DATA_W-1:0]               h_rd_data,
  // host loading of weights and biases
  input  logic                                          hw_wr_en,
  input  logic [WAW-1:0]                                hw_wr_addr,
  input  logic [LANE_NUM-1:0][VEC_SIZE-1:0][DATA_W-1:0] hw_wr_data,
  input  logic                                          hb_wr_en,
  input  logic [BAW-1:0]                                hb_wr_addr,
  input  logic [LANE_NUM-1:0][DATA_W-1:0]               hb_wr_data
);

  localparam int unsigned CW = $clog2(CH_DEPTH + 1);

  typedef logic [VEC_SIZE-1:0][DATA_W-1:0]           vec_t;
  typedef logic [LANE_NUM-1:0][VEC_SIZE-1:0][DATA_W-1:0] wvec_t;
  typedef logic [LANE_NUM-1:0][DATA_W-1:0]           lane_t;

  typedef enum logic [1:0] {S_IDLE, S_CONV, S_CAT} state_e;

  state_e     state;
  layer_cfg_t cfg_q;
  logic       go_conv, go_cat;
  logic       rd_busy, rd_done, wr_busy, wr_done, cat_busy, cat_done;

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      cfg_q   <= '0;
      go_conv <= 1'b0;
      go_cat  <= 1'b0;
    end else begin
      go_conv <= 1'b0;
      go_cat  <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          cfg_q <= cfg;
          if (cfg.op == OP_CONCAT) begin
            state  <= S_CAT;
            go_cat <= 1'b1;
          end else begin
            state   <= S_CONV;
            go_conv <= 1'b1;
          end
        end
        S_CONV: if (wr_done) state <= S_IDLE;
        S_CAT:  if (cat_done) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
  assign done = (state == S_CONV && wr_done) || (state == S_CAT && cat_done);

  // ---------------------------------------------------------------- memories
  logic  f_rd_en, f_wr_en;
  logic [DAW-1:0] f_rd_addr, f_wr_addr;
  vec_t  f_rd_data, f_wr_data;
  logic [VEC_SIZE-1:0] f_wr_strb;

  logic  rd_d_en, rd_w_en, rd_b_en;
  logic [DAW-1:0] rd_d_addr;
  logic [WAW-1:0] rd_w_addr;
  logic [BAW-1:0] rd_b_addr;
  wvec_t w_rd_data;
  lane_t b_rd_data;

  logic  mw_en;  logic [DAW-1:0] mw_addr;  vec_t mw_data;  logic [VEC_SIZE-1:0] mw_strb;
  logic  cr_en;  logic [DAW-1:0] cr_addr;
  logic  cw_en;  logic [DAW-1:0] cw_addr;  vec_t cw_data;  logic [VEC_SIZE-1:0] cw_strb;

  always_comb begin
    case (state)
      S_CONV: begin
        f_rd_en = rd_d_en;  f_rd_addr = rd_d_addr;
        f_wr_en = mw_en;    f_wr_addr = mw_addr;  f_wr_data = mw_data;  f_wr_strb = mw_strb;
      end
      S_CAT: begin
        f_rd_en = cr_en;    f_rd_addr = cr_addr;
        f_wr_en = cw_en;    f_wr_addr = cw_addr;  f_wr_data = cw_data;  f_wr_strb = cw_strb;
      end
      default: begin
        f_rd_en = h_rd_en;  f_rd_addr = h_rd_addr;
        f_wr_en = h_wr_en;  f_wr_addr = h_wr_addr; f_wr_data = h_wr_data; f_wr_strb = '1;
      end
    endcase
  end
  assign h_rd_data = f_rd_data;

  vec_ram #(.ELEMS(VEC_SIZE), .ELEM_W(DATA_W), .AW(DAW)) u_feature_mem (
    .clk, .wr_en(f_wr_en), .wr_addr(f_wr_addr), .wr_data(f_wr_data), .wr_strb(f_wr_strb),
    .rd_en(f_rd_en), .rd_addr(f_rd_addr), .rd_data(f_rd_data)
  );

  vec_ram #(.ELEMS(LANE_NUM * VEC_SIZE), .ELEM_W(DATA_W), .AW(WAW)) u_weight_mem (
    .clk, .wr_en(hw_wr_en), .wr_addr(hw_wr_addr), .wr_data(hw_wr_data), .wr_strb('1),
    .rd_en(rd_w_en), .rd_addr(rd_w_addr), .rd_data(w_rd_data)
  );

  vec_ram #(.ELEMS(LANE_NUM), .ELEM_W(DATA_W), .AW(BAW)) u_bias_mem (
    .clk, .wr_en(hb_wr_en), .wr_addr(hb_wr_addr), .wr_data(hb_wr_data), .wr_strb('1),
    .rd_en(rd_b_en), .rd_addr(rd_b_addr), .rd_data(b_rd_data)
  );

  // ---------------------------------------------------------------- channels
  logic d_push, d_pop, d_full, d_empty;  vec_t  d_in, d_out;  logic [CW-1:0] d_count;
  logic w_push, w_pop, w_full, w_empty;  wvec_t w_in, w_out;  logic [CW-1:0] w_count;
  logic b_push, b_pop, b_full, b_empty;  lane_t b_in, b_out;  logic [CW-1:0] b_count;
  logic c_push, c_pop, c_full, c_empty;  lane_t c_in, c_out;  logic [CW-1:0] c_count;

  channel_fifo #(.WIDTH($bits(vec_t)),  .DEPTH(CH_DEPTH)) u_data_ch (
    .clk, .rst_n, .push(d_push), .wr_data(d_in), .pop(d_pop), .rd_data(d_out),
    .full(d_full), .empty(d_empty), .count(d_count));
  channel_fifo #(.WIDTH($bits(wvec_t)), .DEPTH(CH_DEPTH)) u_weight_ch (
    .clk, .rst_n, .push(w_push), .wr_data(w_in), .pop(w_pop), .rd_data(w_out),
    .full(w_full), .empty(w_empty), .count(w_count));
  channel_fifo #(.WIDTH($bits(lane_t)), .DEPTH(CH_DEPTH)) u_bias_ch (
    .clk, .rst_n, .push(b_push), .wr_data(b_in), .pop(b_pop), .rd_data(b_out),
    .full(b_full), .empty(b_empty), .count(b_count));
  channel_fifo #(.WIDTH($bits(lane_t)), .DEPTH(CH_DEPTH)) u_conv_ch (
    .clk, .rst_n, .push(c_push), .wr_data(c_in), .pop(c_pop), .rd_data(c_out),
    .full(c_full), .empty(c_empty), .count(c_count));

  // ---------------------------------------------------------------- engines
  mem_read #(.LANE_NUM(LANE_NUM), .VEC_SIZE(VEC_SIZE), .DAW(DAW), .WAW(WAW), .BAW(BAW),
             .CH_DEPTH(CH_DEPTH)) u_mem_read (
    .clk, .rst_n, .start(go_conv), .cfg(cfg_q), .busy(rd_busy), .done(rd_done),
    .d_rd_en(rd_d_en), .d_rd_addr(rd_d_addr), .d_rd_data(f_rd_data),
    .w_rd_en(rd_w_en), .w_rd_addr(rd_w_addr), .w_rd_data(w_rd_data),
    .b_rd_en(rd_b_en), .b_rd_addr(rd_b_addr), .b_rd_data(b_rd_data),
    .d_push, .d_data(d_in), .d_count,
    .w_push, .w_data(w_in), .w_count,
    .b_push, .b_data(b_in), .b_count
  );

  core_conv #(.LANE_NUM(LANE_NUM), .VEC_SIZE(VEC_SIZE), .OUT_DEPTH(CH_DEPTH),
              .RELU_DIV(RELU_DIV)) u_core_conv (
    .clk, .rst_n,
    .acc_len(16'(cfg_q.in_vecs) * 16'(cfg_q.k) * 16'(cfg_q.k)),
    .relu(cfg_q.relu), .bias_shift(cfg_q.bias_shift), .out_shift(cfg_q.out_shift),
    .d_empty, .d_data(d_out), .d_pop,
    .w_empty, .w_data(w_out), .w_pop,
    .b_empty, .b_data(b_out), .b_pop,
    .o_push(c_push), .o_data(c_in), .o_count(c_count)
  );

  mem_write #(.LANE_NUM(LANE_NUM), .VEC_SIZE(VEC_SIZE), .DAW(DAW)) u_mem_write (
    .clk, .rst_n, .start(go_conv), .cfg(cfg_q), .busy(wr_busy), .done(wr_done),
    .c_empty, .c_data(c_out), .c_pop,
    .wr_en(mw_en), .wr_addr(mw_addr), .wr_data(mw_data), .wr_strb(mw_strb)
  );

  concat_engine #(.VEC_SIZE(VEC_SIZE), .DAW(DAW)) u_concat (
    .clk, .rst_n, .start(go_cat), .cfg(cfg_q), .busy(cat_busy), .done(cat_done),
    .rd_en(cr_en), .rd_addr(cr_addr), .rd_data(f_rd_data),
    .wr_en(cw_en), .wr_addr(cw_addr), .wr_data(cw_data), .wr_strb(cw_strb)
  );

  // Host loads weights and biases only while no convolution layer runs.
  a_no_weight_load_in_layer: assert property (@(posedge clk) disable iff (!rst_n)
                                              (state == S_CONV) |-> !(hw_wr_en || hb_wr_en));
  // Producers check the channel counts, so nothing is pushed into a full channel.
  a_no_push_when_full: assert property (@(posedge clk) disable iff (!rst_n)
    !((d_full && d_push) || (w_full && w_push) || (b_full && b_push) || (c_full && c_push)));
  // Engines run only inside their layer type.
  a_engines_idle: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_IDLE) |-> !(rd_busy || wr_busy || cat_busy));
  a_reader_in_conv: assert property (@(posedge clk) disable iff (!rst_n)
    rd_done |-> (state == S_CONV));
  // When the writer finishes, the reader is idle and every channel is drained.
  a_layer_drained: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_CONV && wr_done) |-> !rd_busy && d_empty && w_empty && b_empty && c_empty);

endmodule
