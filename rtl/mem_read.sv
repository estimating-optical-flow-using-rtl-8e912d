// mem_read: window reader feeding the convolution core.
//
// For every output pixel of a layer it walks the k x k window over all input
// vectors and, one word per cycle, sends the input vector on data_ch and the
// matching LANE_NUM weight vectors on weight_ch; with the first word of each
// window it also sends the LANE_NUM biases of the current output group on
// bias_ch. Loop order, outermost first: output group m, output row oy, output
// column ox, input vector n, kernel row ky, kernel column kx. Weights are
// stored group by group in exactly that (m, n, ky, kx) order, so the weight
// address just counts up and returns to the start of the group for every
// pixel. Feature maps are stored vector-plane by vector-plane:
// word (n * in_h + y) * in_w + x holds channels n*VEC_SIZE .. n*VEC_SIZE+3.
//
// All padding is made here and never stored:
//   OP_CONV   input position = oy * stride - pad + ky; outside the map -> 0.
//   OP_DECONV transposed convolution as a unit-stride convolution over the
//             input with stride-1 zeros inserted between pixels and k-1-pad
//             zeros around it: virtual position v = oy - (k-1-pad) + ky, a
//             real pixel only where v >= 0, v is a multiple of the stride and
//             v / stride < in_h. The weights must be stored spatially flipped.
// Memories have one cycle of read latency. A word is issued only when every
// channel it goes to has room for it and for the word already in flight, so
// a full channel stalls the reader without losing data. done pulses when the
// last word of the layer has been issued.
// The loop order, the flipped-weight convention and the handshake are this
// design's own choices; the original design describes only what the reader does.
module mem_read
  import pipecnn_pkg::*;
#(
  parameter int unsigned LANE_NUM = 8,
  parameter int unsigned VEC_SIZE = 4,
  parameter int unsigned DAW      = 21,  // feature memory address width
  parameter int unsigned WAW      = 18,  // weight memory address width
  parameter int unsigned BAW      = 9,   // bias memory address width
  parameter int unsigned CH_DEPTH = 8
) (
  input  logic                                        clk,
  input  logic                                        rst_n,
  input  logic                                        start,
  input  layer_cfg_t                                  cfg,
  output logic                                        busy,
  output logic                                        done,
  // feature memory read port
  output logic                                        d_rd_en,
  output logic [DAW-1:0]                              d_rd_addr,
  input  logic [VEC_SIZE-1:0][DATA_W-1:0]             d_rd_data,
  // weight memory read port
  output logic                                        w_rd_en,
  output logic [WAW-1:0]                              w_rd_addr,
  input  logic [LANE_NUM-1:0][VEC_SIZE-1:0][DATA_W-1:0] w_rd_data,
  // bias memory read port
  output logic                                        b_rd_en,
  output logic [BAW-1:0]                              b_rd_addr,
  input  logic [LANE_NUM-1:0][DATA_W-1:0]             b_rd_data,
  // data_ch
  output logic                                        d_push,
  output logic [VEC_SIZE-1:0][DATA_W-1:0]             d_data,
  input  logic [$clog2(CH_DEPTH+1)-1:0]               d_count,
  // weight_ch
  output logic                                        w_push,
  output logic [LANE_NUM-1:0][VEC_SIZE-1:0][DATA_W-1:0] w_data,
  input  logic [$clog2(CH_DEPTH+1)-1:0]               w_count,
  // bias_ch
  output logic                                        b_push,
  output logic [LANE_NUM-1:0][DATA_W-1:0]             b_data,
  input  logic [$clog2(CH_DEPTH+1)-1:0]               b_count
);

  localparam int unsigned SW = DIM_W + 3;  // signed window coordinates

  // loop counters
  logic [7:0]             m, n;
  logic [DIM_W-1:0]       oy, ox;
  logic [3:0]             ky, kx;
  logic signed [SW-1:0]   base_y, base_x;   // window origin of (oy, ox)
  logic [ADDR_W-1:0]      n_off;            // n * in_h * in_w
  logic [ADDR_W-1:0]      wgrp_base, wptr;  // weight words
  logic                   running;

  // one word in flight between the memory read and the channel push
  logic                   s1_valid, s1_zero, s1_first;

  logic                   is_deconv;
  logic [ADDR_W-1:0]      plane, kk_len;
  logic signed [SW-1:0]   org, step;
  logic signed [SW-1:0]   vy, vx, iy, ix;
  logic                   in_map, first_word, issue;
  logic                   last_kx, last_ky, last_n, last_ox, last_oy, last_m;
  logic [SW-1:0]          smask;

  assign is_deconv = (cfg.op == OP_DECONV);
  assign plane     = ADDR_W'(cfg.in_h) * ADDR_W'(cfg.in_w);
  assign kk_len    = ADDR_W'(cfg.in_vecs) * ADDR_W'(cfg.k) * ADDR_W'(cfg.k);
  // window origin of output pixel 0 and its step per output pixel
  assign org       = is_deconv ? -SW'(cfg.k) + SW'(1) + SW'(cfg.pad) : -SW'(cfg.pad);
  assign step      = is_deconv ? SW'(1) : (SW'(1) <<< cfg.stride_log2);
  assign smask     = (SW'(1) << cfg.stride_log2) - SW'(1);

  always_comb begin
    vy = base_y + SW'(ky);
    vx = base_x + SW'(kx);
    if (is_deconv) begin
      iy     = vy >>> cfg.stride_log2;
      ix     = vx >>> cfg.stride_log2;
      in_map = (vy >= 0) && (vx >= 0) && ((vy & smask) == '0) && ((vx & smask) == '0)
               && (iy < $signed(SW'(cfg.in_h))) && (ix < $signed(SW'(cfg.in_w)));
    end else begin
      iy     = vy;
      ix     = vx;
      in_map = (vy >= 0) && (vx >= 0)
               && (vy < $signed(SW'(cfg.in_h))) && (vx < $signed(SW'(cfg.in_w)));
    end
  end

  assign first_word = (n == '0) && (ky == '0) && (kx == '0);
  assign last_kx = (kx == cfg.k - 4'd1);
  assign last_ky = (ky == cfg.k - 4'd1);
  assign last_n  = (n  == cfg.in_vecs - 8'd1);
  assign last_ox = (ox == cfg.out_w - DIM_W'(1));
  assign last_oy = (oy == cfg.out_h - DIM_W'(1));
  assign last_m  = (m  == cfg.out_groups - 8'd1);

  // room for this word and the one already in flight in every target channel
  assign issue = running
              && (32'(d_count) + (s1_valid ? 32'd1 : 32'd0)) < CH_DEPTH
              && (32'(w_count) + (s1_valid ? 32'd1 : 32'd0)) < CH_DEPTH
              && (!first_word || (32'(b_count) + ((s1_valid && s1_first) ? 32'd1 : 32'd0)) < CH_DEPTH);

  assign d_rd_en   = issue && in_map;
  assign d_rd_addr = DAW'(cfg.data_base + n_off
                          + ADDR_W'(iy[DIM_W-1:0]) * ADDR_W'(cfg.in_w) + ADDR_W'(ix[DIM_W-1:0]));
  assign w_rd_en   = issue;
  assign w_rd_addr = WAW'(cfg.weight_base + wptr);
  assign b_rd_en   = issue && first_word;
  assign b_rd_addr = BAW'(cfg.bias_base + ADDR_W'(m));

  assign busy = running || s1_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running   <= 1'b0;
      done      <= 1'b0;
      m <= '0; n <= '0; oy <= '0; ox <= '0; ky <= '0; kx <= '0;
      base_y    <= '0;
      base_x    <= '0;
      n_off     <= '0;
      wgrp_base <= '0;
      wptr      <= '0;
      s1_valid  <= 1'b0;
      s1_zero   <= 1'b0;
      s1_first  <= 1'b0;
    end else begin
      done     <= 1'b0;
      s1_valid <= issue;
      s1_zero  <= !in_map;
      s1_first <= first_word;
      if (start && !running) begin
        running   <= 1'b1;
        m <= '0; n <= '0; oy <= '0; ox <= '0; ky <= '0; kx <= '0;
        base_y    <= org;
        base_x    <= org;
        n_off     <= '0;
        wgrp_base <= '0;
        wptr      <= '0;
      end else if (issue) begin
        wptr <= wptr + 1'b1;
        kx   <= kx + 4'd1;
        if (last_kx) begin
          kx <= '0;
          ky <= ky + 4'd1;
          if (last_ky) begin
            ky    <= '0;
            n     <= n + 8'd1;
            n_off <= n_off + plane;
            if (last_n) begin
              // window complete: next output pixel
              n      <= '0;
              n_off  <= '0;
              wptr   <= wgrp_base;
              ox     <= ox + DIM_W'(1);
              base_x <= base_x + step;
              if (last_ox) begin
                ox     <= '0;
                base_x <= org;
                oy     <= oy + DIM_W'(1);
                base_y <= base_y + step;
                if (last_oy) begin
                  oy        <= '0;
                  base_y    <= org;
                  m         <= m + 8'd1;
                  wgrp_base <= wgrp_base + kk_len;
                  wptr      <= wgrp_base + kk_len;
                  if (last_m) begin
                    running <= 1'b0;
                    done    <= 1'b1;
                  end
                end
              end
            end
          end
        end
      end
    end
  end

  // second stage: memory data has arrived, push it into the channels
  assign d_push = s1_valid;
  assign d_data = s1_zero ? '0 : d_rd_data;
  assign w_push = s1_valid;
  assign w_data = w_rd_data;
  assign b_push = s1_valid && s1_first;
  assign b_data = b_rd_data;

endmodule
