// mem_write: stores the convolution results in global memory.
//
// Takes one word per output pixel from conv_ch -- the LANE_NUM results of
// output group m -- and writes them into the output buffer at the position
// the pixel's coordinates give. It walks the same (m, oy, ox) order as the
// reader, so no coordinates travel with the data. Output channel
// c = m * LANE_NUM + l of pixel (x, y) goes to element c % VEC_SIZE of word
// out_base + (c / VEC_SIZE) * out_h * out_w + y * out_w + x, the same
// vector-plane layout the reader expects, so the next layer can read it.
// When LANE_NUM >= VEC_SIZE a conv_ch word fills LANE_NUM / VEC_SIZE memory
// words, written on consecutive cycles; when LANE_NUM < VEC_SIZE it fills
// part of one word, selected with the element write strobes. conv_ch is
// popped with the last memory write of its word. done pulses after the last
// write of the layer. Pooling is not provided (FlowNet-S uses none).
// The sequential write of several words per result is this design's choice.
// Writing results by output coordinate into the vector-plane layout follows
// the original writer and data organisation.
module mem_write
  import pipecnn_pkg::*;
#(
  parameter int unsigned LANE_NUM = 8,
  parameter int unsigned VEC_SIZE = 4,
  parameter int unsigned DAW      = 21
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                start,
  input  layer_cfg_t                          cfg,
  output logic                                busy,
  output logic                                done,
  // conv_ch
  input  logic                                c_empty,
  input  logic [LANE_NUM-1:0][DATA_W-1:0]     c_data,
  output logic                                c_pop,
  // feature memory write port
  output logic                                wr_en,
  output logic [DAW-1:0]                      wr_addr,
  output logic [VEC_SIZE-1:0][DATA_W-1:0]     wr_data,
  output logic [VEC_SIZE-1:0]                 wr_strb
);

  localparam int unsigned WPP = (LANE_NUM >= VEC_SIZE) ? LANE_NUM / VEC_SIZE : 1;
  localparam int unsigned JW  = (WPP > 1) ? $clog2(WPP) : 1;
  localparam int unsigned VB  = (VEC_SIZE > 1) ? $clog2(VEC_SIZE) : 1;

  logic [7:0]        m;
  logic [DIM_W-1:0]  oy, ox;
  logic [JW-1:0]     j;
  logic [ADDR_W-1:0] ch0;       // m * LANE_NUM
  logic              running;
  logic              fire, last_j, last_ox, last_oy, last_m;
  logic [ADDR_W-1:0] plane, grp;
  logic [VB-1:0]     e0;

  assign plane   = ADDR_W'(cfg.out_h) * ADDR_W'(cfg.out_w);
  assign grp     = (ch0 >> VB) + ADDR_W'(j);
  assign e0      = VB'(ch0 % VEC_SIZE);
  assign fire    = running && !c_empty;
  assign last_j  = (32'(j) == WPP - 1);
  assign last_ox = (ox == cfg.out_w - DIM_W'(1));
  assign last_oy = (oy == cfg.out_h - DIM_W'(1));
  assign last_m  = (m  == cfg.out_groups - 8'd1);

  assign c_pop   = fire && last_j;
  assign wr_en   = fire;
  assign wr_addr = DAW'(cfg.out_base + grp * plane + ADDR_W'(oy) * ADDR_W'(cfg.out_w) + ADDR_W'(ox));
  assign busy    = running;

  always_comb begin
    wr_data = '0;
    wr_strb = '0;
    if (LANE_NUM >= VEC_SIZE) begin
      for (int e = 0; e < VEC_SIZE; e++) begin
        wr_data[e] = c_data[(32'(j) * VEC_SIZE + e) % LANE_NUM];
        wr_strb[e] = 1'b1;
      end
    end else begin
      for (int l = 0; l < LANE_NUM; l++) begin
        wr_data[(32'(e0) + l) % VEC_SIZE] = c_data[l];
        wr_strb[(32'(e0) + l) % VEC_SIZE] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      done    <= 1'b0;
      m <= '0; oy <= '0; ox <= '0; j <= '0;
      ch0     <= '0;
    end else begin
      done <= 1'b0;
      if (start && !running) begin
        running <= 1'b1;
        m <= '0; oy <= '0; ox <= '0; j <= '0;
        ch0     <= '0;
      end else if (fire) begin
        j <= j + 1'b1;
        if (last_j) begin
          j  <= '0;
          ox <= ox + DIM_W'(1);
          if (last_ox) begin
            ox <= '0;
            oy <= oy + DIM_W'(1);
            if (last_oy) begin
              oy  <= '0;
              m   <= m + 8'd1;
              ch0 <= ch0 + ADDR_W'(LANE_NUM);
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

endmodule
