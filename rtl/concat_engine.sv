// concat_engine: depth concatenation of up to three feature buffers.
//
// Copies source buffers cat_base[0..cat_num-1], of cat_len[s] words each,
// one after the other into the destination out_base. Because feature maps are
// stored vector-plane by vector-plane (all pixels of channels 0..3, then of
// 4..7, ...), appending whole buffers is exactly a concatenation along the
// channel axis, provided each source holds a whole number of vectors; a
// source with fewer channels (the 2-channel flow maps) is stored padded with
// zero channels to a full vector. The copy goes vector by vector: one read
// per cycle, and the word read in one cycle is written in the next (one cycle
// of memory read latency), so a concatenation of N words takes N + 2 cycles.
// done pulses in the cycle after the last write; cat_num must be 1 to 3. The streaming read/write schedule is this
// design's own choice.
module concat_engine
  import pipecnn_pkg::*;
#(
  parameter int unsigned VEC_SIZE = 4,
  parameter int unsigned DAW      = 21
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            start,
  input  layer_cfg_t                      cfg,
  output logic                            busy,
  output logic                            done,   // one cycle after the last write
  // feature memory read port
  output logic                            rd_en,
  output logic [DAW-1:0]                  rd_addr,
  input  logic [VEC_SIZE-1:0][DATA_W-1:0] rd_data,
  // feature memory write port
  output logic                            wr_en,
  output logic [DAW-1:0]                  wr_addr,
  output logic [VEC_SIZE-1:0][DATA_W-1:0] wr_data,
  output logic [VEC_SIZE-1:0]             wr_strb
);

  logic [1:0]        src;
  logic [ADDR_W-1:0] idx;      // word within the current source
  logic [ADDR_W-1:0] dst;      // destination word of the current read
  logic              running;
  logic              s1_valid;
  logic [DAW-1:0]    s1_addr;
  logic              last_word, last_src, empty_src;
  logic              busy_q;

  assign empty_src = (cfg.cat_len[src] == '0);
  assign last_word = empty_src || (idx == cfg.cat_len[src] - 1'b1);
  assign last_src  = (32'(src) + 1 >= 32'(cfg.cat_num));

  assign rd_en   = running && !empty_src;
  assign rd_addr = DAW'(cfg.cat_base[src] + idx);
  assign wr_en   = s1_valid;
  assign wr_addr = s1_addr;
  assign wr_data = rd_data;
  assign wr_strb = '1;
  assign busy    = running || s1_valid;
  assign done    = busy_q && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running  <= 1'b0;
      busy_q   <= 1'b0;
      src      <= '0;
      idx      <= '0;
      dst      <= '0;
      s1_valid <= 1'b0;
      s1_addr  <= '0;
    end else begin
      busy_q   <= busy;
      s1_valid <= rd_en;
      s1_addr  <= DAW'(dst);
      if (start && !running) begin
        running <= 1'b1;
        src     <= '0;
        idx     <= '0;
        dst     <= cfg.out_base;
      end else if (running) begin
        if (!empty_src) begin
          dst <= dst + 1'b1;
          idx <= idx + 1'b1;
        end
        if (last_word) begin
          idx <= '0;
          src <= src + 2'd1;
          if (last_src) running <= 1'b0;
        end
      end
    end
  end

  a_has_source: assert property (@(posedge clk) disable iff (!rst_n)
                                 (start && !running) |-> cfg.cat_num != '0);

endmodule
