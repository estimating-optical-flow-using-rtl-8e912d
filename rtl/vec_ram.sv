// vec_ram: a global-memory buffer bank of vector words.
//
// A simple dual-port RAM of 2**AW words, each ELEMS elements of ELEM_W bits.
// The write port writes the elements whose strobe bit is set; the read port
// returns the addressed word one cycle after rd_en (registered output, the
// behaviour of FPGA block RAM). A read and a write of the same address in the
// same cycle return the old word. The accelerator uses three instances: the
// feature buffers (VEC_SIZE elements per word), the weights (LANE_NUM *
// VEC_SIZE) and the biases (LANE_NUM). On the board these buffers live in
// external DDR3 behind the OpenCL global-memory interface; here they are
// on-chip arrays with a one-cycle latency, which is this design's own choice.
module vec_ram #(
  parameter int unsigned ELEMS  = 4,
  parameter int unsigned ELEM_W = 16,
  parameter int unsigned AW     = 10
) (
  input  logic                         clk,
  input  logic                         wr_en,
  input  logic [AW-1:0]                wr_addr,
  input  logic [ELEMS-1:0][ELEM_W-1:0] wr_data,
  input  logic [ELEMS-1:0]             wr_strb,
  input  logic                         rd_en,
  input  logic [AW-1:0]                rd_addr,
  output logic [ELEMS-1:0][ELEM_W-1:0] rd_data
);

  logic [ELEMS-1:0][ELEM_W-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      for (int e = 0; e < ELEMS; e++) begin
        if (wr_strb[e]) mem[wr_addr][e] <= wr_data[e];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
