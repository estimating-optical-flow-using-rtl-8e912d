// concat_engine_tb: three source buffers of different lengths (one of them a
// single word) are concatenated into a destination; a memory model with one
// cycle of read latency serves the engine. Checks every destination word,
// that nothing outside the destination is written, and that the operation
// takes N + 2 cycles for N words. Runs two operations, the second with two
// sources only.
// Concatenation along the channel axis of up to three buffers follows the
// original concat kernel; the N + 2 cycle count is this design's own timing.
module concat_engine_tb;
  import pipecnn_pkg::*;
  localparam int VEC = 4, DAW = 10;
  logic clk = 0, rst_n = 1;
  logic start, busy, done, rd_en, wr_en;
  layer_cfg_t cfg;
  logic [DAW-1:0] rd_addr, wr_addr;
  logic [VEC-1:0][DATA_W-1:0] rd_data, wr_data;
  logic [VEC-1:0] wr_strb;
  logic [VEC-1:0][DATA_W-1:0] mem [2**DAW];
  logic [VEC-1:0][DATA_W-1:0] golden [2**DAW];
  int checks = 0, failures = 0;

  concat_engine #(.VEC_SIZE(VEC), .DAW(DAW)) dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
    if (wr_en) for (int e = 0; e < VEC; e++) if (wr_strb[e]) mem[wr_addr][e] <= wr_data[e];
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int nsrc, int b0, int l0, int b1, int l1, int b2, int l2, int dst);
    int total, cyc, pos;
    int base[3], len[3];
    base = '{b0, b1, b2}; len = '{l0, l1, l2};
    for (int a = 0; a < 2**DAW; a++) golden[a] = mem[a];
    pos = dst;
    total = 0;
    for (int s = 0; s < nsrc; s++)
      for (int w = 0; w < len[s]; w++) begin golden[pos] = mem[base[s] + w]; pos++; total++; end
    cfg = '0;
    cfg.op = OP_CONCAT; cfg.cat_num = 2'(nsrc); cfg.out_base = 32'(dst);
    for (int s = 0; s < 3; s++) begin cfg.cat_base[s] = 32'(base[s]); cfg.cat_len[s] = 32'(len[s]); end
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    for (int a = 0; a < 2**DAW; a++) begin
      checks++;
      if (mem[a] != golden[a]) begin
        failures++;
        if (failures < 10) $display("FAIL word %0d: got %h exp %h", a, mem[a], golden[a]);
      end
    end
    checks++;
    if (cyc != total + 2) begin
      failures++;
      $display("FAIL cycles %0d, expected %0d", cyc, total + 2);
    end
  endtask

  initial begin
    start = 0; cfg = '0;
    for (int a = 0; a < 2**DAW; a++)
      for (int e = 0; e < VEC; e++) mem[a][e] = DATA_W'($urandom);
    #2 rst_n = 0;  // a falling edge, so the asynchronous reset is applied
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(3, 0, 40, 100, 1, 200, 17, 600);
    run(2, 300, 25, 40, 60, 0, 0, 700);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
