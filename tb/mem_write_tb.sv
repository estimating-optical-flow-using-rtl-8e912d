// mem_write_tb: feeds conv_ch words (with random gaps) into two writers, one
// with LANE_NUM = 8, VEC_SIZE = 4 (two memory words per result) and one with
// LANE_NUM = 2, VEC_SIZE = 4 (strobed partial words), and checks the whole
// memory image against the layout rule: channel c of pixel (x, y) lands in
// element c % 4 of word base + (c / 4) * H * W + y * W + x. Also checks that
// done comes once, after the last write.
// The vector-plane output layout follows the original data organisation;
// the strobed partial writes for LANE_NUM < VEC_SIZE are this design's own.
module mem_write_tb;
  import pipecnn_pkg::*;
  localparam int DAW = 10, VEC = 4;
  logic clk = 0, rst_n = 1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- writer A: 8 lanes
  logic start_a, busy_a, done_a, empty_a, pop_a, we_a;
  layer_cfg_t cfg_a;
  logic [7:0][DATA_W-1:0] cdata_a;
  logic [DAW-1:0] wa_a;
  logic [VEC-1:0][DATA_W-1:0] wd_a;
  logic [VEC-1:0] ws_a;
  mem_write #(.LANE_NUM(8), .VEC_SIZE(VEC), .DAW(DAW)) dut_a (
    .clk, .rst_n, .start(start_a), .cfg(cfg_a), .busy(busy_a), .done(done_a),
    .c_empty(empty_a), .c_data(cdata_a), .c_pop(pop_a),
    .wr_en(we_a), .wr_addr(wa_a), .wr_data(wd_a), .wr_strb(ws_a));

  // ---- writer B: 2 lanes
  logic start_b, busy_b, done_b, empty_b, pop_b, we_b;
  layer_cfg_t cfg_b;
  logic [1:0][DATA_W-1:0] cdata_b;
  logic [DAW-1:0] wa_b;
  logic [VEC-1:0][DATA_W-1:0] wd_b;
  logic [VEC-1:0] ws_b;
  mem_write #(.LANE_NUM(2), .VEC_SIZE(VEC), .DAW(DAW)) dut_b (
    .clk, .rst_n, .start(start_b), .cfg(cfg_b), .busy(busy_b), .done(done_b),
    .c_empty(empty_b), .c_data(cdata_b), .c_pop(pop_b),
    .wr_en(we_b), .wr_addr(wa_b), .wr_data(wd_b), .wr_strb(ws_b));

  logic [VEC-1:0][DATA_W-1:0] mem_a [2**DAW], mem_b [2**DAW];
  logic [VEC-1:0][DATA_W-1:0] gold  [2**DAW];
  int n_done_a = 0, n_done_b = 0;
  bit wrote_after_done = 0;

  always_ff @(posedge clk) begin
    if (we_a) for (int e = 0; e < VEC; e++) if (ws_a[e]) mem_a[wa_a][e] <= wd_a[e];
    if (we_b) for (int e = 0; e < VEC; e++) if (ws_b[e]) mem_b[wa_b][e] <= wd_b[e];
    if (done_a) n_done_a <= n_done_a + 1;
    if (done_b) n_done_b <= n_done_b + 1;
  end

  // conv_ch models: a queue per writer, head visible while not empty
  logic [7:0][DATA_W-1:0] qa[$];
  logic [1:0][DATA_W-1:0] qb[$];
  bit gap_a, gap_b;
  assign empty_a = (qa.size() == 0) || gap_a;
  assign empty_b = (qb.size() == 0) || gap_b;
  assign cdata_a = (qa.size() != 0) ? qa[0] : '0;
  assign cdata_b = (qb.size() != 0) ? qb[0] : '0;
  always @(posedge clk) begin
    if (pop_a) void'(qa.pop_front());
    if (pop_b) void'(qb.pop_front());
    gap_a <= ($urandom_range(0, 3) == 0);
    gap_b <= ($urandom_range(0, 3) == 0);
  end

  task automatic run(bit which_a, int groups, int h, int w, int base);
    int lanes, val;
    lanes = which_a ? 8 : 2;
    for (int a = 0; a < 2**DAW; a++) begin
      gold[a] = '0;
      if (which_a) mem_a[a] = '0; else mem_b[a] = '0;
    end
    for (int m = 0; m < groups; m++)
      for (int y = 0; y < h; y++)
        for (int x = 0; x < w; x++) begin
          logic [7:0][DATA_W-1:0] wa;
          logic [1:0][DATA_W-1:0] wb;
          for (int l = 0; l < lanes; l++) begin
            int c;
            c = m * lanes + l;
            val = int'($urandom_range(0, 65535));
            gold[base + (c / VEC) * h * w + y * w + x][c % VEC] = DATA_W'(val);
            if (which_a) wa[l] = DATA_W'(val); else wb[l % 2] = DATA_W'(val);
          end
          if (which_a) qa.push_back(wa); else qb.push_back(wb);
        end
    begin
      layer_cfg_t c;
      c = '0;
      c.out_w = DIM_W'(w); c.out_h = DIM_W'(h); c.out_groups = 8'(groups); c.out_base = 32'(base);
      @(negedge clk);
      if (which_a) begin cfg_a = c; start_a = 1; end else begin cfg_b = c; start_b = 1; end
      @(negedge clk);
      start_a = 0; start_b = 0;
    end
    if (which_a) wait (done_a); else wait (done_b);
    @(negedge clk);
    if (which_a) wrote_after_done = we_a; else wrote_after_done = we_b;
    repeat (3) @(negedge clk);
    for (int a = 0; a < 2**DAW; a++) begin
      checks++;
      if ((which_a ? mem_a[a] : mem_b[a]) != gold[a]) begin
        failures++;
        if (failures < 10) $display("FAIL %s word %0d: got %h exp %h", which_a ? "A" : "B", a,
                                    which_a ? mem_a[a] : mem_b[a], gold[a]);
      end
    end
    checks++;
    if (wrote_after_done || (which_a ? qa.size() : qb.size()) != 0) begin
      failures++;
      $display("FAIL done too early / words left");
    end
  endtask

  initial begin
    start_a = 0; start_b = 0; cfg_a = '0; cfg_b = '0;
    #2 rst_n = 0;  // a falling edge, so the asynchronous reset is applied
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(1, 3, 4, 5, 16);
    run(0, 5, 3, 6, 100);
    run(1, 1, 1, 1, 0);
    checks++;
    if (n_done_a != 2 || n_done_b != 1) begin
      failures++;
      $display("FAIL done counts %0d %0d", n_done_a, n_done_b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
