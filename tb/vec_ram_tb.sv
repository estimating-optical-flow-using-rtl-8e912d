// vec_ram_tb: random strobed writes and reads against an array model.
// Checks the one-cycle read latency, per-element write strobes and that a
// read of the address being written returns the old word.
// The memory stands in for the original global-memory buffers; its
// one-cycle latency and read-old-data behaviour are this design's own.
module vec_ram_tb;
  localparam int E = 4, EW = 16, AW = 6;
  logic clk = 0;
  logic wr_en, rd_en;
  logic [AW-1:0] wr_addr, rd_addr;
  logic [E-1:0][EW-1:0] wr_data, rd_data;
  logic [E-1:0] wr_strb;
  logic [E-1:0][EW-1:0] model [2**AW];
  logic [E-1:0][EW-1:0] expect_q;
  logic expect_v;
  int checks = 0, failures = 0, n_partial = 0, n_collide = 0;

  vec_ram #(.ELEMS(E), .ELEM_W(EW), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; wr_addr = '0; rd_addr = '0; wr_data = '0; wr_strb = '0;
    expect_v = 0;
    // fill every word so that reads are defined
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(a); wr_strb = '1;
      for (int e = 0; e < E; e++) wr_data[e] = EW'($urandom);
      model[a] = wr_data;
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (expect_v) begin
        checks++;
        if (rd_data != expect_q) begin
          failures++;
          $display("FAIL read: got %h exp %h", rd_data, expect_q);
        end
      end
      wr_en   = 1'($urandom_range(0, 1));
      wr_addr = AW'($urandom);
      wr_strb = E'($urandom);
      for (int e = 0; e < E; e++) wr_data[e] = EW'($urandom);
      rd_en   = 1'($urandom_range(0, 1));
      rd_addr = ($urandom_range(0, 3) == 0) ? wr_addr : AW'($urandom);
      if (rd_en) expect_q = model[rd_addr];
      expect_v = rd_en;
      if (wr_en && rd_en && rd_addr == wr_addr) n_collide++;
      if (wr_en && wr_strb != '1 && wr_strb != '0) n_partial++;
      if (wr_en)
        for (int e = 0; e < E; e++) if (wr_strb[e]) model[wr_addr][e] = wr_data[e];
    end
    checks++;
    if (n_partial == 0 || n_collide == 0) begin
      failures++;
      $display("FAIL coverage partial=%0d collide=%0d", n_partial, n_collide);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
