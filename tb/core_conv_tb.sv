// core_conv_tb: drives data_ch, weight_ch and bias_ch with random windows and
// compares every conv_ch word with the reference (32-bit dot-product sums,
// then the arithmetic of pipecnn_ref_pkg::adjust_ref). Phase 1 inserts random
// gaps on the input channels and random back-pressure on conv_ch, and checks
// that conv_ch never overflows. Phase 2 streams with no gaps and checks the
// rate: N windows of L words take N * L cycles from the first accepted word
// to the last result.
// The expected arithmetic (32-bit sums, bias before leaky ReLU, one rounding
// bit, symmetric saturation) follows the original fixed-point scheme; the
// one-word-per-cycle rate being checked is this design's own.
module core_conv_tb;
  import pipecnn_pkg::*;
  import pipecnn_ref_pkg::*;
  localparam int L = 8, V = 4, OD = 4;
  typedef logic [V-1:0][DATA_W-1:0]        vec_t;
  typedef logic [L-1:0][V-1:0][DATA_W-1:0] wvec_t;
  typedef logic [L-1:0][DATA_W-1:0]        lane_t;

  logic clk = 0, rst_n = 1;
  logic [15:0] acc_len;
  logic relu;
  logic [5:0] bias_shift, out_shift;
  logic d_empty, w_empty, b_empty, d_pop, w_pop, b_pop, o_push;
  vec_t d_data; wvec_t w_data; lane_t b_data, o_data;
  logic [$clog2(OD+1)-1:0] o_count;

  int checks = 0, failures = 0, n_relu = 0, n_sat = 0, n_backpressure = 0;

  core_conv #(.LANE_NUM(L), .VEC_SIZE(V), .OUT_DEPTH(OD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  vec_t dq[$]; wvec_t wq[$]; lane_t bq[$]; lane_t expq[$]; lane_t outq[$];
  bit gaps, drain_always;
  bit gd, gw, gb, gdrain;

  assign d_empty = (dq.size() == 0) || gd;
  assign w_empty = (wq.size() == 0) || gw;
  assign b_empty = (bq.size() == 0) || gb;
  assign d_data  = (dq.size() != 0) ? dq[0] : '0;
  assign w_data  = (wq.size() != 0) ? wq[0] : '0;
  assign b_data  = (bq.size() != 0) ? bq[0] : '0;
  assign o_count = $bits(o_count)'(outq.size());

  int first_fire = -1, last_push = -1, cyc = 0;
  always @(posedge clk) begin
    bit dr;
    cyc++;
    if (d_pop) begin void'(dq.pop_front()); if (first_fire < 0) first_fire = cyc; end
    if (w_pop) void'(wq.pop_front());
    if (b_pop) void'(bq.pop_front());
    dr = drain_always || ($urandom_range(0, 2) == 0);
    if (!dr && outq.size() == OD) n_backpressure++;
    if (dr && outq.size() != 0) begin
      lane_t got, exp;
      got = outq.pop_front();
      exp = expq.pop_front();
      checks++;
      if (got != exp) begin
        failures++;
        if (failures < 10) $display("FAIL result %h exp %h", got, exp);
      end
    end
    if (o_push) begin
      last_push = cyc;
      outq.push_back(o_data);
      checks++;
      if (outq.size() > OD) begin failures++; $display("FAIL conv_ch overflow"); end
    end
    gd <= gaps && ($urandom_range(0, 4) == 0);
    gw <= gaps && ($urandom_range(0, 4) == 0);
    gb <= gaps && ($urandom_range(0, 4) == 0);
  end

  task automatic make_windows(int n, int len, int dmax, int wmax);
    for (int p = 0; p < n; p++) begin
      longint acc [L];
      lane_t bias, exp;
      for (int l = 0; l < L; l++) acc[l] = 0;
      for (int i = 0; i < len; i++) begin
        vec_t d; wvec_t w;
        for (int e = 0; e < V; e++) d[e] = DATA_W'($urandom_range(0, 2 * dmax) - dmax);
        for (int l = 0; l < L; l++)
          for (int e = 0; e < V; e++) begin
            w[l][e] = DATA_W'($urandom_range(0, 2 * wmax) - wmax);
            acc[l] += longint'($signed(d[e])) * longint'($signed(w[l][e]));
          end
        dq.push_back(d); wq.push_back(w);
      end
      for (int l = 0; l < L; l++) begin
        bias[l] = DATA_W'($urandom_range(0, 2000) - 1000);
        exp[l] = DATA_W'(adjust_ref(acc[l], int'($signed(bias[l])), int'(bias_shift),
                                    int'(out_shift), relu));
        if (relu && acc[l] + longint'($signed(bias[l])) * (longint'(1) << bias_shift) < 0) n_relu++;
        if (saturates(acc[l], int'($signed(bias[l])), int'(bias_shift), int'(out_shift), relu)) n_sat++;
      end
      bq.push_back(bias); expq.push_back(exp);
    end
  endtask

  task automatic wait_empty();
    while (expq.size() != 0) @(posedge clk);
    repeat (2) @(posedge clk);
  endtask

  initial begin
    gaps = 1; drain_always = 0;
    gd = 0; gw = 0; gb = 0;
    acc_len = 16'd9; relu = 1; bias_shift = 6'd4; out_shift = 6'd10;
    #2 rst_n = 0;  // a falling edge, so the asynchronous reset is applied
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 1: gaps and back-pressure, several window lengths
    @(negedge clk); make_windows(20, 9, 3000, 300); wait_empty();
    @(negedge clk); acc_len = 16'd1; relu = 0; out_shift = 6'd3;
    make_windows(30, 1, 3000, 300); wait_empty();
    @(negedge clk); acc_len = 16'd25; relu = 1; out_shift = 6'd12;
    make_windows(10, 25, 3000, 300); wait_empty();
    // phase 2: full-rate streaming
    @(negedge clk); gaps = 0; drain_always = 1; acc_len = 16'd6; out_shift = 6'd9;
    first_fire = -1;
    @(negedge clk); make_windows(16, 6, 3000, 300); wait_empty();
    checks++;
    if (last_push - first_fire != 16 * 6) begin
      failures++;
      $display("FAIL rate: %0d cycles for 96 words", last_push - first_fire);
    end
    checks++;
    if (n_relu == 0 || n_sat == 0 || n_backpressure == 0) begin
      failures++;
      $display("FAIL coverage relu=%0d sat=%0d backpressure=%0d", n_relu, n_sat, n_backpressure);
    end
    $display("relu=%0d sat=%0d backpressure=%0d", n_relu, n_sat, n_backpressure);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
