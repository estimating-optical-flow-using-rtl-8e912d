// mem_read_tb: runs the window reader over small convolution and transposed-
// convolution layers, with memory models of one cycle of read latency and
// channel models that are drained at random so the channels fill up.
// The expected word stream is built independently: for a transposed
// convolution the testbench materialises the zero-inserted, zero-padded input
// image and slides a unit-stride window over it; for a convolution it slides
// a strided window over the padded input. Each data, weight and bias word
// pushed must match, the channels must never overflow, and padding words,
// inserted zeros and full channels must all occur.
// Padding and transposed-convolution zeros made in the reader follow the
// original design; the loop order and the flipped-weight convention checked
// here are this design's own.
module mem_read_tb;
  import pipecnn_pkg::*;
  localparam int L = 8, V = 4, DAW = 10, WAW = 10, BAW = 4, CD = 4;
  typedef logic [V-1:0][DATA_W-1:0]        vec_t;
  typedef logic [L-1:0][V-1:0][DATA_W-1:0] wvec_t;
  typedef logic [L-1:0][DATA_W-1:0]        lane_t;

  logic clk = 0, rst_n = 1;
  logic start, busy, done;
  layer_cfg_t cfg;
  logic d_rd_en, w_rd_en, b_rd_en;
  logic [DAW-1:0] d_rd_addr; logic [WAW-1:0] w_rd_addr; logic [BAW-1:0] b_rd_addr;
  vec_t d_rd_data, d_data; wvec_t w_rd_data, w_data; lane_t b_rd_data, b_data;
  logic d_push, w_push, b_push;
  logic [$clog2(CD+1)-1:0] d_count, w_count, b_count;

  int checks = 0, failures = 0, n_pad = 0, n_ins = 0, n_full = 0;

  mem_read #(.LANE_NUM(L), .VEC_SIZE(V), .DAW(DAW), .WAW(WAW), .BAW(BAW), .CH_DEPTH(CD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  vec_t dmem [2**DAW]; wvec_t wmem [2**WAW]; lane_t bmem [2**BAW];
  always_ff @(posedge clk) begin
    if (d_rd_en) d_rd_data <= dmem[d_rd_addr];
    if (w_rd_en) w_rd_data <= wmem[w_rd_addr];
    if (b_rd_en) b_rd_data <= bmem[b_rd_addr];
  end

  // channel models; the testbench is the consumer
  vec_t dq[$]; wvec_t wq[$]; lane_t bq[$];
  vec_t edq[$]; wvec_t ewq[$]; lane_t ebq[$];
  assign d_count = $bits(d_count)'(dq.size());
  assign w_count = $bits(w_count)'(wq.size());
  assign b_count = $bits(b_count)'(bq.size());

  always @(posedge clk) begin
    if (dq.size() == CD) n_full++;
    // consume at random (data and weight together, as the core does)
    if (dq.size() != 0 && wq.size() != 0 && $urandom_range(0, 2) == 0) begin
      checks++;
      if (dq[0] != edq[0] || wq[0] != ewq[0]) begin
        failures++;
        if (failures < 10) $display("FAIL word: data %h exp %h", dq[0], edq[0]);
      end
      void'(dq.pop_front()); void'(wq.pop_front()); void'(edq.pop_front()); void'(ewq.pop_front());
    end
    if (bq.size() != 0 && $urandom_range(0, 1) == 0) begin
      checks++;
      if (bq[0] != ebq[0]) begin failures++; $display("FAIL bias %h exp %h", bq[0], ebq[0]); end
      void'(bq.pop_front()); void'(ebq.pop_front());
    end
    if (d_push) dq.push_back(d_data);
    if (w_push) wq.push_back(w_data);
    if (b_push) bq.push_back(b_data);
    if (dq.size() > CD || wq.size() > CD || bq.size() > CD) begin
      failures++; $display("FAIL channel overflow");
    end
  end

  task automatic run(bit deconv, int ih, int iw, int nv, int k, int sl, int pad, int groups,
                     int dbase, int wbase, int bbase);
    int s, oh, ow, vh, vw, pp, org;
    vec_t virt [64][64];
    bit   real_px [64][64];
    s = 1 << sl;
    for (int a = 0; a < 2**DAW; a++) for (int e = 0; e < V; e++) dmem[a][e] = DATA_W'($urandom);
    for (int a = 0; a < 2**WAW; a++) for (int l = 0; l < L; l++) for (int e = 0; e < V; e++)
      wmem[a][l][e] = DATA_W'($urandom);
    for (int a = 0; a < 2**BAW; a++) for (int l = 0; l < L; l++) bmem[a][l] = DATA_W'($urandom);
    if (deconv) begin
      oh = s * (ih - 1) + k - 2 * pad; ow = s * (iw - 1) + k - 2 * pad;
      pp = k - 1 - pad;
    end else begin
      oh = (ih - k + 2 * pad) / s + 1; ow = (iw - k + 2 * pad) / s + 1;
      pp = pad;
    end
    for (int m = 0; m < groups; m++)
      for (int oy = 0; oy < oh; oy++)
        for (int ox = 0; ox < ow; ox++)
          for (int n = 0; n < nv; n++) begin
            // the padded (and, for deconv, zero-inserted) image of vector plane n
            vh = deconv ? (ih - 1) * s + 1 + 2 * pp : ih + 2 * pp;
            vw = deconv ? (iw - 1) * s + 1 + 2 * pp : iw + 2 * pp;
            for (int y = 0; y < vh; y++)
              for (int x = 0; x < vw; x++) begin
                virt[y][x] = '0; real_px[y][x] = 0;
              end
            for (int y = 0; y < ih; y++)
              for (int x = 0; x < iw; x++) begin
                int vy, vx;
                vy = deconv ? pp + y * s : pp + y;
                vx = deconv ? pp + x * s : pp + x;
                virt[vy][vx] = dmem[dbase + (n * ih + y) * iw + x];
                real_px[vy][vx] = 1;
              end
            for (int ky = 0; ky < k; ky++)
              for (int kx = 0; kx < k; kx++) begin
                int wy, wx;
                wy = deconv ? oy + ky : oy * s + ky;
                wx = deconv ? ox + kx : ox * s + kx;
                edq.push_back(virt[wy][wx]);
                if (!real_px[wy][wx]) begin
                  bit in_box;
                  in_box = (wy >= pp && wy < vh - pp && wx >= pp && wx < vw - pp);
                  if (deconv && in_box) n_ins++; else n_pad++;
                end
                ewq.push_back(wmem[wbase + ((m * nv + n) * k + ky) * k + kx]);
                if (n == 0 && ky == 0 && kx == 0) ebq.push_back(bmem[bbase + m]);
              end
          end
    cfg = '0;
    cfg.op = deconv ? OP_DECONV : OP_CONV;
    cfg.in_h = DIM_W'(ih); cfg.in_w = DIM_W'(iw); cfg.out_h = DIM_W'(oh); cfg.out_w = DIM_W'(ow);
    cfg.in_vecs = 8'(nv); cfg.out_groups = 8'(groups); cfg.k = 4'(k);
    cfg.stride_log2 = 2'(sl); cfg.pad = 4'(pad);
    cfg.data_base = 32'(dbase); cfg.weight_base = 32'(wbase); cfg.bias_base = 32'(bbase);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    wait (done);
    while (edq.size() != 0 || ebq.size() != 0) @(posedge clk);
    repeat (3) @(posedge clk);
    checks++;
    if (dq.size() != 0 || busy) begin failures++; $display("FAIL extra words or still busy"); end
  endtask

  initial begin
    start = 0; cfg = '0;
    #2 rst_n = 0;  // a falling edge, so the asynchronous reset is applied
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0, 5, 5, 2, 3, 1, 1, 2, 7, 3, 1);   // conv k3 s2 p1 (conv4-like)
    run(1, 3, 3, 1, 4, 1, 1, 2, 0, 50, 5);  // transposed conv k4 s2 p1 (deconv-like)
    run(0, 4, 3, 1, 3, 0, 1, 1, 30, 0, 0);  // conv k3 s1 p1, non-square
    run(0, 6, 6, 1, 7, 1, 3, 1, 100, 5, 2); // conv k7 s2 p3 (conv1-like)
    run(0, 9, 9, 1, 3, 2, 1, 1, 10, 0, 3);   // conv k3 s4 p1
    run(1, 2, 3, 1, 5, 2, 1, 1, 0, 10, 0);   // transposed conv k5 s4 p1
    run(1, 2, 2, 1, 8, 3, 2, 1, 0, 0, 0);    // transposed conv k8 s8 p2
    checks++;
    if (n_pad == 0 || n_ins == 0 || n_full == 0) begin
      failures++;
      $display("FAIL coverage pad=%0d inserted=%0d full=%0d", n_pad, n_ins, n_full);
    end
    $display("padding words=%0d inserted zeros=%0d full cycles=%0d", n_pad, n_ins, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
