// pipecnn_top_tb: end-to-end run of a miniature FlowNet-S through the
// accelerator at its default parameters (LANE_NUM = 8, VEC_SIZE = 4, full
// memory depths).
//
// The testbench plays the host: it loads a 12 x 12 two-frame input (6 real
// channels, padded to 8), weights and biases, then runs the layer sequence
//   conv1 (7x7 s2 p3) -> conv2 (5x5 s2 p2) -> conv3_1 (3x3 s1 p1)
//   predict (3x3, 2 outputs)  deconv (4x4 s2 p1, transposed)
//   upsample_flow (4x4 s2 p1, transposed, 2 outputs)
//   concat (conv1 output, deconv output, upsampled flow)
//   predict over the concatenation (3x3, 2 outputs)
//   a 1x1 convolution, whose one-word windows make conv_ch fill up
// with the same buffer structure as the real network. After every layer the
// whole output buffer is read back through the host port and compared with a
// reference written independently of the RTL: direct convolution sums,
// transposed convolution as a scatter of input pixels through the (stored
// flipped) kernel, and the arithmetic of pipecnn_ref_pkg::adjust_ref. Layer
// cycle counts are checked against G * H * W * L (the window rate of the
// core) and the testbench counts how often each mechanism happened:
// convolution padding, inserted transposed-convolution zeros, negative leaky
// ReLU results, saturation, a stall on a full channel, multi-group layers and
// concatenation; one that never happened is a failure.
// The layer types and their order follow FlowNet-S as the original design
// runs it; the miniature sizes and the mechanism targets are this
// testbench's own.
module pipecnn_top_tb;
  import pipecnn_pkg::*;
  import pipecnn_ref_pkg::*;
  localparam int L = 8, V = 4, DAW = 21, WAW = 18, BAW = 9;
  typedef logic [V-1:0][DATA_W-1:0]        vec_t;
  typedef logic [L-1:0][V-1:0][DATA_W-1:0] wvec_t;
  typedef logic [L-1:0][DATA_W-1:0]        lane_t;

  logic clk = 0, rst_n = 1;
  logic start, busy, done;
  layer_cfg_t cfg;
  logic h_wr_en, h_rd_en, hw_wr_en, hb_wr_en;
  logic [DAW-1:0] h_wr_addr, h_rd_addr;
  vec_t h_wr_data, h_rd_data;
  logic [WAW-1:0] hw_wr_addr; wvec_t hw_wr_data;
  logic [BAW-1:0] hb_wr_addr; lane_t hb_wr_data;

  pipecnn_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_pad = 0, n_ins = 0, n_relu = 0, n_sat = 0, n_full = 0, n_groups = 0, n_cat = 0;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism probes
  always @(posedge clk) if (rst_n) begin
    if (dut.u_mem_read.s1_valid && dut.u_mem_read.s1_zero) begin
      if (dut.cfg_q.op == OP_DECONV) n_ins++; else n_pad++;
    end
    // a stall: the reader held back by full channels, or the core by conv_ch
    if ((dut.u_mem_read.running && !dut.u_mem_read.issue) || !dut.u_core_conv.out_room) n_full++;
  end

  // host-side models of the three memories
  vec_t  gmem [int];
  wvec_t wmod [int];
  lane_t bmod [int];

  task automatic host_write(int a, vec_t d);
    @(negedge clk); h_wr_en = 1; h_wr_addr = DAW'(a); h_wr_data = d;
    @(negedge clk); h_wr_en = 0;
    gmem[a] = d;
  endtask

  task automatic load_weights(int base, int groups, int nv, int k, int wmax, int real_outs);
    for (int a = 0; a < groups * nv * k * k; a++) begin
      wvec_t w;
      for (int l = 0; l < L; l++)
        for (int e = 0; e < V; e++)
          w[l][e] = (l < real_outs) ? DATA_W'($urandom_range(0, 2 * wmax) - wmax) : '0;
      @(negedge clk); hw_wr_en = 1; hw_wr_addr = WAW'(base + a); hw_wr_data = w;
      wmod[base + a] = w;
    end
    @(negedge clk); hw_wr_en = 0;
  endtask

  task automatic load_bias(int base, int groups, int bmax, int real_outs);
    for (int a = 0; a < groups; a++) begin
      lane_t b;
      for (int l = 0; l < L; l++)
        b[l] = (l < real_outs) ? DATA_W'($urandom_range(0, 2 * bmax) - bmax) : '0;
      @(negedge clk); hb_wr_en = 1; hb_wr_addr = BAW'(base + a); hb_wr_data = b;
      bmod[base + a] = b;
    end
    @(negedge clk); hb_wr_en = 0;
  endtask

  function automatic int fin(layer_cfg_t c, int ch, int y, int x);
    vec_t w;
    w = gmem[int'(c.data_base) + ((ch / V) * int'(c.in_h) + y) * int'(c.in_w) + x];
    return int'($signed(w[ch % V]));
  endfunction

  function automatic int fw(layer_cfg_t c, int m, int l, int ch, int ky, int kx);
    wvec_t w;
    int k, nv;
    k = int'(c.k); nv = int'(c.in_vecs);
    w = wmod[int'(c.weight_base) + ((m * nv + ch / V) * k + ky) * k + kx];
    return int'($signed(w[l][ch % V]));
  endfunction

  // reference layer: fills gmem with the expected output
  task automatic ref_layer(layer_cfg_t c);
    int s, k, p, oh, ow, ih, iw, nc;
    s = 1 << c.stride_log2; k = int'(c.k); p = int'(c.pad);
    oh = int'(c.out_h); ow = int'(c.out_w); ih = int'(c.in_h); iw = int'(c.in_w);
    nc = int'(c.in_vecs) * V;
    for (int m = 0; m < int'(c.out_groups); m++)
      for (int l = 0; l < L; l++)
        for (int oy = 0; oy < oh; oy++)
          for (int ox = 0; ox < ow; ox++) begin
            longint acc;
            int bias, r, o, a;
            acc = 0;
            for (int ch = 0; ch < nc; ch++)
              if (c.op == OP_CONV) begin
                for (int ky = 0; ky < k; ky++)
                  for (int kx = 0; kx < k; kx++) begin
                    int y, x;
                    y = oy * s - p + ky; x = ox * s - p + kx;
                    if (y >= 0 && y < ih && x >= 0 && x < iw)
                      acc += longint'(fin(c, ch, y, x)) * longint'(fw(c, m, l, ch, ky, kx));
                  end
              end else begin
                // scatter view: input (iy, ix) reaches output iy*s - p + ky,
                // so only inputs with 0 <= oy + p - iy*s < k contribute
                for (int iy = 0; iy < ih; iy++) begin
                  int ky;
                  ky = oy - iy * s + p;
                  if (ky >= 0 && ky < k)
                    for (int ix = 0; ix < iw; ix++) begin
                      int kx;
                      kx = ox - ix * s + p;
                      if (kx >= 0 && kx < k)
                        acc += longint'(fin(c, ch, iy, ix)) * longint'(fw(c, m, l, ch, k - 1 - ky, k - 1 - kx));
                    end
                end
              end
            if (acc > 64'sd2147483647 || acc < -64'sd2147483648) begin
              failures++; $display("FAIL test setup: accumulator range exceeded");
            end
            bias = int'($signed(bmod[int'(c.bias_base) + m][l]));
            r = adjust_ref(acc, bias, int'(c.bias_shift), int'(c.out_shift), c.relu);
            if (c.relu && acc + longint'(bias) * (longint'(1) << c.bias_shift) < 0) n_relu++;
            if (saturates(acc, bias, int'(c.bias_shift), int'(c.out_shift), c.relu)) n_sat++;
            o = m * L + l;
            a = int'(c.out_base) + ((o / V) * oh + oy) * ow + ox;
            if (!gmem.exists(a)) gmem[a] = '0;
            gmem[a][o % V] = DATA_W'(r);
          end
  endtask

  task automatic ref_concat(layer_cfg_t c);
    int d;
    d = int'(c.out_base);
    for (int s = 0; s < int'(c.cat_num); s++)
      for (int w = 0; w < int'(c.cat_len[s]); w++) begin
        gmem[d] = gmem[int'(c.cat_base[s]) + w];
        d++;
      end
  endtask

  task automatic compare(string name, int base, int words);
    for (int a = base; a < base + words; a++) begin
      @(negedge clk); h_rd_en = 1; h_rd_addr = DAW'(a);
      @(negedge clk); h_rd_en = 0;
      checks++;
      if (h_rd_data != gmem[a]) begin
        failures++;
        if (failures < 12) $display("FAIL %s word %0d: got %h exp %h", name, a, h_rd_data, gmem[a]);
      end
    end
  endtask

  task automatic run_layer(string name, layer_cfg_t c);
    int cyc, words, lo, hi, acc_len, pix;
    if (c.op == OP_CONCAT) ref_concat(c); else ref_layer(c);
    @(negedge clk); cfg = c; start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    if (c.op == OP_CONCAT) begin
      n_cat++;
      words = int'(c.cat_len[0]) + (c.cat_num > 1 ? int'(c.cat_len[1]) : 0)
            + (c.cat_num > 2 ? int'(c.cat_len[2]) : 0);
      lo = words; hi = words + 4;
    end else begin
      if (c.out_groups > 1) n_groups++;
      acc_len = int'(c.in_vecs) * int'(c.k) * int'(c.k);
      pix = int'(c.out_groups) * int'(c.out_h) * int'(c.out_w);
      words = ((int'(c.out_groups) * L + V - 1) / V) * int'(c.out_h) * int'(c.out_w);
      lo = pix * acc_len;
      hi = pix * (acc_len > L / V ? acc_len : L / V) + 12;
    end
    checks++;
    if (cyc < lo || cyc > hi) begin
      failures++;
      $display("FAIL %s took %0d cycles, expected %0d..%0d", name, cyc, lo, hi);
    end
    $display("%-14s %6d cycles", name, cyc);
    compare(name, int'(c.out_base), words);
  endtask

  function automatic layer_cfg_t conv(op_e op, int ih, int iw, int nv, int groups, int k, int sl,
                                      int p, bit relu, int os, int din, int wb, int bb, int dout);
    layer_cfg_t c;
    int s;
    s = 1 << sl;
    c = '0;
    c.op = op; c.in_h = DIM_W'(ih); c.in_w = DIM_W'(iw); c.in_vecs = 8'(nv);
    c.out_groups = 8'(groups); c.k = 4'(k); c.stride_log2 = 2'(sl); c.pad = 4'(p);
    if (op == OP_CONV) begin
      c.out_h = DIM_W'((ih - k + 2 * p) / s + 1); c.out_w = DIM_W'((iw - k + 2 * p) / s + 1);
    end else begin
      c.out_h = DIM_W'(s * (ih - 1) + k - 2 * p); c.out_w = DIM_W'(s * (iw - 1) + k - 2 * p);
    end
    c.relu = relu; c.bias_shift = 6'd8; c.out_shift = 6'(os);
    c.data_base = 32'(din); c.weight_base = 32'(wb); c.bias_base = 32'(bb); c.out_base = 32'(dout);
    return c;
  endfunction

  // buffer addresses (words)
  localparam int B_IN = 0, B_C1 = 4096, B_C2 = 8192, B_C3 = 12288, B_PR = 16384,
                 B_DC = 20480, B_UP = 24576, B_CAT = 28672, B_PR2 = 36864, B_X = 40960;

  initial begin
    layer_cfg_t c1, c2, c3, pr, dc, up, ct, pr2, x1;
    start = 0; cfg = '0;
    h_wr_en = 0; h_rd_en = 0; hw_wr_en = 0; hb_wr_en = 0;
    h_wr_addr = '0; h_rd_addr = '0; h_wr_data = '0;
    hw_wr_addr = '0; hw_wr_data = '0; hb_wr_addr = '0; hb_wr_data = '0;
    #2 rst_n = 0;  // a falling edge, so the asynchronous reset is applied
    repeat (3) @(posedge clk);
    rst_n = 1;

    // input: two 12x12 RGB frames stacked as 6 channels, padded to 8
    for (int n = 0; n < 2; n++)
      for (int y = 0; y < 12; y++)
        for (int x = 0; x < 12; x++) begin
          vec_t d;
          for (int e = 0; e < V; e++)
            d[e] = (n * V + e < 6) ? DATA_W'($urandom_range(0, 2000) - 1000) : '0;
          host_write(B_IN + (n * 12 + y) * 12 + x, d);
        end

    //          op         ih  iw nv g  k sl p relu os   din    wb    bb  dout
    c1  = conv(OP_CONV,   12, 12, 2, 2, 7, 1, 3, 1,  3, B_IN,    0,  0, B_C1);
    c2  = conv(OP_CONV,    6,  6, 4, 2, 5, 1, 2, 1, 11, B_C1,  200,  2, B_C2);
    c3  = conv(OP_CONV,    3,  3, 4, 2, 3, 0, 1, 1,  9, B_C2,  600,  4, B_C3);
    pr  = conv(OP_CONV,    3,  3, 4, 1, 3, 0, 1, 0,  9, B_C3, 1000,  6, B_PR);
    dc  = conv(OP_DECONV,  3,  3, 4, 1, 4, 1, 1, 1,  9, B_C3, 1100,  7, B_DC);
    up  = conv(OP_DECONV,  3,  3, 1, 1, 4, 1, 1, 0,  7, B_PR, 1200,  8, B_UP);
    pr2 = conv(OP_CONV,    6,  6, 7, 1, 3, 0, 1, 0, 10, B_CAT, 1300, 9, B_PR2);
    x1  = conv(OP_CONV,    6,  6, 1, 1, 1, 0, 0, 1,  6, B_PR2, 1400, 10, B_X);
    ct = '0;
    ct.op = OP_CONCAT; ct.cat_num = 2'd3; ct.out_base = 32'(B_CAT);
    ct.cat_base[0] = 32'(B_C1); ct.cat_len[0] = 32'(4 * 36);  // conv1: 16 channels
    ct.cat_base[1] = 32'(B_DC); ct.cat_len[1] = 32'(2 * 36);  // deconv: 8 channels
    ct.cat_base[2] = 32'(B_UP); ct.cat_len[2] = 32'(1 * 36);  // flow: 2 channels + 2 zero

    load_weights(c1.weight_base, 2, 2, 7, 100, 8);  load_bias(c1.bias_base, 2, 100, 8);
    load_weights(c2.weight_base, 2, 4, 5, 100, 8);  load_bias(c2.bias_base, 2, 100, 8);
    load_weights(c3.weight_base, 2, 4, 3, 100, 8);  load_bias(c3.bias_base, 2, 100, 8);
    load_weights(pr.weight_base, 1, 4, 3, 100, 2);  load_bias(pr.bias_base, 1, 100, 2);
    load_weights(dc.weight_base, 1, 4, 4, 100, 8);  load_bias(dc.bias_base, 1, 100, 8);
    load_weights(up.weight_base, 1, 1, 4, 100, 2);  load_bias(up.bias_base, 1, 100, 2);
    load_weights(pr2.weight_base, 1, 7, 3, 100, 2); load_bias(pr2.bias_base, 1, 100, 2);
    load_weights(x1.weight_base, 1, 1, 1, 100, 8);  load_bias(x1.bias_base, 1, 100, 8);

    run_layer("conv1", c1);
    run_layer("conv2", c2);
    run_layer("conv3_1", c3);
    run_layer("predict_a", pr);
    run_layer("deconv", dc);
    run_layer("upsample_flow", up);
    run_layer("concat", ct);
    run_layer("predict_b", pr2);
    run_layer("conv_1x1", x1);

    $display("mechanisms: padding=%0d inserted_zeros=%0d relu_neg=%0d saturated=%0d stall_cycles=%0d multi_group=%0d concat=%0d",
             n_pad, n_ins, n_relu, n_sat, n_full, n_groups, n_cat);
    checks++;
    if (n_pad == 0 || n_ins == 0 || n_relu == 0 || n_sat == 0 || n_full == 0 || n_groups == 0 || n_cat == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
