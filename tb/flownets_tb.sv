// flownets_tb: the complete FlowNet-S layer sequence on the accelerator at its
// default parameters (LANE_NUM = 8, VEC_SIZE = 4, full memory depths).
//
// All 23 convolution and transposed-convolution layers and the 4
// concatenations of the network run in order, with the channel counts,
// kernels, strides and paddings of the network's layer table:
//   conv1 (7x7 s2 p3, 6 -> 24) ... conv6_1 (3x3, 384 -> 384),
//   then four refinement levels of predict_conv (3x3, 2 outputs),
//   deconv (4x4 s2 p1), upsample_flow (4x4 s2 p1, 2 -> 2) and a
//   concatenation of the skip features, the deconvolution and the
//   up-sampled flow, ending in predict_conv2.
// The channel counts are those of the table, with the deconv3 output taken as
// 48 channels (the only count for which the 146 inputs of predict_conv3 add
// up). The image is the network's 384 x 384 pair; S can be set to any other
// multiple of 64 (every stride-2 layer then divides evenly) for a quicker
// run, and the cycle count, which is proportional to S * S, is printed
// scaled to 384 x 384. The full run is about 99.5 million cycles.
// Weights, biases and the image are random; the shifts are chosen per layer
// to keep activations in range, as a host would choose fractional formats.
//
// After every layer the complete output buffer is read back through the host
// port and compared with a reference computed independently of the RTL:
// direct convolution sums for convolutions, and for transposed convolutions a
// scatter of the input pixels through the kernel (stored spatially flipped,
// which is the host's part of the convention). Layer cycle counts are checked
// against out_groups * out_h * out_w * (in_vecs * k * k) plus a small latency.
// The testbench counts convolution padding, inserted transposed-convolution
// zeros, negative leaky-ReLU inputs, multi-group layers and concatenations,
// all of which the network must produce; saturations and stall cycles are
// only reported.
// The layer sequence and channel counts follow the original network table;
// the random data, the shift choices and the buffer placement are this
// testbench's own.
module flownets_tb;
  import pipecnn_pkg::*;
  import pipecnn_ref_pkg::*;
  localparam int L = 8, V = 4, DAW = 21, WAW = 18, BAW = 9;
  localparam int S = 384;  // image side (a multiple of 64)
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
  int n_pad = 0, n_ins = 0, n_relu = 0, n_sat = 0, n_stall = 0, n_groups = 0, n_cat = 0;
  longint total_cycles = 0;

  initial begin
    repeat (1000 * S * S + 5000000) @(posedge clk);
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
    if ((dut.u_mem_read.running && !dut.u_mem_read.issue) || !dut.u_core_conv.out_room) n_stall++;
  end

  // host-side models of the three memories
  vec_t  gmem [int];
  wvec_t wmod [int];
  lane_t bmod [int];
  int    next_w = 0, next_b = 0;

  function automatic vec_t rd(int a);
    return gmem.exists(a) ? gmem[a] : vec_t'('0);
  endfunction

  task automatic load_weights(int base, int words, int wmax, int real_outs);
    for (int a = 0; a < words; a++) begin
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

  // reference layer, one output pixel and group at a time: every contributing
  // (input vector, weight word) pair adds VEC_SIZE products to each lane
  task automatic ref_layer(layer_cfg_t c);
    int s, k, p, oh, ow, ih, iw, nv;
    s = 1 << c.stride_log2; k = int'(c.k); p = int'(c.pad);
    oh = int'(c.out_h); ow = int'(c.out_w); ih = int'(c.in_h); iw = int'(c.in_w);
    nv = int'(c.in_vecs);
    for (int m = 0; m < int'(c.out_groups); m++)
      for (int oy = 0; oy < oh; oy++)
        for (int ox = 0; ox < ow; ox++) begin
          longint acc [L];
          for (int l = 0; l < L; l++) acc[l] = 0;
          for (int n = 0; n < nv; n++)
            for (int iy = 0; iy < ih; iy++) begin
              int ky;
              // convolution: input row iy = oy*s - p + ky; transposed: the
              // input row iy reaches output row iy*s - p + ky of the kernel
              // as the framework stores it, i.e. stored row k-1-ky
              if (c.op == OP_CONV) ky = iy - oy * s + p;
              else                 ky = k - 1 - (oy - iy * s + p);
              if (ky >= 0 && ky < k)
                for (int ix = 0; ix < iw; ix++) begin
                  int kx;
                  if (c.op == OP_CONV) kx = ix - ox * s + p;
                  else                 kx = k - 1 - (ox - ix * s + p);
                  if (kx >= 0 && kx < k) begin
                    vec_t  d;
                    wvec_t w;
                    d = rd(int'(c.data_base) + (n * ih + iy) * iw + ix);
                    w = wmod[int'(c.weight_base) + ((m * nv + n) * k + ky) * k + kx];
                    for (int l = 0; l < L; l++)
                      for (int e = 0; e < V; e++)
                        acc[l] += longint'($signed(d[e])) * longint'($signed(w[l][e]));
                  end
                end
            end
          for (int l = 0; l < L; l++) begin
            int bias, r, o, a;
            if (acc[l] > 64'sd2147483647 || acc[l] < -64'sd2147483648) begin
              failures++; $display("FAIL test setup: accumulator range exceeded");
            end
            bias = int'($signed(bmod[int'(c.bias_base) + m][l]));
            r = adjust_ref(acc[l], bias, int'(c.bias_shift), int'(c.out_shift), c.relu);
            if (c.relu && acc[l] + longint'(bias) * (longint'(1) << c.bias_shift) < 0) n_relu++;
            if (saturates(acc[l], bias, int'(c.bias_shift), int'(c.out_shift), c.relu)) n_sat++;
            o = m * L + l;
            a = int'(c.out_base) + ((o / V) * oh + oy) * ow + ox;
            if (!gmem.exists(a)) gmem[a] = '0;
            gmem[a][o % V] = DATA_W'(r);
          end
        end
  endtask

  task automatic compare(string name, int base, int words);
    int bad = 0;
    for (int a = base; a < base + words; a++) begin
      @(negedge clk); h_rd_en = 1; h_rd_addr = DAW'(a);
      @(negedge clk); h_rd_en = 0;
      checks++;
      if (h_rd_data != rd(a)) begin
        failures++; bad++;
        if (bad < 4) $display("FAIL %s word %0d: got %h exp %h", name, a, h_rd_data, rd(a));
      end
    end
  endtask

  task automatic run(string name, layer_cfg_t c, int lo, int hi, int words);
    int cyc;
    @(negedge clk); cfg = c; start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    total_cycles += longint'(cyc);
    checks++;
    if (cyc < lo || cyc > hi) begin
      failures++;
      $display("FAIL %s took %0d cycles, expected %0d..%0d", name, cyc, lo, hi);
    end
    $display("%-18s %8d cycles  %6d words", name, cyc, words);
    compare(name, int'(c.out_base), words);
  endtask

  // one convolution or transposed-convolution layer: load its weights and
  // biases, build the descriptor, run it and check it; returns the descriptor
  task automatic layer(string name, op_e op, int in_sz, int nv, int cout, int k, int sl, int p,
                       bit relu, int din, int dout, output layer_cfg_t c);
    int s, o, g, n, os, real_outs, acc_len, words;
    s = 1 << sl;
    o = (op == OP_CONV) ? (in_sz - k + 2 * p) / s + 1 : s * (in_sz - 1) + k - 2 * p;
    g = (cout + L - 1) / L;
    real_outs = cout < L ? cout : L;
    // shift so that a sum of n random products comes back to the input range
    n = nv * V * k * k;
    os = 0;
    while ((1 << os) * (1 << os) < n * 64 * 64) os++;
    c = '0;
    c.op = op; c.in_h = DIM_W'(in_sz); c.in_w = DIM_W'(in_sz);
    c.out_h = DIM_W'(o); c.out_w = DIM_W'(o);
    c.in_vecs = 8'(nv); c.out_groups = 8'(g); c.k = 4'(k); c.stride_log2 = 2'(sl);
    c.pad = 4'(p); c.relu = relu; c.out_shift = 6'(os); c.bias_shift = 6'(os - 3);
    c.data_base = 32'(din); c.out_base = 32'(dout);
    c.weight_base = 32'(next_w); c.bias_base = 32'(next_b);
    load_weights(next_w, g * nv * k * k, 100, real_outs);
    load_bias(next_b, g, 1000, real_outs);
    next_w += g * nv * k * k; next_b += g;
    if (g > 1) n_groups++;
    ref_layer(c);
    acc_len = nv * k * k;
    words = ((g * L + V - 1) / V) * o * o;
    run(name, c, g * o * o * acc_len, g * o * o * (acc_len > L / V ? acc_len : L / V) + 12, words);
  endtask

  // a concatenation of three buffers (base, length in words)
  task automatic concat(string name, int b0, int n0, int b1, int n1, int b2, int n2, int dout);
    layer_cfg_t c;
    int d;
    c = '0;
    c.op = OP_CONCAT; c.cat_num = 2'd3; c.out_base = 32'(dout);
    c.cat_base[0] = 32'(b0); c.cat_len[0] = 32'(n0);
    c.cat_base[1] = 32'(b1); c.cat_len[1] = 32'(n1);
    c.cat_base[2] = 32'(b2); c.cat_len[2] = 32'(n2);
    d = dout;
    for (int w = 0; w < n0; w++) begin gmem[d] = rd(b0 + w); d++; end
    for (int w = 0; w < n1; w++) begin gmem[d] = rd(b1 + w); d++; end
    for (int w = 0; w < n2; w++) begin gmem[d] = rd(b2 + w); d++; end
    n_cat++;
    run(name, c, n0 + n1 + n2, n0 + n1 + n2 + 4, n0 + n1 + n2);
  endtask

  // buffer addresses: every result gets a buffer of its own
  int next_f = 0;
  function automatic int alloc(int planes, int side);
    int a;
    a = next_f;
    next_f += planes * side * side;
    return a;
  endfunction

  initial begin
    layer_cfg_t c1, c2, c3, c31, c4, c41, c5, c51, c6, c61;
    layer_cfg_t p6, d5, u6, p5, d4, u5, p4, d3, u4, p3, d2, u3, p2;
    int b_in, b_c1, b_c2, b_c3, b_c31, b_c4, b_c41, b_c5, b_c51, b_c6, b_c61;
    int b_p6, b_d5, b_u6, b_k5, b_p5, b_d4, b_u5, b_k4, b_p4, b_d3, b_u4, b_k3;
    int b_p3, b_d2, b_u3, b_k2, b_p2;
    int s2, s4, s8, s16, s32, s64;
    s2 = S / 2; s4 = S / 4; s8 = S / 8; s16 = S / 16; s32 = S / 32; s64 = S / 64;
    start = 0; cfg = '0;
    h_wr_en = 0; h_rd_en = 0; hw_wr_en = 0; hb_wr_en = 0;
    h_wr_addr = '0; h_rd_addr = '0; h_wr_data = '0;
    hw_wr_addr = '0; hw_wr_data = '0; hb_wr_addr = '0; hb_wr_data = '0;
    #2 rst_n = 0;  // a falling edge, so the asynchronous reset is applied
    repeat (3) @(posedge clk);
    rst_n = 1;

    // the image pair: 6 channels (two RGB frames), padded to 8 = 2 planes
    b_in = alloc(2, S);
    for (int n = 0; n < 2; n++)
      for (int y = 0; y < S; y++)
        for (int x = 0; x < S; x++) begin
          vec_t d;
          int a;
          for (int e = 0; e < V; e++)
            d[e] = (n * V + e < 6) ? DATA_W'($urandom_range(0, 2000) - 1000) : '0;
          a = b_in + (n * S + y) * S + x;
          @(negedge clk); h_wr_en = 1; h_wr_addr = DAW'(a); h_wr_data = d;
          gmem[a] = d;
        end
    @(negedge clk); h_wr_en = 0;

    // contracting part: output planes = 2 * groups = channels / 4
    b_c1  = alloc(6,  s2);  layer("conv1",   OP_CONV, S,    2,  24, 7, 1, 3, 1, b_in,  b_c1,  c1);
    b_c2  = alloc(12, s4);  layer("conv2",   OP_CONV, s2,   6,  48, 5, 1, 2, 1, b_c1,  b_c2,  c2);
    b_c3  = alloc(24, s8);  layer("conv3",   OP_CONV, s4,  12,  96, 5, 1, 2, 1, b_c2,  b_c3,  c3);
    b_c31 = alloc(24, s8);  layer("conv3_1", OP_CONV, s8,  24,  96, 3, 0, 1, 1, b_c3,  b_c31, c31);
    b_c4  = alloc(48, s16); layer("conv4",   OP_CONV, s8,  24, 192, 3, 1, 1, 1, b_c31, b_c4,  c4);
    b_c41 = alloc(48, s16); layer("conv4_1", OP_CONV, s16, 48, 192, 3, 0, 1, 1, b_c4,  b_c41, c41);
    b_c5  = alloc(48, s32); layer("conv5",   OP_CONV, s16, 48, 192, 3, 1, 1, 1, b_c41, b_c5,  c5);
    b_c51 = alloc(48, s32); layer("conv5_1", OP_CONV, s32, 48, 192, 3, 0, 1, 1, b_c5,  b_c51, c51);
    b_c6  = alloc(96, s64); layer("conv6",   OP_CONV, s32, 48, 384, 3, 1, 1, 1, b_c51, b_c6,  c6);
    b_c61 = alloc(96, s64); layer("conv6_1", OP_CONV, s64, 96, 384, 3, 0, 1, 1, b_c6,  b_c61, c61);

    // refinement: a 2-channel flow result occupies 2 planes (8 channels, 6
    // of them zero); its first plane (flow + 2 zero channels) is what the
    // up-sampling and the concatenations read
    b_p6 = alloc(2, s64);  layer("predict_conv6",     OP_CONV,   s64, 96,   2, 3, 0, 1, 0, b_c61, b_p6, p6);
    b_d5 = alloc(48, s32); layer("deconv5",           OP_DECONV, s64, 96, 192, 4, 1, 1, 1, b_c61, b_d5, d5);
    b_u6 = alloc(2, s32);  layer("upsample_flow6to5", OP_DECONV, s64,  1,   2, 4, 1, 1, 0, b_p6,  b_u6, u6);
    b_k5 = alloc(97, s32);
    concat("concat2", b_c51, 48 * s32 * s32, b_d5, 48 * s32 * s32, b_u6, s32 * s32, b_k5);

    b_p5 = alloc(2, s32);  layer("predict_conv5",     OP_CONV,   s32, 97,   2, 3, 0, 1, 0, b_k5, b_p5, p5);
    b_d4 = alloc(24, s16); layer("deconv4",           OP_DECONV, s32, 97,  96, 4, 1, 1, 1, b_k5, b_d4, d4);
    b_u5 = alloc(2, s16);  layer("upsample_flow5to4", OP_DECONV, s32,  1,   2, 4, 1, 1, 0, b_p5, b_u5, u5);
    b_k4 = alloc(73, s16);
    concat("concat3", b_c41, 48 * s16 * s16, b_d4, 24 * s16 * s16, b_u5, s16 * s16, b_k4);

    b_p4 = alloc(2, s16);  layer("predict_conv4",     OP_CONV,   s16, 73,   2, 3, 0, 1, 0, b_k4, b_p4, p4);
    b_d3 = alloc(12, s8);  layer("deconv3",           OP_DECONV, s16, 73,  48, 4, 1, 1, 1, b_k4, b_d3, d3);
    b_u4 = alloc(2, s8);   layer("upsample_flow4to3", OP_DECONV, s16,  1,   2, 4, 1, 1, 0, b_p4, b_u4, u4);
    b_k3 = alloc(37, s8);
    concat("concat4", b_c31, 24 * s8 * s8, b_d3, 12 * s8 * s8, b_u4, s8 * s8, b_k3);

    b_p3 = alloc(2, s8);   layer("predict_conv3",     OP_CONV,   s8,  37,   2, 3, 0, 1, 0, b_k3, b_p3, p3);
    b_d2 = alloc(6, s4);   layer("deconv2",           OP_DECONV, s8,  37,  24, 4, 1, 1, 1, b_k3, b_d2, d2);
    b_u3 = alloc(2, s4);   layer("upsample_flow3to2", OP_DECONV, s8,   1,   2, 4, 1, 1, 0, b_p3, b_u3, u3);
    b_k2 = alloc(19, s4);
    concat("concat5", b_c2, 12 * s4 * s4, b_d2, 6 * s4 * s4, b_u3, s4 * s4, b_k2);

    b_p2 = alloc(2, s4);   layer("predict_conv2",     OP_CONV,   s4,  19,   2, 3, 0, 1, 0, b_k2, b_p2, p2);

    $display("%0d x %0d: %0d layer cycles (%0d scaled to 384 x 384); weights %0d words, biases %0d, features %0d",
             S, S, total_cycles, total_cycles * longint'(384 * 384) / longint'(S * S),
             next_w, next_b, next_f);
    $display("mechanisms: padding=%0d inserted_zeros=%0d relu_neg=%0d saturated=%0d stall_cycles=%0d multi_group=%0d concat=%0d",
             n_pad, n_ins, n_relu, n_sat, n_stall, n_groups, n_cat);
    checks++;
    if (n_pad == 0 || n_ins == 0 || n_relu == 0 || n_groups == 0 || n_cat != 4) begin
      failures++;
      $display("FAIL a mechanism of the network never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
