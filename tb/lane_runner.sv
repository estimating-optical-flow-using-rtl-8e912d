// lane_runner: one accelerator instance at a given LANE_NUM, driven through a
// miniature FlowNet-S by a host model, for pipecnn_lanes_tb.
//
// The accelerator is built with LANE_NUM = L (VEC_SIZE = 4 and the default
// memory depths). The runner clears the buffers it uses, loads a 12 x 12
// two-frame input, and runs conv (7x7 s2 p3), conv (5x5 s2 p2), conv (3x3),
// predict (3x3, 2 outputs), a transposed convolution (4x4 s2 p1), an
// up-sampling of the flow, a concatenation, a second predict and a 1x1
// convolution. Channel counts are fixed and the number of output groups
// follows from L: 16 channels are 4 groups at L = 4 and 8 groups at L = 2.
// When L < VEC_SIZE a result fills only part of a feature word; the writer's
// strobes leave the rest alone, which is why the buffers are cleared first.
// After each layer the output buffer is read back and compared with a direct
// (convolution) or scatter (transposed convolution) reference, and the
// layer's cycle count is checked. When done, fin rises and checks, failures
// and the mechanism counts hold the results.
module lane_runner #(
  parameter int L = 4
) (
  input  logic clk,
  output logic fin,
  output int   checks,
  output int   failures,
  output int   n_pad,
  output int   n_ins,
  output int   n_groups,
  output int   n_cat
);
  import pipecnn_pkg::*;
  import pipecnn_ref_pkg::*;
  localparam int V = 4, DAW = 21, WAW = 18, BAW = 9;
  typedef logic [V-1:0][DATA_W-1:0]        vec_t;
  typedef logic [L-1:0][V-1:0][DATA_W-1:0] wvec_t;
  typedef logic [L-1:0][DATA_W-1:0]        lane_t;

  logic rst_n = 1;
  logic start, busy, done;
  layer_cfg_t cfg;
  logic h_wr_en, h_rd_en, hw_wr_en, hb_wr_en;
  logic [DAW-1:0] h_wr_addr, h_rd_addr;
  vec_t h_wr_data, h_rd_data;
  logic [WAW-1:0] hw_wr_addr; wvec_t hw_wr_data;
  logic [BAW-1:0] hb_wr_addr; lane_t hb_wr_data;

  pipecnn_top #(.LANE_NUM(L)) dut (.*);

  always @(posedge clk) if (rst_n && dut.u_mem_read.s1_valid && dut.u_mem_read.s1_zero) begin
    if (dut.cfg_q.op == OP_DECONV) n_ins++; else n_pad++;
  end

  vec_t  gmem [int];
  wvec_t wmod [int];
  lane_t bmod [int];

  task automatic host_write(int a, vec_t d);
    @(negedge clk); h_wr_en = 1; h_wr_addr = DAW'(a); h_wr_data = d;
    @(negedge clk); h_wr_en = 0;
    gmem[a] = d;
  endtask

  // weights of output channel m*L+l exist only below cout; the rest are zero
  task automatic load_weights(int base, int groups, int nv, int k, int cout);
    for (int a = 0; a < groups * nv * k * k; a++) begin
      wvec_t w;
      int m;
      m = a / (nv * k * k);
      for (int l = 0; l < L; l++)
        for (int e = 0; e < V; e++)
          w[l][e] = (m * L + l < cout) ? DATA_W'($urandom_range(0, 200) - 100) : '0;
      @(negedge clk); hw_wr_en = 1; hw_wr_addr = WAW'(base + a); hw_wr_data = w;
      wmod[base + a] = w;
    end
    @(negedge clk); hw_wr_en = 0;
  endtask

  task automatic load_bias(int base, int groups, int cout);
    for (int a = 0; a < groups; a++) begin
      lane_t b;
      for (int l = 0; l < L; l++)
        b[l] = (a * L + l < cout) ? DATA_W'($urandom_range(0, 200) - 100) : '0;
      @(negedge clk); hb_wr_en = 1; hb_wr_addr = BAW'(base + a); hb_wr_data = b;
      bmod[base + a] = b;
    end
    @(negedge clk); hb_wr_en = 0;
  endtask

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
            for (int iy = 0; iy < ih; iy++)
              for (int ix = 0; ix < iw; ix++) begin
                int ky, kx;
                if (c.op == OP_CONV) begin
                  ky = iy - oy * s + p; kx = ix - ox * s + p;
                end else begin  // stored kernel is flipped
                  ky = k - 1 - (oy - iy * s + p); kx = k - 1 - (ox - ix * s + p);
                end
                if (ky >= 0 && ky < k && kx >= 0 && kx < k) begin
                  vec_t  d;
                  wvec_t w;
                  d = gmem[int'(c.data_base) + (n * ih + iy) * iw + ix];
                  w = wmod[int'(c.weight_base) + ((m * nv + n) * k + ky) * k + kx];
                  for (int l = 0; l < L; l++)
                    for (int e = 0; e < V; e++)
                      acc[l] += longint'($signed(d[e])) * longint'($signed(w[l][e]));
                end
              end
          for (int l = 0; l < L; l++) begin
            int o, a;
            o = m * L + l;
            a = int'(c.out_base) + ((o / V) * oh + oy) * ow + ox;
            gmem[a][o % V] = DATA_W'(adjust_ref(acc[l], int'($signed(bmod[int'(c.bias_base) + m][l])),
                                                int'(c.bias_shift), int'(c.out_shift), c.relu));
          end
        end
  endtask

  task automatic run_layer(string name, layer_cfg_t c, int words);
    int cyc, lo, hi, acc_len, pix;
    if (c.op == OP_CONCAT) begin
      int d;
      d = int'(c.out_base);
      for (int s = 0; s < int'(c.cat_num); s++)
        for (int w = 0; w < int'(c.cat_len[s]); w++) begin
          gmem[d] = gmem[int'(c.cat_base[s]) + w];
          d++;
        end
      n_cat++;
      lo = words; hi = words + 4;
    end else begin
      ref_layer(c);
      if (c.out_groups > 1) n_groups++;
      acc_len = int'(c.in_vecs) * int'(c.k) * int'(c.k);
      pix = int'(c.out_groups) * int'(c.out_h) * int'(c.out_w);
      lo = pix * acc_len;
      hi = pix * (acc_len > L / V ? acc_len : 1) + 12;
    end
    @(negedge clk); cfg = c; start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc < lo || cyc > hi) begin
      failures++;
      $display("FAIL L=%0d %s took %0d cycles, expected %0d..%0d", L, name, cyc, lo, hi);
    end
    for (int a = int'(c.out_base); a < int'(c.out_base) + words; a++) begin
      @(negedge clk); h_rd_en = 1; h_rd_addr = DAW'(a);
      @(negedge clk); h_rd_en = 0;
      checks++;
      if (h_rd_data != gmem[a]) begin
        failures++;
        if (failures < 8) $display("FAIL L=%0d %s word %0d: got %h exp %h", L, name, a, h_rd_data, gmem[a]);
      end
    end
    $display("L=%0d %-14s %6d cycles", L, name, cyc);
  endtask

  // builds a layer, loads its weights and runs it; weight and bias memories
  // are filled from running pointers
  int wp = 0, bp = 0;
  task automatic layer(string name, op_e op, int isz, int nv, int cout, int k, int sl, int p,
                       bit relu, int os, int din, int dout);
    layer_cfg_t c;
    int s, o, g;
    s = 1 << sl;
    o = (op == OP_CONV) ? (isz - k + 2 * p) / s + 1 : s * (isz - 1) + k - 2 * p;
    g = (cout + L - 1) / L;
    c = '0;
    c.op = op; c.in_h = DIM_W'(isz); c.in_w = DIM_W'(isz); c.out_h = DIM_W'(o); c.out_w = DIM_W'(o);
    c.in_vecs = 8'(nv); c.out_groups = 8'(g); c.k = 4'(k); c.stride_log2 = 2'(sl); c.pad = 4'(p);
    c.relu = relu; c.bias_shift = 6'(os - 2); c.out_shift = 6'(os);
    c.data_base = 32'(din); c.weight_base = 32'(wp); c.bias_base = 32'(bp); c.out_base = 32'(dout);
    load_weights(wp, g, nv, k, cout);
    load_bias(bp, g, cout);
    wp += g * nv * k * k; bp += g;
    run_layer(name, c, ((g * L + V - 1) / V) * o * o);
  endtask

  localparam int B_IN = 0, B_C1 = 1000, B_C2 = 2000, B_C3 = 3000, B_PR = 4000, B_DC = 5000,
                 B_UP = 6000, B_CAT = 7000, B_PR2 = 8000, B_X = 9000, B_END = 10000;

  initial begin
    layer_cfg_t ct;
    fin = 0; checks = 0; failures = 0; n_pad = 0; n_ins = 0; n_groups = 0; n_cat = 0;
    start = 0; cfg = '0;
    h_wr_en = 0; h_rd_en = 0; hw_wr_en = 0; hb_wr_en = 0;
    h_wr_addr = '0; h_rd_addr = '0; h_wr_data = '0;
    hw_wr_addr = '0; hw_wr_data = '0; hb_wr_addr = '0; hb_wr_data = '0;
    #2 rst_n = 0;  // a falling edge, so the asynchronous reset is applied
    repeat (3) @(posedge clk);
    rst_n = 1;

    // clear the buffers, then the input: 6 channels padded to 8
    for (int a = B_C1; a < B_END; a++) host_write(a, '0);
    for (int n = 0; n < 2; n++)
      for (int y = 0; y < 12; y++)
        for (int x = 0; x < 12; x++) begin
          vec_t d;
          for (int e = 0; e < V; e++)
            d[e] = (n * V + e < 6) ? DATA_W'($urandom_range(0, 2000) - 1000) : '0;
          host_write(B_IN + (n * 12 + y) * 12 + x, d);
        end

    //     name             op         isz nv cout k sl p relu os  din    dout
    layer("conv1",         OP_CONV,   12, 2, 16, 7, 1, 3, 1, 11, B_IN,  B_C1);
    layer("conv2",         OP_CONV,    6, 4, 16, 5, 1, 2, 1, 11, B_C1,  B_C2);
    layer("conv3_1",       OP_CONV,    3, 4, 16, 3, 0, 1, 1,  9, B_C2,  B_C3);
    layer("predict_a",     OP_CONV,    3, 4,  2, 3, 0, 1, 0,  9, B_C3,  B_PR);
    layer("deconv",        OP_DECONV,  3, 4,  8, 4, 1, 1, 1,  9, B_C3,  B_DC);
    layer("upsample_flow", OP_DECONV,  3, 1,  2, 4, 1, 1, 0,  7, B_PR,  B_UP);
    ct = '0;
    ct.op = OP_CONCAT; ct.cat_num = 2'd3; ct.out_base = 32'(B_CAT);
    ct.cat_base[0] = 32'(B_C1); ct.cat_len[0] = 32'(4 * 36);  // 16 channels
    ct.cat_base[1] = 32'(B_DC); ct.cat_len[1] = 32'(2 * 36);  // 8 channels
    ct.cat_base[2] = 32'(B_UP); ct.cat_len[2] = 32'(1 * 36);  // flow + 2 zero channels
    run_layer("concat", ct, 7 * 36);
    layer("predict_b",     OP_CONV,    6, 7,  2, 3, 0, 1, 0, 10, B_CAT, B_PR2);
    layer("conv_1x1",      OP_CONV,    6, 1,  8, 1, 0, 0, 1,  6, B_PR2, B_X);
    fin = 1;
  end
endmodule
