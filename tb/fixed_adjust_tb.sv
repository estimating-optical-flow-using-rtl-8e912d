// fixed_adjust_tb: checks bias addition, leaky ReLU, rounding and saturation
// of fixed_adjust against the arithmetic reference, with directed corner
// cases (exact halves, both saturation limits, shift of zero) and random
// operands. Combinational block: a stimulus is applied and checked after 1 ns.
// The order of the steps and the +-32767 limits follow the original scheme;
// the out_shift = 0 case is this design's own extension.
module fixed_adjust_tb;
  import pipecnn_pkg::*;
  import pipecnn_ref_pkg::*;

  logic signed [ACC_W-1:0]  acc;
  logic signed [DATA_W-1:0] bias;
  logic [5:0]               bias_shift, out_shift;
  logic                     relu;
  logic signed [DATA_W-1:0] result;

  int checks = 0, failures = 0;
  int n_sat = 0, n_relu = 0;

  fixed_adjust dut (.*);

  task automatic check(int a, int b, int bs, int os, bit r);
    int exp;
    acc = a; bias = 16'(b); bias_shift = 6'(bs); out_shift = 6'(os); relu = r;
    #1;
    exp = adjust_ref(longint'(a), b, bs, os, r);
    checks++;
    if (saturates(longint'(a), b, bs, os, r)) n_sat++;
    if (r && (longint'(a) + longint'(b) * (longint'(1) << bs)) < 0) n_relu++;
    if (int'(result) != exp) begin
      failures++;
      $display("FAIL acc=%0d bias=%0d bs=%0d os=%0d relu=%0d: got %0d exp %0d",
               a, b, bs, os, r, result, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // directed: rounding of halves, 0.1 slope, limits
    check(3, 0, 0, 1, 0);          // 1.5  -> 2
    check(-3, 0, 0, 1, 0);         // -1.5 -> -1
    check(5, 0, 0, 2, 0);          // 1.25 -> 1
    check(6, 0, 0, 2, 0);          // 1.5  -> 2
    check(-100, 0, 0, 1, 1);       // -10 -> -5
    check(-100, 0, 0, 0, 1);       // -10, no rescale
    check(100, 0, 0, 0, 1);        // positive untouched by relu
    check(32767 * 4, 0, 0, 2, 0);  // exactly the limit
    check(32768 * 4, 0, 0, 2, 0);  // one above -> 32767
    check(-32768 * 4, 0, 0, 2, 0); // -> -32767
    check(0, 100, 8, 8, 0);        // bias alone at full scale
    check(-(1 << 20), 7, 10, 6, 1);
    for (int i = 0; i < 3000; i++) begin
      check(int'($urandom_range(0, 32'hFFFFFF)) - 32'h800000,
            int'($urandom_range(0, 65535)) - 32768,
            int'($urandom_range(0, 10)), int'($urandom_range(0, 14)), 1'($urandom_range(0, 1)));
    end
    checks++;
    if (n_sat == 0 || n_relu == 0) begin
      failures++;
      $display("FAIL coverage: saturations=%0d relu_negatives=%0d", n_sat, n_relu);
    end
    $display("saturations=%0d relu_negatives=%0d", n_sat, n_relu);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
