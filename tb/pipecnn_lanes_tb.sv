// pipecnn_lanes_tb: the accelerator built with the two smaller lane counts of
// the design study, LANE_NUM = 4 and LANE_NUM = 2 (the defaults, 8 lanes,
// are covered by pipecnn_top_tb).
//
// Two lane_runner instances share one clock and each runs the same miniature
// FlowNet-S (strided and padded convolutions, a 2-output predict layer, a
// transposed convolution, flow up-sampling, a concatenation, a 1x1
// convolution) on its own accelerator, checking every output word and every
// layer's cycle count against its reference. LANE_NUM = 2 is narrower than
// the 4-channel feature word, so it exercises the writer's strobed partial
// writes, and both configurations split the 16-channel layers into more
// output groups than the default does. The testbench waits for both runners,
// adds their checks and failures, and fails if either saw no padding, no
// inserted zeros, no multi-group layer or no concatenation.
module pipecnn_lanes_tb;
  logic clk = 0;
  always #5 clk = ~clk;

  logic fin4, fin2;
  int c4, f4, pad4, ins4, grp4, cat4;
  int c2, f2, pad2, ins2, grp2, cat2;

  lane_runner #(.L(4)) u_l4 (.clk, .fin(fin4), .checks(c4), .failures(f4),
                             .n_pad(pad4), .n_ins(ins4), .n_groups(grp4), .n_cat(cat4));
  lane_runner #(.L(2)) u_l2 (.clk, .fin(fin2), .checks(c2), .failures(f2),
                             .n_pad(pad2), .n_ins(ins2), .n_groups(grp2), .n_cat(cat2));

  int checks, failures;

  initial begin
    repeat (1000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c2, f4 + f2 + 1);
    $finish;
  end

  initial begin
    #1;
    wait (fin4 && fin2);
    checks = c4 + c2 + 1;
    failures = f4 + f2;
    $display("L=4 mechanisms: padding=%0d inserted_zeros=%0d multi_group=%0d concat=%0d", pad4, ins4, grp4, cat4);
    $display("L=2 mechanisms: padding=%0d inserted_zeros=%0d multi_group=%0d concat=%0d", pad2, ins2, grp2, cat2);
    if (pad4 == 0 || ins4 == 0 || grp4 == 0 || cat4 == 0 ||
        pad2 == 0 || ins2 == 0 || grp2 == 0 || cat2 == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
