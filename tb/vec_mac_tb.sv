// vec_mac_tb: random and extreme operand vectors into vec_mac; the dot
// product is recomputed with 64-bit integers and compared modulo 2**32,
// the width of the accumulator (full-range operands can wrap it).
// The 16-bit operands and 32-bit sums follow the original fixed-point
// scheme; wrap-around on overflow is this design's own behaviour.
module vec_mac_tb;
  localparam int VEC = 4;
  logic [VEC-1:0][15:0] data, weight;
  logic signed [31:0]   sum;
  int checks = 0, failures = 0;

  vec_mac #(.VEC_SIZE(VEC)) dut (.data, .weight, .sum);

  task automatic run_one();
    longint exp;
    exp = 0;
    for (int i = 0; i < VEC; i++) exp += longint'($signed(data[i])) * longint'($signed(weight[i]));
    #1;
    checks++;
    if (sum != 32'(exp)) begin
      failures++;
      $display("FAIL data=%h weight=%h sum=%0d exp=%0d", data, weight, sum, exp);
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
    for (int i = 0; i < VEC; i++) begin data[i] = 16'h8000; weight[i] = 16'h7FFF; end
    run_one();
    for (int i = 0; i < VEC; i++) begin data[i] = 16'hFFFF; weight[i] = 16'hFFFF; end
    run_one();
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < VEC; i++) begin
        data[i]   = 16'($urandom);
        weight[i] = 16'($urandom);
      end
      run_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
