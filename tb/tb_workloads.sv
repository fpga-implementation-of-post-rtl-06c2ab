// tb_workloads: the four parameter sets used to compare the multipliers, one
// per security level: ees401ep1 (n 401, d_r 113), ees449ep1 (449, 134),
// ees677ep1 (677, 157) and ees1087ep2 (1087, 120), all with q = 2048. Each
// runs all four multipliers on random operands of the set's shape, checks the
// results and cycle counts, and prints the cycle counts.
module tb_workloads;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int   c [4], f [4];
  logic fin [4];

  wl_env #(.N(401),  .DR(113)) u_112 (.clk, .checks(c[0]), .failures(f[0]), .finished(fin[0]));
  wl_env #(.N(449),  .DR(134)) u_128 (.clk, .checks(c[1]), .failures(f[1]), .finished(fin[1]));
  wl_env #(.N(677),  .DR(157)) u_192 (.clk, .checks(c[2]), .failures(f[2]), .finished(fin[2]));
  wl_env #(.N(1087), .DR(120)) u_256 (.clk, .checks(c[3]), .failures(f[3]), .finished(fin[3]));

  initial begin
    repeat (2) @(posedge clk);
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3], f[0] + f[1] + f[2] + f[3]);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3], f[0] + f[1] + f[2] + f[3] + 1);
    $finish;
  end
endmodule
