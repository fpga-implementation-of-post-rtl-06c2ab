// tb_tpm4: testbench of the TPM-IV multiplier. Two environments run in
// parallel: one with a power-of-two modulus (N = 37, Q = 2048, the modulus of
// the FPGA parameter sets) and one with a prime modulus (N = 41, Q = 2297).
// Each compares every result coefficient with a software model and checks
// the cycle count and the done pulse of every operation.
module tb_tpm4;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int   c0, f0, c1, f1;
  logic fin0, fin1;
  int   z3_0, z3_1;
  int   h4_0 [8], h4_1 [8], t4_0 [3], t4_1 [3];

  tpm_env #(.KIND(4), .N(37), .Q(2048), .NTESTS(24)) u_env0 (
    .clk, .checks(c0), .failures(f0), .n_zero3(z3_0), .hist4(h4_0), .tails4(t4_0), .finished(fin0));
  tpm_env #(.KIND(4), .N(41), .Q(2297), .NTESTS(24)) u_env1 (
    .clk, .checks(c1), .failures(f1), .n_zero3(z3_1), .hist4(h4_1), .tails4(t4_1), .finished(fin1));

  initial begin
    repeat (2) @(posedge clk);
    wait (fin0 && fin1);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1 + 1);
    $finish;
  end
endmodule
