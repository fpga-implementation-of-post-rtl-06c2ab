// ntru_prime_tpm_top: the four NTRU Prime truncated polynomial multipliers,
// TPM-I to TPM-IV, side by side.
//
// All four compute the encryption product e(x) = h(x) r(x) + m(x) in
// Z_q[x]/(x^n - x - 1) and trade area against cycles differently:
//   TPM-I   one coefficient of r per cycle, N cycles
//   TPM-II  two coefficients per cycle (x^2-net), ceil(N/2) cycles
//   TPM-III one coefficient, or three zeros, per cycle
//   TPM-IV  up to four coefficients per cycle by recoding zero runs
// They share the operand buses h, r and msg; each has its own start, busy,
// done and result so they can be run alone or together; phase4 is TPM-IV's
// count of leftover trailing zeros for the last operation. Operands must stay
// stable only in the cycle start is sampled. The top adds no logic of its own.
//
// The four multipliers are the original architectures; placing them together
// on shared buses, and the per-multiplier start/busy/done, are this design's.
module ntru_prime_tpm_top
  import ntru_pkg::*;
#(
  parameter int unsigned N = N_DEFAULT,
  parameter int unsigned Q = Q_DEFAULT,
  parameter int unsigned M = $clog2(Q)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [3:0]   start,
  input  logic [M-1:0] h   [N],
  input  trit_t        r   [N],
  input  trit_t        msg [N],
  output logic [3:0]   busy,
  output logic [3:0]   done,
  output logic [1:0]   phase4,
  output logic [M-1:0] e1  [N],
  output logic [M-1:0] e2  [N],
  output logic [M-1:0] e3  [N],
  output logic [M-1:0] e4  [N]
);
  tpm1 #(.N(N), .Q(Q), .M(M)) u_tpm1 (
    .clk, .rst_n, .start(start[0]), .h, .r, .msg, .busy(busy[0]), .done(done[0]), .e(e1));
  tpm2 #(.N(N), .Q(Q), .M(M)) u_tpm2 (
    .clk, .rst_n, .start(start[1]), .h, .r, .msg, .busy(busy[1]), .done(done[1]), .e(e2));
  tpm3 #(.N(N), .Q(Q), .M(M)) u_tpm3 (
    .clk, .rst_n, .start(start[2]), .h, .r, .msg, .busy(busy[2]), .done(done[2]), .e(e3));
  tpm4 #(.N(N), .Q(Q), .M(M)) u_tpm4 (
    .clk, .rst_n, .start(start[3]), .h, .r, .msg, .busy(busy[3]), .done(done[3]),
    .phase(phase4), .e(e4));
endmodule
