// tpm1_au: arithmetic unit of the TPM-I multiplier, s = e + r*h mod Q with
// r in {-1, 0, +1}.
//
// Because r is ternary no multiplier is needed. Bit r[1] (negative) turns the
// adder into a subtractor, bit r[0] (nonzero) picks either the adder result or
// e unchanged in the output multiplexer:
//   r = 01 -> e + h,  r = 11 -> e - h,  r = 00 (or unused 10) -> e.
// The adder is mod_addsub, which for Q = 2^M is exactly an M-bit adder fed
// with h XOR r[1] and carry-in r[1]; for other Q it adds a correction step.
// Purely combinational.
//
// The XOR/carry-in adder and output multiplexer follow the original unit; the
// general-Q reduction is this design's own.
module tpm1_au
  import ntru_pkg::*;
#(
  parameter int unsigned Q = Q_DEFAULT,
  parameter int unsigned M = $clog2(Q)
) (
  input  logic [M-1:0] e,
  input  logic [M-1:0] h,
  input  trit_t        r,
  output logic [M-1:0] s
);
  logic [M-1:0] sum;

  mod_addsub #(.Q(Q), .M(M)) u_add (.a(e), .b(h), .sub(r[1]), .s(sum));

  assign s = r[0] ? sum : e;
endmodule
