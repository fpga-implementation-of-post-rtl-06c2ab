// mod_addsub: (a + b) mod Q or (a - b) mod Q for a, b in [0, Q).
//
// Subtraction adds Q - b, so both cases become one addition of two values
// below 2Q followed by one conditional subtraction of Q. When Q is a power of
// two, Q - b is the two's complement of b and the conditional subtraction is
// just the dropped carry, which is the plain m-bit adder with inverted operand
// and carry-in used by the TPM-I arithmetic unit. Any other Q (for example a
// prime q of NTRU Prime) is reduced correctly as well. Purely combinational.
//
// The inverted-operand adder follows the original TPM-I arithmetic unit; the
// comparison against Q, which makes a prime Q work too, is this design's own.
module mod_addsub #(
  parameter int unsigned Q = ntru_pkg::Q_DEFAULT,
  parameter int unsigned M = $clog2(Q)
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic         sub,
  output logic [M-1:0] s
);
  localparam logic [M:0] QW = (M+1)'(Q);

  logic [M:0] bb, sum;

  always_comb begin
    bb  = sub ? QW - {1'b0, b} : {1'b0, b};
    sum = {1'b0, a} + bb;
    if (sum >= QW) sum = sum - QW;
    s   = sum[M-1:0];
  end
endmodule
