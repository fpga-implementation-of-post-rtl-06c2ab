// ring_xmul: one step of the linear feedback shift register that multiplies a
// polynomial by x in Z_q[x]/(x^N - x - 1).
//
// Since x^N = x + 1, the top coefficient a_{N-1} leaves the register and is fed
// back into positions 0 and 1:
//   y_0 = a_{N-1},  y_1 = a_0 + a_{N-1} mod Q,  y_k = a_{k-1} (k >= 2).
// This is the Fibonacci/Galois LFSR of characteristic polynomial x^N - x - 1
// with M-bit cells and one modular adder at the tap. Chaining k instances
// gives x^k * a. Purely combinational; the register is in the multiplier.
//
// The LFSR for x^n - x - 1 follows the original architecture; applying it to h
// rather than to the accumulators is this design's own choice.
module ring_xmul #(
  parameter int unsigned N = ntru_pkg::N_DEFAULT,
  parameter int unsigned Q = ntru_pkg::Q_DEFAULT,
  parameter int unsigned M = $clog2(Q)
) (
  input  logic [M-1:0] a [N],
  output logic [M-1:0] y [N]
);
  logic [M-1:0] tap;

  mod_addsub #(.Q(Q), .M(M)) u_tap (.a(a[0]), .b(a[N-1]), .sub(1'b0), .s(tap));

  always_comb begin
    y[0] = a[N-1];
    y[1] = tap;
    for (int k = 2; k < int'(N); k++) y[k] = a[k-1];
  end
endmodule
