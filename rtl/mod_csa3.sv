// mod_csa3: modular three-operand adder, s = (a + b + c) mod Q.
//
// Used by the TPM-II arithmetic unit, which adds the accumulator and two
// signed h terms in one cycle. A carry-save layer (one full adder per bit)
// first compresses the three operands into a sum word and a carry word, a
// single carry-propagate adder then combines them, and the result (below 3Q)
// is brought into [0, Q) by subtracting 0, Q or 2Q. For Q a power of two the
// reduction is only the truncation to M bits.
// Operand ranges: a in [0, Q); b and c in [0, Q] (Q itself stands for the
// negation of zero). Purely combinational.
//
// The carry-save layer followed by one adder follows the original TPM-II unit;
// the reduction by 0, Q or 2Q for a general Q is this design's own.
module mod_csa3 #(
  parameter int unsigned Q = ntru_pkg::Q_DEFAULT,
  parameter int unsigned M = $clog2(Q)
) (
  input  logic [M-1:0] a,
  input  logic [M:0]   b,
  input  logic [M:0]   c,
  output logic [M-1:0] s
);
  localparam int unsigned W = M + 3;
  localparam logic [W-1:0] Q1 = W'(Q);
  localparam logic [W-1:0] Q2 = W'(2 * Q);

  logic [W-1:0] aw, bw, cw, ps, pc, sum;

  always_comb begin
    aw  = W'(a);
    bw  = W'(b);
    cw  = W'(c);
    // carry-save layer: per-bit full adders
    ps  = aw ^ bw ^ cw;
    pc  = ((aw & bw) | (aw & cw) | (bw & cw)) << 1;
    // carry-propagate adder
    sum = ps + pc;
    // modular correction
    if (sum >= Q2)      sum = sum - Q2;
    else if (sum >= Q1) sum = sum - Q1;
    s = sum[M-1:0];
  end
endmodule
