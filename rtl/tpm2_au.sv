// tpm2_au: arithmetic unit of the TPM-II (x^2-net) multiplier.
//
// Two consecutive coefficients of r are applied in the same cycle:
//   s = e + r_lo * h0 + r_hi * h1 mod Q,
// where r_lo = r_{2j} multiplies h0 = (x^{2j} h)_k and r_hi = r_{2j+1}
// multiplies h1 = (x^{2j+1} h)_k, the neighbouring LFSR tap. This gives the
// nine operations e, e+-h_k, e+-h_{k-1}, e+-h_k+-h_{k-1} of the x^2-net unit.
// Each term is 0, h or Q-h (a negation), and the three operands are summed
// by the modular carry-save adder mod_csa3. Purely combinational.
//
// The nine operations follow the original x^2-net unit; taking the second term
// from the next h tap instead of the next e register is this design's own.
module tpm2_au
  import ntru_pkg::*;
#(
  parameter int unsigned Q = Q_DEFAULT,
  parameter int unsigned M = $clog2(Q)
) (
  input  logic [M-1:0] e,
  input  logic [M-1:0] h0,
  input  logic [M-1:0] h1,
  input  trit_t        r_lo,
  input  trit_t        r_hi,
  output logic [M-1:0] s
);
  localparam logic [M:0] QW = (M+1)'(Q);

  function automatic logic [M:0] term(trit_t rc, logic [M-1:0] hv);
    if (!rc[0])     return '0;
    else if (rc[1]) return QW - {1'b0, hv};
    else            return {1'b0, hv};
  endfunction

  logic [M:0] b, c;

  always_comb begin
    b = term(r_lo, h0);
    c = term(r_hi, h1);
  end

  mod_csa3 #(.Q(Q), .M(M)) u_csa (.a(e), .b(b), .c(c), .s(s));
endmodule
