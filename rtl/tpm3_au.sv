// tpm3_au: one coefficient slice of the TPM-III multiplier.
//
// The control code t (t3_t) stands for one coefficient of r (00 = 0,
// 01 = +1, 11 = -1) or for a run of three zero coefficients (10):
//   e_next = e + h (01), e - h (11), e (00 and 10);
//   h_next = (x^3 h)_k for 10, (x h)_k otherwise.
// The accumulator e_k stays in place while h is advanced through the
// x^n - x - 1 LFSR by as many powers of x as coefficients were consumed, so
// the three-zero code costs a single cycle. Purely combinational.
//
// The operations per code follow the original TPM-III unit; selecting among h
// taps instead of among e registers is this design's own.
module tpm3_au
  import ntru_pkg::*;
#(
  parameter int unsigned Q = Q_DEFAULT,
  parameter int unsigned M = $clog2(Q)
) (
  input  logic [M-1:0] e,
  input  logic [M-1:0] h,
  input  logic [M-1:0] hx1,
  input  logic [M-1:0] hx3,
  input  t3_t          t,
  output logic [M-1:0] e_next,
  output logic [M-1:0] h_next
);
  logic [M-1:0] sum;

  mod_addsub #(.Q(Q), .M(M)) u_add (.a(e), .b(h), .sub(t[1]), .s(sum));

  always_comb begin
    unique case (t)
      T3_POS, T3_NEG: e_next = sum;
      default:        e_next = e;
    endcase
    h_next = (t == T3_ZERO3) ? hx3 : hx1;
  end
endmodule
