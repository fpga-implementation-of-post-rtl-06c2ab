// tpm4_au: one coefficient slice of the TPM-IV multiplier.
//
// The 3-bit code t (t4_t) covers a run of 0..4 zero coefficients of r and at
// most one nonzero coefficient after it. t[2:1] says how many zeros precede
// the nonzero one (01: two, 10: one, 11: none) or, when 00, that there is no
// addition at all (000: four zeros, 001: three zeros). t[0] is the sign.
//   e_next = e +- hx[s]  with s = 2, 1, 0 for t[2:1] = 01, 10, 11
//   e_next = e           for t[2:1] = 00
//   h_next = hx[d], d = 4, 3, 3, 2, 1 coefficients consumed.
// hx[s] is (x^s h)_k from the LFSR taps. Purely combinational.
//
// The operations per code follow the original TPM-IV unit; selecting among h
// taps instead of among e registers is this design's own.
module tpm4_au
  import ntru_pkg::*;
#(
  parameter int unsigned Q = Q_DEFAULT,
  parameter int unsigned M = $clog2(Q)
) (
  input  logic [M-1:0] e,
  input  logic [M-1:0] hx [5],
  input  t4_t          t,
  output logic [M-1:0] e_next,
  output logic [M-1:0] h_next
);
  logic [M-1:0] op, sum;

  always_comb begin
    unique case (t[2:1])
      2'b01:   op = hx[2];
      2'b10:   op = hx[1];
      default: op = hx[0];
    endcase
  end

  mod_addsub #(.Q(Q), .M(M)) u_add (.a(e), .b(op), .sub(t[0]), .s(sum));

  always_comb begin
    e_next = (t[2:1] == 2'b00) ? e : sum;
    unique case (t)
      T4_Z4:          h_next = hx[4];
      T4_Z3,
      T4_Z2P, T4_Z2N: h_next = hx[3];
      T4_Z1P, T4_Z1N: h_next = hx[2];
      default:        h_next = hx[1];
    endcase
  end
endmodule
