// tpm3_encoder: chooses the next TPM-III control code from the coefficients
// of r that have not been scanned yet.
//
// win[0] is the lowest unscanned coefficient, rem how many are left. When the
// next three are all zero (and at least three remain) the code is 10 and three
// coefficients are consumed; otherwise the code is that of win[0] itself
// (00, 01 or 11) and one is consumed. Purely combinational.
//
// The codes follow the original TPM-III recoding; the greedy grouping from the
// lowest coefficient and producing it in hardware are this design's choice.
module tpm3_encoder
  import ntru_pkg::*;
#(
  parameter int unsigned N  = N_DEFAULT,
  parameter int unsigned CW = $clog2(N + 1)
) (
  input  trit_t         win [3],
  input  logic [CW-1:0] rem,
  output t3_t           t,
  output logic [2:0]    step
);
  always_comb begin
    if (rem >= CW'(3) && !trit_nz(win[0]) && !trit_nz(win[1]) && !trit_nz(win[2])) begin
      t    = T3_ZERO3;
      step = 3'd3;
    end else begin
      if (!trit_nz(win[0]))     t = T3_ZERO;
      else if (trit_neg(win[0])) t = T3_NEG;
      else                       t = T3_POS;
      step = 3'd1;
    end
  end
endmodule
