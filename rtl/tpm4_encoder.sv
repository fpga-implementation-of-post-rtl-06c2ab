// tpm4_encoder: chooses the next TPM-IV control code from the coefficients of
// r that have not been scanned yet.
//
// win[0..3] are the four lowest unscanned coefficients, rem how many are left.
// In priority order:
//   nonzero win[0]                     -> 11s, 1 consumed
//   0, nonzero                         -> 10s, 2 consumed
//   0, 0, nonzero                      -> 01s, 3 consumed
//   0, 0, 0, then nonzero or the end   -> 001, 3 consumed
//   0, 0, 0, 0                         -> 000, 4 consumed
// (s = sign of the nonzero coefficient). A tail of only one or two zeros needs
// no cycle: valid goes low and phase reports the length of that tail (the
// "phase-shift value"). valid is also low when nothing is left. Purely
// combinational.
//
// The codes and the tail rule follow the original TPM-IV recoding; producing
// them in hardware is this design's choice.
module tpm4_encoder
  import ntru_pkg::*;
#(
  parameter int unsigned N  = N_DEFAULT,
  parameter int unsigned CW = $clog2(N + 1)
) (
  input  trit_t         win [4],
  input  logic [CW-1:0] rem,
  output t4_t           t,
  output logic [2:0]    step,
  output logic          valid,
  output logic [1:0]    phase
);
  always_comb begin
    t     = T4_Z4;
    step  = 3'd0;
    valid = 1'b1;
    phase = 2'd0;
    if (rem == '0) begin
      valid = 1'b0;
    end else if (trit_nz(win[0])) begin
      t    = trit_neg(win[0]) ? T4_Z0N : T4_Z0P;
      step = 3'd1;
    end else if (rem == CW'(1)) begin
      valid = 1'b0;
      phase = 2'd1;
    end else if (trit_nz(win[1])) begin
      t    = trit_neg(win[1]) ? T4_Z1N : T4_Z1P;
      step = 3'd2;
    end else if (rem == CW'(2)) begin
      valid = 1'b0;
      phase = 2'd2;
    end else if (trit_nz(win[2])) begin
      t    = trit_neg(win[2]) ? T4_Z2N : T4_Z2P;
      step = 3'd3;
    end else if (rem == CW'(3) || trit_nz(win[3])) begin
      t    = T4_Z3;
      step = 3'd3;
    end else begin
      t    = T4_Z4;
      step = 3'd4;
    end
  end
endmodule
