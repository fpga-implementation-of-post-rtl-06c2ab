// tpm4: TPM-IV truncated polynomial multiplier for NTRU Prime encryption,
// e(x) = h(x) r(x) + m(x) mod (q, x^n - x - 1), which consumes a run of up to
// four zeros, or up to two zeros and the nonzero coefficient after them, in
// one cycle.
//
// How it works: tpm4_encoder recodes r(x) on the fly into 3-bit codes t_i
// (see tpm4_au for their meaning), lowest coefficient first. One code is
// applied per cycle: each accumulator e_k (preloaded with m) adds +-(x^s h)_k,
// s = 0..2 zeros skipped before the nonzero coefficient, or nothing; and the
// h register advances by x^d, d = 1..4 coefficients consumed, using four
// chained LFSR steps. A tail of only one or two zero coefficients costs no
// cycle (the "phase-shift" case of the original recoding); since the accumulators never
// rotate here, the result is always in natural order whatever that tail is.
// The cycle count u depends on r.
//
// Interface: start (while idle) loads h, r and msg; busy is high for u
// cycles; done pulses as busy falls and e then holds the result. phase then
// gives the number of trailing zero coefficients (0, 1 or 2) that were left
// over without a cycle; it is status only, e needs no reordering. rst_n is
// asynchronous, active low, and clears only the control state. N must be at
// least 3 so that a nonempty r always needs a first cycle.
//
// Follows the original TPM-IV: the eight codes, the free tail of one or two
// zeros. This design's own: recoding in hardware, the shift on h, the
// handshake, and the 001 code for a tail of exactly three zeros.
module tpm4
  import ntru_pkg::*;
#(
  parameter int unsigned N = N_DEFAULT,
  parameter int unsigned Q = Q_DEFAULT,
  parameter int unsigned M = $clog2(Q)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] h   [N],
  input  trit_t        r   [N],
  input  trit_t        msg [N],
  output logic         busy,
  output logic         done,
  output logic [1:0]   phase,
  output logic [M-1:0] e   [N]
);
  localparam int unsigned CW = $clog2(N + 1);

  typedef enum logic {S_IDLE, S_RUN} state_t;

  state_t        state;
  logic [CW-1:0] rem, rem_nx;
  logic [M-1:0]  hreg [N];
  logic [M-1:0]  hx1  [N];      // hxS = x^S * hreg
  logic [M-1:0]  hx2  [N];
  logic [M-1:0]  hx3  [N];
  logic [M-1:0]  hx4  [N];
  logic [M-1:0]  e_nx [N];
  logic [M-1:0]  h_nx [N];
  trit_t         rreg [N];
  trit_t         r_nx [N];
  trit_t         win    [4];
  trit_t         win_nx [4];
  t4_t           t;
  logic [2:0]    step;
  logic          valid, valid_nx;
  logic [1:0]    phase_nx;

  function automatic logic [M-1:0] to_zq(trit_t x);
    if (!trit_nz(x))  return '0;
    else if (x[1])    return M'(Q - 1);
    else              return M'(1);
  endfunction

  assign win    = '{rreg[0], rreg[1], rreg[2], rreg[3]};
  assign win_nx = '{r_nx[0], r_nx[1], r_nx[2], r_nx[3]};

  // code for this cycle
  tpm4_encoder #(.N(N), .CW(CW)) u_enc (
    .win(win), .rem(rem), .t(t), .step(step), .valid(valid), .phase());
  // look-ahead: does anything remain after this cycle?
  tpm4_encoder #(.N(N), .CW(CW)) u_enc_nx (
    .win(win_nx), .rem(rem_nx), .t(), .step(), .valid(valid_nx), .phase(phase_nx));

  ring_xmul #(.N(N), .Q(Q), .M(M)) u_lfsr1 (.a(hreg), .y(hx1));
  ring_xmul #(.N(N), .Q(Q), .M(M)) u_lfsr2 (.a(hx1),  .y(hx2));
  ring_xmul #(.N(N), .Q(Q), .M(M)) u_lfsr3 (.a(hx2),  .y(hx3));
  ring_xmul #(.N(N), .Q(Q), .M(M)) u_lfsr4 (.a(hx3),  .y(hx4));

  for (genvar k = 0; k < int'(N); k++) begin : g_au
    logic [M-1:0] taps [5];
    assign taps = '{hreg[k], hx1[k], hx2[k], hx3[k], hx4[k]};
    tpm4_au #(.Q(Q), .M(M)) u_au (
      .e(e[k]), .hx(taps), .t(t), .e_next(e_nx[k]), .h_next(h_nx[k]));
  end

  always_comb begin
    for (int k = 0; k < int'(N); k++) begin
      unique case (step)
        3'd1:    r_nx[k] = (k + 1 < int'(N)) ? rreg[k+1] : TRIT_ZERO;
        3'd2:    r_nx[k] = (k + 2 < int'(N)) ? rreg[k+2] : TRIT_ZERO;
        3'd3:    r_nx[k] = (k + 3 < int'(N)) ? rreg[k+3] : TRIT_ZERO;
        3'd4:    r_nx[k] = (k + 4 < int'(N)) ? rreg[k+4] : TRIT_ZERO;
        default: r_nx[k] = rreg[k];
      endcase
    end
    rem_nx = rem - CW'(step);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      rem   <= '0;
      done  <= 1'b0;
      phase <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_RUN;
          rem   <= CW'(N);
        end
        S_RUN: begin
          rem <= rem_nx;
          if (!valid || !valid_nx) begin
            state <= S_IDLE;
            done  <= 1'b1;
            phase <= phase_nx;
          end
        end
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state == S_IDLE && start) begin
      for (int k = 0; k < int'(N); k++) begin
        e[k]    <= to_zq(msg[k]);
        hreg[k] <= h[k];
        rreg[k] <= r[k];
      end
    end else if (state == S_RUN && valid) begin
      for (int k = 0; k < int'(N); k++) begin
        e[k]    <= e_nx[k];
        hreg[k] <= h_nx[k];
        rreg[k] <= r_nx[k];
      end
    end
  end

  assign busy = (state == S_RUN);

  a_done_not_busy: assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);
  a_first_valid:   assert property (@(posedge clk) disable iff (!rst_n)
                                    busy |-> valid && CW'(step) <= rem);
endmodule
