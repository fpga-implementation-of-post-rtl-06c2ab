// tpm3: TPM-III truncated polynomial multiplier for NTRU Prime encryption,
// e(x) = h(x) r(x) + m(x) mod (q, x^n - x - 1), which consumes a run of three
// zero coefficients of r in one cycle.
//
// How it works: r(x) is recoded on the fly into 2-bit codes t_i by
// tpm3_encoder, lowest coefficient first: 10 for three zeros in a row,
// otherwise the coefficient's own code 00/01/11. One code is applied per
// cycle. The accumulators e_k (preloaded with m) add +-h_k for 01/11 and hold
// otherwise; the h register (x^j h after j coefficients) advances through one
// LFSR step, or three chained steps for code 10. The number of cycles u is the
// number of codes, so it depends on how the zeros of r are grouped
// (u <= N; at most ceil(N/3) + zero-free coefficients).
//
// Interface: start (while idle) loads h, r and msg; busy is high for u
// cycles; done pulses as busy falls and e then holds the result in natural
// coefficient order. rst_n is asynchronous, active low, and clears only the
// control state.
//
// Follows the original TPM-III: the code set and one code per cycle. This
// design's own: recoding in hardware, the shift on h, and the handshake.
module tpm3
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
  output logic [M-1:0] e   [N]
);
  localparam int unsigned CW = $clog2(N + 1);

  typedef enum logic {S_IDLE, S_RUN} state_t;

  state_t        state;
  logic [CW-1:0] rem, rem_nx;
  logic [M-1:0]  hreg [N];
  logic [M-1:0]  hx1  [N];
  logic [M-1:0]  hx2  [N];
  logic [M-1:0]  hx3  [N];
  logic [M-1:0]  e_nx [N];
  logic [M-1:0]  h_nx [N];
  trit_t         rreg [N];
  trit_t         r_nx [N];
  trit_t         win  [3];
  t3_t           t;
  logic [2:0]    step;

  function automatic logic [M-1:0] to_zq(trit_t x);
    if (!trit_nz(x))  return '0;
    else if (x[1])    return M'(Q - 1);
    else              return M'(1);
  endfunction

  assign win = '{rreg[0], rreg[1], rreg[2]};

  tpm3_encoder #(.N(N), .CW(CW)) u_enc (.win(win), .rem(rem), .t(t), .step(step));

  ring_xmul #(.N(N), .Q(Q), .M(M)) u_lfsr1 (.a(hreg), .y(hx1));
  ring_xmul #(.N(N), .Q(Q), .M(M)) u_lfsr2 (.a(hx1),  .y(hx2));
  ring_xmul #(.N(N), .Q(Q), .M(M)) u_lfsr3 (.a(hx2),  .y(hx3));

  for (genvar k = 0; k < int'(N); k++) begin : g_au
    tpm3_au #(.Q(Q), .M(M)) u_au (
      .e(e[k]), .h(hreg[k]), .hx1(hx1[k]), .hx3(hx3[k]), .t(t),
      .e_next(e_nx[k]), .h_next(h_nx[k]));
  end

  // r shifts down by the number of coefficients consumed, zeros enter on top
  always_comb begin
    for (int k = 0; k < int'(N); k++) begin
      if (step == 3'd3) r_nx[k] = (k + 3 < int'(N)) ? rreg[k+3] : TRIT_ZERO;
      else              r_nx[k] = (k + 1 < int'(N)) ? rreg[k+1] : TRIT_ZERO;
    end
    rem_nx = rem - CW'(step);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      rem   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_RUN;
          rem   <= CW'(N);
        end
        S_RUN: begin
          rem <= rem_nx;
          if (rem_nx == '0) begin
            state <= S_IDLE;
            done  <= 1'b1;
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
    end else if (state == S_RUN) begin
      for (int k = 0; k < int'(N); k++) begin
        e[k]    <= e_nx[k];
        hreg[k] <= h_nx[k];
        rreg[k] <= r_nx[k];
      end
    end
  end

  assign busy = (state == S_RUN);

  a_done_not_busy: assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);
  a_step_in_range: assert property (@(posedge clk) disable iff (!rst_n)
                                    busy |-> CW'(step) <= rem);
endmodule
