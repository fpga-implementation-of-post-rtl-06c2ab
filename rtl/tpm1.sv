// tpm1: TPM-I, LFSR-based truncated polynomial multiplier for NTRU Prime
// encryption, e(x) = h(x) r(x) + m(x) mod (q, x^n - x - 1).
//
// How it works: N accumulator registers e_k are loaded with m(x) (ternary,
// mapped to 0, 1 or Q-1) and N registers hold h(x). In each of N cycles one
// coefficient r_j of r(x) is scanned, lowest first, and every slice adds
// r_j * h_k to e_k through its tpm1_au. At the same time the h registers take
// one LFSR step (ring_xmul), so in cycle j they hold x^j h(x) reduced modulo
// x^n - x - 1; after N cycles e = m + sum_j r_j x^j h = m + h r.
// The accumulators stay in place and the shifting is done on h; this is what
// makes the preload with m valid in a ring where x^n != 1.
//
// Interface: start (while idle) loads h, r and msg. busy is high for exactly
// N cycles; done pulses for one cycle as busy falls, and e then holds the
// result, in natural coefficient order, until the next start. With the load
// cycle an operation takes N + 1 cycles. rst_n is asynchronous, active low,
// and clears only the control state.
//
// Follows the original TPM-I: scan order, arithmetic unit, N + 1 cycles.
// This design's own: the shift on h instead of on e, and the handshake.
module tpm1
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
  logic [CW-1:0] rem;
  logic [M-1:0]  hreg [N];
  logic [M-1:0]  hx1  [N];
  logic [M-1:0]  e_nx [N];
  trit_t         rreg [N];

  function automatic logic [M-1:0] to_zq(trit_t t);
    if (!trit_nz(t))  return '0;
    else if (t[1])    return M'(Q - 1);
    else              return M'(1);
  endfunction

  ring_xmul #(.N(N), .Q(Q), .M(M)) u_lfsr (.a(hreg), .y(hx1));

  for (genvar k = 0; k < int'(N); k++) begin : g_au
    tpm1_au #(.Q(Q), .M(M)) u_au (.e(e[k]), .h(hreg[k]), .r(rreg[0]), .s(e_nx[k]));
  end

  // control
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
          rem <= rem - CW'(1);
          if (rem == CW'(1)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
      endcase
    end
  end

  // datapath
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
        hreg[k] <= hx1[k];
        rreg[k] <= (k + 1 < int'(N)) ? rreg[k+1] : TRIT_ZERO;
      end
    end
  end

  assign busy = (state == S_RUN);

  a_done_not_busy: assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);
endmodule
