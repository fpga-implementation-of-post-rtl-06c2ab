// tpm2: TPM-II, x^2-net truncated polynomial multiplier for NTRU Prime
// encryption, e(x) = h(x) r(x) + m(x) mod (q, x^n - x - 1).
//
// How it works: as TPM-I, but two consecutive coefficients r_{2j}, r_{2j+1}
// are scanned per cycle. The h register holds x^{2j} h(x); two chained LFSR
// steps give x^{2j+1} h and x^{2j+2} h. Each slice's tpm2_au adds
// r_{2j} (x^{2j} h)_k + r_{2j+1} (x^{2j+1} h)_k to e_k with a modular
// carry-save adder, and h advances by x^2. For odd N the missing coefficient
// r_N is taken as 0. An operation takes ceil(N/2) cycles (201 for N = 401).
//
// Interface: start (while idle) loads h, r and msg; busy is high for
// ceil(N/2) cycles; done pulses as busy falls and e then holds the result in
// natural coefficient order. rst_n is asynchronous, active low, and clears
// only the control state.
//
// Follows the original TPM-II: pairs of coefficients, r_N = 0 padding, cycle
// count. This design's own: the shift on h instead of on e, and the handshake.
module tpm2
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
  localparam int unsigned CW = $clog2(N + 2);

  typedef enum logic {S_IDLE, S_RUN} state_t;

  state_t        state;
  logic [CW-1:0] rem;
  logic [M-1:0]  hreg [N];
  logic [M-1:0]  hx1  [N];
  logic [M-1:0]  hx2  [N];
  logic [M-1:0]  e_nx [N];
  trit_t         rreg [N];

  function automatic logic [M-1:0] to_zq(trit_t t);
    if (!trit_nz(t))  return '0;
    else if (t[1])    return M'(Q - 1);
    else              return M'(1);
  endfunction

  ring_xmul #(.N(N), .Q(Q), .M(M)) u_lfsr1 (.a(hreg), .y(hx1));
  ring_xmul #(.N(N), .Q(Q), .M(M)) u_lfsr2 (.a(hx1),  .y(hx2));

  for (genvar k = 0; k < int'(N); k++) begin : g_au
    tpm2_au #(.Q(Q), .M(M)) u_au (
      .e(e[k]), .h0(hreg[k]), .h1(hx1[k]), .r_lo(rreg[0]), .r_hi(rreg[1]), .s(e_nx[k]));
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
          if (rem <= CW'(2)) begin
            rem   <= '0;
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            rem <= rem - CW'(2);
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
        hreg[k] <= hx2[k];
        rreg[k] <= (k + 2 < int'(N)) ? rreg[k+2] : TRIT_ZERO;
      end
    end
  end

  assign busy = (state == S_RUN);

  a_done_not_busy: assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);
endmodule
