// wl_env: runs one NTRU parameter set through all four multipliers of the
// top, at length N with q = 2048, using r(x) with DR coefficients +1 and DR
// coefficients -1 (the d_r of the set). It runs NOPS operations, checks every
// result against the software model and every cycle count, and reports the
// average TPM-III and TPM-IV cycle counts so they can be set beside the
// published averages.
module wl_env
  import ntru_pkg::*;
  import tb_ref_pkg::*;
#(
  parameter int N    = 401,
  parameter int DR   = 113,
  parameter int NOPS = 3
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic finished
);
  localparam int Q = 2048;

  logic        rst_n;
  logic [3:0]  start, busy, done;
  logic [10:0] h [N];
  trit_t       r [N];
  trit_t       msg [N];
  logic [10:0] e1 [N], e2 [N], e3 [N], e4 [N];

  ntru_prime_tpm_top #(.N(N), .Q(Q)) dut (
    .clk, .rst_n, .start, .h, .r, .msg, .busy, .done, .phase4(), .e1, .e2, .e3, .e4);

  initial begin
    int hi[], ri[], mi[], ei[];
    int exp_cyc [4], cyc [4], sum3, sum4, z3, tl, pos, bad;
    int hist [8];
    checks = 0; failures = 0; finished = 1'b0; sum3 = 0; sum4 = 0;
    foreach (hist[i]) hist[i] = 0;
    rst_n = 1'b0; start = 4'h0;
    for (int k = 0; k < N; k++) begin h[k] = '0; r[k] = TRIT_ZERO; msg[k] = TRIT_ZERO; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    hi = new[N]; ri = new[N]; mi = new[N];
    for (int op = 0; op < NOPS; op++) begin
      for (int k = 0; k < N; k++) r[k] = TRIT_ZERO;
      for (int s = 0; s < 2; s++)
        for (int c = 0; c < DR; c++) begin
          do pos = int'($urandom_range(N - 1)); while (r[pos] != TRIT_ZERO);
          r[pos] = (s == 0) ? TRIT_POS : TRIT_NEG;
        end
      for (int k = 0; k < N; k++) begin
        h[k] = 11'($urandom_range(Q - 1));
        msg[k] = rand_trit(67);
        hi[k] = int'(h[k]); ri[k] = tval(r[k]); mi[k] = tval(msg[k]);
      end
      ring_mul(N, Q, hi, ri, mi, ei);
      exp_cyc[0] = N;
      exp_cyc[1] = (N + 1) / 2;
      exp_cyc[2] = cycles3(ri, z3);
      exp_cyc[3] = cycles4(ri, hist, tl);
      @(negedge clk); start = 4'hf;
      @(negedge clk); start = 4'h0;
      foreach (cyc[i]) cyc[i] = 0;
      while (busy != 4'h0) begin
        for (int i = 0; i < 4; i++) if (busy[i]) cyc[i]++;
        @(negedge clk);
      end
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (cyc[i] != exp_cyc[i]) failures++;
      end
      sum3 += cyc[2];
      sum4 += cyc[3];
      bad = 0;
      for (int k = 0; k < N; k++) begin
        checks += 4;
        if (int'(e1[k]) != ei[k]) bad++;
        if (int'(e2[k]) != ei[k]) bad++;
        if (int'(e3[k]) != ei[k]) bad++;
        if (int'(e4[k]) != ei[k]) bad++;
      end
      failures += bad;
    end
    $display("n=%0d d_r=%0d: TPM-I %0d (+1 load), TPM-II %0d, TPM-III avg %0d, TPM-IV avg %0d cycles",
             N, DR, N, (N + 1) / 2, sum3 / NOPS, sum4 / NOPS);
    finished = 1'b1;
  end
endmodule
