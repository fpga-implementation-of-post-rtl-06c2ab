// tb_ntru_prime_tpm_top: end-to-end test of the four multipliers at full
// size (N = 401, Q = 2048, the ees401ep1 set), with the top's default
// parameters.
//
// Each operation draws h(x) uniformly, m(x) ternary and r(x) with a chosen
// number of +1 and -1 coefficients (113 of each as in ees401ep1, plus sparser
// and denser ones), starts all four multipliers together, and checks every
// result coefficient against a software model and every cycle count:
// TPM-I N, TPM-II ceil(N/2), TPM-III and TPM-IV the length of their recoding.
// It also checks that a start pulse while busy is ignored, and counts how
// often each mechanism occurred: the zero padding of the x^2-net for odd N,
// the TPM-III three-zero code, each of the eight TPM-IV codes, and TPM-IV
// operations ending with one and with two leftover zeros (no extra cycle).
// A mechanism that never occurs counts as a failure.
module tb_ntru_prime_tpm_top;
  import ntru_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 401;
  localparam int Q = 2048;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst_n;
  logic [3:0]  start, busy, done;
  logic [1:0]  phase4;
  logic [10:0] h [N];
  trit_t       r [N];
  trit_t       msg [N];
  logic [10:0] e1 [N], e2 [N], e3 [N], e4 [N];

  ntru_prime_tpm_top dut (.clk, .rst_n, .start, .h, .r, .msg, .busy, .done, .phase4, .e1, .e2, .e3, .e4);

  int checks = 0, failures = 0;
  int n_pad2 = 0, n_zero3 = 0, n_tail1 = 0, n_tail2 = 0, n_ignored = 0;
  int hist4 [8];

  // r with d coefficients +1 and d coefficients -1 at random positions
  task automatic make_r(int d, int tail);
    int pos;
    for (int k = 0; k < N; k++) r[k] = TRIT_ZERO;
    for (int s = 0; s < 2; s++)
      for (int c = 0; c < d; c++) begin
        do pos = int'($urandom_range(N - 1)); while (r[pos] != TRIT_ZERO);
        r[pos] = (s == 0) ? TRIT_POS : TRIT_NEG;
      end
    // force the last coefficients to leave a tail of `tail` zeros after a nonzero one
    if (tail > 0) begin
      for (int k = N - tail; k < N; k++) r[k] = TRIT_ZERO;
      r[N - tail - 1] = TRIT_POS;
    end
  endtask

  task automatic run_op(int d, int tail, bit poke_start);
    int hi[], ri[], mi[], ei[];
    int exp_cyc [4], cyc [4];
    int z3, tl, bad;
    hi = new[N]; ri = new[N]; mi = new[N];
    make_r(d, tail);
    for (int k = 0; k < N; k++) begin
      h[k] = 11'($urandom_range(Q - 1));
      msg[k] = rand_trit(67);
      hi[k] = int'(h[k]); ri[k] = tval(r[k]); mi[k] = tval(msg[k]);
    end
    ring_mul(N, Q, hi, ri, mi, ei);
    exp_cyc[0] = N;
    exp_cyc[1] = (N + 1) / 2;
    exp_cyc[2] = cycles3(ri, z3);
    exp_cyc[3] = cycles4(ri, hist4, tl);
    n_zero3 += z3;
    if (tl == 1) n_tail1++;
    if (tl == 2) n_tail2++;
    if (N % 2 == 1) n_pad2++;
    @(negedge clk); start = 4'hf;
    @(negedge clk); start = 4'h0;
    foreach (cyc[i]) cyc[i] = 0;
    while (busy != 4'h0) begin
      for (int i = 0; i < 4; i++) if (busy[i]) cyc[i]++;
      if (poke_start && cyc[0] == 100) begin
        // a second start while busy must be ignored
        start = 4'hf;
        for (int k = 0; k < N; k++) h[k] = '0;
        n_ignored++;
      end else start = 4'h0;
      @(negedge clk);
    end
    start = 4'h0;
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (cyc[i] != exp_cyc[i]) begin
        failures++;
        $display("TPM-%0d: %0d cycles, expected %0d", i + 1, cyc[i], exp_cyc[i]);
      end
    end
    checks++;
    if (int'(phase4) != tl) begin
      failures++;
      $display("TPM-IV phase %0d, expected %0d", phase4, tl);
    end
    $display("op d=%0d tail=%0d: cycles I %0d  II %0d  III %0d  IV %0d", d, tail,
             cyc[0], cyc[1], cyc[2], cyc[3]);
    bad = 0;
    for (int k = 0; k < N; k++) begin
      checks += 4;
      if (int'(e1[k]) != ei[k]) bad++;
      if (int'(e2[k]) != ei[k]) bad++;
      if (int'(e3[k]) != ei[k]) bad++;
      if (int'(e4[k]) != ei[k]) bad++;
    end
    if (bad != 0) $display("  %0d wrong result coefficients", bad);
    failures += bad;
  endtask

  initial begin
    foreach (hist4[i]) hist4[i] = 0;
    rst_n = 1'b0; start = 4'h0;
    for (int k = 0; k < N; k++) begin h[k] = '0; r[k] = TRIT_ZERO; msg[k] = TRIT_ZERO; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_op(113, 0, 1'b0);   // ees401ep1: d_r = 113
    run_op(113, 1, 1'b1);
    run_op(38, 2, 1'b0);    // sparse, ees659ep1 density of nonzeros
    run_op(38, 1, 1'b0);
    run_op(150, 2, 1'b0);   // dense
    $display("mechanisms: x2 padding %0d, three-zero codes %0d, tail1 %0d, tail2 %0d, ignored starts %0d",
             n_pad2, n_zero3, n_tail1, n_tail2, n_ignored);
    $display("TPM-IV codes 000..111: %0d %0d %0d %0d %0d %0d %0d %0d",
             hist4[0], hist4[1], hist4[2], hist4[3], hist4[4], hist4[5], hist4[6], hist4[7]);
    checks += 13;
    if (n_pad2 == 0) failures++;
    if (n_zero3 == 0) failures++;
    if (n_tail1 == 0) failures++;
    if (n_tail2 == 0) failures++;
    if (n_ignored == 0) failures++;
    foreach (hist4[i]) if (hist4[i] == 0) begin
      failures++;
      $display("TPM-IV code %0d never used", i);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
