// tpm_env: self-checking environment for one multiplier (KIND = 1..4 selects
// TPM-I..IV) at sizes N, Q. It runs NTESTS operations with directed and
// random r(x) (all zero, all +1, all -1, zero runs of every length, random
// densities, tails of one and two zeros), random h(x) including 0 and Q-1,
// and random m(x). For each it compares e with tb_ref_pkg::ring_mul and the
// number of busy cycles with the expected count (N, ceil(N/2), or the
// TPM-III/IV code count), checks that done is a single-cycle pulse and, for
// TPM-IV, the reported count of leftover trailing zeros.
// It reports through checks/failures and raises finished at the end.
module tpm_env
  import ntru_pkg::*;
  import tb_ref_pkg::*;
#(
  parameter int          KIND   = 1,
  parameter int unsigned N      = 37,
  parameter int unsigned Q      = 2048,
  parameter int          NTESTS = 24
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output int   n_zero3,     // TPM-III three-zero codes seen
  output int   hist4 [8],   // TPM-IV codes seen
  output int   tails4 [3],  // TPM-IV operations ending with 0/1/2 trailing zeros left
  output logic finished
);
  localparam int unsigned M = $clog2(Q);

  logic         rst_n, start, busy, done;
  logic [1:0]   phase;
  logic [M-1:0] h [N];
  logic [M-1:0] e [N];
  trit_t        r [N];
  trit_t        msg [N];

  if (KIND == 1) begin : g_dut
    tpm1 #(.N(N), .Q(Q)) dut (.clk, .rst_n, .start, .h, .r, .msg, .busy, .done, .e);
  end else if (KIND == 2) begin : g_dut
    tpm2 #(.N(N), .Q(Q)) dut (.clk, .rst_n, .start, .h, .r, .msg, .busy, .done, .e);
  end else if (KIND == 3) begin : g_dut
    tpm3 #(.N(N), .Q(Q)) dut (.clk, .rst_n, .start, .h, .r, .msg, .busy, .done, .e);
  end else begin : g_dut
    tpm4 #(.N(N), .Q(Q)) dut (.clk, .rst_n, .start, .h, .r, .msg, .busy, .done, .phase, .e);
  end

  task automatic make_r(int test);
    int pat = test % 12;
    for (int k = 0; k < int'(N); k++) begin
      case (pat)
        0:  r[k] = TRIT_ZERO;
        1:  r[k] = TRIT_POS;
        2:  r[k] = TRIT_NEG;
        3:  r[k] = (k % 5 == 4) ? TRIT_NEG : TRIT_ZERO;     // runs of four zeros
        4:  r[k] = (k % 4 == 3) ? TRIT_POS : TRIT_ZERO;     // runs of three zeros
        5:  r[k] = (k % 3 == 2) ? TRIT_NEG : TRIT_ZERO;     // runs of two zeros
        6:  r[k] = (k % 2 == 1) ? TRIT_POS : TRIT_ZERO;     // runs of one zero
        7:  r[k] = rand_trit(10);
        8:  r[k] = rand_trit(30);
        9:  r[k] = rand_trit(56);
        10: r[k] = rand_trit(90);
        default: r[k] = rand_trit(45);
      endcase
      // the unused code 2'b10 must act as zero
      if (pat == 11 && r[k] == TRIT_ZERO && $urandom_range(1) == 1) r[k] = TRIT_RSV;
    end
    // make tails of exactly one and two zeros happen
    if (test % 3 == 1) begin r[N-1] = TRIT_ZERO; r[N-2] = TRIT_POS; end
    if (test % 3 == 2) begin r[N-1] = TRIT_ZERO; r[N-2] = TRIT_ZERO; r[N-3] = TRIT_NEG; end
  endtask

  initial begin
    int hi[], ri[], mi[], ei[];
    int expect_cyc, cyc, z3, tail, dpulse;
    checks = 0; failures = 0; n_zero3 = 0; finished = 1'b0;
    foreach (hist4[i]) hist4[i] = 0;
    foreach (tails4[i]) tails4[i] = 0;
    rst_n = 1'b0; start = 1'b0;
    for (int k = 0; k < int'(N); k++) begin h[k] = '0; r[k] = TRIT_ZERO; msg[k] = TRIT_ZERO; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    hi = new[N]; ri = new[N]; mi = new[N];
    for (int test = 0; test < NTESTS; test++) begin
      make_r(test);
      for (int k = 0; k < int'(N); k++) begin
        case ($urandom_range(7))
          0:       h[k] = M'(Q - 1);
          1:       h[k] = '0;
          default: h[k] = M'($urandom_range(Q - 1));
        endcase
        msg[k] = rand_trit(60);
        hi[k] = int'(h[k]); ri[k] = tval(r[k]); mi[k] = tval(msg[k]);
      end
      ring_mul(N, Q, hi, ri, mi, ei);
      case (KIND)
        1: expect_cyc = N;
        2: expect_cyc = (N + 1) / 2;
        3: begin expect_cyc = cycles3(ri, z3); n_zero3 += z3; end
        default: begin expect_cyc = cycles4(ri, hist4, tail); tails4[tail]++; end
      endcase
      // launch
      @(negedge clk); start = 1'b1;
      @(negedge clk); start = 1'b0;
      // scramble operands while busy: they must not matter after the load
      for (int k = 0; k < int'(N); k++) begin h[k] = ~h[k]; r[k] = TRIT_POS; end
      cyc = 0; dpulse = 0;
      while (busy && cyc < 4 * int'(N)) begin
        cyc++;
        @(negedge clk);
      end
      dpulse = int'(done);
      @(negedge clk);
      checks++;
      if (cyc != expect_cyc) begin
        failures++;
        $display("KIND %0d N %0d Q %0d test %0d: %0d busy cycles, expected %0d", KIND, N, Q, test, cyc, expect_cyc);
      end
      if (KIND == 4) begin
        checks++;
        if (int'(phase) != tail) begin
          failures++;
          $display("KIND 4 test %0d: phase %0d, expected %0d", test, phase, tail);
        end
      end
      checks++;
      if (dpulse != 1 || done) begin
        failures++;
        $display("KIND %0d test %0d: done pulse wrong (%0d then %0d)", KIND, test, dpulse, done);
      end
      begin
        automatic int bad = 0;
        for (int k = 0; k < int'(N); k++) begin
          checks++;
          if (int'(e[k]) != ei[k]) begin
            failures++;
            if (bad++ < 4) $display("KIND %0d N %0d Q %0d test %0d: e[%0d] = %0d, expected %0d",
                                    KIND, N, Q, test, k, e[k], ei[k]);
          end
        end
      end
    end
    finished = 1'b1;
  end
endmodule
