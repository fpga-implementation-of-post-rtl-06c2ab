// tb_tpm2_au: checks the TPM-II arithmetic unit, e + r_lo*h0 + r_hi*h1 mod Q,
// for all 16 control combinations (including the unused code 10), random and
// extreme operands, with Q = 2048 and the prime Q = 2297.
module tb_tpm2_au;
  import ntru_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [10:0] e0, a0, b0, s0;
  logic [11:0] e1, a1, b1, s1;
  trit_t       rl, rh;

  tpm2_au #(.Q(2048)) u0 (.e(e0), .h0(a0), .h1(b0), .r_lo(rl), .r_hi(rh), .s(s0));
  tpm2_au #(.Q(2297)) u1 (.e(e1), .h0(a1), .h1(b1), .r_lo(rl), .r_hi(rh), .s(s1));

  function automatic int modp(int v, int q);
    v = v % q;
    return v < 0 ? v + q : v;
  endfunction

  function automatic logic [11:0] pick(int i, int q);
    case (i % 7)
      0: return 12'(q - 1);
      1: return 12'd0;
      default: return 12'($urandom_range(q - 1));
    endcase
  endfunction

  initial begin
    for (int i = 0; i < 6400; i++) begin
      rl = trit_t'(i % 4);
      rh = trit_t'((i / 4) % 4);
      e0 = 11'(pick(i, 2048)); a0 = 11'(pick(i / 3, 2048)); b0 = 11'(pick(i / 5, 2048));
      e1 = pick(i, 2297);      a1 = pick(i / 3, 2297);      b1 = pick(i / 5, 2297);
      @(posedge clk);
      checks += 2;
      if (int'(s0) != modp(int'(e0) + tval(rl) * int'(a0) + tval(rh) * int'(b0), 2048)) begin
        failures++;
        if (failures < 5) $display("Q=2048 %b %b e=%0d a=%0d b=%0d s=%0d", rl, rh, e0, a0, b0, s0);
      end
      if (int'(s1) != modp(int'(e1) + tval(rl) * int'(a1) + tval(rh) * int'(b1), 2297)) begin
        failures++;
        if (failures < 5) $display("Q=2297 %b %b e=%0d a=%0d b=%0d s=%0d", rl, rh, e1, a1, b1, s1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
