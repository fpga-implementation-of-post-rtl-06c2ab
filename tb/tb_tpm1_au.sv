// tb_tpm1_au: checks the TPM-I arithmetic unit for Q = 2048 and the prime
// Q = 2297 against integer arithmetic, for all four control codes and random
// and extreme operands.
module tb_tpm1_au;
  import ntru_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [10:0] e0, h0, s0;
  logic [11:0] e1, h1, s1;
  trit_t       r;

  tpm1_au #(.Q(2048)) u0 (.e(e0), .h(h0), .r(r), .s(s0));
  tpm1_au #(.Q(2297)) u1 (.e(e1), .h(h1), .r(r), .s(s1));

  function automatic int modp(int v, int q);
    v = v % q;
    return v < 0 ? v + q : v;
  endfunction

  initial begin
    for (int i = 0; i < 4000; i++) begin
      r  = trit_t'(i % 4);
      e0 = (i % 17 == 0) ? 11'd2047 : 11'($urandom_range(2047));
      h0 = (i % 13 == 0) ? 11'd2047 : (i % 11 == 0) ? 11'd0 : 11'($urandom_range(2047));
      e1 = (i % 17 == 0) ? 12'd2296 : 12'($urandom_range(2296));
      h1 = (i % 13 == 0) ? 12'd2296 : (i % 11 == 0) ? 12'd0 : 12'($urandom_range(2296));
      @(posedge clk);
      checks += 2;
      if (int'(s0) != modp(int'(e0) + tval(r) * int'(h0), 2048)) begin
        failures++;
        if (failures < 5) $display("Q=2048 r=%b e=%0d h=%0d s=%0d", r, e0, h0, s0);
      end
      if (int'(s1) != modp(int'(e1) + tval(r) * int'(h1), 2297)) begin
        failures++;
        if (failures < 5) $display("Q=2297 r=%b e=%0d h=%0d s=%0d", r, e1, h1, s1);
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
