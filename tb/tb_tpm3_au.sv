// tb_tpm3_au: checks the TPM-III slice for all four codes: e_next must be
// e, e+h, e or e-h (mod Q) and h_next the x or x^3 tap, for Q = 2048 and 2297.
module tb_tpm3_au;
  import ntru_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [10:0] e0, h0, x10, x30, en0, hn0;
  logic [11:0] e1, h1, x11, x31, en1, hn1;
  t3_t         t;

  tpm3_au #(.Q(2048)) u0 (.e(e0), .h(h0), .hx1(x10), .hx3(x30), .t(t), .e_next(en0), .h_next(hn0));
  tpm3_au #(.Q(2297)) u1 (.e(e1), .h(h1), .hx1(x11), .hx3(x31), .t(t), .e_next(en1), .h_next(hn1));

  function automatic int modp(int v, int q);
    v = v % q;
    return v < 0 ? v + q : v;
  endfunction

  function automatic int delta(t3_t c);
    return (c == T3_POS) ? 1 : (c == T3_NEG) ? -1 : 0;
  endfunction

  initial begin
    for (int i = 0; i < 4000; i++) begin
      t = t3_t'(i % 4);
      e0 = 11'($urandom_range(2047)); h0 = (i % 9 == 0) ? 11'd0 : 11'($urandom_range(2047));
      x10 = 11'($urandom_range(2047)); x30 = 11'($urandom_range(2047));
      e1 = 12'($urandom_range(2296)); h1 = (i % 9 == 0) ? 12'd2296 : 12'($urandom_range(2296));
      x11 = 12'($urandom_range(2296)); x31 = 12'($urandom_range(2296));
      @(posedge clk);
      checks += 4;
      if (int'(en0) != modp(int'(e0) + delta(t) * int'(h0), 2048)) failures++;
      if (int'(en1) != modp(int'(e1) + delta(t) * int'(h1), 2297)) failures++;
      if (hn0 != ((t == T3_ZERO3) ? x30 : x10)) failures++;
      if (hn1 != ((t == T3_ZERO3) ? x31 : x11)) failures++;
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
