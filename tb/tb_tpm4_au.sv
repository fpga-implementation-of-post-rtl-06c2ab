// tb_tpm4_au: checks the TPM-IV slice for all eight codes against the code
// table: which power of x of h is added or subtracted (or nothing), and which
// power of x the h register advances by, for Q = 2048 and 2297.
module tb_tpm4_au;
  import ntru_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [10:0] e0, en0, hn0;
  logic [10:0] hx0 [5];
  logic [11:0] e1, en1, hn1;
  logic [11:0] hx1 [5];
  t4_t         t;

  tpm4_au #(.Q(2048)) u0 (.e(e0), .hx(hx0), .t(t), .e_next(en0), .h_next(hn0));
  tpm4_au #(.Q(2297)) u1 (.e(e1), .hx(hx1), .t(t), .e_next(en1), .h_next(hn1));

  function automatic int modp(int v, int q);
    v = v % q;
    return v < 0 ? v + q : v;
  endfunction

  // code -> (power of x added, sign, advance); power -1 = no add
  localparam int ADDP [8] = '{-1, -1, 2, 2, 1, 1, 0, 0};
  localparam int SGN  [8] = '{0, 0, 1, -1, 1, -1, 1, -1};
  localparam int ADV  [8] = '{4, 3, 3, 3, 2, 2, 1, 1};

  initial begin
    for (int i = 0; i < 4000; i++) begin
      int c;
      c = i % 8;
      t = t4_t'(c);
      e0 = 11'($urandom_range(2047));
      e1 = 12'($urandom_range(2296));
      for (int s = 0; s < 5; s++) begin
        hx0[s] = 11'($urandom_range(2047));
        hx1[s] = 12'($urandom_range(2296));
      end
      @(posedge clk);
      checks += 4;
      if (ADDP[c] < 0) begin
        if (en0 != e0) failures++;
        if (en1 != e1) failures++;
      end else begin
        if (int'(en0) != modp(int'(e0) + SGN[c] * int'(hx0[ADDP[c]]), 2048)) failures++;
        if (int'(en1) != modp(int'(e1) + SGN[c] * int'(hx1[ADDP[c]]), 2297)) failures++;
      end
      if (hn0 != hx0[ADV[c]]) failures++;
      if (hn1 != hx1[ADV[c]]) failures++;
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
