// tb_ring_xmul: checks one LFSR step against the reference ring product
// a(x) * x in Z_q[x]/(x^n - x - 1), for n = 7, Q = 2297 and for the full size
// n = 401, Q = 2048, including the all-(Q-1) vector that exercises the
// modular wrap in the feedback tap.
module tb_ring_xmul;
  import ntru_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [11:0] a0 [7], y0 [7];
  logic [10:0] a1 [401], y1 [401];

  ring_xmul #(.N(7), .Q(2297)) u0 (.a(a0), .y(y0));
  ring_xmul u1 (.a(a1), .y(y1));

  initial begin
    int ai[], xi[], zi[], ei[];
    for (int it = 0; it < 60; it++) begin
      ai = new[7]; xi = new[7]; zi = new[7];
      foreach (ai[k]) begin
        ai[k] = (it == 0) ? 2296 : int'($urandom_range(2296));
        xi[k] = (k == 1) ? 1 : 0; zi[k] = 0;
        a0[k] = 12'(ai[k]);
      end
      ring_mul(7, 2297, ai, xi, zi, ei);
      @(posedge clk);
      foreach (ei[k]) begin
        checks++;
        if (int'(y0[k]) != ei[k]) failures++;
      end
      if (it < 6) begin
        ai = new[401]; xi = new[401]; zi = new[401];
        foreach (ai[k]) begin
          ai[k] = (it == 0) ? 2047 : int'($urandom_range(2047));
          xi[k] = (k == 1) ? 1 : 0; zi[k] = 0;
          a1[k] = 11'(ai[k]);
        end
        ring_mul(401, 2048, ai, xi, zi, ei);
        @(posedge clk);
        foreach (ei[k]) begin
          checks++;
          if (int'(y1[k]) != ei[k]) failures++;
        end
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
