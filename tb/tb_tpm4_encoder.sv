// tb_tpm4_encoder: exhaustive check of the TPM-IV recoding step over every
// window of four coefficient codes and every remaining count 0..6: code,
// coefficients consumed, whether a cycle is needed, and the trailing-zero
// (phase) value when it is not.
module tb_tpm4_encoder;
  import ntru_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  trit_t      win [4];
  logic [8:0] rem;
  t4_t        t;
  logic [2:0] step;
  logic       valid;
  logic [1:0] phase;

  tpm4_encoder u_dut (.win(win), .rem(rem), .t(t), .step(step), .valid(valid), .phase(phase));

  initial begin
    for (int rm = 0; rm <= 6; rm++)
      for (int w = 0; w < 256; w++) begin
        int v [4];
        int ec, es, ev, ep, z;
        for (int k = 0; k < 4; k++) begin
          win[k] = (k < rm) ? trit_t'((w >> (2 * k)) & 3) : TRIT_ZERO;
          v[k] = tval(win[k]);
        end
        rem = 9'(rm);
        // leading zeros inside the remaining coefficients, at most 4
        z = 0;
        while (z < 4 && z < rm && v[z] == 0) z++;
        ev = 1; ep = 0; ec = 0; es = 0;
        if (rm == 0) ev = 0;
        else if (z == rm && z <= 2) begin ev = 0; ep = z; end      // tail of 1 or 2 zeros
        else if (z == 4) begin ec = 0; es = 4; end
        else if (z == 3) begin ec = 1; es = 3; end
        else begin
          // z zeros then a nonzero: t[2:1] = 3 - z, t[0] = sign
          ec = (z == 2) ? (v[z] < 0 ? 3 : 2) : (z == 1) ? (v[z] < 0 ? 5 : 4) : (v[z] < 0 ? 7 : 6);
          es = z + 1;
        end
        @(posedge clk);
        checks++;
        if (int'(valid) != ev) failures++;
        if (ev == 1) begin
          checks += 2;
          if (int'(t) != ec) begin
            failures++;
            if (failures < 5) $display("rem %0d w %h: t %b expected %0d", rm, w, t, ec);
          end
          if (int'(step) != es) failures++;
        end else begin
          checks++;
          if (int'(phase) != ep) failures++;
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
