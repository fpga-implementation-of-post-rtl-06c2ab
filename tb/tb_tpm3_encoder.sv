// tb_tpm3_encoder: exhaustive check of the TPM-III recoding step over every
// window of three coefficient codes (all four 2-bit codes each) and every
// count of remaining coefficients 1..5.
module tb_tpm3_encoder;
  import ntru_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  trit_t      win [3];
  logic [8:0] rem;
  t3_t        t;
  logic [2:0] step;

  tpm3_encoder u_dut (.win(win), .rem(rem), .t(t), .step(step));

  initial begin
    for (int rm = 1; rm <= 5; rm++)
      for (int w = 0; w < 64; w++) begin
        int v [3];
        t3_t et;
        int  es;
        for (int k = 0; k < 3; k++) begin
          // coefficients past the end are zero, as in the multiplier's r register
          win[k] = (k < rm) ? trit_t'((w >> (2 * k)) & 3) : TRIT_ZERO;
          v[k] = tval(win[k]);
        end
        rem = 9'(rm);
        if (rm >= 3 && v[0] == 0 && v[1] == 0 && v[2] == 0) begin
          et = T3_ZERO3; es = 3;
        end else begin
          et = (v[0] > 0) ? T3_POS : (v[0] < 0) ? T3_NEG : T3_ZERO; es = 1;
        end
        @(posedge clk);
        checks += 2;
        if (t != et) begin
          failures++;
          if (failures < 5) $display("rem %0d w %h: t %b expected %b", rm, w, t, et);
        end
        if (int'(step) != es) failures++;
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
