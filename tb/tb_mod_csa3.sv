// tb_mod_csa3: checks the three-operand modular adder for Q = 2048 and the
// prime Q = 2297, with operands at the ends of their ranges (0, Q-1, and Q
// for b and c) and random values.
module tb_mod_csa3;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [10:0] a0, s0;
  logic [11:0] b0, c0;
  logic [11:0] a1, s1;
  logic [12:0] b1, c1;

  mod_csa3 #(.Q(2048)) u0 (.a(a0), .b(b0), .c(c0), .s(s0));
  mod_csa3 #(.Q(2297)) u1 (.a(a1), .b(b1), .c(c1), .s(s1));

  function automatic int val(int i, int q);
    case (i % 6)
      0: return q;
      1: return q - 1;
      2: return 0;
      default: return int'($urandom_range(q));
    endcase
  endfunction

  initial begin
    for (int i = 0; i < 5000; i++) begin
      a0 = 11'($urandom_range(2047)); b0 = 12'(val(i, 2048)); c0 = 12'(val(i / 6, 2048));
      a1 = 12'($urandom_range(2296)); b1 = 13'(val(i, 2297)); c1 = 13'(val(i / 6, 2297));
      if (i % 10 == 0) begin a0 = 11'd2047; a1 = 12'd2296; end
      @(posedge clk);
      checks += 2;
      if (int'(s0) != (int'(a0) + int'(b0) + int'(c0)) % 2048) begin
        failures++;
        if (failures < 5) $display("Q=2048 %0d+%0d+%0d -> %0d", a0, b0, c0, s0);
      end
      if (int'(s1) != (int'(a1) + int'(b1) + int'(c1)) % 2297) begin
        failures++;
        if (failures < 5) $display("Q=2297 %0d+%0d+%0d -> %0d", a1, b1, c1, s1);
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
