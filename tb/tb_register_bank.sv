// tb_register_bank -- random sequences of shifts, replicated-column shifts and
// holds; compares the eight registers with a model of the two four-deep
// shift chains.
`timescale 1ns/1ps
module tb_register_bank;
  import scaler_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, shift = 1'b0, dup = 1'b0;
  pix_t in_row_n, in_row_n1;
  rb_t regs;
  int checks = 0, failures = 0;
  int up[4], lo[4];   // model: index 0 = Reg0/Reg4 (column m-1) .. 3 = Reg3/Reg7
  always #5 clk = ~clk;

  register_bank dut (.clk, .rst_n, .shift, .dup, .in_row_n, .in_row_n1, .regs);

  initial begin
    in_row_n = '0; in_row_n1 = '0;
    foreach (up[i]) begin up[i] = 0; lo[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      shift = ($urandom_range(0, 3) != 0);
      dup = ($urandom_range(0, 3) == 0);
      in_row_n = pix_t'($urandom);
      in_row_n1 = pix_t'($urandom);
      if (shift) begin
        int nu, nl;
        nu = dup ? up[3] : int'(in_row_n);
        nl = dup ? lo[3] : int'(in_row_n1);
        for (int j = 0; j < 3; j++) begin up[j] = up[j+1]; lo[j] = lo[j+1]; end
        up[3] = nu; lo[3] = nl;
      end
      @(posedge clk); #1;
      checks++;
      if (int'(regs.r0) != up[0] || int'(regs.r1) != up[1] || int'(regs.r2) != up[2] ||
          int'(regs.r3) != up[3] || int'(regs.r4) != lo[0] || int'(regs.r5) != lo[1] ||
          int'(regs.r6) != lo[2] || int'(regs.r7) != lo[3]) begin
        failures++;
        $display("FAIL: step %0d regs %p", i, regs);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
