// register_bank (RB) -- the 2 x 4 source-pixel window of the scaler.
//
// Eight pixel registers in two shift chains. Reg3->Reg2->Reg1->Reg0 hold
// columns m+2..m-1 of source row n, Reg7->Reg6->Reg5->Reg4 the same columns of
// row n+1. When `shift` is high both chains move one place toward Reg0/Reg4
// and two new pixels enter Reg3 (from the line buffer, row n) and Reg7 (from
// the incoming source row n+1), as in the published register-bank drawing. At the image
// borders the controller asks for a column that does not exist; it then sets
// `dup`, and Reg3/Reg7 keep their value while the rest shift, which replicates
// the border column (edge clamping is this design's choice).
// Unlike that drawing, the line buffer is not fed from Reg4: it is written
// directly from the incoming pixel (see line_buffer), which is equivalent for
// in-range columns and keeps clamped columns out of the buffer.
module register_bank
  import scaler_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic shift,
  input  logic dup,
  input  pix_t in_row_n,    // FS(m+3,n) from the line buffer
  input  pix_t in_row_n1,   // FS(m+3,n+1) from the source stream
  output rb_t  regs
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regs <= '0;
    end else if (shift) begin
      regs.r0 <= regs.r1;
      regs.r1 <= regs.r2;
      regs.r2 <= regs.r3;
      regs.r3 <= dup ? regs.r3 : in_row_n;
      regs.r4 <= regs.r5;
      regs.r5 <= regs.r6;
      regs.r6 <= regs.r7;
      regs.r7 <= dup ? regs.r7 : in_row_n1;
    end
  end

endmodule
