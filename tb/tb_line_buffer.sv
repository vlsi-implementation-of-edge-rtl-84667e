// tb_line_buffer -- writes rows of random pixels while reading the previous
// row one column ahead of the write (as the scaler does), then random reads;
// checks one-clock read latency and contents.
`timescale 1ns/1ps
module tb_line_buffer;
  import scaler_pkg::*;
  localparam int DEPTH = 1920;
  logic clk = 1'b0, re = 1'b0, we = 1'b0;
  coord_t raddr = '0, waddr = '0;
  pix_t rdata, wdata = '0;
  int checks = 0, failures = 0;
  int model[DEPTH];
  always #5 clk = ~clk;

  line_buffer #(.DEPTH(DEPTH)) dut (.clk, .re, .raddr, .rdata, .we, .waddr, .wdata);

  initial begin
    // first row
    for (int c = 0; c < DEPTH; c++) begin
      @(negedge clk);
      we = 1'b1; waddr = coord_t'(c); wdata = pix_t'($urandom); model[c] = int'(wdata);
    end
    @(negedge clk) we = 1'b0;
    // three more rows: read column c and write column c-1 in the same clock
    for (int r = 0; r < 3; r++) begin
      int prev;
      for (int c = 0; c <= DEPTH; c++) begin
        @(negedge clk);
        if (c > 0) begin
          checks++;
          if (int'(rdata) != prev) begin
            failures++;
            $display("FAIL: row %0d col %0d got %0d expected %0d", r, c - 1, rdata, prev);
          end
        end
        re = (c < DEPTH); raddr = coord_t'(c);
        if (c < DEPTH) prev = model[c];
        we = (c > 0); waddr = coord_t'(c - 1); wdata = pix_t'($urandom);
        if (c > 0) model[c - 1] = int'(wdata);
      end
      @(negedge clk) begin re = 1'b0; we = 1'b0; end
    end
    for (int i = 0; i < 500; i++) begin
      int a;
      a = $urandom_range(0, DEPTH - 1);
      @(negedge clk) begin re = 1'b1; raddr = coord_t'(a); end
      @(negedge clk) re = 1'b0;
      checks++;
      if (int'(rdata) != model[a]) begin failures++; $display("FAIL: addr %0d", a); end
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
