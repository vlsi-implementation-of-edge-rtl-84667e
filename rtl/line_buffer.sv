// line_buffer -- one source row of pixel storage.
//
// A simple dual-port memory of DEPTH pixels with one synchronous read port and
// one write port, indexed by source column. The scaler keeps source row n in
// it while row n+1 streams in; a column is written with the new row only after
// it has been read for the current one, so a single row of storage suffices.
// Read data appear one clock after `re` (registered output). DEPTH is the
// widest source row supported; 1920 is this design's choice (the widest
// resolution named for the scaler is 1920 x 1080).
module line_buffer
  import scaler_pkg::*;
#(
  parameter int DEPTH = 1920
) (
  input  logic   clk,
  input  logic   re,
  input  coord_t raddr,
  output pix_t   rdata,
  input  logic   we,
  input  coord_t waddr,
  input  pix_t   wdata
);

  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  pix_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (int'(waddr) < DEPTH)) mem[AW'(waddr)] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= (int'(raddr) < DEPTH) ? mem[AW'(raddr)] : '0;
  end

endmodule
