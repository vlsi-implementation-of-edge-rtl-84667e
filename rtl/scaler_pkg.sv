// scaler_pkg -- shared constants and types of the edge-oriented area-pixel
// image scaler.
//
// Every target pixel is divided into 2^GRID_LOG2 x 2^GRID_LOG2 grid cells
// (GRID_LOG2 = 3, i.e. 8 x 8 cells, as in the published architecture). All
// positions inside the approximate module are measured in these grid cells.
// Window sizes winw/winh are powers of two from 1 to 32 and are carried as
// their base-2 logarithm (0..5). Pixels are 8-bit grey levels (an assumption:
// the design processes monochrome images and no bit depth is stated).
package scaler_pkg;

  localparam int PIX_W     = 8;   // grey-level bits (assumed)
  localparam int GRID_LOG2 = 3;   // n: a target pixel is 2^n x 2^n grid cells
  localparam int GRID      = 1 << GRID_LOG2;
  localparam int SIDE_W    = 6;   // left/top/right/bottom and winw/winh: 6-bit integers
  localparam int WLOG_W    = 3;   // log2 of winw/winh, 0..5
  localparam int AREA_W    = 2 * SIDE_W;   // product of two 6-bit sides
  localparam int LA_W      = PIX_W + 2;    // signed edge parameter, -255..255
  localparam int COORD_W   = 12;  // image sizes and coordinates up to 4095
  localparam int POS_W     = COORD_W + GRID_LOG2 + 4;  // signed grid position

  typedef logic [PIX_W-1:0]   pix_t;
  typedef logic [SIDE_W-1:0]  side_t;
  typedef logic [AREA_W-1:0]  area_t;
  typedef logic [COORD_W-1:0] coord_t;
  typedef logic [WLOG_W-1:0]  wlog_t;
  typedef logic signed [LA_W-1:0]  la_t;
  typedef logic signed [POS_W-1:0] pos_t;

  // Source and target image sizes, set per frame.
  typedef struct packed {
    coord_t sw;   // source width  SW
    coord_t sh;   // source height SH
    coord_t tw;   // target width  TW
    coord_t th;   // target height TH
  } frame_cfg_t;

  // Overlap widths of the current target-pixel window (eq. 7-9, 12).
  typedef struct packed {
    side_t left;
    side_t right;
    side_t top;
    side_t bottom;
  } sides_t;

  // The four overlap areas A(m,n), A(m+1,n), A(m,n+1), A(m+1,n+1).
  typedef struct packed {
    area_t a00;   // A(m,n)
    area_t a10;   // A(m+1,n)
    area_t a01;   // A(m,n+1)
    area_t a11;   // A(m+1,n+1)
  } areas_t;

  // Contents of the register bank: columns m-1..m+2 of rows n and n+1.
  typedef struct packed {
    pix_t r0;   // Reg0 FS(m-1,n)
    pix_t r1;   // Reg1 FS(m,n)
    pix_t r2;   // Reg2 FS(m+1,n)
    pix_t r3;   // Reg3 FS(m+2,n)
    pix_t r4;   // Reg4 FS(m-1,n+1)
    pix_t r5;   // Reg5 FS(m,n+1)
    pix_t r6;   // Reg6 FS(m+1,n+1)
    pix_t r7;   // Reg7 FS(m+2,n+1)
  } rb_t;

  // The four source pixels that TG weights.
  typedef struct packed {
    pix_t f00;  // FS(m,n)
    pix_t f10;  // FS(m+1,n)
    pix_t f01;  // FS(m,n+1)
    pix_t f11;  // FS(m+1,n+1)
  } quad_t;

endpackage
