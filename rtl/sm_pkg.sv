// Shared types and constants of the sketch-board FPGA design.
//
// The frame buffer holds one byte per pixel in a 4:2:2 RGB packing (4 bits red,
// 2 bits green, 2 bits blue), 640 x 480 pixels per frame, and lives in a
// 32M x 16 SDRAM. All on-chip bus traffic uses an Avalon memory-mapped
// request/response pair with agent-controlled waitrequest: a host holds its
// request constant until the agent drops waitrequest, and the transfer (and,
// for reads, readdata) completes on that clock edge.
//
// The bit order inside the pixel byte (red in [7:4], green in [3:2], blue in
// [1:0]) and little-endian packing of two pixels per SDRAM word are choices of
// this design.
package sm_pkg;

  // Frame geometry (640 x 480 visible pixels, one byte each): the default
  // size of every module that walks a frame.
  localparam int unsigned FRAME_W = 640;
  localparam int unsigned FRAME_H = 480;

  // SDRAM word address: 2 bank + 13 row + 10 column bits = 25 bits (32M words).
  localparam int unsigned AVL_AW = 25;
  localparam int unsigned AVL_DW = 16;
  localparam int unsigned AVL_BW = AVL_DW / 8;

  typedef struct packed {
    logic              read;
    logic              write;
    logic [AVL_AW-1:0] address;    // 16-bit word address
    logic [AVL_DW-1:0] writedata;
    logic [AVL_BW-1:0] byteenable;
  } avl_req_t;

  typedef struct packed {
    logic [AVL_DW-1:0] readdata;
    logic              waitrequest;
  } avl_rsp_t;

  localparam avl_req_t AVL_REQ_IDLE = '{default: '0};

  // Letter grades of the sketch check.
  typedef enum logic [2:0] {
    GRADE_A = 3'd0,
    GRADE_B = 3'd1,
    GRADE_C = 3'd2,
    GRADE_D = 3'd3,
    GRADE_F = 3'd4
  } grade_t;

  // Expand a 4:2:2 pixel byte to 8-bit DAC channels by bit replication.
  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb888_t;

  function automatic rgb888_t expand_pixel(input logic [7:0] p);
    rgb888_t c;
    c.r = {p[7:4], p[7:4]};
    c.g = {4{p[3:2]}};
    c.b = {4{p[1:0]}};
    return c;
  endfunction

endpackage
