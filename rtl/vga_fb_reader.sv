// Frame-buffer scan-out for the VGA port.
//
// The frame buffer is 640 x 480 bytes in SDRAM, one 4:2:2 RGB pixel per byte,
// two pixels per 16-bit word (left pixel in the low byte), rows stored one
// after another from fb_base. While line y is on screen, this block reads
// line y+1 (line 0 during the last blanking line of a frame) over its Avalon
// host port into the other half of a two-line ping-pong buffer (line L lives
// in half L[0]). The display
// side reads the buffer at the raster position from vga_timing, expands the
// byte to 8 bits per channel and registers the DAC and sync outputs.
//
// Interface: pix_ce/hcount/vcount/active/hsync_n/vsync_n/line_start come from
// vga_timing. The Avalon host issues one read at a time and holds it until
// waitrequest drops. fetch_busy is high while a line fetch runs. underruns
// counts lines whose fetch was not finished when the line began to be
// displayed (such a line shows stale data).
//
// Timing: the outputs are one pixel behind the counters, sync included, so
// they stay aligned. fb_base is sampled at the start of each frame. Line
// buffering and the ping-pong scheme are this design's choice; the document
// fixes the frame size, the pixel format and that the frame buffer is read
// from SDRAM and shown by raster scan.
module vga_fb_reader
  import sm_pkg::*;
#(
  parameter int unsigned H_ACTIVE = FRAME_W,
  parameter int unsigned V_ACTIVE = FRAME_H,
  parameter int unsigned V_TOTAL  = 525
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [AVL_AW-1:0] fb_base,
  // raster from vga_timing
  input  logic              pix_ce,
  input  logic [10:0]       hcount,
  input  logic [10:0]       vcount,
  input  logic              active,
  input  logic              hsync_n,
  input  logic              vsync_n,
  input  logic              line_start,
  // Avalon-MM host
  output avl_req_t          avl_req,
  input  avl_rsp_t          avl_rsp,
  // VGA DAC
  output logic [7:0]        vga_r,
  output logic [7:0]        vga_g,
  output logic [7:0]        vga_b,
  output logic              vga_hs,
  output logic              vga_vs,
  output logic              vga_blank_n,
  output logic              vga_sync_n,
  // status
  output logic              fetch_busy,   // a line fetch is in progress
  output logic [31:0]       underruns
);
  localparam int unsigned WPL = H_ACTIVE / 2;          // words per line
  localparam int unsigned WW  = $clog2(WPL);

  logic [15:0]       linebuf [2][WPL];
  logic              fetching;
  logic [10:0]       fetch_line;
  logic [WW-1:0]     fetch_word;
  logic [AVL_AW-1:0] fetch_addr;
  logic [AVL_AW-1:0] frame_base;
  logic [10:0]       done_line;
  logic              done_valid;
  logic [10:0]       next_line;   // line about to be displayed
  logic [10:0]       ahead_line;  // line to fetch while next_line is shown

  assign next_line  = (vcount == 11'(V_TOTAL - 1)) ? 11'd0 : vcount + 11'd1;
  assign ahead_line = (next_line == 11'(V_TOTAL - 1)) ? 11'd0 : next_line + 11'd1;

  // Fetch engine. A fetch that is due while the previous one is still
  // running (the display is already late) waits for the read in flight to
  // complete, as the bus rules require, and then replaces it.
  logic        pend;
  logic [10:0] pend_line;
  logic        start_req, can_start;
  logic [10:0] start_line;

  assign start_req  = pend || (line_start && ahead_line < 11'(V_ACTIVE));
  assign start_line = (line_start && ahead_line < 11'(V_ACTIVE)) ? ahead_line : pend_line;
  assign can_start  = !fetching || !avl_rsp.waitrequest;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fetching   <= 1'b0;
      fetch_line <= '0;
      fetch_word <= '0;
      fetch_addr <= '0;
      frame_base <= '0;
      done_line  <= '0;
      done_valid <= 1'b0;
      pend       <= 1'b0;
      pend_line  <= '0;
    end else begin
      if (fetching && !avl_rsp.waitrequest) begin
        fetch_addr <= fetch_addr + 1'b1;
        if (fetch_word == WW'(WPL - 1)) begin
          fetching   <= 1'b0;
          done_line  <= fetch_line;
          done_valid <= 1'b1;
        end else begin
          fetch_word <= fetch_word + 1'b1;
        end
      end
      if (start_req && can_start) begin
        pend       <= 1'b0;
        fetching   <= 1'b1;
        fetch_line <= start_line;
        fetch_word <= '0;
        if (start_line == 0) begin
          frame_base <= fb_base;
          fetch_addr <= fb_base;
        end else begin
          fetch_addr <= frame_base + AVL_AW'(start_line) * AVL_AW'(WPL);
        end
      end else if (start_req) begin
        pend      <= 1'b1;
        pend_line <= start_line;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (fetching && !avl_rsp.waitrequest)
      linebuf[fetch_line[0]][fetch_word] <= avl_rsp.readdata;
  end

  assign fetch_busy = fetching;

  always_comb begin
    avl_req            = AVL_REQ_IDLE;
    avl_req.read       = fetching;
    avl_req.address    = fetch_addr;
    avl_req.byteenable = '1;
  end

  // Underrun: a visible line starts before its data is complete.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) underruns <= '0;
    else if (line_start && next_line < 11'(V_ACTIVE) &&
             !(done_valid && done_line == next_line))
      underruns <= underruns + 32'd1;
  end

  // Display pipeline: one pixel stage.
  logic [15:0] word;
  logic [7:0]  pix;
  rgb888_t     rgb;
  assign word = linebuf[vcount[0]][hcount[WW:1]];   // hcount[10] is 0 when active
  assign pix  = hcount[0] ? word[15:8] : word[7:0];
  assign rgb  = expand_pixel(pix);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vga_r       <= '0;
      vga_g       <= '0;
      vga_b       <= '0;
      vga_hs      <= 1'b1;
      vga_vs      <= 1'b1;
      vga_blank_n <= 1'b0;
    end else if (pix_ce) begin
      vga_r       <= active ? rgb.r : 8'h00;
      vga_g       <= active ? rgb.g : 8'h00;
      vga_b       <= active ? rgb.b : 8'h00;
      vga_hs      <= hsync_n;
      vga_vs      <= vsync_n;
      vga_blank_n <= active;
    end
  end

  // Sync-on-green is not used.
  assign vga_sync_n = 1'b0;

  // Avalon rule: a stalled read stays unchanged until it completes.
  property p_req_stable;
    @(posedge clk) disable iff (!rst_n)
      (avl_req.read && avl_rsp.waitrequest) |=> $stable(avl_req);
  endproperty
  a_req_stable: assert property (p_req_stable);

endmodule
