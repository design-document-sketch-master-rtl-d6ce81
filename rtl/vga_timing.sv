// VGA raster timing generator for 640 x 480 at 60 Hz.
//
// A divider turns the system clock into a pixel-rate enable (pix_ce, one
// system cycle in CLK_DIV) and the pixel clock for the DAC (vga_clk, rising in
// the middle of each pixel). Horizontal and vertical counters walk the raster
// from the top-left corner, left to right and top to bottom: each line is
// display interval, front porch, sync pulse and back porch; each frame is the
// same in lines. Sync pulses are active low.
//
// Outputs are registered and change only on pix_ce. hcount/vcount give the
// pixel now being scanned; active is high inside the 640 x 480 display
// interval; line_start is high in the pix_ce cycle whose clock edge returns
// hcount to 0 (the last pixel of a line), frame_start likewise for the edge
// that returns both counters to 0.
//
// The 640 x 480 size, the raster order and the four line intervals follow the
// document; the interval lengths (16/96/48 pixels, 10/2/33 lines) are the
// standard 640 x 480 at 60 Hz values, and CLK_DIV = 4 assumes a 100 MHz system
// clock for the 25 MHz pixel rate.
module vga_timing #(
  parameter int unsigned CLK_DIV  = 4,
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned H_FP     = 16,
  parameter int unsigned H_SYNC   = 96,
  parameter int unsigned H_BP     = 48,
  parameter int unsigned V_ACTIVE = 480,
  parameter int unsigned V_FP     = 10,
  parameter int unsigned V_SYNC   = 2,
  parameter int unsigned V_BP     = 33
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        pix_ce,
  output logic        vga_clk,
  output logic [10:0] hcount,
  output logic [10:0] vcount,
  output logic        active,
  output logic        hsync_n,
  output logic        vsync_n,
  output logic        line_start,
  output logic        frame_start
);
  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;

  logic [$clog2(CLK_DIV+1)-1:0] div;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div     <= '0;
      pix_ce  <= 1'b0;
      vga_clk <= 1'b0;
    end else begin
      div     <= (div == ($bits(div))'(CLK_DIV - 1)) ? '0 : div + 1'b1;
      pix_ce  <= (div == ($bits(div))'(CLK_DIV - 1));
      vga_clk <= (div >= ($bits(div))'(CLK_DIV / 2 - 1)) && (div != ($bits(div))'(CLK_DIV - 1));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hcount <= '0;
      vcount <= '0;
    end else if (pix_ce) begin
      if (hcount == 11'(H_TOTAL - 1)) begin
        hcount <= '0;
        vcount <= (vcount == 11'(V_TOTAL - 1)) ? '0 : vcount + 11'd1;
      end else begin
        hcount <= hcount + 11'd1;
      end
    end
  end

  assign active      = (hcount < 11'(H_ACTIVE)) && (vcount < 11'(V_ACTIVE));
  assign hsync_n     = !((hcount >= 11'(H_ACTIVE + H_FP)) && (hcount < 11'(H_ACTIVE + H_FP + H_SYNC)));
  assign vsync_n     = !((vcount >= 11'(V_ACTIVE + V_FP)) && (vcount < 11'(V_ACTIVE + V_FP + V_SYNC)));
  assign line_start  = pix_ce && (hcount == 11'(H_TOTAL - 1));
  assign frame_start = line_start && (vcount == 11'(V_TOTAL - 1));

endmodule
