// Sketch board, FPGA part: a tracing game on a drawing tablet.
//
// The ARM processor reads the tablet's pen packets and writes the strokes as
// pixels into a 640 x 480 frame buffer (one 4:2:2 RGB byte per pixel) in the
// board's SDRAM. This top level shares the SDRAM among three bus hosts:
//   0  VGA scan-out (vga_fb_reader, highest priority), fed by vga_timing;
//   1  the processor's frame-buffer port (hps_fb_*), the FPGA side of the
//      processor-to-FPGA bridge;
//   2  the sketch-check image loader (check_reader).
// An open-row SDRAM controller serves them through a fixed-priority Avalon
// arbiter; the check loader also stands back while the display fetches a
// line. The check loader streams the reference and student frames into the
// sketch checker, whose score and grade go to the registers (hps_csr_*) and
// to the six 7-segment displays.
//
// Clocking: one clock, 100 MHz assumed; the pixel rate is clk / 4 and the
// SDRAM clock pin is the system clock (on the board a phase-shifted PLL
// output would drive it). DRAM_DQ is the bidirectional data pin, driven only
// during WRITE cycles. rst_n is an asynchronous, active-low reset.
//
// Signal names of the SDRAM and VGA pins follow the board; the bus sharing,
// register map and clocking are this design's choices.
module sketch_master_top
  import sm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // processor frame-buffer port (Avalon-MM agent, 16-bit words)
  input  logic [24:0] hps_fb_address,
  input  logic        hps_fb_read,
  input  logic        hps_fb_write,
  input  logic [15:0] hps_fb_writedata,
  input  logic [1:0]  hps_fb_byteenable,
  output logic [15:0] hps_fb_readdata,
  output logic        hps_fb_waitrequest,
  // processor register port (Avalon-MM agent, 32-bit registers)
  input  logic [3:0]  hps_csr_address,
  input  logic        hps_csr_read,
  input  logic        hps_csr_write,
  input  logic [31:0] hps_csr_writedata,
  output logic [31:0] hps_csr_readdata,
  output logic        hps_csr_waitrequest,
  // SDRAM
  output logic [12:0] DRAM_ADDR,
  output logic [1:0]  DRAM_BA,
  output logic        DRAM_CAS_N,
  output logic        DRAM_RAS_N,
  output logic        DRAM_CKE,
  output logic        DRAM_CLK,
  output logic        DRAM_CS_N,
  output logic        DRAM_WE_N,
  output logic        DRAM_LDQM,
  output logic        DRAM_UDQM,
  inout  wire  [15:0] DRAM_DQ,
  // VGA DAC and connector
  output logic [7:0]  VGA_R,
  output logic [7:0]  VGA_G,
  output logic [7:0]  VGA_B,
  output logic        VGA_CLK,
  output logic        VGA_SYNC_N,
  output logic        VGA_BLANK_N,
  output logic        VGA_HS,
  output logic        VGA_VS,
  // 7-segment displays
  output logic [6:0]  HEX0,
  output logic [6:0]  HEX1,
  output logic [6:0]  HEX2,
  output logic [6:0]  HEX3,
  output logic [6:0]  HEX4,
  output logic [6:0]  HEX5
);
  localparam int unsigned N_HOSTS = 3;

  avl_req_t host_req [N_HOSTS];
  avl_rsp_t host_rsp [N_HOSTS];
  avl_req_t sd_req;
  avl_rsp_t sd_rsp;

  // ---------------- SDRAM ----------------
  logic [15:0] dq_o;
  logic        dq_oe;
  logic        sdram_ready;

  sdram_ctrl u_sdram (
    .clk, .rst_n,
    .avl_req  (sd_req),
    .avl_rsp  (sd_rsp),
    .sd_addr  (DRAM_ADDR),
    .sd_ba    (DRAM_BA),
    .sd_cs_n  (DRAM_CS_N),
    .sd_ras_n (DRAM_RAS_N),
    .sd_cas_n (DRAM_CAS_N),
    .sd_we_n  (DRAM_WE_N),
    .sd_cke   (DRAM_CKE),
    .sd_ldqm  (DRAM_LDQM),
    .sd_udqm  (DRAM_UDQM),
    .sd_dq_o  (dq_o),
    .sd_dq_oe (dq_oe),
    .sd_dq_i  (DRAM_DQ),
    .init_done(sdram_ready)
  );

  assign DRAM_DQ  = dq_oe ? dq_o : 'z;
  assign DRAM_CLK = clk;

  avl_arbiter #(.N_HOSTS(N_HOSTS)) u_arb (
    .clk, .rst_n,
    .host_req, .host_rsp,
    .agent_req(sd_req),
    .agent_rsp(sd_rsp)
  );

  // ---------------- processor frame-buffer port ----------------
  always_comb begin
    host_req[1].read       = hps_fb_read;
    host_req[1].write      = hps_fb_write;
    host_req[1].address    = hps_fb_address;
    host_req[1].writedata  = hps_fb_writedata;
    host_req[1].byteenable = hps_fb_byteenable;
  end
  assign hps_fb_readdata    = host_rsp[1].readdata;
  assign hps_fb_waitrequest = host_rsp[1].waitrequest;

  // ---------------- registers ----------------
  logic              check_start, result_valid;
  logic [AVL_AW-1:0] fb_base, ref_base, stu_base;
  logic              chk_busy, chk_done;
  logic [31:0]       ref_count, matched, penalty, mismatch, underruns;
  logic [6:0]        score;
  grade_t            grade;

  sm_regs u_regs (
    .clk, .rst_n,
    .address    (hps_csr_address),
    .read       (hps_csr_read),
    .write      (hps_csr_write),
    .writedata  (hps_csr_writedata),
    .readdata   (hps_csr_readdata),
    .waitrequest(hps_csr_waitrequest),
    .check_start, .fb_base, .ref_base, .stu_base, .result_valid,
    .check_busy (chk_busy),
    .check_done (chk_done),
    .sdram_ready, .score, .grade, .matched, .ref_count, .penalty, .mismatch,
    .underruns
  );

  // ---------------- VGA ----------------
  logic        pix_ce, active, hsync_n, vsync_n, line_start, scan_busy;
  logic [10:0] hcount, vcount;

  vga_timing u_timing (
    .clk, .rst_n, .pix_ce, .vga_clk(VGA_CLK), .hcount, .vcount, .active,
    .hsync_n, .vsync_n, .line_start, .frame_start()
  );

  vga_fb_reader u_scan (
    .clk, .rst_n, .fb_base,
    .pix_ce, .hcount, .vcount, .active, .hsync_n, .vsync_n, .line_start,
    .avl_req    (host_req[0]),
    .avl_rsp    (host_rsp[0]),
    .vga_r      (VGA_R),
    .vga_g      (VGA_G),
    .vga_b      (VGA_B),
    .vga_hs     (VGA_HS),
    .vga_vs     (VGA_VS),
    .vga_blank_n(VGA_BLANK_N),
    .vga_sync_n (VGA_SYNC_N),
    .fetch_busy (scan_busy),
    .underruns
  );

  // ---------------- sketch check ----------------
  logic       px_valid, px_ready;
  logic [7:0] ref_pix, stu_pix;

  check_reader u_load (
    .clk, .rst_n,
    .start    (check_start),
    .pause    (scan_busy),
    .ref_base, .stu_base,
    .avl_req  (host_req[2]),
    .avl_rsp  (host_rsp[2]),
    .out_valid(px_valid),
    .out_ready(px_ready),
    .ref_pix, .stu_pix,
    .busy     (),
    .done     ()
  );

  sketch_checker u_check (
    .clk, .rst_n,
    .start    (check_start),
    .in_valid (px_valid),
    .in_ready (px_ready),
    .ref_pix, .stu_pix,
    .busy     (chk_busy),
    .done     (chk_done),
    .ref_count, .matched, .penalty, .mismatch, .score, .grade
  );

  seg7_display u_hex (
    .valid(result_valid), .score, .grade,
    .hex0(HEX0), .hex1(HEX1), .hex2(HEX2), .hex3(HEX3), .hex4(HEX4), .hex5(HEX5)
  );

endmodule
