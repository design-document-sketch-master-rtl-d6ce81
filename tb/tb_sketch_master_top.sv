// End-to-end testbench of the sketch board at full size (640 x 480, default
// parameters), with the SDRAM model on the DRAM pins.
//
// Acting as the processor, it waits for the SDRAM to be ready, draws a
// reference outline into the reference frame and a student's tracing (partly
// one pixel off, partly three pixels off, plus stray dots) into the student
// frame, which is also the displayed frame, using single-byte pixel writes.
// It then
//   * captures one whole VGA frame from the DAC pins (sampling on VGA_CLK,
//     positions taken from BLANK/HS/VS) and compares every visible pixel with
//     the expected 4:2:2 to 8:8:8 expansion;
//   * starts a sketch check through the registers and compares the counts,
//     score and grade with a reference model computed here, and the letter on
//     HEX5 with the grade;
//   * points the display at the reference frame and checks the next frame.
// It counts how often each mechanism happened: SDRAM initialisation, auto
// refresh, row activation (row misses), byte-masked writes, the processor
// waiting while the display owns the SDRAM, display line underrun, frame
// base switch, and a completed check; a mechanism that never occurred is a
// failure. The SDRAM model's protocol errors must stay at zero.
module tb_sketch_master_top;
  import sm_pkg::*;

  localparam int W = 640, H = 480, R = 3, TOL = 1;
  localparam logic [24:0] REF_BASE = 25'h800000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;     // 100 MHz

  logic [24:0] fb_address;
  logic        fb_read, fb_write, fb_waitrequest;
  logic [15:0] fb_writedata, fb_readdata;
  logic [1:0]  fb_byteenable;
  logic [3:0]  csr_address;
  logic        csr_read, csr_write, csr_waitrequest;
  logic [31:0] csr_writedata, csr_readdata;
  logic [12:0] DRAM_ADDR;
  logic [1:0]  DRAM_BA;
  logic        DRAM_CAS_N, DRAM_RAS_N, DRAM_CKE, DRAM_CLK, DRAM_CS_N, DRAM_WE_N, DRAM_LDQM, DRAM_UDQM;
  wire  [15:0] DRAM_DQ;
  logic [7:0]  VGA_R, VGA_G, VGA_B;
  logic        VGA_CLK, VGA_SYNC_N, VGA_BLANK_N, VGA_HS, VGA_VS;
  logic [6:0]  HEX0, HEX1, HEX2, HEX3, HEX4, HEX5;
  int          m_errors, m_refs, m_acts;

  sketch_master_top dut (
    .clk, .rst_n,
    .hps_fb_address(fb_address), .hps_fb_read(fb_read), .hps_fb_write(fb_write),
    .hps_fb_writedata(fb_writedata), .hps_fb_byteenable(fb_byteenable),
    .hps_fb_readdata(fb_readdata), .hps_fb_waitrequest(fb_waitrequest),
    .hps_csr_address(csr_address), .hps_csr_read(csr_read), .hps_csr_write(csr_write),
    .hps_csr_writedata(csr_writedata), .hps_csr_readdata(csr_readdata),
    .hps_csr_waitrequest(csr_waitrequest),
    .DRAM_ADDR, .DRAM_BA, .DRAM_CAS_N, .DRAM_RAS_N, .DRAM_CKE, .DRAM_CLK, .DRAM_CS_N,
    .DRAM_WE_N, .DRAM_LDQM, .DRAM_UDQM, .DRAM_DQ,
    .VGA_R, .VGA_G, .VGA_B, .VGA_CLK, .VGA_SYNC_N, .VGA_BLANK_N, .VGA_HS, .VGA_VS,
    .HEX0, .HEX1, .HEX2, .HEX3, .HEX4, .HEX5);

  sdram_model sdram (
    .clk(DRAM_CLK), .cke(DRAM_CKE), .cs_n(DRAM_CS_N), .ras_n(DRAM_RAS_N),
    .cas_n(DRAM_CAS_N), .we_n(DRAM_WE_N), .ba(DRAM_BA), .addr(DRAM_ADDR),
    .ldqm(DRAM_LDQM), .udqm(DRAM_UDQM), .dq(DRAM_DQ),
    .errors(m_errors), .refreshes(m_refs), .activates(m_acts));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- processor bus ----------------
  int masked_writes = 0, hps_waits = 0;
  logic [7:0] ref_img [int];     // key y*W+x, absent = background 0
  logic [7:0] stu_img [int];

  task automatic fb_xfer(bit wr, logic [24:0] a, logic [15:0] d, logic [1:0] be,
                         output logic [15:0] q);
    int cyc = 0;
    @(negedge clk);
    fb_read = !wr; fb_write = wr; fb_address = a; fb_writedata = d; fb_byteenable = be;
    do begin @(posedge clk); cyc++; end while (fb_waitrequest);
    q = fb_readdata;
    if (cyc > 8) hps_waits++;
    @(negedge clk);
    fb_read = 0; fb_write = 0;
  endtask

  task automatic put_pixel(bit stu, int x, int y, logic [7:0] c);
    logic [15:0] q;
    int idx = y * W + x;
    logic [24:0] a = (stu ? 25'h0 : REF_BASE) + 25'(idx / 2);
    if (x < 0 || x >= W || y < 0 || y >= H) return;
    fb_xfer(1, a, {c, c}, (idx % 2) ? 2'b10 : 2'b01, q);
    masked_writes++;
    if (stu) stu_img[idx] = c; else ref_img[idx] = c;
  endtask

  task automatic csr_wr(int a, logic [31:0] d);
    @(negedge clk); csr_address = 4'(a); csr_write = 1; csr_writedata = d;
    @(negedge clk); csr_write = 0;
  endtask
  task automatic csr_rd(int a, output logic [31:0] d);
    @(negedge clk); csr_address = 4'(a); csr_read = 1;
    #1 d = csr_readdata;
    @(negedge clk); csr_read = 0;
  endtask

  // ---------------- VGA capture ----------------
  int  vx = 0, vy = -1, pix_seen = 0, pix_bad = 0;
  bit  capture = 0, show_ref = 0;
  logic prev_blank = 0, prev_vs = 1;
  always @(posedge VGA_CLK) begin
    if (prev_vs && !VGA_VS) vy = -1;
    if (VGA_BLANK_N && !prev_blank) begin vx = 0; vy++; end
    if (VGA_BLANK_N) begin
      if (capture) begin
        int idx;
        logic [7:0] p;
        idx = vy * W + vx;
        if (show_ref) p = ref_img.exists(idx) ? ref_img[idx] : 8'h00;
        else          p = stu_img.exists(idx) ? stu_img[idx] : 8'h00;
        pix_seen++;
        if (!(VGA_R == 8'(p[7:4] * 17) && VGA_G == 8'(p[3:2] * 85) && VGA_B == 8'(p[1:0] * 85))) begin
          pix_bad++;
          if (pix_bad < 5) $display("VGA pixel (%0d,%0d) = %h%h%h, byte %h", vx, vy, VGA_R, VGA_G, VGA_B, p);
        end
      end
      vx++;
    end
    prev_blank = VGA_BLANK_N;
    prev_vs    = VGA_VS;
  end

  task automatic capture_frame(string what);
    // wait for the start of a frame, then capture it whole
    @(negedge VGA_VS);
    pix_seen = 0; pix_bad = 0; capture = 1;
    @(negedge VGA_VS);
    capture = 0;
    check(pix_seen == W * H, $sformatf("%s: %0d visible pixels", what, pix_seen));
    check(pix_bad == 0, $sformatf("%s: %0d wrong pixels", what, pix_bad));
  endtask

  // ---------------- reference model of the check ----------------
  function automatic int isq(int v);
    int r = 0;
    while ((r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction

  task automatic model_check(output int e_ref, output int e_match, output int e_pen,
                             output int e_mis, output int e_score);
    e_ref = 0; e_match = 0; e_pen = 0; e_mis = 0;
    foreach (ref_img[i]) if (ref_img[i] != 0) begin
      int x, y, d;
      x = i % W; y = i / W; d = R + 1;
      e_ref++;
      if (!(stu_img.exists(i) && stu_img[i] != 0)) e_mis++;
      for (int dy = -R; dy <= R; dy++)
        for (int dx = -R; dx <= R; dx++) begin
          int xx = x + dx, yy = y + dy;
          if (xx >= 0 && xx < W && yy >= 0 && yy < H && stu_img.exists(yy * W + xx) &&
              stu_img[yy * W + xx] != 0) begin
            int dd = isq(dx * dx + dy * dy);
            if (dd > R + 1) dd = R + 1;
            if (dd < d) d = dd;
          end
        end
      if (d <= TOL) e_match++; else e_pen += d - TOL;
    end
    foreach (stu_img[i]) if (stu_img[i] != 0 && !(ref_img.exists(i) && ref_img[i] != 0)) e_mis++;
    e_score = (e_ref == 0 || e_match <= e_pen) ? 0 : 100 * (e_match - e_pen) / e_ref;
  endtask

  // ---------------- scenario ----------------
  initial begin
    logic [31:0] d;
    logic [15:0] q;
    int e_ref, e_match, e_pen, e_mis, e_score, t0, check_cycles, acts0;
    logic [31:0] under0;
    fb_read = 0; fb_write = 0; fb_address = 0; fb_writedata = 0; fb_byteenable = 0;
    csr_address = 0; csr_read = 0; csr_write = 0; csr_writedata = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    // SDRAM initialisation
    do csr_rd(1, d); while (!d[2]);
    check(m_refs >= 2, "SDRAM initialised (two refreshes before mode set)");

    // Reference: a rectangle outline and a diagonal stroke.
    for (int x = 200; x <= 440; x++) begin put_pixel(0, x, 150, 8'hE0); put_pixel(0, x, 330, 8'hE0); end
    for (int y = 150; y <= 330; y++) begin put_pixel(0, 200, y, 8'hE0); put_pixel(0, 440, y, 8'hE0); end
    for (int k = 0; k <= 100; k++) put_pixel(0, 250 + k, 200 + k, 8'hE0);
    // Student: top edge exact, bottom edge one pixel low, left edge three
    // pixels right, right edge missing in part, diagonal two pixels off,
    // plus stray dots; blue ink.
    for (int x = 200; x <= 440; x++) begin put_pixel(1, x, 150, 8'h03); put_pixel(1, x, 331, 8'h03); end
    for (int y = 150; y <= 330; y++) put_pixel(1, 203, y, 8'h03);
    for (int y = 150; y <= 260; y++) put_pixel(1, 440, y, 8'h03);
    for (int k = 0; k <= 100; k++) put_pixel(1, 252 + k, 200 + k, 8'h1F);
    for (int k = 0; k < 20; k++) put_pixel(1, 10 + 31 * k, 20 + 23 * k, 8'hFF);
    // read one pixel word back through the processor port
    fb_xfer(0, 25'((150 * W + 200) / 2), 0, 2'b11, q);
    check(q == 16'h0303, $sformatf("processor read-back %h", q));

    // The display shows the student frame (frame 0).
    capture_frame("student frame on VGA");

    // Sketch check
    model_check(e_ref, e_match, e_pen, e_mis, e_score);
    acts0 = m_acts;
    csr_rd(10, under0);
    t0 = $time;
    csr_wr(0, 1);
    do csr_rd(1, d); while (!d[1]);
    check_cycles = ($time - t0) / 10;
    csr_rd(5, d);
    $display("check: %0d cycles, score %0d grade %0d (model: ref %0d matched %0d penalty %0d score %0d)",
             check_cycles, d[6:0], d[10:8], e_ref, e_match, e_pen, e_score);
    check(d[6:0] == 7'(e_score), $sformatf("score %0d exp %0d", d[6:0], e_score));
    check(d[10:8] == (e_score >= 90 ? 0 : e_score >= 80 ? 1 : e_score >= 70 ? 2 : e_score >= 60 ? 3 : 4),
          "grade");
    csr_rd(6, d); check(d == 32'(e_match), $sformatf("matched %0d exp %0d", d, e_match));
    csr_rd(7, d); check(d == 32'(e_ref), $sformatf("ref_count %0d exp %0d", d, e_ref));
    csr_rd(8, d); check(d == 32'(e_pen), $sformatf("penalty %0d exp %0d", d, e_pen));
    csr_rd(9, d); check(d == 32'(e_mis), $sformatf("mismatch %0d exp %0d", d, e_mis));
    csr_rd(5, d);
    check(HEX5 == (d[10:8] == 0 ? 7'b0001000 : d[10:8] == 1 ? 7'b0000011 : d[10:8] == 2 ? 7'b1000110 :
                   d[10:8] == 3 ? 7'b0100001 : 7'b0001110), "grade letter on HEX5");
    check(m_acts > acts0, "the check's reads opened rows");

    // Show the reference frame.
    csr_wr(2, 32'(REF_BASE));
    @(negedge VGA_VS);   // base is taken at the next frame's first fetch
    show_ref = 1;
    capture_frame("reference frame on VGA");

    csr_rd(10, d);
    $display("mechanisms: refresh %0d, row activates %0d, byte-masked writes %0d, processor waits %0d, underruns %0d",
             m_refs, m_acts, masked_writes, hps_waits, d);
    check(m_refs > 10, "auto refresh happened");
    check(m_acts > 2, "row misses (activate) happened");
    check(masked_writes > 0, "byte-masked writes happened");
    check(hps_waits > 0, "processor waited for the display");
    check(d >= 1, "display underrun counted (lines due while the SDRAM was initialising)");
    check(d == under0, "no display underrun during the check or later");
    check(m_errors == 0, $sformatf("SDRAM protocol errors %0d", m_errors));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
