// Self-checking testbench of the VGA timing generator at 640 x 480.
// Over two frames it measures, at pixel rate, the line length, the HSYNC
// pulse width and its position after the display interval, the frame length
// in lines, the VSYNC width, the number of active pixels per frame, the pixel
// enable period and the pixel clock duty cycle.
module tb_vga_timing;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        pix_ce, vga_clk, active, hsync_n, vsync_n, line_start, frame_start;
  logic [10:0] hcount, vcount;

  vga_timing dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (8_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc_since_ce, hs_low, pix_in_line, act_pix, lines, vs_low_lines, clk_high, clk_cycles;
  int frames, last_hs_start, active_end;
  logic prev_hs, prev_vs;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // align to a frame start
    do @(posedge clk); while (!frame_start);
    @(posedge clk);
    cyc_since_ce = 0; hs_low = 0; pix_in_line = 0; act_pix = 0; lines = 0;
    vs_low_lines = 0; frames = 0; clk_high = 0; clk_cycles = 0;
    prev_hs = 1; prev_vs = 1; active_end = -1; last_hs_start = -1;
    while (frames < 2) begin
      @(negedge clk);
      clk_cycles++;
      if (vga_clk) clk_high++;
      cyc_since_ce++;
      if (pix_ce) begin
        check(cyc_since_ce == 4 || clk_cycles < 5, $sformatf("pix_ce period %0d", cyc_since_ce));
        cyc_since_ce = 0;
        if (active) act_pix++;
        if (!hsync_n) hs_low++;
        if (prev_hs && !hsync_n) last_hs_start = pix_in_line;
        if (hcount == 11'd640 && vcount < 480) active_end = pix_in_line;
        prev_hs = hsync_n;
        pix_in_line++;
        if (line_start) begin
          check(pix_in_line == 800, $sformatf("line length %0d", pix_in_line));
          check(hs_low == 96, $sformatf("hsync width %0d", hs_low));
          check(last_hs_start == 656, $sformatf("hsync starts at pixel %0d", last_hs_start));
          if (!vsync_n) vs_low_lines++;
          pix_in_line = 0; hs_low = 0;
          lines++;
          if (frame_start) begin
            check(lines == 525, $sformatf("frame length %0d lines", lines));
            check(vs_low_lines == 2, $sformatf("vsync width %0d lines", vs_low_lines));
            check(act_pix == 640 * 480, $sformatf("active pixels %0d", act_pix));
            check(active_end == 640, "display interval is 640 pixels");
            lines = 0; vs_low_lines = 0; act_pix = 0;
            frames++;
          end
        end
      end
    end
    check((clk_high * 2 - clk_cycles) <= 1 && (clk_cycles - clk_high * 2) <= 1, $sformatf("pixel clock duty %0d/%0d", clk_high, clk_cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
