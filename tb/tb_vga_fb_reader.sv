// Self-checking testbench of the frame-buffer scan-out, at a reduced raster
// (40 x 6 visible) so that several frames simulate quickly. A behavioural
// Avalon memory with random wait states stands in for the SDRAM; its word at
// address a is a fixed function of a. Every visible pixel on the DAC outputs
// is compared with the colour expected at that raster position (red x17,
// green and blue x85 expansion of the 4:2:2 byte), blanked pixels must be
// black, the frame base switch must take effect at the next frame, and a
// period of very slow memory must be reported as line underruns.
module tb_vga_fb_reader;
  import sm_pkg::*;

  localparam int unsigned HA = 40, VA = 6, VT = 9;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        pix_ce, vga_clk, active, hsync_n, vsync_n, line_start, frame_start;
  logic [10:0] hcount, vcount;
  avl_req_t    req;
  avl_rsp_t    rsp;
  logic [7:0]  r, g, b;
  logic        hs, vs, blank_n, sync_n;
  logic [31:0] underruns;
  logic [AVL_AW-1:0] fb_base;

  vga_timing #(.H_ACTIVE(HA), .H_FP(2), .H_SYNC(4), .H_BP(2),
               .V_ACTIVE(VA), .V_FP(1), .V_SYNC(1), .V_BP(1)) tim (.*);

  vga_fb_reader #(.H_ACTIVE(HA), .V_ACTIVE(VA), .V_TOTAL(VT)) dut (
    .clk, .rst_n, .fb_base, .pix_ce, .hcount, .vcount, .active, .hsync_n,
    .vsync_n, .line_start, .avl_req(req), .avl_rsp(rsp),
    .vga_r(r), .vga_g(g), .vga_b(b), .vga_hs(hs), .vga_vs(vs),
    .vga_blank_n(blank_n), .vga_sync_n(sync_n), .underruns);

  function automatic logic [15:0] mem_word(logic [AVL_AW-1:0] a);
    return 16'((a * 32'h9E37) ^ (a >> 3));
  endfunction

  // Avalon memory with random wait states (max_wait cycles).
  int max_wait = 3;
  int wcnt = 0;
  always_ff @(posedge clk) begin
    if (req.read && rsp.waitrequest) wcnt <= wcnt + 1;
    else wcnt <= 0;
  end
  logic [5:0] want;
  always_ff @(posedge clk) if (!(req.read && rsp.waitrequest)) want <= 6'($urandom_range(0, max_wait));
  assign rsp.waitrequest = !(req.read && wcnt >= int'(want));
  assign rsp.readdata    = mem_word(req.address);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output raster position: the outputs registered at a pix_ce edge show the
  // counter values that were in effect before that edge.
  int ox, oy, frame;
  logic [AVL_AW-1:0] cur_base, next_base;
  bit   checking;
  logic [7:0] p;
  logic [15:0] w;

  initial begin
    fb_base = 25'h100;
    cur_base = 25'h100;
    checking = 0;
    frame = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    forever begin
      @(posedge clk);
      if (pix_ce) begin
        // values presented after this edge belong to the counters seen now
        #1;
        if (checking && blank_n) begin
          w = mem_word(cur_base + 25'(oy * (HA / 2) + ox / 2));
          p = ox[0] ? w[15:8] : w[7:0];
          check(r == 8'(p[7:4] * 17) && g == 8'(p[3:2] * 85) && b == 8'(p[1:0] * 85),
                $sformatf("pixel (%0d,%0d) frame %0d: %h%h%h byte %h", ox, oy, frame, r, g, b, p));
        end else if (checking) begin
          check(r == 0 && g == 0 && b == 0, "blanked pixel is black");
        end
        // counters now in effect are what the next pix_ce registers
        ox = int'(hcount);
        oy = int'(vcount);
      end
    end
  end

  initial begin
    ox = 0; oy = 0;
    // The first pix_ce after reset outputs position (0,0).
    wait (rst_n);
    // frame 0 has no prefetched line 0; start checking at frame 1
    repeat (2) begin
      do @(posedge clk); while (!frame_start);
    end
    checking = 1;
    frame = 1;
    do @(posedge clk); while (!frame_start);
    frame = 2;
    check(underruns == 1, $sformatf("only the first frame's line 0 underran: %0d", underruns));
    // change base: takes effect at the start of the frame after this one
    fb_base = 25'h3000;
    do @(posedge clk); while (!frame_start);
    cur_base = 25'h3000;
    frame = 3;
    do @(posedge clk); while (!frame_start);
    frame = 4;
    // slow memory: lines cannot be fetched in time
    checking = 0;
    max_wait = 40;
    repeat (2) do @(posedge clk); while (!frame_start);
    check(underruns > 3, $sformatf("slow memory gives underruns: %0d", underruns));
    check(sync_n == 1'b0, "sync-on-green off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
