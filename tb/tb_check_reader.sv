// Self-checking testbench of the check image loader on an 8 x 4 frame.
// A behavioural Avalon memory with random wait states holds a reference frame
// and a student frame at two bases; a consumer with random back-pressure
// collects the pixel pairs. The pairs must arrive in raster order with the
// right bytes (left pixel = low byte), exactly W*H of them, and done must
// pulse once at the end. No word pair may begin (with its reference read) while pause is high.
module tb_check_reader;
  import sm_pkg::*;

  localparam int W = 8, H = 4;
  localparam logic [AVL_AW-1:0] RB = 25'h200, SB = 25'h1000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, out_valid, out_ready, busy, done, pause;
  int   paused_reads = 0;
  logic [7:0] ref_pix, stu_pix;
  avl_req_t req;
  avl_rsp_t rsp;

  check_reader #(.W(W), .H(H)) dut (.clk, .rst_n, .start, .pause, .ref_base(RB), .stu_base(SB),
    .avl_req(req), .avl_rsp(rsp), .out_valid, .out_ready, .ref_pix, .stu_pix, .busy, .done);

  function automatic logic [15:0] mem_word(logic [AVL_AW-1:0] a);
    return 16'(a * 16'h3B1 + 16'h55);
  endfunction

  int wcnt = 0, want = 0;
  always @(posedge clk) begin
    if (req.read && rsp.waitrequest) wcnt <= wcnt + 1;
    else begin wcnt <= 0; want <= $urandom_range(0, 3); end
  end
  assign rsp.waitrequest = !(req.read && wcnt >= want);
  assign rsp.readdata    = mem_word(req.address);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n = 0, dones = 0;
  always @(negedge clk) out_ready = ($urandom_range(0, 3) != 0);
  // pause in long stretches; no read may begin while paused
  int pcnt = 0;
  always @(negedge clk) begin pcnt++; pause = (pcnt % 60) < 25; end
  logic prev_read = 0;
  always @(posedge clk) begin
    if (req.read && !prev_read && pause && req.address < SB) paused_reads++;
    prev_read <= req.read && rsp.waitrequest;
  end
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      logic [15:0] rw, sw;
      rw = mem_word(RB + 25'(n / 2));
      sw = mem_word(SB + 25'(n / 2));
      check(ref_pix == (n % 2 ? rw[15:8] : rw[7:0]), $sformatf("ref pixel %0d", n));
      check(stu_pix == (n % 2 ? sw[15:8] : sw[7:0]), $sformatf("student pixel %0d", n));
      n++;
    end
    if (rst_n && done) dones++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    check(busy, "busy after start");
    wait (dones == 1);
    repeat (10) @(posedge clk);
    check(n == W * H, $sformatf("pixel pairs %0d", n));
    check(dones == 1 && !busy, "one done pulse, idle after");
    check(paused_reads == 0, $sformatf("%0d reads began while paused", paused_reads));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
