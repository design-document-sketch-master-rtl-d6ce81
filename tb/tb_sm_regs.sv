// Self-checking testbench of the processor register block: reset values,
// base-address write/read-back, the one-cycle check start pulse (and that it
// is refused while a check is busy), the result-valid flag, and read-back of
// every status and result register.
module tb_sm_regs;
  import sm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0]  address;
  logic        read, write, waitrequest;
  logic [31:0] writedata, readdata;
  logic        check_start, result_valid;
  logic [AVL_AW-1:0] fb_base, ref_base, stu_base;
  logic        check_busy, check_done, sdram_ready;
  logic [6:0]  score;
  grade_t      grade;
  logic [31:0] matched, ref_count, penalty, mismatch, underruns;

  sm_regs dut (.*);

  int checks = 0, failures = 0, starts = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (check_start) starts++;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int a, logic [31:0] d);
    @(negedge clk); address = 4'(a); write = 1; writedata = d;
    @(negedge clk); write = 0;
  endtask
  task automatic rd(int a, output logic [31:0] d);
    @(negedge clk); address = 4'(a); read = 1;
    #1 d = readdata;
    check(!waitrequest, "no wait states");
    @(negedge clk); read = 0;
  endtask

  initial begin
    logic [31:0] d;
    address = 0; read = 0; write = 0; writedata = 0;
    check_busy = 0; check_done = 0; sdram_ready = 1; score = 7'd87; grade = GRADE_B;
    matched = 111; ref_count = 222; penalty = 33; mismatch = 44; underruns = 5;
    repeat (3) @(posedge clk);
    rst_n = 1;
    rd(2, d); check(d == 0, "FB_BASE reset");
    rd(3, d); check(d == 32'h800000, "REF_BASE reset");
    rd(4, d); check(d == 0, "STU_BASE reset");
    wr(2, 32'h12345); wr(3, 32'h0ABCDE); wr(4, 32'h1FFFFFF);
    rd(2, d); check(d == 32'h12345 && fb_base == 25'h12345, "FB_BASE");
    rd(3, d); check(d == 32'h0ABCDE && ref_base == 25'h0ABCDE, "REF_BASE");
    rd(4, d); check(d == 32'h1FFFFFF && stu_base == 25'h1FFFFFF, "STU_BASE");
    rd(1, d); check(d == 32'b100, "STATUS idle, no result, SDRAM ready");
    wr(0, 1);
    repeat (2) @(posedge clk);
    #1 check(starts == 1, "start pulse");
    check_busy = 1;
    wr(0, 1);
    repeat (2) @(posedge clk);
    #1 check(starts == 1, "start refused while busy");
    rd(1, d); check(d == 32'b101, "STATUS busy");
    @(negedge clk); check_done = 1; check_busy = 0; @(negedge clk); check_done = 0;
    check(result_valid, "result valid after done");
    rd(1, d); check(d == 32'b110, "STATUS result valid");
    rd(5, d); check(d == {21'd0, 3'd1, 1'b0, 7'd87}, "RESULT");
    rd(6, d); check(d == 111, "MATCHED");
    rd(7, d); check(d == 222, "REF_COUNT");
    rd(8, d); check(d == 33, "PENALTY");
    rd(9, d); check(d == 44, "MISMATCH");
    rd(10, d); check(d == 5, "UNDERRUNS");
    rd(12, d); check(d == 0, "unused address");
    wr(0, 1);
    repeat (2) @(posedge clk);
    #1 check(starts == 2 && !result_valid, "new start clears result valid");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
