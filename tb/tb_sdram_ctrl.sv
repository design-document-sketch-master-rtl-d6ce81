// Self-checking testbench of the SDRAM controller against the SDRAM model.
// It performs random byte-masked writes and reads over a few rows in all
// banks (row hits, row misses, bank conflicts), compares every read with a
// reference memory, checks the open-row read and write latencies, and
// requires that the model saw no protocol violation and that refreshes
// happened.
module tb_sdram_ctrl;
  import sm_pkg::*;

  localparam int unsigned CL = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  avl_req_t req;
  avl_rsp_t rsp;
  logic [12:0] sd_addr;
  logic [1:0]  sd_ba;
  logic sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n, sd_cke, sd_ldqm, sd_udqm, init_done;
  logic [15:0] dq_o;
  logic        dq_oe;
  wire  [15:0] dq;
  int          m_errors, m_refs, m_acts;

  assign dq = dq_oe ? dq_o : 'z;

  sdram_ctrl #(.CAS_LATENCY(CL), .INIT_WAIT(100)) dut (
    .clk, .rst_n, .avl_req(req), .avl_rsp(rsp),
    .sd_addr, .sd_ba, .sd_cs_n, .sd_ras_n, .sd_cas_n, .sd_we_n, .sd_cke,
    .sd_ldqm, .sd_udqm, .sd_dq_o(dq_o), .sd_dq_oe(dq_oe), .sd_dq_i(dq), .init_done);

  sdram_model mem (
    .clk, .cke(sd_cke), .cs_n(sd_cs_n), .ras_n(sd_ras_n), .cas_n(sd_cas_n),
    .we_n(sd_we_n), .ba(sd_ba), .addr(sd_addr), .ldqm(sd_ldqm), .udqm(sd_udqm),
    .dq, .errors(m_errors), .refreshes(m_refs), .activates(m_acts));

  int checks = 0, failures = 0;
  logic [15:0] ref_mem [int unsigned];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // One Avalon transfer; returns cycles from request to completion edge.
  task automatic xfer(input bit wr, input logic [24:0] a, input logic [15:0] d,
                      input logic [1:0] be, output logic [15:0] q, output int cyc);
    cyc = 0;
    @(negedge clk);
    req.read = !wr; req.write = wr; req.address = a;
    req.writedata = d; req.byteenable = be;
    do begin
      @(posedge clk);
      cyc++;
    end while (rsp.waitrequest);
    q = rsp.readdata;
    @(negedge clk);
    req.read = 0; req.write = 0;
  endtask

  function automatic logic [24:0] rand_addr();
    return {2'($urandom_range(0, 3)), 13'($urandom_range(0, 2)), 10'($urandom_range(0, 15))};
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] q, exp, d;
    logic [24:0] a;
    logic [1:0]  be;
    int cyc;
    req = '0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    wait (init_done);
    @(posedge clk);
    // random traffic
    for (int i = 0; i < 3000; i++) begin
      a = rand_addr();
      exp = ref_mem.exists(a) ? ref_mem[a] : 16'h0;
      if ($urandom_range(0, 1) == 1) begin
        d  = 16'($urandom);
        be = 2'($urandom_range(1, 3));
        xfer(1, a, d, be, q, cyc);
        if (be[0]) exp[7:0]  = d[7:0];
        if (be[1]) exp[15:8] = d[15:8];
        ref_mem[a] = exp;
      end else begin
        xfer(0, a, 16'h0, 2'b11, q, cyc);
        check(q == exp, $sformatf("read %h got %h exp %h", a, q, exp));
      end
      if ($urandom_range(0, 3) == 0) @(posedge clk);
    end
    // latency of row hits: same row twice
    xfer(0, 25'h0000010, 0, 2'b11, q, cyc);
    xfer(0, 25'h0000011, 0, 2'b11, q, cyc);
    check(cyc == 3 + CL, $sformatf("row-hit read latency %0d", cyc));
    xfer(1, 25'h0000012, 16'h1234, 2'b11, q, cyc);
    check(cyc == 2, $sformatf("row-hit write latency %0d", cyc));
    xfer(0, 25'h0000012, 0, 2'b11, q, cyc);
    check(q == 16'h1234, "read after write");
    check(m_refs > 10, $sformatf("refreshes seen: %0d", m_refs));
    check(m_errors == 0, $sformatf("SDRAM protocol errors: %0d", m_errors));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
