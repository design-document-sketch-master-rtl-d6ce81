// Self-checking testbench of the Avalon arbiter with three hosts and a
// behavioural memory agent that inserts random wait states. Each host writes
// and reads back its own address range at random; every read must return what
// that host wrote, the agent must see exactly as many transfers as the hosts
// complete, a request must never change while it is on the agent, and when
// hosts 0 and 2 request in the same idle cycle host 0 must be served first.
module tb_avl_arbiter;
  import sm_pkg::*;

  localparam int N = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  avl_req_t hreq [N];
  avl_rsp_t hrsp [N];
  avl_req_t areq;
  avl_rsp_t arsp;

  avl_arbiter #(.N_HOSTS(N)) dut (.clk, .rst_n, .host_req(hreq), .host_rsp(hrsp),
                                  .agent_req(areq), .agent_rsp(arsp));

  // memory agent
  logic [15:0] mem [1024];
  int wcnt = 0, want = 0, agent_done = 0;
  avl_req_t held;
  always @(posedge clk) begin
    if ((areq.read || areq.write) && arsp.waitrequest) begin
      wcnt <= wcnt + 1;
    end else begin
      if (areq.write && !arsp.waitrequest) mem[areq.address[9:0]] <= areq.writedata;
      if ((areq.read || areq.write) && !arsp.waitrequest) agent_done <= agent_done + 1;
      wcnt <= 0;
      want <= $urandom_range(0, 4);
    end
  end
  assign arsp.waitrequest = !((areq.read || areq.write) && wcnt >= want);
  assign arsp.readdata    = mem[areq.address[9:0]];

  int checks = 0, failures = 0, host_done = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // request stability while stalled
  always @(posedge clk) begin
    if (rst_n && (areq.read || areq.write) && arsp.waitrequest) held <= areq;
    else held <= '0;
  end
  always @(negedge clk) begin
    if (rst_n && (held.read || held.write) && (areq.read || areq.write))
      check(areq == held, "request on the agent changed while stalled");
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic xfer(int h, bit wr, logic [9:0] a, logic [15:0] d, output logic [15:0] q);
    @(negedge clk);
    hreq[h].read = !wr; hreq[h].write = wr; hreq[h].address = 25'(a);
    hreq[h].writedata = d; hreq[h].byteenable = 2'b11;
    do @(posedge clk); while (hrsp[h].waitrequest);
    q = hrsp[h].readdata;
    host_done++;
    @(negedge clk);
    hreq[h].read = 0; hreq[h].write = 0;
  endtask

  task automatic host_proc(int h);
    logic [15:0] shadow [64];
    logic [15:0] q;
    for (int i = 0; i < 64; i++) xfer(h, 1, 10'(h * 64 + i), 16'(h * 1000 + i), q);
    for (int i = 0; i < 64; i++) shadow[i] = 16'(h * 1000 + i);
    for (int k = 0; k < 300; k++) begin
      int i = $urandom_range(0, 63);
      if ($urandom_range(0, 1) == 1) begin
        logic [15:0] d = 16'($urandom);
        xfer(h, 1, 10'(h * 64 + i), d, q);
        shadow[i] = d;
      end else begin
        xfer(h, 0, 10'(h * 64 + i), 0, q);
        check(q == shadow[i], $sformatf("host %0d read %0d got %h exp %h", h, i, q, shadow[i]));
      end
      repeat ($urandom_range(0, 3)) @(posedge clk);
    end
  endtask

  initial begin
    logic [15:0] q0, q2;
    for (int h = 0; h < N; h++) hreq[h] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      host_proc(0);
      host_proc(1);
      host_proc(2);
    join
    repeat (5) @(posedge clk);
    check(agent_done == host_done, $sformatf("agent saw %0d transfers, hosts %0d", agent_done, host_done));
    // priority: hosts 0 and 2 request together on an idle bus
    @(negedge clk);
    hreq[2].read = 1; hreq[2].address = 25'd130;
    hreq[0].read = 1; hreq[0].address = 25'd5;
    @(posedge clk);
    #1 check(areq.address == 25'd5, "host 0 has priority over host 2");
    do @(posedge clk); while (hrsp[0].waitrequest);
    @(negedge clk); hreq[0].read = 0;
    #1 check(areq.address == 25'd130, "host 2 served next");
    do @(posedge clk); while (hrsp[2].waitrequest);
    @(negedge clk); hreq[2].read = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
