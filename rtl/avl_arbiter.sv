// Avalon-MM arbiter: lets N_HOSTS hosts share one agent (the SDRAM
// controller).
//
// Fixed priority, host 0 highest. A host that has been granted keeps the
// agent until its transfer completes (agent waitrequest low), so a
// higher-priority request never cuts into a transfer in progress; the grant
// decision itself is combinational, so an idle agent costs no extra cycle.
// Hosts that are not granted see waitrequest high and simply wait, as the
// Avalon rules allow.
//
// The document names the Avalon bus and its waitrequest rules; the fixed
// priority order (display first, then the HPS, then the checker in the top
// level) is this design's choice, made so that scan-out is never starved.
module avl_arbiter
  import sm_pkg::*;
#(
  parameter int unsigned N_HOSTS = 3
) (
  input  logic     clk,
  input  logic     rst_n,
  input  avl_req_t host_req [N_HOSTS],
  output avl_rsp_t host_rsp [N_HOSTS],
  output avl_req_t agent_req,
  input  avl_rsp_t agent_rsp
);
  localparam int unsigned IW = (N_HOSTS > 1) ? $clog2(N_HOSTS) : 1;

  logic          locked;
  logic [IW-1:0] owner;
  logic          any_req;
  logic [IW-1:0] pick;
  logic [IW-1:0] grant;

  always_comb begin
    any_req = 1'b0;
    pick    = '0;
    for (int i = N_HOSTS - 1; i >= 0; i--) begin
      if (host_req[i].read || host_req[i].write) begin
        any_req = 1'b1;
        pick    = IW'(i);
      end
    end
  end

  assign grant = locked ? owner : pick;

  always_comb begin
    agent_req = (locked || any_req) ? host_req[grant] : AVL_REQ_IDLE;
    for (int i = 0; i < N_HOSTS; i++) begin
      host_rsp[i].readdata    = agent_rsp.readdata;
      host_rsp[i].waitrequest = !((locked || any_req) && grant == IW'(i)) || agent_rsp.waitrequest;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked <= 1'b0;
      owner  <= '0;
    end else if (locked || any_req) begin
      locked <= agent_rsp.waitrequest;   // release when the transfer completes
      owner  <= grant;
    end
  end

  // A granted host must hold its request until it completes.
  property p_hold;
    @(posedge clk) disable iff (!rst_n)
      locked |-> (host_req[owner].read || host_req[owner].write);
  endproperty
  a_hold: assert property (p_hold);

endmodule
