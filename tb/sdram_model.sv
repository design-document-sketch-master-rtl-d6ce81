// Behavioural model of a 32M x 16 SDR SDRAM (4 banks x 8192 rows x 1024
// columns), for simulation only. It decodes the command pins on each rising
// clock edge, supports burst length 1 with the CAS latency loaded by MODE
// REGISTER SET, honours the byte masks on writes, and returns data on the
// bidirectional DQ bus CAS-latency edges after a READ. Unwritten words read
// as zero. It also checks the protocol the controller must follow and counts
// violations in `errors`: commands before initialisation, READ/WRITE to an
// idle bank, ACTIVE to an open bank, tRCD/tRP/tRFC/tMRD/tWR and the refresh
// interval. It counts refreshes and activates for the testbenches.
module sdram_model #(
  parameter int unsigned T_RCD        = 2,
  parameter int unsigned T_RP         = 2,
  parameter int unsigned T_RFC        = 7,
  parameter int unsigned T_MRD        = 2,
  parameter int unsigned T_WR         = 2,
  parameter int unsigned MAX_REF_GAP  = 800
) (
  input  logic        clk,
  input  logic        cke,
  input  logic        cs_n,
  input  logic        ras_n,
  input  logic        cas_n,
  input  logic        we_n,
  input  logic [1:0]  ba,
  input  logic [12:0] addr,
  input  logic        ldqm,
  input  logic        udqm,
  inout  wire  [15:0] dq,
  output int          errors,
  output int          refreshes,
  output int          activates
);
  logic [15:0] mem [int unsigned];
  logic [3:0]  active;
  logic [12:0] row [4];
  longint      t_act [4];
  longint      t_pre [4];
  longint      t_wr  [4];
  longint      t_ref, t_mrs, t_gap, cycle;
  int          refs_in_init;
  bit          mode_set;
  int          cl;
  logic [15:0] pipe_d [8];
  logic [7:0]  pipe_v;
  logic [15:0] dq_drive;
  logic        dq_en;

  assign dq = dq_en ? dq_drive : 'z;

  initial begin
    errors = 0; refreshes = 0; activates = 0;
    active = '0; mode_set = 0; cl = 2; cycle = 0; t_ref = -100; t_gap = 0; t_mrs = -100;
    refs_in_init = 0; pipe_v = '0; dq_en = 0; dq_drive = '0;
    for (int b = 0; b < 4; b++) begin
      t_act[b] = -100; t_pre[b] = -100; t_wr[b] = -100; row[b] = '0;
    end
  end

  function automatic void fail(string what);
    errors++;
    if (errors < 10) $display("sdram_model: %s at cycle %0d", what, cycle);
  endfunction

  always @(posedge clk) begin
    cycle++;
    // Read pipeline: pipe slot k holds data k edges after the READ.
    for (int k = 7; k > 0; k--) begin
      pipe_d[k] = pipe_d[k-1];
      pipe_v[k] = pipe_v[k-1];
    end
    pipe_v[0] = 1'b0;
    if (cke && !cs_n) begin
      unique case ({ras_n, cas_n, we_n})
        3'b011: begin // ACTIVE
          if (!mode_set) fail("ACTIVE before mode register set");
          if (active[ba]) fail("ACTIVE to open bank");
          if (cycle - t_pre[ba] < T_RP) fail("tRP violated before ACTIVE");
          if (cycle - t_ref < T_RFC) fail("tRFC violated before ACTIVE");
          if (cycle - t_mrs < T_MRD) fail("tMRD violated");
          active[ba] = 1'b1; row[ba] = addr; t_act[ba] = cycle; activates++;
        end
        3'b101, 3'b100: begin // READ / WRITE
          if (!active[ba]) fail("READ/WRITE to idle bank");
          if (cycle - t_act[ba] < T_RCD) fail("tRCD violated");
          if (addr[10]) fail("auto-precharge not expected");
          if (we_n) begin
            pipe_d[0] = mem.exists({ba, row[ba], addr[9:0]}) ? mem[{ba, row[ba], addr[9:0]}] : 16'h0;
            pipe_v[0] = 1'b1;
          end else begin
            logic [15:0] old;
            old = mem.exists({ba, row[ba], addr[9:0]}) ? mem[{ba, row[ba], addr[9:0]}] : 16'h0;
            if (!ldqm) old[7:0]  = dq[7:0];
            if (!udqm) old[15:8] = dq[15:8];
            mem[{ba, row[ba], addr[9:0]}] = old;
            t_wr[ba] = cycle;
          end
        end
        3'b010: begin // PRECHARGE
          for (int b = 0; b < 4; b++) begin
            if (addr[10] || ba == 2'(b)) begin
              if (active[b] && cycle - t_wr[b] < T_WR) fail("tWR violated");
              active[b] = 1'b0; t_pre[b] = cycle;
            end
          end
        end
        3'b001: begin // AUTO REFRESH
          if (active != 0) fail("REFRESH with open bank");
          for (int b = 0; b < 4; b++) if (cycle - t_pre[b] < T_RP) fail("tRP violated before REFRESH");
          if (cycle - t_ref < T_RFC) fail("tRFC violated between refreshes");
          if (mode_set && cycle - t_gap > MAX_REF_GAP) fail("refresh interval exceeded");
          if (!mode_set) refs_in_init++;
          t_ref = cycle; t_gap = cycle; refreshes++;
        end
        3'b000: begin // MODE REGISTER SET
          if (active != 0) fail("MRS with open bank");
          if (refs_in_init < 2) fail("MRS before two refreshes");
          if (cycle - t_ref < T_RFC) fail("tRFC violated before MRS");
          cl = int'(addr[6:4]); mode_set = 1; t_mrs = cycle; t_gap = cycle;
          if (addr[2:0] != 3'b000) fail("burst length other than 1");
        end
        default: ;
      endcase
    end
    if (mode_set && cycle - t_gap > MAX_REF_GAP + 1 && (cycle - t_gap) % 1000 == 0)
      fail("no refresh");
    // Drive DQ so that data is valid at edge READ + CL.
    dq_en    <= pipe_v[cl-1];
    dq_drive <= pipe_d[cl-1];
  end
endmodule
