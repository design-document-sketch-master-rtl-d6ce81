// SDRAM controller: an Avalon-MM agent (waitrequest flow control) in front of
// a single 32M x 16 SDR SDRAM (4 banks, 8192 rows, 1024 columns).
//
// How it works: after reset it waits INIT_WAIT cycles, precharges all banks,
// issues two auto-refreshes and loads the mode register (burst length 1,
// CAS latency CAS_LATENCY). It then serves one Avalon transfer at a time with
// an open-row policy: each bank remembers its open row, so a hit issues READ
// or WRITE at once, a miss precharges (if another row is open) and activates
// first. Every REFRESH_INTERVAL cycles it closes all banks and auto-refreshes.
//
// Interface: the host request (read/write/address/writedata/byteenable) must
// stay constant while waitrequest is high. waitrequest drops for exactly one
// cycle, which completes the transfer; for reads, readdata is valid in that
// cycle. Word address = {bank[1:0], row[12:0], column[9:0]}. The DQ pins are
// split into dq_o/dq_oe/dq_i; the tri-state pad is in the top level.
//
// Timing (open-row hit): a read completes 3 + CAS_LATENCY cycles after the
// request appears, a write 2 cycles after. The pin list and the 32M x 16
// organisation follow the board; the command sequencing, the open-row
// policy and all timing parameters are this design's choices, sized for a
// 100 MHz clock and a -7 speed grade part. Write recovery (tWR) of up to two
// cycles is met by construction: the controller never precharges a bank in
// the cycle after a write.
module sdram_ctrl
  import sm_pkg::*;
#(
  parameter int unsigned CAS_LATENCY      = 2,
  parameter int unsigned T_RCD            = 2,     // ACTIVE to READ/WRITE
  parameter int unsigned T_RP             = 2,     // PRECHARGE to next command
  parameter int unsigned T_RFC            = 7,     // REFRESH to next command
  parameter int unsigned T_MRD            = 2,     // MODE REGISTER to next command
  parameter int unsigned REFRESH_INTERVAL = 750,   // < 7.8 us at 100 MHz
  parameter int unsigned INIT_WAIT        = 10000  // 100 us at 100 MHz
) (
  input  logic        clk,
  input  logic        rst_n,
  // Avalon-MM agent
  input  avl_req_t    avl_req,
  output avl_rsp_t    avl_rsp,
  // SDRAM pins
  output logic [12:0] sd_addr,
  output logic [1:0]  sd_ba,
  output logic        sd_cs_n,
  output logic        sd_ras_n,
  output logic        sd_cas_n,
  output logic        sd_we_n,
  output logic        sd_cke,
  output logic        sd_ldqm,
  output logic        sd_udqm,
  output logic [15:0] sd_dq_o,
  output logic        sd_dq_oe,
  input  logic [15:0] sd_dq_i,
  // status
  output logic        init_done
);

  // {cs_n, ras_n, cas_n, we_n}
  typedef enum logic [3:0] {
    CMD_NOP   = 4'b0111,
    CMD_ACT   = 4'b0011,
    CMD_READ  = 4'b0101,
    CMD_WRITE = 4'b0100,
    CMD_PRE   = 4'b0010,
    CMD_REF   = 4'b0001,
    CMD_MRS   = 4'b0000
  } sd_cmd_t;

  typedef enum logic [3:0] {
    S_INIT_WAIT, S_INIT_PRE, S_INIT_REF1, S_INIT_REF2, S_INIT_MRS,
    S_IDLE, S_ACT, S_RW, S_RDATA, S_REF
  } state_t;

  state_t      state;
  sd_cmd_t     cmd;
  logic [15:0] timer;
  logic [15:0] ref_cnt;
  logic        ref_due;
  logic        ack;
  logic [15:0] rdata;
  logic [3:0]  bank_open;
  logic [12:0] open_row [4];

  // Request fields.
  logic [1:0]  req_bank;
  logic [12:0] req_row;
  logic [9:0]  req_col;
  logic        req_valid;
  assign req_bank  = avl_req.address[24:23];
  assign req_row   = avl_req.address[22:10];
  assign req_col   = avl_req.address[9:0];
  assign req_valid = (avl_req.read || avl_req.write) && !ack;

  localparam logic [12:0] MODE_WORD = 13'({3'b000, 1'b0, 2'b00, 3'(CAS_LATENCY), 1'b0, 3'b000});

  assign {sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n} = cmd;
  assign sd_cke          = 1'b1;
  assign avl_rsp.waitrequest = !ack;
  assign avl_rsp.readdata    = rdata;

  // Refresh request timer.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_cnt <= '0;
      ref_due <= 1'b0;
    end else begin
      if (state == S_REF && timer == 0) begin
        ref_due <= 1'b0;
      end else if (init_done && ref_cnt == 16'(REFRESH_INTERVAL - 1)) begin
        ref_due <= 1'b1;
      end
      if (!init_done || ref_cnt == 16'(REFRESH_INTERVAL - 1)) ref_cnt <= '0;
      else ref_cnt <= ref_cnt + 16'd1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_INIT_WAIT;
      cmd       <= CMD_NOP;
      timer     <= 16'(INIT_WAIT);
      ack       <= 1'b0;
      rdata     <= '0;
      bank_open <= '0;
      for (int b = 0; b < 4; b++) open_row[b] <= '0;
      sd_addr   <= '0;
      sd_ba     <= '0;
      sd_ldqm   <= 1'b1;
      sd_udqm   <= 1'b1;
      sd_dq_o   <= '0;
      sd_dq_oe  <= 1'b0;
      init_done <= 1'b0;
    end else begin
      cmd      <= CMD_NOP;
      ack      <= 1'b0;
      sd_dq_oe <= 1'b0;
      if (timer != 0) begin
        timer <= timer - 16'd1;
      end else begin
        unique case (state)
          S_INIT_WAIT: begin
            cmd         <= CMD_PRE;
            sd_addr[10] <= 1'b1;              // all banks
            timer       <= 16'(T_RP - 1);
            state       <= S_INIT_REF1;
          end
          S_INIT_REF1: begin
            cmd   <= CMD_REF;
            timer <= 16'(T_RFC - 1);
            state <= S_INIT_REF2;
          end
          S_INIT_REF2: begin
            cmd   <= CMD_REF;
            timer <= 16'(T_RFC - 1);
            state <= S_INIT_MRS;
          end
          S_INIT_MRS: begin
            cmd     <= CMD_MRS;
            sd_addr <= MODE_WORD;
            sd_ba   <= 2'b00;
            timer   <= 16'(T_MRD - 1);
            state   <= S_IDLE;
          end
          S_IDLE: begin
            init_done <= 1'b1;
            if (ref_due && !ack) begin
              if (bank_open != 0) begin
                cmd         <= CMD_PRE;
                sd_addr[10] <= 1'b1;
                timer       <= 16'(T_RP - 1);
                bank_open   <= '0;
              end
              state <= S_REF;
            end else if (req_valid) begin
              sd_ba <= req_bank;
              if (bank_open[req_bank] && open_row[req_bank] == req_row) begin
                issue_rw();
              end else if (bank_open[req_bank]) begin
                cmd         <= CMD_PRE;
                sd_addr[10] <= 1'b0;          // this bank only
                timer       <= 16'(T_RP - 1);
                bank_open[req_bank] <= 1'b0;
                state       <= S_ACT;
              end else begin
                activate();
              end
            end
          end
          S_ACT: activate();
          S_RW:  issue_rw();
          S_RDATA: begin
            rdata <= sd_dq_i;
            ack   <= 1'b1;
            state <= S_IDLE;
          end
          S_REF: begin
            cmd   <= CMD_REF;
            timer <= 16'(T_RFC - 1);
            state <= S_IDLE;
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  task automatic activate();
    cmd                 <= CMD_ACT;
    sd_addr             <= req_row;
    timer               <= 16'(T_RCD - 1);
    bank_open[req_bank] <= 1'b1;
    open_row[req_bank]  <= req_row;
    state               <= S_RW;
  endtask

  task automatic issue_rw();
    sd_addr <= {3'b000, req_col};            // A10 = 0: no auto-precharge
    if (avl_req.write) begin
      cmd      <= CMD_WRITE;
      sd_dq_o  <= avl_req.writedata;
      sd_dq_oe <= 1'b1;
      {sd_udqm, sd_ldqm} <= ~avl_req.byteenable;
      ack      <= 1'b1;
      state    <= S_IDLE;
    end else begin
      cmd      <= CMD_READ;
      {sd_udqm, sd_ldqm} <= 2'b00;
      timer    <= 16'(CAS_LATENCY);
      state    <= S_RDATA;
    end
  endtask

  // Avalon rule: a stalled request stays unchanged until it completes.
  property p_req_stable;
    @(posedge clk) disable iff (!rst_n)
      ((avl_req.read || avl_req.write) && avl_rsp.waitrequest) |=> $stable(avl_req);
  endproperty
  a_req_stable: assert property (p_req_stable);

endmodule
