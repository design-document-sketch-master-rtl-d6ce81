// Image loader for the sketch check.
//
// On start it walks both frames in SDRAM word by word: it reads word i of the
// reference frame (ref_base + i), then word i of the student frame
// (stu_base + i), and hands the two pixel pairs they hold (low byte = left
// pixel) to the checker, left pixel first, with a valid/ready handshake. It
// repeats for all W*H/2 words of a frame and then raises done for one cycle.
//
// Interface: Avalon-MM host, one read at a time, held until waitrequest
// drops. While pause is high it starts no new word pair (a pair already
// started finishes); the top level holds it high while the display is
// fetching a line, so that the check never makes the display late. Each
// word pair costs two SDRAM reads, so throughput is bounded by the memory:
// about two pixels per ten cycles with open-row reads when not paused.
//
// The document says both images are loaded before the comparison; streaming
// them from SDRAM rather than copying them on chip is this design's choice.
module check_reader
  import sm_pkg::*;
#(
  parameter int unsigned W = FRAME_W,
  parameter int unsigned H = FRAME_H
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              pause,      // do not begin a word pair now
  input  logic [AVL_AW-1:0] ref_base,
  input  logic [AVL_AW-1:0] stu_base,
  output avl_req_t          avl_req,
  input  avl_rsp_t          avl_rsp,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [7:0]        ref_pix,
  output logic [7:0]        stu_pix,
  output logic              busy,
  output logic              done
);
  localparam int unsigned NWORDS = W * H / 2;

  typedef enum logic [2:0] {S_IDLE, S_WAIT, S_RREF, S_RSTU, S_OUT0, S_OUT1} state_t;
  state_t state;

  logic [AVL_AW-1:0] idx;
  logic [AVL_AW-1:0] rbase, sbase;
  logic [15:0]       ref_w, stu_w;

  always_comb begin
    avl_req            = AVL_REQ_IDLE;
    avl_req.byteenable = '1;
    avl_req.read       = (state == S_RREF) || (state == S_RSTU);
    avl_req.address    = (state == S_RSTU) ? sbase + idx : rbase + idx;
  end

  assign out_valid = (state == S_OUT0) || (state == S_OUT1);
  assign ref_pix   = (state == S_OUT1) ? ref_w[15:8] : ref_w[7:0];
  assign stu_pix   = (state == S_OUT1) ? stu_w[15:8] : stu_w[7:0];
  assign busy      = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      idx   <= '0;
      rbase <= '0;
      sbase <= '0;
      ref_w <= '0;
      stu_w <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          rbase <= ref_base;
          sbase <= stu_base;
          idx   <= '0;
          state <= S_WAIT;
        end
        S_RREF: if (!avl_rsp.waitrequest) begin
          ref_w <= avl_rsp.readdata;
          state <= S_RSTU;
        end
        S_RSTU: if (!avl_rsp.waitrequest) begin
          stu_w <= avl_rsp.readdata;
          state <= S_OUT0;
        end
        S_OUT0: if (out_ready) state <= S_OUT1;
        S_OUT1: if (out_ready) begin
          if (idx == AVL_AW'(NWORDS - 1)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            idx   <= idx + 1'b1;
            state <= S_WAIT;
          end
        end
        S_WAIT: if (!pause) state <= S_RREF;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
