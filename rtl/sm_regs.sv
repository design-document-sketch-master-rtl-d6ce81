// Control and status registers seen by the ARM processor.
//
// A 32-bit Avalon-MM agent with word addresses, zero wait states (readdata is
// combinational from address in the read cycle, waitrequest always low):
//   0 CTRL      write 1 to bit 0 to start a sketch check (self-clearing)
//   1 STATUS    bit 0 check busy, bit 1 result valid, bit 2 SDRAM ready
//   2 FB_BASE   word address of the frame shown on the VGA port (R/W)
//   3 REF_BASE  word address of the reference frame (R/W)
//   4 STU_BASE  word address of the student's frame (R/W)
//   5 RESULT    bits 6:0 score, bits 10:8 grade (0 = A ... 4 = F)
//   6 MATCHED   7 REF_COUNT   8 PENALTY   9 MISMATCH   10 UNDERRUNS
// Other addresses read as zero. result_valid is set when a check finishes
// and cleared when the next one starts.
//
// The document connects the processor to the FPGA through its bridges but
// does not define a register map: the map and the reset values (the student
// draws in frame 0, which is also displayed; the reference is in bank 1, 0x800000 words
// further on, so the checker's alternating reads hit open rows) are this design's choices.
module sm_regs
  import sm_pkg::*;
#(
  parameter logic [AVL_AW-1:0] FB_BASE_RESET  = '0,
  parameter logic [AVL_AW-1:0] REF_BASE_RESET = AVL_AW'(32'h0080_0000),
  parameter logic [AVL_AW-1:0] STU_BASE_RESET = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [3:0]        address,
  input  logic              read,
  input  logic              write,
  input  logic [31:0]       writedata,
  output logic [31:0]       readdata,
  output logic              waitrequest,
  // to the design
  output logic              check_start,
  output logic [AVL_AW-1:0] fb_base,
  output logic [AVL_AW-1:0] ref_base,
  output logic [AVL_AW-1:0] stu_base,
  output logic              result_valid,
  // from the design
  input  logic              check_busy,
  input  logic              check_done,
  input  logic              sdram_ready,
  input  logic [6:0]        score,
  input  grade_t            grade,
  input  logic [31:0]       matched,
  input  logic [31:0]       ref_count,
  input  logic [31:0]       penalty,
  input  logic [31:0]       mismatch,
  input  logic [31:0]       underruns
);
  assign waitrequest = 1'b0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      check_start  <= 1'b0;
      fb_base      <= FB_BASE_RESET;
      ref_base     <= REF_BASE_RESET;
      stu_base     <= STU_BASE_RESET;
      result_valid <= 1'b0;
    end else begin
      check_start <= write && address == 4'd0 && writedata[0] && !check_busy;
      if (write) begin
        unique case (address)
          4'd2: fb_base  <= writedata[AVL_AW-1:0];
          4'd3: ref_base <= writedata[AVL_AW-1:0];
          4'd4: stu_base <= writedata[AVL_AW-1:0];
          default: ;
        endcase
      end
      if (check_start)     result_valid <= 1'b0;
      else if (check_done) result_valid <= 1'b1;
    end
  end

  always_comb begin
    readdata = '0;
    if (read) begin
      unique case (address)
        4'd1:  readdata = {29'd0, sdram_ready, result_valid, check_busy};
        4'd2:  readdata = 32'(fb_base);
        4'd3:  readdata = 32'(ref_base);
        4'd4:  readdata = 32'(stu_base);
        4'd5:  readdata = {21'd0, grade, 1'b0, score};
        4'd6:  readdata = matched;
        4'd7:  readdata = ref_count;
        4'd8:  readdata = penalty;
        4'd9:  readdata = mismatch;
        4'd10: readdata = underruns;
        default: readdata = '0;
      endcase
    end
  end
endmodule
