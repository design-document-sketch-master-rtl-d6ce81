// Seven-segment readout of the sketch grade.
//
// HEX5 shows the letter grade (A, b, C, d or F), HEX4 and HEX3 are dark, and
// HEX2..HEX0 show the score 0..100 in decimal with leading zeros blanked.
// Before the first result (valid low) HEX2..HEX0 show dashes and HEX5 is dark.
// Segments are active low, bit 0 = segment a ... bit 6 = segment g, as on the
// board's displays. The outputs are combinational.
//
// The document names the 7-segment display as the place the grade is printed;
// the layout of the six digits is this design's choice.
module seg7_display
  import sm_pkg::*;
(
  input  logic       valid,
  input  logic [6:0] score,
  input  grade_t     grade,
  output logic [6:0] hex0,
  output logic [6:0] hex1,
  output logic [6:0] hex2,
  output logic [6:0] hex3,
  output logic [6:0] hex4,
  output logic [6:0] hex5
);
  localparam logic [6:0] SEG_OFF  = 7'b1111111;
  localparam logic [6:0] SEG_DASH = 7'b0111111;

  function automatic logic [6:0] digit(input logic [3:0] d);
    unique case (d)
      4'd0: return 7'b1000000;
      4'd1: return 7'b1111001;
      4'd2: return 7'b0100100;
      4'd3: return 7'b0110000;
      4'd4: return 7'b0011001;
      4'd5: return 7'b0010010;
      4'd6: return 7'b0000010;
      4'd7: return 7'b1111000;
      4'd8: return 7'b0000000;
      4'd9: return 7'b0010000;
      default: return SEG_OFF;
    endcase
  endfunction

  function automatic logic [6:0] letter(input grade_t g);
    unique case (g)
      GRADE_A: return 7'b0001000;   // A
      GRADE_B: return 7'b0000011;   // b
      GRADE_C: return 7'b1000110;   // C
      GRADE_D: return 7'b0100001;   // d
      default: return 7'b0001110;   // F
    endcase
  endfunction

  logic [3:0] hundreds, tens, ones;
  logic [6:0] rest;
  always_comb begin
    hundreds = (score >= 7'd100) ? 4'd1 : 4'd0;
    rest     = (score >= 7'd100) ? score - 7'd100 : score;
    tens     = 4'(rest / 7'd10);
    ones     = 4'(rest % 7'd10);
    if (valid) begin
      hex5 = letter(grade);
      hex2 = (hundreds != 0) ? digit(hundreds) : SEG_OFF;
      hex1 = (hundreds != 0 || tens != 0) ? digit(tens) : SEG_OFF;
      hex0 = digit(ones);
    end else begin
      hex5 = SEG_OFF;
      hex2 = SEG_DASH;
      hex1 = SEG_DASH;
      hex0 = SEG_DASH;
    end
    hex4 = SEG_OFF;
    hex3 = SEG_OFF;
  end
endmodule
