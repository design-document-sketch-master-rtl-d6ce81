// Sketch check: grades a student's tracing against the reference outline.
//
// Both images arrive as one stream of pixel pairs (reference, student) in
// raster order, W x H. Each pixel is reduced to one bit, "ink", when its value
// differs from the background colour BG. The block then:
//   * counts pixels where the two ink bits differ (the absolute difference of
//     the two binary images), reported as mismatch;
//   * for every reference ink pixel, finds the Euclidean distance d to the
//     nearest student ink pixel within a (2R+1) x (2R+1) window, d rounded
//     down and capped at R+1 when none is found. d <= TOL counts the pixel as
//     correct (matched); otherwise penalty grows by d - TOL;
//   * scores score = 100 * (matched - penalty) / ref_count, clamped to 0..100,
//     and grades it A/B/C/D/F against the thresholds below.
//
// How it works: a line buffer keeps the last 2R rows of both ink bits and a
// window register holds the (2R+1) x (2R+1) neighbourhood; the centre lags the
// input by R rows and R columns. Each row is padded with R blank columns and
// the image with R blank rows, which the block inserts itself, so one check
// takes (H+R) x (W+R) window steps plus the input stall cycles and a 32-cycle
// division. Per-cell distances are constants computed at elaboration, so
// there is no square root in hardware.
//
// Interface: pulse start, then offer pixel pairs with in_valid; a pair is taken
// in a cycle where in_valid and in_ready are both high. busy is high from start
// until done pulses; the results hold until the next start.
//
// The steps (binary outlines, absolute difference, distance penalty beyond a
// tolerance of 'x' pixels, score as percentage correct minus penalty, grade)
// follow the document's check algorithm. The window search, the distance cap,
// expressing the penalty in the same per-cent-of-reference units as the
// correct count, the ink test and the grade thresholds are this design's
// choices.
module sketch_checker
  import sm_pkg::*;
#(
  parameter int unsigned W       = FRAME_W,
  parameter int unsigned H       = FRAME_H,
  parameter int unsigned R       = 3,      // search radius in pixels
  parameter int unsigned TOL     = 1,      // tolerated distance ('x' pixels)
  parameter logic [7:0]  BG      = 8'h00,  // background colour (not ink)
  parameter int unsigned GRADE_A_MIN = 90,
  parameter int unsigned GRADE_B_MIN = 80,
  parameter int unsigned GRADE_C_MIN = 70,
  parameter int unsigned GRADE_D_MIN = 60
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [7:0]  ref_pix,
  input  logic [7:0]  stu_pix,
  output logic        busy,
  output logic        done,
  output logic [31:0] ref_count,
  output logic [31:0] matched,
  output logic [31:0] penalty,
  output logic [31:0] mismatch,
  output logic [6:0]  score,
  output grade_t      grade
);
  localparam int unsigned N  = 2 * R + 1;      // window size
  localparam int unsigned RW = W + R;          // padded row length
  localparam int unsigned RH = H + R;          // padded row count
  localparam int unsigned DW = $clog2(R + 2);  // distance width
  localparam int unsigned LB = 2 * (N - 1);    // line buffer width (2 bits x 2R rows)
  localparam int unsigned XW = $clog2(RW);

  function automatic int unsigned isqrt(int unsigned v);
    int unsigned r = 0;
    while ((r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction

  function automatic int unsigned cell_dist(int unsigned dy, int unsigned dx);
    int unsigned ddy = (dy > R) ? dy - R : R - dy;
    int unsigned ddx = (dx > R) ? dx - R : R - dx;
    int unsigned d   = isqrt(ddy * ddy + ddx * ddx);
    return (d > R + 1) ? R + 1 : d;
  endfunction

  typedef enum logic [1:0] {P_IDLE, P_SCAN, P_DIV} phase_t;
  phase_t phase;

  logic [10:0] xi, yi;          // position of the next window step
  logic        step;            // window advances this cycle
  logic        from_input;      // this step takes an input pair
  logic [1:0]  new_bits;        // {ref, stu} ink of the entering pixel
  logic [LB-1:0] linebuf [RW];
  logic [LB-1:0] lb_rd;
  logic [1:0]  win [N][N];      // [row back][column back]
  logic        win_valid;
  logic [10:0] wx, wy;          // position of win[0][0]

  assign from_input = (xi < 11'(W)) && (yi < 11'(H));
  assign in_ready   = (phase == P_SCAN) && from_input;
  assign step       = (phase == P_SCAN) && (yi < 11'(RH)) && (!from_input || in_valid);
  assign new_bits   = from_input ? {ref_pix != BG, stu_pix != BG} : 2'b00;
  assign lb_rd      = linebuf[xi[XW-1:0]];

  always_ff @(posedge clk) begin
    if (step) linebuf[xi[XW-1:0]] <= {lb_rd[LB-3:0], new_bits};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xi <= '0; yi <= '0; wx <= '0; wy <= '0; win_valid <= 1'b0;
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) win[r][c] <= 2'b00;
    end else begin
      win_valid <= step;
      if (start) begin
        xi <= '0;
        yi <= '0;
      end else if (step) begin
        // shift the window one column and enter the new column
        for (int r = 0; r < N; r++)
          for (int c = N - 1; c > 0; c--) win[r][c] <= win[r][c-1];
        win[0][0] <= new_bits;
        for (int r = 1; r < N; r++) win[r][0] <= lb_rd[2*r-1 -: 2];
        wx <= xi;
        wy <= yi;
        if (xi == 11'(RW - 1)) begin
          xi <= '0;
          yi <= yi + 11'd1;
        end else begin
          xi <= xi + 11'd1;
        end
      end
    end
  end

  // Centre evaluation on the registered window. Cell [r][c] is the pixel at
  // (wx - c, wy - r); the centre [R][R] is (wx - R, wy - R).
  logic          centre_ok, ref_c, stu_c;
  logic [DW-1:0] dmin;
  always_comb begin
    centre_ok = win_valid && (wx >= 11'(R)) && (wy >= 11'(R));
    ref_c     = win[R][R][1];
    stu_c     = win[R][R][0];
    dmin      = DW'(R + 1);
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        if (win[r][c][0] && (11'(c) <= wx) && (11'(c) + 11'(W) > wx) && (11'(r) <= wy) &&
            DW'(cell_dist(r, c)) < dmin)
          dmin = DW'(cell_dist(r, c));
  end

  // Score division: 100 * (matched - penalty) / ref_count, restoring.
  logic [31:0] num, quo, rem;
  logic [5:0]  div_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= P_IDLE;
      busy  <= 1'b0; done <= 1'b0;
      ref_count <= '0; matched <= '0; penalty <= '0; mismatch <= '0;
      score <= '0; grade <= GRADE_F;
      num <= '0; quo <= '0; rem <= '0; div_i <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        phase <= P_SCAN;
        busy  <= 1'b1;
        ref_count <= '0; matched <= '0; penalty <= '0; mismatch <= '0;
      end else begin
        if (centre_ok) begin
          if (ref_c != stu_c) mismatch <= mismatch + 32'd1;
          if (ref_c) begin
            ref_count <= ref_count + 32'd1;
            if (dmin <= DW'(TOL)) matched <= matched + 32'd1;
            else                  penalty <= penalty + 32'(dmin - DW'(TOL));
          end
        end
        unique case (phase)
          P_SCAN: if (yi == 11'(RH) && !win_valid) begin
            // the last centre was counted in the previous cycle
            phase <= P_DIV;
            num   <= (matched > penalty) ? (matched - penalty) * 32'd100 : 32'd0;
            quo   <= '0;
            rem   <= '0;
            div_i <= 6'd32;
          end
          P_DIV: begin
            if (div_i != 0) begin
              logic [32:0] trial;
              trial = {rem, num[31]} - {1'b0, ref_count};
              num   <= {num[30:0], 1'b0};
              if (!trial[32]) begin
                rem <= trial[31:0];
                quo <= {quo[30:0], 1'b1};
              end else begin
                rem <= {rem[30:0], num[31]};
                quo <= {quo[30:0], 1'b0};
              end
              div_i <= div_i - 6'd1;
            end else begin
              logic [6:0] s;
              s = (ref_count == 0) ? 7'd0 : (quo > 32'd100) ? 7'd100 : quo[6:0];
              score <= s;
              grade <= (s >= 7'(GRADE_A_MIN)) ? GRADE_A :
                       (s >= 7'(GRADE_B_MIN)) ? GRADE_B :
                       (s >= 7'(GRADE_C_MIN)) ? GRADE_C :
                       (s >= 7'(GRADE_D_MIN)) ? GRADE_D : GRADE_F;
              phase <= P_IDLE;
              busy  <= 1'b0;
              done  <= 1'b1;
            end
          end
          default: ;
        endcase
      end
    end
  end

endmodule
