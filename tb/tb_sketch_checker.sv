// Self-checking testbench of the sketch checker on small 16 x 12 images.
// A reference model in the testbench computes, by brute force over all pixel
// pairs, the mismatch count, the per-pixel nearest-ink distance (rounded-down
// Euclidean, capped at R+1 beyond the search radius), matched and penalty
// counts, the score and the grade. Cases: identical outlines, an outline
// shifted by one and by three pixels, an empty drawing, an empty reference and
// random scribbles, fed with and without input gaps. It also checks the
// cycle count of a check without gaps.
module tb_sketch_checker;
  import sm_pkg::*;

  localparam int W = 16, H = 12, R = 3, TOL = 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        start = 0, in_valid = 0, in_ready, busy, done;
  logic [7:0]  ref_pix, stu_pix;
  logic [31:0] ref_count, matched, penalty, mismatch;
  logic [6:0]  score;
  grade_t      grade;

  sketch_checker #(.W(W), .H(H), .R(R), .TOL(TOL)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] refimg [H][W];
  logic [7:0] stuimg [H][W];

  function automatic int isq(int v);
    int r = 0;
    while ((r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction

  task automatic run_case(string name, bit gaps);
    int e_ref = 0, e_match = 0, e_pen = 0, e_mis = 0, e_score, cyc;
    grade_t e_grade;
    // reference model
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        bit ri = refimg[y][x] != 0, si = stuimg[y][x] != 0;
        if (ri != si) e_mis++;
        if (ri) begin
          int d = R + 1;
          e_ref++;
          for (int yy = 0; yy < H; yy++)
            for (int xx = 0; xx < W; xx++)
              if (stuimg[yy][xx] != 0 && (yy - y) <= R && (y - yy) <= R &&
                  (xx - x) <= R && (x - xx) <= R) begin
                int dd = isq((yy - y) * (yy - y) + (xx - x) * (xx - x));
                if (dd > R + 1) dd = R + 1;
                if (dd < d) d = dd;
              end
          if (d <= TOL) e_match++;
          else e_pen += d - TOL;
        end
      end
    e_score = (e_ref == 0 || e_match <= e_pen) ? 0 : 100 * (e_match - e_pen) / e_ref;
    e_grade = e_score >= 90 ? GRADE_A : e_score >= 80 ? GRADE_B : e_score >= 70 ? GRADE_C :
              e_score >= 60 ? GRADE_D : GRADE_F;
    // drive
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 1;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        if (gaps) while ($urandom_range(0, 2) == 0) begin @(negedge clk); cyc++; end
        in_valid = 1; ref_pix = refimg[y][x]; stu_pix = stuimg[y][x];
        do begin @(posedge clk); cyc++; end while (!in_ready);
        @(negedge clk);
        in_valid = 0;
      end
    while (!done) begin @(posedge clk); cyc++; end
    check(ref_count == 32'(e_ref), $sformatf("%s ref_count %0d exp %0d", name, ref_count, e_ref));
    check(matched == 32'(e_match), $sformatf("%s matched %0d exp %0d", name, matched, e_match));
    check(penalty == 32'(e_pen), $sformatf("%s penalty %0d exp %0d", name, penalty, e_pen));
    check(mismatch == 32'(e_mis), $sformatf("%s mismatch %0d exp %0d", name, mismatch, e_mis));
    check(score == 7'(e_score), $sformatf("%s score %0d exp %0d", name, score, e_score));
    check(grade == e_grade, $sformatf("%s grade %0d exp %0d", name, grade, e_grade));
    check(!busy, "busy low after done");
    if (!gaps)
      // (H+R)*(W+R) steps, 1 evaluation, 1 to leave the scan, 33 divide
      check(cyc <= (H + R) * (W + R) + 40 + 2 * H * W && cyc >= (H + R) * (W + R),
            $sformatf("%s took %0d cycles", name, cyc));
    $display("%s: ref=%0d matched=%0d penalty=%0d mismatch=%0d score=%0d grade=%0d",
             name, ref_count, matched, penalty, mismatch, score, grade);
  endtask

  task automatic clear_imgs();
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      refimg[y][x] = 0; stuimg[y][x] = 0;
    end
  endtask

  task automatic draw_box(bit stu, int x0, int y0, int x1, int y1, logic [7:0] c);
    for (int x = x0; x <= x1; x++) begin
      if (stu) begin stuimg[y0][x] = c; stuimg[y1][x] = c; end
      else     begin refimg[y0][x] = c; refimg[y1][x] = c; end
    end
    for (int y = y0; y <= y1; y++) begin
      if (stu) begin stuimg[y][x0] = c; stuimg[y][x1] = c; end
      else     begin refimg[y][x0] = c; refimg[y][x1] = c; end
    end
  endtask

  initial begin
    ref_pix = 0; stu_pix = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    clear_imgs(); draw_box(0, 2, 2, 12, 9, 8'hE0); draw_box(1, 2, 2, 12, 9, 8'h1C);
    run_case("identical", 0);
    check(score == 100 && grade == GRADE_A, "identical outline scores 100 / A");
    clear_imgs(); draw_box(0, 2, 2, 12, 9, 8'hE0); draw_box(1, 3, 2, 13, 9, 8'h1C);
    run_case("shift1", 1);
    clear_imgs(); draw_box(0, 1, 1, 10, 8, 8'hE0); draw_box(1, 4, 1, 13, 8, 8'h1C);
    run_case("shift3", 0);
    clear_imgs(); draw_box(0, 0, 0, 15, 11, 8'hE0);
    run_case("empty drawing", 1);
    check(score == 0 && grade == GRADE_F, "empty drawing scores 0 / F");
    clear_imgs(); draw_box(1, 0, 0, 15, 11, 8'hE0);
    run_case("empty reference", 0);
    for (int t = 0; t < 6; t++) begin
      clear_imgs();
      draw_box(0, 1, 1, 10, 8, 8'h03);
      draw_box(1, 1 + t % 4, 1 + t / 3, 10 + t % 4, 8, 8'h0C);
      for (int k = 0; k < 5; k++) stuimg[$urandom_range(0, H - 1)][$urandom_range(0, W - 1)] = 8'h40;
      run_case($sformatf("random%0d", t), t[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
