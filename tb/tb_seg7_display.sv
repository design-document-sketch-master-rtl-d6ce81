// Self-checking testbench of the 7-segment grade readout. For every score
// 0..100 and every grade it compares the six digits with patterns built here
// from a segment table (a..g, active low), including leading-zero blanking
// and the dashes shown before the first result.
module tb_seg7_display;
  import sm_pkg::*;

  logic       valid;
  logic [6:0] score;
  grade_t     grade;
  logic [6:0] hex0, hex1, hex2, hex3, hex4, hex5;

  seg7_display dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // segments lit, as a string of letters a..g
  function automatic logic [6:0] segs(string on);
    logic [6:0] v = 7'b1111111;
    for (int i = 0; i < on.len(); i++) v[on[i] - "a"] = 1'b0;
    return v;
  endfunction

  function automatic logic [6:0] dig(int d);
    case (d)
      0: return segs("abcdef");  1: return segs("bc");     2: return segs("abdeg");
      3: return segs("abcdg");   4: return segs("bcfg");   5: return segs("acdfg");
      6: return segs("acdefg");  7: return segs("abc");    8: return segs("abcdefg");
      default: return segs("abcdfg");
    endcase
  endfunction

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] letters [5];
    letters[0] = segs("abcefg"); letters[1] = segs("cdefg"); letters[2] = segs("adef");
    letters[3] = segs("bcdeg");  letters[4] = segs("aefg");
    valid = 0; score = 42; grade = GRADE_B;
    #1;
    check(hex5 == 7'h7F && hex0 == segs("g") && hex1 == segs("g") && hex2 == segs("g"),
          "dashes before first result");
    valid = 1;
    for (int g = 0; g < 5; g++)
      for (int s = 0; s <= 100; s++) begin
        score = 7'(s); grade = grade_t'(g);
        #1;
        check(hex5 == letters[g], $sformatf("grade %0d letter", g));
        check(hex4 == 7'h7F && hex3 == 7'h7F, "hex4/hex3 dark");
        check(hex0 == dig(s % 10), $sformatf("ones of %0d", s));
        check(hex1 == (s >= 10 ? dig((s / 10) % 10) : 7'h7F), $sformatf("tens of %0d", s));
        check(hex2 == (s >= 100 ? dig(1) : 7'h7F), $sformatf("hundreds of %0d", s));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
