// tb_sevenseg_ctrl: self-checking test of the seven-segment display
// controller.
//
// Expected segment patterns are built here from the letters of each
// glyph (a top, f upper left, b upper right, g middle, e lower left,
// c lower right, d bottom; bit numbers as in the controller's register
// map). The test scans all four digits and checks: direct mode shows the
// direct registers, hexadecimal mode shows the two hex registers nibble by
// nibble, mixed mode (left hex, right direct, mode value 2), "StOP" while
// the CPU is disabled, "Err" on error (over "StOP"), return to the
// registers afterwards, and the refresh period of each digit.
// REFRESH_CYCLES is reduced to 8.
module tb_sevenseg_ctrl;
  localparam int RC = 8;
  logic clk = 1'b0, rst = 1'b1;
  logic wr_en = 1'b0;
  logic [2:0] wr_sel = '0;
  logic [7:0] wr_data = '0;
  logic cpu_disabled = 1'b0, cpu_error = 1'b0;
  logic [7:0] seg_n;
  logic [3:0] an_n;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  sevenseg_ctrl #(.REFRESH_CYCLES(RC)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  function automatic logic [7:0] glyph(input string s);
    logic [7:0] g = '0;
    for (int i = 0; i < s.len(); i++)
      case (s[i])
        "a": g[0] = 1; "f": g[1] = 1; "b": g[2] = 1; "g": g[3] = 1;
        "e": g[4] = 1; "c": g[5] = 1; "d": g[6] = 1; ".": g[7] = 1;
        default: ;
      endcase
    return g;
  endfunction

  string hexg [16] = '{"abcdef", "bc", "abged", "abgcd", "fgbc", "afgcd", "afgedc", "abc",
                       "abcdefg", "abcdfg", "abcefg", "fedcg", "afed", "bcdeg", "afged", "afge"};

  task automatic wr(input int sel, input logic [7:0] d);
    wr_sel <= 3'(sel); wr_data <= d; wr_en <= 1'b1;
    @(posedge clk);
    wr_en <= 1'b0;
  endtask

  // capture the pattern of every digit over one full scan
  logic [7:0] shown [4];
  task automatic scan();
    for (int c = 0; c < 5 * RC; c++) begin
      @(posedge clk);
      for (int d = 0; d < 4; d++) if (an_n == ~(4'b1 << d)) shown[d] = ~seg_n;
    end
  endtask

  int t0, t1;

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    wr(3, 8'h81); wr(4, 8'h42); wr(5, 8'h24); wr(6, 8'h18);
    wr(0, 8'h00);
    scan();
    check("direct d0", shown[0], 8'h81);
    check("direct d1", shown[1], 8'h42);
    check("direct d2", shown[2], 8'h24);
    check("direct d3", shown[3], 8'h18);
    for (int v = 0; v < 16; v++) begin
      wr(1, 8'(v * 16 + (15 - v)));
      wr(2, 8'(((v + 3) % 16) * 16 + v));
      wr(0, 8'h03);
      scan();
      check("hex d0", shown[0], glyph(hexg[15 - v]));
      check("hex d1", shown[1], glyph(hexg[v]));
      check("hex d2", shown[2], glyph(hexg[v]));
      check("hex d3", shown[3], glyph(hexg[(v + 3) % 16]));
    end
    wr(1, 8'hab); wr(2, 8'hcd); wr(0, 8'h02);
    scan();
    check("mixed d0 direct", shown[0], 8'h81);
    check("mixed d1 direct", shown[1], 8'h42);
    check("mixed d2 hex", shown[2], glyph(hexg[13]));
    check("mixed d3 hex", shown[3], glyph(hexg[12]));
    cpu_disabled <= 1'b1;
    scan();
    check("STOP S", shown[3], glyph("afgcd"));
    check("STOP t", shown[2], glyph("fged"));
    check("STOP O", shown[1], glyph("abcdef"));
    check("STOP P", shown[0], glyph("abfge"));
    cpu_error <= 1'b1;
    scan();
    check("Err E", shown[3], glyph("afged"));
    check("Err r", shown[2], glyph("eg"));
    check("Err r2", shown[1], glyph("eg"));
    check("Err blank", shown[0], 0);
    cpu_error <= 1'b0; cpu_disabled <= 1'b0;
    scan();
    check("back to registers", shown[3], glyph(hexg[12]));
    // refresh period: cycles between two changes of the digit select
    @(an_n); t0 = $time;
    @(an_n); t1 = $time;
    check("digit period", (t1 - t0) / 20, RC);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
