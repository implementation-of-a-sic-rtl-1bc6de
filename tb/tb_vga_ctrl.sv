// tb_vga_ctrl: self-checking test of the VGA controller.
//
// Measures the sync signals against 640x480 at 60 Hz timing with a pixel
// every second clock (line 1600 clocks, horizontal pulse 192 clocks,
// frame 840000 clocks, vertical pulse 2 lines), then writes random colours
// into random cells of the 40x30 character grid and samples the colour
// outputs in the middle of those cells, in a black cell that writes
// outside the grid must not reach, and during blanking. Pixel positions
// are computed from the falling edge of the vertical sync pulse: visible
// line 0 starts 35 lines after it.
module tb_vga_ctrl;
  logic clk = 1'b0, rst = 1'b1;
  logic wr_en = 1'b0;
  logic [1:0] wr_sel = '0;
  logic [7:0] wr_data = '0;
  logic [2:0] red, green;
  logic [1:0] blue;
  logic hsync_n, vsync_n;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;
  vga_ctrl dut (.*);

  longint cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (10_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic wr(input int sel, input logic [7:0] d);
    @(negedge clk);
    wr_sel = 2'(sel); wr_data = d; wr_en = 1'b1;
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  longint h0, h1, h2, v0, v1, v2;
  int cr [8], cc [8];
  logic [7:0] col [8];

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int k = 0; k < 8; k++) begin
      cr[k] = $urandom_range(29, 1); cc[k] = $urandom_range(39);
      col[k] = 8'($urandom_range(1, 255));
      for (int j = 0; j < k; j++) if (cr[j] == cr[k] && cc[j] == cc[k]) cc[k] = (cc[k] + 1) % 40;
      wr(0, 8'(cr[k])); wr(1, 8'(cc[k])); wr(2, col[k]);
    end
    // cell (0,0) set to black, then a write outside the grid must not
    // reach it (the frame buffer has no reset, so only written cells are
    // known)
    wr(0, 8'd0); wr(1, 8'd0); wr(2, 8'h00);
    wr(0, 8'd30); wr(1, 8'd0); wr(2, 8'hff);
    wr(0, 8'd0); wr(1, 8'd40); wr(2, 8'hff);
    // horizontal timing
    @(negedge hsync_n); h0 = cyc;
    @(posedge hsync_n); h1 = cyc;
    @(negedge hsync_n); h2 = cyc;
    check("line period", h2 - h0, 1600);
    check("hsync width", h1 - h0, 192);
    // vertical timing
    @(negedge vsync_n); v0 = cyc;
    @(posedge vsync_n); v1 = cyc;
    @(negedge vsync_n); v2 = cyc;
    check("frame period", v2 - v0, 840000);
    check("vsync width", v1 - v0, 3200);
    // colour at the centre of each written cell (next frame)
    for (int k = 0; k < 8; k++) begin
      longint t;
      t = v2 + ((35 + cr[k] * 16 + 8) * 800 + cc[k] * 16 + 8) * 2 + 1;
      while (t <= cyc) t += 840000;
      while (cyc < t) @(posedge clk);
      #1 check($sformatf("cell %0d,%0d colour", cr[k], cc[k]), {red, green, blue}, col[k]);
    end
    // the black cell, and blanking
    begin
      longint t;
      int r = 0, c = 0;
      t = v2 + ((35 + r * 16 + 8) * 800 + c * 16 + 8) * 2 + 1;
      while (t <= cyc) t += 840000;
      while (cyc < t) @(posedge clk);
      #1 check("black cell untouched by writes outside the grid", {red, green, blue}, 0);
      t = v2 + ((35 + cr[0] * 16 + 8) * 800 + 700) * 2 + 1;
      while (t <= cyc) t += 840000;
      while (cyc < t) @(posedge clk);
      #1 check("horizontal blanking", {red, green, blue}, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
