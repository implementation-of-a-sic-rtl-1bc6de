// tb_ps2_ctrl: self-checking test of the PS/2 keyboard controller.
//
// Plays a keyboard: sends 11-bit frames (start, 8 data bits LSB first,
// odd parity, stop) with a clock much slower than the system clock, and
// checks that each good scan code appears in the register with exactly one
// interrupt pulse, that a frame with wrong parity is dropped and leaves
// the old code, and that the next good frame is received after it.
module tb_ps2_ctrl;
  logic clk = 1'b0, rst = 1'b1;
  logic ps2_clk = 1'b1, ps2_data = 1'b1;
  logic [7:0] scan_code;
  logic irq;
  int checks = 0, failures = 0, nirq = 0;

  always #10 clk = ~clk;
  always @(posedge clk) if (irq) nirq++;

  ps2_ctrl dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
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

  task automatic key(input logic [7:0] code, input logic good_parity);
    logic [10:0] f;
    f = {1'b1, ~^code ^ !good_parity, code, 1'b0};
    for (int i = 0; i < 11; i++) begin
      ps2_data <= f[i];
      repeat (40) @(posedge clk);
      ps2_clk <= 1'b0;
      repeat (40) @(posedge clk);
      ps2_clk <= 1'b1;
    end
    repeat (100) @(posedge clk);
  endtask

  int n0;
  logic [7:0] codes [5] = '{8'h1c, 8'hf0, 8'h5a, 8'h00, 8'hff};

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (10) @(posedge clk);
    foreach (codes[k]) begin
      n0 = nirq;
      key(codes[k], 1'b1);
      check("scan code", scan_code, codes[k]);
      check("one interrupt", nirq - n0, 1);
    end
    n0 = nirq;
    key(8'h33, 1'b0);
    check("bad parity dropped", scan_code, 8'hff);
    check("no interrupt for bad frame", nirq - n0, 0);
    key(8'h29, 1'b1);
    check("good frame after bad", scan_code, 8'h29);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
