// tb_gpio_ctrl: self-checking test of the general I/O controller.
//
// With DEBOUNCE_CYCLES reduced to 16 it checks: LED writes, switch and
// button values after the debounce time, that a glitch shorter than the
// debounce time is ignored, that every switch change and every button
// press raises exactly one interrupt pulse, and that a button release
// raises none.
module tb_gpio_ctrl;
  localparam int DB = 16;
  logic clk = 1'b0, rst = 1'b1;
  logic wr_en = 1'b0;
  logic [7:0] wr_data = '0, switches = '0;
  logic [1:0] buttons = '0;
  logic [7:0] leds, sw_state;
  logic [1:0] btn_state;
  logic irq;
  int checks = 0, failures = 0, nirq = 0, n0;

  always #10 clk = ~clk;
  always @(posedge clk) if (irq) nirq++;
  gpio_ctrl #(.DEBOUNCE_CYCLES(DB)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
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

  initial begin
    logic [7:0] v;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (3 * DB) @(posedge clk);
    for (int k = 0; k < 10; k++) begin
      v = 8'($urandom);
      wr_data <= v; wr_en <= 1'b1;
      @(posedge clk);
      wr_en <= 1'b0;
      @(posedge clk);
      check("leds", leds, v);
    end
    for (int k = 0; k < 10; k++) begin
      v = 8'($urandom) | 8'(1 << (k % 8));
      v = switches ^ v;
      n0 = nirq;
      switches <= v;
      repeat (3 * DB) @(posedge clk);
      check("switch state", sw_state, v);
      check("switch interrupt", nirq - n0, 1);
    end
    // glitch shorter than the debounce time
    n0 = nirq;
    v = switches;
    switches[3] <= !switches[3];
    repeat (DB / 2) @(posedge clk);
    switches[3] <= v[3];
    repeat (3 * DB) @(posedge clk);
    check("glitch ignored", sw_state, v);
    check("no glitch interrupt", nirq - n0, 0);
    for (int b = 0; b < 2; b++) begin
      n0 = nirq;
      buttons[b] <= 1'b1;
      repeat (3 * DB) @(posedge clk);
      check("button pressed", btn_state, 1 << b);
      check("press interrupt", nirq - n0, 1);
      n0 = nirq;
      buttons[b] <= 1'b0;
      repeat (3 * DB) @(posedge clk);
      check("button released", btn_state, 0);
      check("no release interrupt", nirq - n0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
