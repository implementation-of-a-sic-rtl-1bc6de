// tb_cpu_toggle: self-checking test of the CPU toggle state machine.
//
// With DEBOUNCE_CYCLES reduced to 16 it checks: stopped after reset,
// start and stop pulses from the host, each debounced button press
// toggling the state once (holding the button does not repeat), a bounce
// shorter than the debounce time ignored, and random sequences of the
// three inputs against a reference model.
module tb_cpu_toggle;
  localparam int DB = 16;
  logic clk = 1'b0, rst = 1'b1;
  logic start = 1'b0, stop = 1'b0, toggle_btn = 1'b0;
  logic enable;
  int checks = 0, failures = 0;
  logic model;

  always #10 clk = ~clk;
  cpu_toggle #(.DEBOUNCE_CYCLES(DB)) dut (.*);

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
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic pulse(input int which);
    if (which == 0) start <= 1'b1; else stop <= 1'b1;
    @(posedge clk);
    start <= 1'b0; stop <= 1'b0;
    repeat (2) @(posedge clk);
  endtask

  task automatic press(input int hold);
    toggle_btn <= 1'b1;
    repeat (hold) @(posedge clk);
    toggle_btn <= 1'b0;
    repeat (3 * DB) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    check("stopped after reset", enable, 0);
    pulse(0); check("start", enable, 1);
    pulse(0); check("start again", enable, 1);
    pulse(1); check("stop", enable, 0);
    press(3 * DB); check("button toggles on", enable, 1);
    press(10 * DB); check("long press toggles once", enable, 0);
    press(DB / 2); check("bounce ignored", enable, 0);
    model = 1'b0;
    for (int k = 0; k < 40; k++) begin
      case ($urandom_range(2))
        0: begin pulse(0); model = 1'b1; end
        1: begin pulse(1); model = 1'b0; end
        default: begin press(2 * DB); model = !model; end
      endcase
      check("random sequence", enable, model);
    end
    rst <= 1'b1; @(posedge clk); rst <= 1'b0; @(posedge clk);
    check("reset stops", enable, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
