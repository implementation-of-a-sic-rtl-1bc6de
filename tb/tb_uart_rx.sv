// tb_uart_rx: self-checking test of the serial decoder.
//
// Drives 8-N-1 frames onto the line with a bit period of CLKS_PER_BIT
// cycles (reduced to 32), including frames with a bit period 3 % longer
// than nominal, and checks each received byte and that valid pulses once
// per frame. A frame whose stop bit is 0 must be dropped, and a short
// glitch on the idle line must not start a frame.
module tb_uart_rx;
  localparam int CPB = 32;
  logic clk = 1'b0, rst = 1'b1;
  logic rx = 1'b1;
  logic [7:0] data;
  logic valid;
  int checks = 0, failures = 0;
  int nvalid = 0;
  logic [7:0] last;

  always #10 clk = ~clk;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.*);

  always @(posedge clk) if (valid) begin nvalid++; last = data; end

  initial begin
    repeat (50000) @(posedge clk);
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

  task automatic send(input logic [7:0] b, input int period, input logic stop);
    logic [9:0] f;
    f = {stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rx <= f[i];
      repeat (period) @(posedge clk);
    end
    rx <= 1'b1;
    repeat (2 * period) @(posedge clk);
  endtask

  int n_prev;

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (5) @(posedge clk);
    for (int k = 0; k < 20; k++) begin
      logic [7:0] b;
      b = 8'($urandom);
      n_prev = nvalid;
      send(b, (k % 2) ? CPB : CPB + 1, 1'b1);
      check("one valid per frame", nvalid - n_prev, 1);
      check("byte value", last, b);
    end
    n_prev = nvalid;
    send(8'h5a, CPB, 1'b0);
    check("bad stop bit dropped", nvalid - n_prev, 0);
    repeat (3 * CPB) @(posedge clk);
    rx <= 1'b0; repeat (2) @(posedge clk); rx <= 1'b1;
    repeat (20 * CPB) @(posedge clk);
    check("glitch ignored", nvalid - n_prev, 0);
    n_prev = nvalid;
    send(8'hc3, CPB, 1'b1);
    check("after glitch", last, 8'hc3);
    check("after glitch count", nvalid - n_prev, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
