// tb_uart_tx: self-checking test of the serial encoder.
//
// Sends several bytes back to back and samples the line in the middle of
// every bit period, checking the start bit, the eight data bits (least
// significant first) and the stop bit, that the encoder is ready again
// at the end of the stop bit and that ready is low while a frame is on the line.
// CLKS_PER_BIT is reduced to 16 to keep the run short.
module tb_uart_tx;
  localparam int CPB = 16;
  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] data = '0;
  logic valid = 1'b0, ready, tx;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.*);

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

  logic [7:0] bytes [4] = '{8'h53, 8'ha5, 8'h00, 8'hff};
  int t_start, t_end;

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    check("idle line high", tx, 1);
    check("ready when idle", ready, 1);
    foreach (bytes[k]) begin
      data  <= bytes[k];
      valid <= 1'b1;
      do @(posedge clk); while (!ready);
      valid <= 1'b0;
      // find the start bit edge
      t_start = 0;
      while (tx) begin @(posedge clk); t_start++; end
      check("start found promptly", int'(t_start <= 2), 1);
      repeat (CPB / 2) @(posedge clk);
      check("start bit", tx, 0);
      check("busy during frame", ready, 0);
      for (int b = 0; b < 8; b++) begin
        repeat (CPB) @(posedge clk);
        check($sformatf("byte %0d bit %0d", k, b), tx, bytes[k][b]);
      end
      repeat (CPB) @(posedge clk);
      check("stop bit", tx, 1);
      t_end = 0;
      while (!ready) begin @(posedge clk); t_end++; end
      check("ready again at the end of the stop bit", int'(t_end >= CPB / 2 - 1 && t_end <= CPB / 2 + 1), 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
