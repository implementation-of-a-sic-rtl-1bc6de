// uart_tx: serial encoder for the personal computer link.
//
// Sends one 8-N-1 frame (start bit 0, eight data bits least significant
// first, stop bit 1), each bit lasting CLKS_PER_BIT clock cycles (434 for
// 115200 baud at 50 MHz). Handshake: the sender holds valid with data;
// the byte is taken in the cycle where valid and ready are both high.
// ready is high only while the encoder is idle, so a frame lasts
// 10 * CLKS_PER_BIT cycles and the next one can be accepted right after.
// The line idles at 1.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 434
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] data,
  input  logic       valid,
  output logic       ready,
  output logic       tx
);
  logic [9:0] frame;
  logic [3:0] bits_left;
  logic [$clog2(CLKS_PER_BIT)-1:0] timer;

  assign ready = (bits_left == '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      frame     <= '1;
      bits_left <= '0;
      timer     <= '0;
      tx        <= 1'b1;
    end else if (bits_left == '0) begin
      tx <= 1'b1;
      if (valid) begin
        frame     <= {1'b1, data, 1'b0};
        bits_left <= 4'd10;
        timer     <= '0;
      end
    end else begin
      tx <= frame[0];
      if (int'(timer) == CLKS_PER_BIT - 1) begin
        timer     <= '0;
        frame     <= {1'b1, frame[9:1]};
        bits_left <= bits_left - 1'b1;
      end else timer <= timer + 1'b1;
    end
  end
endmodule
