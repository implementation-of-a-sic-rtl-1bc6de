// uart_rx: serial decoder for the personal computer link.
//
// Receives 8-N-1 asynchronous serial frames (start bit 0, eight data bits
// least significant first, stop bit 1). The line is first synchronised by
// two flip-flops. A falling edge starts a frame; the start bit is checked
// again at its middle, and from there each bit is sampled every
// CLKS_PER_BIT cycles. When the stop bit is 1, data holds the byte and
// valid is high for one cycle; a frame with a 0 stop bit is dropped. The
// default CLKS_PER_BIT = 434 gives 115200 baud from the 50 MHz clock.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 434
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rx,
  output logic [7:0] data,
  output logic       valid
);
  typedef enum logic [1:0] {R_IDLE, R_START, R_DATA, R_STOP} rstate_e;

  rstate_e     state;
  logic [1:0]  sync;
  logic [$clog2(CLKS_PER_BIT)-1:0] timer;
  logic [2:0]  bitn;
  logic [7:0]  shift;
  logic        line;

  assign line = sync[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      sync  <= 2'b11;
      state <= R_IDLE;
      timer <= '0;
      bitn  <= '0;
      shift <= '0;
      data  <= '0;
      valid <= 1'b0;
    end else begin
      sync  <= {sync[0], rx};
      valid <= 1'b0;
      unique case (state)
        R_IDLE: if (!line) begin
          timer <= '0;
          state <= R_START;
        end
        R_START: begin
          if (int'(timer) == (CLKS_PER_BIT / 2) - 1) begin
            timer <= '0;
            bitn  <= '0;
            state <= line ? R_IDLE : R_DATA;
          end else timer <= timer + 1'b1;
        end
        R_DATA: begin
          if (int'(timer) == CLKS_PER_BIT - 1) begin
            timer <= '0;
            shift <= {line, shift[7:1]};
            bitn  <= bitn + 1'b1;
            if (bitn == 3'd7) state <= R_STOP;
          end else timer <= timer + 1'b1;
        end
        R_STOP: begin
          if (int'(timer) == CLKS_PER_BIT - 1) begin
            timer <= '0;
            state <= R_IDLE;
            if (line) begin
              data  <= shift;
              valid <= 1'b1;
            end
          end else timer <= timer + 1'b1;
        end
        default: state <= R_IDLE;
      endcase
    end
  end
endmodule
