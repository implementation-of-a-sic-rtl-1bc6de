// gpio_ctrl: general I/O controller for the LEDs, switches and buttons.
//
// The 8 LEDs show an internal register written at device 0x05. The 8
// switches and the 2 general-purpose buttons each pass through a
// debouncer, so a change counts only after the input has held still for
// DEBOUNCE_CYCLES clock cycles; their debounced states are read at device
// 0x02 (switches) and 0x03 (buttons, in bits 1:0). irq is high for one
// cycle when any debounced switch changes or a debounced button goes from
// released to pressed. The debounce time is this design's choice.
module gpio_ctrl #(
  parameter int unsigned DEBOUNCE_CYCLES = 500_000
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       wr_en,
  input  logic [7:0] wr_data,
  input  logic [7:0] switches,
  input  logic [1:0] buttons,
  output logic [7:0] leds,
  output logic [7:0] sw_state,
  output logic [1:0] btn_state,
  output logic       irq
);
  logic [7:0] sw_q;
  logic [1:0] btn_q;

  for (genvar i = 0; i < 8; i++) begin : g_sw
    debouncer #(.STABLE_CYCLES(DEBOUNCE_CYCLES)) u_deb (
      .clk, .rst, .raw(switches[i]), .clean(sw_state[i])
    );
  end
  for (genvar i = 0; i < 2; i++) begin : g_btn
    debouncer #(.STABLE_CYCLES(DEBOUNCE_CYCLES)) u_deb (
      .clk, .rst, .raw(buttons[i]), .clean(btn_state[i])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      leds  <= '0;
      sw_q  <= '0;
      btn_q <= '0;
      irq   <= 1'b0;
    end else begin
      if (wr_en) leds <= wr_data;
      sw_q  <= sw_state;
      btn_q <= btn_state;
      irq   <= (sw_state != sw_q) || |(btn_state & ~btn_q);
    end
  end
endmodule
