// device_subsys: the device subsystem, joining the four device
// controllers to the CPU's device bus.
//
// It decodes the 8-bit port id of a write (dev_wr) into a write strobe and
// register select for the general I/O, seven-segment or VGA controller,
// and, on a read (dev_rd), registers the selected input (switches 0x02,
// buttons 0x03, last PS/2 scan code 0x04) into port_in, which is valid in
// the following cycle. Addresses outside the map are ignored on write and
// read as 0. The controllers' interrupt requests are ORed into one
// one-cycle irq. Reading 0 from an unmapped address is this design's
// choice.
module device_subsys
  import sicxe_pkg::*;
#(
  parameter int unsigned DEBOUNCE_CYCLES = 500_000,
  parameter int unsigned REFRESH_CYCLES  = 50_000
) (
  input  logic       clk,
  input  logic       rst,
  // CPU device bus
  input  logic [7:0] port_id,
  input  logic [7:0] port_out,
  output logic [7:0] port_in,
  input  logic       dev_rd,
  input  logic       dev_wr,
  output logic       irq,
  // status for the display
  input  logic       cpu_disabled,
  input  logic       cpu_error,
  // board
  input  logic [7:0] switches,
  input  logic [1:0] buttons,
  output logic [7:0] leds,
  output logic [7:0] seg_n,
  output logic [3:0] an_n,
  output logic [2:0] vga_red,
  output logic [2:0] vga_green,
  output logic [1:0] vga_blue,
  output logic       vga_hsync_n,
  output logic       vga_vsync_n,
  input  logic       ps2_clk,
  input  logic       ps2_data
);
  logic [7:0] sw_state, scan_code;
  logic [1:0] btn_state;
  logic       gpio_irq, ps2_irq;
  logic       wr_leds, wr_seg, wr_vga;
  logic [2:0] seg_sel;
  logic [1:0] vga_sel;

  assign wr_leds = dev_wr && (port_id == DEV_LEDS);
  assign wr_seg  = dev_wr && (port_id >= DEV_SEG_MODE) && (port_id <= DEV_SEG_DIG3);
  assign wr_vga  = dev_wr && (port_id >= DEV_VGA_ROW) && (port_id <= DEV_VGA_COLOR);
  assign seg_sel = 3'(port_id - DEV_SEG_MODE);
  assign vga_sel = 2'(port_id - DEV_VGA_ROW);

  gpio_ctrl #(.DEBOUNCE_CYCLES(DEBOUNCE_CYCLES)) u_gpio (
    .clk, .rst, .wr_en(wr_leds), .wr_data(port_out), .switches, .buttons,
    .leds, .sw_state, .btn_state, .irq(gpio_irq)
  );

  sevenseg_ctrl #(.REFRESH_CYCLES(REFRESH_CYCLES)) u_seg (
    .clk, .rst, .wr_en(wr_seg), .wr_sel(seg_sel), .wr_data(port_out),
    .cpu_disabled, .cpu_error, .seg_n, .an_n
  );

  vga_ctrl u_vga (
    .clk, .rst, .wr_en(wr_vga), .wr_sel(vga_sel), .wr_data(port_out),
    .red(vga_red), .green(vga_green), .blue(vga_blue),
    .hsync_n(vga_hsync_n), .vsync_n(vga_vsync_n)
  );

  ps2_ctrl u_ps2 (
    .clk, .rst, .ps2_clk, .ps2_data, .scan_code, .irq(ps2_irq)
  );

  always_ff @(posedge clk) begin
    if (rst) port_in <= '0;
    else if (dev_rd) begin
      unique case (port_id)
        DEV_SWITCHES: port_in <= sw_state;
        DEV_BUTTONS:  port_in <= {6'b0, btn_state};
        DEV_PS2:      port_in <= scan_code;
        default:      port_in <= '0;
      endcase
    end
  end

  assign irq = gpio_irq || ps2_irq;
endmodule
