// sicxe_system: the complete SIC/XE computer for a board with a PSRAM
// chip, a serial port, switches, buttons, LEDs, a four-digit display, a
// VGA port and a PS/2 port.
//
// Four parts share one 50 MHz clock. The SIC/XE CPU runs programs from
// the 1 MB main memory, reached through the memory controller, which
// drives the external PSRAM. The personal computer interface speaks a
// small command protocol over the serial link (decoder and encoder at
// 115200 baud): it reads and writes main memory through the same memory
// controller, with priority over the CPU, and can reset, start, stop and
// interrupt the CPU. The CPU toggle FSM holds the CPU's enable, set by the
// host's start and stop commands and flipped by the start/stop button. The
// device subsystem holds the general I/O, seven-segment, VGA and PS/2
// controllers on the CPU's 8-bit device bus; their interrupt requests are
// ORed with the host's interrupt command into the CPU's interrupt input,
// and the display shows "StOP" while the CPU is disabled and "Err" after a
// CPU error. The CPU is reset by rst (the board's reset button) or by the
// host's reset command; everything else only by rst. rst is synchronous
// and active high. The PSRAM data bus is brought out as separate output,
// input and output-enable signals for the board's tristate pads; the pins
// that select the chip's asynchronous mode and its unused upper byte lane
// are constant. The CPU's CC, I and boundary outputs and the interface's
// unlocked flag are for observation and testing and are left open here.
module sicxe_system #(
  parameter int unsigned CLKS_PER_BIT    = 434,
  parameter int unsigned ACCESS_CYCLES   = 4,
  parameter int unsigned DEBOUNCE_CYCLES = 500_000,
  parameter int unsigned REFRESH_CYCLES  = 50_000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        toggle_btn,
  // serial port
  input  logic        uart_rx,
  output logic        uart_tx,
  // PSRAM
  output logic [22:0] ram_addr,
  output logic [15:0] ram_dq_o,
  input  logic [15:0] ram_dq_i,
  output logic        ram_dq_oe,
  output logic        ram_ce_n,
  output logic        ram_oe_n,
  output logic        ram_we_n,
  output logic        ram_adv_n,
  output logic        ram_clk,
  output logic        ram_cre,
  output logic        ram_lb_n,
  output logic        ram_ub_n,
  // board I/O
  input  logic [7:0]  switches,
  input  logic [1:0]  buttons,
  output logic [7:0]  leds,
  output logic [7:0]  seg_n,
  output logic [3:0]  an_n,
  output logic [2:0]  vga_red,
  output logic [2:0]  vga_green,
  output logic [1:0]  vga_blue,
  output logic        vga_hsync_n,
  output logic        vga_vsync_n,
  input  logic        ps2_clk,
  input  logic        ps2_data,
  // status
  output logic        cpu_enable,
  output logic        cpu_error,
  output logic [19:0] cpu_pc
);
  // serial link
  logic [7:0]  rx_data, tx_data;
  logic        rx_valid, tx_valid, tx_ready;
  // PC interface <-> memory controller
  logic [19:0] pcm_addr;
  logic [7:0]  pcm_wdata, pcm_rdata;
  logic        pcm_rd, pcm_wr, pcm_done;
  // CPU <-> memory controller
  logic [19:0] cm_addr;
  logic [7:0]  cm_wdata, cm_rdata;
  logic        cm_rd, cm_wr, cm_done;
  // CPU <-> devices
  logic [7:0]  port_id, port_out, port_in;
  logic        dev_rd, dev_wr, dev_irq;
  // control
  logic        host_reset, host_start, host_stop, host_irq;
  logic        cpu_rst, cpu_irq;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst, .rx(uart_rx), .data(rx_data), .valid(rx_valid)
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst, .data(tx_data), .valid(tx_valid), .ready(tx_ready), .tx(uart_tx)
  );

  pc_iface u_host (
    .clk, .rst,
    .rx_data, .rx_valid, .tx_data, .tx_valid, .tx_ready,
    .mem_addr(pcm_addr), .mem_wdata(pcm_wdata), .mem_rdata(pcm_rdata),
    .mem_rd(pcm_rd), .mem_wr(pcm_wr), .mem_done(pcm_done),
    .cpu_reset(host_reset), .cpu_start(host_start), .cpu_stop(host_stop),
    .cpu_interrupt(host_irq), .unlocked()
  );

  mem_ctrl #(.ACCESS_CYCLES(ACCESS_CYCLES)) u_mem (
    .clk, .rst,
    .pc_addr(pcm_addr), .pc_wdata(pcm_wdata), .pc_rdata(pcm_rdata),
    .pc_rd(pcm_rd), .pc_wr(pcm_wr), .pc_done(pcm_done),
    .cpu_addr(cm_addr), .cpu_wdata(cm_wdata), .cpu_rdata(cm_rdata),
    .cpu_rd(cm_rd), .cpu_wr(cm_wr), .cpu_done(cm_done),
    .ram_addr, .ram_dq_o, .ram_dq_i, .ram_dq_oe, .ram_ce_n, .ram_oe_n,
    .ram_we_n, .ram_adv_n, .ram_clk, .ram_cre, .ram_lb_n, .ram_ub_n
  );

  cpu_toggle #(.DEBOUNCE_CYCLES(DEBOUNCE_CYCLES)) u_toggle (
    .clk, .rst, .start(host_start), .stop(host_stop), .toggle_btn,
    .enable(cpu_enable)
  );

  assign cpu_rst = rst || host_reset;
  assign cpu_irq = host_irq || dev_irq;

  sicxe_cpu u_cpu (
    .clk, .rst(cpu_rst), .enable(cpu_enable), .irq_req(cpu_irq),
    .error(cpu_error),
    .mem_addr(cm_addr), .mem_dout(cm_wdata), .mem_din(cm_rdata),
    .mem_rd(cm_rd), .mem_wr(cm_wr), .mem_done(cm_done),
    .port_id, .port_out, .port_in, .dev_rd, .dev_wr,
    .pc_o(cpu_pc), .cc_o(), .i_o(), .at_boundary()
  );

  device_subsys #(
    .DEBOUNCE_CYCLES(DEBOUNCE_CYCLES), .REFRESH_CYCLES(REFRESH_CYCLES)
  ) u_dev (
    .clk, .rst,
    .port_id, .port_out, .port_in, .dev_rd, .dev_wr, .irq(dev_irq),
    .cpu_disabled(!cpu_enable), .cpu_error,
    .switches, .buttons, .leds, .seg_n, .an_n,
    .vga_red, .vga_green, .vga_blue, .vga_hsync_n, .vga_vsync_n,
    .ps2_clk, .ps2_data
  );
endmodule
