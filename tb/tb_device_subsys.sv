// tb_device_subsys: self-checking test of the device subsystem.
//
// Drives the CPU-side device bus (port number, write data, read and write
// strobes) and checks the register map: LEDs at 0x05, switches at 0x02,
// buttons at 0x03, PS/2 scan code at 0x04, the seven-segment registers at
// 0x06-0x0c (seen on the multiplexed display), the VGA row/column/colour
// registers at 0x0d-0x0f (seen in the frame buffer), zero from unmapped
// ports, that writes to other ports leave the LEDs alone, and that switch
// changes and PS/2 frames raise the interrupt line.
// DEBOUNCE_CYCLES and REFRESH_CYCLES are reduced to 16 and 8.
module tb_device_subsys;
  localparam int DB = 16, RC = 8;
  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] port_id = '0, port_out = '0, port_in;
  logic dev_rd = 1'b0, dev_wr = 1'b0, irq;
  logic cpu_disabled = 1'b0, cpu_error = 1'b0;
  logic [7:0] switches = '0, leds, seg_n;
  logic [1:0] buttons = '0;
  logic [3:0] an_n;
  logic [2:0] vga_red, vga_green;
  logic [1:0] vga_blue;
  logic vga_hsync_n, vga_vsync_n;
  logic ps2_clk = 1'b1, ps2_data = 1'b1;
  int checks = 0, failures = 0, nirq = 0, n0;

  always #10 clk = ~clk;
  always @(posedge clk) if (irq) nirq++;
  device_subsys #(.DEBOUNCE_CYCLES(DB), .REFRESH_CYCLES(RC)) dut (.*);

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
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic wr(input logic [7:0] id, input logic [7:0] d);
    @(negedge clk);
    port_id = id; port_out = d; dev_wr = 1'b1;
    @(negedge clk);
    dev_wr = 1'b0;
  endtask

  task automatic rd(input logic [7:0] id, output logic [7:0] d);
    @(negedge clk);
    port_id = id; dev_rd = 1'b1;
    @(negedge clk);
    dev_rd = 1'b0;
    d = port_in;
  endtask

  task automatic ps2_key(input logic [7:0] code);
    logic [10:0] f = {1'b1, ~^code, code, 1'b0};
    for (int i = 0; i < 11; i++) begin
      ps2_data <= f[i];
      repeat (30) @(posedge clk);
      ps2_clk <= 1'b0;
      repeat (30) @(posedge clk);
      ps2_clk <= 1'b1;
    end
    repeat (50) @(posedge clk);
  endtask

  logic [7:0] v, d;
  logic [7:0] shown [4];

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    repeat (3 * DB) @(posedge clk);
    for (int k = 0; k < 5; k++) begin
      v = 8'($urandom);
      wr(8'h05, v);
      check("LED write", leds, v);
      wr(8'h04, ~v);
      wr(8'h02, ~v);
      check("LEDs unchanged by other ports", leds, v);
    end
    for (int k = 0; k < 5; k++) begin
      v = 8'($urandom) ^ switches;
      if (v == switches) v = ~v;
      n0 = nirq;
      switches = v;
      repeat (3 * DB) @(posedge clk);
      rd(8'h02, d);
      check("switch read", d, v);
      check("switch interrupt", nirq > n0, 1);
    end
    buttons = 2'b10;
    repeat (3 * DB) @(posedge clk);
    rd(8'h03, d);
    check("button read", d, 8'h02);
    n0 = nirq;
    ps2_key(8'h1c);
    rd(8'h04, d);
    check("PS/2 read", d, 8'h1c);
    check("PS/2 interrupt", nirq - n0, 1);
    rd(8'h20, d);
    check("unmapped read", d, 0);
    rd(8'h00, d);
    check("port 0 read", d, 0);
    // seven-segment: direct mode, digits 0..3 at 0x09..0x0c
    wr(8'h06, 8'h00);
    wr(8'h09, 8'h11); wr(8'h0a, 8'h22); wr(8'h0b, 8'h44); wr(8'h0c, 8'h88);
    for (int c = 0; c < 5 * RC; c++) begin
      @(posedge clk);
      for (int g = 0; g < 4; g++) if (an_n == ~(4'b1 << g)) shown[g] = ~seg_n;
    end
    check("digit 0", shown[0], 8'h11);
    check("digit 1", shown[1], 8'h22);
    check("digit 2", shown[2], 8'h44);
    check("digit 3", shown[3], 8'h88);
    // hexadecimal mode, right byte 0x07, left byte 0x08
    wr(8'h06, 8'h03); wr(8'h07, 8'h10); wr(8'h08, 8'h08);
    for (int c = 0; c < 5 * RC; c++) begin
      @(posedge clk);
      for (int g = 0; g < 4; g++) if (an_n == ~(4'b1 << g)) shown[g] = ~seg_n;
    end
    check("hex digit 0 shows 0", shown[0], 8'h77);
    check("hex digit 1 shows 1", shown[1], 8'h24);
    check("hex digit 2 shows 8", shown[2], 8'h7f);
    check("hex digit 3 shows 0", shown[3], 8'h77);
    // VGA registers
    wr(8'h0d, 8'd7); wr(8'h0e, 8'd21); wr(8'h0f, 8'hc3);
    check("VGA frame buffer", dut.u_vga.fb[7 * 40 + 21], 8'hc3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
