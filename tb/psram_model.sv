// psram_model: behavioural model of the external asynchronous PSRAM
// (simulation only, not synthesizable).
//
// Models the chip in its asynchronous mode on the low byte lane, with
// 2^AW words. A read returns the stored byte only once the chip has been
// selected with output enable and a stable address for ACCESS_NS
// nanoseconds (70 ns); before that the data bus reads 0xee, so a
// controller that samples too early gets wrong data. A write stores the
// byte while chip select, write enable and the lower byte enable are low.
// The upper byte lane reads 0.
module psram_model #(
  parameter int AW = 20,
  parameter int ACCESS_NS = 70
) (
  input  logic [22:0] addr,
  input  logic [15:0] dq_in,     // data driven by the controller
  input  logic        dq_oe,
  output logic [15:0] dq_out,    // data driven by the chip
  input  logic        ce_n,
  input  logic        oe_n,
  input  logic        we_n,
  input  logic        lb_n
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [7:0] mem [1 << AW];
  realtime    t_start;
  logic       ready;

  initial t_start = 0;

  always @(addr or ce_n or oe_n) begin
    t_start = $realtime;
    ready   = 1'b0;
    if (!ce_n && !oe_n) ready <= #(ACCESS_NS * 1ns) 1'b1;
  end

  always @(ready or addr or ce_n or oe_n) begin
    if (!ce_n && !oe_n && ready && ($realtime - t_start >= ACCESS_NS))
      dq_out = {8'h00, mem[addr[AW-1:0]]};
    else
      dq_out = 16'h00ee;
  end

  always @(ce_n or we_n or lb_n or dq_in or addr or dq_oe) begin
    if (!ce_n && !we_n && !lb_n && dq_oe) mem[addr[AW-1:0]] = dq_in[7:0];
  end
endmodule
