// tb_mem_ctrl: self-checking test of the memory controller with a timed
// PSRAM model.
//
// Checks that CPU writes and reads land in the chip's low byte lane, that
// every operation completes 5 cycles after the request (20 ns clock,
// 70 ns access time), that a PC-interface request beats a simultaneous CPU
// request and the CPU then completes right after, and that a request made
// during another operation waits for it.
module tb_mem_ctrl;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 1'b0, rst = 1'b1;
  logic [19:0] pc_addr = '0, cpu_addr = '0;
  logic [7:0]  pc_wdata = '0, cpu_wdata = '0, pc_rdata, cpu_rdata;
  logic        pc_rd = 0, pc_wr = 0, cpu_rd = 0, cpu_wr = 0, pc_done, cpu_done;
  logic [22:0] ram_addr;
  logic [15:0] ram_dq_o, ram_dq_i;
  logic        ram_dq_oe, ram_ce_n, ram_oe_n, ram_we_n, ram_adv_n, ram_clk, ram_cre;
  logic        ram_lb_n, ram_ub_n;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  mem_ctrl dut (.*);

  psram_model u_ram (
    .addr(ram_addr), .dq_in(ram_dq_o), .dq_oe(ram_dq_oe), .dq_out(ram_dq_i),
    .ce_n(ram_ce_n), .oe_n(ram_oe_n), .we_n(ram_we_n), .lb_n(ram_lb_n)
  );

  initial begin
    repeat (2000) @(posedge clk);
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

  // one CPU operation, returns the cycles until done and the read data
  task automatic cpu_op(input logic wr, input logic [19:0] a, input logic [7:0] d,
                        output int cycles, output logic [7:0] q);
    cpu_addr <= a; cpu_wdata <= d; cpu_rd <= !wr; cpu_wr <= wr;
    cycles = 0;
    do begin
      @(posedge clk);
      cycles++;
    end while (!cpu_done);
    q = cpu_rdata;
    cpu_rd <= 0; cpu_wr <= 0;
  endtask

  int cyc;
  logic [7:0] q;
  int pc_at, cpu_at;

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    cpu_op(1'b1, 20'h12345, 8'ha7, cyc, q);
    check("write latency", cyc, 5);
    check("chip cell written", u_ram.mem[20'h12345], 8'ha7);
    cpu_op(1'b1, 20'hfffff, 8'h3c, cyc, q);
    cpu_op(1'b0, 20'h12345, 8'h00, cyc, q);
    check("read latency", cyc, 5);
    check("read data", q, 8'ha7);
    cpu_op(1'b0, 20'hfffff, 8'h00, cyc, q);
    check("read top byte", q, 8'h3c);
    // simultaneous requests: PC interface first
    u_ram.mem[20'h00010] = 8'h11;
    u_ram.mem[20'h00020] = 8'h22;
    pc_addr <= 20'h10; pc_rd <= 1;
    cpu_addr <= 20'h20; cpu_rd <= 1;
    pc_at = 0; cpu_at = 0;
    for (int c = 1; c <= 20 && (pc_at == 0 || cpu_at == 0); c++) begin
      @(posedge clk);
      if (pc_done && pc_at == 0) begin
        pc_at = c; check("pc read data", pc_rdata, 8'h11); pc_rd <= 0;
      end
      if (cpu_done && cpu_at == 0) begin
        cpu_at = c; check("cpu read data", cpu_rdata, 8'h22); cpu_rd <= 0;
      end
    end
    check("pc served first", pc_at, 5);
    check("cpu served after", cpu_at, 10);
    // request while busy: CPU starts, PC arrives two cycles later
    cpu_addr <= 20'h20; cpu_rd <= 1;
    pc_at = 0; cpu_at = 0;
    for (int c = 1; c <= 20 && (pc_at == 0 || cpu_at == 0); c++) begin
      @(posedge clk);
      if (c == 2) begin pc_addr <= 20'h10; pc_rd <= 1; end
      if (pc_done && pc_at == 0) begin pc_at = c; pc_rd <= 0; end
      if (cpu_done && cpu_at == 0) begin cpu_at = c; cpu_rd <= 0; end
    end
    check("busy: cpu keeps its turn", cpu_at, 5);
    check("busy: pc waits", pc_at, 10);
    check("upper byte lane unused", ram_ub_n, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
