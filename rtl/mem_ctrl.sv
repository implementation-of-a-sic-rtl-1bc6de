// mem_ctrl: memory controller between the PC interface, the CPU and the
// external asynchronous PSRAM.
//
// Two requesters share the memory: the personal computer interface (port
// "pc") and the CPU (port "cpu"). Each holds rd or wr, with a 20-bit byte
// address and write data, until done is high for one cycle; read data is
// valid in that cycle. When both request in the same cycle the PC
// interface wins; a request that arrives during an operation waits for it
// to finish. A small FSM latches the granted request, then keeps the chip
// selected for ACCESS_CYCLES clock cycles (4 x 20 ns = 80 ns at 50 MHz,
// above the 70 ns access time), so one operation takes ACCESS_CYCLES + 1 =
// 5 cycles from request to done. Only the low byte lane of the 16-bit chip
// is used: byte address N is word N of the chip, so the 1 MB of SIC/XE
// memory occupies the lowest 2 MB of the device. The chip runs in its
// asynchronous mode (clock low, address valid held low, configuration
// register access off). Signals ending in _n are active low; the data bus
// is split into output, input and output-enable for a tristate pad at the
// board level. The upper half of the read bus, ram_dq_i[15:8], is
// therefore unused, and ram_ub_n, ram_adv_n, ram_clk, ram_cre and
// ram_addr[22:20] are constant by design.
module mem_ctrl #(
  parameter int unsigned ACCESS_CYCLES = 4
) (
  input  logic        clk,
  input  logic        rst,
  // personal computer interface (priority)
  input  logic [19:0] pc_addr,
  input  logic [7:0]  pc_wdata,
  output logic [7:0]  pc_rdata,
  input  logic        pc_rd,
  input  logic        pc_wr,
  output logic        pc_done,
  // CPU
  input  logic [19:0] cpu_addr,
  input  logic [7:0]  cpu_wdata,
  output logic [7:0]  cpu_rdata,
  input  logic        cpu_rd,
  input  logic        cpu_wr,
  output logic        cpu_done,
  // PSRAM pins
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
  output logic        ram_ub_n
);
  typedef enum logic {M_IDLE, M_ACCESS} mstate_e;

  mstate_e     state;
  logic        owner_pc;     // 1: PC interface owns the current operation
  logic        is_write;
  logic [19:0] addr_q;
  logic [7:0]  wdata_q;
  logic [$clog2(ACCESS_CYCLES+1)-1:0] count;
  logic        last;

  assign last = (state == M_ACCESS) && (int'(count) == ACCESS_CYCLES - 1);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= M_IDLE;
      owner_pc <= 1'b0;
      is_write <= 1'b0;
      addr_q   <= '0;
      wdata_q  <= '0;
      count    <= '0;
    end else begin
      unique case (state)
        M_IDLE: begin
          count <= '0;
          if (pc_rd || pc_wr) begin
            owner_pc <= 1'b1;
            is_write <= pc_wr;
            addr_q   <= pc_addr;
            wdata_q  <= pc_wdata;
            state    <= M_ACCESS;
          end else if (cpu_rd || cpu_wr) begin
            owner_pc <= 1'b0;
            is_write <= cpu_wr;
            addr_q   <= cpu_addr;
            wdata_q  <= cpu_wdata;
            state    <= M_ACCESS;
          end
        end
        M_ACCESS: begin
          count <= count + 1'b1;
          if (last) state <= M_IDLE;
        end
        default: state <= M_IDLE;
      endcase
    end
  end

  assign pc_done   = last && owner_pc;
  assign cpu_done  = last && !owner_pc;
  assign pc_rdata  = ram_dq_i[7:0];
  assign cpu_rdata = ram_dq_i[7:0];

  assign ram_addr  = {3'b000, addr_q};
  assign ram_dq_o  = {8'h00, wdata_q};
  assign ram_dq_oe = (state == M_ACCESS) && is_write;
  assign ram_ce_n  = !(state == M_ACCESS);
  assign ram_oe_n  = !((state == M_ACCESS) && !is_write);
  assign ram_we_n  = !((state == M_ACCESS) && is_write);
  assign ram_adv_n = 1'b0;
  assign ram_clk   = 1'b0;
  assign ram_cre   = 1'b0;
  assign ram_lb_n  = !(state == M_ACCESS);
  assign ram_ub_n  = 1'b1;

  a_one_done: assert property (@(posedge clk) disable iff (rst) !(pc_done && cpu_done));
endmodule
