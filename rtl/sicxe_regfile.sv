// sicxe_regfile: the register block of the SIC/XE processor.
//
// Holds the six 24-bit architectural registers A, X, L, B, S and T
// (numbers 0 to 5). Two combinational read ports, addressed by the r1 and
// r2 fields of an instruction, feed the temporary registers; A, X, L and B
// are also brought out directly, as the datapath multiplexers select them
// by name. One synchronous write port takes the RES register. A write to
// a number above 5 is ignored and a read of one returns zero. Reset clears
// every register.
module sicxe_regfile (
  input  logic        clk,
  input  logic        rst,
  input  logic [3:0]  ra1,
  input  logic [3:0]  ra2,
  output logic [23:0] rd1,
  output logic [23:0] rd2,
  input  logic        we,
  input  logic [3:0]  wa,
  input  logic [23:0] wd,
  output logic [23:0] reg_a,
  output logic [23:0] reg_x,
  output logic [23:0] reg_l,
  output logic [23:0] reg_b
);
  logic [23:0] regs [6];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 6; i++) regs[i] <= '0;
    end else if (we && wa < 4'd6) begin
      regs[wa[2:0]] <= wd;
    end
  end

  assign rd1   = (ra1 < 4'd6) ? regs[ra1[2:0]] : '0;
  assign rd2   = (ra2 < 4'd6) ? regs[ra2[2:0]] : '0;
  assign reg_a = regs[0];
  assign reg_x = regs[1];
  assign reg_l = regs[2];
  assign reg_b = regs[3];
endmodule
