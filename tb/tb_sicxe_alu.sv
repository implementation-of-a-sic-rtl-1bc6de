// tb_sicxe_alu: self-checking test of the CPU's ALU.
//
// Applies directed corner values and random operands to every operation
// and compares result and comparison code with a reference written here:
// 24-bit wrap-around add, subtract and multiply, bitwise and/or, left
// shift as a 24-bit rotation, right shift with sign fill, the two pass
// operations, byte insertion into the low byte, and signed compare.
module tb_sicxe_alu;
  import sicxe_pkg::*;
  alu_op_e op;
  logic [23:0] a, b, result;
  logic [4:0] shamt;
  logic [1:0] cmp;
  int checks = 0, failures = 0;

  sicxe_alu dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [23:0] ref_res(alu_op_e o, logic [23:0] x, logic [23:0] y, int n);
    logic [23:0] r;
    case (o)
      ALU_ADD: return 24'(int'(x) + int'(y));
      ALU_SUB: return 24'(int'(x) - int'(y));
      ALU_MUL: return 24'(longint'(x) * longint'(y));
      ALU_AND: return x & y;
      ALU_OR:  return x | y;
      ALU_SHL: begin
        r = x;
        repeat (n) r = {r[22:0], r[23]};
        return r;
      end
      ALU_SHR: begin
        r = x;
        repeat (n) r = {r[23], r[23:1]};
        return r;
      end
      ALU_PASSA: return x;
      ALU_PASSB: return y;
      default: return {x[23:8], y[7:0]};
    endcase
  endfunction

  function automatic logic [1:0] ref_cmp(logic [23:0] x, logic [23:0] y);
    int sx = x[23] ? int'(x) - (1 << 24) : int'(x);
    int sy = y[23] ? int'(y) - (1 << 24) : int'(y);
    return sx < sy ? 2'b00 : sx == sy ? 2'b01 : 2'b10;
  endfunction

  task automatic apply(alu_op_e o, logic [23:0] x, logic [23:0] y, int n);
    op = o; a = x; b = y; shamt = 5'(n);
    #1;
    checks += 2;
    if (result !== ref_res(o, x, y, n)) begin
      failures++;
      $display("FAIL %s %h %h %0d: got %h expected %h", o.name(), x, y, n, result, ref_res(o, x, y, n));
    end
    if (cmp !== ref_cmp(x, y)) begin
      failures++;
      $display("FAIL cmp %h %h: got %b", x, y, cmp);
    end
  endtask

  logic [23:0] corner [6] = '{24'h000000, 24'h000001, 24'h7fffff, 24'h800000, 24'hffffff, 24'h123456};

  initial begin
    alu_op_e o;
    for (int k = 0; k < 10; k++) begin
      o = alu_op_e'(k);
      foreach (corner[i]) foreach (corner[j]) apply(o, corner[i], corner[j], (i * 6 + j) % 24);
      for (int r = 0; r < 300; r++) apply(o, 24'($urandom), 24'($urandom), $urandom_range(23));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
