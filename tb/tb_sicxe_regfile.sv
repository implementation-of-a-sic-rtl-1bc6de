// tb_sicxe_regfile: self-checking test of the register block.
//
// Checks that reset clears all six registers, then performs random writes
// (including to the unused numbers 6 and 7, which must change nothing)
// and random reads on both read ports every cycle, comparing with a model
// array, and checks the direct outputs of A, X, L and B.
module tb_sicxe_regfile;
  logic clk = 1'b0, rst = 1'b1;
  logic [3:0] ra1, ra2, wa;
  logic [23:0] rd1, rd2, wd, reg_a, reg_x, reg_l, reg_b;
  logic we = 1'b0;
  int checks = 0, failures = 0;
  logic [23:0] model [6];

  always #10 clk = ~clk;
  sicxe_regfile dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
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

  // register numbers used by the instruction set: A0 X1 L2 B3 S4 T5
  int nums [6] = '{0, 1, 2, 3, 4, 5};

  initial begin
    ra1 = 0; ra2 = 0; wa = 0; wd = 0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    foreach (nums[i]) begin
      ra1 = 4'(nums[i]); #1;
      check("cleared by reset", rd1, 0);
      model[i] = 0;
    end
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      we = 1'($urandom);
      wa = 4'($urandom_range(7));
      wd = 24'($urandom);
      @(posedge clk);
      if (we && wa < 6) model[wa] = wd;
      @(negedge clk);
      we = 1'b0;
      ra1 = 4'($urandom_range(5)); ra2 = 4'($urandom_range(5));
      #1;
      check("read port 1", rd1, model[ra1]);
      check("read port 2", rd2, model[ra2]);
      check("A out", reg_a, model[0]);
      check("X out", reg_x, model[1]);
      check("L out", reg_l, model[2]);
      check("B out", reg_b, model[3]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
