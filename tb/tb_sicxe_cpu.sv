// tb_sicxe_cpu: self-checking test of the SIC/XE processor.
//
// The processor runs against a byte-wide memory model (done after
// MEM_LAT cycles, as the memory controller does) and a small device
// model. Test 1 runs the summing program of the assembler example
// (machine code as the assembler lists it) and checks the stored sum 74.
// Test 2 runs a program built here from the instruction formats: immediate,
// format 4, base-relative, indexed, indirect, PC-relative and SIC
// addressing; MULR, TIXR loop, SHIFTL, LDCH/STCH, JSUB/RSUB, COMP with
// conditional jumps, STSW, WD/RD on the device bus (each strobe one cycle), and an interrupt with
// EINT/RINT that must restore CC. Test 3 checks that enable low holds
// the processor before its first fetch. Tests 4 and 5 check that an illegal
// opcode and an immediate store raise error. Expected values are worked
// out by hand from the instruction set.
module tb_sicxe_cpu;
  import sicxe_pkg::*;

  localparam int MEM_LAT = 5;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        enable = 1'b0;
  logic        irq = 1'b0;
  logic        error;
  logic [19:0] mem_addr;
  logic [7:0]  mem_dout, mem_din;
  logic        mem_rd, mem_wr, mem_done;
  logic [7:0]  port_id, port_out, port_in;
  logic        dev_rd, dev_wr;
  logic [19:0] pc;
  logic [1:0]  cc;
  logic        i_flag, bound;

  int checks = 0, failures = 0;
  int irq_taken = 0, dev_writes = 0;
  logic [7:0] dev5_val;

  always #10 clk = ~clk;

  sicxe_cpu dut (
    .clk, .rst, .enable, .irq_req(irq), .error,
    .mem_addr, .mem_dout, .mem_din, .mem_rd, .mem_wr, .mem_done,
    .port_id, .port_out, .port_in, .dev_rd, .dev_wr,
    .pc_o(pc), .cc_o(cc), .i_o(i_flag), .at_boundary(bound)
  );

  // memory model
  logic [7:0] mem [1 << 20];
  int lat;
  assign mem_done = (mem_rd || mem_wr) && (lat == MEM_LAT - 1);
  assign mem_din  = mem[mem_addr];
  always_ff @(posedge clk) begin
    if (mem_rd || mem_wr) begin
      lat <= mem_done ? 0 : lat + 1;
      if (mem_done && mem_wr) mem[mem_addr] <= mem_dout;
    end else lat <= 0;
  end

  // device model: device 2 reads 0x9a; device 5 write is recorded;
  // a write to device 0x7f raises the interrupt line for one cycle
  always_ff @(posedge clk) begin
    irq <= 1'b0;
    if (dev_rd) port_in <= (port_id == 8'h02) ? 8'h9a : 8'h00;
    if (dev_wr) begin
      dev_writes <= dev_writes + 1;
      if (port_id == 8'h05) dev5_val <= port_out;
      if (port_id == 8'h7f) irq <= 1'b1;
    end
  end

  // I/O timing: every device strobe lasts one cycle (the access is the
  // strobe cycle plus the cycle in which port_in is sampled)
  int io_strobes = 0, io_long = 0;
  logic io_prev = 1'b0;
  always_ff @(posedge clk) begin
    io_prev <= dev_rd || dev_wr;
    if (dev_rd || dev_wr) begin
      io_strobes <= io_strobes + 1;
      if (io_prev) io_long <= io_long + 1;
    end
  end

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // program builder
  int ip;
  task automatic emit(input logic [7:0] b);
    mem[ip] = b;
    ip++;
  endtask
  task automatic f1(input logic [7:0] op);
    emit(op);
  endtask
  task automatic f2(input logic [7:0] op, input logic [3:0] r1, input logic [3:0] r2);
    emit(op); emit({r1, r2});
  endtask
  // format 3: ni = {n,i}; flags = {x,b,p}
  task automatic f3(input logic [7:0] op, input logic [1:0] ni, input logic [2:0] xbp,
                    input logic [11:0] disp);
    emit(op | 8'(ni)); emit({xbp, 1'b0, disp[11:8]}); emit(disp[7:0]);
  endtask
  task automatic f4(input logic [7:0] op, input logic [1:0] ni, input logic x,
                    input logic [19:0] addr);
    emit(op | 8'(ni)); emit({x, 3'b001, addr[19:16]}); emit(addr[15:8]); emit(addr[7:0]);
  endtask
  task automatic sic(input logic [7:0] op, input logic x, input logic [14:0] addr);
    emit(op); emit({x, addr[14:8]}); emit(addr[7:0]);
  endtask
  function automatic logic [11:0] pcrel(input int target, input int at);
    return 12'(target - (at + 3));
  endfunction
  function automatic logic [23:0] word_at(input int a);
    return {mem[a], mem[a+1], mem[a+2]};
  endfunction

  task automatic check(input string what, input logic [23:0] got, input logic [23:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic clear_mem();
    for (int a = 0; a < (1 << 20); a++) mem[a] = 8'h00;
  endtask

  task automatic run_from_reset(input int max_cycles, input int stop_pc);
    rst = 1'b1;
    enable = 1'b1;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int c = 0; c < max_cycles; c++) begin
      @(posedge clk);
      if (error) break;
      if (bound && pc == 20'(stop_pc)) break;
    end
  endtask

  int halt;
  int lbl_loop, lbl_fail;

  initial begin
    // ---------------- Test 1: assembler example program ----------------
    clear_mem();
    begin
      logic [7:0] prog [] = '{8'h75,8'h00,8'h0c, 8'hb4,8'h10, 8'hb4,8'h40,
        8'h03,8'ha0,8'h15, 8'h90,8'h04, 8'h01,8'h00,8'h03, 8'h90,8'h01,
        8'ha0,8'h15, 8'h3b,8'h2f,8'hf1, 8'h7f,8'h20,8'h03, 8'h3f,8'h2f,8'hfd,
        8'h00,8'h00,8'h00, 8'h00,8'h00,8'h0c, 8'h00,8'h00,8'h10,
        8'h00,8'h00,8'h24, 8'h00,8'h00,8'h0a};
      foreach (prog[k]) mem[k] = prog[k];
    end
    run_from_reset(20000, 'h19);
    repeat (200) @(posedge clk);
    check("sample: RESULT", word_at('h1c), 24'd74);
    check("sample: looping at WAIT", 24'(pc), 24'h19);
    check("sample: no error", 24'(error), 24'd0);

    // ---------------- Test 2: instruction mix ----------------
    clear_mem();
    // data
    {mem['h403], mem['h404], mem['h405]} = 24'h123456;
    {mem['h500], mem['h501], mem['h502]} = 24'h000600;
    {mem['hffffd], mem['hffffe], mem['hfffff]} = 24'h000800;
    // interrupt handler at 0x800
    ip = 'h800;
    f3(OP_LDA, 2'b01, 3'b000, 12'h077);
    f4(OP_STA, 2'b11, 1'b0, 20'h310);
    f3(OP_COMP, 2'b01, 3'b000, 12'h000);     // CC = greater inside the handler
    f1(OP_EINT);
    f1(OP_RINT);
    // subroutine at 0x700
    ip = 'h700;
    f3(OP_LDA, 2'b01, 3'b000, 12'h021);
    f3(OP_RSUB, 2'b11, 3'b000, 12'h000);
    // main program
    ip = 0;
    f3(OP_LDA, 2'b01, 3'b000, 12'd5);        // A = 5
    f3(OP_LDB, 2'b01, 3'b000, 12'h200);      // B = 0x200
    f3(OP_ADD, 2'b01, 3'b000, 12'd3);        // A = 8
    f4(OP_STA, 2'b11, 1'b0, 20'h300);        // [300] = 8
    f3(OP_LDS, 2'b01, 3'b000, 12'd7);        // S = 7
    f2(OP_MULR, R_S, R_A);                   // A = 56
    f3(OP_STA, 2'b11, 3'b010, 12'h010);      // base relative: [210] = 56
    f3(OP_LDX, 2'b01, 3'b000, 12'd3);        // X = 3
    f4(OP_LDA, 2'b11, 1'b1, 20'h400);        // A = [403] = 123456
    f4(OP_STA, 2'b10, 1'b0, 20'h500);        // indirect: [600] = 123456
    f3(OP_COMP, 2'b01, 3'b000, 12'h056);     // greater
    f4(OP_STSW, 2'b11, 1'b0, 20'h31c);       // [31c] = 000002 (CC greater)
    lbl_fail = 'h7f0;
    f3(OP_JGT, 2'b11, 3'b001, pcrel(ip + 7, ip));   // skip the next instruction
    f4(OP_J, 2'b11, 1'b0, 20'(lbl_fail));
    f4(OP_JSUB, 2'b11, 1'b0, 20'h700);       // A = 0x21
    f4(OP_STA, 2'b11, 1'b0, 20'h303);        // [303] = 21
    f2(OP_SHIFTL, R_A, 4'd3);                // A = 0x210
    f4(OP_STA, 2'b11, 1'b0, 20'h306);        // [306] = 210
    f2(OP_CLEAR, R_X, 4'd0);                 // X = 0
    lbl_loop = ip;
    f2(OP_TIXR, R_S, 4'd0);                  // X++ ; compare with S
    f3(OP_JLT, 2'b11, 3'b001, pcrel(lbl_loop, ip));
    f4(OP_STX, 2'b11, 1'b0, 20'h309);        // [309] = 7
    f4(OP_LDCH, 2'b11, 1'b0, 20'h403);       // A = 0x212
    f4(OP_STCH, 2'b11, 1'b0, 20'h30c);       // [30c] = 12
    f3(OP_WD, 2'b01, 3'b000, 12'h005);       // device 5 <- 12
    f3(OP_RD, 2'b01, 3'b000, 12'h002);       // A = 0x29a
    f4(OP_STA, 2'b11, 1'b0, 20'h30d);        // [30d] = 00029a
    f1(OP_EINT);
    f3(OP_LDA, 2'b01, 3'b000, 12'd1);        // A = 1
    f3(OP_COMP, 2'b01, 3'b000, 12'd1);       // equal
    f3(OP_WD, 2'b01, 3'b000, 12'h07f);       // raises the interrupt
    f4(OP_STA, 2'b11, 1'b0, 20'h313);        // [313] = 77 (set by the handler)
    f3(OP_JEQ, 2'b11, 3'b001, pcrel(ip + 7, ip));   // CC restored to equal
    f4(OP_J, 2'b11, 1'b0, 20'(lbl_fail));
    sic(OP_LDA, 1'b0, 15'h403);              // SIC format: A = 123456
    f4(OP_STA, 2'b11, 1'b0, 20'h316);
    f3(OP_SUB, 2'b01, 3'b000, 12'h456);      // A = 123000
    f3(OP_OR, 2'b01, 3'b000, 12'h00f);       // A = 12300f
    f4(OP_STA, 2'b11, 1'b0, 20'h319);
    halt = ip;
    f3(OP_J, 2'b11, 3'b001, pcrel(halt, ip));
    // failure trap
    ip = lbl_fail;
    f3(OP_J, 2'b11, 3'b001, pcrel(lbl_fail, ip));

    fork
      begin
        // count interrupt entries: PC reaches the handler
        forever begin
          @(posedge clk);
          if (bound && pc == 20'h800) begin
            irq_taken++;
            @(posedge clk);
            while (pc == 20'h800) @(posedge clk);
          end
        end
      end
      run_from_reset(100000, halt);
    join_any
    disable fork;
    check("mix: reached halt", 24'(pc), 24'(halt));
    check("mix: no error", 24'(error), 24'd0);
    check("mix: [300]", word_at('h300), 24'd8);
    check("mix: base rel [210]", word_at('h210), 24'd56);
    check("mix: indirect [600]", word_at('h600), 24'h123456);
    check("mix: jsub/rsub [303]", word_at('h303), 24'h21);
    check("mix: shiftl [306]", word_at('h306), 24'h210);
    check("mix: tixr loop [309]", word_at('h309), 24'd7);
    check("mix: stch [30c]", 24'(mem['h30c]), 24'h12);
    check("mix: stx low byte [30b]", 24'(mem['h30b]), 24'h07);
    check("mix: rd [30d]", word_at('h30d), 24'h00029a);
    check("mix: wd device 5", 24'(dev5_val), 24'h12);
    check("mix: handler ran [310]", word_at('h310), 24'h77);
    check("mix: after rint [313]", word_at('h313), 24'h77);
    check("mix: sic format [316]", word_at('h316), 24'h123456);
    check("mix: sub/or [319]", word_at('h319), 24'h12300f);
    check("mix: stsw [31c]", word_at('h31c), 24'h000002);
    check("mix: one interrupt", 24'(irq_taken), 24'd1);
    check("mix: I enabled again", 24'(i_flag), 24'd1);

    // ---------------- Test 3: enable holds the CPU ----------------
    rst = 1'b1;
    enable = 1'b0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    repeat (100) @(posedge clk);
    check("suspend: no fetch", 24'(pc), 24'd0);
    enable = 1'b1;
    repeat (100) @(posedge clk);
    checks++;
    if (pc == 0) begin failures++; $display("FAIL resume: no progress"); end

    // ---------------- Test 4: invalid opcode ----------------
    clear_mem();
    mem[0] = 8'hff;
    run_from_reset(1000, 'hfffff);
    check("bad opcode: error", 24'(error), 24'd1);

    // ---------------- Test 5: immediate store ----------------
    clear_mem();
    ip = 0;
    f3(OP_STA, 2'b01, 3'b000, 12'h100);
    run_from_reset(1000, 'hfffff);
    check("immediate store: error", 24'(error), 24'd1);

    check("i/o strobes seen", 24'(io_strobes > 0), 24'd1);
    check("i/o strobes one cycle long", 24'(io_long), 24'd0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
