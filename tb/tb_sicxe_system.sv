// tb_sicxe_system: end-to-end test of the whole SIC/XE system at its
// default parameters (115200 baud at 50 MHz, 10 ms debouncers, 5-cycle
// memory accesses, 1 ms display refresh).
//
// A host model talks to the board over the serial line exactly as the
// loader on the personal computer would: it is first rejected while the
// interface is locked, unlocks it with "SICXE", downloads a program, its
// interrupt handler and the interrupt vector into memory, reads them back,
// and starts the processor. The program copies the switches to the LEDs,
// counts loop passes in memory, shows the count on a display digit and
// paints one VGA cell; the handler counts interrupts and records the
// switches and the last PS/2 scan code. The test then raises interrupts
// from the switches, the keyboard and the host, reads memory while the
// processor runs (so both masters compete for the memory), toggles the
// processor with the board button, stops it from the host (display shows
// "StOP"), makes it fail on an illegal opcode (display shows "Err"),
// resets it from the host and finally locks the interface again.
// A PSRAM model with a 70 ns access time stands in for the memory chip.
// Every mechanism is counted; one that never happened counts as a failure.
module tb_sicxe_system;
  import sicxe_pkg::*;

  localparam int CPB = 434;           // clocks per serial bit at the default rate
  localparam int DEB = 500_000;       // debounce time in clocks
  localparam int REF = 50_000;        // display refresh per digit

  logic clk = 1'b0, rst = 1'b1;
  logic toggle_btn = 1'b0;
  logic uart_rx = 1'b1, uart_tx;
  logic [22:0] ram_addr;
  logic [15:0] ram_dq_o, ram_dq_i;
  logic ram_dq_oe, ram_ce_n, ram_oe_n, ram_we_n, ram_adv_n, ram_clk, ram_cre, ram_lb_n, ram_ub_n;
  logic [7:0] switches = 8'h00;
  logic [1:0] buttons = 2'b00;
  logic [7:0] leds, seg_n;
  logic [3:0] an_n;
  logic [2:0] vga_red, vga_green;
  logic [1:0] vga_blue;
  logic vga_hsync_n, vga_vsync_n;
  logic ps2_clk = 1'b1, ps2_data = 1'b1;
  logic cpu_enable, cpu_error;
  logic [19:0] cpu_pc;

  always #10 clk = ~clk;

  sicxe_system dut (.*);

  psram_model u_ram (
    .addr(ram_addr), .dq_in(ram_dq_o), .dq_oe(ram_dq_oe), .dq_out(ram_dq_i),
    .ce_n(ram_ce_n), .oe_n(ram_oe_n), .we_n(ram_we_n), .lb_n(ram_lb_n)
  );

  int checks = 0, failures = 0;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // ------------------------------------------------------------ mechanisms
  typedef enum int {
    M_REJECT, M_UNLOCK, M_WRITE, M_READ, M_START, M_STOP, M_RESET, M_HOST_IRQ,
    M_LOCK, M_MEM_CONFLICT, M_SWITCH_IRQ, M_PS2_IRQ, M_HANDLER, M_TOGGLE,
    M_SHOW_STOP, M_SHOW_ERR, M_CPU_ERROR, M_LED_WRITE, M_DIGIT_WRITE, M_VGA_WRITE,
    M_COUNT
  } mech_e;
  int mech [M_COUNT];
  string mech_name [M_COUNT] = '{"locked/unknown command rejected", "unlock", "host memory write",
    "host memory read", "host start", "host stop", "host reset", "host interrupt", "host lock",
    "memory arbitration conflict", "switch interrupt", "PS/2 interrupt", "handler entry",
    "toggle button", "StOP shown", "Err shown", "CPU error", "LED write", "digit write", "VGA write"};

  always @(posedge clk) begin
    if ((dut.pcm_rd || dut.pcm_wr) && (dut.cm_rd || dut.cm_wr)) mech[M_MEM_CONFLICT]++;
    if (dut.u_cpu.at_boundary && dut.cpu_pc == 20'h800 && dut.u_cpu.enable) mech[M_HANDLER]++;
    if (dut.dev_wr && dut.port_id == DEV_LEDS) mech[M_LED_WRITE]++;
    if (dut.dev_wr && dut.port_id == DEV_SEG_DIG0) mech[M_DIGIT_WRITE]++;
    if (dut.dev_wr && dut.port_id == DEV_VGA_COLOR) mech[M_VGA_WRITE]++;
  end

  // watchdog
  initial begin
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ serial host
  byte unsigned rxq [$];

  // receiver: samples the middle of every bit of the board's transmit line
  initial begin
    logic [7:0] b;
    forever begin
      @(negedge uart_tx);
      repeat (CPB / 2) @(posedge clk);
      if (uart_tx == 1'b0) begin
        for (int i = 0; i < 8; i++) begin
          repeat (CPB) @(posedge clk);
          b[i] = uart_tx;
        end
        repeat (CPB) @(posedge clk);
        if (uart_tx == 1'b1) rxq.push_back(b);
        else begin failures++; $display("FAIL framing error from board"); end
      end
    end
  end

  task automatic send(input byte unsigned b);
    logic [9:0] f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      uart_rx <= f[i];
      repeat (CPB) @(posedge clk);
    end
  endtask

  task automatic recv(output byte unsigned b);
    int n = 0;
    while (rxq.size() == 0 && n < 40 * CPB) begin
      @(posedge clk);
      n++;
    end
    if (rxq.size() == 0) begin
      b = 8'h00;
      failures++;
      $display("FAIL no answer from board");
    end else b = rxq.pop_front();
  endtask

  task automatic expect_byte(input string what, input byte unsigned exp);
    byte unsigned b;
    recv(b);
    check(what, b, exp);
  endtask

  task automatic command(input byte unsigned c, input string what);
    send(c);
    expect_byte(what, 8'h4b);
  endtask

  task automatic host_write(input int addr, input byte unsigned data []);
    command(8'h02, "write accepted");
    send(8'(addr >> 16)); send(8'(addr >> 8)); send(8'(addr));
    send(8'(data.size() >> 8)); send(8'(data.size()));
    foreach (data[k]) send(data[k]);
    mech[M_WRITE]++;
  endtask

  task automatic host_read(input int addr, input int n, output byte unsigned data []);
    command(8'h01, "read accepted");
    send(8'(addr >> 16)); send(8'(addr >> 8)); send(8'(addr));
    send(8'(n >> 8)); send(8'(n));
    data = new[n];
    foreach (data[k]) recv(data[k]);
    mech[M_READ]++;
  endtask

  function automatic int word3(input byte unsigned d [], input int k);
    return {d[k], d[k+1], d[k+2]};
  endfunction

  // ------------------------------------------------------------ program
  typedef byte unsigned byte_arr_t [];
  byte unsigned img [int];
  int ip;
  task automatic emit(input logic [7:0] b);
    img[ip] = b;
    ip++;
  endtask
  task automatic f1(input logic [7:0] op);
    emit(op);
  endtask
  task automatic f3(input logic [7:0] op, input logic [1:0] ni, input logic [2:0] xbp,
                    input logic [11:0] disp);
    emit(op | 8'(ni)); emit({xbp, 1'b0, disp[11:8]}); emit(disp[7:0]);
  endtask
  task automatic f4(input logic [7:0] op, input logic [1:0] ni, input logic [19:0] addr);
    emit(op | 8'(ni)); emit({4'b0001, addr[19:16]}); emit(addr[15:8]); emit(addr[7:0]);
  endtask
  function automatic logic [11:0] pcrel(input int target, input int at);
    return 12'(target - (at + 3));
  endfunction
  function automatic byte_arr_t segment(input int from, input int to);
    byte_arr_t d = new[to - from];
    foreach (d[k]) d[k] = img[from + k];
    return d;
  endfunction

  localparam int COUNTER = 'h300, ICOUNT = 'h303, SWREC = 'h306, KEYREC = 'h307, SAVEA = 'h309;
  int main_end, handler_end, loop;

  task automatic build_program();
    // main program at 0
    ip = 0;
    f3(OP_LDA, 2'b01, 3'b000, 12'd3);  f3(OP_WD, 2'b01, 3'b000, 12'(DEV_VGA_ROW));
    f3(OP_LDA, 2'b01, 3'b000, 12'd4);  f3(OP_WD, 2'b01, 3'b000, 12'(DEV_VGA_COL));
    f3(OP_LDA, 2'b01, 3'b000, 12'he0); f3(OP_WD, 2'b01, 3'b000, 12'(DEV_VGA_COLOR));
    f1(OP_EINT);
    loop = ip;
    f3(OP_RD, 2'b01, 3'b000, 12'(DEV_SWITCHES));
    f3(OP_WD, 2'b01, 3'b000, 12'(DEV_LEDS));
    f4(OP_LDA, 2'b11, 20'(COUNTER));
    f3(OP_ADD, 2'b01, 3'b000, 12'd1);
    f4(OP_STA, 2'b11, 20'(COUNTER));
    f3(OP_WD, 2'b01, 3'b000, 12'(DEV_SEG_DIG0));
    f3(OP_J, 2'b11, 3'b001, pcrel(loop, ip));
    main_end = ip;
    // interrupt handler at 0x800
    ip = 'h800;
    f4(OP_STA, 2'b11, 20'(SAVEA));
    f4(OP_LDA, 2'b11, 20'(ICOUNT));
    f3(OP_ADD, 2'b01, 3'b000, 12'd1);
    f4(OP_STA, 2'b11, 20'(ICOUNT));
    f3(OP_RD, 2'b01, 3'b000, 12'(DEV_SWITCHES));
    f4(OP_STCH, 2'b11, 20'(SWREC));
    f3(OP_RD, 2'b01, 3'b000, 12'(DEV_PS2));
    f4(OP_STCH, 2'b11, 20'(KEYREC));
    f4(OP_LDA, 2'b11, 20'(SAVEA));
    f1(OP_EINT);
    f1(OP_RINT);
    handler_end = ip;
    // data: counters cleared, vector to the handler
    for (int a = COUNTER; a < SAVEA + 3; a++) img[a] = 8'h00;
    img['hffffd] = 8'h00; img['hffffe] = 8'h08; img['hfffff] = 8'h00;
  endtask

  // ------------------------------------------------------------ board helpers
  task automatic wait_cycles(input int n);
    repeat (n) @(posedge clk);
  endtask

  // one full scan of the four display digits
  logic [7:0] shown [4];
  task automatic scan_display();
    for (int c = 0; c < 5 * REF; c++) begin
      @(posedge clk);
      for (int d = 0; d < 4; d++) if (an_n == ~(4'b1 << d)) shown[d] = ~seg_n;
    end
  endtask

  task automatic press_toggle();
    toggle_btn <= 1'b1;
    wait_cycles(DEB + 5000);
    toggle_btn <= 1'b0;
    wait_cycles(DEB + 5000);
  endtask

  task automatic ps2_key(input logic [7:0] code);
    logic [10:0] f = {1'b1, ~^code, code, 1'b0};
    for (int i = 0; i < 11; i++) begin
      ps2_data <= f[i];
      wait_cycles(1000);     // 20 us half period, a 25 kHz keyboard clock
      ps2_clk <= 1'b0;
      wait_cycles(1000);
      ps2_clk <= 1'b1;
    end
  endtask

  // ------------------------------------------------------------ the test
  byte unsigned d [];
  int c0, c1, i0, pc0;

  initial begin
    build_program();
    wait_cycles(5);
    rst = 1'b0;
    wait_cycles(20);

    // locked: a command is rejected
    send(8'h00);
    expect_byte("locked ping rejected", 8'h58);
    mech[M_REJECT]++;
    // unlock
    send("S"); send("I"); send("C"); send("X"); send("E");
    expect_byte("unlock A", "A"); expect_byte("unlock C", "C"); expect_byte("unlock K", "K");
    mech[M_UNLOCK]++;
    command(8'h00, "ping");
    // an unknown command is rejected and locks again
    send(8'h42);
    expect_byte("unknown command rejected", 8'h58);
    mech[M_REJECT]++;
    send("S"); send("I"); send("C"); send("X"); send("E");
    expect_byte("unlock A", "A"); expect_byte("unlock C", "C"); expect_byte("unlock K", "K");
    mech[M_UNLOCK]++;

    // download
    host_write(0, segment(0, main_end));
    host_write('h800, segment('h800, handler_end));
    host_write(COUNTER, segment(COUNTER, SAVEA + 3));
    host_write('hffffd, segment('hffffd, 'h100000));
    host_read(0, main_end, d);
    foreach (d[k]) check($sformatf("program byte %0h", k), d[k], img[k]);
    host_read('hffffd, 3, d);
    check("vector", word3(d, 0), 'h800);

    // the processor starts stopped: display shows StOP
    check("stopped after power-up", cpu_enable, 0);
    scan_display();
    check("StOP S", shown[3], 8'h6b); check("StOP t", shown[2], 8'h5a);
    check("StOP O", shown[1], 8'h77); check("StOP P", shown[0], 8'h1f);
    if (shown[3] == 8'h6b && shown[0] == 8'h1f) mech[M_SHOW_STOP]++;

    // start
    command(8'h11, "start");
    mech[M_START]++;
    wait_cycles(2);
    check("running", cpu_enable, 1);
    wait_cycles(20000);
    check("VGA cell painted", dut.u_dev.u_vga.fb[3 * 40 + 4], 8'he0);

    // read memory while the processor runs
    host_read(COUNTER, 6, d);
    c0 = word3(d, 0);
    check("no interrupt yet", word3(d, 3), 0);
    host_read(COUNTER, 3, d);
    c1 = word3(d, 0);
    checks++;
    if (c1 <= c0) begin failures++; $display("FAIL counter not advancing %0d %0d", c0, c1); end

    // switch interrupt
    switches = 8'h5a;
    wait_cycles(DEB + 20000);
    check("LEDs follow switches", leds, 8'h5a);
    host_read(ICOUNT, 4, d);
    check("switch interrupt counted", word3(d, 0), 1);
    check("handler saw switches", d[3], 8'h5a);
    if (word3(d, 0) == 1) mech[M_SWITCH_IRQ]++;

    // keyboard interrupt
    ps2_key(8'h1c);
    wait_cycles(20000);
    host_read(ICOUNT, 5, d);
    check("PS/2 interrupt counted", word3(d, 0), 2);
    check("handler saw scan code", d[4], 8'h1c);
    if (word3(d, 0) == 2) mech[M_PS2_IRQ]++;

    // host interrupt
    command(8'h13, "interrupt");
    wait_cycles(20000);
    host_read(ICOUNT, 3, d);
    check("host interrupt counted", word3(d, 0), 3);
    if (word3(d, 0) == 3) mech[M_HOST_IRQ]++;

    // board button stops and restarts the processor
    press_toggle();
    check("button stops", cpu_enable, 0);
    pc0 = cpu_pc;
    wait_cycles(10000);
    check("stopped processor holds PC", cpu_pc, pc0);
    mech[M_TOGGLE]++;
    press_toggle();
    check("button restarts", cpu_enable, 1);
    mech[M_TOGGLE]++;

    // stop from the host
    command(8'h12, "stop");
    mech[M_STOP]++;
    wait_cycles(2);
    check("host stops", cpu_enable, 0);
    host_read(COUNTER, 3, d);
    c0 = word3(d, 0);
    wait_cycles(20000);
    host_read(COUNTER, 3, d);
    check("counter frozen while stopped", word3(d, 0), c0);
    // stopped either just after the counter store or after the display write
    checks++;
    if (dut.u_dev.u_seg.direct[0] != (c0 & 'hff) && dut.u_dev.u_seg.direct[0] != ((c0 - 1) & 'hff)) begin
      failures++;
      $display("FAIL digit 0 shows %0h, counter %0h", dut.u_dev.u_seg.direct[0], c0);
    end

    // illegal opcode: reset, start, error
    host_write(0, '{8'hff});
    command(8'h10, "reset");
    mech[M_RESET]++;
    wait_cycles(2);
    check("reset PC", cpu_pc, 0);
    command(8'h11, "start");
    mech[M_START]++;
    wait_cycles(1000);
    check("error raised", cpu_error, 1);
    if (cpu_error) mech[M_CPU_ERROR]++;
    scan_display();
    check("Err E", shown[3], 8'h5b); check("Err r", shown[2], 8'h18);
    check("Err r", shown[1], 8'h18); check("Err blank", shown[0], 8'h00);
    if (shown[3] == 8'h5b && shown[0] == 8'h00) mech[M_SHOW_ERR]++;
    command(8'h12, "stop");
    mech[M_STOP]++;
    command(8'h10, "reset");
    mech[M_RESET]++;
    wait_cycles(2);
    check("reset clears error", cpu_error, 0);

    // lock again
    send(8'hff);
    mech[M_LOCK]++;
    wait_cycles(2 * CPB);
    send(8'h00);
    expect_byte("ping after lock rejected", 8'h58);

    for (int m = 0; m < M_COUNT; m++) begin
      $display("mechanism %-32s happened %0d times", mech_name[m], mech[m]);
      checks++;
      if (mech[m] == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", mech_name[m]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
