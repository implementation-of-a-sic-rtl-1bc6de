// tb_pc_iface: self-checking test of the personal computer interface
// protocol engine, at byte level.
//
// The test plays the host: it hands bytes to the engine as the serial
// decoder would, takes its answers through a valid/ready port with random
// delays, and serves its memory requests from a model with 5-cycle
// latency. It checks: a command while locked is rejected with 0x58; the
// unlock sequence "SICXE" is answered "ACK"; a write of 7 bytes at 0x13c
// and a read of them back (the example exchange of the protocol); the
// reset/start/stop/interrupt commands answer 0x4b and pulse their output
// once; an unknown command is rejected and relocks; a wrong unlock byte
// is rejected; 0xff relocks without an answer.
module tb_pc_iface;
  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] rx_data = '0, tx_data;
  logic rx_valid = 1'b0, tx_valid, tx_ready = 1'b0;
  logic [19:0] mem_addr;
  logic [7:0] mem_wdata, mem_rdata;
  logic mem_rd, mem_wr, mem_done;
  logic cpu_reset, cpu_start, cpu_stop, cpu_interrupt, unlocked;
  int checks = 0, failures = 0;
  int n_reset = 0, n_start = 0, n_stop = 0, n_int = 0;

  always #10 clk = ~clk;

  pc_iface dut (.*);

  // memory model
  logic [7:0] mem [1 << 20];
  int lat = 0;
  assign mem_done  = (mem_rd || mem_wr) && lat == 4;
  assign mem_rdata = mem[mem_addr];
  always_ff @(posedge clk) begin
    if (mem_rd || mem_wr) begin
      lat <= mem_done ? 0 : lat + 1;
      if (mem_done && mem_wr) mem[mem_addr] <= mem_wdata;
    end else lat <= 0;
    if (!rst) begin
      n_reset <= n_reset + int'(cpu_reset);
      n_start <= n_start + int'(cpu_start);
      n_stop  <= n_stop + int'(cpu_stop);
      n_int   <= n_int + int'(cpu_interrupt);
    end
  end

  // answers from the engine
  logic [7:0] answers [$];
  always @(posedge clk) begin
    if (tx_valid && tx_ready) answers.push_back(tx_data);
    tx_ready <= ($urandom % 4) == 0;
  end

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
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic send(input logic [7:0] b);
    rx_data  <= b;
    rx_valid <= 1'b1;
    @(posedge clk);
    rx_valid <= 1'b0;
    repeat (20) @(posedge clk);    // bytes arrive far apart on a serial line
  endtask

  task automatic expect_bytes(input string what, input logic [7:0] exp [$]);
    repeat (200) @(posedge clk);
    check({what, ": answer length"}, answers.size(), exp.size());
    foreach (exp[k]) if (k < answers.size()) check({what, ": answer byte"}, answers[k], exp[k]);
    answers.delete();
  endtask

  logic [7:0] key [$] = '{"S", "I", "C", "X", "E"};
  logic [7:0] payload [$] = '{8'h20, 8'h03, 8'h3f, 8'h2f, 8'hd0, 8'h6d, 8'hae};

  initial begin
    for (int a = 0; a < 'h200; a++) mem[a] = 8'h00;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (3) @(posedge clk);
    send(8'h00);
    expect_bytes("ping while locked", '{8'h58});
    check("still locked", unlocked, 0);
    foreach (key[k]) send(key[k]);
    expect_bytes("unlock", '{"A", "C", "K"});
    check("unlocked", unlocked, 1);
    send(8'h00);
    expect_bytes("ping", '{8'h4b});
    // write 7 bytes at 0x13c
    send(8'h02);
    send(8'h00); send(8'h01); send(8'h3c); send(8'h00); send(8'h07);
    foreach (payload[k]) send(payload[k]);
    expect_bytes("write", '{8'h4b});
    foreach (payload[k]) check("memory written", mem['h13c + k], payload[k]);
    check("byte after untouched", mem['h143], 0);
    // read them back
    send(8'h01);
    send(8'h00); send(8'h01); send(8'h3c); send(8'h00); send(8'h07);
    begin
      logic [7:0] exp [$];
      exp = {8'h4b, payload};
      expect_bytes("read", exp);
    end
    // zero-length read
    send(8'h01);
    send(8'h00); send(8'h00); send(8'h00); send(8'h00); send(8'h00);
    expect_bytes("empty read", '{8'h4b});
    // CPU control commands
    send(8'h10); expect_bytes("reset", '{8'h4b});
    send(8'h11); expect_bytes("start", '{8'h4b});
    send(8'h12); expect_bytes("stop", '{8'h4b});
    send(8'h13); expect_bytes("interrupt", '{8'h4b});
    check("reset pulses", n_reset, 1);
    check("start pulses", n_start, 1);
    check("stop pulses", n_stop, 1);
    check("interrupt pulses", n_int, 1);
    // unknown command relocks
    send(8'h55); expect_bytes("unknown command", '{8'h58});
    check("relocked after bad command", unlocked, 0);
    send(8'h00); expect_bytes("ping after relock", '{8'h58});
    // wrong unlock byte
    send("S"); send("I"); send("Q");
    expect_bytes("wrong key", '{8'h58});
    check("wrong key leaves locked", unlocked, 0);
    foreach (key[k]) send(key[k]);
    expect_bytes("unlock again", '{"A", "C", "K"});
    send(8'hff); expect_bytes("lock command", '{});
    check("locked by 0xff", unlocked, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
