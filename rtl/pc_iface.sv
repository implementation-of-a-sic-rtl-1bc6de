// pc_iface: personal computer interface, the protocol engine behind the
// serial link.
//
// The host opens every exchange with a one-byte command; the interface
// answers 0x4b ("K") to accept it or 0x58 ("X") to reject it. After reset
// it is locked and rejects everything until it receives the five bytes
// "SICXE", to which it answers "ACK" and unlocks. Commands when unlocked:
//   0x00 ping, 0x10 reset CPU, 0x11 start CPU, 0x12 stop CPU,
//   0x13 interrupt                 -> "K" and a one-cycle pulse
//   0x01 read  memory: "K", then 3 address bytes and 2 count bytes from
//                       the host (big-endian), then count data bytes back
//   0x02 write memory: "K", then 3 address bytes, 2 count bytes and count
//                       data bytes from the host
//   0xff                           -> back to locked, no answer
// Any other command, or a wrong byte in the unlock sequence, is answered
// with "X" and locks the interface. The state names and transitions follow
// the document's control FSM; the silent 0xff, the big-endian fields, the
// use of the low 20 address bits and the absence of a time-out are this
// design's choices.
// Bytes arrive from the serial decoder as a one-cycle rx_valid pulse and
// leave through the serial encoder's valid/ready handshake. Memory accesses
// use the memory controller's rd/wr ... done handshake, one byte at a time.
module pc_iface (
  input  logic        clk,
  input  logic        rst,
  // serial decoder
  input  logic [7:0]  rx_data,
  input  logic        rx_valid,
  // serial encoder
  output logic [7:0]  tx_data,
  output logic        tx_valid,
  input  logic        tx_ready,
  // memory controller
  output logic [19:0] mem_addr,
  output logic [7:0]  mem_wdata,
  input  logic [7:0]  mem_rdata,
  output logic        mem_rd,
  output logic        mem_wr,
  input  logic        mem_done,
  // CPU control pulses
  output logic        cpu_reset,
  output logic        cpu_start,
  output logic        cpu_stop,
  output logic        cpu_interrupt,
  output logic        unlocked
);
  typedef enum logic [4:0] {
    LOCKED, KEY_GET1, KEY_GET2, KEY_GET3, KEY_GET4,
    KEY_SEND1, KEY_SEND2, KEY_SEND3, PROTO_ERROR, UNLOCKED, CMD_ACCEPT,
    GET_ADDR0, GET_ADDR1, GET_ADDR2, GET_COUNT0, GET_COUNT1,
    READ_START, READ_MEM, READ_OUT, WRITE_START, WRITE_IN, WRITE_MEM
  } pstate_e;

  localparam logic [7:0] CMD_PING  = 8'h00, CMD_READ  = 8'h01, CMD_WRITE = 8'h02;
  localparam logic [7:0] CMD_RESET = 8'h10, CMD_START = 8'h11, CMD_STOP  = 8'h12;
  localparam logic [7:0] CMD_INT   = 8'h13, CMD_LOCK  = 8'hff;
  localparam logic [7:0] RESP_OK   = 8'h4b, RESP_ERR  = 8'h58;

  pstate_e     state;
  logic [7:0]  cmd;
  logic [23:0] addr;
  logic [15:0] count;
  logic [7:0]  data;
  logic        sent;

  function automatic logic cmd_known(input logic [7:0] c);
    return c == CMD_PING || c == CMD_READ || c == CMD_WRITE || c == CMD_RESET ||
           c == CMD_START || c == CMD_STOP || c == CMD_INT;
  endfunction

  // Byte to send in the sending states
  always_comb begin
    tx_valid = 1'b1;
    unique case (state)
      KEY_SEND1:   tx_data = "A";
      KEY_SEND2:   tx_data = "C";
      KEY_SEND3:   tx_data = "K";
      PROTO_ERROR: tx_data = RESP_ERR;
      CMD_ACCEPT:  tx_data = RESP_OK;
      READ_OUT:    tx_data = data;
      default: begin
        tx_data  = 8'h00;
        tx_valid = 1'b0;
      end
    endcase
  end
  assign sent = tx_valid && tx_ready;

  assign mem_addr  = addr[19:0];
  assign mem_wdata = data;
  assign mem_rd    = (state == READ_MEM);
  assign mem_wr    = (state == WRITE_MEM);
  assign unlocked  = !(state inside {LOCKED, KEY_GET1, KEY_GET2, KEY_GET3, KEY_GET4, PROTO_ERROR});

  always_ff @(posedge clk) begin
    if (rst) begin
      state         <= LOCKED;
      cmd           <= '0;
      addr          <= '0;
      count         <= '0;
      data          <= '0;
      cpu_reset     <= 1'b0;
      cpu_start     <= 1'b0;
      cpu_stop      <= 1'b0;
      cpu_interrupt <= 1'b0;
    end else begin
      cpu_reset     <= 1'b0;
      cpu_start     <= 1'b0;
      cpu_stop      <= 1'b0;
      cpu_interrupt <= 1'b0;
      unique case (state)
        LOCKED:   if (rx_valid) state <= (rx_data == "S") ? KEY_GET1 : PROTO_ERROR;
        KEY_GET1: if (rx_valid) state <= (rx_data == "I") ? KEY_GET2 : PROTO_ERROR;
        KEY_GET2: if (rx_valid) state <= (rx_data == "C") ? KEY_GET3 : PROTO_ERROR;
        KEY_GET3: if (rx_valid) state <= (rx_data == "X") ? KEY_GET4 : PROTO_ERROR;
        KEY_GET4: if (rx_valid) state <= (rx_data == "E") ? KEY_SEND1 : PROTO_ERROR;
        KEY_SEND1: if (sent) state <= KEY_SEND2;
        KEY_SEND2: if (sent) state <= KEY_SEND3;
        KEY_SEND3: if (sent) state <= UNLOCKED;
        PROTO_ERROR: if (sent) state <= LOCKED;
        UNLOCKED: if (rx_valid) begin
          cmd <= rx_data;
          if (rx_data == CMD_LOCK) state <= LOCKED;
          else if (cmd_known(rx_data)) state <= CMD_ACCEPT;
          else state <= PROTO_ERROR;
        end
        CMD_ACCEPT: if (sent) begin
          unique case (cmd)
            CMD_READ, CMD_WRITE: state <= GET_ADDR0;
            default: begin
              cpu_reset     <= (cmd == CMD_RESET);
              cpu_start     <= (cmd == CMD_START);
              cpu_stop      <= (cmd == CMD_STOP);
              cpu_interrupt <= (cmd == CMD_INT);
              state         <= UNLOCKED;
            end
          endcase
        end
        GET_ADDR0: if (rx_valid) begin addr[23:16] <= rx_data; state <= GET_ADDR1; end
        GET_ADDR1: if (rx_valid) begin addr[15:8]  <= rx_data; state <= GET_ADDR2; end
        GET_ADDR2: if (rx_valid) begin addr[7:0]   <= rx_data; state <= GET_COUNT0; end
        GET_COUNT0: if (rx_valid) begin count[15:8] <= rx_data; state <= GET_COUNT1; end
        GET_COUNT1: if (rx_valid) begin
          count[7:0] <= rx_data;
          state <= (cmd == CMD_READ) ? READ_START : WRITE_START;
        end
        READ_START: state <= (count == 16'd0) ? UNLOCKED : READ_MEM;
        READ_MEM: if (mem_done) begin
          data  <= mem_rdata;
          state <= READ_OUT;
        end
        READ_OUT: if (sent) begin
          addr  <= addr + 24'd1;
          count <= count - 16'd1;
          state <= READ_START;
        end
        WRITE_START: state <= (count == 16'd0) ? UNLOCKED : WRITE_IN;
        WRITE_IN: if (rx_valid) begin
          data  <= rx_data;
          state <= WRITE_MEM;
        end
        WRITE_MEM: if (mem_done) begin
          addr  <= addr + 24'd1;
          count <= count - 16'd1;
          state <= WRITE_START;
        end
        default: state <= LOCKED;
      endcase
    end
  end

  a_rd_held: assert property (@(posedge clk) disable iff (rst) (mem_rd && !mem_done) |=> mem_rd);
  a_wr_held: assert property (@(posedge clk) disable iff (rst) (mem_wr && !mem_done) |=> mem_wr);
endmodule
