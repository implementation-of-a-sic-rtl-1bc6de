// ps2_ctrl: PS/2 keyboard controller.
//
// Receives the keyboard's 11-bit frames (start 0, eight data bits least
// significant first, odd parity, stop 1), each bit read on a falling edge
// of the keyboard clock. Both PS/2 lines are synchronised by two
// flip-flops. A frame with a correct start, parity and stop bit stores its
// byte, the scan code, in the control register read at device 0x04, and
// raises irq for one cycle. A bad frame is dropped. Checking the parity
// and dropping bad frames are this design's choices; there is no time-out
// for a frame cut short, nor any command sent to the keyboard.
module ps2_ctrl (
  input  logic       clk,
  input  logic       rst,
  input  logic       ps2_clk,
  input  logic       ps2_data,
  output logic [7:0] scan_code,
  output logic       irq
);
  logic [2:0]  clk_s;
  logic [1:0]  dat_s;
  logic [9:0]  shift;
  logic [3:0]  nbits;
  logic        fall;

  assign fall = clk_s[2] && !clk_s[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      clk_s     <= '1;
      dat_s     <= '1;
      shift     <= '0;
      nbits     <= '0;
      scan_code <= '0;
      irq       <= 1'b0;
    end else begin
      clk_s <= {clk_s[1:0], ps2_clk};
      dat_s <= {dat_s[0], ps2_data};
      irq   <= 1'b0;
      if (fall) begin
        shift <= {dat_s[1], shift[9:1]};
        if (nbits == 4'd10) begin
          nbits <= '0;
          // Ten bits are in shift: [0] start, [8:1] data, [9] parity;
          // the stop bit is on the line now
          if (!shift[0] && dat_s[1] && ^shift[9:1]) begin
            scan_code <= shift[8:1];
            irq       <= 1'b1;
          end
        end else nbits <= nbits + 1'b1;
      end
    end
  end
endmodule
