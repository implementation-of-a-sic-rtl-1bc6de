// sevenseg_ctrl: controller of the four-digit seven-segment display.
//
// Six 8-bit control registers are written from the device bus: the mode
// register (device 0x06; bit 0 sets the right half, digits 0 and 1, bit 1
// the left half, digits 2 and 3; 1 = hexadecimal, 0 = direct), the two
// hexadecimal registers (0x07 right half, 0x08 left half, low nibble on
// the lower digit) and the four direct registers (0x09 to 0x0c, digit 0
// to 3), in which bit i lights segment i: 0 top, 1 upper left, 2 upper
// right, 3 middle, 4 lower left, 5 lower right, 6 bottom, 7 dot. The
// digits are lit one at a time, each for REFRESH_CYCLES clock cycles
// (default 50000, 1 ms at 50 MHz). Two messages override the registers:
// "Err" while the CPU reports an error and, otherwise, "StOP" while the CPU
// is disabled; the registers keep their values meanwhile. seg_n and an_n
// are active low as the board's display needs (seg_n[i] drives segment i;
// an_n[d] selects digit d, digit 3 being the leftmost). The refresh rate,
// the letter shapes, the active-low outputs and "Err" taking precedence are
// this design's choices.
module sevenseg_ctrl #(
  parameter int unsigned REFRESH_CYCLES = 50_000
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       wr_en,
  input  logic [2:0] wr_sel,    // 0 mode, 1 hex right, 2 hex left, 3..6 digit 0..3
  input  logic [7:0] wr_data,
  input  logic       cpu_disabled,
  input  logic       cpu_error,
  output logic [7:0] seg_n,
  output logic [3:0] an_n
);
  logic [1:0] mode;
  logic [7:0] hex_r, hex_l;
  logic [7:0] direct [4];
  logic [$clog2(REFRESH_CYCLES)-1:0] timer;
  logic [1:0] digit;

  // Segment pattern of a hexadecimal digit (bit i = segment i)
  function automatic logic [7:0] hex_font(input logic [3:0] v);
    unique case (v)
      4'h0: return 8'h77; 4'h1: return 8'h24; 4'h2: return 8'h5D; 4'h3: return 8'h6D;
      4'h4: return 8'h2E; 4'h5: return 8'h6B; 4'h6: return 8'h7B; 4'h7: return 8'h25;
      4'h8: return 8'h7F; 4'h9: return 8'h6F; 4'hA: return 8'h3F; 4'hB: return 8'h7A;
      4'hC: return 8'h53; 4'hD: return 8'h7C; 4'hE: return 8'h5B; default: return 8'h1B;
    endcase
  endfunction

  localparam logic [7:0] L_S = 8'h6B, L_T = 8'h5A, L_O = 8'h77, L_P = 8'h1F;
  localparam logic [7:0] L_E = 8'h5B, L_R = 8'h18, L_BLANK = 8'h00;

  always_ff @(posedge clk) begin
    if (rst) begin
      mode  <= '0;
      hex_r <= '0;
      hex_l <= '0;
      for (int i = 0; i < 4; i++) direct[i] <= '0;
      timer <= '0;
      digit <= '0;
    end else begin
      if (wr_en) begin
        unique case (wr_sel)
          3'd0: mode  <= wr_data[1:0];
          3'd1: hex_r <= wr_data;
          3'd2: hex_l <= wr_data;
          3'd3, 3'd4, 3'd5, 3'd6: direct[2'(wr_sel - 3'd3)] <= wr_data;
          default: ;
        endcase
      end
      if (int'(timer) == REFRESH_CYCLES - 1) begin
        timer <= '0;
        digit <= digit + 1'b1;
      end else timer <= timer + 1'b1;
    end
  end

  logic [7:0] pattern;
  always_comb begin
    if (cpu_error) begin
      unique case (digit)
        2'd3: pattern = L_E;
        2'd2: pattern = L_R;
        2'd1: pattern = L_R;
        default: pattern = L_BLANK;
      endcase
    end else if (cpu_disabled) begin
      unique case (digit)
        2'd3: pattern = L_S;
        2'd2: pattern = L_T;
        2'd1: pattern = L_O;
        default: pattern = L_P;
      endcase
    end else begin
      unique case (digit)
        2'd0: pattern = mode[0] ? hex_font(hex_r[3:0]) : direct[0];
        2'd1: pattern = mode[0] ? hex_font(hex_r[7:4]) : direct[1];
        2'd2: pattern = mode[1] ? hex_font(hex_l[3:0]) : direct[2];
        default: pattern = mode[1] ? hex_font(hex_l[7:4]) : direct[3];
      endcase
    end
  end

  assign seg_n = ~pattern;
  assign an_n  = ~(4'b0001 << digit);
endmodule
