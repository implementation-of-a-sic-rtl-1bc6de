// vga_ctrl: VGA controller with a 40 x 30 pixel, 256-colour frame buffer.
//
// The CPU sets the row register (device 0x0d) and the column register
// (0x0e), then writes a colour (0x0f) into the frame buffer at that
// position; writes outside 30 rows or 40 columns are ignored. Colours are
// RRRGGGBB. The output is standard 640 x 480 at 60 Hz: a pixel clock of
// clk / 2 (25 MHz from 50 MHz), 800 x 525 pixel periods per frame,
// negative horizontal and vertical sync. Each frame-buffer pixel covers a
// 16 x 16 block of the screen; outside the visible area the colour outputs
// are 0. The frame buffer is one synchronous RAM of ROWS * COLS bytes; its
// read costs one clock, so the sync and blanking signals are delayed by
// one clock to line up with the colour. The frame buffer is not cleared by
// reset. The timing values are the usual 640 x 480 ones, chosen here.
module vga_ctrl #(
  parameter int unsigned COLS = 40,
  parameter int unsigned ROWS = 30
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       wr_en,
  input  logic [1:0] wr_sel,    // 0 row, 1 column, 2 colour
  input  logic [7:0] wr_data,
  output logic [2:0] red,
  output logic [2:0] green,
  output logic [1:0] blue,
  output logic       hsync_n,
  output logic       vsync_n
);
  localparam logic [9:0] H_VIS = 640, H_FP = 16, H_SYNC = 96, H_TOTAL = 800;
  localparam logic [9:0] V_VIS = 480, V_FP = 10, V_SYNC = 2, V_TOTAL = 525;
  localparam int unsigned DEPTH = COLS * ROWS;

  logic [7:0] fb [DEPTH];
  logic [7:0] row, col;
  logic       pix_en;
  logic [9:0] hcnt, vcnt;
  logic [7:0] pixel;
  logic       vis_q, hs_q, vs_q;
  logic [$clog2(DEPTH)-1:0] rd_addr, wr_addr;

  assign wr_addr = $clog2(DEPTH)'(row * COLS + col);
  assign rd_addr = $clog2(DEPTH)'(int'(vcnt[9:4]) * COLS + int'(hcnt[9:4]));

  // Frame buffer: one write port from the device bus, one read port for
  // the scan-out
  always_ff @(posedge clk) begin
    if (wr_en && wr_sel == 2'd2 && int'(row) < ROWS && int'(col) < COLS) fb[wr_addr] <= wr_data;
    pixel <= fb[rd_addr];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      row    <= '0;
      col    <= '0;
      pix_en <= 1'b0;
      hcnt   <= '0;
      vcnt   <= '0;
      vis_q  <= 1'b0;
      hs_q   <= 1'b0;
      vs_q   <= 1'b0;
    end else begin
      if (wr_en && wr_sel == 2'd0) row <= wr_data;
      if (wr_en && wr_sel == 2'd1) col <= wr_data;
      pix_en <= !pix_en;
      if (pix_en) begin
        if (hcnt == H_TOTAL - 1) begin
          hcnt <= '0;
          vcnt <= (vcnt == V_TOTAL - 1) ? '0 : vcnt + 1'b1;
        end else hcnt <= hcnt + 1'b1;
      end
      vis_q <= (hcnt < H_VIS) && (vcnt < V_VIS);
      hs_q  <= (hcnt >= H_VIS + H_FP) && (hcnt < H_VIS + H_FP + H_SYNC);
      vs_q  <= (vcnt >= V_VIS + V_FP) && (vcnt < V_VIS + V_FP + V_SYNC);
    end
  end

  assign red     = vis_q ? pixel[7:5] : '0;
  assign green   = vis_q ? pixel[4:2] : '0;
  assign blue    = vis_q ? pixel[1:0] : '0;
  assign hsync_n = !hs_q;
  assign vsync_n = !vs_q;
endmodule
