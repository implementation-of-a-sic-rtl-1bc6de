// debouncer: filters a bouncing switch or button input.
//
// The raw input is synchronised by two flip-flops. The output follows it
// only after the synchronised input has kept one value, different from
// the output, for STABLE_CYCLES consecutive cycles (default 500000, 10 ms
// at 50 MHz); any return to the old value restarts the count. The length
// of the filter is this design's choice.
module debouncer #(
  parameter int unsigned STABLE_CYCLES = 500_000
) (
  input  logic clk,
  input  logic rst,
  input  logic raw,
  output logic clean
);
  logic [1:0] sync;
  logic [$clog2(STABLE_CYCLES+1)-1:0] count;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync  <= '0;
      count <= '0;
      clean <= 1'b0;
    end else begin
      sync <= {sync[0], raw};
      if (sync[1] == clean) count <= '0;
      else if (int'(count) == STABLE_CYCLES - 1) begin
        clean <= sync[1];
        count <= '0;
      end else count <= count + 1'b1;
    end
  end
endmodule
