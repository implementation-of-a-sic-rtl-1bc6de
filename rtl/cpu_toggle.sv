// cpu_toggle: the CPU toggle FSM, which holds the CPU enable signal.
//
// Two states, stopped and running. The start and stop pulses from the
// personal computer interface force running or stopped; a press of the
// start/stop toggle button (debounced, rising edge) flips the state.
// enable is high while running. After reset the CPU is stopped, so a
// program can be loaded before it runs; that reset state is this design's
// choice. A start or stop pulse takes precedence over a button press in
// the same cycle.
module cpu_toggle #(
  parameter int unsigned DEBOUNCE_CYCLES = 500_000
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  logic stop,
  input  logic toggle_btn,
  output logic enable
);
  typedef enum logic {T_STOPPED, T_RUNNING} tstate_e;

  tstate_e state;
  logic    btn, btn_q;

  debouncer #(.STABLE_CYCLES(DEBOUNCE_CYCLES)) u_deb (
    .clk, .rst, .raw(toggle_btn), .clean(btn)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= T_STOPPED;
      btn_q <= 1'b0;
    end else begin
      btn_q <= btn;
      if (start) state <= T_RUNNING;
      else if (stop) state <= T_STOPPED;
      else if (btn && !btn_q) state <= (state == T_RUNNING) ? T_STOPPED : T_RUNNING;
    end
  end

  assign enable = (state == T_RUNNING);
endmodule
