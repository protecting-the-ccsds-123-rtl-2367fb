// check_timer: watchdog of one self-check.
//
// The compression of the fixed test pattern takes a number of cycles that is
// known in advance, because the core is fully deterministic. The timer is
// cleared and started by `start`; it counts cycles until `stop` (the
// checkers have finished or failed). If TIMEOUT_CYCLES cycles pass without
// `stop`, `timeout` rises and stays high until the next `start`: the core
// emitted less output than expected. Default TIMEOUT_CYCLES is 440,000, the
// 2.2 ms self-check time quoted for the design at its 200 MHz clock.
//
// Timing: `start` sampled at edge 0 clears the count; `timeout` is high after
// edge TIMEOUT_CYCLES unless `stop` was seen at an earlier edge (or at that
// edge itself). `running` shows the timer is counting.
module check_timer #(
  parameter int unsigned CNT_W          = 32,
  parameter int unsigned TIMEOUT_CYCLES = 440_000
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic             stop,
  output logic             timeout,
  output logic             running,
  output logic [CNT_W-1:0] count
);
  always_ff @(posedge clk) begin
    if (rst) begin
      count   <= '0;
      running <= 1'b0;
      timeout <= 1'b0;
    end else if (start) begin
      count   <= '0;
      running <= 1'b1;
      timeout <= 1'b0;
    end else if (running) begin
      if (stop) begin
        running <= 1'b0;
      end else begin
        count <= count + 1'b1;
        if (count + 1'b1 == CNT_W'(TIMEOUT_CYCLES)) begin
          timeout <= 1'b1;
          running <= 1'b0;
        end
      end
    end
  end

  // a timeout ends the count
  a_timeout_stops: assert property (@(posedge clk) disable iff (rst) timeout |-> !running);
endmodule
