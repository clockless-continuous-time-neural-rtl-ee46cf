// spike_window_timer: fixed-length spike window.
//
// A one-cycle start pulse (the positive threshold crossing) loads a down
// counter with WINDOW_TICKS; running is high while it counts, and done
// pulses for one cycle when it reaches zero, WINDOW_TICKS cycles after
// start. A start while running restarts the window.
//
// The document specifies a 2 ms delay made of a three-stage current-starved
// delay line. Here the same delay is counted in cycles of the event-sampling
// clock: 2000 ticks assume a 1 MHz clock.
module spike_window_timer #(
  parameter int unsigned WINDOW_TICKS = 2000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic running,
  output logic done
);

  localparam int W = $clog2(WINDOW_TICKS + 1);

  logic [W-1:0] cnt;

  assign running = (cnt != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        cnt <= W'(WINDOW_TICKS);
      end else if (cnt != '0) begin
        cnt <= cnt - 1'b1;
        if (cnt == W'(1)) done <= 1'b1;
      end
    end
  end

endmodule
