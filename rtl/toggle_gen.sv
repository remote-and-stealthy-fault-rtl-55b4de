// toggle_gen: the global toggle signal that switches the power wasters.
//
// A burst starts when `trig` (the encryption request) is seen while `arm` is
// high. The burst waits `delay` cycles, then for `window` cycles produces a
// square wave of `period` cycles that is high for the first `high` cycles of
// each period: toggle frequency f_clk/period and duty cycle high/period. The
// three calibrated quantities (frequency, duty cycle and activation delay
// after the encryption start) are the document's; the burst length `window`
// and counting in clock cycles are this design's choices.
//
// Timing: with trig sampled on edge T, cycle k (k = 0 for the cycle after T)
// of the burst has toggle = (k >= delay) && (k - delay < window) &&
// ((k - delay) mod period < high). `toggle` is registered. A new trig
// restarts the burst; dropping `arm` ends it at once. period = 0 is treated
// as 1.
module toggle_gen #(
  parameter int unsigned CW = 16  // counter width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          arm,
  input  logic          trig,
  input  logic [CW-1:0] delay,
  input  logic [CW-1:0] period,
  input  logic [CW-1:0] high,
  input  logic [CW-1:0] window,
  output logic          toggle,
  output logic          active   // burst in progress (delay or toggling)
);

  logic [CW-1:0] t, t_n;    // cycles since trig
  logic [CW-1:0] ph, ph_n;  // position within the toggle period
  logic [CW-1:0] w, w_n;    // toggling cycles done
  logic          run, run_n;
  logic          tog_n;

  always_comb begin
    logic [CW-1:0] per;
    per   = (period == '0) ? CW'(1) : period;
    t_n   = t;
    ph_n  = ph;
    w_n   = w;
    run_n = run;
    if (!arm) begin
      run_n = 1'b0;
    end else if (trig) begin
      run_n = 1'b1;
      t_n   = '0;
      ph_n  = '0;
      w_n   = '0;
    end else if (run) begin
      if (t < delay) begin
        t_n = t + 1'b1;
      end else begin
        w_n  = w + 1'b1;
        ph_n = (ph + 1'b1 >= per) ? '0 : ph + 1'b1;
        if (w + 1'b1 >= window) run_n = 1'b0;
      end
    end
    // value for the cycle the new counters describe
    tog_n = run_n && (t_n >= delay) && (w_n < window) && (ph_n < high);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t      <= '0;
      ph     <= '0;
      w      <= '0;
      run    <= 1'b0;
      toggle <= 1'b0;
    end else begin
      t      <= t_n;
      ph     <= ph_n;
      w      <= w_n;
      run    <= run_n;
      toggle <= tog_n;
    end
  end

  assign active = run;

endmodule
