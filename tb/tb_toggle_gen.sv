// tb_toggle_gen: drives random delay / period / high / window settings and
// compares the toggle waveform cycle by cycle with the closed-form model
// toggle(k) = k >= delay && k-delay < window && (k-delay) % period < high,
// k counted from the cycle after the trigger edge. Also checks that an
// unarmed trigger does nothing and that dropping `arm` stops a burst.
module tb_toggle_gen;
  localparam int CW = 12;
  logic clk = 0, rst_n = 0, arm = 0, trig = 0;
  logic [CW-1:0] delay, period, high, window;
  logic toggle, active;
  int checks = 0, failures = 0;

  toggle_gen #(.CW(CW)) dut (.clk, .rst_n, .arm, .trig, .delay, .period, .high, .window, .toggle, .active);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit model(int k, int d, int p, int h, int w);
    if (p == 0) p = 1;
    return (k >= d) && (k - d < w) && ((k - d) % p < h);
  endfunction

  initial begin
    int d, p, h, w, highs;
    delay = 0; period = 4; high = 2; window = 10;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // unarmed trigger
    trig = 1; @(negedge clk); trig = 0;
    repeat (20) begin check(!toggle && !active, "unarmed: no toggle"); @(negedge clk); end
    for (int it = 0; it < 40; it++) begin
      d = $urandom_range(0, 30);
      p = $urandom_range(1, 12);
      h = $urandom_range(0, p);
      w = $urandom_range(1, 60);
      if (it == 0) begin d = 0; p = 1; h = 1; w = 5; end
      delay = CW'(d); period = CW'(p); high = CW'(h); window = CW'(w);
      arm = 1; trig = 1;
      @(negedge clk);
      trig = 0;
      highs = 0;
      for (int k = 0; k < d + w + 10; k++) begin
        check(toggle == model(k, d, p, h, w), $sformatf("it %0d k %0d d %0d p %0d h %0d w %0d", it, k, d, p, h, w));
        highs += toggle;
        @(negedge clk);
      end
      check(!active, "burst over");
      arm = 0;
      @(negedge clk);
    end
    // dropping arm ends a burst immediately
    delay = 0; period = 2; high = 2; window = 100;
    arm = 1; trig = 1; @(negedge clk); trig = 0;
    repeat (3) @(negedge clk);
    check(toggle, "toggling before disarm");
    arm = 0; @(negedge clk);
    check(!toggle && !active, "disarm stops the burst");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
