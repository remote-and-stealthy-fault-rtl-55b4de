// tb_ro_grid: checks the ring-oscillator grid model: disabled nodes rest at
// 1 (NAND loop); enabled, all nodes invert together once per LUT delay, so a
// burst of T time units gives T / LUT_DELAY_NS inversions and half as many
// periods; nothing moves while disabled. The grid is sampled half-way
// between possible transitions.
module tb_ro_grid;
  localparam int N = 200, D = 2;
  logic en = 0;
  logic [N-1:0] ro;
  int unsigned periods;
  int checks = 0, failures = 0;

  ro_grid #(.N_RO(N), .LUT_DELAY_NS(D)) dut (.en, .ro, .periods);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int unsigned t0;
    int flips;
    logic [N-1:0] last;
    #(10 * D + 1);
    check(ro == '1, "disabled grid rests at 1");
    for (int b = 0; b < 5; b++) begin
      int len;
      len = 10 * (b + 1);
      t0 = periods;
      flips = 0;
      last = ro;
      en = 1;
      #(D / 2);
      for (int k = 0; k < len; k++) begin
        #(D);
        check(ro == '0 || ro == '1, "nodes in phase");
        flips += (ro != last);
        last = ro;
      end
      #(D / 2);
      en = 0;
      check(flips == len, $sformatf("burst %0d: %0d inversions, expected %0d", b, flips, len));
      check(periods - t0 == len / 2, $sformatf("burst %0d: %0d periods, expected %0d", b, periods - t0, len / 2));
      #(3 * D);
      check(ro == '1, "grid returns to rest when disabled");
      t0 = periods;
      #(20 * D);
      check(periods == t0 && ro == '1, "no activity while disabled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
