// tb_attacker_top: the adversary partition at small sizes. Checks that the
// calibration arms the toggle only after the reference ciphertext, that the
// toggle burst follows the calibrated period and duty cycle, that
// `waster_sel` routes the toggle to exactly one bank (ROs oscillate, AES
// wasters finish blocks, s1238 drivers are enabled two fast cycles later),
// that no bank moves while the selection is off, and that outcomes come back
// on the report port with the parameter update applied.
module tb_attacker_top;
  import attack_pkg::*;
  localparam int CW = 12, DW = 4, INJ_MAX = 10, N_RO = 8, N_AES = 2, N_S1238 = 3, S_W = 14;

  logic clk = 0, clk_waste = 0, rst_n = 0;
  logic cal_start = 0, cal_stop = 0, enc_trig = 0, ref_valid = 0, res_valid = 0;
  logic [CW-1:0] init_period = 0, window = 0;
  logic [DW-1:0] init_duty = 0;
  waster_sel_e waster_sel = WS_OFF;
  logic [127:0] ref_ct = 0, res_ct = 0;
  cal_state_e cal_state;
  logic [CW-1:0] period, delay;
  logic [DW-1:0] duty;
  logic rep_valid;
  fault_class_e rep_cls;
  logic [15:0] rep_mask;
  logic [1:0] rep_col;
  logic [$clog2(INJ_MAX+1)-1:0] attempts;
  logic toggle, burst;
  logic [N_RO-1:0] ro_nodes;
  int unsigned ro_periods;
  logic [N_AES-1:0][127:0] aes_ct;
  logic [N_AES-1:0] aes_done;
  logic s1238_ce;
  logic [N_S1238-1:0][S_W-1:0] s1238_in, s1238_out;

  attacker_top #(.N_RO(N_RO), .N_AES(N_AES), .N_S1238(N_S1238), .S_W(S_W), .CW(CW), .DW(DW), .INJ_MAX(INJ_MAX)) dut (
    .clk, .clk_waste, .rst_n, .cal_start, .cal_stop, .init_period, .init_duty, .window, .waster_sel,
    .enc_trig, .ref_valid, .ref_ct, .res_valid, .res_ct, .cal_state, .period, .duty, .delay,
    .rep_valid, .rep_cls, .rep_mask, .rep_col, .attempts, .toggle, .burst, .ro_nodes, .ro_periods,
    .aes_ct, .aes_done, .s1238_ce, .s1238_in, .s1238_out);

  always #5 clk = ~clk;
  always #1 clk_waste = ~clk_waste;
  for (genvar i = 0; i < N_S1238; i++) begin : g_s
    assign s1238_out[i] = ~s1238_in[i] ^ S_W'(i * 5);
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int n_aes_done = 0, n_ce = 0;
  always @(posedge clk_waste) begin
    n_aes_done += $countones(aes_done);
    n_ce += s1238_ce;
  end

  // One burst with the given bank; returns activity seen per bank.
  task automatic burst_with(waster_sel_e sel, output int ro_d, output int aes_d, output int ce_d,
                            output bit s_moved);
    int unsigned r0;
    int a0, c0;
    logic [N_S1238-1:0][S_W-1:0] s0;
    waster_sel = sel;
    r0 = ro_periods; a0 = n_aes_done; c0 = n_ce; s0 = s1238_in;
    @(negedge clk); enc_trig = 1; @(negedge clk); enc_trig = 0;
    // period 4, high 2, delay 0: 1100 1100 ...
    for (int k = 0; k < 200; k++) begin
      check(toggle == (k < 200 && (k % 4) < 2), $sformatf("toggle pattern k %0d", k));
      @(negedge clk);
    end
    check(!toggle && !burst, "burst ended after window");
    repeat (10) @(negedge clk);
    ro_d = int'(ro_periods - r0); aes_d = n_aes_done - a0; ce_d = n_ce - c0; s_moved = (s1238_in != s0);
  endtask

  initial begin
    int ro_d, aes_d, ce_d;
    bit s_moved;
    repeat (3) @(negedge clk);
    rst_n = 1;
    init_period = 4; init_duty = 8; window = 200;
    // trigger before calibration: nothing happens
    enc_trig = 1; @(negedge clk); enc_trig = 0;
    repeat (10) begin check(!toggle, "disarmed: no toggle"); @(negedge clk); end
    cal_start = 1; @(negedge clk); cal_start = 0;
    ref_ct = 128'h0123456789abcdef0123456789abcdef;
    ref_valid = 1; @(negedge clk); ref_valid = 0;
    check(cal_state == CS_ARMED, "armed");
    burst_with(WS_OFF, ro_d, aes_d, ce_d, s_moved);
    check(ro_d == 0 && aes_d == 0 && ce_d == 0 && !s_moved, "off: no bank moves");
    burst_with(WS_RO, ro_d, aes_d, ce_d, s_moved);
    check(ro_d > 0 && aes_d == 0 && ce_d == 0 && !s_moved, $sformatf("RO only: %0d %0d %0d", ro_d, aes_d, ce_d));
    burst_with(WS_AES, ro_d, aes_d, ce_d, s_moved);
    check(ro_d == 0 && aes_d > 0 && ce_d == 0 && !s_moved, $sformatf("AES only: %0d %0d %0d", ro_d, aes_d, ce_d));
    burst_with(WS_S1238, ro_d, aes_d, ce_d, s_moved);
    // toggle high 100 slow cycles = 500 fast cycles of enable
    check(ro_d == 0 && aes_d == 0 && ce_d >= 495 && ce_d <= 505 && s_moved,
          $sformatf("s1238 only: %0d %0d %0d", ro_d, aes_d, ce_d));
    // report path: correct ciphertext -> no fault, lower frequency, more duty
    res_ct = ref_ct; res_valid = 1; @(negedge clk); res_valid = 0;
    check(rep_valid && rep_cls == FC_NONE && period == 5 && duty == 9 && attempts == 1, "report and update");
    cal_stop = 1; @(negedge clk); cal_stop = 0;
    enc_trig = 1; @(negedge clk); enc_trig = 0;
    repeat (10) begin check(!toggle, "stopped: no toggle"); @(negedge clk); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
