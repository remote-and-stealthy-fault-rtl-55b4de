// tb_mt_fpga_top: end-to-end run of the multi-tenant FPGA at its default
// sizes (3840 ROs, 60 AES wasters, 280 s1238 drivers, INJ_MAX 1000).
//
// The testbench plays the host software and the physics the RTL cannot hold:
//  * Host: for each calibration it picks a random plaintext, gets its correct
//    ciphertext from the victim, hands it to the attacker, then keeps asking
//    the victim to encrypt the same plaintext (enc_start together with
//    enc_trig) and passes each ciphertext back, until the attacker reports
//    success or gives up.
//  * Supply droop (behavioural): every cycle droop += GAIN[bank] while the
//    toggle drives a bank, and leaks by droop/8. The first victim clock edge
//    (after LAG[bank] further cycles) at which droop has crossed TH gets a
//    timing fault: one state byte captured wrong (two bytes in different
//    columns when droop exceeds TH2). It is applied by forcing the victim's
//    next-state value for that one edge.
// Independent check: from the edge index e (counted from the start edge) the
// testbench knows what the classifier must say: e <= 39 -> early (fault
// before round 8 ends), 40..44 -> usable (before round 9's MixColumns),
// 45..49 -> late, >= 50 -> no fault (encryption already over). A fault at
// edge 40 must also give exactly the reference model's round-9 faulty
// ciphertext. Scenarios: RO bank calibrates and then collects usable faults;
// AES bank calibrates; s1238 bank with a long droop lag only ever produces
// late faults and must give up after INJ_MAX attempts. Every mechanism
// (each fault class, success, give-up, each bank switching) is counted.
module tb_mt_fpga_top;
  import aes_ref_pkg::*;
  import attack_pkg::*;

  localparam int CW = 16, DW = 4, INJ_MAX = 1000, N_RO = 3840, N_AES = 60, N_S1238 = 280, S_W = 14;

  logic rst_n = 0, clk = 0, clk_waste = 0;
  logic enc_start = 0, enc_busy, enc_done;
  logic [127:0] enc_pt = 0, enc_key = 0, enc_ct;
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

  mt_fpga_top dut (
    .rst_n, .clk_victim (clk), .enc_start, .enc_pt, .enc_key, .enc_busy, .enc_done, .enc_ct,
    .clk, .clk_waste, .cal_start, .cal_stop, .init_period, .init_duty, .window, .waster_sel,
    .enc_trig, .ref_valid, .ref_ct, .res_valid, .res_ct, .cal_state, .period, .duty, .delay,
    .rep_valid, .rep_cls, .rep_mask, .rep_col, .attempts, .toggle, .burst, .ro_nodes, .ro_periods,
    .aes_ct, .aes_done, .s1238_ce, .s1238_in, .s1238_out);

  // Victim and attacker logic at ~111 MHz, power wasters at 750 MHz.
  always #4.5 clk = ~clk;
  always #0.667 clk_waste = ~clk_waste;

  // Stand-in for the s1238 netlists (not part of the RTL): a simple
  // input-dependent function so that the drivers have outputs to follow.
  for (genvar i = 0; i < N_S1238; i++) begin : g_s
    assign s1238_out[i] = {s1238_in[i][S_W-2:0], ~s1238_in[i][S_W-1]} ^ S_W'(i);
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- supply droop model ----------------
  int gain [4] = '{0, 12, 15, 12};   // per waster_sel: off, RO, AES, s1238
  int lag  [4] = '{0, 0, 0, 42};
  localparam int TH = 40, TH2 = 90;
  int droop = 0;
  int edge_idx = 0;         // index of the coming victim edge within an encryption
  bit in_enc = 0;           // an attacked encryption is running
  bit struck = 0;           // this encryption already took its fault
  int pending = -1;         // cycles until a pending fault strikes
  bit pending_two = 0;
  int strike_edge = -1, strike_byte = 0, strike_two = 0;
  logic [7:0] strike_flip;
  logic [127:0] forced_v;
  int n_bursts = 0, n_ro = 0, n_aes = 0, n_s1238 = 0, n_inject = 0;

  always @(negedge clk) begin
    int unsigned ro_last;
    droop = droop + ((toggle && waster_sel != WS_OFF) ? gain[waster_sel] : 0) - droop / 8;
    if (in_enc && !struck && pending < 0 && droop >= TH) begin
      pending = lag[waster_sel];
      pending_two = (droop >= TH2);
    end
    if (pending == 0 && in_enc) begin
      pending = -1;
      struck = 1;
      if (edge_idx < 50) begin
        strike_edge = edge_idx;
        strike_byte = $urandom_range(0, 15);
        strike_two  = pending_two;
        strike_flip = 8'($urandom_range(1, 255));
        forced_v = dut.u_victim.st_d;
        forced_v[127-8*strike_byte -: 8] ^= strike_flip;
        if (strike_two) forced_v[127-8*((strike_byte+4)%16) -: 8] ^= strike_flip;
        force dut.u_victim.st_d = forced_v;
        n_inject++;
        @(posedge clk);
        #0.1;
        release dut.u_victim.st_d;
      end
    end else if (pending > 0) begin
      pending--;
    end
  end

  // mechanism counters
  logic tog_q = 0;
  int unsigned ro_p0 = 0;
  always @(posedge clk) begin
    tog_q <= toggle;
    if (toggle && !tog_q) n_bursts++;
    if (ro_periods != ro_p0) begin n_ro++; ro_p0 = ro_periods; end
    if (s1238_ce) n_s1238++;
  end
  always @(posedge clk_waste) if (|aes_done) n_aes++;

  int n_cls [4] = '{0, 0, 0, 0};
  int n_done = 0, n_giveup = 0, n_collected = 0;

  // One victim encryption; `attack` raises enc_trig with the request.
  task automatic encrypt(logic [127:0] p, logic [127:0] k, bit attack, output logic [127:0] c);
    int n;
    @(negedge clk);
    enc_pt = p; enc_key = k; enc_start = 1; enc_trig = attack;
    struck = 0; pending = -1; strike_edge = -1;
    @(negedge clk);
    enc_start = 0; enc_trig = 0;
    in_enc = attack;
    edge_idx = 1;
    n = 1;
    while (!enc_done && n < 200) begin
      @(negedge clk);
      edge_idx++;
      n++;
    end
    check(n == 51, $sformatf("victim latency %0d cycles", n - 1));
    in_enc = 0;
    c = enc_ct;
    droop = 0;  // supply recovers between requests
  endtask

  function automatic fault_class_e expected_cls();
    if (strike_edge < 0 || strike_edge >= 50) return FC_NONE;
    if (strike_edge <= 39) return FC_EARLY;
    if (strike_edge <= 44) return strike_two ? FC_EARLY : FC_USABLE;
    return FC_LATE;
  endfunction

  // Full calibration on one plaintext; returns the final state.
  task automatic calibrate(waster_sel_e sel, int p0, int d0, int collect, output cal_state_e fin);
    logic [127:0] pt, key, c, good;
    fault_class_e e;
    int guard = 0;
    waster_sel = sel;
    init_period = CW'(p0); init_duty = DW'(d0); window = 60;
    pt  = {$urandom, $urandom, $urandom, $urandom};
    key = {$urandom, $urandom, $urandom, $urandom};
    @(negedge clk); cal_start = 1; @(negedge clk); cal_start = 0;
    check(cal_state == CS_REF, "calibration waits for the reference");
    encrypt(pt, key, 0, good);
    check(good == aes_encrypt(pt, key), "victim ciphertext without attack");
    @(negedge clk); ref_ct = good; ref_valid = 1; @(negedge clk); ref_valid = 0;
    check(cal_state == CS_ARMED, "armed after reference");
    while (guard < INJ_MAX + 5) begin
      guard++;
      encrypt(pt, key, 1, c);
      e = expected_cls();
      @(negedge clk); res_ct = c; res_valid = 1; @(negedge clk); res_valid = 0;
      check(rep_valid, "outcome reported");
      check(rep_cls == e, $sformatf("class %0d expected %0d (strike edge %0d)", rep_cls, e, strike_edge));
      if (e == FC_NONE) check(c == good, "unfaulted ciphertext correct");
      if (strike_edge == 40 && !strike_two)
        check(c == aes_encrypt_fault(pt, key, 9, strike_byte, strike_flip), "round-9 fault matches model");
      n_cls[rep_cls]++;
      if (cal_state == CS_DONE) begin
        if (collect == 0) break;
        collect--;
        n_collected += (rep_cls == FC_USABLE);
      end
      if (cal_state == CS_GIVE_UP) break;
    end
    fin = cal_state;
    @(negedge clk); cal_stop = 1; @(negedge clk); cal_stop = 0;
    check(cal_state == CS_IDLE, "stopped");
  endtask

  initial begin
    cal_state_e fin;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // 1. RO grid: calibrate, then collect further usable faults
    calibrate(WS_RO, 8, 2, 3, fin);
    check(fin == CS_DONE, "RO calibration succeeds");
    n_done += (fin == CS_DONE);
    check(n_collected == 3, "usable faults collected after calibration");
    // 2. AES modules as power wasters
    calibrate(WS_AES, 8, 2, 0, fin);
    check(fin == CS_DONE, "AES-waster calibration succeeds");
    n_done += (fin == CS_DONE);
    // 3. s1238 bank, droop arrives too late: only late faults, then give up
    calibrate(WS_S1238, 8, 2, 0, fin);
    check(fin == CS_GIVE_UP, "late-only calibration gives up");
    n_giveup += (fin == CS_GIVE_UP);
    check(attempts == INJ_MAX, "gave up after INJ_MAX attempts");
    // mechanisms
    check(n_cls[FC_NONE] > 0,   $sformatf("no-fault outcomes: %0d", n_cls[FC_NONE]));
    check(n_cls[FC_EARLY] > 0,  $sformatf("early outcomes: %0d", n_cls[FC_EARLY]));
    check(n_cls[FC_LATE] > 0,   $sformatf("late outcomes: %0d", n_cls[FC_LATE]));
    check(n_cls[FC_USABLE] > 0, $sformatf("usable outcomes: %0d", n_cls[FC_USABLE]));
    check(n_done == 2 && n_giveup == 1, "success and give-up");
    check(n_bursts > 0,  $sformatf("toggle bursts: %0d", n_bursts));
    check(n_ro > 0,      $sformatf("RO activity: %0d", n_ro));
    check(n_aes > 0,     $sformatf("AES waster blocks: %0d", n_aes));
    check(n_s1238 > 0,   $sformatf("s1238 enabled cycles: %0d", n_s1238));
    check(n_inject > 0,  $sformatf("faults injected: %0d", n_inject));
    $display("mechanisms: none=%0d early=%0d late=%0d usable=%0d done=%0d giveup=%0d bursts=%0d ro=%0d aes=%0d s1238=%0d injected=%0d",
             n_cls[FC_NONE], n_cls[FC_EARLY], n_cls[FC_LATE], n_cls[FC_USABLE], n_done, n_giveup,
             n_bursts, n_ro, n_aes, n_s1238, n_inject);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
