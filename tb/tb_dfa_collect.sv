// tb_dfa_collect: the data-collection phase of the key-recovery attack, on
// the full-size multi-tenant FPGA. After one calibration with the RO grid,
// the host keeps the calibrated settings and, for fresh random plaintexts
// under one fixed key, gets the correct ciphertext (no toggling), loads it as
// the new reference, and requests an attacked encryption. It stops once it
// holds at least two usable faulty ciphertexts for every one of the four
// diagonals, the minimum the DFA needs to determine all 16 bytes of the last
// round key. The supply droop is the same behavioural model as in
// tb_mt_fpga_top. Checked for every request: the reported class and column
// against the strike edge and byte of the model (a round-9 fault in state
// byte b lands in column (b/4 - b%4) mod 4), the exact faulty ciphertext for
// strikes at edge 40, and the correct ciphertexts against the reference
// model. The key recovery itself is offline software and not part of this
// bench.
module tb_dfa_collect;
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
  logic [127:0] key_g;
  task automatic calibrate(waster_sel_e sel, int p0, int d0, int collect, output cal_state_e fin);
    logic [127:0] pt, key, c, good;
    fault_class_e e;
    int guard = 0;
    waster_sel = sel;
    init_period = CW'(p0); init_duty = DW'(d0); window = 60;
    pt  = {$urandom, $urandom, $urandom, $urandom};
    key = key_g;
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
  endtask

  initial begin
    cal_state_e fin;
    logic [127:0] pt, good, c;
    int per_col [4] = '{0, 0, 0, 0};
    int requests = 0, usable = 0, exp_col;
    fault_class_e e;
    repeat (3) @(negedge clk);
    rst_n = 1;
    key_g = {$urandom, $urandom, $urandom, $urandom};
    calibrate(WS_RO, 8, 2, 0, fin);
    check(fin == CS_DONE, "calibration succeeds");
    while ((per_col[0] < 2 || per_col[1] < 2 || per_col[2] < 2 || per_col[3] < 2) && requests < 500) begin
      pt = {$urandom, $urandom, $urandom, $urandom};
      encrypt(pt, key_g, 0, good);
      check(good == aes_encrypt(pt, key_g), "correct ciphertext");
      @(negedge clk); ref_ct = good; ref_valid = 1; @(negedge clk); ref_valid = 0;
      encrypt(pt, key_g, 1, c);
      requests++;
      e = expected_cls();
      @(negedge clk); res_ct = c; res_valid = 1; @(negedge clk); res_valid = 0;
      check(rep_valid && rep_cls == e, $sformatf("class %0d expected %0d", rep_cls, e));
      if (e == FC_USABLE) begin
        exp_col = ((strike_byte / 4) - (strike_byte % 4) + 4) % 4;
        check(rep_col == 2'(exp_col), $sformatf("column %0d expected %0d", rep_col, exp_col));
        per_col[rep_col]++;
        usable++;
      end
      if (strike_edge == 40 && !strike_two)
        check(c == aes_encrypt_fault(pt, key_g, 9, strike_byte, strike_flip), "faulty ciphertext matches round-9 model");
      check(cal_state == CS_DONE, "settings stay calibrated");
    end
    check(per_col[0] >= 2 && per_col[1] >= 2 && per_col[2] >= 2 && per_col[3] >= 2,
          "two usable faults per diagonal collected");
    $display("collection: %0d attacked requests, %0d usable faults, per column %0d %0d %0d %0d",
             requests, usable, per_col[0], per_col[1], per_col[2], per_col[3]);
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
