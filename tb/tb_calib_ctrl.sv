// tb_calib_ctrl: plays the attacker process against the calibration
// controller. Faulty ciphertexts with chosen byte patterns (none, one
// diagonal, too many bytes, too few bytes) are returned in random order while
// a software model tracks the expected period, duty cycle, delay, attempt
// count and state; every report and every parameter is compared. A second
// run checks the give-up after INJ_MAX unsuccessful attempts.
module tb_calib_ctrl;
  import attack_pkg::*;
  localparam int CW = 10, DW = 4, INJ_MAX = 40;

  logic clk = 0, rst_n = 0, cal_start = 0, cal_stop = 0, ref_valid = 0, res_valid = 0;
  logic [CW-1:0] init_period = 0;
  logic [DW-1:0] init_duty = 0;
  logic [127:0] ref_ct = 0, res_ct = 0;
  cal_state_e state;
  logic arm, rep_valid;
  logic [CW-1:0] period, high, delay;
  logic [DW-1:0] duty;
  fault_class_e rep_cls;
  logic [15:0] rep_mask;
  logic [1:0] rep_col;
  logic [$clog2(INJ_MAX+1)-1:0] attempts;
  int checks = 0, failures = 0;

  calib_ctrl #(.CW(CW), .DW(DW), .INJ_MAX(INJ_MAX)) dut (
    .clk, .rst_n, .cal_start, .cal_stop, .init_period, .init_duty, .ref_valid, .ref_ct,
    .res_valid, .res_ct, .state, .arm, .period, .duty, .high, .delay,
    .rep_valid, .rep_cls, .rep_mask, .rep_col, .attempts);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ciphertext differing from ref in the bytes of `m`
  function automatic logic [127:0] with_mask(logic [127:0] r, logic [15:0] m);
    logic [127:0] c = r;
    for (int i = 0; i < 16; i++) if (m[i]) c[127-8*i -: 8] = r[127-8*i -: 8] ^ 8'(1 + i);
    return c;
  endfunction

  int e_period, e_duty, e_delay, e_att;

  task automatic send(logic [15:0] m, fault_class_e exp_cls, bit adjust);
    @(negedge clk);
    res_ct = with_mask(ref_ct, m); res_valid = 1;
    @(negedge clk);
    res_valid = 0;
    check(rep_valid && rep_cls == exp_cls && rep_mask == m, $sformatf("report cls %0d exp %0d", rep_cls, exp_cls));
    if (adjust) begin
      e_att++;
      case (exp_cls)
        FC_NONE:  begin e_period = e_period + 1; e_duty = (e_duty == 15) ? 15 : e_duty + 1; end
        FC_EARLY: e_delay = e_delay + 1;
        FC_LATE:  e_delay = (e_delay == 0) ? 0 : e_delay - 1;
        default: ;
      endcase
    end
    check(period == CW'(e_period) && duty == DW'(e_duty) && delay == CW'(e_delay),
          $sformatf("params p %0d/%0d d %0d/%0d dl %0d/%0d", period, e_period, duty, e_duty, delay, e_delay));
    check(high == CW'((e_period * e_duty) / 16), "high time");
    check(attempts == e_att, "attempt count");
    @(negedge clk);
    check(!rep_valid, "report is one cycle");
  endtask

  initial begin
    logic [15:0] diag [4];
    diag[0] = 16'b0010_0100_1000_0001;  // bytes 0,7,10,13
    diag[1] = 16'b0100_1000_0001_0010;  // bytes 1,4,11,14
    diag[2] = 16'b1000_0001_0010_0100;  // bytes 2,5,8,15
    diag[3] = 16'b0001_0010_0100_1000;  // bytes 3,6,9,12
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(state == CS_IDLE && !arm, "idle after reset");
    // ---- calibration that succeeds ----
    init_period = 20; init_duty = 3;
    cal_start = 1; @(negedge clk); cal_start = 0;
    e_period = 20; e_duty = 3; e_delay = 0; e_att = 0;
    check(state == CS_REF && !arm, "waiting for the reference, disarmed");
    check(period == 20 && duty == 3 && delay == 0, "initial parameters, no delay");
    // a result before the reference is ignored
    res_valid = 1; @(negedge clk); res_valid = 0;
    check(!rep_valid && state == CS_REF, "no report before the reference");
    ref_ct = {$urandom, $urandom, $urandom, $urandom};
    ref_valid = 1; @(negedge clk); ref_valid = 0;
    check(state == CS_ARMED && arm, "armed after reference");
    for (int i = 0; i < 14; i++) send(16'h0000, FC_NONE, 1);  // duty saturates at 15
    send(16'hffff, FC_EARLY, 1);
    send(16'h0f0f, FC_EARLY, 1);
    send(16'h0001, FC_LATE, 1);
    send(16'h0003, FC_LATE, 1);
    send(16'h0100, FC_LATE, 1);  // delay must not go below 0
    send(16'h1111, FC_LATE, 1);  // four bytes but not a diagonal
    for (int i = 0; i < 3; i++) send(16'hffff, FC_EARLY, 1);
    send(diag[$urandom_range(0, 3)], FC_USABLE, 1);
    check(state == CS_DONE && arm, "calibrated and still armed");
    // after success parameters are frozen, outcomes still reported
    send(16'h0000, FC_NONE, 0);
    send(diag[2], FC_USABLE, 0);
    check(rep_col == 2'd2, "column of usable fault");
    // new plaintext during collection: reference replaced, settings kept
    ref_ct = {$urandom, $urandom, $urandom, $urandom};
    ref_valid = 1; @(negedge clk); ref_valid = 0;
    check(state == CS_DONE && arm && !rep_valid, "new reference accepted while calibrated");
    send(16'h0000, FC_NONE, 0);
    send(diag[1], FC_USABLE, 0);
    check(rep_col == 2'd1, "usable fault against the new reference");
    cal_stop = 1; @(negedge clk); cal_stop = 0;
    check(state == CS_IDLE && !arm, "stop disarms");
    // ---- calibration that gives up ----
    init_period = 5; init_duty = 15;
    cal_start = 1; @(negedge clk); cal_start = 0;
    e_period = 5; e_duty = 15; e_delay = 0; e_att = 0;
    ref_valid = 1; @(negedge clk); ref_valid = 0;
    for (int i = 0; i < INJ_MAX; i++) begin
      check(state == CS_ARMED, "still trying");
      send(16'h0000, FC_NONE, 1);
    end
    check(state == CS_GIVE_UP && !arm, "give up after INJ_MAX attempts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
