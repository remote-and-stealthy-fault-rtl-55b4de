// attacker_top: the adversary's partition of the shared FPGA.
//
// It holds the calibration controller (with its fault classifier), the toggle
// generator, and three banks of power-wasting logic that the one global
// toggle signal switches on and off:
//   WS_RO     N_RO single-LUT ring oscillators (asynchronous, behavioural)
//   WS_AES    N_AES AES-128 modules encrypting their own ciphertext stream
//   WS_S1238  N_S1238 input generators for s1238 benchmark instances, whose
//             netlists sit outside this RTL (ports s1238_in / s1238_out)
// `waster_sel` routes the toggle to one bank (the document uses one kind of
// waster per experiment); the others stay idle. The AES and s1238 banks run
// on clk_waste, the fast PLL clock (750 MHz in the document), and see the
// toggle through a two-flop synchroniser, i.e. two fast cycles later.
// Calibration and toggle timing run on `clk`. The partition has no logical
// connection to the victim: it learns of an encryption only through the
// host's `enc_trig` and sees ciphertexts only as the host passes them in.
// Bank sizes default to the document's numbers where it gives them
// (60 AES modules, 280 s1238 instances, 3840 ROs on the iCE40).
module attacker_top
  import aes_pkg::*;
  import attack_pkg::*;
#(
  parameter int unsigned N_RO    = 3840,
  parameter int unsigned N_AES   = 60,
  parameter int unsigned N_S1238 = 280,
  parameter int unsigned S_W     = 14,
  parameter int unsigned CW      = 16,
  parameter int unsigned DW      = 4,
  parameter int unsigned INJ_MAX = 1000
) (
  input  logic                 clk,
  input  logic                 clk_waste,
  input  logic                 rst_n,
  // host (attacker process) side
  input  logic                 cal_start,
  input  logic                 cal_stop,
  input  logic [CW-1:0]        init_period,
  input  logic [DW-1:0]        init_duty,
  input  logic [CW-1:0]        window,
  input  waster_sel_e          waster_sel,
  input  logic                 enc_trig,
  input  logic                 ref_valid,
  input  block_t               ref_ct,
  input  logic                 res_valid,
  input  block_t               res_ct,
  output cal_state_e           cal_state,
  output logic [CW-1:0]        period,
  output logic [DW-1:0]        duty,
  output logic [CW-1:0]        delay,
  output logic                 rep_valid,
  output fault_class_e         rep_cls,
  output logic [15:0]          rep_mask,
  output logic [1:0]           rep_col,
  output logic [$clog2(INJ_MAX+1)-1:0] attempts,
  output logic                 toggle,
  output logic                 burst,   // toggle burst in progress
  // power wasters, kept alive as outputs
  output logic [N_RO-1:0]      ro_nodes,
  output int unsigned          ro_periods,
  output block_t [N_AES-1:0]   aes_ct,
  output logic [N_AES-1:0]     aes_done,
  output logic                 s1238_ce,
  output logic [N_S1238-1:0][S_W-1:0] s1238_in,
  input  logic [N_S1238-1:0][S_W-1:0] s1238_out
);

  logic          arm;
  logic [CW-1:0] high;

  calib_ctrl #(.CW(CW), .DW(DW), .INJ_MAX(INJ_MAX)) u_cal (
    .clk, .rst_n, .cal_start, .cal_stop, .init_period, .init_duty,
    .ref_valid, .ref_ct, .res_valid, .res_ct,
    .state (cal_state), .arm, .period, .duty, .high, .delay,
    .rep_valid, .rep_cls, .rep_mask, .rep_col, .attempts
  );

  toggle_gen #(.CW(CW)) u_tog (
    .clk, .rst_n, .arm, .trig (enc_trig), .delay, .period, .high, .window,
    .toggle, .active (burst)
  );

  // ---- ring-oscillator bank: asynchronous, enabled directly ----
  ro_grid #(.N_RO(N_RO)) u_ro (
    .en      (toggle && (waster_sel == WS_RO)),
    .ro      (ro_nodes),
    .periods (ro_periods)
  );

  // ---- AES bank ----
  logic en_aes;
  sync2 u_sync_aes (.clk (clk_waste), .rst_n, .d (toggle && (waster_sel == WS_AES)), .q (en_aes));

  for (genvar i = 0; i < N_AES; i++) begin : g_aes
    aes_waster #(
      .KEY  (block_t'({4{32'h9e3779b9 ^ 32'(i)}})),
      .SEED (block_t'({4{32'h7f4a7c15 + 32'(i)}}))
    ) u_w (
      .clk (clk_waste), .rst_n, .en (en_aes), .ct (aes_ct[i]), .done (aes_done[i])
    );
  end

  // ---- s1238 bank ----
  sync2 u_sync_s1238 (.clk (clk_waste), .rst_n, .d (toggle && (waster_sel == WS_S1238)), .q (s1238_ce));

  for (genvar i = 0; i < N_S1238; i++) begin : g_s1238
    s1238_driver #(.W(S_W)) u_drv (
      .clk (clk_waste), .rst_n, .en (s1238_ce), .circ_out (s1238_out[i]), .circ_in (s1238_in[i])
    );
  end

  // The toggle only ever runs while the calibration has the wasters armed.
  assert property (@(posedge clk) disable iff (!rst_n) toggle |-> $past(arm));

endmodule
