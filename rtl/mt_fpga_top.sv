// mt_fpga_top: a multi-tenant FPGA with a victim and an adversary partition.
//
// Two tenants share one fabric and one supply network but no logic:
//   victim   - an unprotected AES-128 encryption module (aes128_core, 50
//              cycles per block) reached through a public request/response
//              interface on clk_victim, key supplied at run time;
//   attacker - attacker_top: power-wasting logic switched by a calibrated
//              toggle signal, which tunes toggle frequency, duty cycle and
//              activation delay until a single byte fault lands in the
//              victim state just before AES round 9.
// The fault itself travels through the shared power distribution network as
// a supply droop that causes a timing violation in the victim; that analog
// path has no RTL. Everything else the two partitions exchange goes through
// the host software, so every connection between them is a top-level port:
// the host asserts enc_start (victim) and enc_trig (attacker) together and
// passes the victim's ciphertexts to the attacker as ref_ct / res_ct.
// clk_waste is the fast power-waster clock a PLL provides (750 MHz in the
// document); the PLL is outside this RTL. The s1238 benchmark netlists are
// outside too: their inputs and outputs are ports.
module mt_fpga_top
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
  input  logic                 rst_n,
  // ---- victim partition ----
  input  logic                 clk_victim,
  input  logic                 enc_start,
  input  block_t               enc_pt,
  input  block_t               enc_key,
  output logic                 enc_busy,
  output logic                 enc_done,
  output block_t               enc_ct,
  // ---- attacker partition ----
  input  logic                 clk,
  input  logic                 clk_waste,
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
  output logic [N_RO-1:0]      ro_nodes,
  output int unsigned          ro_periods,
  output block_t [N_AES-1:0]   aes_ct,
  output logic [N_AES-1:0]     aes_done,
  output logic                 s1238_ce,
  output logic [N_S1238-1:0][S_W-1:0] s1238_in,
  input  logic [N_S1238-1:0][S_W-1:0] s1238_out
);

  aes128_core u_victim (
    .clk   (clk_victim),
    .rst_n,
    .ce    (1'b1),
    .start (enc_start),
    .pt    (enc_pt),
    .key   (enc_key),
    .busy  (enc_busy),
    .done  (enc_done),
    .ct    (enc_ct)
  );

  attacker_top #(
    .N_RO (N_RO), .N_AES (N_AES), .N_S1238 (N_S1238), .S_W (S_W),
    .CW (CW), .DW (DW), .INJ_MAX (INJ_MAX)
  ) u_attacker (
    .clk, .clk_waste, .rst_n,
    .cal_start, .cal_stop, .init_period, .init_duty, .window, .waster_sel,
    .enc_trig, .ref_valid, .ref_ct, .res_valid, .res_ct,
    .cal_state, .period, .duty, .delay, .rep_valid, .rep_cls, .rep_mask, .rep_col,
    .attempts, .toggle, .burst, .ro_nodes, .ro_periods, .aes_ct, .aes_done,
    .s1238_ce, .s1238_in, .s1238_out
  );

endmodule
