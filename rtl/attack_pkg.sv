// attack_pkg: types shared by the adversary partition. The fault classes are
// the outcomes the calibration reacts to; the waster selection picks which
// bank of power-wasting logic the global toggle drives.
package attack_pkg;

  // Outcome of one faulted encryption, judged from the ciphertext byte mask.
  typedef enum logic [1:0] {
    FC_NONE   = 2'd0,  // ciphertext correct
    FC_USABLE = 2'd1,  // exactly one four-byte diagonal: fault before round 9
    FC_EARLY  = 2'd2,  // more than four bytes: too early (or too strong)
    FC_LATE   = 2'd3   // fewer than four bytes, or four not on a diagonal
  } fault_class_e;

  // Power-waster bank driven by the global toggle.
  typedef enum logic [1:0] {
    WS_OFF   = 2'd0,
    WS_RO    = 2'd1,
    WS_AES   = 2'd2,
    WS_S1238 = 2'd3
  } waster_sel_e;

  // Calibration controller states.
  typedef enum logic [2:0] {
    CS_IDLE    = 3'd0,  // wasters disarmed
    CS_REF     = 3'd1,  // waiting for the correct (unfaulted) ciphertext
    CS_ARMED   = 3'd2,  // toggling armed, waiting for a faulted ciphertext
    CS_DONE    = 3'd3,  // calibrated: parameters frozen, still armed
    CS_GIVE_UP = 3'd4   // inj_max attempts failed, disarmed
  } cal_state_e;

endpackage
