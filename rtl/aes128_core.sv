// aes128_core: iterative AES-128 encryption, 50 clock cycles per block.
//
// This is the victim cipher: a small, unprotected AES-128 encryptor that takes
// 50 cycles per plaintext, as in the attacked design. How those 50 cycles are
// spent is this design's own choice: ten rounds of five cycles each, sharing
// four S-boxes between the datapath and the key schedule.
//   phase 0..3  SubBytes of state column 0..3 (four S-boxes, written in place)
//   phase 4     S-boxes compute SubWord(RotWord(w3)) of the round key; the
//               next round key, ShiftRows, MixColumns (skipped in round 10)
//               and AddRoundKey are applied in this one cycle.
// SubBytes commutes with ShiftRows, so substituting in place first is exact.
//
// Interface: `start` is accepted when `busy` is low; `pt` and `key` are
// sampled on that edge and the initial AddRoundKey happens there. Exactly
// LATENCY = 50 edges later `done` pulses for one cycle and `ct` holds the
// ciphertext until the next accepted start. `ce` is a clock enable (tie high
// for normal use); when low the core holds every register, which lets a
// power-waster instance stop switching when its toggle signal is low.
// `st_d` is the next-state value of the state register, kept as a named
// signal so that a timing fault on the state register can be modelled.
module aes128_core
  import aes_pkg::*;
#(
  parameter int unsigned LATENCY = 50  // fixed by the architecture: 10 rounds x 5 cycles
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   ce,
  input  logic   start,
  input  block_t pt,
  input  block_t key,
  output logic   busy,
  output logic   done,
  output block_t ct
);

  block_t     st, st_d;    // cipher state
  block_t     rk, rk_d;    // current round key
  byte_t      rcon, rcon_d;
  logic [3:0] rnd;         // round being computed, 1..10
  logic [2:0] phase;       // 0..4 within a round
  logic       busy_d, done_d;
  block_t     ct_d;

  // Shared S-box inputs: a state column in phases 0..3, RotWord(w3) in phase 4.
  word_t sb_in, sb_out;
  always_comb begin
    if (phase == 3'd4) sb_in = {rk[23:0], rk[31:24]};
    else               sb_in = st[127 - 32*phase -: 32];
    for (int i = 0; i < 4; i++) sb_out[8*i +: 8] = sbox(sb_in[8*i +: 8]);
  end

  always_comb begin
    block_t sr;
    word_t  w0, w1, w2, w3;
    st_d   = st;
    rk_d   = rk;
    rcon_d = rcon;
    busy_d = busy;
    done_d = 1'b0;
    ct_d   = ct;
    sr     = shift_rows(st);
    w0 = rk[127:96] ^ sb_out ^ {rcon, 24'h0};
    w1 = rk[95:64] ^ w0;
    w2 = rk[63:32] ^ w1;
    w3 = rk[31:0]  ^ w2;
    if (!busy) begin
      if (start) begin
        st_d   = pt ^ key;
        rk_d   = key;
        rcon_d = 8'h01;
        busy_d = 1'b1;
      end
    end else if (phase != 3'd4) begin
      st_d[127 - 32*phase -: 32] = sb_out;
    end else begin
      rk_d   = {w0, w1, w2, w3};
      rcon_d = xtime(rcon);
      st_d   = ((rnd == 4'd10) ? sr : mix_columns(sr)) ^ {w0, w1, w2, w3};
      if (rnd == 4'd10) begin
        busy_d = 1'b0;
        done_d = 1'b1;
        ct_d   = st_d;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= '0;
      rk    <= '0;
      rcon  <= 8'h01;
      rnd   <= 4'd1;
      phase <= 3'd0;
      busy  <= 1'b0;
      done  <= 1'b0;
      ct    <= '0;
    end else if (ce) begin
      st   <= st_d;
      rk   <= rk_d;
      rcon <= rcon_d;
      busy <= busy_d;
      done <= done_d;
      ct   <= ct_d;
      if (!busy) begin
        rnd   <= 4'd1;
        phase <= 3'd0;
      end else if (phase == 3'd4) begin
        rnd   <= rnd + 4'd1;
        phase <= 3'd0;
      end else begin
        phase <= phase + 3'd1;
      end
    end else begin
      done <= 1'b0;
    end
  end

  // 10 rounds of 5 cycles must add up to the advertised latency.
  initial assert (LATENCY == 50) else $error("aes128_core: LATENCY must be 50");

endmodule
