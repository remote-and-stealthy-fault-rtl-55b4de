// aes_waster: one AES-128 module used as a power waster.
//
// The core is the same iterative AES-128 as the victim, run on the fast
// power-waster clock. It encrypts a stream: each ciphertext is fed back as the
// next plaintext under a fixed key, which keeps its switching close to
// random, as the document describes. While `en` (the synchronised global
// toggle) is low, the core's clock enable is low and every register holds, so
// the instance is switched off; when high, a new encryption starts as soon as
// the previous one ends (one idle cycle between blocks).
// The fixed key and seed plaintext are parameters (this design's choice).
// `ct` is the last ciphertext; it is brought out so that synthesis keeps the
// logic.
module aes_waster
  import aes_pkg::*;
#(
  parameter block_t KEY  = 128'h2b7e151628aed2a6abf7158809cf4f3c,
  parameter block_t SEED = 128'h3243f6a8885a308d313198a2e0370734
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  output block_t ct,
  output logic   done   // one cycle per finished block
);

  logic   busy, seeded;
  block_t fb;

  aes128_core u_core (
    .clk   (clk),
    .rst_n (rst_n),
    .ce    (en),
    .start (!busy),
    .pt    (fb),
    .key   (KEY),
    .busy  (busy),
    .done  (done),
    .ct    (ct)
  );

  // The first block encrypts SEED, every later one the previous ciphertext.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          seeded <= 1'b0;
    else if (en && !busy) seeded <= 1'b1;
  end
  assign fb = seeded ? ct : SEED;

endmodule
