// fault_classifier: judges where a fault struck an AES-128 encryption by
// comparing the faulty ciphertext with the correct one of the same plaintext.
//
// A single faulty state byte at the input of round 9 is spread over one state
// column by MixColumns and then moved by the last ShiftRows, so exactly four
// ciphertext bytes differ, on one "diagonal" (bytes 0,7,10,13 for column 0;
// 1,4,11,14; 2,5,8,15; 3,6,9,12). Those faults are the ones usable for
// differential fault analysis. The byte-level difference mask is classified:
//   no byte differs                       -> FC_NONE
//   mask equals one diagonal              -> FC_USABLE, `col` = its column
//   more than four bytes differ           -> FC_EARLY (fault before round 9,
//                                            or several bytes hit at once)
//   1..3 bytes, or 4 off a diagonal       -> FC_LATE (fault after round 9's
//                                            MixColumns)
// The diagonal rule is the document's; splitting the undesired patterns into
// early and late by the byte count is this design's reading.
// Purely combinational; bit i of `mask` is ciphertext byte i (byte 0 = MSB).
module fault_classifier
  import aes_pkg::*;
  import attack_pkg::*;
(
  input  block_t       ref_ct,
  input  block_t       ct,
  output logic [15:0]  mask,
  output logic [4:0]   nbytes,
  output fault_class_e cls,
  output logic [1:0]   col
);

  always_comb begin
    block_t d;
    d = ref_ct ^ ct;
    nbytes = '0;
    for (int i = 0; i < 16; i++) begin
      mask[i] = |get_byte(d, i);
      nbytes  = nbytes + 5'(mask[i]);
    end
    col = '0;
    if (nbytes == 5'd0) begin
      cls = FC_NONE;
    end else if (nbytes > 5'd4) begin
      cls = FC_EARLY;
    end else begin
      cls = FC_LATE;
      for (int c = 0; c < 4; c++) begin
        if (mask == diag_mask(c)) begin
          cls = FC_USABLE;
          col = 2'(c);
        end
      end
    end
  end

endmodule
