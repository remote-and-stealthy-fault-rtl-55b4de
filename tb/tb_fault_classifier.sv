// tb_fault_classifier: feeds the classifier correct/faulty ciphertext pairs
// made by the reference AES model with a byte flipped at the input of a
// chosen round, and checks class, column, byte mask and byte count.
// Expected column of a round-9 fault in state byte b (row b%4, column b/4):
// ShiftRows moves it to column (b/4 - b%4) mod 4.
module tb_fault_classifier;
  import aes_ref_pkg::*;
  import attack_pkg::*;

  logic [127:0] ref_ct, ct;
  logic [15:0]  mask;
  logic [4:0]   nbytes;
  fault_class_e cls;
  logic [1:0]   col;
  int checks = 0, failures = 0;

  fault_classifier dut (.ref_ct, .ct, .mask, .nbytes, .cls, .col);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [15:0] ref_mask(logic [127:0] a, logic [127:0] b);
    logic [15:0] m;
    for (int i = 0; i < 16; i++) m[i] = (a[127-8*i -: 8] != b[127-8*i -: 8]);
    return m;
  endfunction

  initial begin
    logic [127:0] pt, key;
    int b, r;
    logic [7:0] flip;
    for (int it = 0; it < 200; it++) begin
      pt   = {$urandom, $urandom, $urandom, $urandom};
      key  = {$urandom, $urandom, $urandom, $urandom};
      b    = $urandom_range(0, 15);
      flip = 8'($urandom_range(1, 255));
      r    = it % 5;  // 0: none, 1: round 9, 2: round 10, 3: round <= 8, 4: two bytes round 9
      ref_ct = aes_encrypt(pt, key);
      case (r)
        0: ct = ref_ct;
        1: ct = aes_encrypt_fault(pt, key, 9, b, flip);
        2: ct = aes_encrypt_fault(pt, key, 10, b, flip);
        3: ct = aes_encrypt_fault(pt, key, $urandom_range(2, 8), b, flip);
        default: begin
          // faults in two different columns of the round-9 input
          logic [127:0] c1, c2;
          c1 = aes_encrypt_fault(pt, key, 9, b, flip);
          c2 = aes_encrypt_fault(pt, key, 9, (b + 4) % 16, flip);
          ct = c1 ^ c2 ^ ref_ct;  // differences add up through the linear layers of round 10
        end
      endcase
      #1;
      check(mask == ref_mask(ref_ct, ct), "mask");
      check(nbytes == $countones(ref_mask(ref_ct, ct)), "nbytes");
      case (r)
        0: check(cls == FC_NONE, "no fault");
        1: begin
          check(cls == FC_USABLE, $sformatf("round 9 byte %0d usable (cls %0d)", b, cls));
          check(col == 2'((b/4 - b%4 + 4) % 4), "column of usable fault");
        end
        2: check(cls == FC_LATE, "round 10 fault late");
        3: check(cls == FC_EARLY, "early fault");
        default: check(cls == FC_EARLY, "two-column fault not usable");
      endcase
    end
    // The printed example: fault in byte 0 before round 9 hits bytes 0,7,10,13.
    ref_ct = '0;
    ct = '0;
    ct[127-8*0 -: 8] = 8'h11; ct[127-8*7 -: 8] = 8'h22;
    ct[127-8*10 -: 8] = 8'h33; ct[127-8*13 -: 8] = 8'h44;
    #1;
    check(cls == FC_USABLE && col == 2'd0, "bytes 0,7,10,13 usable, column 0");
    ct[127-8*13 -: 8] = 8'h00; ct[127-8*12 -: 8] = 8'h44;
    #1;
    check(cls == FC_LATE, "four bytes off a diagonal");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
