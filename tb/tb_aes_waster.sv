// tb_aes_waster: checks that the AES power waster computes the ciphertext
// stream ct_{j+1} = AES_K(ct_j), ct_0 = AES_K(SEED), one block per 51 enabled
// cycles (50 cycles of encryption plus one restart cycle), and that it holds
// completely still while its enable is low.
module tb_aes_waster;
  import aes_ref_pkg::*;
  localparam logic [127:0] K = 128'h000102030405060708090a0b0c0d0e0f;
  localparam logic [127:0] S = 128'h00112233445566778899aabbccddeeff;
  logic clk = 0, rst_n = 0, en = 0;
  logic [127:0] ct;
  logic done;
  int checks = 0, failures = 0;

  aes_waster #(.KEY(K), .SEED(S)) dut (.clk, .rst_n, .en, .ct, .done);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [127:0] exp_ct, held;
    int cyc, last_done;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (20) @(negedge clk);
    check(!done, "idle while disabled");
    exp_ct = S;
    en = 1;
    cyc = 0; last_done = -1;
    for (int blk = 0; blk < 8; blk++) begin
      while (!done) begin
        @(negedge clk);
        cyc++;
        if (blk == 5 && cyc == last_done + 20) begin
          held = dut.u_core.st;
          en = 0;
          repeat (30) begin
            @(negedge clk);
            check(dut.u_core.st == held && !done, "frozen while disabled");
          end
          en = 1;
        end
      end
      exp_ct = aes_encrypt(exp_ct, K);
      check(ct == exp_ct, $sformatf("block %0d ciphertext", blk));
      if (blk == 0) check(cyc == 51, $sformatf("first block after %0d cycles", cyc));
      else          check(cyc - last_done == 51, $sformatf("block spacing %0d", cyc - last_done));
      last_done = cyc;
      @(negedge clk);
      cyc++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
