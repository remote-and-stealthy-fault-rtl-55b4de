// tb_aes128_core: checks the victim AES-128 core against the two FIPS-197
// example vectors and against the reference model for random keys and
// plaintexts, including the 50-cycle latency, the busy flag, that a start
// during busy is ignored, and that ce=0 freezes the core.
module tb_aes128_core;
  import aes_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b1, start = 1'b0;
  logic [127:0] pt = '0, key = '0, ct;
  logic busy, done;
  int checks = 0, failures = 0;

  aes128_core dut (.clk, .rst_n, .ce, .start, .pt, .key, .busy, .done, .ct);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Run one encryption; returns the ciphertext and checks the latency.
  task automatic encrypt(logic [127:0] p, logic [127:0] k, int stall, output logic [127:0] c);
    int n = 0;
    @(negedge clk);
    pt = p; key = k; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    pt = ~p;  // inputs only matter on the start edge
    key = ~k;
    check(busy, "busy after start");
    n = 1;
    while (!done) begin
      if (stall != 0 && n == 20) begin
        ce = 1'b0;
        repeat (stall) @(negedge clk);
        n += stall;
        ce = 1'b1;
      end
      // a second start while busy must be ignored
      if (n == 10) start = 1'b1;
      if (n == 11) start = 1'b0;
      @(negedge clk);
      n++;
      if (n > 200) break;
    end
    // n counts negedges after the start edge; done registered on edge 50
    // is first seen at negedge 51.
    check(n == 51 + stall, $sformatf("latency %0d edges, expected %0d", n - 1, 50 + stall));
    c = ct;
    @(negedge clk);
    check(!done && !busy, "done is a single pulse, busy cleared");
    check(ct == c, "ct held after done");
  endtask

  initial begin
    logic [127:0] c, p, k;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    encrypt(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f, 0, c);
    check(c == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "FIPS-197 C.1 vector");
    encrypt(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c, 0, c);
    check(c == 128'h3925841d02dc09fbdc118597196a0b32, "FIPS-197 B vector");
    for (int i = 0; i < 20; i++) begin
      p = {$urandom, $urandom, $urandom, $urandom};
      k = {$urandom, $urandom, $urandom, $urandom};
      encrypt(p, k, (i % 4 == 3) ? 7 : 0, c);
      check(c == aes_encrypt(p, k), $sformatf("random vector %0d", i));
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
