// tb_s1238_driver: closes the loop around the input generator with a small
// stand-in circuit (a 14-bit LFSR-like function of the inputs plus state,
// since the s1238 netlist is not part of this RTL) and checks every cycle
// that in_n = in_{n-1} xor (out_{n-1} << 1), starting from zero, and that
// the input freezes while the enable is low.
module tb_s1238_driver;
  localparam int W = 14;
  logic clk = 0, rst_n = 0, en = 0;
  logic [W-1:0] circ_in, circ_out, st;
  int checks = 0, failures = 0;

  s1238_driver #(.W(W)) dut (.clk, .rst_n, .en, .circ_out, .circ_in);

  always #5 clk = ~clk;

  // stand-in sequential circuit
  always_ff @(posedge clk) st <= rst_n ? (st ^ circ_in ^ {st[0], st[W-1:1]}) : 14'h1a5;
  assign circ_out = st ^ {circ_in[W-4:0], 3'b101};

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [W-1:0] exp_in, prev_out;
    logic prev_en;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(circ_in == '0, "starts at zero");
    exp_in = '0;
    for (int n = 0; n < 500; n++) begin
      prev_out = circ_out;
      prev_en = en;
      @(negedge clk);
      if (prev_en) exp_in = exp_in ^ W'(prev_out << 1);
      check(circ_in == exp_in, $sformatf("cycle %0d in %h exp %h", n, circ_in, exp_in));
      en = ((n / 37) % 3) != 2;
    end
    check(circ_in != '0, "input moved away from zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
