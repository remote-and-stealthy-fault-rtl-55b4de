// sync2: two-flop synchroniser that carries the global toggle signal into
// the fast power-waster clock domain. Two cycles of latency. The document
// does not describe the clock crossing; this is the conventional choice.
module sync2 (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  logic meta;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {q, meta} <= 2'b00;
    else        {q, meta} <= {meta, d};
  end
endmodule
