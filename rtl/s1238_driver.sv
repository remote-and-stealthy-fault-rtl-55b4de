// s1238_driver: input generator for one ISCAS'89 s1238 benchmark instance
// used as benign-looking power-wasting logic.
//
// The document's rule maximises switching while following the circuit's
// response: the input starts at zero and each enabled cycle becomes
// in_n = in_{n-1} xor (out_{n-1} << 1), where out is the circuit's output of
// the previous cycle. The benchmark netlist itself is not part of this RTL:
// `circ_in` leaves and `circ_out` enters through ports. W = 14 is the input
// and output count of s1238 as published with the ISCAS'89 set (the document
// gives no width); the rule assumes equal input and output widths.
// Timing: `circ_in` is a register. While `en` (the synchronised global toggle)
// is low the input is frozen, so the instance stops switching.
module s1238_driver #(
  parameter int unsigned W = 14
) (
  input  logic         clk,       // fast power-waster clock
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] circ_out,  // benchmark outputs, previous cycle
  output logic [W-1:0] circ_in    // benchmark inputs
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  circ_in <= '0;
    else if (en) circ_in <= circ_in ^ (circ_out << 1);
  end

endmodule
