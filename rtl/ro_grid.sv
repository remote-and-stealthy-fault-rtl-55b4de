// ro_grid: behavioural model of the ring-oscillator grid.
//
// On the FPGA each oscillator is a single LUT computing NOT(node AND enable)
// whose output feeds back to its own input; all of them share one global
// enable, the toggle signal. While enabled every node flips once per LUT
// delay, which is the current draw that pulls the shared supply down. This
// model writes exactly that loop, with the LUT delay as an intra-assignment
// delay so that an event-driven simulator can run it; synthesis, which drops
// the delay, sees the intended combinational loop per oscillator (the loop
// warning is the point of the circuit and stands). A disabled oscillator
// rests at 1. All N_RO nodes switch in phase, the
// worst case a real grid only approaches. The nodes are outputs because on
// the FPGA they are kept as virtual output pins so that synthesis keeps them.
// N_RO = 3840 is the document's count for the iCE40-HX8K (half of its 7680
// LUTs); LUT_DELAY_NS is this model's choice.
// `periods` counts full oscillations of node 0, as a counter clocked by the
// oscillator would; it stands in for switching activity.
module ro_grid #(
  parameter int unsigned N_RO         = 3840,
  parameter int unsigned LUT_DELAY_NS = 1
) (
  input  logic            en,
  output logic [N_RO-1:0] ro,
  output int unsigned     periods
);

  // Oscillators are modelled in slices of 64 so that the simulator runs one
  // timed process per slice rather than one per LUT.
  localparam int unsigned SLICE = 64;
  localparam int unsigned NS    = (N_RO + SLICE - 1) / SLICE;

  for (genvar c = 0; c < NS; c++) begin : g_slice
    localparam int unsigned LO = c * SLICE;
    localparam int unsigned W  = (N_RO - LO < SLICE) ? N_RO - LO : SLICE;
    initial ro[LO +: W] = '1;
    always @(ro[LO +: W] or en) ro[LO +: W] <= #(LUT_DELAY_NS) ~(ro[LO +: W] & {W{en}});
  end

  initial periods = 0;
  always @(posedge ro[0]) periods <= periods + 1;

endmodule
