// ifat_dac: behavioural model of the IFAT's 8-bit digital-to-analog converter.
// This is a model of an analog part, not logic to be synthesised.
//
// The DAC produces the synaptic equilibrium potential applied to the I&F
// chips for the event being delivered. A rising edge on `wr` latches `code`;
// the output voltage, in millivolts, is code * VREF_MV / 256 and holds until
// the next write. The output is an integer so that the whole system can be
// simulated with two-state logic. The 8-bit width is the document's; the
// reference voltage, the write-strobe latch and the ideal (instant, linear)
// conversion are this model's choices.
// Synthesis note: the top 6 bits of vout_mv are always 0, since the output
// never exceeds VREF_MV; the 16-bit width leaves room for a larger VREF_MV.
module ifat_dac #(
  parameter int VREF_MV = 1000
) (
  input  logic [7:0]  code,
  input  logic        wr,
  output logic [15:0] vout_mv
);
  logic [7:0] held;

  always_ff @(posedge wr) held <= code;

  assign vout_mv = 16'((32'(held) * VREF_MV) / 256);
endmodule
