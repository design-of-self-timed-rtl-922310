// tlatch: transparent latch with active-low clear, the data-holding cell of
// the self-timed library.
//
// While en = 1 the output follows in; while en = 0 it holds the last value;
// cdn = 0 clears it to 0 whatever en does. Pins follow the library cell:
// out, cdn, en, in. Propagation delay is not modelled; the output changes
// in the same simulation step as its inputs.
//
// Lint and synthesis report a latch here; it is the cell's function.
`timescale 1ps/1ps
module tlatch (
  input  logic cdn,
  input  logic en,
  input  logic in,
  output logic out
);
  always_latch begin
    if (!cdn)    out = 1'b0;
    else if (en) out = in;
  end
endmodule
