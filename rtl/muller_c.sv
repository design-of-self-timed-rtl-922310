// muller_c: two-input Muller C-element with active-low clear.
//
// The output copies the inputs when they agree and holds its value while
// they differ; it is the rendezvous element of every handshake in the
// self-timed library. cdn = 0 forces the output to 0 (the cell's pins are
// In1, In2, Cdn and OUT). It is written as a level-sensitive latch whose
// enable is "inputs equal", which is how the hold behaviour maps onto a
// synthesizable storage element. No delays are modelled: the cell has no
// clock, and the output settles in the same simulation step as its inputs.
//
// Lint and synthesis report a latch and a feedback loop here: holding the
// output is the element's function, so both are intended.
`timescale 1ps/1ps
module muller_c (
  input  logic in1,
  input  logic in2,
  input  logic cdn,
  output logic out
);
  always_latch begin
    if (!cdn)            out = 1'b0;
    else if (in1 == in2) out = in1;
  end
endmodule
