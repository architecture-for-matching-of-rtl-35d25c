// Half adder, the only arithmetic cell of the butterfly-formed weight accumulator.
// Two input bits of equal weight w give a carry of weight 2w (a AND b) and a sum of
// weight w (a XOR b). Purely combinational, one gate level on each output.
// The cell and its weights follow the architecture; the gate form is the textbook one.
module half_adder (
  input  logic a,
  input  logic b,
  output logic c,   // carry, weight 2w
  output logic s    // sum, weight w
);
  assign c = a & b;
  assign s = a ^ b;
endmodule
