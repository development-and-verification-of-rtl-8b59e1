// response_comparator: flags a mismatch between the golden circuit's response
// and one faulty copy's response to the same test vector.
//
// mismatch = OR over all bits of (golden XOR faulty). There is one comparator
// per faulty copy; its output is the copy's "cmp" signal, high while the
// active fault is visible at the outputs. The XOR/OR realisation is this
// design's choice; the source only names the comparator.
//
// Interface: golden, faulty (W bits each) in, mismatch out. Combinational.
module response_comparator #(
  parameter int unsigned W = 2
) (
  input  logic [W-1:0] golden,
  input  logic [W-1:0] faulty,
  output logic         mismatch
);

  assign mismatch = |(golden ^ faulty);

endmodule
