// Half adder: adds two bits, giving a sum bit (XOR) and a carry bit (AND).
// Purely combinational, no timing. It is the basic cell of the carry-save
// adder, the compressors and the multiplexer of this design.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
