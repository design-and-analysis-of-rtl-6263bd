// Full adder (3:2 counter): adds three bits of equal weight, giving a sum
// bit of that weight and a carry bit of the next weight up. Purely
// combinational. Used by the reduction trees, compressors and adders.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  assign s  = a ^ b ^ ci;
  assign co = (a & b) | (ci & (a ^ b));
endmodule
