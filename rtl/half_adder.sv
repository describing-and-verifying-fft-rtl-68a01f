// half_adder: the one-bit half adder used as the introductory example of
// the structural description style. sum = x XOR y, carry = x AND y, both
// combinational with no delay beyond one gate. The gate choice follows the
// example's structure (an AND and an XOR); there is no clock.
module half_adder (
  input  logic x,
  input  logic y,
  output logic sum,
  output logic carry
);
  assign sum   = x ^ y;
  assign carry = x & y;
endmodule
