// csa: W-bit carry-save adder (a row of full adders, 3:2 compressor).
//
// Adds three W-bit rows without propagating carries: s is the bitwise sum and
// co the majority (carry) bits already shifted one place left, so that
// a + b + c == s + co modulo 2^W. Combinational; used as the node of the
// Wallace tree.
module csa #(
  parameter int W = 106
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] s,
  output logic [W-1:0] co
);

  logic [W-1:0] maj;

  assign s   = a ^ b ^ c;
  assign maj = (a & b) | (a & c) | (b & c);
  assign co  = {maj[W-2:0], 1'b0};

endmodule
