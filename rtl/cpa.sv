// cpa: W-bit carry-propagate (ripple-carry) adder.
//
// A chain of full adders: the carry out of bit i is the carry in of bit i+1,
// the least significant adder takes the external carry cin. Computes
// s = a + b + cin with carry-out cout. Combinational; its delay grows linearly
// with W. In the multiplier it adds the two rows left by the Wallace tree.
module cpa #(
  parameter int W = 106
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  always_comb begin
    logic c;   // carry rippling from bit to bit
    c = cin;
    for (int i = 0; i < W; i++) begin
      s[i] = a[i] ^ b[i] ^ c;
      c    = (a[i] & b[i]) | (a[i] & c) | (b[i] & c);
    end
    cout = c;
  end

endmodule
