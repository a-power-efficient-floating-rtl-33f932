// booth_r4_pp: radix-4 (modified) Booth recoder and partial-product generator.
//
// Multiplies two unsigned W-bit operands. The multiplier b is read as a
// non-negative two's-complement number (a zero bit is added on top, and one
// more if needed to make the width even) and recoded into ND = NB/2 digits in
// {-2,-1,0,+1,+2}, digit i taken from bits b[2i+1], b[2i], b[2i-1] with
// b[-1] = 0. So at most about n/2 summands are formed instead of n. Row i is
// digit_i * a shifted left by 2i, sign-extended to the product width PW = 2W
// and kept modulo 2^PW (the true product is below 2^PW, so the modular sum is
// exact). A negative digit is formed as the one's complement of |digit|*a; the
// missing +1 of each such row is collected into one extra correction row
// (bit 2i set for a negative digit i), so pp holds ND+1 rows in total.
// Combinational. The Booth recoding follows the multiplication method of the
// design; the width handling and correction row are this design's choices.
module booth_r4_pp #(
  parameter int W  = 53,
  parameter int NB = ((W + 2) / 2) * 2,  // recoded multiplier width (even, top bit 0)
  parameter int ND = NB / 2,             // number of Booth digits
  parameter int PW = 2 * W               // product width
) (
  input  logic [W-1:0]           a,
  input  logic [W-1:0]           b,
  output logic [ND:0][PW-1:0]    pp
);

  logic [NB:0] bx;   // {b zero-extended, b[-1]=0}

  always_comb begin
    logic [2:0]    grp;
    logic [PW-1:0] m;
    logic          neg;
    bx = {(NB - W)'(0), b, 1'b0};
    pp = '0;
    for (int i = 0; i < ND; i++) begin
      grp = bx[2*i +: 3];
      // magnitude of the digit times a
      unique case (grp)
        3'b001, 3'b010, 3'b101, 3'b110: m = PW'(a);
        3'b011, 3'b100:                 m = PW'(a) << 1;
        default:                        m = '0;
      endcase
      neg = grp[2] & ~(grp[1] & grp[0]);
      pp[i]     = (neg ? ~m : m) << (2 * i);
      pp[ND][2*i] = neg;
    end
  end

endmodule
