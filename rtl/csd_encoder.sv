// csd_encoder -- canonical signed digit (CSD) recoding of the scalar multiplier.
//
// Recodes a W-bit two's complement number into W digits d_i in {-1, 0, +1}
// with value sum d_i * 2^i and no two adjacent non-zero digits, which
// minimises the number of non-zero digits and therefore the number of
// shift-add steps of a multiplication (about W/3 on average). Digit i is
// returned as pos[i] (+1) and neg[i] (-1).
//
// Method (Reitwiesner recoding, a ripple over the bits): with b_W = b_{W-1}
// (sign extension) and carry c_0 = 0,
//   d_i     = (b_i xor c_i) * (1 - 2*b_{i+1})
//   c_{i+1} = majority(b_i, b_{i+1}, c_i).
// For every W-bit value the highest non-zero digit lies at position W-1 or
// below, so W digits suffice. Combinational.
module csd_encoder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] b,
  output logic [W-1:0] pos,
  output logic [W-1:0] neg
);

  logic [W:0] bx;
  assign bx = {b[W-1], b};

  always_comb begin
    logic c, bn, t;
    c   = 1'b0;
    pos = '0;
    neg = '0;
    for (int i = 0; i < int'(W); i++) begin
      bn     = bx[i+1];
      t      = b[i] ^ c;
      pos[i] = t & ~bn;
      neg[i] = t & bn;
      c      = (b[i] & bn) | (b[i] & c) | (bn & c);
    end
  end

endmodule
