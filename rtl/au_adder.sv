// au_adder -- Soft SIMD carry-ripple adder/subtractor of the Arithmetic Unit.
//
// Adds or subtracts two DW-bit words subword by subword. The carry chain is a
// plain ripple chain, so its delay is proportional to the subword width rather
// than to DW: this is what lets the clock be raised for narrow subwords.
// Independence of the subwords comes from the guardbits, the MSB of each
// subword (marked by a 1 in 'mask'): in the carry chain both operand bits at
// a guardbit are forced to 0 for an addition and to 1 for a subtraction, so
// the carry leaving a subword is always 0 (add) or 1 (subtract), the latter
// being exactly the +1 that two's complement subtraction A + ~B + 1 needs in
// the next subword. The lowest subword gets the same value as carry-in.
//
// The sum bit written at a guardbit position is the true sign bit of the
// subword result (operand MSBs and incoming carry), so each subword holds the
// exact result modulo 2^width. Results are correct as long as the operands
// keep their information in width-1 bits, the rule the design relies on to
// avoid overflow; outside it they wrap within the subword.
//
// Interface: combinational; a, b, mask, sub in; s out.
module au_adder #(
  parameter int unsigned DW = 48
) (
  input  logic [DW-1:0] a,
  input  logic [DW-1:0] b,
  input  logic [DW-1:0] mask,
  input  logic          sub,
  output logic [DW-1:0] s
);

  always_comb begin
    logic c;
    logic bb;
    c = sub;
    s = '0;
    for (int i = 0; i < DW; i++) begin
      bb   = b[i] ^ sub;
      s[i] = a[i] ^ bb ^ c;
      if (mask[i]) c = sub;                          // guardbit: chain cut, carry = guard value
      else         c = (a[i] & bb) | (c & (a[i] ^ bb));
    end
  end

endmodule
