// crc_div: serial polynomial division (CRC) circuit.
//
// Shifts in one bit per enabled cycle and keeps the remainder of
// B(x) * x^D modulo G(x), where B(x) is the bit stream received since the
// last clear (first bit = highest power) and G(x) = x^D + POLY. This is the
// usual one-register CRC divider: the bit leaving the top stage, XORed with
// the incoming bit, decides whether the low coefficients of G are added.
// Stream cipher 2 uses two of these (G1 of degree 6, G2 of degree 2) as its
// "division modulo circuit".
//
// Interface and timing: `clear` (priority) zeroes the remainder, `shift`
// absorbs bit_in; rem is registered and valid the cycle after.
module crc_div #(
  parameter int unsigned   D    = 6,
  parameter logic [D-1:0]  POLY = 6'b111001   // G1(x) = x^6+x^5+x^4+x^3+1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          shift,
  input  logic          bit_in,
  output logic [D-1:0]  rem
);

  logic fb;
  assign fb = bit_in ^ rem[D-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      rem <= '0;
    else if (clear)  rem <= '0;
    else if (shift)  rem <= (rem << 1) ^ (fb ? POLY : '0);
  end

endmodule
