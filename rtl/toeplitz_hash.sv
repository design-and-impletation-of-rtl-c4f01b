// toeplitz_hash: LFSR-based Toeplitz hash of a serial message.
//
// An n-stage LFSR A (shift register plus a control register holding the
// feedback polynomial) steps once for every message bit. When the message
// bit is 1 the current LFSR state is XORed into the n-bit accumulator H;
// when it is 0 H keeps its value. After m bits H = T * M over GF(2), where
// the columns of the n x m Toeplitz matrix T are the m successive LFSR
// states, so only m+n-1 sequence bits define the matrix.
//
// Defaults follow the paper's example: n = 5, h(x) = x^5 + x^2 + 1 and
// initial state (A0..A4) = (0 0 0 1 1). The polynomial and initial state are
// held in the control register and can be replaced through cfg_load; their
// reset values are the paper's.
//
// Interface and timing: `start` reloads A from the control register and
// clears H. Each cycle with bit_valid high absorbs bit_in (message bits in
// order, first bit against the initial state) and steps A. `hash` is the
// registered accumulator and is final the cycle after the last bit. The
// paper gates the accumulator clock with INPUT; a clock enable is used here.
module toeplitz_hash
  import ks_pkg::*;
#(
  parameter int unsigned   N     = SC1_N,
  parameter logic [N-1:0]  POLY  = N'(SC1_HPOLY),
  parameter logic [N-1:0]  INIT  = N'(SC1_HINIT)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cfg_load,
  input  logic [N-1:0]  cfg_poly,
  input  logic [N-1:0]  cfg_init,
  input  logic          start,
  input  logic          bit_valid,
  input  logic          bit_in,
  output logic [N-1:0]  hash
);

  logic [N-1:0] poly_q, init_q;  // control register
  logic [N-1:0] a;               // shift register

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      poly_q <= POLY;
      init_q <= INIT;
    end else if (cfg_load) begin
      poly_q <= cfg_poly;
      init_q <= cfg_init;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a    <= INIT;
      hash <= '0;
    end else if (start) begin
      a    <= init_q;
      hash <= '0;
    end else if (bit_valid) begin
      a <= {^(a & poly_q), a[N-1:1]};
      if (bit_in) hash <= hash ^ a;
    end
  end

endmodule
