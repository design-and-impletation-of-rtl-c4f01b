// lfsr: Fibonacci linear feedback shift register with step enable and seed load.
//
// The register shifts towards bit 0 and q[0] is the output bit. On a step the
// new top stage q[WIDTH-1] is the parity of (q & TAPS), where TAPS holds the
// low coefficients c_0..c_{WIDTH-1} of the feedback polynomial (see ks_pkg).
// The same module serves as R1, R2 and R3 of the alternating step generator,
// as the state register of stream cipher 1 and as the LFSR of stream cipher 2.
//
// Interface and timing: load (priority) or step take effect at the rising
// clock edge; q is registered. Reset (asynchronous, active low) gives the
// all-ones state so the register is never locked at zero out of reset. The
// source paper gates the clocks of its registers; a step enable is used here
// instead, which is this design's choice.
module lfsr #(
  parameter int unsigned         WIDTH = 128,
  parameter logic [WIDTH-1:0]    TAPS  = ks_pkg::ASG_TAPS1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] seed,
  input  logic             step,
  output logic [WIDTH-1:0] q
);

  logic fb;
  assign fb = ^(q & TAPS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '1;
    else if (load) q <= seed;
    else if (step) q <= {fb, q[WIDTH-1:1]};
  end

  initial begin
    assert (WIDTH >= 2) else $error("lfsr: WIDTH must be at least 2");
    assert (TAPS[0]) else $error("lfsr: feedback polynomial needs c_0 = 1");
  end

endmodule
