// asg_ctrl: clock-control unit (CCG) of the alternating step generator.
//
// Three states, as in the paper's state diagram. In S1 the unit looks at R1
// bit 0 (A0): if it is 1 it loads the down counter with del1 and enters S3,
// where R2 is clocked once per cycle; if it is 0 it loads del2 and enters S2,
// where R3 is clocked once per cycle. When the counter runs out ("del1 over" /
// "del2 over") the unit steps R1 and returns to S1. Only one of R2 and R3 is
// clocked for each R1 position, as the K-generator requires.
//
// Interface and timing: one keystream bit takes 1 + delta cycles (one S1 cycle
// plus delta clocking cycles). `done` is high in the last clocking cycle,
// together with step_r1; the caller forms the keystream bit in that cycle.
// `enable` is sampled in S1 only, so a bit that has started always finishes.
// `restart` (key load) returns the unit to S1. The state encoding and the
// single S1 decision cycle are this design's choices; the paper does not give
// a cycle-level timing. Note the paper's prose pairs A0=0 with LFSR2, which
// contradicts both its algorithm and its state diagram; the algorithm
// ("if R1^0(t)=1, R2 is clocked del1 times") is followed.
module asg_ctrl
  import ks_pkg::*;
#(
  parameter int unsigned DW = 5
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          restart,
  input  logic          enable,
  input  logic          a0,       // R1 bit 0
  input  logic [DW-1:0] del1,     // clocks of R2 when a0 = 1 (>= 1)
  input  logic [DW-1:0] del2,     // clocks of R3 when a0 = 0 (>= 1)
  output logic          step_r1,
  output logic          step_r2,
  output logic          step_r3,
  output logic          done,
  output ccg_state_e    state
);

  logic [DW-1:0] cnt;
  logic          last;

  assign last    = (cnt == DW'(1));
  assign step_r2 = (state == CCG_S3);
  assign step_r3 = (state == CCG_S2);
  assign done    = (state != CCG_S1) && last;
  assign step_r1 = done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= CCG_S1;
      cnt   <= '0;
    end else if (restart) begin
      state <= CCG_S1;
      cnt   <= '0;
    end else begin
      unique case (state)
        CCG_S1: if (enable) begin
          if (a0) begin
            cnt   <= del1;
            state <= CCG_S3;
          end else begin
            cnt   <= del2;
            state <= CCG_S2;
          end
        end
        CCG_S2, CCG_S3: begin
          cnt <= cnt - DW'(1);
          if (last) state <= CCG_S1;
        end
        default: state <= CCG_S1;
      endcase
    end
  end

  // A delta of zero would never end the clocking phase.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == CCG_S1 && enable && !restart) |-> (a0 ? del1 : del2) != '0)
    else $error("asg_ctrl: zero clock count");

endmodule
