// stepper_ctrl - half-step sequencer for a unipolar stepper motor.
//
// A unipolar motor is driven by four low-side transistors. Half stepping
// alternates between one and two energised phases, giving eight patterns
// (transistors on, numbered 1-4):
//   step 1: 1,3   2: 1   3: 1,4   4: 4   5: 2,4   6: 2   7: 2,3   8: 3
// The sequencer is a synchronous counter of four JK flip-flops Q3..Q0 with
// dig_out0 = Q3 (transistor 1) ... dig_out3 = Q0 (transistor 4), so the
// states Q3Q2Q1Q0 run 1010 1000 1001 0001 0101 0100 0110 0010. Each flip-flop
// has J and K inputs computed from the present state and the direction bit
// dir (0: step 1 towards 8, 1: reverse), as in the original design. The J/K
// equations below are a two-level minimisation of the state table with the
// eight unused codes as don't-cares; each is a two-term sum selected by
// dir (fwd = ~dir), which keeps them one product term deep as on a CPLD.
//
// The motor speed is set by the step clock, which the microcontroller
// produces with a programmable timer; one rising edge is one half step.
// The all-off state 0000 (e.g. after a power-up clear) is left by setting
// Q3, as the original does with an asynchronous preset; here it is done on
// the next step clock, and the reset loads 1000 straight away. Other
// unused codes are not forced out (1100 holds while dir = 0): assert rst_n.
//
// Timing: dig_out changes on the rising edge of step_clk; dir must be
// stable around that edge.
module stepper_ctrl (
  input  logic       step_clk,
  input  logic       rst_n,
  input  logic       dir,
  output logic [3:0] dig_out
);

  logic [3:0] q;       // q[3] = Q3 ... q[0] = Q0
  logic [3:0] j, k;
  logic       fwd;

  assign fwd = ~dir;

  always_comb begin
    j[3] = ~q[2] & ((fwd & ~q[0]) | (dir & ~q[1]));
    k[3] =          (fwd &  q[0]) | (dir &  q[1]);
    j[2] = ~q[3] & ((fwd &  q[0]) | (dir &  q[1]));
    k[2] =          (fwd &  q[1]) | (dir &  q[0]);
    j[1] = ~q[0] & ((fwd & ~q[3]) | (dir &  q[3]));
    k[1] =          (fwd &  q[3]) | (dir &  q[2]);
    j[0] = ~q[1] & ((fwd & ~q[2]) | (dir &  q[2]));
    k[0] =          (fwd &  q[2]) | (dir &  q[3]);
  end

  always_ff @(posedge step_clk or negedge rst_n) begin
    if (!rst_n)         q <= 4'b1000;
    else if (q == '0)   q <= 4'b1000;               // preset of flip-flop 3
    else                q <= (j & ~q) | (~k & q);   // JK flip-flops
  end

  assign dig_out = {q[0], q[1], q[2], q[3]};

endmodule
