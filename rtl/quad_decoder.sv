// quad_decoder - combinational quadrature decoder (x4 resolution).
//
// The encoder channels (A,B) step through four states, numbered
// 1=(1,0) 2=(1,1) 3=(0,1) 4=(0,0). Moving 1->2->3->4->1 (A leading B) counts
// up; the reverse order counts down. Every single-channel edge is counted, so
// a 512-slot codewheel gives 2048 counts per revolution.
//
// Input is the edge detector's sample pair per channel
//   enc_dec = {B previous, B present, A previous, A present}.
// The decoding is a 16-entry truth table, the way the original design is
// written; codes with no change, or with both channels changing in the same
// clock (an invalid jump of two states), give neither output.
//
// Timing: purely combinational; at most one of up_cnt/dwn_cnt is high.
module quad_decoder (
  input  logic [3:0] enc_dec,
  output logic       up_cnt,
  output logic       dwn_cnt
);

  always_comb begin
    up_cnt  = 1'b0;
    dwn_cnt = 1'b0;
    unique case (enc_dec)
      // count up: one channel moved, in the A-leads-B direction
      4'b0111,                 // 1->2  A=1,   B rises
      4'b1110,                 // 2->3  A falls, B=1
      4'b1000,                 // 3->4  A=0,   B falls
      4'b0001: up_cnt = 1'b1;  // 4->1  A rises, B=0
      // count down: the same edges in the reverse direction
      4'b0010,                 // 1->4  A falls, B=0
      4'b0100,                 // 4->3  A=0,   B rises
      4'b1101,                 // 3->2  A rises, B=1
      4'b1011: dwn_cnt = 1'b1; // 2->1  A=1,   B falls
      default: ;               // no change, or both channels changed
    endcase
  end

endmodule
