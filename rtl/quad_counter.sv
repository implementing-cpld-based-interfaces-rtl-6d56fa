// quad_counter - up/down binary counter holding the encoder position.
//
// Counts one step up on up_cnt, one step down on dwn_cnt and holds
// otherwise. The 16-bit default is the original width: 32 revolutions of a
// 2048-count-per-revolution encoder before it wraps. It wraps modulo
// 2**WIDTH, so the value reads as a two's complement position.
// clr (a write from the microcontroller) returns it to 0 and wins over
// counting; up_cnt wins over dwn_cnt, though the decoder never raises both.
// Width and the up-before-down priority follow the original design; the
// clear input and the reset are this design's additions.
//
// Timing: the new count is visible the clock after up_cnt/dwn_cnt/clr.
module quad_counter #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             up_cnt,
  input  logic             dwn_cnt,
  output logic [WIDTH-1:0] count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       count <= '0;
    else if (clr)     count <= '0;
    else if (up_cnt)  count <= count + 1'b1;
    else if (dwn_cnt) count <= count - 1'b1;
  end

endmodule
