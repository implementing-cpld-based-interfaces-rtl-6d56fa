// quad_edge_detect - sampling edge detector for the two encoder channels.
//
// Each channel feeds a two-stage shift register clocked by the fast global
// clock (11.0592 MHz on the original board, far above the encoder rate).
// The first stage holds the present sample, the second the sample one clock
// earlier, so a change between the two is an edge on that channel:
//   enc_dec[0] = A present, enc_dec[1] = A previous,
//   enc_dec[2] = B present, enc_dec[3] = B previous.
// e.g. enc_dec[1:0] == 2'b01 is a rising edge on A.
//
// The structure and bit names follow the original circuit. The reset is an
// addition of this design (the original flip-flops have no clear); there is
// no extra metastability stage, also as in the original, so cha/chb should
// be clean, debounced logic levels.
//
// Timing: a channel change is visible in enc_dec[0]/[2] one clock later and
// the edge pattern lasts exactly one clock.
module quad_edge_detect (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cha,
  input  logic       chb,
  output logic [3:0] enc_dec
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) enc_dec <= '0;
    else        enc_dec <= {enc_dec[2], chb, enc_dec[0], cha};
  end

endmodule
