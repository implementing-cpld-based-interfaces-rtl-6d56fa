// quad_encoder_if - quadrature decoder/counter interface for an incremental
// optical encoder.
//
// Four parts, as in the original design: the edge detector samples both
// channels on the fast clock, the truth-table decoder turns each
// single-channel edge into an up or down pulse (four counts per slot), the
// 16-bit counter accumulates them, and the bus interface lets the
// microcontroller read the count byte-wise (upper byte latched on the
// lower-byte read) and clear it.
//
// Interface: the count is only visible through the bus (req/rdata/rd_oe).
//
// Timing: a channel edge changes count two clocks later (one clock in the
// edge detector, one in the counter). Each encoder state must last at least
// one clock: at 11.0592 MHz and 2048 counts per revolution that is about
// 324,000 rpm.
module quad_encoder_if
  import cpld_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  bus_req_t    req,
  input  logic        cha,
  input  logic        chb,
  output logic [7:0]  rdata,
  output logic        rd_oe
);

  logic [3:0]  enc_dec;
  logic        up_cnt, dwn_cnt, clr;
  logic [15:0] count;

  quad_edge_detect u_edge (
    .clk, .rst_n, .cha, .chb, .enc_dec
  );

  quad_decoder u_dec (
    .enc_dec, .up_cnt, .dwn_cnt
  );

  quad_counter #(.WIDTH(16)) u_cnt (
    .clk, .rst_n, .clr, .up_cnt, .dwn_cnt, .count
  );

  enc_bus_if u_bus (
    .clk, .rst_n, .req, .count, .clr, .rdata, .rd_oe
  );

endmodule
