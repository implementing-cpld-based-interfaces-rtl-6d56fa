// enc_bus_if - microcontroller access to the 16-bit encoder count.
//
// The 80C52 data bus is 8 bits wide, so the count is read as two bytes:
// enc_low (0x7FF4) returns count[7:0], enc_high (0x7FF5) returns count[15:8].
// If the counter carried between the two reads, the two bytes would belong
// to different counts. To prevent that, reading enc_low also loads the
// upper byte into enc_latch, and enc_high returns enc_latch rather than the
// live counter. The microcontroller must therefore read enc_low first.
//
// The latch is loaded on every clock while the enc_low read strobe is
// active, as in the original circuit, so it holds the upper byte from the
// last clock of that read. Writing any value to enc_low clears the counter;
// the clear mechanism and both addresses are this design's choice, since
// the original only says the count can be read and reset.
//
// Interface: req is the decoded bus access (cpld_pkg::bus_req_t). rdata
// and rd_oe stand for the original tri-state driver: rd_oe is high while
// this block owns the data bus. clr is a level, high for the clocks the
// enc_low write strobe is active.
module enc_bus_if
  import cpld_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  bus_req_t    req,
  input  logic [15:0] count,
  output logic        clr,
  output logic [7:0]  rdata,
  output logic        rd_oe
);

  logic [7:0] enc_latch;
  logic       rd_low, rd_high;

  assign rd_low  = hit_rd(req, REG_ENC_LOW);
  assign rd_high = hit_rd(req, REG_ENC_HIGH);
  assign clr     = hit_wr(req, REG_ENC_LOW);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      enc_latch <= '0;
    else if (rd_low) enc_latch <= count[15:8];
  end

  assign rd_oe = rd_low | rd_high;
  assign rdata = rd_low ? count[7:0] : rd_high ? enc_latch : '0;

endmodule
