// mcu_bus_if - glue between the 80C52 external bus and the CPLD registers.
//
// The 8051 multiplexes the low address byte and the data on AD7..0: while
// ALE is high the bus carries A7..0, which must be latched; the high byte
// A15..8 comes on its own port. A MOVX access then drops RD or WR while the
// data byte is on AD7..0.
//
// This block holds the address latch (add_latch) and the high address byte,
// both loaded on every clock while ALE is high, decodes the 16-byte I/O page
// 0x7FF0-0x7FFF (io_space_2, the page of the PWM registers at 0x7FF6/7) and
// hands each access to the peripherals as a bus_req_t: page select, latched
// A3..0, read and write strobes and the byte on the bus. The strobes stay
// level-sensitive: a peripheral register with write enable "selected and
// WR low" samples the bus on every clock of the strobe and keeps the last
// byte, as in the original design.
//
// Assumption of this design: the microcontroller and the CPLD run from the
// same clock, so the bus signals are sampled without synchronisers; ALE is
// high for at least one clock edge.
//
// Timing: address registers update one clock after ALE is seen high; the
// strobes and write data pass through combinationally.
module mcu_bus_if
  import cpld_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] ad_in,
  input  logic [7:0] a_hi,
  input  logic       ale,
  input  logic       rd_n,
  input  logic       wr_n,
  output bus_req_t   req
);

  logic [7:0] add_latch;
  logic [7:0] a_hi_latch;
  logic       io_space_2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      add_latch  <= '0;
      a_hi_latch <= '0;
    end else if (ale) begin
      add_latch  <= ad_in;
      a_hi_latch <= a_hi;
    end
  end

  assign io_space_2 = ({a_hi_latch, add_latch[7:4]} == IO_PAGE);

  always_comb begin
    req.sel   = io_space_2 & ~ale;
    req.addr  = add_latch[3:0];
    req.rd    = ~rd_n;
    req.wr    = ~wr_n;
    req.wdata = ad_in;
  end

endmodule
