// gpio_port - the predefined user I/O of the CPLD.
//
// Without reconfiguring the CPLD, its free pins serve as 8 digital inputs,
// 8 digital outputs and a free chip select for external hardware (the PWM
// pin is pwm_ctrl). The function is the original board's; the addresses
// and timing are this design's choice:
//   0x7FF0 read        dig_in, through a two-flop synchroniser
//   0x7FF1 write/read  dig_out register
//   0x7FF2 any access  cs_n low for as long as the strobe is active
//
// Interface: req is the decoded bus access; rdata/rd_oe stand for the
// tri-state driver onto the data bus.
//
// Timing: dig_out changes the clock after the write strobe is seen (it
// keeps the byte of the last strobe clock); dig_in reaches the read path
// two clocks after it changes; cs_n is combinational from the strobes.
module gpio_port
  import cpld_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  bus_req_t   req,
  input  logic [7:0] dig_in,
  output logic [7:0] dig_out,
  output logic       cs_n,
  output logic [7:0] rdata,
  output logic       rd_oe
);

  logic [7:0] in_meta, in_sync;
  logic       rd_in, rd_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_meta <= '0;
      in_sync <= '0;
      dig_out <= '0;
    end else begin
      in_meta <= dig_in;
      in_sync <= in_meta;
      if (hit_wr(req, REG_DIG_OUT)) dig_out <= req.wdata;
    end
  end

  assign rd_in  = hit_rd(req, REG_DIG_IN);
  assign rd_out = hit_rd(req, REG_DIG_OUT);
  assign cs_n   = ~(hit_rd(req, REG_USER_CS) | hit_wr(req, REG_USER_CS));
  assign rd_oe  = rd_in | rd_out;
  assign rdata  = rd_in ? in_sync : rd_out ? dig_out : '0;

endmodule
