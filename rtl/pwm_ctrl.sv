// pwm_ctrl - pulse-width modulation output with programmable period and
// off time.
//
// The microcontroller writes two 8-bit registers: totaltime (0x7FF6), the
// period in clocks, and lowtime (0x7FF7), the number of clocks per period
// that the output is low. A free-running counter cntr counts 0 ..
// totaltime-1 and starts again; the output is low while cntr < lowtime and
// high for the rest of the period, so the duty cycle is
// (totaltime - lowtime) / totaltime. lowtime >= totaltime keeps the output
// low; lowtime = 0 keeps it high. totaltime = 0 behaves as 256.
//
// Registers, counter and compare follow the original circuit. The original
// clears the counter asynchronously when it reaches totaltime; here the
// wrap is synchronous with the same period. The original listing compares
// with the polarity reversed relative to its own description of lowtime as
// the off time; this design follows the description.
//
// Timing: pwm_out is registered, one clock after the counter. A register
// write takes effect from the clock after the write strobe; the period
// running when totaltime is lowered below cntr runs on through the counter
// wrap, as in the original.
module pwm_ctrl
  import cpld_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t req,
  output logic     pwm_out
);

  logic [7:0] totaltime, lowtime, cntr, cntr_inc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      totaltime <= '0;
      lowtime   <= '0;
    end else begin
      if (hit_wr(req, REG_TOTALTIME)) totaltime <= req.wdata;
      if (hit_wr(req, REG_LOWTIME))   lowtime   <= req.wdata;
    end
  end

  assign cntr_inc = cntr + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cntr    <= '0;
      pwm_out <= 1'b0;
    end else begin
      cntr    <= (cntr_inc == totaltime) ? '0 : cntr_inc;
      pwm_out <= (cntr >= lowtime);
    end
  end

endmodule
