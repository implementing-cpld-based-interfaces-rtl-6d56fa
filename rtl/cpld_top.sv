// cpld_top - the user-configurable CPLD of a small 80C52 controller board,
// carrying three motion-control interfaces and the predefined digital I/O.
//
// The microcontroller reaches everything through one 16-byte I/O page of its
// external data space (0x7FF0-0x7FFF, see cpld_pkg):
//   - quad_encoder_if: x4 quadrature decoder and 16-bit position counter for
//     an incremental optical encoder (channels cha/chb), read as two bytes
//     with the upper byte latched on the lower-byte read;
//   - stepper_ctrl: half-step sequencer for a unipolar stepper, advanced by
//     an external step clock (the microcontroller's timer output), with a
//     direction input;
//   - pwm_ctrl: PWM output with programmable period and off time;
//   - gpio_port: 8 digital inputs, 8 digital outputs, a free chip select.
// mcu_bus_if latches the multiplexed address and decodes the page.
//
// The bidirectional AD bus is split into ad_in, data_out and data_oe; the
// pad's tri-state buffer drives data_out onto the bus while data_oe is high
// (a read strobe to a readable register). On the original 18 user pins the
// interfaces are alternative configurations; here each has its own pins.
// The three interfaces follow the original design; the register addresses
// other than the PWM pair, the bus split and the reset are this design's.
//
// Clocks: clk (11.0592 MHz on the original board) runs everything except
// the stepper, which runs on step_clk. rst_n is an asynchronous active-low
// reset for both.
module cpld_top
  import cpld_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // 80C52 external bus
  input  logic [7:0] ad_in,
  input  logic [7:0] a_hi,
  input  logic       ale,
  input  logic       rd_n,
  input  logic       wr_n,
  output logic [7:0] data_out,
  output logic       data_oe,
  // optical encoder
  input  logic       cha,
  input  logic       chb,
  // stepper motor drive
  input  logic       step_clk,
  input  logic       step_dir,
  output logic [3:0] step_out,
  // PWM motor drive
  output logic       pwm_out,
  // predefined digital I/O
  input  logic [7:0] dig_in,
  output logic [7:0] dig_out,
  output logic       cs_n
);

  bus_req_t    req;
  logic [7:0]  enc_rdata, gpio_rdata;
  logic        enc_oe, gpio_oe;

  mcu_bus_if u_bus (
    .clk, .rst_n, .ad_in, .a_hi, .ale, .rd_n, .wr_n, .req
  );

  quad_encoder_if u_enc (
    .clk, .rst_n, .req, .cha, .chb,
    .rdata (enc_rdata), .rd_oe (enc_oe)
  );

  stepper_ctrl u_step (
    .step_clk, .rst_n, .dir (step_dir), .dig_out (step_out)
  );

  pwm_ctrl u_pwm (
    .clk, .rst_n, .req, .pwm_out
  );

  gpio_port u_gpio (
    .clk, .rst_n, .req, .dig_in, .dig_out, .cs_n,
    .rdata (gpio_rdata), .rd_oe (gpio_oe)
  );

  // Read-data mux: the sources answer disjoint addresses.
  assign data_oe  = enc_oe | gpio_oe;
  assign data_out = enc_rdata | gpio_rdata;

  a_one_driver: assert property (@(posedge clk) !(enc_oe && gpio_oe))
    else $error("two sources drive the data bus");

endmodule
