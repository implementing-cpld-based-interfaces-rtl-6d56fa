// cpld_pkg - constants and types shared by the CPLD peripherals.
//
// All user registers live in one 16-byte I/O page of the 80C52 external
// data space, 0x7FF0-0x7FFF. The PWM registers at 0x7FF6 (period) and
// 0x7FF7 (off time) follow the original board; the other offsets are this
// design's own choice.
//
// A bus access is handed from the bus glue to the peripherals as a
// bus_req_t: a page select, the low address nibble and level-sensitive
// read and write strobes (active for as long as the 8051 holds RD/WR low),
// together with the byte on the data bus.
package cpld_pkg;

  // Upper 12 address bits of the I/O page (A15..A4).
  localparam logic [11:0] IO_PAGE = 12'h7FF;

  typedef enum logic [3:0] {
    REG_DIG_IN    = 4'h0,  // read: digital input lines
    REG_DIG_OUT   = 4'h1,  // write/read: digital output lines
    REG_USER_CS   = 4'h2,  // any access asserts the free chip select
    REG_ENC_LOW   = 4'h4,  // read: count[7:0] (latches MSB); write: clear count
    REG_ENC_HIGH  = 4'h5,  // read: MSB latched at the last LSB read
    REG_TOTALTIME = 4'h6,  // write: PWM period in clocks       (0x7FF6)
    REG_LOWTIME   = 4'h7   // write: PWM off time in clocks     (0x7FF7)
  } reg_addr_e;

  typedef struct packed {
    logic       sel;    // access falls in the I/O page
    logic [3:0] addr;   // latched A3..A0
    logic       rd;     // read strobe active (RD low)
    logic       wr;     // write strobe active (WR low)
    logic [7:0] wdata;  // byte on the AD bus
  } bus_req_t;

  function automatic logic hit_rd(bus_req_t r, reg_addr_e a);
    return r.sel && r.rd && (r.addr == a);
  endfunction

  function automatic logic hit_wr(bus_req_t r, reg_addr_e a);
    return r.sel && r.wr && (r.addr == a);
  endfunction

endpackage
