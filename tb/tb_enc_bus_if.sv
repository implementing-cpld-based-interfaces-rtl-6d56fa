// tb_enc_bus_if - byte-wise reads of a changing 16-bit count. Checks that
// the low-byte read returns the live low byte, that the high-byte read
// returns the upper byte captured at the low-byte read even if the count
// carried in between, that other addresses and the other page leave the
// bus alone, and that a write to the low-byte address clears the count.
module tb_enc_bus_if;
  import cpld_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // falling edge starts the asynchronous reset
  bus_req_t req;
  logic [15:0] count;
  logic clr, rd_oe;
  logic [7:0] rdata;
  int checks = 0, failures = 0;
  int carries_protected = 0;

  enc_bus_if dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic idle();
    @(negedge clk);
    req = '0;
  endtask

  // a read strobe lasting three clocks; data sampled at its end
  task automatic do_read(logic [3:0] a, logic page, output logic [7:0] d, output logic oe);
    @(negedge clk);
    req = '{sel: page, addr: a, rd: 1'b1, wr: 1'b0, wdata: 8'h00};
    repeat (3) @(negedge clk);
    d = rdata; oe = rd_oe;
    req = '0;
  endtask

  initial begin
    logic [7:0] d;
    logic oe;
    req = '0;
    count = 16'h12FF;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    idle();
    check(!rd_oe && !clr, "idle bus driven");

    // LSB read, then the counter carries into the upper byte before MSB read
    do_read(REG_ENC_LOW, 1'b1, d, oe);
    check(oe && d == 8'hFF, "low byte");
    count = 16'h1300;
    idle();
    do_read(REG_ENC_HIGH, 1'b1, d, oe);
    check(oe && d == 8'h12, "latched high byte after carry");
    if (oe && d == 8'h12) carries_protected++;
    // the latch stays until the next LSB read
    count = 16'hA5C3;
    do_read(REG_ENC_HIGH, 1'b1, d, oe);
    check(d == 8'h12, "latch holds without LSB read");
    do_read(REG_ENC_LOW, 1'b1, d, oe);
    check(d == 8'hC3, "low byte 2");
    do_read(REG_ENC_HIGH, 1'b1, d, oe);
    check(d == 8'hA5, "high byte 2");

    // other addresses / other page: no drive, no latch update
    count = 16'h7788;
    do_read(REG_ENC_LOW, 1'b0, d, oe);
    check(!oe, "other page not driven");
    do_read(REG_TOTALTIME, 1'b1, d, oe);
    check(!oe, "other register not driven");
    do_read(REG_ENC_HIGH, 1'b1, d, oe);
    check(d == 8'hA5, "latch untouched by other accesses");

    // random pairs
    for (int i = 0; i < 50; i++) begin
      automatic logic [15:0] v = 16'($urandom);
      count = v;
      do_read(REG_ENC_LOW, 1'b1, d, oe);
      check(d == v[7:0], "random low");
      count = 16'($urandom);
      do_read(REG_ENC_HIGH, 1'b1, d, oe);
      check(d == v[15:8], "random high (latched)");
    end

    // write to the low-byte address clears the counter; other writes do not
    @(negedge clk);
    req = '{sel: 1'b1, addr: REG_ENC_HIGH, rd: 1'b0, wr: 1'b1, wdata: 8'h00};
    #1 check(!clr, "write to high byte does not clear");
    @(negedge clk);
    req = '{sel: 1'b1, addr: REG_ENC_LOW, rd: 1'b0, wr: 1'b1, wdata: 8'h5A};
    #1 check(clr && !rd_oe, "write to low byte clears");
    idle();
    #1 check(!clr, "clear ends with strobe");

    check(carries_protected > 0, "carry protection exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
