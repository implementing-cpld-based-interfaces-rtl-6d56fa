// tb_gpio_port - writes and reads back the digital output register, reads
// the synchronised digital inputs (two clocks of delay), and checks that the
// free chip select follows accesses to its address only.
module tb_gpio_port;
  import cpld_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // falling edge starts the asynchronous reset
  bus_req_t req;
  logic [7:0] dig_in, dig_out, rdata;
  logic cs_n, rd_oe;
  int checks = 0, failures = 0;
  int n_cs = 0;

  gpio_port dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(logic [3:0] a, logic [7:0] d, logic page = 1'b1);
    @(negedge clk);
    req = '{sel: page, addr: a, rd: 1'b0, wr: 1'b1, wdata: d};
    #1 if (a == REG_USER_CS && page) begin check(!cs_n, "cs on write"); n_cs++; end
       else check(cs_n, "no cs");
    repeat (2) @(negedge clk);
    req = '0;
  endtask

  task automatic rd(logic [3:0] a, output logic [7:0] d, output logic oe);
    @(negedge clk);
    req = '{sel: 1'b1, addr: a, rd: 1'b1, wr: 1'b0, wdata: 8'h00};
    #1 if (a == REG_USER_CS) begin check(!cs_n, "cs on read"); n_cs++; end
       else check(cs_n, "no cs on read");
    repeat (2) @(negedge clk);
    d = rdata; oe = rd_oe;
    req = '0;
  endtask

  initial begin
    logic [7:0] d;
    logic oe;
    req = '0;
    dig_in = 8'h00;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(dig_out == 8'h00 && cs_n, "reset state");
    for (int i = 0; i < 100; i++) begin
      automatic logic [7:0] v = 8'($urandom), w = 8'($urandom);
      wr(REG_DIG_OUT, v);
      check(dig_out == v, "dig_out written");
      wr(REG_DIG_OUT, ~v, 1'b0);          // other page: ignored
      wr(REG_DIG_IN, ~v);                 // input register: not writable
      check(dig_out == v, "dig_out unchanged by other writes");
      rd(REG_DIG_OUT, d, oe);
      check(oe && d == v, "dig_out read back");
      dig_in = w;
      @(negedge clk);
      @(negedge clk);
      rd(REG_DIG_IN, d, oe);
      check(oe && d == w, "dig_in read");
      rd(REG_USER_CS, d, oe);
      check(!oe, "cs address is not readable");
      wr(REG_USER_CS, v);
      check(dig_out == v, "cs write leaves dig_out");
    end
    // input delay: a change is not visible before two clocks
    @(negedge clk);
    dig_in = 8'h00;
    repeat (3) @(negedge clk);
    dig_in = 8'hA5;
    req = '{sel: 1'b1, addr: REG_DIG_IN, rd: 1'b1, wr: 1'b0, wdata: 8'h00};
    @(negedge clk);
    check(rdata == 8'h00, "one clock: not yet");
    @(negedge clk);
    check(rdata == 8'hA5, "two clocks: visible");
    req = '0;
    check(n_cs > 0, "chip select exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
