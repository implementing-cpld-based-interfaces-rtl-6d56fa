// tb_pwm_ctrl - programs period and off time over the register interface
// and measures the output: per period exactly lowtime clocks low and
// totaltime - lowtime high, with the period equal to totaltime clocks.
// Covers the corner settings lowtime = 0 (always high), lowtime >=
// totaltime (always low) and totaltime = 0 (period 256).
module tb_pwm_ctrl;
  import cpld_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // falling edge starts the asynchronous reset
  bus_req_t req;
  logic pwm_out;
  int checks = 0, failures = 0;

  pwm_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(logic [3:0] a, logic [7:0] d);
    @(negedge clk);
    req = '{sel: 1'b1, addr: a, rd: 1'b0, wr: 1'b1, wdata: 8'h00};
    @(negedge clk);
    req.wdata = d;           // data settles during the strobe
    repeat (2) @(negedge clk);
    req = '0;
  endtask

  // wait for a rising edge of pwm_out, then measure high and low run lengths
  task automatic measure(int total, int low);
    int period, hi, lo;
    // let two periods pass so the new settings are in force
    repeat (2 * ((total == 0) ? 256 : total) + 260) @(posedge clk);
    if (low == 0 || low >= ((total == 0) ? 256 : total)) begin
      int ones = 0;
      for (int i = 0; i < 600; i++) begin @(posedge clk); #1 ones += int'(pwm_out); end
      check(ones == ((low == 0) ? 600 : 0), $sformatf("constant output T=%0d L=%0d ones=%0d", total, low, ones));
      return;
    end
    @(posedge pwm_out);
    for (int rep = 0; rep < 3; rep++) begin
      hi = 0; lo = 0;
      while (pwm_out) begin @(posedge clk); #1 hi++; end
      while (!pwm_out) begin @(posedge clk); #1 lo++; end
      period = hi + lo;
      check(lo == low, $sformatf("low time %0d expected %0d (T=%0d)", lo, low, total));
      check(period == ((total == 0) ? 256 : total),
            $sformatf("period %0d expected %0d (L=%0d)", period, total, low));
    end
  endtask

  initial begin
    req = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // a write to an unrelated register or page must not change anything
    wr(REG_TOTALTIME, 8'd10);
    wr(REG_LOWTIME, 8'd3);
    measure(10, 3);
    @(negedge clk);
    req = '{sel: 1'b0, addr: REG_LOWTIME, rd: 1'b0, wr: 1'b1, wdata: 8'd7};
    @(negedge clk);
    req = '{sel: 1'b1, addr: REG_ENC_LOW, rd: 1'b0, wr: 1'b1, wdata: 8'd7};
    @(negedge clk);
    req = '0;
    measure(10, 3);
    wr(REG_TOTALTIME, 8'd100);
    wr(REG_LOWTIME, 8'd75);
    measure(100, 75);
    wr(REG_LOWTIME, 8'd1);
    measure(100, 1);
    wr(REG_LOWTIME, 8'd99);
    measure(100, 99);
    wr(REG_LOWTIME, 8'd0);
    measure(100, 0);
    wr(REG_LOWTIME, 8'd100);
    measure(100, 100);
    wr(REG_TOTALTIME, 8'd0);
    wr(REG_LOWTIME, 8'd64);
    measure(0, 64);
    wr(REG_TOTALTIME, 8'd255);
    wr(REG_LOWTIME, 8'd200);
    measure(255, 200);
    for (int i = 0; i < 10; i++) begin
      automatic int t = $urandom_range(2, 255);
      automatic int l = $urandom_range(1, t - 1);
      wr(REG_TOTALTIME, 8'(t));
      wr(REG_LOWTIME, 8'(l));
      measure(t, l);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
