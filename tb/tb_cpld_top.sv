// tb_cpld_top - end-to-end test of the CPLD at its default configuration.
//
// A bus-functional 80C52 issues MOVX-style cycles (ALE with the low address
// on AD7..0 and the high byte on A15..8, then a RD or WR strobe) to the
// 0x7FF0-0x7FFF register page while models of an optical encoder, the
// stepper's timer clock and the digital I/O act on the pins. Checked:
//   - encoder position read as low byte then latched high byte, in both
//     directions, including a carry between the two reads;
//   - counter clear by writing the low-byte register;
//   - stepper half-step patterns forward and reverse;
//   - PWM period and off time after programming 0x7FF6/0x7FF7;
//   - digital output write/readback, digital input read, free chip select;
//   - bus accesses outside the page are ignored and never drive the bus.
// Every mechanism is counted and a failure is counted for one that never
// happened.
module tb_cpld_top;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // falling edge starts the asynchronous reset
  logic [7:0] ad_in = '0, a_hi = '0;
  logic ale = 1'b0, rd_n = 1'b1, wr_n = 1'b1;
  logic [7:0] data_out;
  logic data_oe;
  logic cha = 1'b0, chb = 1'b0;
  logic step_clk = 1'b0, step_dir = 1'b0;
  logic [3:0] step_out;
  logic pwm_out;
  logic [7:0] dig_in = '0, dig_out;
  logic cs_n;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_up = 0, n_dn = 0, n_carry = 0, n_clear = 0, n_fwd = 0, n_rev = 0;
  int n_pwm = 0, n_gpio_wr = 0, n_gpio_rd = 0, n_cs = 0, n_foreign = 0;
  int cs_seen = 0;

  int pos = 0, phase = 0, step = 1;

  localparam logic [3:0] DRIVE [8] = '{4'b0101, 4'b0001, 4'b1001, 4'b1000,
                                       4'b1010, 4'b0010, 4'b0110, 4'b0100};

  cpld_top dut (.*);

  // 11.0592 MHz: 90.4 ns period
  always #45.2 clk = ~clk;

  always @(negedge cs_n) cs_seen++;

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  // ---- bus-functional 8051 ----
  task automatic addr_phase(logic [15:0] a);
    @(negedge clk);
    ale = 1'b1; ad_in = a[7:0]; a_hi = a[15:8];
    repeat (2) @(negedge clk);
    ale = 1'b0;
  endtask

  task automatic bus_write(logic [15:0] a, logic [7:0] d);
    addr_phase(a);
    ad_in = d;
    @(negedge clk);
    wr_n = 1'b0;
    repeat (3) @(negedge clk);
    check(!data_oe, "no drive during write");
    wr_n = 1'b1;
    @(negedge clk);
  endtask

  task automatic bus_read(logic [15:0] a, output logic [7:0] d, output logic oe);
    addr_phase(a);
    ad_in = 8'h00;
    @(negedge clk);
    rd_n = 1'b0;
    repeat (3) @(negedge clk);
    d = data_out; oe = data_oe;
    rd_n = 1'b1;
    @(negedge clk);
  endtask

  task automatic read_count(output logic [15:0] v);
    logic [7:0] lo, hi;
    logic oe1, oe2;
    bus_read(16'h7FF4, lo, oe1);
    bus_read(16'h7FF5, hi, oe2);
    check(oe1 && oe2, "encoder registers drive the bus");
    v = {hi, lo};
  endtask

  // ---- encoder model ----
  function automatic logic [1:0] ab_of(int ph);
    case (ph)
      0: return 2'b00;
      1: return 2'b10;
      2: return 2'b11;
      default: return 2'b01;
    endcase
  endfunction

  task automatic move(int dir);
    phase = (phase + dir + 4) % 4;
    pos += dir;
    if (dir > 0) n_up++; else n_dn++;
    @(negedge clk);
    {cha, chb} = ab_of(phase);
    @(negedge clk);
  endtask

  // ---- stepper timer clock ----
  task automatic step_pulse();
    #300 step_clk = 1'b1;
    #300 step_clk = 1'b0;
    if (step_dir) begin step = (step + 7) % 8; n_rev++; end
    else          begin step = (step + 1) % 8; n_fwd++; end
    check(step_out == DRIVE[step], $sformatf("stepper step %0d: %b expected %b", step + 1, step_out, DRIVE[step]));
  endtask

  // ---- PWM measurement ----
  task automatic pwm_measure(int total, int low);
    int hi, lo;
    repeat (2 * total + 260) @(posedge clk);
    @(posedge pwm_out);
    for (int r = 0; r < 2; r++) begin
      hi = 0; lo = 0;
      while (pwm_out) begin @(posedge clk); #1 hi++; end
      while (!pwm_out) begin @(posedge clk); #1 lo++; end
      check(lo == low, $sformatf("pwm off time %0d expected %0d", lo, low));
      check(hi + lo == total, $sformatf("pwm period %0d expected %0d", hi + lo, total));
      n_pwm++;
    end
  endtask

  initial begin
    logic [15:0] v;
    logic [7:0] d;
    logic oe;

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    check(step_out == DRIVE[1], $sformatf("stepper reset pattern %b", step_out));

    // -------- encoder --------
    read_count(v);
    check(v == 0, "encoder count after reset");
    repeat (300) move(1);
    read_count(v);
    check(v == 16'(pos), "encoder after 300 up");
    repeat (500) move(-1);
    read_count(v);
    check(v == 16'(pos), "encoder after 500 down (negative)");
    // bring the count to 0x00FF, read low, carry, read high
    bus_write(16'h7FF4, 8'h00);
    n_clear++;
    pos = 0;
    read_count(v);
    check(v == 0, "encoder cleared");
    repeat (255) move(1);
    bus_read(16'h7FF4, d, oe);
    check(d == 8'hFF, "low byte before carry");
    move(1);
    move(1);
    begin
      logic [7:0] hi;
      bus_read(16'h7FF5, hi, oe);
      check(hi == 8'h00, "high byte latched at low-byte read");
      if (hi == 8'h00 && d == 8'hFF) n_carry++;
    end
    read_count(v);
    check(v == 16'h0101, "fresh read after carry");
    // a write outside the page must not clear
    bus_write(16'h3FF4, 8'h00);
    n_foreign++;
    read_count(v);
    check(v == 16'h0101, "foreign write ignored");
    bus_read(16'h7EF4, d, oe);
    check(!oe, "foreign read not driven");

    // -------- stepper --------
    for (int i = 0; i < 12; i++) step_pulse();
    step_dir = 1'b1;
    for (int i = 0; i < 12; i++) step_pulse();
    step_dir = 1'b0;
    step_pulse();

    // -------- PWM --------
    bus_write(16'h7FF6, 8'd200);
    bus_write(16'h7FF7, 8'd50);
    pwm_measure(200, 50);
    bus_write(16'h7FF7, 8'd150);
    pwm_measure(200, 150);

    // -------- digital I/O --------
    for (int i = 0; i < 8; i++) begin
      automatic logic [7:0] w = 8'($urandom), x = 8'($urandom);
      bus_write(16'h7FF1, w);
      n_gpio_wr++;
      check(dig_out == w, "dig_out pins");
      bus_read(16'h7FF1, d, oe);
      check(oe && d == w, "dig_out readback");
      dig_in = x;
      bus_read(16'h7FF0, d, oe);
      check(oe && d == x, "dig_in read");
      n_gpio_rd++;
    end
    begin
      automatic int before_cs = cs_seen;
      bus_write(16'h7FF2, 8'h00);
      bus_read(16'h7FF2, d, oe);
      check(!oe, "cs address not driven");
      check(cs_seen == before_cs + 2, "chip select pulses");
      n_cs = cs_seen - before_cs;
    end

    // -------- mechanisms seen --------
    check(n_up > 0,      "encoder counted up");
    check(n_dn > 0,      "encoder counted down");
    check(n_carry > 0,   "high-byte latch protected a carry");
    check(n_clear > 0,   "counter cleared");
    check(n_fwd > 0,     "stepper forward");
    check(n_rev > 0,     "stepper reverse");
    check(n_pwm > 0,     "pwm periods measured");
    check(n_gpio_wr > 0 && n_gpio_rd > 0, "digital I/O");
    check(n_cs > 0,      "free chip select");
    check(n_foreign > 0, "foreign access");
    $display("up=%0d down=%0d carry=%0d clear=%0d fwd=%0d rev=%0d pwm=%0d gpio_wr=%0d gpio_rd=%0d cs=%0d",
             n_up, n_dn, n_carry, n_clear, n_fwd, n_rev, n_pwm, n_gpio_wr, n_gpio_rd, n_cs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
