// tb_encoder_speed - the encoder interface at its rated limits.
//
// A 512-slot codewheel decoded x4 gives 2048 counts per revolution. The
// model turns the wheel at 300,000 rpm, one state change every 97.66 ns,
// while the interface samples on an 11.0592 MHz clock (90.42 ns), so
// nearly every clock sees a state change. The position is read over the
// register interface after 1, 16 and 32 revolutions forward (the 16-bit
// count must read 2048, 32768 and 0, wrapped) and after one revolution back
// (-2048 = 0xF800).
module tb_encoder_speed;
  import cpld_pkg::*;
  localparam int  COUNTS_PER_REV = 4 * 512;
  localparam real T_STATE_NS     = 1.0e9 / (300000.0 / 60.0 * COUNTS_PER_REV);

  logic clk = 1'b0, rst_n = 1'b1, cha = 1'b0, chb = 1'b0;
  initial #1 rst_n = 1'b0;  // falling edge starts the asynchronous reset
  bus_req_t req = '0;
  logic [7:0] rdata;
  logic rd_oe;
  int checks = 0, failures = 0;
  int phase = 0;
  longint moves = 0;

  quad_encoder_if dut (.*);

  always #45.2 clk = ~clk;

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [1:0] ab_of(int ph);
    case (ph)
      0: return 2'b00;
      1: return 2'b10;
      2: return 2'b11;
      default: return 2'b01;
    endcase
  endfunction

  task automatic turn(int revs, int dir);
    for (int i = 0; i < revs * COUNTS_PER_REV; i++) begin
      #(T_STATE_NS);
      phase = (phase + dir + 4) % 4;
      {cha, chb} = ab_of(phase);
      moves++;
    end
    repeat (4) @(negedge clk);
  endtask

  task automatic do_read(logic [3:0] a, output logic [7:0] d);
    @(negedge clk);
    req = '{sel: 1'b1, addr: a, rd: 1'b1, wr: 1'b0, wdata: 8'h00};
    repeat (2) @(negedge clk);
    d = rdata;
    req = '0;
  endtask

  task automatic expect_count(logic [15:0] exp, string what);
    logic [7:0] lo, hi;
    do_read(REG_ENC_LOW, lo);
    do_read(REG_ENC_HIGH, hi);
    check({hi, lo} == exp, $sformatf("%s: read %h expected %h", what, {hi, lo}, exp));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    $display("state period %0.2f ns, clock period 90.40 ns", T_STATE_NS);
    turn(1, 1);
    expect_count(16'd2048, "1 revolution");
    turn(15, 1);
    expect_count(16'd32768, "16 revolutions");
    turn(16, 1);
    expect_count(16'd0, "32 revolutions (wrap)");
    turn(1, -1);
    expect_count(16'hF800, "1 revolution back");
    check(moves == 33 * COUNTS_PER_REV, "all state changes applied");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
