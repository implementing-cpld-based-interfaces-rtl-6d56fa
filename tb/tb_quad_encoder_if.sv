// tb_quad_encoder_if - an encoder model turns back and forth at varying
// speed; the position is read over the register interface (low byte, then
// the latched high byte) and compared with the model's x4 position. Also
// checks the two-clock latency from a channel edge to the count, that a
// simultaneous change of both channels is ignored, and the clear.
module tb_quad_encoder_if;
  import cpld_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1, cha = 1'b0, chb = 1'b0;
  initial #1 rst_n = 1'b0;  // falling edge starts the asynchronous reset
  bus_req_t req;
  logic [7:0] rdata;
  logic rd_oe;
  int checks = 0, failures = 0;
  int pos = 0;          // model position (counts)
  int phase = 0;        // 0..3 -> states 4,1,2,3 (A,B) = 00,10,11,01
  int n_up = 0, n_dn = 0, n_wrap = 0;

  quad_encoder_if dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (pos=%0d)", what, pos); end
  endtask

  function automatic logic [1:0] ab_of(int ph);
    case (ph)
      0: return 2'b00;
      1: return 2'b10;
      2: return 2'b11;
      default: return 2'b01;
    endcase
  endfunction

  // one quarter step of the codewheel; dir +1 = A leads B = count up
  task automatic move(int dir, int hold);
    phase = (phase + dir + 4) % 4;
    pos   = pos + dir;
    if (dir > 0) n_up++; else n_dn++;
    @(negedge clk);
    {cha, chb} = ab_of(phase);
    repeat (hold) @(negedge clk);
  endtask

  task automatic do_read(logic [3:0] a, output logic [7:0] d);
    @(negedge clk);
    req = '{sel: 1'b1, addr: a, rd: 1'b1, wr: 1'b0, wdata: 8'h00};
    repeat (2) @(negedge clk);
    d = rdata;
    check(rd_oe, "bus driven during read");
    req = '0;
  endtask

  task automatic read_count(output logic [15:0] v);
    logic [7:0] lo, hi;
    do_read(REG_ENC_LOW, lo);
    do_read(REG_ENC_HIGH, hi);
    v = {hi, lo};
  endtask

  initial begin
    logic [15:0] v;
    req = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    read_count(v);
    check(v == 0, "count after reset");

    // latency: hold a low-byte read open (rdata follows the live count),
    // apply an edge at a negedge; the count changes two posedges later
    @(negedge clk);
    req = '{sel: 1'b1, addr: REG_ENC_LOW, rd: 1'b1, wr: 1'b0, wdata: 8'h00};
    move(1, 0);
    @(posedge clk); #1;
    check(rdata == 8'(pos - 1), "count not yet changed after one clock");
    @(posedge clk); #1;
    check(rdata == 8'(pos), "count changed after two clocks");
    @(negedge clk);
    req = '0;
    repeat (2) @(negedge clk);

    // forward 40 counts at full rate (one state per clock), then back 100
    repeat (40) move(1, 0);
    repeat (3) @(negedge clk);
    read_count(v);
    check(v == 16'(pos), "after forward run");
    repeat (100) move(-1, 0);
    repeat (3) @(negedge clk);
    read_count(v);
    check(v == 16'(pos), "after reverse run through zero");
    if (pos < 0) n_wrap++;

    // random walk, reading while the encoder moves slowly
    for (int i = 0; i < 400; i++) begin
      automatic int d = ($urandom_range(0, 2) == 0) ? -1 : 1;
      move(d, $urandom_range(0, 6));
      if (i % 20 == 0) begin
        repeat (3) @(negedge clk);
        read_count(v);
        check(v == 16'(pos), "random walk");
      end
    end

    // both channels jump at once (two states skipped): no count
    begin
      automatic int start_pos = pos;
      phase = (phase + 2) % 4;
      @(negedge clk);
      {cha, chb} = ab_of(phase);
      repeat (4) @(negedge clk);
      read_count(v);
      check(v == 16'(start_pos), "double step ignored");
    end

    // clear by writing the low-byte register
    @(negedge clk);
    req = '{sel: 1'b1, addr: REG_ENC_LOW, rd: 1'b0, wr: 1'b1, wdata: 8'h00};
    @(negedge clk);
    req = '0;
    pos = 0;
    read_count(v);
    check(v == 0, "cleared");
    repeat (5) move(1, 1);
    repeat (3) @(negedge clk);
    read_count(v);
    check(v == 5, "counts after clear");

    check(n_up > 0 && n_dn > 0 && n_wrap > 0, "up, down and wrap all exercised");
    $display("up steps=%0d down steps=%0d", n_up, n_dn);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
