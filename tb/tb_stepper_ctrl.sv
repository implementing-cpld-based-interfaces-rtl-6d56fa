// tb_stepper_ctrl - checks the half-step drive table (transistors 1..4 per
// step) in both directions, direction changes at random points, and the
// reset state (step 2, transistor 1 alone).
module tb_stepper_ctrl;
  logic step_clk = 1'b0, rst_n = 1'b1, dir = 1'b0;
  initial #1 rst_n = 1'b0;  // falling edge starts the asynchronous reset
  logic [3:0] dig_out;
  int checks = 0, failures = 0;
  int n_fwd = 0, n_rev = 0, n_turn = 0;
  int step;   // 0..7 = steps 1..8

  // Transistors on per step, written as {T4,T3,T2,T1}.
  localparam logic [3:0] DRIVE [8] = '{4'b0101, 4'b0001, 4'b1001, 4'b1000,
                                       4'b1010, 4'b0010, 4'b0110, 4'b0100};

  stepper_ctrl dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_step(string what);
    checks++;
    if (dig_out !== DRIVE[step]) begin
      failures++;
      $display("FAIL %s: step %0d dig_out=%b expected %b", what, step + 1, dig_out, DRIVE[step]);
    end
  endtask

  task automatic pulse();
    #20 step_clk = 1'b1;
    #20 step_clk = 1'b0;
    if (dir) begin step = (step + 7) % 8; n_rev++; end
    else     begin step = (step + 1) % 8; n_fwd++; end
  endtask

  initial begin
    #10;
    step = 1;
    check_step("reset");
    rst_n = 1'b1;
    #10 check_step("after reset release");
    // two full forward cycles
    for (int i = 0; i < 16; i++) begin pulse(); check_step("forward"); end
    // two full reverse cycles
    dir = 1'b1;
    n_turn++;
    for (int i = 0; i < 16; i++) begin pulse(); check_step("reverse"); end
    // random direction changes
    for (int i = 0; i < 200; i++) begin
      automatic logic nd = 1'($urandom_range(0, 1));
      if (nd != dir) n_turn++;
      dir = nd;
      pulse();
      check_step("random");
    end
    // one motor revolution of a 200-step motor is 400 half steps
    dir = 1'b0;
    for (int i = 0; i < 400; i++) pulse();
    check_step("400 half steps");
    checks++;
    if (n_fwd == 0 || n_rev == 0 || n_turn < 2) failures++;
    $display("forward=%0d reverse=%0d turns=%0d", n_fwd, n_rev, n_turn);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
