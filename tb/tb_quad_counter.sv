// tb_quad_counter - random up/down/clear traffic against an integer model,
// including wrap-around below 0 and above 65535.
module tb_quad_counter;
  logic clk = 1'b0, rst_n = 1'b1, clr = 1'b0, up_cnt = 1'b0, dwn_cnt = 1'b0;
  initial #1 rst_n = 1'b0;  // falling edge starts the asynchronous reset
  logic [15:0] count;
  int checks = 0, failures = 0;
  int model = 0;
  int wraps_up = 0, wraps_dn = 0;

  quad_counter dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(logic c, logic u, logic d);
    @(negedge clk);
    clr = c; up_cnt = u; dwn_cnt = d;
    @(posedge clk);
    if (c) model = 0;
    else if (u) begin if (model == 65535) wraps_up++; model = (model + 1) % 65536; end
    else if (d) begin if (model == 0) wraps_dn++; model = (model + 65535) % 65536; end
    #1;
    checks++;
    if (count !== 16'(model)) begin
      failures++;
      $display("count=%0d expected %0d", count, model);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // down from zero wraps to 65535
    step(0, 0, 1);
    step(0, 0, 1);
    // back up through the wrap
    repeat (3) step(0, 1, 0);
    // random traffic; up and down in the same cycle must count up
    for (int i = 0; i < 3000; i++) begin
      automatic int r = $urandom_range(0, 99);
      step(r < 2, r >= 2 && r < 50, r >= 40 && r < 90);
    end
    // long run up across 65535
    step(1, 0, 0);
    for (int i = 0; i < 65540; i++) begin
      @(negedge clk); up_cnt = 1; dwn_cnt = 0; clr = 0;
      @(posedge clk); if (model == 65535) wraps_up++; model = (model + 1) % 65536;
    end
    #1;
    checks++;
    if (count !== 16'(model)) failures++;
    checks++;
    if (wraps_up == 0 || wraps_dn == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
