// tb_quad_edge_detect - random channel levels; checks that enc_dec holds
// the present and previous sample of each channel, and that an edge on the
// inputs shows as a one-clock edge pattern.
module tb_quad_edge_detect;
  logic clk = 1'b0, rst_n = 1'b1, cha = 1'b0, chb = 1'b0;
  initial #1 rst_n = 1'b0;  // falling edge starts the asynchronous reset
  logic [3:0] enc_dec;
  int checks = 0, failures = 0;
  logic a1, a2, b1, b2;   // reference samples

  quad_edge_detect dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a1 = 0; a2 = 0; b1 = 0; b2 = 0;
    repeat (2) @(negedge clk);
    checks++;
    if (enc_dec !== 4'b0000) begin failures++; $display("reset value %b", enc_dec); end
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      cha = 1'($urandom_range(0, 1));
      chb = 1'($urandom_range(0, 1));
      @(posedge clk);
      a2 = a1; a1 = cha; b2 = b1; b1 = chb;
      #1;
      checks++;
      if (enc_dec !== {b2, b1, a2, a1}) begin
        failures++;
        $display("cycle %0d: enc_dec=%b expected %b", i, enc_dec, {b2, b1, a2, a1});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
