// tb_mcu_bus_if - drives 8051-style external bus cycles (ALE with the low
// address on the AD bus, then a RD or WR strobe with the data) and checks
// the decoded request: page select only for 0x7FF0-0x7FFF and only after
// ALE falls, latched low address nibble, strobes and write data.
module tb_mcu_bus_if;
  import cpld_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // falling edge starts the asynchronous reset
  logic [7:0] ad_in, a_hi;
  logic ale, rd_n, wr_n;
  bus_req_t req;
  int checks = 0, failures = 0;
  int n_in_page = 0, n_out_page = 0;

  mcu_bus_if dut (.*);

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

  task automatic cycle(logic [15:0] addr, logic is_wr, logic [7:0] d);
    automatic logic in_page = (addr[15:4] == 12'h7FF);
    if (in_page) n_in_page++; else n_out_page++;
    @(negedge clk);
    ale = 1'b1; ad_in = addr[7:0]; a_hi = addr[15:8];
    @(negedge clk);
    check(!req.sel, "no select while ALE is high");
    @(negedge clk);
    ale = 1'b0; ad_in = is_wr ? d : 8'h00;
    @(negedge clk);
    if (is_wr) wr_n = 1'b0; else rd_n = 1'b0;
    #1;
    check(req.sel == in_page, $sformatf("select for %h", addr));
    check(req.addr == addr[3:0], $sformatf("address nibble for %h", addr));
    check(req.rd == !is_wr && req.wr == is_wr, "strobes");
    if (is_wr) check(req.wdata == d, "write data");
    repeat (2) @(negedge clk);
    wr_n = 1'b1; rd_n = 1'b1;
    #1 check(!req.rd && !req.wr, "strobes released");
  endtask

  initial begin
    ale = 0; rd_n = 1; wr_n = 1; ad_in = 0; a_hi = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int a = 32'h7FF0; a <= 32'h7FFF; a++) begin
      cycle(16'(a), 1'b1, 8'(a * 7));
      cycle(16'(a), 1'b0, 8'h00);
    end
    cycle(16'h7FEF, 1'b1, 8'h11);
    cycle(16'h8000, 1'b0, 8'h00);
    cycle(16'hFFF6, 1'b1, 8'h22);
    cycle(16'h3FF7, 1'b1, 8'h33);
    cycle(16'h7EF6, 1'b0, 8'h00);
    for (int i = 0; i < 200; i++) begin
      automatic logic [15:0] a = ($urandom_range(0, 1) == 1) ? {12'h7FF, 4'($urandom)} : 16'($urandom);
      cycle(a, 1'($urandom_range(0, 1)), 8'($urandom));
    end
    check(n_in_page > 0 && n_out_page > 0, "both decode outcomes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
