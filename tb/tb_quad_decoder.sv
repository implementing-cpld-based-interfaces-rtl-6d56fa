// tb_quad_decoder - all 16 input codes against a reference built from the
// four-state quadrature cycle 1=(A1,B0) 2=(1,1) 3=(0,1) 4=(0,0): one step
// forward in the cycle counts up, one step back counts down, anything else
// neither.
module tb_quad_decoder;
  logic [3:0] enc_dec;
  logic up_cnt, dwn_cnt;
  int checks = 0, failures = 0;
  int n_up = 0, n_dn = 0;

  quad_decoder dut (.*);

  function automatic int state_of(logic a, logic b);
    case ({a, b})
      2'b10:   return 1;
      2'b11:   return 2;
      2'b01:   return 3;
      default: return 4;
    endcase
  endfunction

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 16; c++) begin
      int past, present;
      logic exp_up, exp_dn;
      enc_dec = 4'(c);
      past    = state_of(enc_dec[1], enc_dec[3]);
      present = state_of(enc_dec[0], enc_dec[2]);
      exp_up  = (present == (past % 4) + 1);
      exp_dn  = (past == (present % 4) + 1);
      #1;
      checks++;
      if (up_cnt !== exp_up || dwn_cnt !== exp_dn) begin
        failures++;
        $display("code %b: up=%b dn=%b expected %b %b", enc_dec, up_cnt, dwn_cnt, exp_up, exp_dn);
      end
      n_up += int'(exp_up);
      n_dn += int'(exp_dn);
    end
    checks++;
    if (n_up != 4 || n_dn != 4) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
