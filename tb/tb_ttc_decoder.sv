// tb_ttc_decoder: checks the TTC broadcast command decoder.
//
// Random command bytes are sent with and without strobe, from the CCB port
// and, with vme_cmd_enable set, from the VME command generator.  One clock
// after each strobed command exactly the matching pulse must be high:
// 01 BX0, 03 L1 reset, 06 start trigger, 07 stop trigger, 24 MPC inject,
// 32 bunch-counter reset; any other code and any unstrobed cycle gives no
// pulse.  With vme_cmd_enable set the CCB port must be ignored.
module tb_ttc_decoder;
  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] ccb_cmd = '0, vme_cmd = '0;
  logic ccb_cmd_strobe = 1'b0, vme_cmd_enable = 1'b0, vme_cmd_strobe = 1'b0;
  logic bx0, l1_reset, start_trig, stop_trig, mpc_inject, bxreset;
  int checks = 0, failures = 0;

  ttc_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [5:0] expect_pulses(input logic [7:0] c, input logic s);
    logic [5:0] e;
    e = '0;
    if (s) begin
      e[5] = (c == 8'h01);
      e[4] = (c == 8'h03);
      e[3] = (c == 8'h06);
      e[2] = (c == 8'h07);
      e[1] = (c == 8'h24);
      e[0] = (c == 8'h32);
    end
    return e;
  endfunction

  logic [7:0] codes [8] = '{8'h01, 8'h03, 8'h06, 8'h07, 8'h24, 8'h32, 8'h05, 8'hFF};
  int seen [6];

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int i = 0; i < 2000; i++) begin
      logic [7:0] c_ccb, c_vme;
      logic s_ccb, s_vme, use_vme;
      logic [5:0] exp_p;
      c_ccb = ($urandom % 4 == 0) ? 8'($urandom) : codes[$urandom % 8];
      c_vme = codes[$urandom % 8];
      s_ccb = 1'($urandom);
      s_vme = 1'($urandom);
      use_vme = ($urandom % 3 == 0);
      @(negedge clk);
      ccb_cmd = c_ccb; ccb_cmd_strobe = s_ccb;
      vme_cmd = c_vme; vme_cmd_strobe = s_vme; vme_cmd_enable = use_vme;
      exp_p = use_vme ? expect_pulses(c_vme, s_vme) : expect_pulses(c_ccb, s_ccb);
      @(posedge clk); #1;
      checks++;
      if ({bx0, l1_reset, start_trig, stop_trig, mpc_inject, bxreset} !== exp_p) begin
        failures++;
        $display("FAIL cmd ccb=%h vme=%h en=%b got=%b exp=%b", c_ccb, c_vme, use_vme,
                 {bx0, l1_reset, start_trig, stop_trig, mpc_inject, bxreset}, exp_p);
      end
      for (int k = 0; k < 6; k++) if (exp_p[k]) seen[k]++;
    end
    for (int k = 0; k < 6; k++) begin
      checks++;
      if (seen[k] == 0) begin failures++; $display("FAIL command %0d never tested", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
