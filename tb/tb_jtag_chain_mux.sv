// tb_jtag_chain_mux: exhaustive test of the JTAG chain selector.
//
// Every combination of source select, both 4-bit chain selects, the six
// JTAG bits and the five TDO inputs is not practical, so the bench loops
// over the source and the chain select of the active source exhaustively
// and draws the other inputs at random (20000 vectors).  The expected
// chain comes from the select table written out independently here:
// 0-3 ALCT, 4-7 mezzanine, 8-11 user PROMs, 12 monitor, 13 RAT, 14-15
// none.  Unselected chains must sit at TCK 0, TMS 1, TDI 0.
module tb_jtag_chain_mux;

  localparam int unsigned N = 5;
  logic boot_en, boot_tck, boot_tms, boot_tdi, usr_tck, usr_tms, usr_tdi, tdo;
  logic [3:0] boot_sel, usr_sel;
  logic [N-1:0] chain_tck, chain_tms, chain_tdi, chain_tdo;

  jtag_chain_mux #(.NCHAIN(N)) dut (.*);

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_chain(input logic [3:0] s);
    int tab [16] = '{0,0,0,0, 1,1,1,1, 2,2,2,2, 3,4,-1,-1};
    return tab[s];
  endfunction

  initial begin
    for (int v = 0; v < 20000; v++) begin
      int e;
      logic [3:0] s;
      logic k, m, d;
      {boot_tck, boot_tms, boot_tdi, usr_tck, usr_tms, usr_tdi} = 6'($urandom);
      boot_sel = 4'($urandom); usr_sel = 4'($urandom);
      chain_tdo = N'($urandom);
      boot_en = v[0];
      if (boot_en) boot_sel = 4'(v >> 1); else usr_sel = 4'(v >> 1);
      s = boot_en ? boot_sel : usr_sel;
      k = boot_en ? boot_tck : usr_tck;
      m = boot_en ? boot_tms : usr_tms;
      d = boot_en ? boot_tdi : usr_tdi;
      e = expect_chain(s);
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        checks++;
        if (i == e) begin
          if ({chain_tck[i], chain_tms[i], chain_tdi[i]} != {k, m, d}) failures++;
        end else begin
          if ({chain_tck[i], chain_tms[i], chain_tdi[i]} != 3'b010) failures++;
        end
      end
      checks++;
      if (tdo != ((e >= 0) ? chain_tdo[e] : 1'b0)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
