// tb_vme_regs: checks the VME slave and the register file.
//
// Reads the four ID words and compares them with the firmware constants;
// the revcode for 8 June 2004 on an FPGA of type 3000 must read 38C8.
// Reads the power-up values of a set of configuration registers (for
// instance 70 = 5245, 86 = 00FB, B2 = 0031, B4 = 0DEC, hot channel masks
// FFFF).  Then writes random data to random registers and checks that only
// the writable bits change, that the other bits read the status inputs,
// that wr_pulse marks the word, and that the last-address registers follow.
// Accesses with a wrong address modifier, an odd address, another board's
// address or a global read get no acknowledge; a global write is taken.
// The access takes one clock (dtack the clock after the strobe).
module tb_vme_regs;
  import tmb_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic vme_strobe = 1'b0, vme_write = 1'b0, vme_lword = 1'b0;
  logic [23:0] vme_adr = '0;
  logic [5:0]  vme_am = 6'h39;
  logic [15:0] vme_wdata = '0, vme_rdata;
  logic vme_dtack;
  logic [4:0] ga = 5'd21, sw_adr = 5'd9;
  logic geo_sel = 1'b1;
  logic [15:0] cfg [NREG];
  logic [15:0] stat [NREG];
  logic [NREG-1:0] wr_pulse;
  int checks = 0, failures = 0;

  vme_regs dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // One bus cycle; returns dtack and read data.
  task automatic access(input bit wr, input logic [4:0] board, input logic [7:0] radr,
                        input logic [5:0] am, input logic [15:0] wd,
                        output bit ack, output logic [15:0] rd, output logic [NREG-1:0] wp);
    @(negedge clk);
    vme_strobe = 1'b1; vme_write = wr; vme_adr = {board, 11'b0, radr};
    vme_am = am; vme_wdata = wd; vme_lword = 1'b1;
    @(negedge clk);
    vme_strobe = 1'b0;
    ack = vme_dtack; rd = vme_rdata; wp = wr_pulse;
  endtask

  // writable bits and power-up values, typed in from the register table
  function automatic logic [15:0] mask_of(input logic [7:0] a);
    case (a)
      8'h42: return 16'hFFFF;  8'h68: return 16'h03FF;  8'h6E: return 16'h1FFF;
      8'h70: return 16'hFFFF;  8'h86: return 16'h01FF;  8'hAC: return 16'h1FFF;
      8'hB2: return 16'h00FF;  8'hB4: return 16'h0FFF;  8'h4A: return 16'hFFFF;
      default: return 16'h0000;   // 78, 7A, 88, AE: read-only
    endcase
  endfunction

  logic [7:0] test_adr [13] = '{8'h42, 8'h68, 8'h6E, 8'h70, 8'h86, 8'hAC, 8'hB2, 8'hB4,
                                8'h4A, 8'h78, 8'h7A, 8'h88, 8'hAE};
  logic [15:0] model [13];

  initial begin
    bit ack;
    logic [15:0] rd;
    logic [NREG-1:0] wp;
    for (int i = 0; i < NREG; i++) stat[i] = 16'($urandom);
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    access(0, 5'd21, 8'h00, 6'h39, 0, ack, rd, wp);
    chk(ack && rd == {3'b000, 5'd21, 4'hD, 4'hC}, "ID 00");
    access(0, 5'd21, 8'h02, 6'h39, 0, ack, rd, wp);
    chk(ack && rd == 16'h0608, "ID 02 month/day");
    access(0, 5'd21, 8'h04, 6'h3D, 0, ack, rd, wp);
    chk(ack && rd == 16'h2004, "ID 04 year");
    access(0, 5'd21, 8'h06, 6'h39, 0, ack, rd, wp);
    chk(ack && rd == 16'h38C8, $sformatf("revcode %h", rd));

    // power-up values
    access(0, 5'd21, 8'h70, 6'h39, 0, ack, rd, wp);  chk(ack && rd == 16'h5245, "70 default");
    access(0, 5'd21, 8'h86, 6'h39, 0, ack, rd, wp);
    chk(ack && (rd & 16'h01FF) == 16'h00FB, "86 default");
    access(0, 5'd21, 8'hB2, 6'h39, 0, ack, rd, wp);
    chk(ack && (rd & 16'h00FF) == 16'h0031, "B2 default");
    access(0, 5'd21, 8'hB4, 6'h39, 0, ack, rd, wp);
    chk(ack && (rd & 16'h0FFF) == 16'h0DEC, "B4 default 3564");
    access(0, 5'd21, 8'h4A, 6'h39, 0, ack, rd, wp);  chk(ack && rd == 16'hFFFF, "4A default");
    access(0, 5'd21, 8'h6E, 6'h39, 0, ack, rd, wp);
    chk(ack && (rd & 16'h1FFF) == 16'h00B5, "6E default");
    access(0, 5'd21, 8'hAC, 6'h39, 0, ack, rd, wp);
    chk(ack && (rd & 16'h1FFF) == 16'h01C1, "AC default");

    for (int j = 0; j < 13; j++) model[j] = '0;
    // random writes and read-backs
    for (int i = 0; i < 400; i++) begin
      int j;
      logic [15:0] d, m;
      j = $urandom % 13;
      d = 16'($urandom);
      m = mask_of(test_adr[j]);
      access(1, 5'd21, test_adr[j], 6'h39, d, ack, rd, wp);
      chk(ack && wp[test_adr[j] / 2] && $countones(wp) == 1, "write ack/pulse");
      model[j] = d & m;
      access(0, 5'd21, test_adr[j], 6'h39, 0, ack, rd, wp);
      chk(ack && rd == (model[j] | (stat[test_adr[j] / 2] & ~m)),
          $sformatf("read-back %h got %h", test_adr[j], rd));
      access(0, 5'd21, 8'h0A, 6'h39, 0, ack, rd, wp);
      chk(ack && rd == {8'h00, test_adr[j][7:1], 1'b1}, "last address");
    end
    // rejected accesses
    access(0, 5'd21, 8'h70, 6'h09, 0, ack, rd, wp);  chk(!ack, "wrong AM");
    access(0, 5'd21, 8'h71, 6'h39, 0, ack, rd, wp);  chk(!ack, "odd address");
    access(0, 5'd20, 8'h70, 6'h39, 0, ack, rd, wp);  chk(!ack, "other board");
    access(0, 5'd21, 8'hCE, 6'h39, 0, ack, rd, wp);  chk(!ack, "beyond CC");
    access(0, 5'd26, 8'h70, 6'h39, 0, ack, rd, wp);  chk(!ack, "global read");
    // global write
    access(1, 5'd26, 8'hB4, 6'h39, 16'h039C, ack, rd, wp);  chk(ack, "global write");
    access(0, 5'd21, 8'hB4, 6'h39, 0, ack, rd, wp);
    chk(ack && rd[11:0] == 12'h39C, "global write value");
    access(1, 5'd27, 8'hB4, 6'h39, 16'h0DEC, ack, rd, wp);  chk(ack, "crate-wide write");
    access(0, 5'd21, 8'hB4, 6'h39, 0, ack, rd, wp);
    chk(ack && rd[11:0] == 12'hDEC, "crate-wide write value");
    // switch address instead of slot
    geo_sel = 1'b0;
    access(0, 5'd9, 8'h02, 6'h39, 0, ack, rd, wp);   chk(ack && rd == 16'h0608, "switch adr");
    access(0, 5'd21, 8'h02, 6'h39, 0, ack, rd, wp);  chk(!ack, "slot adr off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
