// tb_mpc_tx: checks the muon port card transmitter.
//
// Random LCT pairs are sent.  The frames are rebuilt in the test bench from
// the field layout (frame 0: vpf, quality, half-strip flag, pattern, ALCT
// key; frame 1: CSC id, bx0, ALCT bxn bit 0, gated sync error, bend, key
// half-strip = CFEB*32 + key).  While the clock is high after the send edge
// the 32 pins must carry both frame-0 words, while it is low both frame-1
// words, and in the next crossing nothing.  The accept pin carries a random
// two-bit answer (LCT0 half first); mpc_accept must show it and
// accept_latched must pulse mpc_delay+1 clocks after the send edge.
module tb_mpc_tx;
  import tmb_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic inj_send = 1'b0;
  logic [15:0] inj_f [4] = '{default: '0};
  logic send = 1'b0, first_vpf = 1'b0, second_vpf = 1'b0;
  alct_t alct0 = '0, alct1 = '0;
  clct_t clct0 = '0, clct1 = '0;
  logic [3:0] quality0 = '0, quality1 = '0, csc_id = 4'd5, mpc_delay = 4'd7;
  logic [1:0] sync_err_en = 2'b11;
  logic [31:0] mpc_tx_pins;
  logic mpc_accept_pin = 1'b0;
  mpc_frame0_t lct0_f0, lct1_f0;
  mpc_frame1_t lct0_f1, lct1_f1;
  logic [1:0] mpc_accept;
  logic accept_latched;
  int checks = 0, failures = 0;

  mpc_tx dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [1:0] acc_ans;   // [0] on the pin while clk is low, [1] while high
  always @(posedge clk) #2 mpc_accept_pin = acc_ans[1];
  always @(negedge clk) #2 mpc_accept_pin = acc_ans[0];

  function automatic logic [15:0] fr0(input logic v, input logic [3:0] q, input alct_t a,
                                      input clct_t c);
    return {v, q, c.hsds, c.pat, a.key};
  endfunction
  function automatic logic [15:0] fr1(input alct_t a, input clct_t c, input logic en);
    logic [7:0] k;
    k = 8'(int'(c.cfeb) * 32 + int'(c.key));
    return {csc_id, c.bx0_local, a.bxn[0], c.sync_err & en, c.bend, k};
  endfunction

  initial begin
    acc_ans = 2'b00;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int i = 0; i < 100; i++) begin
      logic [15:0] e0a, e0b, e1a, e1b;
      int wait_cycles;
      @(negedge clk);
      alct0 = alct_t'($urandom); alct1 = alct_t'($urandom);
      clct0 = clct_t'($urandom); clct1 = clct_t'($urandom);
      clct0.cfeb = 3'($urandom % 5); clct1.cfeb = 3'($urandom % 5);
      first_vpf = 1'($urandom); second_vpf = 1'($urandom);
      quality0 = 4'($urandom); quality1 = 4'($urandom);
      csc_id = 4'($urandom); sync_err_en = 2'($urandom);
      mpc_delay = 4'(2 + $urandom % 14);   // the answer needs two clocks through the receiver
      acc_ans = 2'($urandom);
      e0a = fr0(first_vpf, quality0, alct0, clct0);
      e0b = fr0(second_vpf, quality1, alct1, clct1);
      e1a = fr1(alct0, clct0, sync_err_en[0]);
      e1b = fr1(alct1, clct1, sync_err_en[1]);
      send = 1'b1;
      @(posedge clk); #1;
      send = 1'b0;
      checks++;
      if (mpc_tx_pins !== {e0b, e0a}) begin
        failures++; $display("FAIL frame0 %h exp %h", mpc_tx_pins, {e0b, e0a});
      end
      @(negedge clk); #1;
      checks++;
      if (mpc_tx_pins !== {e1b, e1a}) begin
        failures++; $display("FAIL frame1 %h exp %h", mpc_tx_pins, {e1b, e1a});
      end
      checks++;
      if ({lct1_f0, lct0_f0, lct1_f1, lct0_f1} !== {e0b, e0a, e1b, e1a}) begin
        failures++; $display("FAIL read-back frames");
      end
      @(posedge clk); #1;
      checks++;
      if (mpc_tx_pins !== '0) begin failures++; $display("FAIL pins not idle"); end
      // accept answer
      wait_cycles = 1;
      while (!accept_latched && wait_cycles < 40) begin
        @(posedge clk); #1;
        wait_cycles++;
      end
      checks++;
      if (!accept_latched || wait_cycles != int'(mpc_delay) + 1 || mpc_accept !== acc_ans) begin
        failures++;
        $display("FAIL accept after %0d (delay %0d) got %b exp %b", wait_cycles, mpc_delay,
                 mpc_accept, acc_ans);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
