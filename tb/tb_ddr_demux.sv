// tb_ddr_demux: checks the double-data-rate input demultiplexer.
//
// A new random word is put on the pins shortly after every clock edge, so
// each 40 MHz period carries two words: one sampled by the falling edge
// (driven after the rising edge) and one sampled by the next rising edge.
// After rising edge n+1 the output must hold {word sampled at the falling
// edge of period n, word sampled at rising edge n}: the earlier half in the
// low bits.  The pin count is reduced to 5 to keep the test short.
module tb_ddr_demux;
  localparam int N = 5;
  logic clk = 1'b0;
  logic [N-1:0] din = '0;
  logic [2*N-1:0] dout;
  int checks = 0, failures = 0;

  ddr_demux #(.NPIN(N)) dut (.clk(clk), .din(din), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0] hi_word [300];   // driven after rising edge n (sampled by fall)
  logic [N-1:0] lo_word [300];   // driven after falling edge n (sampled by rise n+1)

  initial begin
    for (int n = 0; n < 300; n++) begin
      hi_word[n] = N'($urandom);
      lo_word[n] = N'($urandom);
    end
    @(posedge clk);                      // rising edge 0
    for (int n = 0; n < 300; n++) begin
      #1 din = hi_word[n];
      @(negedge clk);
      #1 din = lo_word[n];
      @(posedge clk);                    // rising edge n+1
      #1;
      if (n >= 1) begin
        checks++;
        if (dout !== {hi_word[n], lo_word[n-1]}) begin
          failures++;
          $display("FAIL n=%0d dout=%h exp=%h", n, dout, {hi_word[n], lo_word[n-1]});
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
