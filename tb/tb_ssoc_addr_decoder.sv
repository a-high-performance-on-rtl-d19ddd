// tb_ssoc_addr_decoder: latches random addresses, with EN randomly low,
// and checks that exactly the word line of the last latched address is
// high (compared with a one-bit shift of the expected address).
module tb_ssoc_addr_decoder;
  localparam int unsigned ADDR_W = 10;
  logic clk = 0, en = 0;
  logic [ADDR_W-1:0] addr;
  logic [2**ADDR_W-1:0] wl, exp_wl;
  logic [ADDR_W-1:0] last;
  int checks = 0, failures = 0;

  ssoc_addr_decoder #(.ADDR_W(ADDR_W)) dut (.clk(clk), .en(en), .addr(addr), .wl(wl));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1; addr = '0; last = '0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      // the first cycles sweep the lowest and highest addresses
      if (i < 4) addr = (i < 2) ? ADDR_W'(i) : ~ADDR_W'(i - 2);
      else addr = ADDR_W'($urandom);
      en = (i < 4) ? 1'b1 : 1'($urandom_range(0, 3) != 0);
      if (en) last = addr;
      exp_wl = '0;
      exp_wl[last] = 1'b1;
      @(posedge clk);
      #1;
      checks++;
      if (wl !== exp_wl) begin
        failures++;
        $display("FAIL: cycle %0d expected line %0d", i, last);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
