// tb_ssoc_out_reg: checks the m-bit to n-bit rebuild for every segment
// value at n/m = 8/4 (default), 8/7, 8/8 and 16/10. The expected word is
// computed as seg * 2^(n-m) + 2^(n-m-1) (just seg when m = n). Also checks
// reset and that the register holds while its load is low.
module tb_ssoc_out_reg;
  logic clk = 0, rst_n = 0, ld = 0;
  logic [9:0]  seg;
  logic [7:0]  d84, d87, d88;
  logic [15:0] d1610;
  logic [7:0]  e84, e87, e88;
  logic [15:0] e1610;
  int checks = 0, failures = 0;

  ssoc_out_reg u84 (.clk(clk), .rst_n(rst_n), .ld(ld), .seg(seg[3:0]), .dout(d84));
  ssoc_out_reg #(.DATA_W(8), .SEG_W(7)) u87 (.clk(clk), .rst_n(rst_n), .ld(ld), .seg(seg[6:0]), .dout(d87));
  ssoc_out_reg #(.DATA_W(8), .SEG_W(8)) u88 (.clk(clk), .rst_n(rst_n), .ld(ld), .seg(seg[7:0]), .dout(d88));
  ssoc_out_reg #(.DATA_W(16), .SEG_W(10)) u1610 (.clk(clk), .rst_n(rst_n), .ld(ld), .seg(seg), .dout(d1610));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seg = '1; ld = 1;
    repeat (2) @(posedge clk);
    #1 check(d84 == 0 && d87 == 0 && d88 == 0 && d1610 == 0, "reset value");
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 1024 + 200; i++) begin
      @(negedge clk);
      seg = (i < 1024) ? 10'(i) : 10'($urandom);
      ld  = (i < 1024) ? 1'b1 : 1'($urandom_range(0, 1));
      if (ld) begin
        e84   = 8'(int'(seg[3:0]) * 16 + 8);
        e87   = 8'(int'(seg[6:0]) * 2 + 1);
        e88   = seg[7:0];
        e1610 = 16'(int'(seg) * 64 + 32);
      end
      @(posedge clk);
      #1;
      check(d84 == e84, $sformatf("8/4 seg %0h got %0h", seg, d84));
      check(d87 == e87, $sformatf("8/7 seg %0h got %0h", seg, d87));
      check(d88 == e88, $sformatf("8/8 seg %0h got %0h", seg, d88));
      check(d1610 == e1610, $sformatf("16/10 seg %0h got %0h", seg, d1610));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
