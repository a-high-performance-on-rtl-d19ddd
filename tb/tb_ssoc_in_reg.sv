// tb_ssoc_in_reg: loads random words into input registers of 8-bit words
// with a 4-bit segment (default) and 16-bit words with a 10-bit segment,
// and checks the kept segment against the word shifted right by n - m;
// with the load low the register must hold.
module tb_ssoc_in_reg;
  logic clk = 0, ld = 0;
  logic [7:0]  din8;
  logic [15:0] din16;
  logic [3:0]  seg8;
  logic [9:0]  seg16;
  logic [3:0]  exp8;
  logic [9:0]  exp16;
  int checks = 0, failures = 0;

  ssoc_in_reg dut8 (.clk(clk), .ld(ld), .din(din8), .seg(seg8));
  ssoc_in_reg #(.DATA_W(16), .SEG_W(10)) dut16 (.clk(clk), .ld(ld), .din(din16), .seg(seg16));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      din8  = 8'($urandom);
      din16 = 16'($urandom);
      ld = (i == 0) ? 1'b1 : 1'($urandom_range(0, 1));
      if (ld) begin
        exp8  = 4'(din8 >> 4);
        exp16 = 10'(din16 >> 6);
      end
      @(posedge clk);
      #1;
      checks += 2;
      if (seg8 != exp8) begin failures++; $display("FAIL: 8/4 cycle %0d", i); end
      if (seg16 != exp16) begin failures++; $display("FAIL: 16/10 cycle %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
