// tb_ssoc_seg_array: fills all 1024 words of the default 1K x 4-bit array
// through one-hot word lines, then mixes random writes and reads, checking
// every read against a plain array model, including a read of a word in the
// cycle right after it was written.
module tb_ssoc_seg_array;
  localparam int unsigned ADDR_W = 10;
  localparam int unsigned SEG_W  = 4;
  localparam int unsigned WORDS  = 2**ADDR_W;
  logic clk = 0, we = 0;
  logic [WORDS-1:0] wl;
  logic [SEG_W-1:0] wdata, rdata;
  logic [SEG_W-1:0] model [WORDS];
  int checks = 0, failures = 0, a;

  ssoc_seg_array #(.ADDR_W(ADDR_W), .SEG_W(SEG_W)) dut (
    .clk(clk), .wl(wl), .we(we), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      wl = '0; wl[i] = 1'b1; we = 1; wdata = SEG_W'($urandom);
      model[i] = wdata;
    end
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      // odd steps read back the word written in the step before
      if (i % 2 == 0) a = $urandom_range(0, WORDS - 1);
      wl = '0; wl[a] = 1'b1;
      we = (i % 2 == 0) && ($urandom_range(0, 1) == 1);
      wdata = SEG_W'($urandom);
      #1;
      if (!we) begin
        checks++;
        if (rdata != model[a]) begin
          failures++;
          $display("FAIL: word %0d read %0h expected %0h", a, rdata, model[a]);
        end
      end else model[a] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
