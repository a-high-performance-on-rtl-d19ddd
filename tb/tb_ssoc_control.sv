// tb_ssoc_control: drives random EN and WE/RE and checks that each enabled
// edge produces exactly one strobe, the write or the read one, in the
// following cycle, and none after a disabled edge or during reset.
module tb_ssoc_control;
  logic clk = 0, rst_n = 0, en = 0, we = 0, arr_we, out_ld;
  int checks = 0, failures = 0;
  bit exp_we, exp_ld;

  ssoc_control dut (.clk(clk), .rst_n(rst_n), .en(en), .we(we), .arr_we(arr_we), .out_ld(out_ld));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1; we = 1;
    repeat (3) @(posedge clk);
    #1 check(!arr_we && !out_ld, "strobes during reset");
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      en = 1'($urandom_range(0, 1));
      we = 1'($urandom_range(0, 1));
      exp_we = en & we;
      exp_ld = en & ~we;
      @(posedge clk);
      #1;
      check(arr_we == exp_we, $sformatf("arr_we cycle %0d", i));
      check(out_ld == exp_ld, $sformatf("out_ld cycle %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
