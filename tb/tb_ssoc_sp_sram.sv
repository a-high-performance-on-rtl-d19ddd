// tb_ssoc_sp_sram: end-to-end test of the static-segment SRAM at its
// default size (1K words, 8-bit data, 4-bit segment) next to an exact
// instance (segment = full 8 bits). Both get the same traffic: a raster
// fill of every address, then random writes, reads and idle cycles,
// including reads issued right after a write to the same address. A
// cycle-accurate model predicts DATA_OUT after every edge: a read issued on
// an enabled edge shows two edges later, and nothing changes while EN is
// low. The expected rebuilt word is (d >> 4) * 16 + 8 for the approximate
// memory and d for the exact one.
module tb_ssoc_sp_sram;
  localparam int unsigned ADDR_W = 10;
  localparam int unsigned WORDS  = 2**ADDR_W;
  logic clk = 0, rst_n = 0, en = 0, we = 0;
  logic [ADDR_W-1:0] addr = '0;
  logic [7:0] din = '0, dout_a, dout_e;
  logic [7:0] model [WORDS];        // exact data last written
  logic [7:0] exp_a = 0, exp_e = 0;
  int checks = 0, failures = 0, n_raw = 0, n_idle = 0, n_rd = 0;
  // access issued on the previous edge
  bit p_en = 0, p_we = 0;
  logic [ADDR_W-1:0] p_addr;
  logic [7:0] p_din;

  ssoc_sp_sram dut (.clk(clk), .rst_n(rst_n), .en(en), .we(we), .addr(addr), .din(din), .dout(dout_a));
  ssoc_sp_sram #(.SEG_W(8)) dut_exact (.clk(clk), .rst_n(rst_n), .en(en), .we(we), .addr(addr), .din(din), .dout(dout_e));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // one clock: apply (e, w, a, d), advance the model, compare both outputs
  task automatic step(input bit e, input bit w, input logic [ADDR_W-1:0] a, input logic [7:0] d);
    @(negedge clk);
    en = e; we = w; addr = a; din = d;
    if (e && !w && p_en && p_we && p_addr == a) n_raw++;
    if (!e) n_idle++;
    @(posedge clk);
    if (p_en && p_we) model[p_addr] = p_din;
    if (p_en && !p_we) begin
      exp_a = 8'((int'(model[p_addr]) >> 4) * 16 + 8);
      exp_e = model[p_addr];
      n_rd++;
    end
    p_en = e; p_we = w; p_addr = a; p_din = d;
    #1;
    check(dout_a == exp_a, $sformatf("approx dout %0h expected %0h", dout_a, exp_a));
    check(dout_e == exp_e, $sformatf("exact dout %0h expected %0h", dout_e, exp_e));
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < WORDS; i++) step(1, 1, ADDR_W'(i), 8'($urandom));
    for (int i = 0; i < 8000; i++) begin
      int k;
      logic [ADDR_W-1:0] a;
      k = $urandom_range(0, 9);
      a = ADDR_W'($urandom);
      if (k < 2) step(0, 1'($urandom), a, 8'($urandom));          // idle
      else if (k < 5) step(1, 1, a, 8'($urandom));                 // write
      else if (k < 7 && p_en && p_we) step(1, 0, p_addr, 8'($urandom)); // read after write
      else step(1, 0, a, 8'($urandom));                            // read
    end
    // explicit latency check: read issued now appears after two edges
    step(1, 1, 10'd5, 8'hA7);
    step(1, 0, 10'd5, 8'h00);
    check(dout_e != 8'hA7, "read data visible after one edge");
    step(0, 0, 10'd0, 8'h00);
    check(dout_e == 8'hA7 && dout_a == 8'hA8, "read data after two edges");
    check(n_raw > 100 && n_idle > 100 && n_rd > 1000, "traffic mix");
    $display("reads=%0d read-after-write=%0d idle=%0d", n_rd, n_raw, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
