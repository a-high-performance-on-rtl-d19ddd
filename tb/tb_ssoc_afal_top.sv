// tb_ssoc_afal_top: end-to-end test of the top at its default parameters
// (1K x 8-bit memory storing 4-bit segments, four AFAL cells).
//
// Memory: a generated 32 x 32 8-bit image (a diagonal gradient plus
// pseudo-random texture) is written in raster order into all 1024 words,
// then read back in raster order with idle (EN low) cycles and
// read-after-write accesses mixed in. Every output is compared with
// (p >> 4) * 16 + 8, the per-pixel error must not exceed 8, and the output
// must not move while EN is low or before the two-edge read latency.
// Adders: all eight input patterns are applied to all four cells at once
// and the sum and carry of each are compared with its truth table.
// Each mechanism (write, read, idle hold, read-after-write, segment
// rounding error, approximate adder error of each cell) is counted, and
// one that never happens is a failure.
module tb_ssoc_afal_top;
  localparam int unsigned WORDS = 1024;
  logic clk = 0, rst_n = 0, mem_en = 0, mem_we = 0;
  logic [9:0] mem_addr = '0;
  logic [7:0] mem_din = '0, mem_dout;
  logic [3:0] fa_a, fa_b, fa_c, fa_sum, fa_carry;
  logic [7:0] img [WORDS];
  int checks = 0, failures = 0;
  int n_wr = 0, n_rd = 0, n_idle = 0, n_raw = 0, n_round = 0, max_err = 0;
  int n_fa_err [4] = '{0, 0, 0, 0};
  longint sum_err = 0;

  ssoc_afal_top dut (
    .clk(clk), .rst_n(rst_n), .mem_en(mem_en), .mem_we(mem_we), .mem_addr(mem_addr),
    .mem_din(mem_din), .mem_dout(mem_dout),
    .fa_a(fa_a), .fa_b(fa_b), .fa_c(fa_c), .fa_sum(fa_sum), .fa_carry(fa_carry));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  task automatic issue(input bit e, input bit w, input int a, input logic [7:0] d);
    @(negedge clk);
    mem_en = e; mem_we = w; mem_addr = 10'(a); mem_din = d;
    @(posedge clk);
    #1;
  endtask

  function automatic logic [7:0] approx(input logic [7:0] p);
    return 8'((int'(p) / 16) * 16 + 8);
  endfunction

  // read pixel a: issue, one idle edge, then the data must be there
  task automatic read_check(input int a);
    logic [7:0] held;
    int err;
    held = mem_dout;
    issue(1, 0, a, 8'h00);
    check(mem_dout == held, "read data visible one edge after issue");
    issue(0, 0, 0, 8'h00);
    n_rd++;
    check(mem_dout == approx(img[a]), $sformatf("pixel %0d read %0h expected %0h", a, mem_dout, approx(img[a])));
    err = int'(mem_dout) - int'(img[a]);
    if (err < 0) err = -err;
    if (err != 0) n_round++;
    if (err > max_err) max_err = err;
    sum_err += longint'(err);
    check(err <= 8, $sformatf("pixel %0d error %0d", a, err));
    // output must hold while EN stays low
    held = mem_dout;
    issue(0, 1, a, 8'hFF);
    n_idle++;
    check(mem_dout == held, "output moved while EN low");
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // adders, checked against the truth tables (index {a,b,c})
  localparam logic [7:0] C_EXP [4] = '{8'b11101000, 8'b11000000, 8'b11110000, 8'b11100000};
  localparam logic [7:0] S_EXP [4] = '{8'b00010111, 8'b10111110, 8'b10001110, 8'b10011110};

  initial begin : adders
    for (int i = 0; i < 8; i++) begin
      fa_a = {4{i[2]}}; fa_b = {4{i[1]}}; fa_c = {4{i[0]}};
      #1;
      for (int k = 0; k < 4; k++) begin
        check(fa_carry[k] == C_EXP[k][i] && fa_sum[k] == S_EXP[k][i],
              $sformatf("AFAL%0d abc=%03b", k + 1, i[2:0]));
        if (2 * int'(fa_carry[k]) + int'(fa_sum[k]) != int'(i[2]) + int'(i[1]) + int'(i[0]))
          n_fa_err[k]++;
      end
    end
  end

  initial begin
    for (int y = 0; y < 32; y++)
      for (int x = 0; x < 32; x++)
        img[y * 32 + x] = 8'((x + y) * 4 + int'($urandom_range(0, 7)));
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    check(mem_dout == 0, "output after reset");
    // raster-order write of the whole image
    for (int a = 0; a < WORDS; a++) begin
      issue(1, 1, a, img[a]);
      n_wr++;
    end
    // raster-order read-back; every 16th pixel is first rewritten and read
    // on the very next edge
    for (int a = 0; a < WORDS; a++) begin
      if (a % 16 == 0) begin
        img[a] = 8'($urandom);
        issue(1, 1, a, img[a]);
        n_wr++;
        n_raw++;
      end
      read_check(a);
    end
    check(n_wr > 0, "writes happened");
    check(n_rd == WORDS, "all words read");
    check(n_idle > 0, "idle hold happened");
    check(n_raw > 0, "read-after-write happened");
    check(n_round > 0, "segment rounding error happened");
    for (int k = 0; k < 4; k++)
      check(n_fa_err[k] > 0, $sformatf("AFAL%0d approximation error happened", k + 1));
    check(n_fa_err[0] == 2 && n_fa_err[1] == 2 && n_fa_err[2] == 2 && n_fa_err[3] == 1,
          "adder error counts 2/2/2/1");
    $display("writes=%0d reads=%0d idle=%0d raw=%0d rounded=%0d max_err=%0d mean_err=%0.3f",
             n_wr, n_rd, n_idle, n_raw, n_round, max_err, real'(sum_err) / WORDS);
    $display("adder errors out of 8: AFAL1=%0d AFAL2=%0d AFAL3=%0d AFAL4=%0d",
             n_fa_err[0], n_fa_err[1], n_fa_err[2], n_fa_err[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
