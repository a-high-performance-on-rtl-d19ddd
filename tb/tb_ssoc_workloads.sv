// tb_ssoc_workloads: the nine 1K-word memory configurations compared in
// the evaluation, run side by side on the same data: 16-bit words stored
// as 16 (exact), 14, 12 and 10-bit segments, and 8-bit words stored as
// 8 (exact), 7, 6, 5 and 4-bit segments.
//
// A generated 32 x 32 image (smooth gradient plus pseudo-random texture,
// 16-bit; the 8-bit memories get its top byte) is written in raster order
// and read back. Each output is checked against
// floor(p / 2^(n-m)) * 2^(n-m) + 2^(n-m-1) (p itself when m = n), and the
// largest error must be exactly 2^(n-m-1) or less. The mean absolute error
// of each configuration is printed.
module tb_ssoc_workloads;
  localparam int NCFG = 9;
  localparam int N_OF [NCFG] = '{16, 16, 16, 16, 8, 8, 8, 8, 8};
  localparam int M_OF [NCFG] = '{16, 14, 12, 10, 8, 7, 6, 5, 4};
  localparam int WORDS = 1024;

  logic clk = 0, rst_n = 0, en = 0, we = 0;
  logic [9:0] addr = '0;
  logic [15:0] pix = '0;
  logic [15:0] dout [NCFG];
  logic [15:0] img [WORDS];
  int checks = 0, failures = 0;
  int max_err [NCFG];
  longint sum_err [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int N = N_OF[g];
    localparam int M = M_OF[g];
    logic [N-1:0] d_in, d_out;
    assign d_in = pix[15 -: N];
    ssoc_sp_sram #(.ADDR_W(10), .DATA_W(N), .SEG_W(M)) u_mem (
      .clk(clk), .rst_n(rst_n), .en(en), .we(we), .addr(addr), .din(d_in), .dout(d_out));
    assign dout[g] = 16'(d_out);
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int y = 0; y < 32; y++)
      for (int x = 0; x < 32; x++)
        img[y * 32 + x] = 16'((x * 1000 + y * 1040) + int'($urandom_range(0, 2047)));
    for (int g = 0; g < NCFG; g++) begin max_err[g] = 0; sum_err[g] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int a = 0; a < WORDS; a++) begin
      @(negedge clk);
      en = 1; we = 1; addr = 10'(a); pix = img[a];
    end
    // reads are issued back to back; the data of the read issued on edge t
    // appears after edge t + 1, so word a - 2 is checked while a is issued
    for (int a = 0; a <= WORDS + 1; a++) begin
      @(negedge clk);
      en = (a < WORDS); we = 0; addr = 10'(a);
      if (a > 1) begin
        for (int g = 0; g < NCFG; g++) begin
          int n, m, p, e, err;
          n = N_OF[g]; m = M_OF[g];
          p = int'(img[a - 2]) >> (16 - n);
          e = (m == n) ? p : ((p >> (n - m)) << (n - m)) + (1 << (n - m - 1));
          err = int'(dout[g]) - p;
          if (err < 0) err = -err;
          if (err > max_err[g]) max_err[g] = err;
          sum_err[g] += longint'(err);
          checks++;
          if (int'(dout[g]) != e) begin
            failures++;
            if (failures < 10) $display("FAIL: n=%0d m=%0d word %0d got %0h expected %0h", n, m, a - 2, dout[g], e);
          end
        end
      end
    end
    for (int g = 0; g < NCFG; g++) begin
      int bound;
      bound = (M_OF[g] == N_OF[g]) ? 0 : (1 << (N_OF[g] - M_OF[g] - 1));
      checks++;
      if (max_err[g] > bound) begin
        failures++;
        $display("FAIL: n=%0d m=%0d max error %0d above %0d", N_OF[g], M_OF[g], max_err[g], bound);
      end
      $display("n=%0d m=%0d storage bits %0d of %0d, max |error| %0d, mean |error| %0.3f (full scale %0d)",
               N_OF[g], M_OF[g], WORDS * M_OF[g], WORDS * N_OF[g], max_err[g],
               real'(sum_err[g]) / WORDS, (1 << N_OF[g]) - 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
