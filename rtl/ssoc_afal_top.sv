// ssoc_afal_top: the approximate memory and the four approximate full
// adder cells side by side.
//
// The two halves are independent proposals for error-tolerant image
// processing hardware and share no signals:
//  * mem_*: one ssoc_sp_sram, 2^ADDR_W words of DATA_W bits, of which
//    SEG_W are stored (defaults 1K x 8 bits with a 4-bit segment). Timing
//    as in ssoc_sp_sram: a read issued on an edge with mem_en high shows
//    on mem_dout two edges later.
//  * fa_*: one cell each of AFAL1, AFAL2, AFAL3 and AFAL4; bit i-1 of each
//    fa_ vector belongs to AFALi. These are combinational.
// Bringing both out as separate port groups is this design's choice; the
// reference design does not combine them.
module ssoc_afal_top #(
  parameter int unsigned ADDR_W = 10,
  parameter int unsigned DATA_W = 8,
  parameter int unsigned SEG_W  = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              mem_en,
  input  logic              mem_we,
  input  logic [ADDR_W-1:0] mem_addr,
  input  logic [DATA_W-1:0] mem_din,
  output logic [DATA_W-1:0] mem_dout,
  input  logic [3:0]        fa_a,
  input  logic [3:0]        fa_b,
  input  logic [3:0]        fa_c,
  output logic [3:0]        fa_sum,
  output logic [3:0]        fa_carry
);

  ssoc_sp_sram #(.ADDR_W(ADDR_W), .DATA_W(DATA_W), .SEG_W(SEG_W)) u_mem (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (mem_en),
    .we   (mem_we),
    .addr (mem_addr),
    .din  (mem_din),
    .dout (mem_dout)
  );

  afal1 u_afal1 (.a(fa_a[0]), .b(fa_b[0]), .c(fa_c[0]), .sum(fa_sum[0]), .carry(fa_carry[0]));
  afal2 u_afal2 (.a(fa_a[1]), .b(fa_b[1]), .c(fa_c[1]), .sum(fa_sum[1]), .carry(fa_carry[1]));
  afal3 u_afal3 (.a(fa_a[2]), .b(fa_b[2]), .c(fa_c[2]), .sum(fa_sum[2]), .carry(fa_carry[2]));
  afal4 u_afal4 (.a(fa_a[3]), .b(fa_b[3]), .c(fa_c[3]), .sum(fa_sum[3]), .carry(fa_carry[3]));

endmodule
