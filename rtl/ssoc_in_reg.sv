// ssoc_in_reg: n-bit to m-bit static segment input register.
//
// On a rising edge with ld high the register keeps only the SEG_W most
// significant bits of the DATA_W-bit input word (the static segment); the
// DATA_W - SEG_W low bits are dropped and never stored. With ld low the
// register holds. With SEG_W = DATA_W the whole word is kept.
// Timing: the segment is available in the cycle after the loading edge,
// when the array writes it.
// Selecting the segment from the MSB end follows the reference design.
module ssoc_in_reg #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned SEG_W  = 4
) (
  input  logic              clk,
  input  logic              ld,
  input  logic [DATA_W-1:0] din,
  output logic [SEG_W-1:0]  seg
);

  if (SEG_W < 1 || SEG_W > DATA_W) begin : g_bad_width
    $error("ssoc_in_reg: SEG_W must lie in 1..DATA_W");
  end

  always_ff @(posedge clk) begin
    if (ld) seg <= din[DATA_W-1 -: SEG_W];
  end

endmodule
