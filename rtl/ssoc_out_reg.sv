// ssoc_out_reg: m-bit to n-bit output register.
//
// Rebuilds a DATA_W-bit word from the SEG_W-bit stored segment: the segment
// goes to the most significant bits, the bit just below it is set to 1 and
// all lower bits are 0. The 1 puts the value in the middle of the range of
// words that share the segment, which halves the worst-case error against
// padding with zeros. With SEG_W = DATA_W the word passes unchanged. The
// result is loaded on a rising edge with ld high and held otherwise;
// asynchronous active-low reset clears it.
// Timing: DATA_OUT changes only on a loading edge.
// The padding rule follows the reference design; the reset is this
// design's choice.
module ssoc_out_reg #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned SEG_W  = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ld,
  input  logic [SEG_W-1:0]  seg,
  output logic [DATA_W-1:0] dout
);

  localparam int unsigned PAD_W = DATA_W - SEG_W;

  logic [DATA_W-1:0] full;

  if (SEG_W < 1 || SEG_W > DATA_W) begin : g_bad_width
    $error("ssoc_out_reg: SEG_W must lie in 1..DATA_W");
  end else if (PAD_W == 0) begin : g_exact
    assign full = seg;
  end else if (PAD_W == 1) begin : g_pad1
    assign full = {seg, 1'b1};
  end else begin : g_pad
    assign full = {seg, 1'b1, {(PAD_W - 1){1'b0}}};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  dout <= '0;
    else if (ld) dout <= full;
  end

endmodule
