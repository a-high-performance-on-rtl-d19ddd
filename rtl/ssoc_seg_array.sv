// ssoc_seg_array: the 2^k x m-bit static segment storage array.
//
// Each word is SEG_W bits wide. One word line of wl selects a word. On a
// rising edge with we high the selected word takes wdata. rdata always
// shows the selected word (an AND-OR of all words with their word lines),
// and the output register samples it.
// Timing: write on the clock edge; read is combinational from the word
// lines, so a write followed by a read of the same word on the next edge
// returns the new data.
// The array size 2^k x m follows the reference design; the word-line
// interface and the AND-OR read path are this design's choices. Contents
// are not initialised; a word reads what was last written to it.
module ssoc_seg_array #(
  parameter int unsigned ADDR_W = 10,
  parameter int unsigned SEG_W  = 4
) (
  input  logic                 clk,
  input  logic [2**ADDR_W-1:0] wl,
  input  logic                 we,
  input  logic [SEG_W-1:0]     wdata,
  output logic [SEG_W-1:0]     rdata
);

  localparam int unsigned WORDS = 2**ADDR_W;

  logic [SEG_W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    for (int i = 0; i < WORDS; i++) begin
      if (we && wl[i]) mem[i] <= wdata;
    end
  end

  always_comb begin
    rdata = '0;
    for (int i = 0; i < WORDS; i++) begin
      rdata |= mem[i] & {SEG_W{wl[i]}};
    end
  end

endmodule
