// ssoc_addr_decoder: address decoder of the static-segment SP SRAM.
//
// The k-bit address is latched on a rising edge with en high and decoded
// into 2^k one-hot word lines, wl[i] high selecting word i of the array.
// With en low the latched address, and so the selected word, is kept.
// Timing: word lines change in the cycle after the latching edge, when the
// array performs the access issued on that edge.
// Decoding the address into word lines follows the reference design; the
// address latch is this design's choice, made so that address, data and
// control all reach the array from the same clock edge.
module ssoc_addr_decoder #(
  parameter int unsigned ADDR_W = 10
) (
  input  logic                 clk,
  input  logic                 en,
  input  logic [ADDR_W-1:0]    addr,
  output logic [2**ADDR_W-1:0] wl
);

  logic [ADDR_W-1:0] addr_q;

  always_ff @(posedge clk) begin
    if (en) addr_q <= addr;
  end

  always_comb begin
    for (int i = 0; i < 2**ADDR_W; i++) begin
      wl[i] = (addr_q == ADDR_W'(i));
    end
  end

  a_onehot : assert property (@(posedge clk) $onehot(wl));

endmodule
