// ssoc_sp_sram: m-bit Static Segment On-Chip single-port SRAM (SSOC SP SRAM).
//
// An approximate memory for error-tolerant image data. Each DATA_W-bit
// (n-bit) word written is stored as its SEG_W (m) most significant bits
// only, in a 2^ADDR_W x SEG_W array, so the array is m/n the size of a
// conventional one. On a read the n-bit word is rebuilt by appending a 1
// and then zeros below the segment, so the error is at most half the
// weight of the lowest stored bit. With SEG_W = DATA_W it is an exact SRAM.
//
// Ports: en (EN) enables an access, we (WE/RE) chooses write (1) or
// read (0), addr (ADDRESS), din (DATA_IN), dout (DATA_OUT). rst_n is an
// asynchronous active-low reset of the control and output registers.
//
// Timing: one access per clock. An access is issued on a rising edge with
// en high: the address is latched by the decoder, the data segment by the
// input register and the operation by the control logic. On the next edge
// a write updates the array, or a read loads the output register, so read
// data appears on dout two edges after the read was issued and stays until
// the next read completes. Issuing a read right after a write to the same
// address returns the new data. An access issued on the last enabled edge
// still completes on the next edge even if en has dropped; after that
// nothing changes while en stays low.
//
// Blocks, function and sizes follow the reference design; the two-stage
// timing, the reset and the WE/RE encoding are this design's choices.
module ssoc_sp_sram #(
  parameter int unsigned ADDR_W = 10,
  parameter int unsigned DATA_W = 8,
  parameter int unsigned SEG_W  = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] dout
);

  logic [2**ADDR_W-1:0] wl;
  logic                 arr_we, out_ld;
  logic [SEG_W-1:0]     wseg, rseg;

  ssoc_control u_ctrl (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (en),
    .we    (we),
    .arr_we(arr_we),
    .out_ld(out_ld)
  );

  ssoc_addr_decoder #(.ADDR_W(ADDR_W)) u_dec (
    .clk (clk),
    .en  (en),
    .addr(addr),
    .wl  (wl)
  );

  ssoc_in_reg #(.DATA_W(DATA_W), .SEG_W(SEG_W)) u_in (
    .clk(clk),
    .ld (en && we),
    .din(din),
    .seg(wseg)
  );

  ssoc_seg_array #(.ADDR_W(ADDR_W), .SEG_W(SEG_W)) u_arr (
    .clk  (clk),
    .wl   (wl),
    .we   (arr_we),
    .wdata(wseg),
    .rdata(rseg)
  );

  ssoc_out_reg #(.DATA_W(DATA_W), .SEG_W(SEG_W)) u_out (
    .clk  (clk),
    .rst_n(rst_n),
    .ld   (out_ld),
    .seg  (rseg),
    .dout (dout)
  );

endmodule
