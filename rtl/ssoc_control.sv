// ssoc_control: control logic of the static-segment SP SRAM.
//
// EN and WE/RE are sampled on each rising clock edge. An edge with EN high
// issues one access; on the next edge that access is carried out: arr_we
// writes the array for a write, out_ld loads the output register for a
// read. With EN low nothing is issued, so the array and the output keep
// their contents. The two strobes are never high together.
// Timing: strobes are registered, valid in the cycle after the issuing
// edge. Reset (asynchronous, active low) clears both strobes.
// Which operations exist and that EN gates them follows the reference
// design; the registered strobes, the reset and the WE/RE encoding
// (ssoc_pkg) are this design's choices.
// The assertion below is disabled during reset, so rst_n is also used
// outside the flip-flops' asynchronous reset; lint notes this as a net used
// both synchronously and asynchronously, which is harmless here.
module ssoc_control
  import ssoc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic we,      // WE/RE: 1 write, 0 read
  output logic arr_we,  // write the array this cycle
  output logic out_ld   // load the output register this cycle
);

  ssoc_op_e op;

  assign op = ssoc_op_e'(we);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      arr_we <= 1'b0;
      out_ld <= 1'b0;
    end else begin
      arr_we <= en && (op == SSOC_WRITE);
      out_ld <= en && (op == SSOC_READ);
    end
  end

  // A single port performs one access per cycle.
  a_one_access : assert property (@(posedge clk) disable iff (!rst_n)
    !(arr_we && out_ld));

endmodule
