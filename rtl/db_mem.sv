// db_mem: context database memory.
//
// Holds the 10-bit entries that describe where a task's flip-flops sit in
// the configuration memory. An entry with Bit_Share_Flag = 00 is a frame
// address (6-bit major address, 2-bit minor address of the first register
// frame of a CLB column); the entries that follow it, up to the next frame
// address, are bit-index parameters (flag 01 / 10 / 11 = register in the
// first / second / both frames, then X_oe and the 7-bit Y_row). The entries
// are produced off-line from the task's logic allocation file and written
// here by the host before a swap-out.
//
// Interface: one synchronous write port for the host, one combinational
// read port for the controller and the state filter. The depth is this
// design's choice (the largest example task needs 68 entries).
module db_mem
  import ctx_pkg::*;
#(
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic      clk,
  input  logic      we,
  input  logic [AW-1:0] waddr,
  input  db_entry_t wdata,
  input  logic [AW-1:0] raddr,
  output db_entry_t rdata
);

  db_entry_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
