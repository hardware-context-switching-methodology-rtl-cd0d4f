// bitstream_mem: memory holding the task's configuration bitstream (task.bit).
//
// On a swap-in the controller reads the bitstream word by word from here,
// passes it through the state filter, which writes the saved register states
// into the register frames, and sends it to the configuration port. The host
// loads the bitstream through the write port. Words are stored as the 32-bit
// configuration words, first byte to be sent in bits 31-24.
//
// Interface: synchronous write port, combinational read port. The depth,
// 65536 words, is this design's choice: a bitstream that rewrites a whole
// CLB column takes 23 x 106 = 2438 words (22 frames and a pad frame), so
// this holds 26 columns, more than the largest example task (14 columns).
module bitstream_mem #(
  parameter int unsigned DEPTH = 65536,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [31:0]   wdata,
  input  logic [AW-1:0] raddr,
  output logic [31:0]   rdata
);

  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
