// state_mem: state memory, one bit per saved flip-flop.
//
// During a swap-out the state filter writes the captured value of each task
// register here, in database order (for each column: the first-frame bits,
// then the second-frame bits). During a swap-in the filter reads them back
// in the same order and merges them into the bitstream. The host can read
// the saved state between the two operations.
//
// Interface: a single port (enable, write enable, address, data in) with a
// combinational read; the depth is this design's choice.
module state_mem #(
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic          din,
  output logic          dout
);

  logic mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en && we) mem[addr] <= din;
  end

  assign dout = mem[addr];

endmodule
