// para_ram: bit-index parameter RAM of the state filter.
//
// While the first register frame of a column streams past, the state filter
// copies here every bit-index parameter (X_oe, Y_row) whose register also
// has a bit in the second frame (Bit_Share_Flag 10 or 11). When the second
// frame streams past, the filter reads them back in the same order, so the
// database itself is walked only once per column.
//
// Interface: synchronous write port, combinational read port. The default
// depth, 160, is the number of slices in one CLB column of the XC2V1000
// (80 slice rows, two slice columns), the most one column can hold.
module para_ram
  import ctx_pkg::*;
#(
  parameter int unsigned DEPTH = 160,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic       clk,
  input  logic       we,
  input  logic [AW-1:0] waddr,
  input  bit_param_t wdata,
  input  logic [AW-1:0] raddr,
  output bit_param_t rdata
);

  bit_param_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
