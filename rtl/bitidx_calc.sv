// bitidx_calc: bit-index calculation unit of the state filter.
//
// Turns a stored bit-index parameter into the position of the register's
// bit inside its configuration frame, following the XC2V1000 layout:
//     odd slice column  (X_oe = 1): index = 116 + 40 * (79 - Y_row)
//     even slice column (X_oe = 0): index = 118 + 40 * (79 - Y_row)
// and splits the result into the 32-bit word of the frame that holds it
// (index / 32) and the bit inside that word counted from the most
// significant bit (index mod 32), since frame words are sent MSB first.
//
// Interface: purely combinational; Y_row values above 79 are out of range
// and flagged.
module bitidx_calc
  import ctx_pkg::*;
(
  input  bit_param_t               param,
  output logic [BIT_IDX_W-1:0]     bit_index,
  output logic [WORD_IDX_W-1:0]    word_index,
  output logic [4:0]               bit_in_word,
  output logic                     out_of_range
);

  logic [6:0]  rows_below_top;
  logic [BIT_IDX_W-1:0] base;

  always_comb begin
    out_of_range   = (param.y_row > 7'(Y_ROW_MAX));
    rows_below_top = 7'(Y_ROW_MAX) - param.y_row;
    base           = param.x_odd ? BIT_IDX_W'(BIT_BASE_ODD) : BIT_IDX_W'(BIT_BASE_EVEN);
    bit_index      = base + BIT_IDX_W'(rows_below_top) * BIT_IDX_W'(ROW_PITCH);
    word_index     = bit_index[BIT_IDX_W-1:5];
    bit_in_word    = bit_index[4:0];
  end

endmodule
