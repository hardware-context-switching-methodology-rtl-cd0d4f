// tb_bitidx_calc: checks the bit-index calculation against the table of the
// XC2V1000 column (rows 79..76 and 1..0 give 118/158/198/238 ... 3238/3278
// for an even slice column, 2 less for an odd one) and against the
// equations for every row, plus the out-of-range flag above row 79.
module tb_bitidx_calc;
  import ctx_pkg::*;
  bit_param_t param;
  logic [11:0] bit_index;
  logic [6:0]  word_index;
  logic [4:0]  bit_in_word;
  logic        oor;
  int checks = 0, failures = 0;

  bitidx_calc u_dut (.param, .bit_index, .word_index, .bit_in_word, .out_of_range(oor));

  task automatic chk(input logic ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  int rows [6]  = '{79, 78, 77, 76, 1, 0};
  int even_ref [6] = '{118, 158, 198, 238, 3238, 3278};

  initial begin
    for (int i = 0; i < 6; i++)
      for (int o = 0; o < 2; o++) begin
        param = '{x_odd: o[0], y_row: 7'(rows[i])};
        #1;
        chk(int'(bit_index) == even_ref[i] - 2 * o,
            $sformatf("row %0d odd %0d: %0d", rows[i], o, bit_index));
      end
    for (int y = 0; y < 128; y++)
      for (int o = 0; o < 2; o++) begin
        int e;
        param = '{x_odd: o[0], y_row: 7'(y)};
        #1;
        e = (o ? 116 : 118) + 40 * (79 - y);
        if (y <= 79) begin
          chk(!oor && int'(bit_index) == e && int'(word_index) == e / 32 && int'(bit_in_word) == e % 32,
              $sformatf("row %0d odd %0d: %0d/%0d/%0d", y, o, bit_index, word_index, bit_in_word));
        end else begin
          chk(oor, $sformatf("row %0d not flagged", y));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
