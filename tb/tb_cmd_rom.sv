// tb_cmd_rom: checks every word of the command ROM against the readback
// procedure: sync, SHUTDOWN, RCRC, four NOOPs, CAPTURE, RCFG, the column
// block (FAR header, Type 1 FDRO read, Type 2 read, two NOOPs) and START,
// RCRC, DESYNCH, two NOOPs.
module tb_cmd_rom;
  logic [4:0]  addr;
  logic [31:0] data;
  int checks = 0, failures = 0;

  cmd_rom u_dut (.addr, .data);

  logic [31:0] exp_words [26] = '{
    32'hAA995566, 32'h30008001, 32'h0000000B, 32'h30008001, 32'h00000007,
    32'h20000000, 32'h20000000, 32'h20000000, 32'h20000000,
    32'h30008001, 32'h0000000C, 32'h30008001, 32'h00000004,
    32'h30002001, 32'h28006000, 32'h48000000, 32'h20000000, 32'h20000000,
    32'h30008001, 32'h00000005, 32'h30008001, 32'h00000007,
    32'h30008001, 32'h0000000D, 32'h20000000, 32'h20000000};

  initial begin
    for (int i = 0; i < 26; i++) begin
      addr = 5'(i);
      #1;
      checks++;
      if (data !== exp_words[i]) begin
        failures++;
        $display("FAIL addr %0d: %h exp %h", i, data, exp_words[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
