// tb_para_ram: writes random bit-index parameters to random addresses and reads
// them back against a reference copy.

module tb_para_ram;
  import ctx_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0;
  logic [7:0] waddr = 0, raddr = 0;
  bit_param_t wdata = '0, rdata;
  bit_param_t ref_mem [160];
  logic      written [160];
  int checks = 0, failures = 0;

  para_ram u_dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    for (int i = 0; i < 160; i++) written[i] = 0;
    for (int i = 0; i < 160; i++) begin
      @(negedge clk); we = 1; waddr = 8'(i); wdata = bit_param_t'(8'($urandom));
      ref_mem[i] = wdata; written[i] = 1;
    end
    for (int n = 0; n < 300; n++) begin
      @(negedge clk); we = 1; waddr = 8'($urandom % 160); wdata = bit_param_t'(8'($urandom));
      ref_mem[waddr] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 160; i++) begin
      raddr = 8'(i); #1;
      checks++;
      if (rdata !== ref_mem[i]) begin
        failures++; $display("FAIL %0d: %b exp %b", i, rdata, ref_mem[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
