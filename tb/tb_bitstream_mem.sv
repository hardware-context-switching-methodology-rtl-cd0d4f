// tb_bitstream_mem: fills the whole bitstream memory with a pseudo-random
// word sequence, overwrites some words, and reads everything back.
module tb_bitstream_mem;
  localparam int D = 65536;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0;
  logic [15:0] waddr = 0, raddr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [31:0] ref_mem [D];
  int checks = 0, failures = 0;

  bitstream_mem u_dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    for (int i = 0; i < D; i++) begin
      @(negedge clk); we = 1; waddr = 16'(i); wdata = $urandom;
      ref_mem[i] = wdata;
    end
    for (int i = 0; i < 500; i++) begin
      @(negedge clk); we = 1; waddr = 16'($urandom); wdata = $urandom;
      ref_mem[waddr] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < D; i++) begin
      raddr = 16'(i); #1;
      checks++;
      if (rdata !== ref_mem[i]) begin failures++; if (failures < 10) $display("FAIL word %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
