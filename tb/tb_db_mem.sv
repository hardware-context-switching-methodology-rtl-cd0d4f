// tb_db_mem: writes random database entries to random addresses and reads
// them back against a reference copy; also checks that an entry keeps its
// flag and body fields.
module tb_db_mem;
  import ctx_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0;
  logic [7:0] waddr = 0, raddr = 0;
  db_entry_t wdata = '0, rdata;
  db_entry_t ref_mem [256];
  logic      written [256];
  int checks = 0, failures = 0;

  db_mem u_dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    for (int i = 0; i < 256; i++) written[i] = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); we = 1; waddr = 8'(i); wdata = db_entry_t'(10'($urandom));
      ref_mem[i] = wdata; written[i] = 1;
    end
    for (int n = 0; n < 300; n++) begin
      @(negedge clk); we = 1; waddr = 8'($urandom); wdata = db_entry_t'(10'($urandom));
      ref_mem[waddr] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 256; i++) begin
      raddr = 8'(i); #1;
      checks++;
      if (rdata !== ref_mem[i] || rdata.flag !== ref_mem[i].flag) begin
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
