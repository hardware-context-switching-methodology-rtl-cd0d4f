// tb_state_mem: writes a random bit pattern through the single port, checks
// that a write with en or we low changes nothing, and reads every bit back.
module tb_state_mem;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en = 0, we = 0, din = 0, dout;
  logic [9:0] addr = 0;
  logic ref_mem [1024];
  int checks = 0, failures = 0;

  state_mem u_dut (.clk, .en, .we, .addr, .din, .dout);

  initial begin
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); en = 1; we = 1; addr = 10'(i); din = 1'($urandom);
      ref_mem[i] = din;
    end
    // blocked writes
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); en = i[0]; we = !i[0]; addr = 10'($urandom); din = !ref_mem[addr];
    end
    @(negedge clk); en = 0; we = 0;
    for (int i = 0; i < 1024; i++) begin
      addr = 10'(i); #1;
      checks++;
      if (dout !== ref_mem[i]) begin failures++; $display("FAIL bit %0d", i); end
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
