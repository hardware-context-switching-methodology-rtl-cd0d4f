// tb_state_filter: drives the state filter with the words of one column
// read-back (a pad frame, frame 1, frame 2) and a database whose entries use
// every Bit_Share_Flag code, with random gaps on the input and random
// back-pressure on the output.
// Swap-out: the bits written to state memory must be the frame-1 bits of the
// 01/11 entries, then the frame-2 bits of the 10/11 entries, each taken at
// 116/118 + 40 * (79 - Y_row) counted from the MSB of the frame's first word;
// the words must leave unchanged and in order; the database pointer must end
// on the next frame-address entry.
// Swap-in: the same stream with saved bits in state memory; the output words
// must carry those bits at the same positions and be unchanged elsewhere.
// Last, an entry with an impossible row must raise err and be skipped.
module tb_state_filter;
  import ctx_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic restore = 0, clear = 0;
  logic in_valid = 0, in_first = 0, in_ready;
  logic [31:0] in_data = 0;
  logic [1:0]  in_sel = 0;
  logic out_valid, out_ready = 0;
  logic [31:0] out_data;
  db_entry_t db_data;
  logic db_end, db_adv;
  logic sm_en, sm_we, sm_din, sm_dout;
  logic [9:0] sm_addr;
  logic idle, err;
  logic [10:0] nregs;

  state_filter u_dut (.clk, .rst_n, .restore, .clear, .in_valid, .in_data, .in_sel, .in_first,
    .in_ready, .out_valid, .out_data, .out_ready, .db_data, .db_end, .db_adv,
    .sm_en, .sm_we, .sm_addr, .sm_din, .sm_dout, .idle, .err, .nregs);

  // database model
  db_entry_t db [16];
  int db_len, db_ptr;
  assign db_data = db[db_ptr];
  assign db_end  = db_ptr >= db_len;
  always @(posedge clk) if (db_adv) db_ptr <= db_ptr + 1;

  // state memory model
  logic smem [1024];
  assign sm_dout = smem[sm_addr];
  always @(posedge clk) if (sm_en && sm_we) smem[sm_addr] <= sm_din;

  int checks = 0, failures = 0;
  task automatic chk(input logic ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  logic [31:0] words [318];
  logic [31:0] outw [$];

  always @(posedge clk) begin
    out_ready <= ($urandom % 4) != 0;
    if (out_valid && out_ready) outw.push_back(out_data);
  end

  function automatic int bidx(input db_entry_t e);
    return (e.body[7] ? 116 : 118) + 40 * (79 - int'(e.body[6:0]));
  endfunction
  function automatic logic getb(input int frame, input int b);
    return words[106 * frame + b / 32][31 - b % 32];
  endfunction

  task automatic stream();
    for (int i = 0; i < 318; i++) begin
      while (($urandom % 3) == 0) @(negedge clk);
      in_valid = 1; in_data = words[i];
      in_sel   = (i < 106) ? 2'd0 : (i < 212) ? 2'd1 : 2'd2;
      in_first = (i == 106 || i == 212);
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
      @(negedge clk);         // taken at the rising edge in between
      in_valid = 0; in_first = 0;
    end
    wait (idle && outw.size() == 318);
    @(negedge clk);
  endtask

  int exp_order_f [$], exp_order_b [$];

  initial begin
    db[0] = '{FLAG_FRAME_ADDR, 8'h29};
    db[1] = '{FLAG_FIRST,  {1'b1, 7'd79}};
    db[2] = '{FLAG_BOTH,   {1'b0, 7'd79}};
    db[3] = '{FLAG_SECOND, {1'b1, 7'd60}};
    db[4] = '{FLAG_BOTH,   {1'b1, 7'd40}};
    db[5] = '{FLAG_FIRST,  {1'b0, 7'd40}};
    db[6] = '{FLAG_SECOND, {1'b0, 7'd0}};
    db[7] = '{FLAG_FRAME_ADDR, 8'h35};
    db_len = 8;
    for (int e = 1; e < 7; e++) if (db[e].flag[0]) begin exp_order_f.push_back(1); exp_order_b.push_back(bidx(db[e])); end
    for (int e = 1; e < 7; e++) if (db[e].flag[1]) begin exp_order_f.push_back(2); exp_order_b.push_back(bidx(db[e])); end
    for (int i = 0; i < 318; i++) words[i] = $urandom;
    for (int i = 0; i < 1024; i++) smem[i] = 1'b0;

    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---------------- swap-out
    @(negedge clk); clear = 1; restore = 0; db_ptr = 1; @(negedge clk); clear = 0;
    stream();
    chk(int'(nregs) == exp_order_f.size(), $sformatf("save count %0d", nregs));
    for (int i = 0; i < exp_order_f.size(); i++)
      chk(smem[i] == getb(exp_order_f[i], exp_order_b[i]),
          $sformatf("saved bit %0d (frame %0d bit %0d)", i, exp_order_f[i], exp_order_b[i]));
    for (int i = 0; i < 318; i++) chk(outw[i] == words[i], $sformatf("swap-out word %0d changed", i));
    chk(db_ptr == 7, $sformatf("database pointer %0d", db_ptr));
    chk(!err, "err on a clean column");

    // ---------------- swap-in
    outw.delete();
    for (int i = 0; i < 1024; i++) smem[i] = 1'($urandom);
    @(negedge clk); clear = 1; restore = 1; db_ptr = 1; @(negedge clk); clear = 0;
    stream();
    chk(int'(nregs) == exp_order_f.size(), $sformatf("restore count %0d", nregs));
    begin
      logic [31:0] e [318];
      for (int i = 0; i < 318; i++) e[i] = words[i];
      for (int i = 0; i < exp_order_f.size(); i++)
        e[106 * exp_order_f[i] + exp_order_b[i] / 32][31 - exp_order_b[i] % 32] = smem[i];
      for (int i = 0; i < 318; i++)
        chk(outw[i] == e[i], $sformatf("swap-in word %0d: %h exp %h", i, outw[i], e[i]));
    end
    chk(!err, "err on restore");

    // ---------------- bad row
    outw.delete();
    db[3] = '{FLAG_SECOND, {1'b1, 7'd100}};
    @(negedge clk); clear = 1; restore = 0; db_ptr = 1; @(negedge clk); clear = 0;
    stream();
    chk(err, "impossible row not flagged");
    chk(int'(nregs) == exp_order_f.size() - 1, $sformatf("count with bad row %0d", nregs));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
