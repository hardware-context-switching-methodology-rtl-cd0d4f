// tb_ctx_controller: checks the controller's sequencing with simple models
// of the database, bitstream memory, state filter and SelectMAP port around
// it (the command ROM is the real one).
// Swap-out with the up-counter database (two columns): the exact word
// sequence sent to the port (prologue, per column FAR header, frame address
// built from MJA/MNA, Type 1 FDRO read, Type 2 read of 318 words, two NOOPs,
// then the epilogue), the 318-word read per column, and the tags given to
// the filter (106 pad words, then frame 1 and frame 2, each marked on its
// first word). Swap-in: a bitstream that rewrites both columns; every word
// must reach the filter in order, and exactly the words of frames MNA 1 and
// 2 of each database column must be tagged 1 and 2. A start with INIT_B low
// must be refused with err.
module tb_ctx_controller;
  import ctx_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic swap_out = 0, swap_in = 0, busy, done, err, init_b = 1;
  logic [8:0] db_len = 0;
  logic [16:0] bs_len = 0;
  logic [7:0] cols;
  logic [4:0] rom_addr; logic [31:0] rom_data;
  logic [7:0] db_addr; db_entry_t db_data; logic db_end, db_adv;
  logic [15:0] bs_addr; logic [31:0] bs_data;
  logic f_restore, f_clear, f_in_valid, f_in_first, f_in_ready, f_out_valid, f_out_ready, f_idle;
  logic [31:0] f_in_data, f_out_data;
  logic [1:0] f_in_sel;
  logic p_tx_valid, p_tx_ready, p_rd_start, p_rx_valid, p_rx_ready, p_idle;
  logic [31:0] p_tx_data, p_rx_data;
  logic [15:0] p_rd_words;

  ctx_controller u_dut (.clk, .rst_n, .swap_out, .swap_in, .db_len, .bs_len, .busy, .done, .err,
    .cols, .init_b, .rom_addr, .rom_data, .db_addr, .db_data, .db_end, .db_adv, .bs_addr, .bs_data,
    .f_restore, .f_clear, .f_in_valid, .f_in_data, .f_in_sel, .f_in_first, .f_in_ready,
    .f_out_valid, .f_out_data, .f_out_ready, .f_idle,
    .p_tx_valid, .p_tx_data, .p_tx_ready, .p_rd_start, .p_rd_words, .p_rx_valid, .p_rx_data,
    .p_rx_ready, .p_idle);
  cmd_rom u_rom (.addr(rom_addr), .data(rom_data));

  int checks = 0, failures = 0;
  task automatic chk(input logic ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  // memories
  db_entry_t db [16];
  logic [31:0] bs [8192];
  assign db_data = db[db_addr[3:0]];
  assign bs_data = bs[bs_addr[12:0]];

  // filter model: takes words, walks the database after a frame-1 start
  logic walking = 0;
  int   fwords = 0;
  logic [31:0] f_data_q [$];
  logic [1:0]  f_sel_q  [$];
  logic        f_first_q[$];
  always @(negedge clk) f_in_ready <= ($urandom % 4) != 0;
  assign f_idle      = !walking;
  assign f_out_valid = 1'b0;
  assign f_out_data  = '0;
  assign db_adv      = walking && !db_end && db_data.flag != FLAG_FRAME_ADDR;
  always @(posedge clk) begin
    if (walking && (db_end || db_data.flag == FLAG_FRAME_ADDR)) walking <= 1'b0;
    if (rst_n && f_in_valid && f_in_ready) begin
      f_data_q.push_back(f_in_data); f_sel_q.push_back(f_in_sel); f_first_q.push_back(f_in_first);
      if (f_in_first && f_in_sel == 2'd1 && !f_restore) walking <= 1'b1;
      if (f_in_first && f_in_sel == 2'd1 && f_restore) walking <= 1'b1;
    end
  end

  // port model
  logic [31:0] tx_q [$];
  int rd_left = 0, rd_cnt = 0;
  always @(negedge clk) p_tx_ready <= ($urandom % 3) != 0;
  assign p_idle     = (rd_left == 0);
  assign p_rx_valid = (rd_left != 0);
  assign p_rx_data  = 32'hC0DE_0000 | 32'(rd_cnt);
  always @(posedge clk) begin
    if (rst_n && p_tx_valid && p_tx_ready) tx_q.push_back(p_tx_data);
    if (p_rd_start) begin rd_left <= int'(p_rd_words); rd_cnt <= 0; end
    else if (p_rx_valid && p_rx_ready) begin rd_left <= rd_left - 1; rd_cnt <= rd_cnt + 1; end
  end

  function automatic logic [31:0] fa(input int mja, input int mna);
    return (32'(mja) << 17) | (32'(mna) << 9);
  endfunction

  string tab6 [16] = '{"0000101001", "1111001111", "1101001111", "0000110101",
                       "1101001111", "1101001110", "1101001101", "1101001100",
                       "1101001011", "1101001010", "1101001001", "1101001000",
                       "1101000111", "1101000110", "1101000101", "1101000100"};

  initial begin
    logic [31:0] ew [$];
    for (int i = 0; i < 16; i++) begin
      automatic logic [9:0] v = '0;
      for (int c = 0; c < 10; c++) v = {v[8:0], (tab6[i][c] == "1")};
      db[i] = db_entry_t'(v);
    end
    db_len = 16;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ------------------------------------------------ refused start
    @(negedge clk); init_b = 0; swap_out = 1; @(negedge clk); swap_out = 0;
    repeat (3) @(negedge clk);
    chk(err && !busy, "start with INIT_B low not refused");
    init_b = 1;

    // ------------------------------------------------ swap-out
    @(negedge clk); swap_out = 1; @(negedge clk); swap_out = 0;
    wait (done); @(negedge clk);
    ew = '{32'hAA995566, 32'h30008001, 32'hB, 32'h30008001, 32'h7,
           32'h20000000, 32'h20000000, 32'h20000000, 32'h20000000,
           32'h30008001, 32'hC, 32'h30008001, 32'h4};
    foreach (ew[i]) ; // prologue
    for (int c = 0; c < 2; c++) begin
      ew.push_back(32'h30002001); ew.push_back(c == 0 ? 32'h00140200 : 32'h001A0200);
      ew.push_back(32'h28006000); ew.push_back(32'h4800013E);
      ew.push_back(32'h20000000); ew.push_back(32'h20000000);
    end
    ew.push_back(32'h30008001); ew.push_back(32'h5); ew.push_back(32'h30008001); ew.push_back(32'h7);
    ew.push_back(32'h30008001); ew.push_back(32'hD); ew.push_back(32'h20000000); ew.push_back(32'h20000000);
    chk(tx_q.size() == ew.size(), $sformatf("%0d command words, exp %0d", tx_q.size(), ew.size()));
    for (int i = 0; i < ew.size() && i < tx_q.size(); i++)
      chk(tx_q[i] == ew[i], $sformatf("command word %0d: %h exp %h", i, tx_q[i], ew[i]));
    chk(f_data_q.size() == 2 * 318, $sformatf("%0d words read", f_data_q.size()));
    for (int i = 0; i < f_data_q.size(); i++) begin
      automatic int k = i % 318;
      chk(f_data_q[i] == (32'hC0DE_0000 | 32'(k)), $sformatf("read word %0d: %h", i, f_data_q[i]));
      chk(f_sel_q[i] == ((k < 106) ? 2'd0 : (k < 212) ? 2'd1 : 2'd2) &&
          f_first_q[i] == (k == 106 || k == 212), $sformatf("read word %0d tag", i));
    end
    chk(cols == 2 && !err, "swap-out status");

    // ------------------------------------------------ swap-in
    begin
      automatic int p = 0;
      automatic int mjas [2] = '{10, 13};
      bs[p++] = 32'hFFFFFFFF; bs[p++] = SYNC_WORD; bs[p++] = WR_CMD_HDR; bs[p++] = CMD_RCRC;
      for (int c = 0; c < 2; c++) begin
        bs[p++] = WR_FAR_HDR; bs[p++] = fa(mjas[c], 0);
        bs[p++] = WR_CMD_HDR; bs[p++] = 32'h1;
        bs[p++] = 32'h30004000; bs[p++] = 32'h5000_0000 | 32'(23 * 106);
        for (int f = 0; f < 23; f++)
          for (int w = 0; w < 106; w++) bs[p++] = {8'(c), 8'(f), 16'(w)};
      end
      bs[p++] = WR_CMD_HDR; bs[p++] = CMD_START; bs[p++] = WR_CMD_HDR; bs[p++] = CMD_DESYNCH;
      bs[p++] = NOOP_WORD; bs[p++] = NOOP_WORD;
      bs_len = 17'(p);
      f_data_q.delete(); f_sel_q.delete(); f_first_q.delete();
      @(negedge clk); swap_in = 1; @(negedge clk); swap_in = 0;
      wait (done); @(negedge clk);
      chk(f_data_q.size() == p, $sformatf("%0d bitstream words to filter, exp %0d", f_data_q.size(), p));
      begin
        automatic int n1 = 0, n2 = 0, bad = 0;
        for (int i = 0; i < f_data_q.size(); i++) begin
          automatic logic [1:0] es = 2'd0;
          automatic logic ef;
          if (f_data_q[i] != bs[i]) bad++;
          // frame data words: c in [31:24], frame in [23:16]
          if (i >= 10 && i < p - 6 && !(i >= 10 + 2438 && i < 10 + 2438 + 6)) begin
            if (f_data_q[i][23:16] == 8'd1) es = 2'd1;
            if (f_data_q[i][23:16] == 8'd2) es = 2'd2;
          end
          ef = (es != 0) && f_data_q[i][15:0] == 0;
          if (f_sel_q[i] != es || f_first_q[i] != ef) begin
            bad++;
            if (bad < 5) $display("word %0d %h tag %0d/%0b exp %0d/%0b", i, f_data_q[i], f_sel_q[i], f_first_q[i], es, ef);
          end
          if (f_sel_q[i] == 2'd1) n1++;
          if (f_sel_q[i] == 2'd2) n2++;
        end
        chk(bad == 0, $sformatf("%0d words wrong or mistagged", bad));
        chk(n1 == 2 * 106 && n2 == 2 * 106, $sformatf("tagged %0d/%0d", n1, n2));
      end
      chk(cols == 2 && !err && f_restore, "swap-in status");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
