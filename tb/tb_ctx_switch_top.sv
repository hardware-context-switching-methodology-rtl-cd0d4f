// tb_ctx_switch_top: end-to-end test of the context-switching engine at its
// default sizes, against a behavioural model of the FPGA configuration port
// and of a task's flip-flops.
//
// The task is the up-counter example: 28 flip-flops in two CLB columns
// (major addresses 10 and 13), with the database of the example (16 entries,
// every register pair using both frames). A second round adds a third
// column whose registers use only the first frame, only the second frame,
// or both, so every Bit_Share_Flag code occurs.
// Each round: the task runs, a swap-out saves its state (checked bit by bit
// against the flip-flop values frozen by SHUTDOWN, in database order), the
// region is wiped as if another task had used it, and a swap-in downloads
// the task's bitstream with the saved state merged in (checked: the frames
// equal the bitstream except for the register bits, which carry the saved
// values, and START loads the flip-flops with the saved state).
// Byte counts are checked against the readback procedure: 4 bytes per
// command word (21 fixed + 6 per column) and 3 frames of 424 bytes per
// column read; the clock count of both operations is checked against one
// byte per CCLK (two clocks), plus BUSY bytes and a few clocks per column.
// Mechanisms counted, each of which must occur: BUSY on a write byte, BUSY
// on a read byte, pad frames dropped, frame-1-only, frame-2-only and
// both-frame registers, back-to-back column reads, restore of a register bit.
module tb_ctx_switch_top;
  import ctx_pkg::*;

  localparam int NREGS = 33;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // DUT
  logic        db_we = 0;  logic [7:0] db_waddr = 0; db_entry_t db_wdata = '0; logic [8:0] db_len = 0;
  logic        bs_we = 0;  logic [15:0] bs_waddr = 0; logic [31:0] bs_wdata = 0; logic [16:0] bs_len = 0;
  logic        swap_out = 0, swap_in = 0;
  logic        busy, done, err, wr_byte, rd_byte;
  logic [10:0] nregs;
  logic [7:0]  cols;
  logic [9:0]  st_raddr = 0;
  logic        st_rdata;
  logic        cclk, cs_b, rdwr_b, d_oe, busy_pin, init_b;
  logic [7:0]  d_o, d_i;

  ctx_switch_top u_dut (
    .clk, .rst_n, .db_we, .db_waddr, .db_wdata, .db_len, .bs_we, .bs_waddr, .bs_wdata, .bs_len,
    .swap_out, .swap_in, .busy, .done, .err, .nregs, .cols, .wr_byte, .rd_byte,
    .st_raddr, .st_rdata, .cclk, .cs_b, .rdwr_b, .d_o, .d_oe, .d_i, .busy_pin, .init_b
  );

  // model
  logic        busy_en = 0;
  logic [31:0] loc_far [NREGS];
  logic [11:0] loc_bit [NREGS];
  logic [NREGS-1:0] ff;
  logic        running;

  v2_config_model #(.NREGS(NREGS)) u_fpga (
    .clk, .cclk, .cs_b, .rdwr_b, .d_in(d_o), .d_out(d_i), .busy(busy_pin), .init_b,
    .busy_en, .loc_far, .loc_bit, .ff, .running
  );

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------------ reference data
  function automatic logic [31:0] fa(input int mja, input int mna);
    return (32'(mja) << 17) | (32'(mna) << 9);
  endfunction
  function automatic int bidx(input int x_odd, input int y);
    return (x_odd ? 116 : 118) + 40 * (79 - y);
  endfunction

  // up-counter database, as listed for the example
  string tab6 [16] = '{"0000101001", "1111001111", "1101001111", "0000110101",
                       "1101001111", "1101001110", "1101001101", "1101001100",
                       "1101001011", "1101001010", "1101001001", "1101001000",
                       "1101000111", "1101000110", "1101000101", "1101000100"};
  db_entry_t db [32];
  int        ndb;

  function automatic db_entry_t from_str(input string s);
    logic [9:0] v = '0;
    for (int i = 0; i < 10; i++) v = {v[8:0], (s[i] == "1")};
    return db_entry_t'(v);
  endfunction

  initial begin
    // u1: QN<0>, QN<1>, QN<3>, QN<4>
    loc_far[0] = fa(10, 1); loc_bit[0] = 12'(bidx(1, 79));
    loc_far[1] = fa(10, 2); loc_bit[1] = 12'(bidx(1, 79));
    loc_far[2] = fa(10, 1); loc_bit[2] = 12'(bidx(0, 79));
    loc_far[3] = fa(10, 2); loc_bit[3] = 12'(bidx(0, 79));
    // u2: 24 counter bits in slice column X20, rows 68..79
    for (int j = 0; j < 24; j++) begin
      loc_far[4 + j] = fa(13, (j % 2) ? 2 : 1);
      loc_bit[4 + j] = 12'(bidx(0, 68 + j / 2));
    end
    // third column (major address 16)
    loc_far[28] = fa(16, 1); loc_bit[28] = 12'(bidx(1, 50));
    loc_far[29] = fa(16, 2); loc_bit[29] = 12'(bidx(0, 50));
    loc_far[30] = fa(16, 1); loc_bit[30] = 12'(bidx(0, 40));
    loc_far[31] = fa(16, 2); loc_bit[31] = 12'(bidx(0, 40));
    loc_far[32] = fa(16, 2); loc_bit[32] = 12'(bidx(1, 10));
  end

  // ------------------------------------------------------ statistics
  int n_wr_bytes, n_rd_bytes, n_wr_busy, n_rd_busy, n_cycles;
  always @(posedge clk) begin
    if (wr_byte) n_wr_bytes++;
    if (rd_byte) n_rd_bytes++;
    if (busy) n_cycles++;
    if (u_dut.u_smap_port.state == 2'd2 && busy_pin) begin
      if (rdwr_b) n_rd_busy++; else n_wr_busy++;
    end
  end
  int tot_wr_busy, tot_rd_busy, n_pad, n_f1only, n_f2only, n_both, n_backtoback, n_restored;

  // ------------------------------------------------------ helpers
  task automatic load_db(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk); db_we = 1; db_waddr = 8'(i); db_wdata = db[i];
    end
    @(negedge clk); db_we = 0; db_len = 9'(n);
  endtask

  logic [31:0] gen [3][22][106];
  int          cols_mja [3];

  task automatic load_bitstream(input int ncol);
    int p = 0;
    task_put(p, 32'hFFFF_FFFF); task_put(p, SYNC_WORD);
    task_put(p, WR_CMD_HDR); task_put(p, CMD_RCRC);
    for (int c = 0; c < ncol; c++) begin
      task_put(p, WR_FAR_HDR); task_put(p, fa(cols_mja[c], 0));
      task_put(p, WR_CMD_HDR); task_put(p, 32'h1);               // WCFG
      task_put(p, 32'h3000_4000);                                // write FDRI, 0 words
      task_put(p, 32'h5000_0000 | 32'(23 * 106));                // 22 frames + pad
      for (int m = 0; m < 22; m++)
        for (int w = 0; w < 106; w++) task_put(p, gen[c][m][w]);
      for (int w = 0; w < 106; w++) task_put(p, 32'h0);
    end
    task_put(p, WR_CMD_HDR); task_put(p, CMD_START);
    task_put(p, WR_CMD_HDR); task_put(p, CMD_DESYNCH);
    task_put(p, NOOP_WORD);  task_put(p, NOOP_WORD);
    @(negedge clk); bs_we = 0; bs_len = 17'(p);
  endtask

  task automatic task_put(inout int p, input logic [31:0] w);
    @(negedge clk); bs_we = 1; bs_waddr = 16'(p); bs_wdata = w; p++;
  endtask

  function automatic int find_reg(input logic [31:0] f, input int b);
    for (int k = 0; k < NREGS; k++) if (loc_far[k] == f && int'(loc_bit[k]) == b) return k;
    return -1;
  endfunction

  // expected register order in state memory: per column, frame-1 bits then
  // frame-2 bits, in database order
  int order [64];
  int norder;
  task automatic build_order();
    int i = 0;
    norder = 0;
    while (i < ndb) begin
      int mja = int'(db[i].body[7:2]), mna = int'(db[i].body[1:0]);
      int j;
      j = i + 1;
      while (j < ndb && db[j].flag != FLAG_FRAME_ADDR) j++;
      for (int e = i + 1; e < j; e++) if (db[e].flag[0]) begin
        order[norder++] = find_reg(fa(mja, mna), bidx(db[e].body[7], int'(db[e].body[6:0])));
        if (db[e].flag == FLAG_FIRST) n_f1only++; else n_both++;
      end
      for (int e = i + 1; e < j; e++) if (db[e].flag[1]) begin
        order[norder++] = find_reg(fa(mja, mna + 1), bidx(db[e].body[7], int'(db[e].body[6:0])));
        if (db[e].flag == FLAG_SECOND) n_f2only++;
      end
      i = j;
    end
  endtask

  // ------------------------------------------------------ one round
  task automatic round(input int ncol, input logic with_busy);
    logic [NREGS-1:0] snap;
    int t0, wr0, rd0;
    busy_en = with_busy;
    build_order();
    for (int c = 0; c < ncol; c++)
      for (int m = 0; m < 22; m++)
        for (int w = 0; w < 106; w++) gen[c][m][w] = $urandom;
    // register bits in the bitstream hold 0
    for (int k = 0; k < NREGS; k++)
      for (int c = 0; c < ncol; c++)
        if (int'(loc_far[k][24:17]) == cols_mja[c])
          gen[c][loc_far[k][16:9]][loc_bit[k] / 32][31 - (loc_bit[k] % 32)] = 1'b0;
    load_bitstream(ncol);

    // ---- swap-out
    repeat (50) @(posedge clk);
    wr0 = n_wr_bytes; rd0 = n_rd_bytes; n_cycles = 0; n_wr_busy = 0; n_rd_busy = 0;
    @(negedge clk); swap_out = 1; @(negedge clk); swap_out = 0;
    wait (!running);
    repeat (3) @(posedge clk);
    snap = ff;
    wait (done);
    @(negedge clk);
    check(!err, "swap-out error flag");
    check(int'(cols) == ncol, $sformatf("columns read %0d", cols));
    check(int'(nregs) == norder, $sformatf("registers saved %0d exp %0d", nregs, norder));
    for (int i = 0; i < norder; i++) begin
      st_raddr = 10'(i);
      #1;
      check(order[i] >= 0 && st_rdata == snap[order[i]],
            $sformatf("state bit %0d (reg %0d): %0b exp %0b", i, order[i], st_rdata, snap[order[i]]));
    end
    check(n_wr_bytes - wr0 == 4 * (21 + 6 * ncol),
          $sformatf("command bytes %0d", n_wr_bytes - wr0));
    check(n_rd_bytes - rd0 == 3 * ncol * FRAME_BYTES,
          $sformatf("read bytes %0d", n_rd_bytes - rd0));
    // two clocks per byte, two per BUSY byte, a few per word and column
    check(n_cycles <= 2 * (n_wr_bytes - wr0 + n_rd_bytes - rd0 + n_wr_busy + n_rd_busy)
                      + 12 * ncol + 30,
          $sformatf("swap-out took %0d clocks", n_cycles));
    $display("swap-out: %0d columns, %0d registers, %0d command bytes, %0d read bytes, %0d clocks",
             ncol, nregs, n_wr_bytes - wr0, n_rd_bytes - rd0, n_cycles);
    n_pad += ncol;
    if (ncol > 1) n_backtoback++;
    check(running, "task runs again after swap-out");
    check(ff - snap < NREGS'(5000), "task resumes from its captured state");

    // ---- another task uses the region
    repeat (20) @(posedge clk);
    u_fpga.wipe();
    repeat (5) @(posedge clk);
    check(ff == '0, "region wiped");

    // ---- swap-in
    tot_wr_busy += n_wr_busy; tot_rd_busy += n_rd_busy;
    wr0 = n_wr_bytes; n_cycles = 0; n_wr_busy = 0; n_rd_busy = 0;
    @(negedge clk); swap_in = 1; @(negedge clk); swap_in = 0;
    wait (done);
    @(negedge clk);
    check(n_wr_bytes - wr0 == 4 * int'(bs_len), $sformatf("swap-in bytes %0d", n_wr_bytes - wr0));
    check(n_cycles <= 2 * (n_wr_bytes - wr0 + n_wr_busy) + 30,
          $sformatf("swap-in took %0d clocks", n_cycles));
    $display("swap-in: %0d bitstream bytes, %0d clocks", n_wr_bytes - wr0, n_cycles);
    check(!err, "swap-in error flag");
    check(int'(cols) == ncol, $sformatf("columns restored %0d", cols));
    check(int'(nregs) == norder, $sformatf("registers restored %0d", nregs));
    for (int i = 0; i < norder; i++) begin
      check(u_fpga.load_val[order[i]] == snap[order[i]],
            $sformatf("restored reg %0d: %0b exp %0b", order[i], u_fpga.load_val[order[i]], snap[order[i]]));
      n_restored++;
    end
    begin
      int bad = 0;
      for (int c = 0; c < ncol; c++)
        for (int m = 0; m < 22; m++)
          for (int w = 0; w < 106; w++) begin
            logic [31:0] e = gen[c][m][w];
            for (int k = 0; k < NREGS; k++)
              if (loc_far[k] == fa(cols_mja[c], m) && int'(loc_bit[k]) / 32 == w && find_in_order(k))
                e[31 - (loc_bit[k] % 32)] = snap[k];
            if (u_fpga.fmem[cols_mja[c]][m][w] != e) bad++;
          end
      check(bad == 0, $sformatf("%0d configuration words differ after swap-in", bad));
    end
    check(running, "task runs after swap-in");
    tot_wr_busy += n_wr_busy; tot_rd_busy += n_rd_busy;
  endtask

  function automatic logic find_in_order(input int k);
    for (int i = 0; i < norder; i++) if (order[i] == k) return 1'b1;
    return 1'b0;
  endfunction

  // ------------------------------------------------------ main
  initial begin
    u_fpga.ff = NREGS'(33'h1_2345_6789);
    repeat (4) @(posedge clk);
    rst_n = 1;
    // round 1: the up-counter database as given
    ndb = 16;
    for (int i = 0; i < 16; i++) db[i] = from_str(tab6[i]);
    cols_mja[0] = 10; cols_mja[1] = 13;
    load_db(ndb);
    round(2, 1'b0);
    // round 2: a third column with first-only, second-only and shared rows
    db[16] = '{FLAG_FRAME_ADDR, {6'd16, 2'd1}};
    db[17] = '{FLAG_FIRST,  {1'b1, 7'd50}};
    db[18] = '{FLAG_SECOND, {1'b0, 7'd50}};
    db[19] = '{FLAG_BOTH,   {1'b0, 7'd40}};
    db[20] = '{FLAG_SECOND, {1'b1, 7'd10}};
    ndb = 21;
    cols_mja[2] = 16;
    load_db(ndb);
    round(3, 1'b1);

    check(tot_wr_busy > 0, "BUSY on a write byte never happened");
    check(tot_rd_busy > 0, "BUSY on a read byte never happened");
    check(n_pad > 0, "no pad frame dropped");
    check(n_f1only > 0, "no first-frame-only register");
    check(n_f2only > 0, "no second-frame-only register");
    check(n_both > 0, "no register pair sharing a row");
    check(n_backtoback > 0, "no multi-column readback");
    check(n_restored > 0, "no register restored");
    $display("mechanisms: wr_busy=%0d rd_busy=%0d pad=%0d first_only=%0d second_only=%0d both=%0d multi_col=%0d restored=%0d",
             tot_wr_busy, tot_rd_busy, n_pad, n_f1only, n_f2only, n_both, n_backtoback, n_restored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
