// tb_workloads: runs the four example task sizes through the whole engine at
// default parameters: up-counter (28 flip-flops, 2 CLB columns, 16 database
// entries), 16-bit divider (40, 10 columns, 42 entries), LED display control
// (46, 9 columns, 40 entries) and 32-bit divider (73, 14 columns, 68
// entries). Only the counts come from the examples; the placement of the
// registers is generated: slices fill the columns in turn from row 79
// downwards, the first (flip-flops - slices) slices use both registers and
// the others alternate between XQ only and YQ only.
// For each size: database size in bits (10 per entry), frames read (3 per
// column), read and command bytes, saved state against the frozen
// flip-flops, and after a wipe and swap-in the restored flip-flops. The
// SelectMAP time of the readback at 50 MHz (one byte per CCLK) is printed
// next to the estimate 4 x commands / f + 3 x columns x 424 / f, and the
// swap-in time next to 22 x columns x 424 / f. The generated bitstream
// rewrites 23 frames per column (22 plus the pad frame that flushes the
// frame buffer) and has all register bits 0, so every restored 1 comes from
// the saved state.
module tb_workloads;
  import ctx_pkg::*;

  localparam int NREGS = 73;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

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

  function automatic logic [31:0] fa(input int mja, input int mna);
    return (32'(mja) << 17) | (32'(mna) << 9);
  endfunction

  int n_wr, n_rd, n_cyc;
  always @(posedge clk) begin
    if (wr_byte) n_wr++;
    if (rd_byte) n_rd++;
    if (busy) n_cyc++;
  end

  db_entry_t db [256];
  int        ndb, nreg_used;
  int        order [NREGS];
  int        col_mja [16];

  // Build database, register placement and expected save order.
  task automatic build(input int ncol, input int nff, input int nslice);
    int nboth = nff - nslice;
    int r = 0, s = 0, o = 0;
    int per [16];
    for (int c = 0; c < ncol; c++) per[c] = 0;
    for (int i = 0; i < nslice; i++) per[i % ncol]++;
    ndb = 0;
    for (int k = 0; k < NREGS; k++) begin loc_far[k] = fa(40, 5); loc_bit[k] = 12'(k); end
    for (int c = 0; c < ncol; c++) begin
      int first_reg [80], second_reg [80], nf = 0, ns = 0;
      col_mja[c] = 4 + 2 * c;
      db[ndb++] = '{FLAG_FRAME_ADDR, {6'(col_mja[c]), 2'd1}};
      for (int k = 0; k < per[c]; k++) begin
        logic x_odd = k[0];
        int y = 79 - k;
        int b = (x_odd ? 116 : 118) + 40 * (79 - y);
        share_flag_e f;
        if (s < nboth) f = FLAG_BOTH;
        else f = ((s - nboth) % 2 == 0) ? FLAG_FIRST : FLAG_SECOND;
        s++;
        db[ndb++] = '{f, {x_odd, 7'(y)}};
        if (f[0]) begin loc_far[r] = fa(col_mja[c], 1); loc_bit[r] = 12'(b); first_reg[nf++] = r; r++; end
        if (f[1]) begin loc_far[r] = fa(col_mja[c], 2); loc_bit[r] = 12'(b); second_reg[ns++] = r; r++; end
      end
      for (int i = 0; i < nf; i++) order[o++] = first_reg[i];
      for (int i = 0; i < ns; i++) order[o++] = second_reg[i];
    end
    nreg_used = r;
  endtask

  task automatic run(input string name, input int ncol, input int nff, input int nslice,
                     input int db_bits, input int frames, input int rd_bytes, input int cmd5_bytes);
    logic [NREGS-1:0] snap;
    int wr0, rd0, p, t_rd;
    build(ncol, nff, nslice);
    check(nreg_used == nff, $sformatf("%s: %0d flip-flops placed", name, nreg_used));
    check(10 * ndb == db_bits, $sformatf("%s: database %0d bits, listed %0d", name, 10 * ndb, db_bits));
    for (int i = 0; i < ndb; i++) begin
      @(negedge clk); db_we = 1; db_waddr = 8'(i); db_wdata = db[i];
    end
    @(negedge clk); db_we = 0; db_len = 9'(ndb);
    // bitstream: every column rewritten, register bits 0
    p = 0;
    put(p, 32'hFFFF_FFFF); put(p, SYNC_WORD); put(p, WR_CMD_HDR); put(p, CMD_RCRC);
    for (int c = 0; c < ncol; c++) begin
      put(p, WR_FAR_HDR); put(p, fa(col_mja[c], 0)); put(p, WR_CMD_HDR); put(p, 32'h1);
      put(p, 32'h3000_4000); put(p, 32'h5000_0000 | 32'(23 * 106));
      for (int w = 0; w < 23 * 106; w++) put(p, (w >= 106 && w < 3 * 106) ? 32'h0 : $urandom);
    end
    put(p, WR_CMD_HDR); put(p, CMD_START); put(p, WR_CMD_HDR); put(p, CMD_DESYNCH);
    put(p, NOOP_WORD); put(p, NOOP_WORD);
    @(negedge clk); bs_we = 0; bs_len = 17'(p);

    // swap-out
    repeat (30) @(posedge clk);
    wr0 = n_wr; rd0 = n_rd; n_cyc = 0;
    @(negedge clk); swap_out = 1; @(negedge clk); swap_out = 0;
    wait (!running); repeat (3) @(posedge clk); snap = ff;
    wait (done); @(negedge clk);
    check(!err && int'(cols) == ncol && int'(nregs) == nff, $sformatf("%s: swap-out status", name));
    check(3 * ncol == frames, $sformatf("%s: %0d frames read, listed %0d", name, 3 * ncol, frames));
    check(n_rd - rd0 == rd_bytes, $sformatf("%s: %0d bytes read, listed %0d", name, n_rd - rd0, rd_bytes));
    check(n_wr - wr0 == 4 * (21 + 6 * ncol), $sformatf("%s: %0d command bytes", name, n_wr - wr0));
    for (int i = 0; i < nff; i++) begin
      st_raddr = 10'(i); #1;
      check(st_rdata == snap[order[i]], $sformatf("%s: saved bit %0d", name, i));
    end
    $display("%s: %0d columns, %0d flip-flops, database %0d bits, %0d frames, %0d read bytes, %0d command bytes (listed with 5 words per column: %0d)",
             name, ncol, nff, 10 * ndb, 3 * ncol, n_rd - rd0, n_wr - wr0, cmd5_bytes);
    $display("%s: readback %0d CCLK cycles = %0.2f us at 50 MHz; estimate %0.2f us",
             name, n_cyc / 2, real'(n_cyc) / 2.0 / 50.0, real'(n_wr - wr0 + rd_bytes) / 50.0);
    t_rd = n_cyc;
    check(n_cyc / 2 <= (n_wr - wr0) + (n_rd - rd0) + 6 * ncol + 15, $sformatf("%s: readback rate", name));

    // wipe and swap-in
    repeat (10) @(posedge clk);
    u_fpga.wipe();
    repeat (5) @(posedge clk);
    wr0 = n_wr; n_cyc = 0;
    @(negedge clk); swap_in = 1; @(negedge clk); swap_in = 0;
    wait (done); @(negedge clk);
    check(n_wr - wr0 == 4 * p, $sformatf("%s: %0d bitstream bytes written", name, n_wr - wr0));
    check(n_cyc / 2 <= 4 * p + 20, $sformatf("%s: swap-in rate", name));
    $display("%s: swap-in %0d bytes, %0d CCLK cycles = %0.2f us; 22 frames per column alone: %0.2f us; readback plus swap-in %0.2f us",
             name, n_wr - wr0, n_cyc / 2, real'(n_cyc) / 2.0 / 50.0, real'(22 * ncol * 424) / 50.0,
             real'(t_rd + n_cyc) / 2.0 / 50.0);
    check(!err && int'(nregs) == nff, $sformatf("%s: swap-in status", name));
    for (int i = 0; i < nff; i++)
      check(u_fpga.load_val[order[i]] == snap[order[i]], $sformatf("%s: restored reg %0d", name, order[i]));
    repeat (20) @(posedge clk);
  endtask

  task automatic put(inout int p, input logic [31:0] w);
    @(negedge clk); bs_we = 1; bs_waddr = 16'(p); bs_wdata = w; p++;
  endtask

  initial begin
    u_fpga.ff = {$urandom, $urandom, $urandom};
    repeat (4) @(posedge clk);
    rst_n = 1;
    //   name               cols FFs slices DB bits frames read bytes cmd bytes
    run("up-counter",          2, 28, 14, 160, 6,  2544,  124);
    run("16-bit divider",     10, 40, 32, 420, 30, 12720, 284);
    run("LED display control", 9, 46, 31, 400, 27, 11448, 264);
    run("32-bit divider",     14, 73, 54, 680, 42, 17808, 364);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
