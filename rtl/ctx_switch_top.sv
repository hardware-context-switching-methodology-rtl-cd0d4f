// ctx_switch_top: hardware context-switching engine for a dynamically
// partially reconfigurable FPGA.
//
// The engine suspends a hardware task, saves the values of its flip-flops
// and later restores them, entirely through the FPGA's SelectMAP
// configuration port, without any extra access logic inside the task. A
// database written from the task's logic allocation file tells the engine
// which CLB columns hold the task's registers and, for each register, its
// slice row and slice-column parity; from these the state filter computes
// the bit position inside the configuration frame. Both register frames of
// a column (XQ and YQ) are read with one frame address and one pad frame.
//
// Blocks: command ROM, database memory, state memory, bitstream memory
// (task.bit), the controller (readback and configuration sequencing), the
// state filter (bit-index parameter RAM and bit-index calculation) and the
// SelectMAP master.
//
// Host interface: load the database (db_we/db_waddr/db_wdata, db_len
// entries) and the task's bitstream (bs_we/bs_waddr/bs_wdata, bs_len words);
// pulse swap_out to save the task's state, swap_in to configure the task
// again with the saved state merged in. busy, done (one-clock pulse), err,
// nregs (state bits saved or restored) and cols (register columns handled)
// report progress; wr_byte / rd_byte strobe once per byte moved over
// SelectMAP; st_raddr/st_rdata read the state memory while idle.
// SelectMAP pins: cclk, cs_b, rdwr_b, d_o/d_oe/d_i (the bidirectional D bus
// split at the pads), busy_pin, init_b.
module ctx_switch_top
  import ctx_pkg::*;
#(
  parameter int unsigned DB_DEPTH   = 256,
  parameter int unsigned SM_DEPTH   = 1024,
  parameter int unsigned PARA_DEPTH = 160,
  parameter int unsigned BS_DEPTH   = 65536,
  localparam int unsigned DB_AW     = $clog2(DB_DEPTH),
  localparam int unsigned SM_AW     = $clog2(SM_DEPTH),
  localparam int unsigned BS_AW     = $clog2(BS_DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  // host: database and bitstream loading
  input  logic             db_we,
  input  logic [DB_AW-1:0] db_waddr,
  input  db_entry_t        db_wdata,
  input  logic [DB_AW:0]   db_len,
  input  logic             bs_we,
  input  logic [BS_AW-1:0] bs_waddr,
  input  logic [31:0]      bs_wdata,
  input  logic [BS_AW:0]   bs_len,
  // host: control and status
  input  logic             swap_out,
  input  logic             swap_in,
  output logic             busy,
  output logic             done,
  output logic             err,
  output logic [SM_AW:0]   nregs,
  output logic [7:0]       cols,
  output logic             wr_byte,
  output logic             rd_byte,
  input  logic [SM_AW-1:0] st_raddr,
  output logic             st_rdata,
  // SelectMAP
  output logic             cclk,
  output logic             cs_b,
  output logic             rdwr_b,
  output logic [7:0]       d_o,
  output logic             d_oe,
  input  logic [7:0]       d_i,
  input  logic             busy_pin,
  input  logic             init_b
);

  // ROM
  logic [4:0]       rom_addr;
  logic [31:0]      rom_data;
  // database
  logic [DB_AW-1:0] db_raddr;
  db_entry_t        db_rdata;
  logic             db_end, db_adv;
  // bitstream
  logic [BS_AW-1:0] bs_raddr;
  logic [31:0]      bs_rdata;
  // filter
  logic             f_restore, f_clear, f_in_valid, f_in_first, f_in_ready;
  logic [31:0]      f_in_data, f_out_data;
  logic [1:0]       f_in_sel;
  logic             f_out_valid, f_out_ready, f_idle, f_err;
  // state memory
  logic             sm_en, sm_we, sm_din, sm_dout;
  logic [SM_AW-1:0] sm_addr, f_sm_addr;
  // port
  logic             p_tx_valid, p_tx_ready, p_rd_start, p_rx_valid, p_rx_ready, p_idle;
  logic [31:0]      p_tx_data, p_rx_data;
  logic [15:0]      p_rd_words;
  logic             ctl_err;

  cmd_rom u_cmd_rom (.addr(rom_addr), .data(rom_data));

  db_mem #(.DEPTH(DB_DEPTH)) u_db_mem (
    .clk, .we(db_we), .waddr(db_waddr), .wdata(db_wdata),
    .raddr(db_raddr), .rdata(db_rdata)
  );

  bitstream_mem #(.DEPTH(BS_DEPTH)) u_bitstream_mem (
    .clk, .we(bs_we), .waddr(bs_waddr), .wdata(bs_wdata),
    .raddr(bs_raddr), .rdata(bs_rdata)
  );

  // The host reads the state memory only while the engine is idle.
  assign sm_addr  = busy ? f_sm_addr : st_raddr;
  assign st_rdata = sm_dout;

  state_mem #(.DEPTH(SM_DEPTH)) u_state_mem (
    .clk, .en(sm_en), .we(sm_we), .addr(sm_addr), .din(sm_din), .dout(sm_dout)
  );

  state_filter #(.SM_DEPTH(SM_DEPTH), .PARA_DEPTH(PARA_DEPTH)) u_state_filter (
    .clk, .rst_n,
    .restore (f_restore), .clear(f_clear),
    .in_valid(f_in_valid), .in_data(f_in_data), .in_sel(f_in_sel),
    .in_first(f_in_first), .in_ready(f_in_ready),
    .out_valid(f_out_valid), .out_data(f_out_data), .out_ready(f_out_ready),
    .db_data (db_rdata), .db_end(db_end), .db_adv(db_adv),
    .sm_en, .sm_we, .sm_addr(f_sm_addr), .sm_din, .sm_dout,
    .idle(f_idle), .err(f_err), .nregs(nregs)
  );

  ctx_controller #(.DB_DEPTH(DB_DEPTH), .BS_DEPTH(BS_DEPTH)) u_ctrl (
    .clk, .rst_n,
    .swap_out, .swap_in, .db_len, .bs_len,
    .busy, .done, .err(ctl_err), .cols, .init_b,
    .rom_addr, .rom_data,
    .db_addr(db_raddr), .db_data(db_rdata), .db_end, .db_adv,
    .bs_addr(bs_raddr), .bs_data(bs_rdata),
    .f_restore, .f_clear, .f_in_valid, .f_in_data, .f_in_sel, .f_in_first,
    .f_in_ready, .f_out_valid, .f_out_data, .f_out_ready, .f_idle,
    .p_tx_valid, .p_tx_data, .p_tx_ready, .p_rd_start, .p_rd_words,
    .p_rx_valid, .p_rx_data, .p_rx_ready, .p_idle
  );

  smap_port #(.CNT_W(16)) u_smap_port (
    .clk, .rst_n,
    .tx_valid(p_tx_valid), .tx_data(p_tx_data), .tx_ready(p_tx_ready),
    .rd_start(p_rd_start), .rd_words(p_rd_words),
    .rx_valid(p_rx_valid), .rx_data(p_rx_data), .rx_ready(p_rx_ready),
    .idle(p_idle), .wr_byte, .rd_byte,
    .cclk, .cs_b, .rdwr_b, .d_o, .d_oe, .d_i, .busy(busy_pin)
  );

  assign err = ctl_err || f_err;

endmodule
