// state_filter: picks the task's register bits out of the register frames
// (swap-out) or writes saved register bits into them (swap-in).
//
// How it works. Configuration words stream through a one-word holding
// register. Each word is tagged with the frame it belongs to: 0 = not a
// register frame (commands, pad frames, other frames), 1 = the first
// register frame of a column (XQ, minor address MNA), 2 = the second one
// (YQ, MNA+1); the first word of a register frame is also marked. When the
// first word of frame 1 arrives the filter starts walking the database
// entries that follow the column's frame address, one entry per clock:
//   * flag bit 0 set (01, 11): the register has a bit in frame 1. The bit
//     index is computed from (X_oe, Y_row) by bitidx_calc; when the held
//     word is the one that holds it, the bit is copied to state memory
//     (swap-out) or replaced by the next state-memory bit (swap-in);
//   * flag bit 1 set (10, 11): the parameter is also copied into the
//     bit-index parameter RAM (para_ram) for frame 2.
// The walk ends at the next frame-address entry or the end of the database,
// which leaves the database pointer on the next column. Frame 2 is handled
// the same way from para_ram. A word leaves the filter as soon as no
// pending entry points into it. Entries must be in ascending bit-index
// order inside a column, as the database generator lists them; an entry
// whose word has already gone by, or whose Y_row exceeds 79, is skipped and
// raises err.
//
// The split into database walk, parameter RAM and calculation unit follows
// the state-filter description; the one-word buffer, the valid/ready
// handshakes and the error flag are this design's choices.
//
// Interface:
//   restore      0 = swap-out (read bits), 1 = swap-in (write bits)
//   clear        resets the state-memory pointer and the error flag
//   in_*         word stream in (valid/ready), with in_sel and in_first tags
//   out_*        word stream out (valid/ready); words are unchanged on
//                swap-out and carry the restored bits on swap-in
//   db_data / db_end / db_adv  the database entry at the controller's
//                pointer, end-of-database, and a request to advance it
//   sm_*         state memory port
//   idle         no word held and no column walk in progress
//   nregs        number of state bits read or written since clear
// Timing: a word is accepted at most every other clock; each register bit
// found in a word costs one more clock before the word is released.
module state_filter
  import ctx_pkg::*;
#(
  parameter int unsigned SM_DEPTH   = 1024,
  parameter int unsigned PARA_DEPTH = 160,
  localparam int unsigned SM_AW     = $clog2(SM_DEPTH),
  localparam int unsigned PA_AW     = $clog2(PARA_DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             restore,
  input  logic             clear,
  // word stream in
  input  logic             in_valid,
  input  logic [31:0]      in_data,
  input  logic [1:0]       in_sel,
  input  logic             in_first,
  output logic             in_ready,
  // word stream out
  output logic             out_valid,
  output logic [31:0]      out_data,
  input  logic             out_ready,
  // database read
  input  db_entry_t        db_data,
  input  logic             db_end,
  output logic             db_adv,
  // state memory
  output logic             sm_en,
  output logic             sm_we,
  output logic [SM_AW-1:0] sm_addr,
  output logic             sm_din,
  input  logic             sm_dout,
  // status
  output logic             idle,
  output logic             err,
  output logic [SM_AW:0]   nregs
);

  // held word
  logic                    hv;
  logic [31:0]             hw;
  logic [1:0]              h_sel;
  logic [WORD_IDX_W-1:0]   h_idx;
  logic [WORD_IDX_W-1:0]   wcnt;

  // column walk
  logic                    pass_act;
  logic [1:0]              pass_sel;
  logic [PA_AW:0]          wp, rp;
  logic [SM_AW:0]          sp;

  // current entry
  bit_param_t              cur_param;
  logic                    cur_end;      // no entry left in this walk
  logic                    cur_bit;      // entry has a bit in this frame
  logic                    cur_copy;     // entry must be kept for frame 2
  bit_param_t              pr_rdata;
  logic [WORD_IDX_W-1:0]   tgt_word;
  logic [4:0]              tgt_bit;
  logic                    bad_row;

  // What the current entry does this clock.
  logic on_word;   // its bit is in the held word
  logic missed;    // its word already went by, or its row is impossible
  logic step;      // the entry is finished this clock
  logic hit;       // a bit is read or written this clock
  logic release_w; // the held word has no pending entry

  para_ram #(.DEPTH(PARA_DEPTH)) u_para_ram (
    .clk   (clk),
    .we    (pass_act && pass_sel == 2'd1 && !cur_end && cur_copy && step),
    .waddr (wp[PA_AW-1:0]),
    .wdata (cur_param),
    .raddr (rp[PA_AW-1:0]),
    .rdata (pr_rdata)
  );

  bitidx_calc u_calc (
    .param        (cur_param),
    .bit_index    (),
    .word_index   (tgt_word),
    .bit_in_word  (tgt_bit),
    .out_of_range (bad_row)
  );

  always_comb begin
    if (pass_sel == 2'd1) begin
      cur_param = bit_param_t'(db_data.body);
      cur_end   = db_end || (db_data.flag == FLAG_FRAME_ADDR);
      cur_bit   = db_data.flag[0];
      cur_copy  = db_data.flag[1];
    end else begin
      cur_param = pr_rdata;
      cur_end   = (rp == wp);
      cur_bit   = 1'b1;
      cur_copy  = 1'b0;
    end
  end


  always_comb begin
    logic walking;
    walking   = pass_act && !cur_end;
    on_word   = hv && h_sel == pass_sel && h_idx == tgt_word;
    missed    = bad_row || (hv && h_sel == pass_sel && h_idx > tgt_word);
    step      = walking && (!cur_bit || on_word || missed);
    hit       = walking && cur_bit && on_word && !bad_row;
    release_w = hv && (h_sel == 2'd0 || h_sel != pass_sel || !walking ||
                       (cur_bit && !bad_row && tgt_word > h_idx));
  end

  assign in_ready  = !hv && !(in_first && in_sel != 2'd0 && pass_act);
  assign out_valid = release_w;
  assign out_data  = hw;
  assign db_adv    = step && pass_sel == 2'd1;
  assign idle      = !hv && !pass_act;
  assign nregs     = sp;

  assign sm_en   = hit;
  assign sm_we   = hit && !restore;
  assign sm_addr = sp[SM_AW-1:0];
  assign sm_din  = hw[5'd31 - tgt_bit];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hv       <= 1'b0;
      hw       <= '0;
      h_sel    <= '0;
      h_idx    <= '0;
      wcnt     <= '0;
      pass_act <= 1'b0;
      pass_sel <= 2'd1;
      wp       <= '0;
      rp       <= '0;
      sp       <= '0;
      err      <= 1'b0;
    end else begin
      if (clear) begin
        sp  <= '0;
        err <= 1'b0;
      end
      // accept a word
      if (in_valid && in_ready) begin
        hv    <= 1'b1;
        hw    <= in_data;
        h_sel <= in_sel;
        if (in_first) begin
          h_idx <= '0;
          wcnt  <= WORD_IDX_W'(1);
        end else begin
          h_idx <= wcnt;
          wcnt  <= wcnt + 1'b1;
        end
        if (in_first && in_sel != 2'd0) begin
          pass_act <= 1'b1;
          pass_sel <= in_sel;
          if (in_sel == 2'd1) wp <= '0;
          else                rp <= '0;
        end
      end else if (out_valid && out_ready) begin
        hv <= 1'b0;
      end
      // walk the entries
      if (pass_act && cur_end) pass_act <= 1'b0;
      if (step) begin
        if (pass_sel == 2'd1 && cur_copy) wp <= wp + 1'b1;
        if (pass_sel == 2'd2)             rp <= rp + 1'b1;
        if (missed && !on_word || bad_row) err <= 1'b1;
      end
      if (hit) begin
        if (restore) hw[5'd31 - tgt_bit] <= sm_dout;
        if (sp == (SM_AW+1)'(SM_DEPTH)) err <= 1'b1;
        else                            sp  <= sp + 1'b1;
      end
    end
  end

  // A register frame is entered only after the previous walk finished.
  assert property (@(posedge clk) disable iff (!rst_n)
                   in_valid && in_ready && in_first && in_sel != 2'd0 |-> !pass_act);

endmodule
