// ctx_controller: controller of readback (swap-out) and configuration
// (swap-in) for the context-switching engine.
//
// Swap-out. The controller sends the fixed readback words from the command
// ROM: synchronisation, SHUTDOWN (the task stops), RCRC, four NOOPs, CAPTURE
// (the flip-flop values are copied into the configuration memory) and RCFG.
// Then, for every frame-address entry in the database, it writes the FAR
// with that column's first register frame (minor address MNA), a Type 1
// read of FDRO, a Type 2 read of 318 words and two NOOPs, and reads the 318
// words back: one pad frame that flushes the frame buffer, the XQ frame
// (MNA) and the YQ frame (MNA+1). Reading both register frames with one
// frame address and one pad frame, instead of two separate reads, is the
// point of the method. The read words go to the state filter tagged pad /
// frame 1 / frame 2, and the filter stores the register bits in state
// memory and advances the database pointer to the next column. Last come
// START (the task runs again), RCRC, DESYNCH and two NOOPs.
//
// Swap-in. The controller streams the task's bitstream from bitstream
// memory through the state filter to the configuration port. A small packet
// tracker follows the bitstream (sync word, Type 1 / Type 2 headers, FAR and
// FDRI writes, DESYNCH) to know the frame address of every FDRI frame; when
// a frame is the first register frame of the next database column it is
// tagged frame 1, and the frame after it frame 2, so the filter writes the
// saved register values into the bits the flip-flops are initialised from.
// Frames are assumed to appear in the same ascending order as the database
// columns, which is the order in which bitstreams write them. The start-up
// sequence at the end of the bitstream then loads the flip-flops.
//
// Interface:
//   swap_out / swap_in      start pulses (ignored while busy; refused and
//                           flagged in err while INIT_B is low)
//   db_len, bs_len          number of database entries / bitstream words
//   busy, done, err, cols   status; cols counts the columns read back
//   rom_*, db_*, bs_*       read ports of the command ROM, database and
//                           bitstream memory; db_adv is the filter's request
//                           to step the database pointer
//   f_*                     state filter streams and status
//   p_*                     SelectMAP port streams and status; p_rd_words
//                           is always 318 here (the port takes any length)
// The command words and their order, the 318-word read and the frame
// tagging follow the document; the host handshake, the tracker and the
// error handling are this design's.
module ctx_controller
  import ctx_pkg::*;
#(
  parameter int unsigned DB_DEPTH = 256,
  parameter int unsigned BS_DEPTH = 65536,
  localparam int unsigned DB_AW   = $clog2(DB_DEPTH),
  localparam int unsigned BS_AW   = $clog2(BS_DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  // host
  input  logic             swap_out,
  input  logic             swap_in,
  input  logic [DB_AW:0]   db_len,
  input  logic [BS_AW:0]   bs_len,
  output logic             busy,
  output logic             done,
  output logic             err,
  output logic [7:0]       cols,
  input  logic             init_b,
  // command ROM
  output logic [4:0]       rom_addr,
  input  logic [31:0]      rom_data,
  // database
  output logic [DB_AW-1:0] db_addr,
  input  db_entry_t        db_data,
  output logic             db_end,
  input  logic             db_adv,
  // bitstream memory
  output logic [BS_AW-1:0] bs_addr,
  input  logic [31:0]      bs_data,
  // state filter
  output logic             f_restore,
  output logic             f_clear,
  output logic             f_in_valid,
  output logic [31:0]      f_in_data,
  output logic [1:0]       f_in_sel,
  output logic             f_in_first,
  input  logic             f_in_ready,
  input  logic             f_out_valid,
  input  logic [31:0]      f_out_data,
  output logic             f_out_ready,
  input  logic             f_idle,
  // SelectMAP port
  output logic             p_tx_valid,
  output logic [31:0]      p_tx_data,
  input  logic             p_tx_ready,
  output logic             p_rd_start,
  output logic [15:0]      p_rd_words,
  input  logic             p_rx_valid,
  input  logic [31:0]      p_rx_data,
  output logic             p_rx_ready,
  input  logic             p_idle
);

  typedef enum logic [3:0] {
    S_IDLE,
    S_RB_PRO,     // prologue words 0..12
    S_RB_COL,     // next column or epilogue
    S_RB_FARH,    // FAR header
    S_RB_FA,      // frame address from the database
    S_RB_RDH,     // words 14..17
    S_RB_WAITP,   // let the port finish writing
    S_RB_READ,    // 318 words back
    S_RB_EPI,     // epilogue words 18..25
    S_CF_RUN,     // bitstream words through the filter
    S_DRAIN       // wait until filter and port are empty
  } state_e;

  localparam logic [4:0] ROM_PRO_LAST = 5'd12;
  localparam logic [4:0] ROM_FAR_HDR  = 5'd13;
  localparam logic [4:0] ROM_TYPE2    = 5'd15;
  localparam logic [4:0] ROM_COL_LAST = 5'd17;
  localparam logic [4:0] ROM_EPI_LAST = 5'd25;
  localparam logic [15:0] RD_WORDS    = 16'(READ_WORDS);
  localparam logic [15:0] FW          = 16'(FRAME_WORDS);

  state_e          state;
  logic [4:0]      rom_addr_q;
  logic [DB_AW:0]  db_ptr;
  logic [BS_AW:0]  bs_ptr;
  logic [15:0]     rcnt;
  logic            ctl_err;

  // database pointer and the frame address held in the current entry
  logic [31:0]     db_fa;
  assign db_addr = db_ptr[DB_AW-1:0];
  assign db_end  = (db_ptr >= db_len);
  assign db_fa   = frame_addr({2'b00, db_data.body[7:2]}, {6'b0, db_data.body[1:0]});
  assign bs_addr = bs_ptr[BS_AW-1:0];

  // ------------------------------------------------------- packet tracker
  logic            t_synced;
  logic [26:0]     t_left;       // data words left in the current packet
  logic [4:0]      t_reg;        // register of the current / last packet
  logic [31:0]     t_far;        // address of the frame being written
  logic [6:0]      t_wif;        // word in frame
  logic [1:0]      t_fsel;       // tag of the frame being written
  logic            t_expect2;    // next frame is a second register frame
  logic [31:0]     t_fa2;        // its address

  // tags of the word at bs_ptr
  logic            w_is_fd;      // FDRI data word
  logic            w_first;
  logic [1:0]      w_sel;
  logic            w_newcol;     // first word of a column's first frame
  always_comb begin
    w_is_fd  = t_synced && t_left != '0 && t_reg == REG_FDRI;
    w_first  = w_is_fd && t_wif == '0;
    w_newcol = w_first && !db_end && db_data.flag == FLAG_FRAME_ADDR && db_fa == t_far;
    if (!w_is_fd)                        w_sel = 2'd0;
    else if (!w_first)                   w_sel = t_fsel;
    else if (w_newcol)                   w_sel = 2'd1;
    else if (t_expect2 && t_far == t_fa2) w_sel = 2'd2;
    else                                 w_sel = 2'd0;
  end

  // ------------------------------------------------------------- routing
  logic cmd_valid;
  logic [31:0] cmd_word;
  always_comb begin
    cmd_valid = 1'b0;
    cmd_word  = rom_data;
    rom_addr  = '0;
    unique case (state)
      S_RB_PRO, S_RB_EPI, S_RB_FARH, S_RB_RDH: cmd_valid = 1'b1;
      S_RB_FA: begin cmd_valid = 1'b1; cmd_word = db_fa; end
      default: ;
    endcase
    if (state == S_RB_RDH && rom_addr_q == ROM_TYPE2) cmd_word = rom_data | 32'(READ_WORDS);
    rom_addr = rom_addr_q;
  end

  always_comb begin
    if (state == S_CF_RUN || (state == S_DRAIN && f_restore)) begin
      // swap-in: bitstream -> filter -> port
      f_in_valid  = (state == S_CF_RUN) && (bs_ptr < bs_len) && !(w_first && !f_idle);
      f_in_data   = bs_data;
      f_in_sel    = w_sel;
      f_in_first  = w_first && w_sel != 2'd0;
      p_tx_valid  = f_out_valid;
      p_tx_data   = f_out_data;
      f_out_ready = p_tx_ready;
      p_rx_ready  = 1'b0;
    end else begin
      // swap-out: commands -> port, port -> filter
      f_in_valid  = (state == S_RB_READ) && p_rx_valid;
      f_in_data   = p_rx_data;
      f_in_sel    = (rcnt < FW) ? 2'd0 : (rcnt < 2*FW) ? 2'd1 : 2'd2;
      f_in_first  = (rcnt == FW) || (rcnt == 2*FW);
      p_rx_ready  = (state == S_RB_READ) && f_in_ready;
      p_tx_valid  = cmd_valid;
      p_tx_data   = cmd_word;
      f_out_ready = 1'b1;
    end
  end

  assign p_rd_words = RD_WORDS;
  assign busy       = (state != S_IDLE);
  assign err        = ctl_err;

  wire tx_fire = p_tx_valid && p_tx_ready;
  wire cf_fire = (state == S_CF_RUN) && f_in_valid && f_in_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      rom_addr_q <= '0;
      db_ptr     <= '0;
      bs_ptr     <= '0;
      rcnt       <= '0;
      ctl_err    <= 1'b0;
      done       <= 1'b0;
      cols       <= '0;
      f_restore  <= 1'b0;
      f_clear    <= 1'b0;
      p_rd_start <= 1'b0;
      t_synced   <= 1'b0;
      t_left     <= '0;
      t_reg      <= '0;
      t_far      <= '0;
      t_wif      <= '0;
      t_fsel     <= '0;
      t_expect2  <= 1'b0;
      t_fa2      <= '0;
    end else begin
      done       <= 1'b0;
      f_clear    <= 1'b0;
      p_rd_start <= 1'b0;
      if (busy && !init_b) ctl_err <= 1'b1;
      if (db_adv) db_ptr <= db_ptr + 1'b1;

      unique case (state)
        S_IDLE: begin
          if (swap_out || swap_in) begin
            if (!init_b) begin
              ctl_err <= 1'b1;
            end else begin
              ctl_err    <= 1'b0;
              f_clear    <= 1'b1;
              db_ptr     <= '0;
              bs_ptr     <= '0;
              rom_addr_q <= '0;
              cols       <= '0;
              f_restore  <= swap_in && !swap_out;
              t_synced   <= 1'b0;
              t_left     <= '0;
              t_wif      <= '0;
              t_expect2  <= 1'b0;
              state      <= (swap_out) ? S_RB_PRO : S_CF_RUN;
            end
          end
        end
        // ----------------------------------------------------- swap-out
        S_RB_PRO: if (tx_fire) begin
          rom_addr_q <= rom_addr_q + 1'b1;
          if (rom_addr_q == ROM_PRO_LAST) state <= S_RB_COL;
        end
        S_RB_COL: if (f_idle) begin
          if (db_end) begin
            rom_addr_q <= ROM_COL_LAST + 1'b1;
            state      <= S_RB_EPI;
          end else if (db_data.flag != FLAG_FRAME_ADDR) begin
            ctl_err    <= 1'b1;               // database out of order
            rom_addr_q <= ROM_COL_LAST + 1'b1;
            state      <= S_RB_EPI;
          end else begin
            rom_addr_q <= ROM_FAR_HDR;
            state      <= S_RB_FARH;
          end
        end
        S_RB_FARH: if (tx_fire) state <= S_RB_FA;
        S_RB_FA: if (tx_fire) begin
          db_ptr     <= db_ptr + 1'b1;
          rom_addr_q <= ROM_FAR_HDR + 1'b1;
          state      <= S_RB_RDH;
        end
        S_RB_RDH: if (tx_fire) begin
          rom_addr_q <= rom_addr_q + 1'b1;
          if (rom_addr_q == ROM_COL_LAST) state <= S_RB_WAITP;
        end
        S_RB_WAITP: if (p_idle) begin
          p_rd_start <= 1'b1;
          rcnt       <= '0;
          state      <= S_RB_READ;
        end
        S_RB_READ: if (f_in_valid && f_in_ready) begin
          rcnt <= rcnt + 1'b1;
          if (rcnt == RD_WORDS - 1'b1) begin
            cols  <= cols + 1'b1;
            state <= S_RB_COL;
          end
        end
        S_RB_EPI: if (tx_fire) begin
          rom_addr_q <= rom_addr_q + 1'b1;
          if (rom_addr_q == ROM_EPI_LAST) state <= S_DRAIN;
        end
        // ------------------------------------------------------ swap-in
        S_CF_RUN: begin
          if (bs_ptr >= bs_len) begin
            state <= S_DRAIN;
          end else if (cf_fire) begin
            bs_ptr <= bs_ptr + 1'b1;
            if (w_newcol) begin
              db_ptr    <= db_ptr + 1'b1;
              t_expect2 <= 1'b1;
              t_fa2     <= next_frame(t_far);
              cols      <= cols + 1'b1;
            end
            if (w_first && w_sel == 2'd2) t_expect2 <= 1'b0;
            // tracker
            if (!t_synced) begin
              if (bs_data == SYNC_WORD) t_synced <= 1'b1;
            end else if (t_left == '0) begin
              if (bs_data[31:29] == 3'b001) begin
                if (bs_data[28:27] == OP_WRITE) begin
                  t_reg  <= bs_data[17:13];
                  t_left <= 27'(bs_data[10:0]);
                end
              end else if (bs_data[31:29] == 3'b010) begin
                if (bs_data[28:27] == OP_WRITE) t_left <= bs_data[26:0];
              end
            end else begin
              t_left <= t_left - 1'b1;
              if (t_reg == REG_FAR) begin
                t_far <= bs_data;
                t_wif <= '0;
              end else if (t_reg == REG_FDRI) begin
                if (w_first) t_fsel <= w_sel;
                if (t_wif == 7'(FRAME_WORDS - 1)) begin
                  t_wif <= '0;
                  t_far <= next_frame(t_far);
                  if (t_fsel == 2'd2 || (w_first && w_sel == 2'd2)) t_expect2 <= 1'b0;
                end else begin
                  t_wif <= t_wif + 1'b1;
                end
              end else if (t_reg == REG_CMD && bs_data == CMD_DESYNCH) begin
                t_synced <= 1'b0;
              end
            end
          end
        end
        S_DRAIN: if (f_idle && p_idle && !p_tx_valid) begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
