// ctx_pkg: types and constants shared by the hardware context-switching blocks.
//
// The context-switching engine saves and restores the flip-flop state of a
// hardware task on a Virtex-II class FPGA (XC2V1000) through the SelectMAP
// configuration port. This package holds:
//   * the FPGA geometry used by the bit-index equations (106 words per frame,
//     22 frames per CLB column, first CLB column at major address 3, bit
//     index = 116/118 + 40 * (79 - Y_row)),
//   * the 10-bit database entry format (2-bit Bit_Share_Flag, then either
//     6-bit MJA + 2-bit MNA, or 1-bit X_oe + 7-bit Y_row),
//   * the configuration packet words and command codes of the readback
//     sequence (sync word, Type 1 / Type 2 headers, SHUTDOWN, RCRC, CAPTURE,
//     RCFG, START, DESYNCH),
//   * the 32-bit frame-address layout (bits 26-25 block address, 24-17 major
//     address, 16-9 minor address, 8-0 byte number).
// All numbers are those of the XC2V1000 device; the header field positions
// of the Type 1 / Type 2 packets are the device's usual ones and are read
// back from the command words (0x30008001 writes register 4, CMD; 0x30002001
// writes register 1, FAR; 0x28006000 reads register 3, FDRO).
package ctx_pkg;

  // ---------------------------------------------------------------- geometry
  localparam int unsigned FRAME_WORDS     = 106;  // 32-bit words per frame
  localparam int unsigned FRAME_BYTES     = 4 * FRAME_WORDS;  // 424
  localparam int unsigned FRAMES_PER_CLB  = 22;   // frames in a CLB column
  localparam int unsigned CLB_MJA_BASE    = 3;    // MJA of CLB column C1
  localparam int unsigned BIT_BASE_ODD    = 116;  // eq. (2)
  localparam int unsigned BIT_BASE_EVEN   = 118;  // eq. (3)
  localparam int unsigned ROW_PITCH       = 40;   // bits per slice row
  localparam int unsigned Y_ROW_MAX       = 79;   // top slice row
  // Frames read per register column: one pad frame and the two register
  // frames (XQ frame at MNA, YQ frame at MNA+1).
  localparam int unsigned READ_FRAMES     = 3;
  localparam int unsigned READ_WORDS      = READ_FRAMES * FRAME_WORDS;  // 318

  localparam int unsigned BIT_IDX_W  = $clog2(FRAME_WORDS * 32);  // 12
  localparam int unsigned WORD_IDX_W = $clog2(FRAME_WORDS);       // 7

  // ------------------------------------------------------ database entries
  typedef enum logic [1:0] {
    FLAG_FRAME_ADDR = 2'b00,  // entry holds a frame address (MJA, MNA)
    FLAG_FIRST      = 2'b01,  // register bit only in the first frame (XQ)
    FLAG_SECOND     = 2'b10,  // register bit only in the second frame (YQ)
    FLAG_BOTH       = 2'b11   // register bits in both frames
  } share_flag_e;

  typedef struct packed {
    share_flag_e flag;  // bits 9-8
    logic [7:0]  body;  // bits 7-0: {MJA[5:0], MNA[1:0]} or {X_oe, Y_row[6:0]}
  } db_entry_t;

  // Bit-index parameter: X_oe (1 = odd slice column) and Y_row.
  typedef struct packed {
    logic       x_odd;
    logic [6:0] y_row;
  } bit_param_t;

  // ------------------------------------------------- configuration packets
  localparam logic [31:0] SYNC_WORD     = 32'hAA99_5566;
  localparam logic [31:0] NOOP_WORD     = 32'h2000_0000;
  localparam logic [31:0] WR_CMD_HDR    = 32'h3000_8001;
  localparam logic [31:0] WR_FAR_HDR    = 32'h3000_2001;
  localparam logic [31:0] RD_FDRO_HDR   = 32'h2800_6000;
  localparam logic [31:0] RD_TYPE2_HDR  = 32'h4800_0000;

  localparam logic [31:0] CMD_RCFG      = 32'h0000_0004;
  localparam logic [31:0] CMD_START     = 32'h0000_0005;
  localparam logic [31:0] CMD_RCRC      = 32'h0000_0007;
  localparam logic [31:0] CMD_SHUTDOWN  = 32'h0000_000B;
  localparam logic [31:0] CMD_CAPTURE   = 32'h0000_000C;
  localparam logic [31:0] CMD_DESYNCH   = 32'h0000_000D;

  // Configuration register addresses (field bits 26-13 of a Type 1 header).
  localparam logic [4:0] REG_FAR  = 5'd1;
  localparam logic [4:0] REG_FDRI = 5'd2;
  localparam logic [4:0] REG_FDRO = 5'd3;
  localparam logic [4:0] REG_CMD  = 5'd4;

  // Packet operation field (bits 28-27).
  localparam logic [1:0] OP_NOOP  = 2'b00;
  localparam logic [1:0] OP_READ  = 2'b01;
  localparam logic [1:0] OP_WRITE = 2'b10;

  // --------------------------------------------------------- helpers
  // Build a CLB frame address (block address 0) from a major/minor address.
  function automatic logic [31:0] frame_addr(input logic [7:0] mja, input logic [7:0] mna);
    return {5'b0, 2'b00, mja, mna, 9'b0};
  endfunction

  // Advance a frame address by one frame inside the CLB address space: the
  // minor address counts 0..21, then the major address moves on.
  function automatic logic [31:0] next_frame(input logic [31:0] fa);
    logic [7:0] mja, mna;
    mja = fa[24:17];
    mna = fa[16:9];
    if (mna == 8'(FRAMES_PER_CLB - 1)) begin
      mna = '0;
      mja = mja + 8'd1;
    end else begin
      mna = mna + 8'd1;
    end
    return {fa[31:25], mja, mna, fa[8:0]};
  endfunction

endpackage
