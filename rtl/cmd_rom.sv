// cmd_rom: command ROM holding the fixed SelectMAP words of the readback
// (swap-out) procedure.
//
// The controller walks this ROM to drive the configuration port. The words
// and their order are those of the readback procedure: synchronisation,
// SHUTDOWN, RCRC, four NOOPs, CAPTURE, RCFG (addresses 0-12, sent once);
// the per-column block FAR header, Type 1 read of FDRO, Type 2 read header,
// two NOOPs (addresses 13-17; the frame address itself comes from the
// database and is inserted after address 13, and the Type 2 word count is
// OR-ed into address 15 by the controller); then START, RCRC, DESYNCH and
// two NOOPs (addresses 18-25, sent once at the end). Placing the words in
// this order and splitting them into three regions is this design's choice.
//
// Interface: addr in, data out. Read is combinational (a small LUT ROM).
// Ten data bits are 0 in every word, so synthesis ties them low.
module cmd_rom
  import ctx_pkg::*;
#(
  parameter int unsigned AW = 5
) (
  input  logic [AW-1:0] addr,
  output logic [31:0]   data
);

  always_comb begin
    case (addr)
      // prologue (steps 1-6)
      5'd0:    data = SYNC_WORD;
      5'd1:    data = WR_CMD_HDR;
      5'd2:    data = CMD_SHUTDOWN;
      5'd3:    data = WR_CMD_HDR;
      5'd4:    data = CMD_RCRC;
      5'd5:    data = NOOP_WORD;
      5'd6:    data = NOOP_WORD;
      5'd7:    data = NOOP_WORD;
      5'd8:    data = NOOP_WORD;
      5'd9:    data = WR_CMD_HDR;
      5'd10:   data = CMD_CAPTURE;
      5'd11:   data = WR_CMD_HDR;
      5'd12:   data = CMD_RCFG;
      // per-column block (steps 7-10); frame address follows address 13
      5'd13:   data = WR_FAR_HDR;
      5'd14:   data = RD_FDRO_HDR;
      5'd15:   data = RD_TYPE2_HDR;
      5'd16:   data = NOOP_WORD;
      5'd17:   data = NOOP_WORD;
      // epilogue (steps 12-15)
      5'd18:   data = WR_CMD_HDR;
      5'd19:   data = CMD_START;
      5'd20:   data = WR_CMD_HDR;
      5'd21:   data = CMD_RCRC;
      5'd22:   data = WR_CMD_HDR;
      5'd23:   data = CMD_DESYNCH;
      5'd24:   data = NOOP_WORD;
      5'd25:   data = NOOP_WORD;
      default: data = NOOP_WORD;
    endcase
  end

endmodule
