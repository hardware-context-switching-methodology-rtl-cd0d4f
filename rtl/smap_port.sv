// smap_port: SelectMAP master for the FPGA configuration port.
//
// Moves 32-bit configuration words over the 8-bit SelectMAP bus, first byte
// from bits 31-24. The port generates CCLK itself at half the system clock:
// a byte is set up while CCLK is low, the configuration logic takes it (or
// drives read data) at the rising CCLK edge, and the port looks at BUSY and
// the data bus on the following falling edge. A write byte that the device
// marked BUSY is presented again; a read byte marked BUSY is discarded and
// read again. RDWR_B changes only while CS_B is high, one clock before the
// port selects the device again.
//
// Interface:
//   tx_valid/tx_data/tx_ready  words to write (used when no read is pending)
//   rd_start/rd_words          start reading rd_words words from the device
//   rx_valid/rx_data/rx_ready  words read back
//   idle                       no transfer in progress and no read pending
//   wr_byte/rd_byte            one-clock strobes per byte moved, for counting
//   cclk, cs_b, rdwr_b, d_o, d_oe, d_i, busy: SelectMAP pins; d_o/d_oe/d_i
//   are the two halves of the bidirectional D bus, whose tristate buffer and
//   bit order (D0 is the byte's most significant bit on the device) are at
//   the pads.
// Timing: two clocks per byte, eight per word back to back in either
// direction, plus two per BUSY byte, a few per change of direction, and a
// stall before the last byte of a read word while the previous word has not
// been taken. The document names the pins (CCLK, INIT_B, CS_B,
// RDWR_B, BUSY, D[0:7]) and the 50 MHz SelectMAP clock; the byte timing and
// the handling of BUSY are this design's choices.
module smap_port #(
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  // write side
  input  logic             tx_valid,
  input  logic [31:0]      tx_data,
  output logic             tx_ready,
  // read side
  input  logic             rd_start,
  input  logic [CNT_W-1:0] rd_words,
  output logic             rx_valid,
  output logic [31:0]      rx_data,
  input  logic             rx_ready,
  output logic             idle,
  output logic             wr_byte,
  output logic             rd_byte,
  // SelectMAP pins
  output logic             cclk,
  output logic             cs_b,
  output logic             rdwr_b,
  output logic [7:0]       d_o,
  output logic             d_oe,
  input  logic [7:0]       d_i,
  input  logic             busy
);

  typedef enum logic [1:0] {S_IDLE, S_LOW, S_HIGH} state_e;
  state_e           state;
  logic [31:0]      sreg;
  logic [1:0]       bcnt;
  logic [CNT_W-1:0] rd_left;
  logic             reading;   // current transfer direction

  wire want_read  = (rd_left != '0) && !rx_valid;
  wire want_write = (rd_left == '0) && tx_valid;

  // A write word is taken in IDLE, or back to back after the last byte of
  // the previous word went through.
  assign tx_ready = !rd_start && want_write &&
                    (((state == S_IDLE) && !rdwr_b) ||
                     ((state == S_HIGH) && !reading && !busy && bcnt == 2'd3));
  assign idle     = (state == S_IDLE) && (rd_left == '0) && !rx_valid;
  assign d_oe     = !rdwr_b;
  assign d_o      = sreg[31:24];
  assign wr_byte  = (state == S_HIGH) && !reading && !busy;
  assign rd_byte  = (state == S_HIGH) &&  reading && !busy;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      sreg     <= '0;
      bcnt     <= '0;
      rd_left  <= '0;
      reading  <= 1'b0;
      rx_valid <= 1'b0;
      rx_data  <= '0;
      cclk     <= 1'b0;
      cs_b     <= 1'b1;
      rdwr_b   <= 1'b0;
    end else begin
      if (rx_valid && rx_ready) rx_valid <= 1'b0;
      if (rd_start) rd_left <= rd_words;
      unique case (state)
        S_IDLE: begin
          cclk <= 1'b0;
          if (!rd_start && want_read) begin
            if (!rdwr_b) begin
              cs_b   <= 1'b1;
              rdwr_b <= 1'b1;          // turn the bus around first
            end else begin
              cs_b    <= 1'b0;
              reading <= 1'b1;
              bcnt    <= '0;
              state   <= S_LOW;
            end
          end else if (!rd_start && want_write) begin
            if (rdwr_b) begin
              cs_b   <= 1'b1;
              rdwr_b <= 1'b0;
            end else begin
              cs_b    <= 1'b0;
              reading <= 1'b0;
              sreg    <= tx_data;
              bcnt    <= '0;
              state   <= S_LOW;
            end
          end else begin
            cs_b <= 1'b1;
          end
        end
        S_LOW: begin
          // The last byte of a read word is only fetched once the previous
          // word has been taken, so rx_data is never overwritten.
          if (!(reading && bcnt == 2'd3 && rx_valid && !rx_ready)) begin
            cclk  <= 1'b1;            // rising edge: device samples / drives
            state <= S_HIGH;
          end
        end
        S_HIGH: begin
          cclk <= 1'b0;
          if (busy) begin
            state <= S_LOW;           // same byte again
          end else if (reading) begin
            sreg <= {sreg[23:0], d_i};
            bcnt <= bcnt + 1'b1;
            if (bcnt == 2'd3) begin
              rx_valid <= 1'b1;
              rx_data  <= {sreg[23:0], d_i};
              rd_left  <= rd_left - 1'b1;
              // next word straight away when more are due
              state    <= (rd_left > 1) ? S_LOW : S_IDLE;
            end else begin
              state <= S_LOW;
            end
          end else begin
            sreg <= {sreg[23:0], 8'h00};
            bcnt <= bcnt + 1'b1;
            if (bcnt == 2'd3) begin
              // next word straight away when one is waiting
              if (tx_ready) begin
                sreg  <= tx_data;
                bcnt  <= '0;
                state <= S_LOW;
              end else begin
                state <= S_IDLE;
              end
            end else begin
              state <= S_LOW;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
