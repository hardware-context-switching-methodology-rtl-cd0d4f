// v2_config_model: behavioural model of the FPGA side of the SelectMAP port
// (the configuration logic of a Virtex-II class device) together with the
// flip-flops of one hardware task. Testbench only, not synthesizable.
//
// Configuration side, clocked by CCLK: bytes are taken at rising CCLK edges
// while CS_B is low; after the sync word Type 1 / Type 2 packets write FAR,
// CMD and FDRI and read FDRO. FDRI frames pass through a one-frame buffer:
// a frame is stored at the current frame address when the next frame
// arrives, so a write ends with a pad frame. A FDRO read returns one pad
// frame and then the frames from the frame address on. Commands: SHUTDOWN
// stops the task, CAPTURE copies each task flip-flop into its frame bit,
// START loads each flip-flop from its frame bit and lets the task run,
// DESYNCH drops synchronisation. With busy_en set, BUSY is raised on about
// one rising edge in eight; such a byte is ignored (write) or not valid
// (read).
//
// Task side, clocked by clk: NREGS flip-flops that count up by one per
// clock while the task runs. Flip-flop k sits at frame loc_far[k], bit
// loc_bit[k] (bit 0 = most significant bit of the frame's first word).
module v2_config_model #(
  parameter int NREGS = 33,
  parameter int NMJA  = 48
) (
  input  logic        clk,
  input  logic        cclk,
  input  logic        cs_b,
  input  logic        rdwr_b,
  input  logic [7:0]  d_in,
  output logic [7:0]  d_out,
  output logic        busy,
  output logic        init_b,
  input  logic        busy_en,
  input  logic [31:0] loc_far [NREGS],
  input  logic [11:0] loc_bit [NREGS],
  output logic [NREGS-1:0] ff,
  output logic        running
);
  localparam int FW = 106;

  logic [31:0] fmem [NMJA][24][FW];
  logic [31:0] fbuf [FW];
  logic [31:0] pend [FW];
  logic        fbuf_full;
  int          fcnt;
  logic        synced;
  logic [31:0] wacc;
  int          bcnt;
  int          left;
  logic [4:0]  reg_a;
  logic [31:0] far;
  logic [31:0] rdq [$];
  int          rbyte;
  logic [15:0] lfsr;
  logic        load_tgl;
  logic        load_seen;
  logic [NREGS-1:0] load_val;
  int          captures, starts, shutdowns;

  initial begin
    synced = 0; bcnt = 0; left = 0; reg_a = 0; far = 0; fcnt = 0; fbuf_full = 0;
    rbyte = 0; lfsr = 16'hACE1; busy = 0; d_out = 0; running = 1;
    load_tgl = 0; load_seen = 0; captures = 0; starts = 0; shutdowns = 0;
    init_b = 1;
    for (int a = 0; a < NMJA; a++)
      for (int b = 0; b < 24; b++)
        for (int w = 0; w < FW; w++) fmem[a][b][w] = 32'h0;
  end

  function automatic int fa_mja(input logic [31:0] fa); return int'(fa[24:17]); endfunction
  function automatic int fa_mna(input logic [31:0] fa); return int'(fa[16:9]); endfunction
  function automatic logic [31:0] nxt(input logic [31:0] fa);
    if (fa[16:9] == 8'd21) return {fa[31:25], fa[24:17] + 8'd1, 8'd0, fa[8:0]};
    return {fa[31:25], fa[24:17], fa[16:9] + 8'd1, fa[8:0]};
  endfunction

  function automatic logic get_bit(input logic [31:0] fa, input int b);
    return fmem[fa_mja(fa)][fa_mna(fa)][b / 32][31 - (b % 32)];
  endfunction

  // task clock domain
  always @(posedge clk) begin
    if (load_tgl != load_seen) begin
      load_seen <= load_tgl;
      ff <= load_val;
    end else if (running) begin
      ff <= ff + 1'b1;
    end
  end

  task automatic do_cmd(input logic [31:0] c);
    case (c[4:0])
      5'h0B: begin running = 0; shutdowns++; end
      5'h0C: begin
        captures++;
        for (int k = 0; k < NREGS; k++)
          fmem[fa_mja(loc_far[k])][fa_mna(loc_far[k])][loc_bit[k] / 32][31 - (loc_bit[k] % 32)] = ff[k];
      end
      5'h05: begin
        starts++;
        for (int k = 0; k < NREGS; k++) load_val[k] = get_bit(loc_far[k], int'(loc_bit[k]));
        load_tgl = ~load_tgl;
        running = 1;
      end
      5'h0D: synced = 0;
      default: ;
    endcase
  endtask

  task automatic do_word(input logic [31:0] w);
    if (!synced) begin
      if (w == 32'hAA995566) synced = 1;
    end else if (left == 0) begin
      if (w[31:29] == 3'b001) begin
        reg_a = w[17:13];
        left  = (w[28:27] == 2'b10) ? int'(w[10:0]) : 0;
        if (w[28:27] == 2'b01 && w[10:0] != 0) start_read(int'(w[10:0]));
        if (reg_a == 5'd2 && w[28:27] == 2'b10) fcnt = 0;
      end else if (w[31:29] == 3'b010) begin
        if (w[28:27] == 2'b10) left = int'(w[26:0]);
        else if (w[28:27] == 2'b01) start_read(int'(w[26:0]));
      end
    end else begin
      left--;
      case (reg_a)
        5'd1: begin far = w; fbuf_full = 0; fcnt = 0; end
        5'd4: do_cmd(w);
        5'd2: begin
          fbuf[fcnt] = w;
          fcnt++;
          if (fcnt == FW) begin
            fcnt = 0;
            if (fbuf_full) begin
              for (int i = 0; i < FW; i++) fmem[fa_mja(far)][fa_mna(far)][i] = pend[i];
              far = nxt(far);
            end
            for (int i = 0; i < FW; i++) pend[i] = fbuf[i];
            fbuf_full = 1;
          end
        end
        default: ;
      endcase
    end
  endtask

  task automatic start_read(input int n);
    logic [31:0] fa;
    fa = far;
    rdq.delete();
    for (int i = 0; i < n; i++) begin
      if (i < FW) rdq.push_back(32'hDEAD_0000 | i);  // pad frame
      else begin
        rdq.push_back(fmem[fa_mja(fa)][fa_mna(fa)][(i - FW) % FW]);
        if ((i - FW) % FW == FW - 1) fa = nxt(fa);
      end
    end
    rbyte = 0;
  endtask

  // Another task takes the region: frames cleared, flip-flops zeroed.
  task automatic wipe();
    for (int a = 0; a < NMJA; a++)
      for (int b = 0; b < 24; b++)
        for (int w = 0; w < FW; w++) fmem[a][b][w] = 32'h0;
    load_val = '0;
    load_tgl = ~load_tgl;
    running  = 0;
  endtask

  // configuration clock domain
  always @(posedge cclk) begin
    lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
    if (!cs_b) begin
      if (busy_en && lfsr[2:0] == 3'd0) begin
        busy <= 1'b1;
      end else if (!rdwr_b) begin
        busy <= 1'b0;
        wacc  = {wacc[23:0], d_in};
        bcnt++;
        if (bcnt == 4) begin
          bcnt = 0;
          do_word(wacc);
        end
      end else if (rdq.size() != 0) begin
        busy  <= 1'b0;
        d_out <= rdq[0][31 - 8*rbyte -: 8];
        rbyte++;
        if (rbyte == 4) begin
          rbyte = 0;
          void'(rdq.pop_front());
        end
      end else begin
        busy <= 1'b1;
      end
    end
  end

endmodule
