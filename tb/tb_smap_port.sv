// tb_smap_port: SelectMAP master against a simple device model that takes a
// byte at each rising CCLK edge with CS_B low, and can raise BUSY.
// Checks: words written arrive byte by byte, most significant byte first and
// in order; back-to-back words without BUSY take 8 clocks each (CCLK at half
// the clock), in both directions; words read back are assembled in order; BUSY bytes are
// repeated (write) or dropped (read); RDWR_B never changes while CS_B is low.
module tb_smap_port;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic tx_valid = 0, tx_ready, rd_start = 0, rx_valid, rx_ready = 0, idle, wr_byte, rd_byte;
  logic [31:0] tx_data = 0, rx_data;
  logic [15:0] rd_words = 0;
  logic cclk, cs_b, rdwr_b, d_oe, busy = 0;
  logic [7:0] d_o, d_i = 0;

  smap_port u_dut (.clk, .rst_n, .tx_valid, .tx_data, .tx_ready, .rd_start, .rd_words,
    .rx_valid, .rx_data, .rx_ready, .idle, .wr_byte, .rd_byte,
    .cclk, .cs_b, .rdwr_b, .d_o, .d_oe, .d_i, .busy);

  int checks = 0, failures = 0;
  task automatic chk(input logic ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  // device model
  logic busy_en = 0;
  logic [7:0] got [$];
  logic [7:0] give [$];
  int first_edge, last_edge, cyc;
  always @(posedge clk) cyc++;
  always @(posedge cclk) begin
    if (!cs_b) begin
      if (busy_en && ($urandom % 5) == 0) busy <= 1'b1;
      else if (!rdwr_b) begin
        busy <= 1'b0;
        chk(d_oe, "master not driving on a write");
        got.push_back(d_o);
        if (got.size() == 1) first_edge = cyc;
        last_edge = cyc;
      end else if (give.size() != 0) begin
        busy <= 1'b0;
        d_i  <= give.pop_front();
      end else busy <= 1'b1;
    end
  end
  // RDWR_B only changes while deselected
  logic rdwr_q, cs_q;
  int turn_bad = 0;
  always @(posedge clk) begin
    rdwr_q <= rdwr_b; cs_q <= cs_b;
    if (rst_n && rdwr_b != rdwr_q && !cs_q) turn_bad++;
  end

  logic [31:0] sent [$];
  logic [31:0] recv [$];
  int rd_done_cyc;
  always @(posedge clk) if (rx_valid && rx_ready) begin recv.push_back(rx_data); rd_done_cyc = cyc; end

  task automatic write_words(input int n, input logic gaps);
    for (int i = 0; i < n; i++) begin
      logic [31:0] w = $urandom;
      if (gaps) while (($urandom % 3) == 0) @(negedge clk);
      if (!gaps && i == 0) @(negedge clk);
      tx_valid = 1; tx_data = w;
      #1;
      while (!tx_ready) begin @(negedge clk); #1; end
      sent.push_back(w);
      @(negedge clk);         // taken at the rising edge in between
      tx_valid = 0;
    end
    wait (idle);
    repeat (4) @(negedge clk);
  endtask

  task automatic check_written();
    chk(got.size() == 4 * sent.size(), $sformatf("%0d bytes for %0d words", got.size(), sent.size()));
    for (int i = 0; i < sent.size(); i++)
      chk({got[4*i], got[4*i+1], got[4*i+2], got[4*i+3]} == sent[i], $sformatf("word %0d", i));
    got.delete(); sent.delete();
  endtask

  task automatic read_words(input int n);
    logic [31:0] exp_w [$];
    recv.delete();
    for (int i = 0; i < n; i++) begin
      logic [31:0] w = $urandom;
      exp_w.push_back(w);
      give.push_back(w[31:24]); give.push_back(w[23:16]); give.push_back(w[15:8]); give.push_back(w[7:0]);
    end
    @(negedge clk); rd_start = 1; rd_words = 16'(n); @(negedge clk); rd_start = 0;
    wait (idle);
    repeat (4) @(negedge clk);
    chk(recv.size() == n, $sformatf("read %0d words", recv.size()));
    for (int i = 0; i < n && i < recv.size(); i++) chk(recv[i] == exp_w[i], $sformatf("read word %0d", i));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // back-to-back, no BUSY: 8 clocks per word
    write_words(16, 1'b0);
    chk(last_edge - first_edge == 8 * 16 - 2, $sformatf("16 words in %0d clocks", last_edge - first_edge + 2));
    check_written();
    // gaps and BUSY
    busy_en = 1;
    write_words(40, 1'b1);
    check_written();
    // back-to-back reads, no BUSY, consumer always ready: 8 clocks per word
    busy_en = 0;
    rx_ready = 1;
    begin
      automatic int c0 = cyc;
      read_words(10);
      chk(rd_done_cyc - c0 <= 8 * 10 + 6, $sformatf("10 words read in %0d clocks", rd_done_cyc - c0));
    end
    busy_en = 1;
    // reads with random consumer back-pressure
    fork
      forever begin @(negedge clk); rx_ready = ($urandom % 3) != 0; end
    join_none
    read_words(30);
    // turn around to write again
    write_words(5, 1'b0);
    check_written();
    chk(turn_bad == 0, $sformatf("RDWR_B changed %0d times under CS_B", turn_bad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
