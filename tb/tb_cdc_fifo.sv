// tb_cdc_fifo: checks the 512 MHz -> 256 MHz FIFO with 2:1 width conversion.
//
// The write clock runs at twice the read clock.  Phase 1: a continuous
// stream of numbered beats with the reader always ready; every output word
// must be {beat 2k+1, beat 2k} in order, one word per read clock once
// running, and no overflow may be reported.  Phase 2: the reader stops; the
// FIFO must fill, report overflow in both clock domains, and afterwards give
// back exactly DEPTH consecutive words.
module tb_cdc_fifo;
  localparam int IN_W  = 256;
  localparam int DEPTH = 8;

  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic [IN_W-1:0]   s_tdata;
  logic              s_tvalid, s_tready, w_overflow;
  logic [2*IN_W-1:0] m_tdata;
  logic              m_tvalid, m_tready, r_overflow;

  cdc_fifo #(.IN_W(IN_W), .DEPTH(DEPTH)) dut (.*);

  always #2 wclk = ~wclk;       // write clock, period 4
  always #4 rclk = ~rclk;       // read clock, period 8

  int checks = 0, failures = 0;
  int wbeat = 0;
  int expect_pair = 0, nread = 0, wovf = 0, rovf = 0;
  bit seq_ok = 1;

  initial begin
    #200000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [IN_W-1:0] beat(int k);
    return {(IN_W/32){32'(k)}};
  endfunction

  // writer: one beat per write clock
  always @(posedge wclk) begin
    if (wrst_n && s_tvalid && s_tready) wbeat <= wbeat + 1;
    if (wrst_n && w_overflow) wovf++;
  end
  always @(posedge wclk) begin
    s_tvalid <= wrst_n;
    s_tdata  <= beat(wbeat + ((wrst_n && s_tvalid && s_tready) ? 1 : 0));
  end

  // reader
  always @(posedge rclk) begin
    if (rrst_n && r_overflow) rovf++;
    if (rrst_n && m_tvalid && m_tready) begin
      int lo, hi;
      lo = m_tdata[31:0];
      hi = m_tdata[IN_W +: 32];
      checks++;
      if (m_tdata !== {beat(hi), beat(lo)} || hi != lo + 1 || lo % 2 != 0) begin
        failures++;
        if (failures < 5) $display("bad word lo=%0d hi=%0d", lo, hi);
      end
      if (lo != 2 * expect_pair) seq_ok = 0;
      expect_pair = lo / 2 + 1;
      nread++;
    end
  end

  initial begin
    int n0;
    m_tready = 1; s_tvalid = 0;
    repeat (4) @(posedge rclk);
    wrst_n = 1; rrst_n = 1;
    // phase 1
    repeat (20) @(posedge rclk);
    n0 = nread;
    repeat (200) @(posedge rclk);
    checks++;
    if (nread - n0 < 199) begin failures++; $display("rate %0d words in 200 clocks", nread - n0); end
    checks++;
    if (!seq_ok) begin failures++; $display("words out of sequence"); end
    checks++;
    if (wovf != 0 || rovf != 0) begin failures++; $display("unexpected overflow"); end
    // phase 2
    @(negedge rclk);
    m_tready = 0;
    repeat (3 * DEPTH) @(posedge rclk);
    checks++;
    if (wovf == 0) begin failures++; $display("no write-side overflow"); end
    checks++;
    if (rovf == 0) begin failures++; $display("no read-side overflow"); end
    // drain: DEPTH consecutive words must come out, then a gap
    seq_ok = 1;
    n0 = nread;
    @(negedge rclk);
    m_tready = 1;
    repeat (DEPTH) @(posedge rclk);
    @(negedge rclk);
    checks++;
    if (nread - n0 != DEPTH || !seq_ok) begin
      failures++;
      $display("drained %0d words, in sequence %0d", nread - n0, seq_ok);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
