// tb_combinator: checks that the I and Q streams are joined beat by beat.
//
// Two independent sources send numbered beats on the I and Q buses with
// random gaps, and the sink stalls at random.  Every output beat must carry
// I beat k and Q beat k interleaved per lane ({Q, I} per 32 bits).  A phase
// with both sources always valid and the sink always ready must pass one beat
// per clock, and skew_wait must have fired during the random phase.
module tb_combinator;
  localparam int LANES = 8;
  localparam int W     = 16;
  localparam int NBEAT = 400;

  logic clk = 0, rst_n = 0;
  logic [LANES*W-1:0]   s_i_tdata, s_q_tdata;
  logic                 s_i_tvalid, s_q_tvalid, s_i_tready, s_q_tready;
  logic [2*LANES*W-1:0] m_tdata;
  logic                 m_tvalid, m_tready, skew_wait;

  combinator #(.LANES(LANES), .SAMP_W(W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int ni = 0, nq = 0, nout = 0, skews = 0;
  bit rand_mode = 1;

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sample j of beat k on the I bus is k*64+j, on the Q bus 0x8000 | (k*64+j)
  function automatic logic [LANES*W-1:0] beat(int k, bit q);
    logic [LANES*W-1:0] d;
    for (int j = 0; j < LANES; j++) d[W*j +: W] = W'((q ? 16'h8000 : 16'h0) | ((k * LANES + j) & 16'h7fff));
    return d;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      if (skew_wait) skews++;
      if (s_i_tvalid && s_i_tready) ni <= ni + 1;
      if (s_q_tvalid && s_q_tready) nq <= nq + 1;
      if (m_tvalid && m_tready) begin
        logic [LANES*W-1:0] ei, eq;
        ei = beat(nout, 0);
        eq = beat(nout, 1);
        for (int j = 0; j < LANES; j++) begin
          checks++;
          if (m_tdata[2*W*j +: W] !== ei[W*j +: W] || m_tdata[2*W*j + W +: W] !== eq[W*j +: W]) begin
            failures++;
            if (failures < 5) $display("beat %0d lane %0d: got %h", nout, j, m_tdata[2*W*j +: 2*W]);
          end
        end
        nout <= nout + 1;
      end
    end
  end

  // sources and sink: new values are driven after each edge
  always @(posedge clk) begin
    int ki, kq;
    ki = ni + ((rst_n && s_i_tvalid && s_i_tready) ? 1 : 0);
    kq = nq + ((rst_n && s_q_tvalid && s_q_tready) ? 1 : 0);
    if (!(s_i_tvalid && !s_i_tready)) begin
      s_i_tvalid <= (ki < NBEAT) && (!rand_mode || $urandom_range(0, 2) != 0);
      s_i_tdata  <= beat(ki, 0);
    end
    if (!(s_q_tvalid && !s_q_tready)) begin
      s_q_tvalid <= (kq < NBEAT) && (!rand_mode || $urandom_range(0, 2) != 0);
      s_q_tdata  <= beat(kq, 1);
    end
    m_tready <= !rand_mode || ($urandom_range(0, 3) != 0);
  end

  initial begin
    int t0, n0;
    s_i_tvalid = 0; s_q_tvalid = 0; m_tready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (nout >= NBEAT / 2);
    @(posedge clk);
    rand_mode = 0;
    repeat (5) @(posedge clk);
    n0 = nout;
    repeat (100) @(posedge clk);
    checks++;
    if (nout - n0 != 100) begin failures++; $display("throughput %0d beats in 100 clocks", nout - n0); end
    wait (nout == NBEAT);
    repeat (5) @(posedge clk);
    checks++;
    if (skews == 0) begin failures++; $display("skew_wait never seen"); end
    checks++;
    if (nout != NBEAT) begin failures++; $display("%0d beats out", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
