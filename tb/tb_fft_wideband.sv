// tb_fft_wideband: checks the wideband FFT against a floating-point DFT.
//
// Frames of random complex samples (plus a tone) are sent at one beat per
// clock, then with random gaps.  With every stage shifting, the output must be
// DFT/N within a few LSB of rounding; bins are read back in the documented
// order (beat o, lane q -> bin bitrev(o) + M*q).  The first output frame must
// appear exactly (M-1) + log2(M) + 1 + log2(P) clocks after its first input
// beat.  Then a frame with no shifting and full-scale input must raise m_ovf.
module tb_fft_wideband;
  localparam int N  = 256;
  localparam int P  = 4;
  localparam int M  = N / P;
  localparam int DW = 18;
  localparam int SL = $clog2(M);
  localparam int SP = $clog2(P);
  localparam int NF = 4;                      // frames sent in the accuracy test
  localparam int LAT = (M - 1) + SL + 1 + SP;  // clocks from first input to first output
  localparam real PI = 3.14159265358979323846;
  localparam int TOL = 6;

  logic clk = 0, rst_n = 0;
  logic [P*2*DW-1:0] s_data, m_data;
  logic s_valid, s_sof, m_valid, m_sof, m_ovf;
  logic [$clog2(N)-1:0] shift;

  fft_wideband #(.N(N), .P(P), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int xr [NF][N];
  int xi [NF][N];
  real cosT [N], sinT [N];
  int cyc = 0;
  int first_in_cyc = -1, first_out_cyc = -1;
  int out_frame = 0, out_beat = 0;
  int ovf_seen = 0;
  logic check_on = 1;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #2000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int bitrev(int v, int bits);
    int r = 0;
    for (int i = 0; i < bits; i++) r |= ((v >> i) & 1) << (bits - 1 - i);
    return r;
  endfunction

  // reference X[k]/N
  task automatic ref_bin(int f, int k, output real rr, output real ri);
    rr = 0.0; ri = 0.0;
    for (int n = 0; n < N; n++) begin
      int e = (n * k) % N;
      rr += xr[f][n] * cosT[e] + xi[f][n] * sinT[e];
      ri += xi[f][n] * cosT[e] - xr[f][n] * sinT[e];
    end
    rr /= N; ri /= N;
  endtask

  // output checker
  always @(posedge clk) begin
    if (rst_n && m_ovf) ovf_seen++;
    if (rst_n && m_valid && check_on) begin
      if (m_sof) begin
        out_beat = 0;
        if (first_out_cyc < 0) first_out_cyc = cyc;
      end
      if (out_frame < NF) begin
        for (int q = 0; q < P; q++) begin
          int k, gr, gi;
          real rr, ri;
          k  = bitrev(out_beat, SL) + M * q;
          gr = $signed(m_data[2*DW*q +: DW]);
          gi = $signed(m_data[2*DW*q + DW +: DW]);
          ref_bin(out_frame, k, rr, ri);
          checks++;
          if ((gr - rr) > TOL || (rr - gr) > TOL || (gi - ri) > TOL || (ri - gi) > TOL) begin
            failures++;
            if (failures < 10)
              $display("frame %0d bin %0d: got (%0d,%0d) want (%0.1f,%0.1f)", out_frame, k, gr, gi, rr, ri);
          end
        end
      end
      out_beat++;
      if (out_beat == M) begin out_beat = 0; out_frame++; end
    end
  end

  task automatic send_frame(int f, bit gaps);
    for (int m = 0; m < M; m++) begin
      if (gaps) while ($urandom_range(0, 3) == 0) begin
        s_valid <= 0; s_sof <= 0;
        @(posedge clk);
      end
      s_valid <= 1;
      s_sof   <= (m == 0);
      for (int p = 0; p < P; p++) begin
        s_data[2*DW*p +: DW]      <= DW'(xr[f][P*m + p]);
        s_data[2*DW*p + DW +: DW] <= DW'(xi[f][P*m + p]);
      end
      if (first_in_cyc < 0) first_in_cyc = cyc + 1;   // the edge that samples this beat
      @(posedge clk);
    end
    s_valid <= 0; s_sof <= 0;
  endtask

  initial begin
    for (int e = 0; e < N; e++) begin cosT[e] = $cos(2.0*PI*e/N); sinT[e] = $sin(2.0*PI*e/N); end
    for (int f = 0; f < NF; f++)
      for (int n = 0; n < N; n++) begin
        xr[f][n] = $rtoi(20000.0 * $cos(2.0*PI*(5 + 37*f)*n/N)) + $signed($urandom_range(0, 16000)) - 8000;
        xi[f][n] = $rtoi(20000.0 * $sin(2.0*PI*(5 + 37*f)*n/N)) + $signed($urandom_range(0, 16000)) - 8000;
      end
    s_valid = 0; s_sof = 0; s_data = '0; shift = '1;
    repeat (5) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    send_frame(0, 0);
    send_frame(1, 0);
    send_frame(2, 1);
    send_frame(3, 1);
    // flush frame (not checked)
    for (int n = 0; n < N; n++) begin xr[0][n] = 0; xi[0][n] = 0; end
    send_frame(0, 0);
    repeat (20) @(posedge clk);
    checks++;
    if (out_frame < NF) begin failures++; $display("only %0d frames out", out_frame); end
    checks++;
    if (first_out_cyc - first_in_cyc != LAT) begin
      failures++;
      $display("latency %0d, want %0d", first_out_cyc - first_in_cyc, LAT);
    end
    checks++;
    if (ovf_seen != 0) begin failures++; $display("unexpected overflow"); end

    // overflow: no shifting, full-scale DC input
    check_on = 0;
    shift = '0;
    for (int n = 0; n < N; n++) begin xr[0][n] = 131071; xi[0][n] = 131071; end
    send_frame(0, 0);
    send_frame(0, 0);
    repeat (M + 40) @(posedge clk);
    checks++;
    if (ovf_seen == 0) begin failures++; $display("no overflow flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
