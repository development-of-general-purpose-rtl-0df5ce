// tb_pfb_fir: checks the polyphase FIR against a direct computation.
//
// Random complex frames go in, partly with gaps.  The reference builds the
// Hamming-windowed sinc prototype in floating point and forms
// y[n] = sum_t c[(TAPS-1-t)*N + n] * x_{-t}[n] / 2**(COEF_W-1) for every
// output sample, c being the prototype quantised to COEF_W bits; the block
// must agree within 1 LSB.  Output must start with frame TAPS-1 (the first
// fully filtered one), m_sof must mark beat 0, and every beat must take
// 2 clocks.
module tb_pfb_fir;
  localparam int N      = 64;
  localparam int TAPS   = 3;
  localparam int LANES  = 4;
  localparam int IN_W   = 16;
  localparam int OUT_W  = 18;
  localparam int COEF_W = 18;
  localparam int M      = N / LANES;
  localparam int NF     = 7;
  localparam real PI    = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  logic [LANES*2*IN_W-1:0]  s_data;
  logic                     s_valid;
  logic [LANES*2*OUT_W-1:0] m_data;
  logic                     m_valid, m_sof, m_ovf;

  pfb_fir #(.N(N), .TAPS(TAPS), .LANES(LANES), .IN_W(IN_W), .OUT_W(OUT_W), .COEF_W(COEF_W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int xr [NF][N], xi [NF][N];
  real h [TAPS*N];
  int out_frame = TAPS - 1, out_beat = 0, cyc = 0;
  int in_cyc [$];
  int lat_bad = 0;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_y(int f, int n, bit im);
    real acc = 0.0;
    for (int t = 0; t < TAPS; t++)
      acc += h[(TAPS - 1 - t) * N + n] * (im ? xi[f - t][n] : xr[f - t][n]);
    return $rtoi($floor(acc + 0.5));
  endfunction

  always @(posedge clk) begin
    if (rst_n && m_valid) begin
      int want_cyc;
      want_cyc = in_cyc.pop_front();
      if (cyc != want_cyc + 2) lat_bad++;
      checks++;
      if (m_sof != (out_beat == 0)) begin failures++; $display("sof wrong at beat %0d", out_beat); end
      if (out_frame < NF) begin
        for (int p = 0; p < LANES; p++) begin
          int n, gr, gi, er, ei;
          n  = LANES * out_beat + p;
          gr = $signed(m_data[2*OUT_W*p +: OUT_W]);
          gi = $signed(m_data[2*OUT_W*p + OUT_W +: OUT_W]);
          er = ref_y(out_frame, n, 0);
          ei = ref_y(out_frame, n, 1);
          checks++;
          if (gr - er > 1 || er - gr > 1 || gi - ei > 1 || ei - gi > 1) begin
            failures++;
            if (failures < 8) $display("frame %0d n %0d: got (%0d,%0d) want (%0d,%0d)", out_frame, n, gr, gi, er, ei);
          end
        end
      end
      out_beat++;
      if (out_beat == M) begin out_beat = 0; out_frame++; end
    end
  end

  initial begin
    for (int i = 0; i < TAPS * N; i++) begin
      real w, x, s;
      w = 0.54 - 0.46 * $cos(2.0 * PI * i / (TAPS * N));
      x = (i - TAPS * N / 2.0) / N;
      s = (x == 0.0) ? 1.0 : $sin(PI * x) / (PI * x);
      // 18-bit coefficient, then the block's division by 2**(COEF_W-1)
      h[i] = real'($rtoi($floor(w * s * ((1 << (COEF_W - 1)) - 1) + 0.5))) / (2.0 ** (COEF_W - 1));
    end
    for (int f = 0; f < NF; f++)
      for (int n = 0; n < N; n++) begin
        xr[f][n] = $signed($urandom_range(0, 65535)) - 32768;
        xi[f][n] = $signed($urandom_range(0, 65535)) - 32768;
      end
    s_valid = 0; s_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++)
      for (int m = 0; m < M; m++) begin
        if (f >= 4) while ($urandom_range(0, 2) == 0) begin s_valid <= 0; @(posedge clk); end
        s_valid <= 1;
        for (int p = 0; p < LANES; p++) begin
          s_data[2*IN_W*p +: IN_W]        <= IN_W'(xr[f][LANES*m + p]);
          s_data[2*IN_W*p + IN_W +: IN_W] <= IN_W'(xi[f][LANES*m + p]);
        end
        if (f >= TAPS - 1) in_cyc.push_back(cyc + 1);
        @(posedge clk);
      end
    s_valid <= 0;
    repeat (10) @(posedge clk);
    checks++;
    if (out_frame != NF) begin failures++; $display("%0d frames out", out_frame); end
    checks++;
    if (lat_bad != 0) begin failures++; $display("latency wrong %0d times", lat_bad); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
