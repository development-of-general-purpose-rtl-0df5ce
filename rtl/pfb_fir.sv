// pfb_fir: polyphase FIR front end of the filter bank (the "PFB" in "PFB & FFT").
//
// The complex input stream carries LANES consecutive samples per beat; a frame
// of N samples therefore takes M = N/LANES beats, and the first valid beat
// after reset starts frame 0.  Sample n of a frame (n = LANES*m + p for beat m,
// lane p) is filtered by
//     y[n] = sum_{t=0}^{TAPS-1} h[(TAPS-1-t)*N + n] * x_{-t}[n]
// where x_{-t} is the frame t frames before the current one, and h is a
// TAPS*N point prototype low-pass filter.  Each lane keeps TAPS-1 circular
// buffers of M samples (the older frames), addressed by the beat index m.
//
// Prototype filter (this implementation's choice; the document names only the
// number of taps): a Hamming-windowed sinc with its first nulls one channel
// apart,
//     h[i] = (0.54 - 0.46*cos(2*pi*i/L)) * sinc((i - L/2)/N),   L = TAPS*N,
// scaled so that 1.0 = 2**(COEF_W-1)-1 and computed while elaborating.
//
// Arithmetic: y = round(sum / 2**(COEF_W-1)), saturated to OUT_W bits, with
// re and im filtered alike.  Output beats start once TAPS-1 frames have filled
// the buffers, so every output frame is fully filtered.  m_sof marks beat 0 of
// each output frame.
//
// Timing: fixed latency of 2 clocks from s_valid to m_valid, one beat per clock
// and no backpressure; input gaps are allowed and pass through as gaps.
module pfb_fir #(
  parameter int N      = spec_pkg::FFT_N,
  parameter int TAPS   = spec_pkg::PFB_TAPS,
  parameter int LANES  = spec_pkg::DSP_LANES,
  parameter int IN_W   = spec_pkg::ADC_W,
  parameter int OUT_W  = spec_pkg::DW,
  parameter int COEF_W = spec_pkg::COEF_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [LANES*2*IN_W-1:0]    s_data,
  input  logic                       s_valid,
  output logic [LANES*2*OUT_W-1:0]   m_data,
  output logic                       m_valid,
  output logic                       m_sof,
  output logic                       m_ovf
);
  localparam int M  = N / LANES;
  localparam int MW = (M > 1) ? $clog2(M) : 1;
  localparam int PW = IN_W + COEF_W;               // one product
  localparam int SW = PW + $clog2(TAPS + 1);       // sum of TAPS products

  localparam int L = TAPS * N;

  // One coefficient of the prototype filter, h[i], i = 0..L-1.
  function automatic logic signed [COEF_W-1:0] coef(input int i);
    real pi, x, w, s;
    pi = 3.14159265358979323846;
    w = 0.54 - 0.46 * $cos(2.0 * pi * real'(i) / real'(L));
    x = (real'(i) - real'(L) / 2.0) / real'(N);
    s = (x == 0.0) ? 1.0 : $sin(pi * x) / (pi * x);
    return COEF_W'($rtoi($floor(w * s * real'((1 << (COEF_W - 1)) - 1) + 0.5)));
  endfunction

  logic [MW-1:0] m_idx;
  logic [$clog2(TAPS+1)-1:0] frames;   // frames seen, saturating at TAPS-1
  logic primed;

  assign primed = (frames == ($clog2(TAPS+1))'(TAPS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_idx  <= '0;
      frames <= '0;
    end else if (s_valid) begin
      m_idx <= (m_idx == MW'(M - 1)) ? '0 : m_idx + 1'b1;
      if (m_idx == MW'(M - 1) && !primed) frames <= frames + 1'b1;
    end
  end

  // stage-1 control
  logic v1, sof1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; sof1 <= 1'b0;
      m_valid <= 1'b0; m_sof <= 1'b0;
    end else begin
      v1      <= s_valid && primed;
      sof1    <= s_valid && primed && (m_idx == '0);
      m_valid <= v1;
      m_sof   <= sof1;
    end
  end

  logic [LANES-1:0] lane_ovf;
  assign m_ovf = m_valid && (|lane_ovf);

  for (genvar p = 0; p < LANES; p++) begin : g_lane
    logic signed [IN_W-1:0] hist_re [TAPS-1][M];
    logic signed [IN_W-1:0] hist_im [TAPS-1][M];
    logic signed [IN_W-1:0] x_re [TAPS];
    logic signed [IN_W-1:0] x_im [TAPS];
    logic signed [SW-1:0]   acc_re, acc_im;
    logic                   lovf;

    assign lane_ovf[p] = lovf;

    // coefficient ROM of this lane: rom[t][m] = h[(TAPS-1-t)*N + LANES*m + p]
    logic signed [COEF_W-1:0] rom [TAPS][M];
    for (genvar t = 0; t < TAPS; t++) begin : g_tap
      for (genvar m = 0; m < M; m++) begin : g_c
        localparam logic signed [COEF_W-1:0] C = coef((TAPS - 1 - t) * N + LANES * m + p);
        assign rom[t][m] = C;
      end
    end

    always_comb begin
      x_re[0] = s_data[2*IN_W*p +: IN_W];
      x_im[0] = s_data[2*IN_W*p + IN_W +: IN_W];
      for (int t = 1; t < TAPS; t++) begin
        x_re[t] = hist_re[t-1][m_idx];
        x_im[t] = hist_im[t-1][m_idx];
      end
    end

    // frame history: hist[t-1] holds the frame t frames back
    always_ff @(posedge clk) begin
      if (s_valid) begin
        for (int t = 1; t < TAPS; t++) begin
          hist_re[t-1][m_idx] <= x_re[t-1];
          hist_im[t-1][m_idx] <= x_im[t-1];
        end
      end
    end

    // stage 1: multiply-accumulate over the taps
    always_ff @(posedge clk) begin
      logic signed [SW-1:0] sr, si;
      sr = '0;
      si = '0;
      for (int t = 0; t < TAPS; t++) begin
        sr += SW'(x_re[t] * rom[t][m_idx]);
        si += SW'(x_im[t] * rom[t][m_idx]);
      end
      acc_re <= sr;
      acc_im <= si;
    end

    // stage 2: round, scale, saturate
    always_ff @(posedge clk) begin
      logic signed [63:0] rr, ri;
      logic               o_re, o_im;
      rr = (64'(acc_re) + (64'sd1 <<< (COEF_W - 2))) >>> (COEF_W - 1);
      ri = (64'(acc_im) + (64'sd1 <<< (COEF_W - 2))) >>> (COEF_W - 1);
      m_data[2*OUT_W*p +: OUT_W]         <= OUT_W'(spec_pkg::sat_s(rr, OUT_W, o_re));
      m_data[2*OUT_W*p + OUT_W +: OUT_W] <= OUT_W'(spec_pkg::sat_s(ri, OUT_W, o_im));
      lovf <= o_re || o_im;
    end

  end

endmodule
