// fft_wideband: N-point complex FFT for a stream of P samples per clock (the
// "FFT" in "PFB & FFT"), 4096 points in 12 radix-2 stages at 16 samples per
// clock by default.
//
// Sample n = P*m + p of a frame arrives on lane p in beat m (m = 0..M-1,
// M = N/P).  The transform is split the way wideband FPGA FFTs usually are:
//   1. each lane runs an M-point SDF pipeline FFT (log2(M) fft_sdf_stage
//      instances) over its own samples, giving X_p[k1] with k1 bit-reversed
//      in time;
//   2. lane p is rotated by W_N^(p*k1);
//   3. fft_direct takes the P-point FFT across the lanes of every beat.
// Output beat o, lane q then holds bin k = bitrev(o) + M*q of the frame
// (bitrev over log2(M) bits), where bin k is frequency k*fs/N for k < N/2 and
// (k-N)*fs/N above.  The order is left as it is: the accumulator downstream
// does not need natural order.
//
// shift[s] halves the outputs of stage s (s = 0 is the first SDF stage,
// s = log2(M) the first cross-lane stage).  With all bits set the output is
// the DFT divided by N.  ovf flags a beat in which some stage saturated.
//
// Timing: one beat per clock, no backpressure.  The first output frame
// follows its input frame by M-1 beats through the SDF stages plus
// log2(M) + 1 + log2(P) clocks of registers.
//
// The length, the number of stages and the configurable shift schedule are
// the published design's; the decomposition into lanes and the output order
// are this implementation's.
module fft_wideband #(
  parameter int N      = spec_pkg::FFT_N,
  parameter int P      = spec_pkg::DSP_LANES,
  parameter int DW     = spec_pkg::DW,
  parameter int COEF_W = spec_pkg::COEF_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [P*2*DW-1:0]      s_data,
  input  logic                   s_valid,
  input  logic                   s_sof,
  input  logic [$clog2(N)-1:0]   shift,
  output logic [P*2*DW-1:0]      m_data,
  output logic                   m_valid,
  output logic                   m_sof,
  output logic                   m_ovf
);
  localparam int M  = N / P;
  localparam int SL = $clog2(M);   // SDF stages per lane
  localparam int SP = $clog2(P);   // cross-lane stages

  logic [P*2*DW-1:0] lane_out, tw_out;
  logic [P-1:0]      lane_ovf, tw_lov;
  logic              lane_valid, lane_sof;

  for (genvar p = 0; p < P; p++) begin : g_lane
    logic [2*DW-1:0] d   [SL+1];
    logic            v   [SL+1];
    logic            sof [SL+1];
    logic [SL-1:0]   of;

    assign d[0]   = s_data[2*DW*p +: 2*DW];
    assign v[0]   = s_valid;
    assign sof[0] = s_sof;

    for (genvar k = 0; k < SL; k++) begin : g_sdf
      fft_sdf_stage #(.M(M), .D(M >> (k + 1)), .DW(DW), .COEF_W(COEF_W)) u_stage (
        .clk, .rst_n,
        .in_data (d[k]),   .in_valid (v[k]),   .in_sof (sof[k]), .shift (shift[k]),
        .out_data(d[k+1]), .out_valid(v[k+1]), .out_sof(sof[k+1]), .ovf(of[k])
      );
    end

    assign lane_out[2*DW*p +: 2*DW] = d[SL];
    assign lane_ovf[p] = |of;
    if (p == 0) begin : g_ctl
      assign lane_valid = v[SL];
      assign lane_sof   = sof[SL];
    end
  end

  // ---- inter-lane twiddles W_N^(p*bitrev(o)) ----
  logic [SL-1:0] o_cnt, o_cur;
  logic          tw_valid, tw_sof, tw_ovf;
  assign o_cur = lane_sof ? '0 : o_cnt;

  for (genvar p = 0; p < P; p++) begin : g_tw
    logic signed [COEF_W-1:0] wr [M];
    logic signed [COEF_W-1:0] wi [M];
    for (genvar o = 0; o < M; o++) begin : g_rom
      localparam int E = (p * spec_pkg::bitrev(o, SL)) % N;
      localparam logic signed [COEF_W-1:0] WR = spec_pkg::tw_re(E, N);
      localparam logic signed [COEF_W-1:0] WI = spec_pkg::tw_im(E, N);
      assign wr[o] = WR;
      assign wi[o] = WI;
    end

    always_ff @(posedge clk) begin
      logic signed [DW-1:0] xr, xi;
      logic signed [63:0]   pr, pi;
      logic                 o1, o2;
      xr = lane_out[2*DW*p +: DW];
      xi = lane_out[2*DW*p + DW +: DW];
      pr = 64'(xr) * 64'(wr[o_cur]) - 64'(xi) * 64'(wi[o_cur]);
      pi = 64'(xr) * 64'(wi[o_cur]) + 64'(xi) * 64'(wr[o_cur]);
      pr = (pr + (64'sd1 <<< (COEF_W - 3))) >>> (COEF_W - 2);
      pi = (pi + (64'sd1 <<< (COEF_W - 3))) >>> (COEF_W - 2);
      tw_out[2*DW*p +: DW]      <= DW'(spec_pkg::sat_s(pr, DW, o1));
      tw_out[2*DW*p + DW +: DW] <= DW'(spec_pkg::sat_s(pi, DW, o2));
      tw_lov[p] <= lane_valid && (o1 || o2);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o_cnt    <= '0;
      tw_valid <= 1'b0;
      tw_sof   <= 1'b0;
      tw_ovf   <= 1'b0;
    end else begin
      tw_valid <= lane_valid;
      tw_sof   <= lane_valid && lane_sof;
      tw_ovf   <= |lane_ovf;
      if (lane_valid) o_cnt <= o_cur + 1'b1;
    end
  end

  logic dir_ovf;
  fft_direct #(.P(P), .DW(DW), .COEF_W(COEF_W)) u_direct (
    .clk, .rst_n,
    .in_data (tw_out), .in_valid (tw_valid), .in_sof (tw_sof), .shift (shift[SL +: SP]),
    .out_data(m_data), .out_valid(m_valid), .out_sof(m_sof), .ovf(dir_ovf)
  );

  // stage overflows, brought to one flag (the SDF flags run ahead of the data)
  logic [SP:0] ovf_pipe;
  logic [P-1:0] tw_lov_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ovf_pipe <= '0;
      tw_lov_d <= '0;
    end else begin
      ovf_pipe <= {ovf_pipe[SP-1:0], tw_ovf};
      tw_lov_d <= tw_lov;
    end
  end
  assign m_ovf = ovf_pipe[SP] || dir_ovf || (|tw_lov_d);

endmodule
