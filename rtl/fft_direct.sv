// fft_direct: P-point FFT across the P parallel lanes of one beat, the last
// log2(P) stages of the wideband FFT.
//
// Every valid beat holds P complex values, one per lane.  The module applies
// log2(P) radix-2 decimation-in-frequency butterfly stages across the lanes:
// in stage s (half = P >> (s+1)) lanes g+i and g+i+half of each group g of
// 2*half lanes become a+b and (a-b)*W_{2*half}^i.  The last stage's outputs are
// then permuted back from bit-reversed to natural order, so output lane q holds
// DFT bin q of the beat's P values.
//
// Scaling: bit s of `shift` (sampled when the frame start reaches stage s, so a
// change takes effect at a frame boundary) halves the butterfly outputs of stage s with rounding.
// Results that do not fit DW bits saturate and raise ovf for that beat.
//
// Timing: one register per stage, latency log2(P) clocks, one beat per clock.
module fft_direct #(
  parameter int P      = spec_pkg::DSP_LANES,
  parameter int DW     = spec_pkg::DW,
  parameter int COEF_W = spec_pkg::COEF_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [P*2*DW-1:0]       in_data,
  input  logic                    in_valid,
  input  logic                    in_sof,
  input  logic [$clog2(P)-1:0]    shift,
  output logic [P*2*DW-1:0]       out_data,
  output logic                    out_valid,
  output logic                    out_sof,
  output logic                    ovf
);
  localparam int S = $clog2(P);

  logic [P*2*DW-1:0] d   [S+1];
  logic              v   [S+1];
  logic              sof [S+1];
  logic              of  [S+1];

  assign d[0]   = in_data;
  assign v[0]   = in_valid;
  assign sof[0] = in_sof;
  assign of[0]  = 1'b0;

  for (genvar s = 0; s < S; s++) begin : g_stage
    localparam int HALF = P >> (s + 1);
    logic sh, sh_q;
    logic [P*2*DW-1:0] nxt;
    logic [P-1:0]      lov;

    // W_{2*HALF}^i for i = 0..HALF-1
    logic signed [COEF_W-1:0] wr [HALF];
    logic signed [COEF_W-1:0] wi [HALF];
    for (genvar i = 0; i < HALF; i++) begin : g_tw
      localparam logic signed [COEF_W-1:0] WR = spec_pkg::tw_re(i, 2 * HALF);
      localparam logic signed [COEF_W-1:0] WI = spec_pkg::tw_im(i, 2 * HALF);
      assign wr[i] = WR;
      assign wi[i] = WI;
    end

    // the schedule of stage s of the frame now entering this stage
    assign sh = sof[s] ? shift[s] : sh_q;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) sh_q <= 1'b0;
      else if (v[s] && sof[s]) sh_q <= shift[s];
    end

    always_comb begin
      nxt = '0;
      lov = '0;
      for (int g = 0; g < P; g += 2 * HALF) begin
        for (int i = 0; i < HALF; i++) begin
          logic signed [DW-1:0] ar, ai, br, bi;
          logic signed [63:0]   sr, si, dr, di, pr, pi;
          logic                 o1, o2, o3, o4;
          ar = d[s][2*DW*(g+i) +: DW];
          ai = d[s][2*DW*(g+i) + DW +: DW];
          br = d[s][2*DW*(g+i+HALF) +: DW];
          bi = d[s][2*DW*(g+i+HALF) + DW +: DW];
          sr = 64'(ar) + 64'(br);
          si = 64'(ai) + 64'(bi);
          dr = 64'(ar) - 64'(br);
          di = 64'(ai) - 64'(bi);
          if (sh) begin
            sr = (sr + 64'sd1) >>> 1;
            si = (si + 64'sd1) >>> 1;
            dr = (dr + 64'sd1) >>> 1;
            di = (di + 64'sd1) >>> 1;
          end
          nxt[2*DW*(g+i) +: DW]      = DW'(spec_pkg::sat_s(sr, DW, o1));
          nxt[2*DW*(g+i) + DW +: DW] = DW'(spec_pkg::sat_s(si, DW, o2));
          // the difference, limited to DW bits, then rotated by the twiddle
          dr = spec_pkg::sat_s(dr, DW, o3);
          di = spec_pkg::sat_s(di, DW, o4);
          lov[g+i] = o1 || o2 || o3 || o4;
          pr = dr * 64'(wr[i]) - di * 64'(wi[i]);
          pi = dr * 64'(wi[i]) + di * 64'(wr[i]);
          pr = (pr + (64'sd1 <<< (COEF_W - 3))) >>> (COEF_W - 2);
          pi = (pi + (64'sd1 <<< (COEF_W - 3))) >>> (COEF_W - 2);
          nxt[2*DW*(g+i+HALF) +: DW]      = DW'(spec_pkg::sat_s(pr, DW, o1));
          nxt[2*DW*(g+i+HALF) + DW +: DW] = DW'(spec_pkg::sat_s(pi, DW, o2));
          lov[g+i+HALF] = o1 || o2;
        end
      end
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        d[s+1]   <= '0;
        v[s+1]   <= 1'b0;
        sof[s+1] <= 1'b0;
        of[s+1]  <= 1'b0;
      end else begin
        d[s+1]   <= nxt;
        v[s+1]   <= v[s];
        sof[s+1] <= v[s] && sof[s];
        of[s+1]  <= v[s] && (of[s] || (|lov));
      end
    end
  end

  // bit-reversed -> natural lane order
  always_comb begin
    for (int q = 0; q < P; q++)
      out_data[2*DW*q +: 2*DW] = d[S][2*DW*spec_pkg::bitrev(q, S) +: 2*DW];
  end
  assign out_valid = v[S];
  assign out_sof   = sof[S];
  assign ovf       = of[S];

endmodule
