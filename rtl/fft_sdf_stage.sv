// fft_sdf_stage: one radix-2 decimation-in-frequency stage of a single-path
// delay-feedback (SDF) pipeline FFT, for one lane of the wideband FFT.
//
// The lane carries frames of M complex samples, one sample per valid beat;
// in_sof marks sample 0 of a frame.  The stage works on blocks of 2*D samples.
// During the first D samples of a block the inputs go into a D-deep delay
// line, and the stage emits the stored differences of the previous block,
// each multiplied by the twiddle factor W_{2D}^j = exp(-j*2*pi*j/(2D)).  During the
// second D samples, the delayed sample a and the new sample b form a
// butterfly: a+b goes out at once and a-b goes into the delay line.  The
// output stream is thus the input delayed by D samples, with the pairs
// (j, j+D) of every block transformed.  A chain of stages with D = M/2, M/4,
// ..., 1 computes an M-point DFT whose outputs come out in bit-reversed order.
//
// Scaling: when `shift` is set for the frame (sampled at in_sof) the butterfly
// outputs are halved with rounding.  Results that do not fit DW bits saturate
// and raise ovf for that beat.  Twiddles are Q(COEF_W-2) numbers; products are
// rounded back to DW bits.
//
// Timing: out_* are registered, one clock after the input beat; the data
// delay is D beats.  Output beats are valid once D beats of the first frame
// have entered.  There is no backpressure.
module fft_sdf_stage #(
  parameter int M      = 256,
  parameter int D      = 128,
  parameter int DW     = spec_pkg::DW,
  parameter int COEF_W = spec_pkg::COEF_W
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [2*DW-1:0] in_data,
  input  logic            in_valid,
  input  logic            in_sof,
  input  logic            shift,
  output logic [2*DW-1:0] out_data,
  output logic            out_valid,
  output logic            out_sof,
  output logic            ovf
);
  localparam int CW = $clog2(M);
  localparam int DA = (D > 1) ? $clog2(D) : 1;

  // twiddle ROM W_{2D}^j, j = 0..D-1
  logic signed [COEF_W-1:0] tw_re [D];
  logic signed [COEF_W-1:0] tw_im [D];
  for (genvar j = 0; j < D; j++) begin : g_tw
    localparam logic signed [COEF_W-1:0] WR = spec_pkg::tw_re(j, 2 * D);
    localparam logic signed [COEF_W-1:0] WI = spec_pkg::tw_im(j, 2 * D);
    assign tw_re[j] = WR;
    assign tw_im[j] = WI;
  end

  logic signed [DW-1:0] dl_re [D];
  logic signed [DW-1:0] dl_im [D];
  logic [DA-1:0] ptr;
  logic [CW-1:0] cnt;        // sample index within the frame
  logic          started, primed, sh_q, sh;
  logic [CW-1:0] cur;        // index of the current input sample
  logic          second;     // current sample is in the second half of its block
  logic [DA-1:0] j;

  assign cur    = in_sof ? '0 : cnt;
  assign second = (cur & CW'(D)) != '0;
  assign j      = DA'(cur & CW'(D - 1));
  assign sh     = in_sof ? shift : sh_q;

  logic signed [DW-1:0] a_re, a_im, b_re, b_im;
  assign a_re = dl_re[ptr];
  assign a_im = dl_im[ptr];
  assign b_re = in_data[DW-1:0];
  assign b_im = in_data[2*DW-1:DW];

  // butterfly
  logic signed [DW:0] s_re, s_im, d_re, d_im;
  logic signed [63:0] sr, si, dr, di;
  logic o1, o2, o3, o4, o5, o6;
  logic signed [DW-1:0] sum_re, sum_im, dif_re, dif_im, tw_o_re, tw_o_im;

  always_comb begin
    s_re = (DW+1)'(a_re) + (DW+1)'(b_re);
    s_im = (DW+1)'(a_im) + (DW+1)'(b_im);
    d_re = (DW+1)'(a_re) - (DW+1)'(b_re);
    d_im = (DW+1)'(a_im) - (DW+1)'(b_im);
    sr = sh ? ((64'(s_re) + 64'sd1) >>> 1) : 64'(s_re);
    si = sh ? ((64'(s_im) + 64'sd1) >>> 1) : 64'(s_im);
    dr = sh ? ((64'(d_re) + 64'sd1) >>> 1) : 64'(d_re);
    di = sh ? ((64'(d_im) + 64'sd1) >>> 1) : 64'(d_im);
    sum_re = DW'(spec_pkg::sat_s(sr, DW, o1));
    sum_im = DW'(spec_pkg::sat_s(si, DW, o2));
    dif_re = DW'(spec_pkg::sat_s(dr, DW, o3));
    dif_im = DW'(spec_pkg::sat_s(di, DW, o4));
  end

  // twiddle multiply of the stored difference (first half of a block)
  always_comb begin
    logic signed [63:0] pr, pi;
    pr = 64'(a_re) * 64'(tw_re[j]) - 64'(a_im) * 64'(tw_im[j]);
    pi = 64'(a_re) * 64'(tw_im[j]) + 64'(a_im) * 64'(tw_re[j]);
    pr = (pr + (64'sd1 <<< (COEF_W - 3))) >>> (COEF_W - 2);
    pi = (pi + (64'sd1 <<< (COEF_W - 3))) >>> (COEF_W - 2);
    tw_o_re = DW'(spec_pkg::sat_s(pr, DW, o5));
    tw_o_im = DW'(spec_pkg::sat_s(pi, DW, o6));
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      dl_re[ptr] <= second ? dif_re : b_re;
      dl_im[ptr] <= second ? dif_im : b_im;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr       <= '0;
      cnt       <= '0;
      started   <= 1'b0;
      primed    <= 1'b0;
      sh_q      <= 1'b0;
      out_data  <= '0;
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      ovf       <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      ovf       <= 1'b0;
      if (in_valid && (started || in_sof)) begin
        started <= 1'b1;
        sh_q    <= sh;
        cnt     <= cur + 1'b1;
        ptr     <= (ptr == DA'(D - 1)) ? '0 : ptr + 1'b1;
        if (cur == CW'(D - 1)) primed <= 1'b1;
        out_valid <= primed;
        out_sof   <= primed && (cur == CW'(D));
        if (second) begin
          out_data <= {sum_im, sum_re};
          ovf      <= primed && (o1 || o2 || o3 || o4);
        end else begin
          out_data <= {tw_o_im, tw_o_re};
          ovf      <= primed && (o5 || o6);
        end
      end
    end
  end

  initial assert (D >= 1 && M % (2 * D) == 0) else $error("2*D must divide M");

endmodule
