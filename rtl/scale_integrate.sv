// scale_integrate: power detection, vector accumulation and scaling of the
// FFT output, with an AXI4-Stream output towards the DMA.
//
// Input: the FFT stream, P complex bins per beat and M = N/P beats per
// spectrum, s_sof on beat 0.  For every bin the power re^2 + im^2 is formed and
// added into an ACC_W-bit accumulator held in a P x M memory addressed by
// beat.  An integration spans acc_len spectra (acc_len = 0 counts as 1); the
// values of acc_len and scale are taken when an integration begins, so they
// can be changed at any time.  The first spectrum of an integration overwrites the
// accumulators, the rest add to them.
//
// Scaling: during the last spectrum of an integration, each finished sum is
// shifted right by `scale` bits, saturated to OUT_W bits (sat pulses when that
// clips), and written to a dump buffer of M words of P*OUT_W bits.  Once the
// whole spectrum is in, the buffer is sent out on m_axis: M beats, m_tlast on
// the last, beat o lane q carrying the same bin as the input's beat o lane q.
// The dump buffer is doubled: one half is filled while the other is sent, so
// a sink that keeps up (one beat per clock on average) never loses a dump, even
// at acc_len = 1.  Output stalls (m_tready low) are allowed.  If both halves
// are still occupied when a new dump is due, it is skipped and dump_drop
// pulses; the accumulators are not disturbed.
//
// Timing: two register stages (power, then accumulate); dump_done pulses when
// a dump is complete in the buffer, and its first beat is offered on the next
// clock if the other half is not being sent.  The input never stalls.
//
// That the integration length and the scaling factor are run-time settings
// comes from the published design; the power detector, the widths, the shift
// as scaling and the drop rule are this implementation's choices.
module scale_integrate #(
  parameter int N     = spec_pkg::FFT_N,
  parameter int P     = spec_pkg::DSP_LANES,
  parameter int DW    = spec_pkg::DW,
  parameter int ACC_W = spec_pkg::ACC_W,
  parameter int OUT_W = spec_pkg::OUT_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [P*2*DW-1:0]    s_data,
  input  logic                 s_valid,
  input  logic                 s_sof,
  input  logic [31:0]          acc_len,
  input  logic [5:0]           scale,
  output logic [P*OUT_W-1:0]   m_tdata,
  output logic                 m_tvalid,
  input  logic                 m_tready,
  output logic                 m_tlast,
  output logic                 dump_done,
  output logic                 dump_drop,
  output logic                 sat
);
  localparam int M  = N / P;
  localparam int MW = (M > 1) ? $clog2(M) : 1;
  localparam int PWW = 2 * DW + 1;   // width of one power value

  // ---------------- input side: beat index and spectrum counter ----------------
  logic          started;
  logic [MW-1:0] o_cnt, o_cur;
  logic [31:0]   sc, len_q, len_cur;
  logic          first_cur, last_cur, take;
  logic [5:0]    scale_q, scale_cur;

  assign take      = s_valid && (started || s_sof);
  assign o_cur     = s_sof ? '0 : o_cnt;
  assign len_cur   = (sc == '0 && o_cur == '0) ? ((acc_len == '0) ? 32'd1 : acc_len) : len_q;
  assign first_cur = (sc == '0);
  assign last_cur  = (sc == len_cur - 1'b1);
  assign scale_cur = (sc == '0 && o_cur == '0) ? scale : scale_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      started <= 1'b0;
      o_cnt   <= '0;
      sc      <= '0;
      len_q   <= 32'd1;
      scale_q <= '0;
    end else if (take) begin
      started <= 1'b1;
      o_cnt   <= o_cur + 1'b1;
      len_q   <= len_cur;
      scale_q <= scale_cur;
      if (o_cur == MW'(M - 1)) sc <= last_cur ? '0 : sc + 1'b1;
    end
  end

  // ---------------- stage A: power ----------------
  logic [PWW-1:0] pw_a [P];
  logic           v_a, first_a, last_a;
  logic [MW-1:0]  o_a;
  logic [5:0]     scale_a;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_a <= 1'b0; first_a <= 1'b0; last_a <= 1'b0; o_a <= '0; scale_a <= '0;
    end else begin
      v_a     <= take;
      first_a <= first_cur;
      last_a  <= last_cur;
      o_a     <= o_cur;
      scale_a <= scale_cur;
    end
  end

  for (genvar q = 0; q < P; q++) begin : g_pw
    always_ff @(posedge clk) begin
      logic signed [DW-1:0] re, im;
      re = s_data[2*DW*q +: DW];
      im = s_data[2*DW*q + DW +: DW];
      pw_a[q] <= PWW'(re * re) + PWW'(im * im);
    end
  end

  // ---------------- stage B: accumulate, scale, dump ----------------
  logic [ACC_W-1:0]   acc  [P][M];
  logic [P*OUT_W-1:0] dbuf [2][M];
  logic [ACC_W-1:0]   sum  [P];
  logic [P*OUT_W-1:0] scaled;
  logic [P-1:0]       lane_sat;
  logic               writing, wsel, rsel;
  logic [1:0]         full;
  logic [MW-1:0]      rd_ptr;
  logic               dump_start, dump_write;

  always_comb begin
    for (int q = 0; q < P; q++) begin
      logic [ACC_W-1:0] sh;
      sum[q] = (first_a ? '0 : acc[q][o_a]) + ACC_W'(pw_a[q]);
      sh     = sum[q] >> scale_a;
      lane_sat[q] = (sh > ACC_W'({OUT_W{1'b1}}));
      scaled[OUT_W*q +: OUT_W] = lane_sat[q] ? {OUT_W{1'b1}} : OUT_W'(sh);
    end
  end

  assign dump_start = v_a && last_a && (o_a == '0);
  // write the dump buffer on this beat: at the first beat only if the buffer is free
  assign dump_write = v_a && last_a && (dump_start ? !full[wsel] : writing);

  always_ff @(posedge clk) begin
    if (v_a) for (int q = 0; q < P; q++) acc[q][o_a] <= sum[q];
    if (dump_write) dbuf[wsel][o_a] <= scaled;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      writing   <= 1'b0;
      wsel      <= 1'b0;
      rsel      <= 1'b0;
      full      <= '0;
      rd_ptr    <= '0;
      dump_done <= 1'b0;
      dump_drop <= 1'b0;
      sat       <= 1'b0;
    end else begin
      dump_done <= 1'b0;
      dump_drop <= dump_start && full[wsel];
      sat       <= dump_write && (|lane_sat);
      if (dump_start) writing <= !full[wsel];
      if (dump_write && o_a == MW'(M - 1)) begin
        writing    <= 1'b0;
        full[wsel] <= 1'b1;
        wsel       <= !wsel;
        dump_done  <= 1'b1;
      end
      if (m_tvalid && m_tready) begin
        rd_ptr <= rd_ptr + 1'b1;
        if (rd_ptr == MW'(M - 1)) begin
          full[rsel] <= 1'b0;
          rsel       <= !rsel;
        end
      end
    end
  end

  assign m_tvalid = full[rsel];
  assign m_tdata  = dbuf[rsel][rd_ptr];
  assign m_tlast  = m_tvalid && (rd_ptr == MW'(M - 1));

endmodule
