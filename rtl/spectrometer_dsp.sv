// spectrometer_dsp: the spectrometer signal-processing core, from the combined
// I/Q stream in the ADC clock domain to integrated spectra in the DSP clock
// domain.
//
// Chain: cdc_fifo (512 MHz -> 256 MHz, 8 -> 16 complex samples per beat),
// pfb_fir (3-tap polyphase FIR), fft_wideband (4096-point complex FFT with a
// run-time shift schedule), scale_integrate (power, accumulation, scaling,
// AXI4-Stream output), all controlled through axil_regs.
//
// Interface:
//   s_adc_*   combined stream, wclk domain: ADC_LANES complex samples per beat,
//             lane k = {Q, I} 16 bits each; always accepted.
//   m_axis_*  spectra, clk domain: M = FFT_N/DSP_LANES beats per integration,
//             lane q of beat o = integrated power of bin bitrev(o) + M*q.
//   s_axil_*  control registers (see axil_regs), clk domain.
//   ev_fifo_ovf_adc  FIFO overflow pulse in the wclk domain; ev_* the other
//             events in the clk domain.
// The DSP side runs whenever the FIFO has data; only the output stream can
// be stalled, and a stall that keeps both dump buffers full drops the next
// dump.
//
// The four blocks and their order, and the two clocks, follow the published
// spectrometer; the interfaces between them are this implementation's.
module spectrometer_dsp #(
  parameter int N          = spec_pkg::FFT_N,
  parameter int TAPS       = spec_pkg::PFB_TAPS,
  parameter int ADC_LANES  = spec_pkg::ADC_LANES,
  parameter int FIFO_DEPTH = 16
) (
  // ADC clock domain
  input  logic                          wclk,
  input  logic                          wrst_n,
  input  logic [ADC_LANES*2*spec_pkg::ADC_W-1:0] s_adc_tdata,
  input  logic                          s_adc_tvalid,
  output logic                          s_adc_tready,
  // DSP clock domain
  input  logic                          clk,
  input  logic                          rst_n,
  output logic [2*ADC_LANES*spec_pkg::OUT_W-1:0] m_axis_tdata,
  output logic                          m_axis_tvalid,
  input  logic                          m_axis_tready,
  output logic                          m_axis_tlast,
  input  logic [7:0]                    s_axil_awaddr,
  input  logic                          s_axil_awvalid,
  output logic                          s_axil_awready,
  input  logic [31:0]                   s_axil_wdata,
  input  logic [3:0]                    s_axil_wstrb,
  input  logic                          s_axil_wvalid,
  output logic                          s_axil_wready,
  output logic [1:0]                    s_axil_bresp,
  output logic                          s_axil_bvalid,
  input  logic                          s_axil_bready,
  input  logic [7:0]                    s_axil_araddr,
  input  logic                          s_axil_arvalid,
  output logic                          s_axil_arready,
  output logic [31:0]                   s_axil_rdata,
  output logic [1:0]                    s_axil_rresp,
  output logic                          s_axil_rvalid,
  input  logic                          s_axil_rready,
  // FIFO overflow pulse in the ADC clock domain (for a logic analyser probe)
  output logic                          ev_fifo_ovf_adc,
  // event pulses (clk domain), also counted in the status registers
  output logic                          ev_fft_ovf,
  output logic                          ev_fifo_ovf,
  output logic                          ev_dump_done,
  output logic                          ev_dump_drop,
  output logic                          ev_sat
);
  localparam int P  = 2 * ADC_LANES;
  localparam int AW = spec_pkg::ADC_W;
  localparam int DW = spec_pkg::DW;
  localparam int SW = $clog2(N);

  logic [P*2*AW-1:0] f_data;
  logic              f_valid;

  cdc_fifo #(.IN_W(ADC_LANES * 2 * AW), .DEPTH(FIFO_DEPTH)) u_fifo (
    .wclk, .wrst_n,
    .s_tdata(s_adc_tdata), .s_tvalid(s_adc_tvalid), .s_tready(s_adc_tready),
    .w_overflow(ev_fifo_ovf_adc),
    .rclk(clk), .rrst_n(rst_n),
    .m_tdata(f_data), .m_tvalid(f_valid), .m_tready(1'b1),
    .r_overflow(ev_fifo_ovf)
  );

  logic [P*2*DW-1:0] pfb_data, fft_data;
  logic              pfb_valid, pfb_sof, pfb_ovf;
  logic              fft_valid, fft_sof, fft_ovf;
  logic [SW-1:0]     fft_shift;
  logic [31:0]       acc_len;
  logic [5:0]        scale;

  pfb_fir #(.N(N), .TAPS(TAPS), .LANES(P), .IN_W(AW), .OUT_W(DW)) u_pfb (
    .clk, .rst_n,
    .s_data(f_data), .s_valid(f_valid),
    .m_data(pfb_data), .m_valid(pfb_valid), .m_sof(pfb_sof), .m_ovf(pfb_ovf)
  );

  fft_wideband #(.N(N), .P(P), .DW(DW)) u_fft (
    .clk, .rst_n,
    .s_data(pfb_data), .s_valid(pfb_valid), .s_sof(pfb_sof), .shift(fft_shift),
    .m_data(fft_data), .m_valid(fft_valid), .m_sof(fft_sof), .m_ovf(fft_ovf)
  );

  scale_integrate #(.N(N), .P(P), .DW(DW)) u_acc (
    .clk, .rst_n,
    .s_data(fft_data), .s_valid(fft_valid), .s_sof(fft_sof),
    .acc_len, .scale,
    .m_tdata(m_axis_tdata), .m_tvalid(m_axis_tvalid), .m_tready(m_axis_tready),
    .m_tlast(m_axis_tlast),
    .dump_done(ev_dump_done), .dump_drop(ev_dump_drop), .sat(ev_sat)
  );

  assign ev_fft_ovf = fft_ovf || pfb_ovf;

  axil_regs #(.SHIFT_W(SW), .ADDR_W(8)) u_regs (
    .clk, .rst_n,
    .s_awaddr(s_axil_awaddr), .s_awvalid(s_axil_awvalid), .s_awready(s_axil_awready),
    .s_wdata(s_axil_wdata), .s_wstrb(s_axil_wstrb), .s_wvalid(s_axil_wvalid),
    .s_wready(s_axil_wready), .s_bresp(s_axil_bresp), .s_bvalid(s_axil_bvalid),
    .s_bready(s_axil_bready),
    .s_araddr(s_axil_araddr), .s_arvalid(s_axil_arvalid), .s_arready(s_axil_arready),
    .s_rdata(s_axil_rdata), .s_rresp(s_axil_rresp), .s_rvalid(s_axil_rvalid),
    .s_rready(s_axil_rready),
    .fft_shift, .acc_len, .scale,
    .ev_fft_ovf, .ev_fifo_ovf, .ev_dump_drop, .ev_sat, .ev_dump_done
  );

endmodule
