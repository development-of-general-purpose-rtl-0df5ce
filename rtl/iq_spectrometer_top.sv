// iq_spectrometer_top: programmable-logic part of a single-channel IQ sampling
// spectrometer for a radio-astronomy receiver back end.
//
// The down-converted signal of one RF channel arrives as two real streams,
// in-phase (I) and quadrature (Q), each from an RF-sampling ADC running at
// 4.096 GS/s.  The ADCs hand over eight 16-bit samples per 512 MHz clock on
// 128-bit AXI4-Stream buses.  Together the two streams are a complex signal
// 4.096 GHz wide, which the spectrometer splits into 4096 channels of 1 MHz and
// integrates into power spectra.
//
// Structure (clock domain in brackets):
//   combinator        [512 MHz]  joins the I and Q buses into 8 complex samples
//   spectrometer_dsp  [512 -> 256 MHz]  FIFO, 3-tap polyphase filter bank with
//                     a 4096-point FFT, scaling and integration, and the
//                     AXI4-Lite registers
// The ADCs themselves, the logic analyser tap, the DMA engine with its DDR4
// memory, and the processor that programs the registers are outside this
// module: their connections are the ports below.
//
// Ports:
//   s_axis_i_*, s_axis_q_*  ADC streams (clk_adc).
//   probe_*                 the combined stream, for a logic analyser (clk_adc).
//   m_axis_*                integrated spectra towards the DMA (clk_dsp):
//                           256 beats of 16 x 32-bit powers per integration.
//   s_axil_*                control registers (clk_dsp).
//   ev_*                    single-cycle event pulses (clk_dsp).
//
// The block diagram, the clocks and all rates are those of the published
// design; everything inside the blocks is described in their own files.
module iq_spectrometer_top #(
  parameter int N          = spec_pkg::FFT_N,
  parameter int TAPS       = spec_pkg::PFB_TAPS,
  parameter int ADC_LANES  = spec_pkg::ADC_LANES,
  parameter int FIFO_DEPTH = 16
) (
  input  logic                               clk_adc,
  input  logic                               rst_adc_n,
  input  logic                               clk_dsp,
  input  logic                               rst_dsp_n,
  // RF data converter streams
  input  logic [ADC_LANES*spec_pkg::ADC_W-1:0]   s_axis_i_tdata,
  input  logic                               s_axis_i_tvalid,
  output logic                               s_axis_i_tready,
  input  logic [ADC_LANES*spec_pkg::ADC_W-1:0]   s_axis_q_tdata,
  input  logic                               s_axis_q_tvalid,
  output logic                               s_axis_q_tready,
  // logic-analyser probe on the combined stream
  output logic [ADC_LANES*2*spec_pkg::ADC_W-1:0] probe_tdata,
  output logic                               probe_tvalid,
  // spectra towards the DMA
  output logic [2*ADC_LANES*spec_pkg::OUT_W-1:0] m_axis_tdata,
  output logic                               m_axis_tvalid,
  input  logic                               m_axis_tready,
  output logic                               m_axis_tlast,
  // AXI4-Lite from the processing system
  input  logic [7:0]                         s_axil_awaddr,
  input  logic                               s_axil_awvalid,
  output logic                               s_axil_awready,
  input  logic [31:0]                        s_axil_wdata,
  input  logic [3:0]                         s_axil_wstrb,
  input  logic                               s_axil_wvalid,
  output logic                               s_axil_wready,
  output logic [1:0]                         s_axil_bresp,
  output logic                               s_axil_bvalid,
  input  logic                               s_axil_bready,
  input  logic [7:0]                         s_axil_araddr,
  input  logic                               s_axil_arvalid,
  output logic                               s_axil_arready,
  output logic [31:0]                        s_axil_rdata,
  output logic [1:0]                         s_axil_rresp,
  output logic                               s_axil_rvalid,
  input  logic                               s_axil_rready,
  // events; ev_skew_wait and ev_fifo_ovf_adc in the ADC clock domain, the rest in the DSP domain
  output logic                               ev_skew_wait,
  output logic                               ev_fifo_ovf_adc,
  output logic                               ev_fft_ovf,
  output logic                               ev_fifo_ovf,
  output logic                               ev_dump_done,
  output logic                               ev_dump_drop,
  output logic                               ev_sat
);
  logic [ADC_LANES*2*spec_pkg::ADC_W-1:0] c_tdata;
  logic                                   c_tvalid, c_tready;

  combinator #(.LANES(ADC_LANES), .SAMP_W(spec_pkg::ADC_W)) u_comb (
    .clk(clk_adc), .rst_n(rst_adc_n),
    .s_i_tdata(s_axis_i_tdata), .s_i_tvalid(s_axis_i_tvalid), .s_i_tready(s_axis_i_tready),
    .s_q_tdata(s_axis_q_tdata), .s_q_tvalid(s_axis_q_tvalid), .s_q_tready(s_axis_q_tready),
    .m_tdata(c_tdata), .m_tvalid(c_tvalid), .m_tready(c_tready),
    .skew_wait(ev_skew_wait)
  );

  assign probe_tdata  = c_tdata;
  assign probe_tvalid = c_tvalid && c_tready;

  spectrometer_dsp #(.N(N), .TAPS(TAPS), .ADC_LANES(ADC_LANES), .FIFO_DEPTH(FIFO_DEPTH)) u_dsp (
    .wclk(clk_adc), .wrst_n(rst_adc_n),
    .s_adc_tdata(c_tdata), .s_adc_tvalid(c_tvalid), .s_adc_tready(c_tready),
    .clk(clk_dsp), .rst_n(rst_dsp_n),
    .m_axis_tdata, .m_axis_tvalid, .m_axis_tready, .m_axis_tlast,
    .s_axil_awaddr, .s_axil_awvalid, .s_axil_awready,
    .s_axil_wdata, .s_axil_wstrb, .s_axil_wvalid, .s_axil_wready,
    .s_axil_bresp, .s_axil_bvalid, .s_axil_bready,
    .s_axil_araddr, .s_axil_arvalid, .s_axil_arready,
    .s_axil_rdata, .s_axil_rresp, .s_axil_rvalid, .s_axil_rready,
    .ev_fifo_ovf_adc,
    .ev_fft_ovf, .ev_fifo_ovf, .ev_dump_done, .ev_dump_drop, .ev_sat
  );

endmodule
