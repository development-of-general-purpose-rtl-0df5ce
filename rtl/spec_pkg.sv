// spec_pkg: constants, types and arithmetic helpers shared by the IQ sampling
// spectrometer.
//
// The spectrometer takes the in-phase and quadrature ADCs of one RF channel,
// each sampling at 4.096 GS/s and delivering eight 16-bit samples per 512 MHz
// clock, and produces integrated power spectra of 4096 channels (1 MHz each).
// The sample rate, bus widths, clock rates, FFT length, number of filter taps
// and number of FFT stages are the design's published numbers.  The internal
// word widths (18-bit data and coefficients, 64-bit accumulators, 32-bit
// output words) are this implementation's own choices.
//
// Complex samples are carried as {im, re} pairs, re in the low half.
package spec_pkg;

  // ---- published numbers ----------------------------------------------------
  localparam int ADC_W        = 16;    // 12-bit ADC samples padded to 16 bits
  localparam int ADC_BUS_W    = 128;   // per-ADC AXI4-Stream data width @ 512 MHz
  localparam int ADC_LANES    = ADC_BUS_W / ADC_W;   // 8 samples per ADC clock
  localparam int FFT_N        = 4096;  // FFT length -> 1 MHz channels at 4.096 GS/s
  localparam int PFB_TAPS     = 3;
  localparam int FFT_STAGES   = 12;    // log2(FFT_N)

  // ---- implementation choices ----------------------------------------------
  localparam int DSP_LANES    = 2 * ADC_LANES;  // 16 complex samples per 256 MHz clock
  localparam int DW           = 18;    // FFT data width (per real component)
  localparam int COEF_W       = 18;    // FIR coefficient and twiddle width
  localparam int ACC_W        = 64;    // accumulator width
  localparam int OUT_W        = 32;    // output power word

  // ---- helpers --------------------------------------------------------------
  // Saturate a wide signed value to W bits; ovf is set when clipping happened.
  function automatic logic signed [63:0] sat_s(input logic signed [63:0] v, input int w,
                                               output logic ovf);
    logic signed [63:0] maxv, minv;
    maxv = (64'sd1 <<< (w - 1)) - 64'sd1;
    minv = -(64'sd1 <<< (w - 1));
    ovf  = 1'b0;
    if (v > maxv) begin sat_s = maxv; ovf = 1'b1; end
    else if (v < minv) begin sat_s = minv; ovf = 1'b1; end
    else sat_s = v;
  endfunction

  // Reverse the low `bits` bits of v.
  function automatic int unsigned bitrev(input int unsigned v, input int bits);
    int unsigned r;
    r = 0;
    for (int i = 0; i < bits; i++) r |= ((v >> i) & 1) << (bits - 1 - i);
    return r;
  endfunction

  // Twiddle factor exp(-j*2*pi*k/n) as Q(COEF_W-2) fixed point: 1.0 = 2**(COEF_W-2).
  function automatic logic signed [COEF_W-1:0] tw_re(input int k, input int n);
    real a;
    a = 2.0 * 3.14159265358979323846 * real'(k) / real'(n);
    return COEF_W'($rtoi($floor($cos(a) * real'(1 << (COEF_W - 2)) + 0.5)));
  endfunction
  function automatic logic signed [COEF_W-1:0] tw_im(input int k, input int n);
    real a;
    a = 2.0 * 3.14159265358979323846 * real'(k) / real'(n);
    return COEF_W'($rtoi($floor(-$sin(a) * real'(1 << (COEF_W - 2)) + 0.5)));
  endfunction

endpackage
