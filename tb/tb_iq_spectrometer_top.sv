// tb_iq_spectrometer_top: end-to-end test of the spectrometer at its full size
// (4.096 GS/s, 4096 channels, 16 samples per DSP clock).
//
// Two ADC models send the I and Q components of a test signal, a strong
// complex tone in channel 128 (the 128 MHz tone of the alignment test) and a
// weak one in channel -700, as 12-bit samples padded to 16 bits.  The Q
// stream starts a few beats after the I stream, so the combinator has to wait
// for it.  The ADC clock runs at twice the DSP clock.
//
// The reference is computed here in floating point: the polyphase filter
// with the block's quantised Hamming-sinc coefficients, a 4096-point DFT
// divided by 4096 (every FFT stage shifting), power, sum over the integration,
// right shift by SCALE.  Each checked dump must match it in every channel.
//
// The software side is modelled by AXI4-Lite writes: integration length,
// scale and FFT shift schedule are changed between phases, and the four dumps
// after a change are not compared (they may predate it).  Mechanisms that
// must each occur at least once: I/Q skew wait, output backpressure,
// integration dump, configuration change, output saturation (too few FFT
// shifts), FFT overflow (no shifts), dropped dump (output stalled for several
// integrations) and FIFO overflow (DSP clock slowed down for a while).  The
// dump rate must be one per ACC_LEN * 256 DSP clocks, i.e. every sample is
// processed at full rate.
module tb_iq_spectrometer_top;
  import spec_pkg::*;
  localparam int N  = FFT_N;
  localparam int P  = DSP_LANES;
  localparam int M  = N / P;
  localparam int SL = $clog2(M);
  localparam int L  = ADC_LANES;
  localparam real PI = 3.14159265358979323846;
  localparam int K1 = 128, K2 = N - 700;

  logic clk_adc = 0, clk_dsp = 0, rst_adc_n = 0, rst_dsp_n = 0;
  logic [L*16-1:0]   s_axis_i_tdata, s_axis_q_tdata;
  logic              s_axis_i_tvalid, s_axis_i_tready, s_axis_q_tvalid, s_axis_q_tready;
  logic [L*32-1:0]   probe_tdata;
  logic              probe_tvalid;
  logic [P*32-1:0]   m_axis_tdata;
  logic              m_axis_tvalid, m_axis_tready, m_axis_tlast;
  logic [7:0]        s_axil_awaddr, s_axil_araddr;
  logic              s_axil_awvalid, s_axil_awready, s_axil_wvalid, s_axil_wready;
  logic [31:0]       s_axil_wdata, s_axil_rdata;
  logic [3:0]        s_axil_wstrb;
  logic [1:0]        s_axil_bresp, s_axil_rresp;
  logic              s_axil_bvalid, s_axil_bready, s_axil_arvalid, s_axil_arready;
  logic              s_axil_rvalid, s_axil_rready;
  logic              ev_skew_wait, ev_fifo_ovf_adc, ev_fft_ovf, ev_fifo_ovf, ev_dump_done, ev_dump_drop, ev_sat;

  iq_spectrometer_top dut (.*);

  int dsp_half = 2;
  always #1 clk_adc = ~clk_adc;
  always begin #(dsp_half) clk_dsp = ~clk_dsp; end

  int checks = 0, failures = 0;
  int n_skew = 0, n_stall = 0, n_done = 0, n_drop = 0, n_sat = 0, n_fftovf = 0, n_fifoovf = 0;
  int n_fifoovf_adc = 0, n_cfg = 0, n_checked = 0;

  initial begin
    #4000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- ADC models ----------------
  int xi [N], xq [N];        // one period of the test signal
  int ni = 0, nq = 0;        // beats accepted
  bit q_go = 0, adc_on = 0;

  function automatic logic [L*16-1:0] adc_beat(int k, bit q);
    logic [L*16-1:0] d;
    for (int j = 0; j < L; j++) d[16*j +: 16] = 16'(q ? xq[(k * L + j) % N] : xi[(k * L + j) % N]);
    return d;
  endfunction

  always @(posedge clk_adc) begin
    int ki, kq;
    ki = ni + ((rst_adc_n && s_axis_i_tvalid && s_axis_i_tready) ? 1 : 0);
    kq = nq + ((rst_adc_n && s_axis_q_tvalid && s_axis_q_tready) ? 1 : 0);
    ni <= ki; nq <= kq;
    if (!(s_axis_i_tvalid && !s_axis_i_tready)) begin
      s_axis_i_tvalid <= adc_on;
      s_axis_i_tdata  <= adc_beat(ki, 0);
    end
    if (!(s_axis_q_tvalid && !s_axis_q_tready)) begin
      s_axis_q_tvalid <= adc_on && q_go;
      s_axis_q_tdata  <= adc_beat(kq, 1);
    end
    if (rst_adc_n && ev_skew_wait) n_skew++;
    if (rst_adc_n && ev_fifo_ovf_adc) n_fifoovf_adc++;
  end

  // ---------------- reference ----------------
  real pref [N];             // power per channel of one spectrum
  real costab [N], sintab [N];

  task automatic make_reference();
    real yr [N], yi [N];
    for (int n = 0; n < N; n++) begin
      real ar = 0.0, ai = 0.0;
      for (int t = 0; t < PFB_TAPS; t++) begin
        int i;
        real w, x, s, c;
        i = (PFB_TAPS - 1 - t) * N + n;
        w = 0.54 - 0.46 * $cos(2.0 * PI * i / (PFB_TAPS * N));
        x = (i - PFB_TAPS * N / 2.0) / N;
        s = (x == 0.0) ? 1.0 : $sin(PI * x) / (PI * x);
        c = real'($rtoi($floor(w * s * ((1 << (COEF_W - 1)) - 1) + 0.5))) / (2.0 ** (COEF_W - 1));
        ar += c * xi[n];      // the signal repeats every N samples
        ai += c * xq[n];
      end
      yr[n] = ar; yi[n] = ai;
    end
    for (int k = 0; k < N; k++) begin
      real xr_ = 0.0, xi_ = 0.0;
      for (int n = 0; n < N; n++) begin
        int e = (k * n) % N;
        xr_ += yr[n] * costab[e] + yi[n] * sintab[e];
        xi_ += yi[n] * costab[e] - yr[n] * sintab[e];
      end
      xr_ /= N; xi_ /= N;
      pref[k] = xr_ * xr_ + xi_ * xi_;
    end
  endtask

  // ---------------- output checker ----------------
  int cfg_len = 10240, cfg_scale = 0, skip = 4;
  bit cfg_check = 1;
  int rbeat = 0, dump_bad = 0;
  int drops_at_done = 0;
  int last_done_cyc = -1, dsp_cyc = 0, rate_bad = 0, rate_checked = 0;
  int stall_mode = 0;         // 0 random stalls, 1 always ready, 2 never ready

  always @(posedge clk_dsp) dsp_cyc <= dsp_cyc + 1;

  always @(posedge clk_dsp) begin
    if (rst_dsp_n) begin
      if (ev_dump_done) begin
        n_done++;
        if (last_done_cyc >= 0 && stall_mode == 1 && skip == 0 && dsp_half == 2 && n_drop == drops_at_done) begin
          rate_checked++;
          if (dsp_cyc - last_done_cyc != cfg_len * M) begin rate_bad++; $display("dump interval %0d", dsp_cyc - last_done_cyc); end
        end
        last_done_cyc = dsp_cyc;
        drops_at_done = n_drop;
      end
      if (ev_dump_drop) n_drop++;
      if (ev_sat) n_sat++;
      if (ev_fft_ovf) n_fftovf++;
      if (ev_fifo_ovf) n_fifoovf++;
      if (m_axis_tvalid && !m_axis_tready) n_stall++;
      if (m_axis_tvalid && m_axis_tready) begin
        if (skip == 0 && cfg_check) begin
          for (int q = 0; q < P; q++) begin
            int k;
            real e, g, ae, ag;
            k = bitrev(rbeat, SL) + M * q;
            e = pref[k] * cfg_len / (2.0 ** cfg_scale);
            g = real'(m_axis_tdata[32*q +: 32]);
            // compare amplitudes: 0.3 % plus a few LSB of fixed-point noise
            ae = $sqrt(pref[k]);
            ag = $sqrt(g * (2.0 ** cfg_scale) / cfg_len);
            if (ag - ae > 0.003 * ae + 4.0 || ae - ag > 0.003 * ae + 4.0) begin
              dump_bad++;
              if (dump_bad < 6) $display("channel %0d: got %0.0f want %0.0f", k, g, e);
            end
          end
        end
        checks++;
        if (m_axis_tlast != (rbeat == M - 1)) begin failures++; $display("tlast misplaced"); end
        rbeat++;
        if (rbeat == M) begin
          rbeat = 0;
          if (skip > 0) skip--;
          else if (cfg_check) begin
            n_checked++;
            checks++;
            if (dump_bad != 0) begin failures++; $display("dump mismatched in %0d channels", dump_bad); end
          end
          dump_bad = 0;
        end
      end
    end
  end

  always @(posedge clk_dsp)
    m_axis_tready <= (stall_mode == 1) || (stall_mode == 0 && $urandom_range(0, 3) != 0);

  // ---------------- AXI4-Lite master ----------------
  task automatic axil_write(logic [7:0] a, logic [31:0] d);
    @(posedge clk_dsp);
    s_axil_awaddr <= a; s_axil_wdata <= d; s_axil_wstrb <= 4'hF;
    s_axil_awvalid <= 1; s_axil_wvalid <= 1; s_axil_bready <= 1;
    @(posedge clk_dsp);
    while (!(s_axil_awready && s_axil_wready)) @(posedge clk_dsp);
    s_axil_awvalid <= 0; s_axil_wvalid <= 0;
    @(posedge clk_dsp);
    while (!s_axil_bvalid) @(posedge clk_dsp);
    s_axil_bready <= 0;
  endtask

  task automatic axil_read(logic [7:0] a, output logic [31:0] d);
    @(posedge clk_dsp);
    s_axil_araddr <= a; s_axil_arvalid <= 1; s_axil_rready <= 1;
    @(posedge clk_dsp);
    while (!s_axil_arready) @(posedge clk_dsp);
    s_axil_arvalid <= 0;
    @(posedge clk_dsp);
    while (!s_axil_rvalid) @(posedge clk_dsp);
    d = s_axil_rdata;
    s_axil_rready <= 0;
  endtask

  task automatic configure(int len, int sc, logic [11:0] sh, bit check_after);
    cfg_check = 0;
    axil_write(8'h08, len);
    axil_write(8'h0C, sc);
    axil_write(8'h04, 32'(sh));
    n_cfg++;
    cfg_len = len; cfg_scale = sc;
    skip = 4;
    cfg_check = check_after;
  endtask

  task automatic wait_dumps(int n);
    int target = n_done + n;
    while (n_done < target) @(posedge clk_dsp);
  endtask

  initial begin
    logic [31:0] d;
    int d0;
    for (int e = 0; e < N; e++) begin costab[e] = $cos(2.0 * PI * e / N); sintab[e] = $sin(2.0 * PI * e / N); end
    for (int n = 0; n < N; n++) begin
      real vr, vi;
      vr = 16000.0 * $cos(2.0 * PI * K1 * n / N) + 1600.0 * $cos(2.0 * PI * K2 * n / N);
      vi = 16000.0 * $sin(2.0 * PI * K1 * n / N) + 1600.0 * $sin(2.0 * PI * K2 * n / N);
      xi[n] = 16 * $rtoi($floor(vr / 16.0 + 0.5));     // 12-bit sample in a 16-bit word
      xq[n] = 16 * $rtoi($floor(vi / 16.0 + 0.5));
    end
    make_reference();
    s_axis_i_tvalid = 0; s_axis_q_tvalid = 0; s_axis_i_tdata = '0; s_axis_q_tdata = '0;
    s_axil_awvalid = 0; s_axil_wvalid = 0; s_axil_bready = 0; s_axil_arvalid = 0; s_axil_rready = 0;
    s_axil_awaddr = 0; s_axil_araddr = 0; s_axil_wdata = 0; s_axil_wstrb = 0;
    repeat (4) @(posedge clk_dsp);
    rst_adc_n = 1; rst_dsp_n = 1;
    configure(2, 0, 12'hFFF, 1);
    // ADCs start, Q a few beats after I
    @(posedge clk_adc);
    adc_on = 1;
    repeat (3) @(posedge clk_adc);
    q_go = 1;
    // phase A: plain integrations with random output stalls
    wait_dumps(5);
    // full-rate dump interval with the output always ready
    stall_mode = 1;
    wait_dumps(4);
    stall_mode = 0;
    // phase B: longer integration, scaled
    configure(3, 1, 12'hFFF, 1);
    wait_dumps(7);
    // phase C: too few shifts -> the integrated power saturates
    configure(2, 0, 12'hFF8, 0);
    wait_dumps(3);
    // phase D: no shifts -> FFT overflow
    configure(2, 0, 12'h000, 0);
    wait_dumps(3);
    // phase E: output stalled for several integrations -> dropped dumps
    configure(1, 2, 12'hFFF, 0);
    wait_dumps(1);
    stall_mode = 2;
    repeat (6 * M) @(posedge clk_dsp);
    stall_mode = 0;
    configure(2, 2, 12'hFFF, 1);
    wait_dumps(7);
    // phase F: DSP clock 25% slow for a while -> FIFO overflow
    cfg_check = 0;            // samples are lost from here on
    stall_mode = 1;
    dsp_half = 3;
    repeat (200) @(posedge clk_dsp);
    dsp_half = 2;
    repeat (20) @(posedge clk_dsp);
    axil_read(8'h10, d);
    checks++;
    if (d[3:0] != 4'b1111) begin failures++; $display("STATUS %b", d[3:0]); end
    axil_read(8'h14, d);
    checks++;
    if (d != 32'(n_done)) begin failures++; $display("DUMPS %0d, counted %0d", d, n_done); end

    $display("mechanisms: skew_wait=%0d stall=%0d dumps=%0d checked=%0d cfg=%0d sat=%0d fft_ovf=%0d drop=%0d fifo_ovf=%0d rate_checked=%0d",
             n_skew, n_stall, n_done, n_checked, n_cfg, n_sat, n_fftovf, n_drop, n_fifoovf, rate_checked);
    checks++; if (n_skew == 0)    begin failures++; $display("no I/Q skew wait"); end
    checks++; if (n_stall == 0)   begin failures++; $display("no output stall"); end
    checks++; if (n_checked < 6)  begin failures++; $display("only %0d dumps checked", n_checked); end
    checks++; if (n_cfg < 4)      begin failures++; $display("too few configuration changes"); end
    checks++; if (n_sat == 0)     begin failures++; $display("no saturation"); end
    checks++; if (n_fftovf == 0)  begin failures++; $display("no FFT overflow"); end
    checks++; if (n_drop == 0)    begin failures++; $display("no dropped dump"); end
    checks++; if (n_fifoovf == 0 || n_fifoovf_adc != n_fifoovf) begin failures++; $display("FIFO overflow: %0d in ADC domain, %0d in DSP domain", n_fifoovf_adc, n_fifoovf); end
    checks++; if (rate_checked == 0 || rate_bad != 0) begin failures++; $display("dump interval wrong %0d of %0d", rate_bad, rate_checked); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
