// tb_spectrometer_dsp: checks the clock-crossing and DSP chain (FIFO, PFB,
// FFT, power/integration, registers) at a reduced size, N = 256 channels with
// 16 samples per DSP clock, against a floating-point reference.
//
// The source sends joined I/Q beats (8 complex samples) of a periodic test
// signal: a strong complex tone in channel 20 and a weak one in channel -70.
// During the first part it leaves random gaps, which only delay the spectra.
// The reference is the Hamming-sinc polyphase filter with the block's
// quantised coefficients, a DFT divided by N, power, sum over ACC_LEN spectra
// and a right shift by SCALE; every checked dump must agree in amplitude within
// 0.3 % plus 4 LSB in every channel.  The four dumps after each register change
// are not compared.  Each of these must happen: output backpressure, a dump,
// register changes, saturation (too few FFT shifts), FFT overflow (no
// shifts), a dropped dump (output stalled), and FIFO overflow in both clock
// domains (DSP clock slowed down).  With the output always ready, dumps must
// come exactly ACC_LEN * 16 DSP clocks apart.
module tb_spectrometer_dsp;
  import spec_pkg::*;
  localparam int N  = 256;
  localparam int P  = DSP_LANES;
  localparam int M  = N / P;
  localparam int SL = $clog2(M);
  localparam int L  = ADC_LANES;
  localparam real PI = 3.14159265358979323846;
  localparam int K1 = 20, K2 = N - 70;

  logic clk_adc = 0, clk_dsp = 0, rst_adc_n = 0, rst_dsp_n = 0;
  logic [L*32-1:0]   s_adc_tdata;
  logic              s_adc_tvalid, s_adc_tready;
  logic [P*32-1:0]   m_axis_tdata;
  logic              m_axis_tvalid, m_axis_tready, m_axis_tlast;
  logic [7:0]        s_axil_awaddr, s_axil_araddr;
  logic              s_axil_awvalid, s_axil_awready, s_axil_wvalid, s_axil_wready;
  logic [31:0]       s_axil_wdata, s_axil_rdata;
  logic [3:0]        s_axil_wstrb;
  logic [1:0]        s_axil_bresp, s_axil_rresp;
  logic              s_axil_bvalid, s_axil_bready, s_axil_arvalid, s_axil_arready;
  logic              s_axil_rvalid, s_axil_rready;
  logic              ev_fifo_ovf_adc, ev_fft_ovf, ev_fifo_ovf, ev_dump_done, ev_dump_drop, ev_sat;

  spectrometer_dsp #(.N(N)) dut (
    .wclk(clk_adc), .wrst_n(rst_adc_n), .clk(clk_dsp), .rst_n(rst_dsp_n), .*);

  int dsp_half = 2;
  always #1 clk_adc = ~clk_adc;
  always begin #(dsp_half) clk_dsp = ~clk_dsp; end

  int checks = 0, failures = 0;
  int n_stall = 0, n_done = 0, n_drop = 0, n_sat = 0, n_fftovf = 0, n_fifoovf = 0;
  int n_fifoovf_adc = 0, n_cfg = 0, n_checked = 0;

  initial begin
    #2000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- source ----------------
  int xi [N], xq [N];        // one period of the test signal
  int ni = 0;                // beats accepted
  bit src_on = 0, gaps = 1;

  function automatic logic [L*32-1:0] src_beat(int k);
    logic [L*32-1:0] d;
    for (int j = 0; j < L; j++) d[32*j +: 32] = {16'(xq[(k * L + j) % N]), 16'(xi[(k * L + j) % N])};
    return d;
  endfunction

  always @(posedge clk_adc) begin
    int k;
    k = ni + ((rst_adc_n && s_adc_tvalid && s_adc_tready) ? 1 : 0);
    ni <= k;
    s_adc_tvalid <= src_on && !(gaps && $urandom_range(0, 3) == 0);
    s_adc_tdata  <= src_beat(k);
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
            if (dump_bad != 0) begin failures++; $display("%0t: dump mismatched in %0d channels (len %0d scale %0d)", $time, dump_bad, cfg_len, cfg_scale); end
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

  task automatic configure(int len, int sc, logic [7:0] sh, bit check_after);
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
    s_adc_tvalid = 0; s_adc_tdata = '0;
    s_axil_awvalid = 0; s_axil_wvalid = 0; s_axil_bready = 0; s_axil_arvalid = 0; s_axil_rready = 0;
    s_axil_awaddr = 0; s_axil_araddr = 0; s_axil_wdata = 0; s_axil_wstrb = 0;
    repeat (4) @(posedge clk_dsp);
    rst_adc_n = 1; rst_dsp_n = 1;
    configure(2, 0, 8'hFF, 1);
    @(posedge clk_adc);
    src_on = 1;
    // phase A: plain integrations, random input gaps and output stalls
    wait_dumps(5);
    gaps = 0;
    configure(2, 0, 8'hFF, 1);
    // full-rate dump interval with the output always ready
    stall_mode = 1;
    wait_dumps(4);
    stall_mode = 0;
    // phase B: longer integration, scaled
    configure(3, 1, 8'hFF, 1);
    wait_dumps(7);
    // phase C: too few shifts -> the integrated power saturates
    configure(2, 0, 8'hF8, 0);
    wait_dumps(3);
    // phase D: no shifts -> FFT overflow
    configure(2, 0, 8'h00, 0);
    wait_dumps(3);
    // phase E: output stalled for several integrations -> dropped dumps
    configure(1, 2, 8'hFF, 0);
    wait_dumps(1);
    stall_mode = 2;
    repeat (6 * M) @(posedge clk_dsp);
    stall_mode = 0;
    configure(2, 2, 8'hFF, 1);
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

    $display("mechanisms: stall=%0d dumps=%0d checked=%0d cfg=%0d sat=%0d fft_ovf=%0d drop=%0d fifo_ovf=%0d rate_checked=%0d",
             n_stall, n_done, n_checked, n_cfg, n_sat, n_fftovf, n_drop, n_fifoovf, rate_checked);
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
