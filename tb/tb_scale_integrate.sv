// tb_scale_integrate: checks power detection, integration, scaling and the
// output stream.
//
// The testbench sends spectra (random complex bins) in groups that form
// integrations, and keeps its own sums of re^2 + im^2 per bin.  Every dump that
// comes out on the stream must equal those sums shifted right by `scale` and
// clipped to 32 bits, M beats long with tlast on the last beat.  The
// sink stalls at random; once it stalls through a whole integration, so a
// dump must be dropped (dump_drop); each integration ends in exactly one
// dump_done or dump_drop, which tells which integration an output dump
// belongs to.  A last integration with full-scale bins and no shift must
// saturate.  The integration length and scale change between integrations,
// and are also rewritten right after the first beat of each integration,
// which must not affect that integration.
module tb_scale_integrate;
  localparam int N  = 64;
  localparam int P  = 4;
  localparam int M  = N / P;
  localparam int DW = 18;
  localparam int NFR = 40;
  localparam int NINT = 16;

  logic clk = 0, rst_n = 0;
  logic [P*2*DW-1:0] s_data;
  logic s_valid, s_sof;
  logic [31:0] acc_len;
  logic [5:0]  scale;
  logic [P*32-1:0] m_tdata;
  logic m_tvalid, m_tready, m_tlast, dump_done, dump_drop, sat;

  scale_integrate #(.N(N), .P(P), .DW(DW), .ACC_W(64), .OUT_W(32)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int fre [NFR][N], fim [NFR][N];
  int int_first [NINT], int_len [NINT], int_scale [NINT];
  int n_int = 0, nframes = 0;
  int ends = 0, drops = 0, sats = 0, dumps_out = 0;
  int dq [$];
  int rbeat = 0;
  bit stall = 0;

  initial begin
    #500000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint unsigned expect_bin(int i, int k);
    longint unsigned s = 0;
    for (int f = int_first[i]; f < int_first[i] + int_len[i]; f++) begin
      longint pw;
      pw = longint'(fre[f][k]) * longint'(fre[f][k]) + longint'(fim[f][k]) * longint'(fim[f][k]);
      s += pw;
    end
    s = s >> int_scale[i];
    return (s > 64'hFFFF_FFFF) ? 64'hFFFF_FFFF : s;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      if (dump_done) begin dq.push_back(ends); ends++; end
      if (dump_drop) begin drops++; ends++; end
      if (sat) sats++;
      if (m_tvalid && m_tready) begin
        int i;
        i = dq[0];
        for (int q = 0; q < P; q++) begin
          longint unsigned e;
          e = expect_bin(i, rbeat + M * q);
          checks++;
          if (m_tdata[32*q +: 32] != e[31:0]) begin
            failures++;
            if (failures < 8) $display("int %0d beat %0d lane %0d: got %0d want %0d", i, rbeat, q, m_tdata[32*q +: 32], e);
          end
        end
        checks++;
        if (m_tlast != (rbeat == M - 1)) begin failures++; $display("tlast wrong at beat %0d", rbeat); end
        rbeat++;
        if (rbeat == M) begin rbeat = 0; void'(dq.pop_front()); dumps_out++; end
      end
    end
  end

  always @(posedge clk) m_tready <= !stall && ($urandom_range(0, 3) != 0);

  task automatic send_int(int len, int sc, int amp);
    int_first[n_int] = nframes;
    int_len[n_int]   = len;
    int_scale[n_int] = sc;
    n_int++;
    acc_len <= len;
    scale   <= sc;
    for (int r = 0; r < len; r++) begin
      for (int k = 0; k < N; k++) begin
        fre[nframes][k] = (amp < 0) ? -131072 : $signed($urandom_range(0, 2 * amp)) - amp;
        fim[nframes][k] = (amp < 0) ? 131071 : $signed($urandom_range(0, 2 * amp)) - amp;
      end
      for (int o = 0; o < M; o++) begin
        s_valid <= 1;
        s_sof   <= (o == 0);
        for (int q = 0; q < P; q++) begin
          s_data[2*DW*q +: DW]      <= DW'(fre[nframes][o + M * q]);
          s_data[2*DW*q + DW +: DW] <= DW'(fim[nframes][o + M * q]);
        end
        @(posedge clk);
        // settings written during an integration must not affect it
        if (r == 0 && o == 0) begin acc_len <= $urandom_range(1, 4); scale <= $urandom_range(0, 7); end
        if ($urandom_range(0, 4) == 0) begin s_valid <= 0; s_sof <= 0; @(posedge clk); end
      end
      nframes++;
    end
    s_valid <= 0; s_sof <= 0;
  endtask

  initial begin
    s_valid = 0; s_sof = 0; s_data = '0; acc_len = 3; scale = 2;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    send_int(3, 2, 16384);
    send_int(3, 2, 16384);
    send_int(2, 0, 3000);
    send_int(3, 4, 60000);
    // stall through a whole integration: the next dump must be dropped
    stall = 1;
    send_int(1, 1, 20000);
    send_int(1, 1, 20000);
    send_int(2, 1, 20000);
    stall = 0;
    send_int(1, 3, 40000);
    // saturation, once the output is idle so that this dump is kept
    s_valid <= 0;
    repeat (3 * M) @(posedge clk);
    send_int(1, 0, -1);
    send_int(1, 0, 100);
    repeat (4 * M) @(posedge clk);
    checks++;
    if (ends != n_int) begin failures++; $display("%0d integrations ended, want %0d", ends, n_int); end
    checks++;
    if (drops == 0) begin failures++; $display("no dump dropped"); end
    checks++;
    if (sats == 0) begin failures++; $display("no saturation"); end
    checks++;
    if (dumps_out != ends - drops) begin failures++; $display("%0d dumps out, want %0d", dumps_out, ends - drops); end
    $display("integrations %0d, dumps %0d, dropped %0d", ends, dumps_out, drops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
