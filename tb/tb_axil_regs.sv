// tb_axil_regs: checks the AXI4-Lite register file.
//
// Reset values are read back, registers are written with address and data
// presented in either order and with partial byte strobes, and every write is
// read back against a model.  Event pulses must set the sticky STATUS bits and
// count DUMPS, and writing CTRL bit 0 must clear both.  The master holds
// bready and rready low at random to check that responses wait.
module tb_axil_regs;
  logic clk = 0, rst_n = 0;
  logic [7:0]  s_awaddr, s_araddr;
  logic        s_awvalid, s_awready, s_wvalid, s_wready, s_bvalid, s_bready;
  logic [31:0] s_wdata, s_rdata;
  logic [3:0]  s_wstrb;
  logic [1:0]  s_bresp, s_rresp;
  logic        s_arvalid, s_arready, s_rvalid, s_rready;
  logic [11:0] fft_shift;
  logic [31:0] acc_len;
  logic [5:0]  scale;
  logic        ev_fft_ovf, ev_fifo_ovf, ev_dump_drop, ev_sat, ev_dump_done;

  axil_regs #(.SHIFT_W(12), .ADDR_W(8)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("%s: got %h want %h", what, got, want);
    end
  endtask

  task automatic axi_write(logic [7:0] a, logic [31:0] d, logic [3:0] strb);
    int order = $urandom_range(0, 2);
    s_wdata <= d; s_wstrb <= strb; s_awaddr <= a;
    if (order != 1) s_awvalid <= 1;
    if (order != 2) s_wvalid  <= 1;
    @(posedge clk);
    s_awvalid <= 1; s_wvalid <= 1;
    while (!(s_awready && s_wready)) @(posedge clk);
    @(posedge clk);
    s_awvalid <= 0; s_wvalid <= 0;
    s_bready <= 0;
    repeat ($urandom_range(0, 3)) @(posedge clk);
    check("bvalid", 32'(s_bvalid), 1);
    s_bready <= 1;
    @(posedge clk);
    s_bready <= 0;
  endtask

  task automatic axi_read(logic [7:0] a, output logic [31:0] d);
    s_araddr <= a; s_arvalid <= 1;
    s_rready <= 0;
    @(posedge clk);
    while (!s_arready) @(posedge clk);
    s_arvalid <= 0;
    repeat ($urandom_range(1, 3)) @(posedge clk);
    while (!s_rvalid) @(posedge clk);
    d = s_rdata;
    s_rready <= 1;
    @(posedge clk);
    s_rready <= 0;
    check("rresp", 32'(s_rresp), 0);
  endtask

  // one-clock pulse on event input e: 0 fft_ovf, 1 fifo_ovf, 2 dump_drop, 3 sat, 4 dump_done
  task automatic pulse(int e);
    {ev_dump_done, ev_sat, ev_dump_drop, ev_fifo_ovf, ev_fft_ovf} <= 5'(1 << e);
    @(posedge clk);
    {ev_dump_done, ev_sat, ev_dump_drop, ev_fifo_ovf, ev_fft_ovf} <= '0;
    @(posedge clk);
  endtask

  initial begin
    logic [31:0] d, m_shift, m_len, m_scale;
    s_awvalid = 0; s_wvalid = 0; s_bready = 0; s_arvalid = 0; s_rready = 0;
    s_awaddr = 0; s_araddr = 0; s_wdata = 0; s_wstrb = 0;
    ev_fft_ovf = 0; ev_fifo_ovf = 0; ev_dump_drop = 0; ev_sat = 0; ev_dump_done = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    axi_read(8'h04, d); check("reset FFT_SHIFT", d, 32'h0000_0FFF);
    axi_read(8'h08, d); check("reset ACC_LEN", d, 32'd10240);
    axi_read(8'h0C, d); check("reset SCALE", d, 0);
    axi_read(8'h10, d); check("reset STATUS", d, 0);
    m_shift = 32'hFFF; m_len = 10240; m_scale = 0;
    for (int i = 0; i < 30; i++) begin
      logic [31:0] v;
      logic [3:0]  st;
      logic [7:0]  a;
      v  = $urandom;
      st = (i < 10) ? 4'hF : 4'($urandom);
      a  = 8'(4 * $urandom_range(1, 3));
      axi_write(a, v, st);
      for (int b = 0; b < 4; b++)
        if (st[b]) case (a)
          8'h04: m_shift[8*b +: 8] = v[8*b +: 8];
          8'h08: m_len[8*b +: 8]   = v[8*b +: 8];
          8'h0C: m_scale[8*b +: 8] = v[8*b +: 8];
          default: ;
        endcase
      m_shift &= 32'hFFF;
      m_scale &= 32'h3F;
      axi_read(a, d);
      check("readback", d, (a == 8'h04) ? m_shift : (a == 8'h08) ? m_len : m_scale);
      check("fft_shift port", 32'(fft_shift), m_shift);
      check("acc_len port", acc_len, m_len);
      check("scale port", 32'(scale), m_scale);
    end
    // status and counters
    pulse(0);
    pulse(3);
    repeat (5) pulse(4);
    axi_read(8'h10, d); check("STATUS fft/sat", d, 32'b1001);
    pulse(1);
    pulse(2);
    axi_read(8'h10, d); check("STATUS all", d, 32'b1111);
    axi_read(8'h14, d); check("DUMPS", d, 5);
    axi_read(8'h20, d); check("unmapped", d, 0);
    axi_write(8'h00, 32'h1, 4'h1);
    axi_read(8'h10, d); check("STATUS cleared", d, 0);
    axi_read(8'h14, d); check("DUMPS cleared", d, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
