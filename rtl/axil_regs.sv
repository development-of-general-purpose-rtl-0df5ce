// axil_regs: AXI4-Lite control and status registers of the spectrometer, as
// seen by the software on the processing system.
//
// Register map (byte addresses, 32-bit registers):
//   0x00 CTRL       W   bit 0: write 1 to clear the sticky STATUS bits and DUMPS
//   0x04 FFT_SHIFT  RW  bits [SHIFT_W-1:0]: per-stage FFT shift schedule
//                       (bit s halves stage s), reset all ones
//   0x08 ACC_LEN    RW  spectra per integration, reset 10240 (10.24 ms)
//   0x0C SCALE      RW  bits [5:0]: right shift applied to integrated powers
//   0x10 STATUS     R   sticky: 0 FFT overflow, 1 FIFO overflow,
//                       2 dump dropped, 3 output saturated
//   0x14 DUMPS      R   number of integrations completed
// Unmapped addresses read 0 and ignore writes; every access answers OKAY.
//
// Handshake: a write is taken when both AWVALID and WVALID are high and no
// response is pending; the response follows one clock later.  WSTRB selects
// bytes.  A read returns the data one clock after ARVALID is taken.  Reads and
// writes are independent.
//
// That the FFT shift schedule, the integration length and the scaling factor
// are set over AXI4-Lite follows the published design; the map, the reset
// values other than the shift schedule (the 10.24 ms integration is the
// published test setting) and the status bits are this implementation's.
module axil_regs #(
  parameter int SHIFT_W = spec_pkg::FFT_STAGES,
  parameter int ADDR_W  = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  // AXI4-Lite slave
  input  logic [ADDR_W-1:0]  s_awaddr,
  input  logic               s_awvalid,
  output logic               s_awready,
  input  logic [31:0]        s_wdata,
  input  logic [3:0]         s_wstrb,
  input  logic               s_wvalid,
  output logic               s_wready,
  output logic [1:0]         s_bresp,
  output logic               s_bvalid,
  input  logic               s_bready,
  input  logic [ADDR_W-1:0]  s_araddr,
  input  logic               s_arvalid,
  output logic               s_arready,
  output logic [31:0]        s_rdata,
  output logic [1:0]         s_rresp,
  output logic               s_rvalid,
  input  logic               s_rready,
  // settings
  output logic [SHIFT_W-1:0] fft_shift,
  output logic [31:0]        acc_len,
  output logic [5:0]         scale,
  // events from the datapath (single-cycle pulses)
  input  logic               ev_fft_ovf,
  input  logic               ev_fifo_ovf,
  input  logic               ev_dump_drop,
  input  logic               ev_sat,
  input  logic               ev_dump_done
);
  localparam logic [ADDR_W-1:0] A_CTRL   = ADDR_W'('h00);
  localparam logic [ADDR_W-1:0] A_SHIFT  = ADDR_W'('h04);
  localparam logic [ADDR_W-1:0] A_ACCLEN = ADDR_W'('h08);
  localparam logic [ADDR_W-1:0] A_SCALE  = ADDR_W'('h0C);
  localparam logic [ADDR_W-1:0] A_STATUS = ADDR_W'('h10);
  localparam logic [ADDR_W-1:0] A_DUMPS  = ADDR_W'('h14);

  logic [3:0]  status;
  logic [31:0] dumps;
  logic        wr, clr;

  assign wr        = s_awvalid && s_wvalid && !s_bvalid;
  assign s_awready = wr;
  assign s_wready  = wr;
  assign s_bresp   = 2'b00;
  assign s_rresp   = 2'b00;
  assign s_arready = !s_rvalid;
  assign clr       = wr && (s_awaddr == A_CTRL) && s_wstrb[0] && s_wdata[0];

  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] nw,
                                        input logic [3:0] strb);
    for (int b = 0; b < 4; b++) if (strb[b]) old[8*b +: 8] = nw[8*b +: 8];
    return old;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fft_shift <= '1;
      acc_len   <= 32'd10240;
      scale     <= '0;
      s_bvalid  <= 1'b0;
    end else begin
      if (s_bvalid && s_bready) s_bvalid <= 1'b0;
      if (wr) begin
        s_bvalid <= 1'b1;
        unique case (s_awaddr)
          A_SHIFT:  fft_shift <= SHIFT_W'(merge(32'(fft_shift), s_wdata, s_wstrb));
          A_ACCLEN: acc_len   <= merge(acc_len, s_wdata, s_wstrb);
          A_SCALE:  scale     <= 6'(merge(32'(scale), s_wdata, s_wstrb));
          default: ;
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      status <= '0;
      dumps  <= '0;
    end else if (clr) begin
      status <= '0;
      dumps  <= '0;
    end else begin
      status <= status | {ev_sat, ev_dump_drop, ev_fifo_ovf, ev_fft_ovf};
      if (ev_dump_done) dumps <= dumps + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_rvalid <= 1'b0;
      s_rdata  <= '0;
    end else begin
      if (s_rvalid && s_rready) s_rvalid <= 1'b0;
      if (s_arvalid && s_arready) begin
        s_rvalid <= 1'b1;
        unique case (s_araddr)
          A_SHIFT:  s_rdata <= 32'(fft_shift);
          A_ACCLEN: s_rdata <= acc_len;
          A_SCALE:  s_rdata <= 32'(scale);
          A_STATUS: s_rdata <= 32'(status);
          A_DUMPS:  s_rdata <= dumps;
          default:  s_rdata <= '0;
        endcase
      end
    end
  end

endmodule
