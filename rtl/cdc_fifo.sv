// cdc_fifo: clock-domain-crossing FIFO between the 512 MHz ADC clock and the
// 256 MHz DSP clock, with a 2:1 width conversion.
//
// Write side (wclk): accepts IN_W-bit beats.  Two consecutive beats are packed
// into one 2*IN_W-bit word, the earlier beat in the low half, so at the output
// lane order equals sample order.  The packed word is written into a DEPTH-word
// dual-clock memory.  The ADC stream cannot be stalled, so s_tready is always
// high; when the memory is full the packed word is dropped and w_overflow
// pulses.  The event is also carried to the read domain (r_overflow).
//
// Read side (rclk): first-word-fall-through.  m_tvalid is high while the FIFO
// holds a word, m_tdata shows it, and m_tready pops it.
//
// Pointers cross the domains as Gray codes through two-flop synchronizers, the
// usual asynchronous FIFO construction; the empty flag is pessimistic by the
// synchronizer delay, which only adds latency.
//
// The published design uses a FIFO here to halve the clock rate from 512 MHz
// to 256 MHz; the depth, the packing order and the drop-on-full rule are this
// implementation's choices.
module cdc_fifo #(
  parameter int IN_W  = 2 * spec_pkg::ADC_BUS_W,
  parameter int DEPTH = 16
) (
  input  logic              wclk,
  input  logic              wrst_n,
  input  logic [IN_W-1:0]   s_tdata,
  input  logic              s_tvalid,
  output logic              s_tready,
  output logic              w_overflow,
  input  logic              rclk,
  input  logic              rrst_n,
  output logic [2*IN_W-1:0] m_tdata,
  output logic              m_tvalid,
  input  logic              m_tready,
  output logic              r_overflow
);
  localparam int AW = $clog2(DEPTH);

  logic [2*IN_W-1:0] mem [DEPTH];
  logic [AW:0]       rbin, rgray_r, wgray_r1, wgray_r2;

  // ---------------- write domain ----------------
  logic [IN_W-1:0] lo_q;
  logic            have_lo;
  logic [AW:0]     wbin, wgray, rgray_w1, rgray_w2;
  logic            wfull, wpush, wtoggle;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  assign s_tready = 1'b1;
  assign wfull    = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign wpush    = s_tvalid && have_lo && !wfull;

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      lo_q       <= '0;
      have_lo    <= 1'b0;
      wbin       <= '0;
      wgray      <= '0;
      rgray_w1   <= '0;
      rgray_w2   <= '0;
      w_overflow <= 1'b0;
      wtoggle    <= 1'b0;
    end else begin
      rgray_w1   <= rgray_r;
      rgray_w2   <= rgray_w1;
      w_overflow <= 1'b0;
      if (s_tvalid) begin
        if (!have_lo) begin
          lo_q    <= s_tdata;
          have_lo <= 1'b1;
        end else begin
          have_lo <= 1'b0;
          if (wfull) begin
            w_overflow <= 1'b1;
            wtoggle    <= !wtoggle;
          end else begin
            wbin  <= wbin + 1'b1;
            wgray <= bin2gray(wbin + 1'b1);
          end
        end
      end
    end
  end

  always_ff @(posedge wclk) begin
    if (wpush) mem[wbin[AW-1:0]] <= {s_tdata, lo_q};
  end

  // ---------------- read domain ----------------
  logic [2:0]  tog_r;

  assign m_tvalid = (rgray_r != wgray_r2);
  assign m_tdata  = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin       <= '0;
      rgray_r    <= '0;
      wgray_r1   <= '0;
      wgray_r2   <= '0;
      tog_r      <= '0;
      r_overflow <= 1'b0;
    end else begin
      wgray_r1   <= wgray;
      wgray_r2   <= wgray_r1;
      tog_r      <= {tog_r[1:0], wtoggle};
      r_overflow <= tog_r[2] ^ tog_r[1];
      if (m_tvalid && m_tready) begin
        rbin    <= rbin + 1'b1;
        rgray_r <= bin2gray(rbin + 1'b1);
      end
    end
  end

  initial assert (DEPTH >= 4 && (1 << AW) == DEPTH) else $error("DEPTH must be a power of two >= 4");

endmodule
