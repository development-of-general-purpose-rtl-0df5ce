// combinator: joins the in-phase and quadrature ADC streams into one complex
// stream.
//
// Each input is an AXI4-Stream bus carrying LANES 16-bit samples per beat in
// the ADC clock domain (512 MHz in the design: 8 samples x 16 bits = 128 bits).
// A beat is taken from both inputs together (a stream join): the output beat
// holds LANES complex samples, lane k = {Q[k], I[k]} in bits [32k+31 : 32k],
// with the in-phase sample in the low half.  If one ADC stream presents a beat
// before the other, that beat waits (its tready stays low) until its partner
// arrives, so the pairing of I and Q samples is kept by beat count.
//
// Timing: one register stage; the output register is refilled in the same
// cycle it is emptied, so a continuous input stream passes at one beat per
// clock.  skew_wait pulses in each cycle in which exactly one input is valid.
//
// The joining of the I and Q buses into a single bus follows the published
// design; the lane packing, the join rule and the register stage are this
// implementation's choices.
module combinator #(
  parameter int LANES  = spec_pkg::ADC_LANES,
  parameter int SAMP_W = spec_pkg::ADC_W
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [LANES*SAMP_W-1:0]     s_i_tdata,
  input  logic                        s_i_tvalid,
  output logic                        s_i_tready,
  input  logic [LANES*SAMP_W-1:0]     s_q_tdata,
  input  logic                        s_q_tvalid,
  output logic                        s_q_tready,
  output logic [2*LANES*SAMP_W-1:0]   m_tdata,
  output logic                        m_tvalid,
  input  logic                        m_tready,
  output logic                        skew_wait
);
  logic load, space;

  assign space      = !m_tvalid || m_tready;
  assign load       = space && s_i_tvalid && s_q_tvalid;
  assign s_i_tready = space && s_q_tvalid;
  assign s_q_tready = space && s_i_tvalid;
  assign skew_wait  = s_i_tvalid ^ s_q_tvalid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_tvalid <= 1'b0;
      m_tdata  <= '0;
    end else begin
      if (load) begin
        for (int k = 0; k < LANES; k++) begin
          m_tdata[2*SAMP_W*k +: SAMP_W]          <= s_i_tdata[SAMP_W*k +: SAMP_W];
          m_tdata[2*SAMP_W*k + SAMP_W +: SAMP_W] <= s_q_tdata[SAMP_W*k +: SAMP_W];
        end
        m_tvalid <= 1'b1;
      end else if (m_tready) begin
        m_tvalid <= 1'b0;
      end
    end
  end

endmodule
