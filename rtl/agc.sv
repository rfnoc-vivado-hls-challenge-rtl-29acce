// Automatic gain control. Each sample is multiplied by the current gain and
// the gain is then moved towards the value that makes |output| equal to the
// reference:  y = x*g;  g += rate*(reference - |y|);  g limited to
// [0, MAX_GAIN].
//
// Number formats (this design's choice; the receiver used floats): samples
// are 16-bit signed with FRAC fraction bits, so REFERENCE = 4.0 is 1024 for
// FRAC = 8; the gain has 24 fraction bits (GAIN_INIT = 1.0); the rate is
// RATE_Q32 / 2^32 (10e-6 by default). Rate, reference, initial gain and
// maximum gain are the values of the receiver's AGC.
//
// Interface: valid/ready streams, one output per input, one sample per
// clock, one cycle of latency (registered output). tlast travels with the
// sample.
module agc
  import atsc_pkg::*;
#(
  parameter int              FRAC      = 8,
  parameter longint unsigned RATE_Q32  = 42950,          // 10e-6 * 2^32
  parameter int              REFERENCE = 4 << FRAC,      // 4.0
  parameter longint unsigned GAIN_INIT = 64'd1 << 24,    // 1.0
  parameter longint unsigned MAX_GAIN  = 64'd65536 << 24 // 65536.0
) (
  input  logic    clk,
  input  logic    rst,
  input  sample_t s_tdata,
  input  logic    s_tvalid,
  output logic    s_tready,
  input  logic    s_tlast,
  output sample_t m_tdata,
  output logic    m_tvalid,
  input  logic    m_tready,
  output logic    m_tlast
);
  logic signed [47:0] gain;     // 24 fraction bits
  logic signed [63:0] prod;
  sample_t            y;
  logic signed [63:0] err;
  logic signed [63:0] delta;
  logic signed [63:0] gnext;

  assign s_tready = !m_tvalid || m_tready;

  always_comb begin
    prod  = 64'(s_tdata) * 64'(gain);
    y     = sat16(prod >>> 24);
    err   = 64'(REFERENCE) - ((y < 0) ? -64'(y) : 64'(y));
    // err has FRAC fraction bits, rate 32: shift to the gain's 24
    delta = (err * $signed({1'b0, RATE_Q32[62:0]})) >>> (FRAC + 32 - 24);
    gnext = 64'(gain) + delta;
    if (gnext > $signed({1'b0, MAX_GAIN[62:0]})) gnext = $signed({1'b0, MAX_GAIN[62:0]});
    if (gnext < 0) gnext = '0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      gain     <= 48'(GAIN_INIT);
      m_tvalid <= 1'b0;
      m_tdata  <= '0;
      m_tlast  <= 1'b0;
    end else begin
      if (m_tvalid && m_tready) m_tvalid <= 1'b0;
      if (s_tvalid && s_tready) begin
        m_tdata  <= y;
        m_tlast  <= s_tlast;
        m_tvalid <= 1'b1;
        gain     <= 48'(gnext);
      end
    end
  end
endmodule
