// Frequency and phase locked loop (FPLL) for carrier acquisition on the
// 8-VSB pilot. Each complex input sample is rotated by minus the phase of a
// numerically controlled oscillator; the real part of the result is the
// output. The rotated I and Q are each smoothed by a single-pole low-pass
// filter (coefficient 2^-AFC_SHIFT), whose output is dominated by the pilot;
// the angle of the smoothed vector is the phase error. The error is limited
// to +-pi/2 and drives a second-order loop:
//   phase <= phase + freq + ALPHA*err      freq <= freq + BETA*err
// The NCO starts at the pilot's expected offset from the channel centre:
// 309 kHz above the lower band edge of a 6 MHz channel, i.e. -2.691 MHz.
//
// The pilot position, the 11.8385 MS/s sample rate and "one complex sample
// in, one real sample out" follow the receiver; the loop constants
// (alpha 0.01, beta alpha^2/4, low-pass time constant about 5 us) and the
// CORDIC-based rotation and phase detector are this design's choices.
// Angles and the NCO are 32-bit (2^32 = one turn).
//
// Interface: s_tdata is a complex sample {Q, I}; m_tdata the real output.
// One sample per clock, one cycle latency, tlast travels with the sample.
module atsc_fpll
  import atsc_pkg::*;
#(
  parameter real SAMPLE_RATE_HZ  = 11.8385e6,
  parameter real PILOT_OFFSET_HZ = -3.0e6 + 0.309e6,
  parameter int  ALPHA_Q16       = 655,    // 0.01 * 2^16
  parameter int  BETA_Q24        = 419,    // 0.01^2/4 * 2^24
  parameter int  AFC_SHIFT       = 6
) (
  input  logic     clk,
  input  logic     rst,
  input  csample_t s_tdata,
  input  logic     s_tvalid,
  output logic     s_tready,
  input  logic     s_tlast,
  output sample_t  m_tdata,
  output logic     m_tvalid,
  input  logic     m_tready,
  output logic     m_tlast
);
  localparam logic signed [31:0] FREQ_INIT =
    32'($rtoi(PILOT_OFFSET_HZ / SAMPLE_RATE_HZ * (2.0 ** 32)));
  localparam int  FW      = 24;            // low-pass filter state width
  localparam int  INV_K   = 19898;         // 1/1.6468 * 2^15

  logic signed [31:0]   phase, freq;
  logic signed [FW-1:0] fi, fq;            // 8 extra fraction bits

  logic signed [17:0]   rx, ry;
  logic signed [31:0]   rz_unused;
  logic signed [FW+1:0] vx_unused, vy_unused;
  logic signed [31:0]   err_raw, err;
  logic signed [FW-1:0] fi_n, fq_n;
  logic signed [63:0]   out_w;

  assign s_tready = !m_tvalid || m_tready;

  cordic #(.W(16), .ITER(16), .VECTOR(1'b0)) u_rot (
    .x_i(s_tdata.i), .y_i(s_tdata.q), .z_i(-phase),
    .x_o(rx), .y_o(ry), .z_o(rz_unused)
  );

  always_comb begin
    // remove the CORDIC gain from the rotated sample, keep 8 more bits
    logic signed [63:0] ri, rq;
    ri   = (64'(rx) * INV_K) >>> 7;
    rq   = (64'(ry) * INV_K) >>> 7;
    fi_n = fi + FW'((ri - 64'(fi)) >>> AFC_SHIFT);
    fq_n = fq + FW'((rq - 64'(fq)) >>> AFC_SHIFT);
    out_w = ri >>> 8;
  end

  cordic #(.W(FW), .ITER(16), .VECTOR(1'b1)) u_pd (
    .x_i(fi_n), .y_i(fq_n), .z_i('0),
    .x_o(vx_unused), .y_o(vy_unused), .z_o(err_raw)
  );

  always_comb begin
    err = err_raw;
    if (err > 32'sh4000_0000) err = 32'sh4000_0000;
    if (err < -32'sh4000_0000) err = -32'sh4000_0000;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      phase    <= '0;
      freq     <= FREQ_INIT;
      fi       <= '0;
      fq       <= '0;
      m_tvalid <= 1'b0;
      m_tdata  <= '0;
      m_tlast  <= 1'b0;
    end else begin
      if (m_tvalid && m_tready) m_tvalid <= 1'b0;
      if (s_tvalid && s_tready) begin
        fi       <= fi_n;
        fq       <= fq_n;
        phase    <= phase + freq + 32'((64'(err) * ALPHA_Q16) >>> 16);
        freq     <= freq + 32'((64'(err) * BETA_Q24) >>> 24);
        m_tdata  <= sat16(out_w);
        m_tlast  <= s_tlast;
        m_tvalid <= 1'b1;
      end
    end
  end

  logic unused;
  assign unused = ^{rz_unused, vx_unused, vy_unused};
endmodule
