// DC blocker: removes the DC component of a real sample stream with two
// cascaded moving averagers of length D (the short form of the classic
// linear-phase DC blocker):
//   m1[n] = sum_{k=0}^{D-1} x[n-k]         (running sum, full precision)
//   m2[n] = sum_{k=0}^{D-1} m1[n-k]
//   y[n]  = x[n-(D-1)] - floor(m2[n] / D^2)
// The output is the input delayed by D-1 samples (the group delay of the
// cascade) minus the twice-smoothed signal, i.e. a notch at DC with unit gain
// elsewhere. D = 128 is the delay-line length the receiver runs with; D must
// be a power of two so that the division is a shift.
//
// The length can be changed at run time over the settings bus: a write to
// address SR_LEN (0) sets log2 of the length, clamped to 1..log2(D), and
// clears the history. Each settings write is answered one cycle later by
// rb_stb with the addressed register's new value on rb_data. Making the
// length a user setting follows the receiver; the register map and the
// readback timing are this design's choices. Only the low bits of rb_data
// can be non-zero, since the register holds a log2 value.
//
// One circular buffer of D input samples gives both x[n-D] (leaving the first
// sum) and x[n-D+1] (the delayed output term); a second buffer holds the
// last D values of m1. Both read as zero until D samples have been written,
// so the block starts from an all-zero history.
//
// Interface: valid/ready streams, one sample per clock, one cycle latency.
// tlast travels with the sample, so a D-sample packet in gives a D-sample
// packet out.
module dc_blocker
  import atsc_pkg::*;
#(
  parameter int D = 128
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        set_stb,
  input  logic [7:0]  set_addr,
  input  logic [31:0] set_data,
  output logic        rb_stb,
  output logic [31:0] rb_data,
  input  sample_t s_tdata,
  input  logic    s_tvalid,
  output logic    s_tready,
  input  logic    s_tlast,
  output sample_t m_tdata,
  output logic    m_tvalid,
  input  logic    m_tready,
  output logic    m_tlast
);
  localparam int LD  = $clog2(D);
  localparam int W1  = 16 + LD;      // width of m1
  localparam int W2  = 16 + 2 * LD;  // width of m2
  localparam logic [7:0] SR_LEN = 8'd0;

  sample_t                xbuf [D];
  logic signed [W1-1:0]   mbuf [D];
  logic [LD-1:0]          ptr;
  logic [LD:0]            fill;      // saturates at D: history valid
  logic signed [W1-1:0]   m1;
  logic signed [W2-1:0]   m2;

  sample_t                x_old;     // x[n-D]
  sample_t                x_dly;     // x[n-D+1]
  logic signed [W1-1:0]   m1_old;    // m1[n-D]
  logic signed [W1-1:0]   m1_new;
  logic signed [W2-1:0]   m2_new;
  logic [LD-1:0]          ptr_n;
  logic [3:0]             lg;        // log2 of the active length
  logic [LD:0]            dlen;      // active length
  logic [LD-1:0]          dmask;
  logic [3:0]             lg_req;

  assign s_tready = !m_tvalid || m_tready;
  assign dlen     = (LD+1)'(1) << lg;
  assign dmask    = LD'(dlen - 1'b1);
  assign ptr_n    = (ptr + 1'b1) & dmask;

  always_comb begin
    lg_req = set_data[3:0];
    if (set_data[31:4] != '0 || lg_req > 4'(LD)) lg_req = 4'(LD);
    if (lg_req == 4'd0) lg_req = 4'd1;
  end

  always_comb begin
    x_old  = (fill == dlen) ? xbuf[ptr] : '0;
    m1_old = (fill == dlen) ? mbuf[ptr] : '0;
    x_dly  = (fill >= dlen - 1'b1) ? xbuf[ptr_n] : '0;
    m1_new = m1 + W1'(s_tdata) - W1'(x_old);
    m2_new = m2 + W2'(m1_new) - W2'(m1_old);
  end

  always_ff @(posedge clk) begin
    if (s_tvalid && s_tready) begin
      xbuf[ptr] <= s_tdata;
      mbuf[ptr] <= m1_new;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ptr      <= '0;
      fill     <= '0;
      m1       <= '0;
      m2       <= '0;
      lg       <= 4'(LD);
      rb_stb   <= 1'b0;
      rb_data  <= '0;
      m_tvalid <= 1'b0;
      m_tdata  <= '0;
      m_tlast  <= 1'b0;
    end else begin
      rb_stb <= set_stb;
      if (set_stb) rb_data <= (set_addr == SR_LEN) ? 32'(lg_req) : '0;
      if (m_tvalid && m_tready) m_tvalid <= 1'b0;
      if (set_stb && set_addr == SR_LEN) begin
        // new length: restart from an empty history
        lg   <= lg_req;
        ptr  <= '0;
        fill <= '0;
        m1   <= '0;
        m2   <= '0;
      end else if (s_tvalid && s_tready) begin
        ptr      <= ptr_n;
        if (fill != dlen) fill <= fill + 1'b1;
        m1       <= m1_new;
        m2       <= m2_new;
      end
      if (s_tvalid && s_tready) begin
        m_tdata  <= sat16(64'(x_dly) - 64'(m2_new >>> (2 * lg)));
        m_tlast  <= s_tlast;
        m_tvalid <= 1'b1;
      end
    end
  end
endmodule
