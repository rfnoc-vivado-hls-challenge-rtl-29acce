// ATSC RX filter: root-raised-cosine matched filter and arbitrary resampler
// built as a polyphase FIR filterbank. The input arrives at IN_RATE_HZ
// (6.25 MS/s), the output leaves at OUT_RATE_HZ (1.1 times the ATSC symbol
// rate, 11.8385 MS/s).
//
// The prototype filter has NFILTS*TAPS_PER_ARM coefficients h[] at NFILTS
// times the input rate; arm p holds h[k*NFILTS + p], k = 0..TAPS_PER_ARM-1.
// A phase accumulator counts, in input samples with 24 fraction bits, where
// the next output falls after the newest input x[n]. While it is below one,
// an output is computed with the arm chosen by the accumulator's top
// fraction bits,  y = sum_k x[n-k] * h[k*NFILTS + p],  and the accumulator
// advances by STEP = IN_RATE/OUT_RATE; once it reaches one, it drops by one
// and the next input is taken. So each input gives one or two outputs, and a
// packet of 32 inputs gives 60 or 61 outputs.
//
// The input window holds the newest TAPS_PER_ARM = 19 samples and is kept
// between packets: the 18 older samples are the history the filterbank needs
// so that a packet boundary causes no start-up transient.
//
// Filter shape (RRC, roll-off 0.1152, at half the ATSC symbol rate) and its
// coefficients are computed at elaboration; each arm's DC gain is 1.
// Coefficients are 18-bit with 15 fraction bits. The 18-sample history, the
// rates and the 60/61 output pattern follow the receiver; 16 arms, nearest-arm
// selection without interpolation, fixed point, and the settings register map
// (address SR_STEP = 0 writes STEP; each settings write is answered one
// cycle later by rb_stb with the addressed register's new value on rb_data)
// are this design's choices.
//
// Interface: complex samples {Q, I} in and out with valid/ready. MACS taps
// are multiplied and accumulated per clock, so an output takes
// ceil(TAPS_PER_ARM/MACS) + 3 cycles (8 at the defaults) and an input 2:
// about 23.6 MS/s out at a 214 MHz clock, twice the rate the receiver needs.
// MACS is this design's choice. m_tlast marks the last output produced from
// an input word that carried s_tlast.
module atsc_rx_filter
  import atsc_pkg::*;
#(
  parameter int  NFILTS       = 16,
  parameter int  TAPS_PER_ARM = 19,
  parameter real IN_RATE_HZ   = 6.25e6,
  parameter real OUT_RATE_HZ  = 11.8385e6,
  parameter real ROLLOFF      = 0.1152,
  parameter int  MACS         = 4
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        set_stb,
  input  logic [7:0]  set_addr,
  input  logic [31:0] set_data,
  output logic        rb_stb,
  output logic [31:0] rb_data,
  input  csample_t    s_tdata,
  input  logic        s_tvalid,
  output logic        s_tready,
  input  logic        s_tlast,
  output csample_t    m_tdata,
  output logic        m_tvalid,
  input  logic        m_tready,
  output logic        m_tlast
);
  localparam int NT     = NFILTS * TAPS_PER_ARM;
  localparam int LNF    = $clog2(NFILTS);
  localparam int FB     = 24;                      // accumulator fraction bits
  localparam int AW     = 33;                      // accumulator width, holds 1 + any 32-bit step
  localparam logic [31:0] STEP_INIT = 32'($rtoi(IN_RATE_HZ / OUT_RATE_HZ * (2.0 ** FB) + 0.5));
  localparam logic [7:0]  SR_STEP   = 8'd0;
  localparam int KW     = $clog2(TAPS_PER_ARM + MACS);

  typedef logic signed [17:0] coef_t;
  typedef coef_t coef_tab_t [NT];

  // Root-raised-cosine impulse response, t in symbol periods
  function automatic real rrc(real t, real a);
    real pi;
    pi = PI;
    if (t == 0.0) return 1.0 - a + 4.0 * a / pi;
    if ((4.0 * a * t == 1.0) || (4.0 * a * t == -1.0))
      return a / $sqrt(2.0) * ((1.0 + 2.0 / pi) * $sin(pi / (4.0 * a)) +
                               (1.0 - 2.0 / pi) * $cos(pi / (4.0 * a)));
    return ($sin(pi * t * (1.0 - a)) + 4.0 * a * t * $cos(pi * t * (1.0 + a))) /
           (pi * t * (1.0 - (4.0 * a * t) * (4.0 * a * t)));
  endfunction

  function automatic coef_tab_t mk_taps();
    coef_tab_t c;
    real h [NT];
    real sum, sps;
    sps = IN_RATE_HZ * NFILTS / (ATSC_SYMBOL_RATE / 2.0);  // filter samples per symbol
    sum = 0.0;
    for (int i = 0; i < NT; i++) begin
      h[i] = rrc((i - (NT - 1) / 2.0) / sps, ROLLOFF);
      sum += h[i];
    end
    for (int i = 0; i < NT; i++)
      c[i] = coef_t'($rtoi(h[i] * NFILTS / sum * 32768.0 + ((h[i] < 0) ? -0.5 : 0.5)));
    return c;
  endfunction

  localparam coef_tab_t TAPS = mk_taps();

  typedef enum logic [1:0] {S_IN, S_CHECK, S_MAC, S_OUT} state_t;
  state_t state;

  csample_t           win [TAPS_PER_ARM];
  logic [31:0]        step;
  logic [AW-1:0]      acc;
  logic               last_in;
  logic [KW-1:0]      k;
  logic [LNF-1:0]     arm;
  logic signed [47:0] sum_i, sum_q;
  logic signed [47:0] part_i, part_q;   // this clock's MACS products
  int                 kk;

  assign s_tready = (state == S_IN);
  assign m_tvalid = (state == S_OUT);
  assign arm      = acc[FB-1 -: LNF];

  always_comb begin
    part_i = '0;
    part_q = '0;
    kk     = 0;
    for (int j = 0; j < MACS; j++) begin
      kk = int'(k) + j;
      if (kk < TAPS_PER_ARM) begin
        part_i = part_i + 48'(win[kk].i * TAPS[kk * NFILTS + int'(arm)]);
        part_q = part_q + 48'(win[kk].q * TAPS[kk * NFILTS + int'(arm)]);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IN;
      step     <= STEP_INIT;
      rb_stb   <= 1'b0;
      rb_data  <= '0;
      acc      <= '0;
      last_in  <= 1'b0;
      k        <= '0;
      sum_i    <= '0;
      sum_q    <= '0;
      m_tdata  <= '0;
      m_tlast  <= 1'b0;
      for (int j = 0; j < TAPS_PER_ARM; j++) win[j] <= '0;
    end else begin
      if (set_stb && set_addr == SR_STEP) step <= set_data;
      rb_stb <= set_stb;
      if (set_stb) rb_data <= (set_addr == SR_STEP) ? set_data : '0;
      unique case (state)
        S_IN: if (s_tvalid) begin
          for (int j = TAPS_PER_ARM - 1; j > 0; j--) win[j] <= win[j-1];
          win[0]  <= s_tdata;
          last_in <= s_tlast;
          state   <= S_CHECK;
        end
        S_CHECK: begin
          if (acc[AW-1:FB] == '0) begin
            k     <= '0;
            sum_i <= '0;
            sum_q <= '0;
            state <= S_MAC;
          end else begin
            acc   <= acc - AW'(1 << FB);
            state <= S_IN;
          end
        end
        S_MAC: begin
          if (int'(k) >= TAPS_PER_ARM) begin
            m_tdata.i <= sat16(64'(sum_i >>> 15));
            m_tdata.q <= sat16(64'(sum_q >>> 15));
            m_tlast   <= last_in && ((acc + AW'(step)) >= AW'(1 << FB));
            state     <= S_OUT;
          end else begin
            sum_i <= sum_i + part_i;
            sum_q <= sum_q + part_q;
            k     <= k + KW'(MACS);
          end
        end
        S_OUT: if (m_tready) begin
          acc   <= acc + AW'(step);
          state <= S_CHECK;
        end
        default: state <= S_IN;
      endcase
    end
  end
endmodule
