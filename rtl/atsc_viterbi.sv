// Trellis decoder for the 8-VSB trellis code (12 interleaved coders).
//
// Code: each transmitted byte goes to one of NDEC = 12 coders; a coder sends
// its byte as 4 symbols, one dibit (x2, x1) each, most significant dibit
// first. x2 is precoded, z2 = x2 ^ (previous z2 of that coder); x1 passes as
// z1 and drives a 4-state convolutional coder with state (s1, s0):
//   z0 = s0,  next state = (x1 ^ s0, s1).
// The symbol level is 2*(4*z2 + 2*z1 + z0) - 7, i.e. -7..+7, scaled by LVL
// at the decoder input. Symbols are dealt round-robin: symbol j belongs to
// coder j mod 12, so bytes 12*m .. 12*m+11 occupy symbols 48*m .. 48*m+47.
//
// Decoder: per coder, 4 path metrics and 4 register-exchange survivors of
// TB (z2, x1) decisions. For each branch the better of the two parallel
// transitions (z2 = 0 or 1) is taken with an absolute-distance metric; the
// add-compare-select keeps the better of the two predecessors of each state,
// and the metrics are renormalised by their minimum. Once a coder has made
// TB-1 steps, the oldest decision of its best state's survivor is released;
// x2 is recovered as z2 ^ (previous released z2). Four released dibits make a
// byte. Bytes therefore come out in transmission order, 12*(TB-1)+36 symbols
// after their first symbol.
//
// The trellis structure is that of the ATSC standard; the symbol-to-coder
// rotation from segment to segment and the segment sync symbols are not
// modelled (the input is a plain stream of data symbols). Decoder structure,
// TB, metric and level scale are this design's choices.
//
// Interface: 16-bit signed soft symbols in, bytes out, valid/ready; a symbol
// is taken per clock while the output register is free.
module atsc_viterbi #(
  parameter int NDEC = 12,
  parameter int TB   = 32,
  parameter int LVL  = 256
) (
  input  logic              clk,
  input  logic              rst,
  input  logic signed [15:0] s_tdata,
  input  logic              s_tvalid,
  output logic              s_tready,
  output logic [7:0]        m_tdata,
  output logic              m_tvalid,
  input  logic              m_tready
);
  localparam int PMW = 20;
  localparam int EW  = $clog2(NDEC);
  localparam int CW  = $clog2(TB + 1);

  typedef logic [PMW-1:0]  pm_t;
  typedef logic [2*TB-1:0] surv_t;

  pm_t            pm    [NDEC][4];
  surv_t          surv  [NDEC][4];
  logic [NDEC-1:0] lastz2;
  logic [7:0]     acc   [NDEC];
  logic [EW-1:0]  e;           // coder of the current symbol
  logic [CW-1:0]  steps;       // coder steps made, saturates at TB-1
  logic [1:0]     g;           // dibit index of the released decision
  logic           fire;

  pm_t            npm   [4];
  surv_t          nsurv [4];
  logic [1:0]     best;
  logic           rel_z2, rel_x1, rel_x2;

  assign s_tready = !m_tvalid || m_tready;
  assign fire     = s_tvalid && s_tready;

  function automatic logic [17:0] absdist(logic signed [15:0] r, int lvl);
    logic signed [17:0] d;
    d = 18'(r) - 18'(lvl * LVL);
    return (d < 0) ? -d : d;
  endfunction

  always_comb begin
    pm_t cand [2];
    logic [1:0] cz2;
    pm_t mn;
    for (int ns = 0; ns < 4; ns++) begin
      int a, b;
      a = ns >> 1;
      b = ns & 1;
      for (int s0 = 0; s0 < 2; s0++) begin
        int x1, lv0, lv1;
        logic [17:0] d0, d1, bm;
        x1  = a ^ s0;
        lv0 = 2 * (2 * x1 + s0) - 7;
        lv1 = lv0 + 8;
        d0  = absdist(s_tdata, lv0);
        d1  = absdist(s_tdata, lv1);
        cz2[s0]  = d1 < d0;
        bm       = (d1 < d0) ? d1 : d0;
        cand[s0] = pm[e][b * 2 + s0] + PMW'(bm);
      end
      if (cand[1] < cand[0]) begin
        npm[ns]   = cand[1];
        nsurv[ns] = {surv[e][b * 2 + 1][2*TB-3:0], cz2[1], 1'(a ^ 1)};
      end else begin
        npm[ns]   = cand[0];
        nsurv[ns] = {surv[e][b * 2][2*TB-3:0], cz2[0], 1'(a)};
      end
    end
    // best state and renormalisation
    best = 2'd0;
    mn   = npm[0];
    for (int ns = 1; ns < 4; ns++)
      if (npm[ns] < mn) begin
        mn   = npm[ns];
        best = 2'(ns);
      end
    for (int ns = 0; ns < 4; ns++) npm[ns] = npm[ns] - mn;
    rel_z2 = nsurv[best][2*TB-1];
    rel_x1 = nsurv[best][2*TB-2];
    rel_x2 = rel_z2 ^ lastz2[e];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      e        <= '0;
      steps    <= '0;
      g        <= '0;
      lastz2   <= '0;
      m_tvalid <= 1'b0;
      m_tdata  <= '0;
      for (int d = 0; d < NDEC; d++) begin
        acc[d] <= '0;
        for (int s = 0; s < 4; s++) begin
          pm[d][s]   <= (s == 0) ? '0 : PMW'(1 << 12);
          surv[d][s] <= '0;
        end
      end
    end else begin
      if (m_tvalid && m_tready) m_tvalid <= 1'b0;
      if (fire) begin
        for (int s = 0; s < 4; s++) begin
          pm[e][s]   <= npm[s];
          surv[e][s] <= nsurv[s];
        end
        if (steps == CW'(TB - 1)) begin
          lastz2[e] <= rel_z2;
          acc[e]    <= {acc[e][5:0], rel_x2, rel_x1};
          if (g == 2'd3) begin
            m_tdata  <= {acc[e][5:0], rel_x2, rel_x1};
            m_tvalid <= 1'b1;
          end
        end
        if (e == EW'(NDEC - 1)) begin
          e <= '0;
          if (steps != CW'(TB - 1)) steps <= steps + 1'b1;
          else                      g     <= g + 1'b1;
        end else begin
          e <= e + 1'b1;
        end
      end
    end
  end
endmodule
