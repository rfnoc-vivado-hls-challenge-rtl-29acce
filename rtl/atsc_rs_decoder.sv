// Reed-Solomon decoder for the ATSC outer code, RS(207,187) over GF(256)
// (field polynomial x^8+x^4+x^3+x^2+1, generator roots alpha^0..alpha^19):
// corrects up to T = 10 wrong bytes in each 207-byte packet and outputs the
// 187 data bytes.
//
// The first byte received is the coefficient of x^206. A packet is decoded
// in four phases:
//   1. receive: bytes are stored and the 20 syndromes S_j = r(alpha^j) are
//      updated by Horner's rule as each byte arrives (207 cycles);
//   2. Berlekamp-Massey without inversions: 20 iterations, one per cycle,
//      give the error locator Lambda (scaled by a non-zero constant, which
//      leaves its roots and the Forney ratio unchanged), then the evaluator
//      Omega = S*Lambda mod x^20 is formed (one cycle);
//   3. Chien search over all 207 positions counts the roots of Lambda;
//   4. output: the 187 data bytes are sent; at each position whose
//      X^-1 = alpha^-(206-k) is a root, the error value
//      Omega(X^-1) / (odd part of Lambda at X^-1) is added. If the number of
//      roots differs from the locator's degree the packet is uncorrectable
//      and is passed on unchanged.
// err_count gives the corrections made in the last packet (15: failure).
//
// The code parameters are those of ATSC; the decoder's architecture is this
// design's own. Interface: byte streams with valid/ready; the input is held
// off while a packet is being decoded and sent (about 2*207+187+22 cycles
// per packet). Packets are counted, s_tlast is not needed; m_tlast marks the
// 187th byte.
module atsc_rs_decoder
  import atsc_pkg::*;
#(
  parameter int N = 207,
  parameter int K = 187
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] s_tdata,
  input  logic       s_tvalid,
  output logic       s_tready,
  input  logic       s_tlast,
  output logic [7:0] m_tdata,
  output logic       m_tvalid,
  input  logic       m_tready,
  output logic       m_tlast,
  output logic [3:0] err_count
);
  localparam int NP = N - K;          // parity bytes, 2T
  localparam int T  = NP / 2;
  localparam int PW = $clog2(N + 1);

  typedef logic [7:0] gf_t;
  typedef gf_t const_tab_t [NP + 1];

  function automatic const_tab_t mk_pow(int mult);
    const_tab_t c;
    for (int i = 0; i <= NP; i++) c[i] = gf_pow_alpha(mult * i);
    return c;
  endfunction

  localparam const_tab_t APOW  = mk_pow(1);         // alpha^i
  localparam const_tab_t ASTRT = mk_pow(-(N - 1));  // alpha^-(N-1)i

  typedef enum logic [2:0] {S_RECV, S_BM, S_OMEGA, S_CHIEN, S_OUT} state_t;
  state_t state;

  gf_t           buffer [N];
  gf_t           syn  [NP];
  gf_t           lam  [T + 1];
  gf_t           bpol [T + 1];
  gf_t           gam;
  logic [4:0]    len;             // locator degree L
  logic [4:0]    r;               // BM iteration
  gf_t           lt   [T + 1];    // Chien terms of Lambda
  gf_t           ot   [T];        // Chien terms of Omega
  logic [PW-1:0] pos;
  logic [4:0]    roots;
  logic          ok;

  // ---- combinational helpers ------------------------------------------
  gf_t delta;
  gf_t lam_val, lam_odd, omg_val, evalue;

  always_comb begin
    delta = '0;
    for (int i = 0; i <= T; i++)
      if (int'(r) - i >= 0 && int'(r) - i < NP) delta ^= gf_mul(lam[i], syn[int'(r) - i]);
    lam_val = '0;
    lam_odd = '0;
    for (int i = 0; i <= T; i++) begin
      lam_val ^= lt[i];
      if (i % 2 == 1) lam_odd ^= lt[i];
    end
    omg_val = '0;
    for (int i = 0; i < T; i++) omg_val ^= ot[i];
    evalue = gf_mul(omg_val, gf_inv(lam_odd));
  end

  assign s_tready = (state == S_RECV);
  assign m_tvalid = (state == S_OUT);
  assign m_tlast  = (state == S_OUT) && (pos == PW'(K - 1));
  assign m_tdata  = (ok && lam_val == 8'h00) ? buffer[pos] ^ evalue : buffer[pos];

  always_ff @(posedge clk) begin
    if (state == S_RECV && s_tvalid) buffer[pos] <= s_tdata;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_RECV;
      pos       <= '0;
      r         <= '0;
      len       <= '0;
      gam       <= 8'h01;
      roots     <= '0;
      ok        <= 1'b0;
      err_count <= '0;
      for (int j = 0; j < NP; j++) syn[j] <= '0;
      for (int i = 0; i <= T; i++) begin
        lam[i]  <= '0;
        bpol[i] <= '0;
        lt[i]   <= '0;
      end
      for (int i = 0; i < T; i++) ot[i] <= '0;
    end else begin
      unique case (state)
        S_RECV: if (s_tvalid) begin
          for (int j = 0; j < NP; j++) syn[j] <= gf_mul(syn[j], APOW[j]) ^ s_tdata;
          if (pos == PW'(N - 1)) begin
            pos   <= '0;
            r     <= '0;
            len   <= '0;
            gam   <= 8'h01;
            for (int i = 0; i <= T; i++) begin
              lam[i]  <= (i == 0) ? 8'h01 : 8'h00;
              bpol[i] <= (i == 0) ? 8'h01 : 8'h00;
            end
            state <= S_BM;
          end else begin
            pos <= pos + 1'b1;
          end
        end
        S_BM: begin
          // Lambda <- gamma*Lambda - delta*x*B
          for (int i = 0; i <= T; i++)
            lam[i] <= gf_mul(gam, lam[i]) ^ ((i > 0) ? gf_mul(delta, bpol[i-1]) : 8'h00);
          if (delta != 8'h00 && 2 * int'(len) <= int'(r)) begin
            for (int i = 0; i <= T; i++) bpol[i] <= lam[i];
            len <= r + 1'b1 - len;
            gam <= delta;
          end else begin
            for (int i = 0; i <= T; i++) bpol[i] <= (i > 0) ? bpol[i-1] : 8'h00;
          end
          if (r == 5'(NP - 1)) state <= S_OMEGA;
          r <= r + 1'b1;
        end
        S_OMEGA: begin
          for (int i = 0; i < T; i++) begin
            gf_t o;
            o = '0;
            for (int j = 0; j <= i; j++) o ^= gf_mul(lam[j], syn[i - j]);
            ot[i]  <= gf_mul(o, ASTRT[i]);
          end
          for (int i = 0; i <= T; i++) lt[i] <= gf_mul(lam[i], ASTRT[i]);
          roots <= '0;
          pos   <= '0;
          state <= S_CHIEN;
        end
        S_CHIEN: begin
          for (int i = 0; i <= T; i++) lt[i] <= gf_mul(lt[i], APOW[i]);
          if (lam_val == 8'h00) roots <= roots + 1'b1;
          if (pos == PW'(N - 1)) begin
            // restart the terms for the output pass
            for (int i = 0; i <= T; i++) lt[i] <= gf_mul(lam[i], ASTRT[i]);
            pos   <= '0;
            ok    <= (int'(roots) + ((lam_val == 8'h00) ? 1 : 0) == int'(len)) && len <= 5'(T);
            err_count <= ((int'(roots) + ((lam_val == 8'h00) ? 1 : 0) == int'(len)) && len <= 5'(T))
                         ? 4'(len) : 4'd15;
            state <= S_OUT;
          end else begin
            pos <= pos + 1'b1;
          end
        end
        S_OUT: if (m_tready) begin
          for (int i = 0; i <= T; i++) lt[i] <= gf_mul(lt[i], APOW[i]);
          for (int i = 0; i < T; i++)  ot[i] <= gf_mul(ot[i], APOW[i]);
          if (pos == PW'(K - 1)) begin
            pos   <= '0;
            for (int j = 0; j < NP; j++) syn[j] <= '0;
            state <= S_RECV;
          end else begin
            pos <= pos + 1'b1;
          end
        end
        default: state <= S_RECV;
      endcase
    end
  end

  logic unused;
  assign unused = s_tlast;
endmodule
