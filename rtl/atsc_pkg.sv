// Shared types, constants and helper functions of the ATSC receiver blocks.
//
// Sample formats: real samples are 16-bit signed integers; complex samples
// pack I in the low half and Q in the high half of a 32-bit word (the usual
// sc16 word layout of the radio's sample streams). The GF(256) helpers serve
// the Reed-Solomon decoder: field polynomial x^8+x^4+x^3+x^2+1, the polynomial
// of the ATSC RS(207,187) code. Everything in here is this design's own
// choice of representation; the receiver's blocks used floating point.
package atsc_pkg;

  typedef logic signed [15:0] sample_t;

  typedef struct packed {
    sample_t q;
    sample_t i;
  } csample_t;

  localparam real PI = 3.14159265358979323846;  // used by the elaboration-time tables

  // ATSC symbol rate, 4.5 MHz * 684 / 286
  localparam real ATSC_SYMBOL_RATE = 4.5e6 / 286.0 * 684.0;

  // GF(256) multiply, field polynomial 0x11D
  function automatic logic [7:0] gf_mul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p;
    logic [7:0] aa;
    p  = '0;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= aa;
      aa = aa[7] ? ((aa << 1) ^ 8'h1D) : (aa << 1);
    end
    return p;
  endfunction

  // alpha^e, alpha = 0x02
  function automatic logic [7:0] gf_pow_alpha(int e);
    logic [7:0] r;
    int ee;
    r  = 8'h01;
    ee = ((e % 255) + 255) % 255;
    for (int i = 0; i < ee; i++) r = gf_mul(r, 8'h02);
    return r;
  endfunction

  // Multiplicative inverse as a^254: square-and-multiply, purely combinational
  function automatic logic [7:0] gf_inv(logic [7:0] a);
    logic [7:0] sq;
    logic [7:0] r;
    sq = gf_mul(a, a);            // a^2
    r  = sq;
    for (int i = 0; i < 6; i++) begin
      sq = gf_mul(sq, sq);        // a^4 ... a^128
      r  = gf_mul(r, sq);
    end
    return r;                     // a^(2+4+...+128) = a^254
  endfunction

  // Saturate a wide signed value to 16 bits
  function automatic sample_t sat16(logic signed [63:0] v);
    if (v > 64'sd32767) return 16'sh7FFF;
    if (v < -64'sd32768) return 16'sh8000;
    return sample_t'(v);
  endfunction

endpackage
