// ATSC receiver, FPGA part. The receiver's processing is split between
// hardware blocks and software; this top holds the hardware blocks in the
// three groups in which they sit in the signal chain:
//
//   frontend:  complex baseband at 6.25 MS/s -> RX Filter-FPLL (matched
//              filter, resampling to 11.8385 MS/s, carrier recovery)
//              -> DC Blocker-AGC -> real 16-bit samples (fe_m_*)
//   backend:   soft symbols, already synchronised and equalised by the
//              software blocks in between (be_s_*) -> trellis decoder
//              -> convolutional deinterleaver -> RS(207,187) decoder
//              -> 187-byte packets (be_m_*)
//   depad:     derandomised 256-byte padded packets (dp_s_*) -> 188-byte
//              MPEG transport packets (dp_m_*)
//
// Segment sync, field sync checking, equalisation and derandomisation are
// done outside, so each group has its own stream ports. All streams use the
// valid/ready handshake with one clock. The frontend's two blocks keep their
// own settings buses with readback: fe_set_* for the RX filter (address 0:
// resampling step) and dcb_set_* for the DC blocker (address 0: log2 of the
// delay-line length).
module atsc_rx_top
  import atsc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // frontend
  input  logic        fe_set_stb,
  input  logic [7:0]  fe_set_addr,
  input  logic [31:0] fe_set_data,
  output logic        fe_rb_stb,
  output logic [31:0] fe_rb_data,
  input  logic        dcb_set_stb,
  input  logic [7:0]  dcb_set_addr,
  input  logic [31:0] dcb_set_data,
  output logic        dcb_rb_stb,
  output logic [31:0] dcb_rb_data,
  input  csample_t    fe_s_tdata,
  input  logic        fe_s_tvalid,
  output logic        fe_s_tready,
  input  logic        fe_s_tlast,
  output sample_t     fe_m_tdata,
  output logic        fe_m_tvalid,
  input  logic        fe_m_tready,
  output logic        fe_m_tlast,
  // backend
  input  logic signed [15:0] be_s_tdata,
  input  logic        be_s_tvalid,
  output logic        be_s_tready,
  input  logic        be_sync,
  output logic [7:0]  be_m_tdata,
  output logic        be_m_tvalid,
  input  logic        be_m_tready,
  output logic        be_m_tlast,
  output logic [3:0]  be_err_count,
  // depad
  input  logic [7:0]  dp_s_tdata,
  input  logic        dp_s_tvalid,
  output logic        dp_s_tready,
  input  logic        dp_s_tlast,
  output logic [7:0]  dp_m_tdata,
  output logic        dp_m_tvalid,
  input  logic        dp_m_tready,
  output logic        dp_m_tlast
);
  // ---- frontend ----
  sample_t f_tdata;
  logic    f_tvalid, f_tready, f_tlast;

  atsc_rx_filter_fpll u_rxf_fpll (
    .clk, .rst,
    .set_stb(fe_set_stb), .set_addr(fe_set_addr), .set_data(fe_set_data),
    .rb_stb(fe_rb_stb), .rb_data(fe_rb_data),
    .s_tdata(fe_s_tdata), .s_tvalid(fe_s_tvalid), .s_tready(fe_s_tready), .s_tlast(fe_s_tlast),
    .m_tdata(f_tdata), .m_tvalid(f_tvalid), .m_tready(f_tready), .m_tlast(f_tlast)
  );

  dc_blocker_agc u_dcb_agc (
    .clk, .rst,
    .set_stb(dcb_set_stb), .set_addr(dcb_set_addr), .set_data(dcb_set_data),
    .rb_stb(dcb_rb_stb), .rb_data(dcb_rb_data),
    .s_tdata(f_tdata), .s_tvalid(f_tvalid), .s_tready(f_tready), .s_tlast(f_tlast),
    .m_tdata(fe_m_tdata), .m_tvalid(fe_m_tvalid), .m_tready(fe_m_tready), .m_tlast(fe_m_tlast)
  );

  // ---- backend ----
  logic [7:0] v_tdata, d_tdata;
  logic       v_tvalid, v_tready, d_tvalid, d_tready;

  atsc_viterbi u_vit (
    .clk, .rst,
    .s_tdata(be_s_tdata), .s_tvalid(be_s_tvalid), .s_tready(be_s_tready),
    .m_tdata(v_tdata), .m_tvalid(v_tvalid), .m_tready(v_tready)
  );

  atsc_deinterleaver u_dei (
    .clk, .rst,
    .s_tdata(v_tdata), .s_tvalid(v_tvalid), .s_tready(v_tready), .sync(be_sync),
    .m_tdata(d_tdata), .m_tvalid(d_tvalid), .m_tready(d_tready)
  );

  atsc_rs_decoder u_rs (
    .clk, .rst,
    .s_tdata(d_tdata), .s_tvalid(d_tvalid), .s_tready(d_tready), .s_tlast(1'b0),
    .m_tdata(be_m_tdata), .m_tvalid(be_m_tvalid), .m_tready(be_m_tready), .m_tlast(be_m_tlast),
    .err_count(be_err_count)
  );

  // ---- depad ----
  atsc_depad u_depad (
    .clk, .rst,
    .s_tdata(dp_s_tdata), .s_tvalid(dp_s_tvalid), .s_tready(dp_s_tready), .s_tlast(dp_s_tlast),
    .m_tdata(dp_m_tdata), .m_tvalid(dp_m_tvalid), .m_tready(dp_m_tready), .m_tlast(dp_m_tlast)
  );
endmodule
