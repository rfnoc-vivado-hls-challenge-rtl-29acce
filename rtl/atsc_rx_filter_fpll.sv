// RX Filter-FPLL: the RX filter (matched filter and resampler to 11.8385
// MS/s) and the FPLL merged into one block. The filter's complex output feeds
// the FPLL directly: the FPLL takes one complex sample and gives one real
// sample, so no buffer is needed between them. Complex {Q, I} in, real out,
// settings bus and readback as in atsc_rx_filter; tlast passes through both.
module atsc_rx_filter_fpll
  import atsc_pkg::*;
(
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
  output sample_t     m_tdata,
  output logic        m_tvalid,
  input  logic        m_tready,
  output logic        m_tlast
);
  csample_t f_tdata;
  logic     f_tvalid, f_tready, f_tlast;

  atsc_rx_filter u_filt (
    .clk, .rst, .set_stb, .set_addr, .set_data, .rb_stb, .rb_data,
    .s_tdata, .s_tvalid, .s_tready, .s_tlast,
    .m_tdata(f_tdata), .m_tvalid(f_tvalid), .m_tready(f_tready), .m_tlast(f_tlast)
  );

  atsc_fpll u_fpll (
    .clk, .rst,
    .s_tdata(f_tdata), .s_tvalid(f_tvalid), .s_tready(f_tready), .s_tlast(f_tlast),
    .m_tdata, .m_tvalid, .m_tready, .m_tlast
  );
endmodule
