// DC Blocker-AGC: the DC blocker and the AGC merged into one block, the DC
// blocker's output stream feeding the AGC directly. Merging saves a slot and
// the packetisation between two separate blocks. Latency two cycles, one
// sample per clock; ports as in dc_blocker and agc, the settings bus (delay
// length, address 0) being the DC blocker's.
module dc_blocker_agc
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
  sample_t d_tdata;
  logic    d_tvalid, d_tready, d_tlast;

  dc_blocker #(.D(D)) u_dcb (
    .clk, .rst, .set_stb, .set_addr, .set_data, .rb_stb, .rb_data,
    .s_tdata, .s_tvalid, .s_tready, .s_tlast,
    .m_tdata(d_tdata), .m_tvalid(d_tvalid), .m_tready(d_tready), .m_tlast(d_tlast)
  );

  agc u_agc (
    .clk, .rst, .s_tdata(d_tdata), .s_tvalid(d_tvalid), .s_tready(d_tready), .s_tlast(d_tlast),
    .m_tdata, .m_tvalid, .m_tready, .m_tlast
  );
endmodule
