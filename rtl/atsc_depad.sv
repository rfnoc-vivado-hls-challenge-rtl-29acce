// Depad: the last block of the receiver chain. Packets arrive padded to
// IN_LEN bytes; the first OUT_LEN bytes form the MPEG transport packet and are
// forwarded, the remaining pad bytes are consumed and dropped.
//
// Interface: byte streams with valid/ready handshake. A byte counter marks
// packet boundaries, so the input needs no tlast; m_tlast is raised on the
// last forwarded byte of each packet. Combinational path from input to output
// (no added latency, one byte per clock); pad bytes are accepted without
// waiting on m_tready.
//
// The 256-byte padded packet and the 188-byte output follow the receiver this
// block belongs to; keeping the leading bytes is this design's choice.
module atsc_depad #(
  parameter int IN_LEN  = 256,
  parameter int OUT_LEN = 188
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
  output logic       m_tlast
);
  localparam int CW = $clog2(IN_LEN + 1);
  logic [CW-1:0] cnt;
  logic          keep;

  assign keep     = cnt < CW'(OUT_LEN);
  assign m_tdata  = s_tdata;
  assign m_tvalid = s_tvalid && keep;
  assign m_tlast  = cnt == CW'(OUT_LEN - 1);
  assign s_tready = keep ? m_tready : 1'b1;

  always_ff @(posedge clk) begin
    if (rst) cnt <= '0;
    else if (s_tvalid && s_tready) cnt <= (cnt == CW'(IN_LEN - 1)) ? '0 : cnt + 1'b1;
  end

  logic unused;
  assign unused = s_tlast;
endmodule
