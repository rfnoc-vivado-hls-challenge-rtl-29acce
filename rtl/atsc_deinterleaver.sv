// Convolutional byte deinterleaver. The transmitter spreads the bytes of
// each Reed-Solomon packet over time with a B-branch convolutional
// interleaver (branch i delays by i*M bytes of that branch); this block
// applies the complementary delays, (B-1-i)*M, so that every byte leaves
// with the same total delay of M*B*(B-1) bytes and in its original order.
//
// A commutator steps through the branches, one byte each. Each branch is a
// FIFO of (B-1-i)*M bytes kept as a circular region of one RAM of
// M*B*(B-1)/2 bytes (5304 for B = 52, M = 4): the byte stored there longest
// is read out and the new byte takes its place. The last branch has no delay.
// Cells that were never written read as 0 (one "filled" flag per branch).
// The `sync` input, asserted with a byte, puts that byte on branch 0, for
// aligning the commutator to the start of a field.
//
// B = 52 and M = 4 are the ATSC values; the block's insides are this
// design's own. Interface: byte streams, valid/ready, one byte per clock,
// one cycle of latency plus the deinterleaving delay.
module atsc_deinterleaver #(
  parameter int B = 52,
  parameter int M = 4
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] s_tdata,
  input  logic       s_tvalid,
  output logic       s_tready,
  input  logic       sync,
  output logic [7:0] m_tdata,
  output logic       m_tvalid,
  input  logic       m_tready
);
  localparam int MEMSZ = M * B * (B - 1) / 2;
  localparam int AW    = $clog2(MEMSZ);
  localparam int BW    = $clog2(B);
  localparam int PW    = $clog2(M * (B - 1) + 1);

  logic [7:0]    mem [MEMSZ];
  logic [PW-1:0] ptr [B];
  logic [B-1:0]  filled;
  logic [BW-1:0] br;        // branch of the current byte
  logic [BW-1:0] cur;
  logic [PW-1:0] len;
  logic [AW-1:0] addr;
  logic          fire;

  assign s_tready = !m_tvalid || m_tready;
  assign fire     = s_tvalid && s_tready;
  assign cur      = sync ? '0 : br;

  always_comb begin
    int b;
    b    = int'(cur);
    len  = PW'((B - 1 - b) * M);
    addr = AW'(M * (b * (B - 1) - b * (b - 1) / 2) + int'(ptr[cur]));
  end

  always_ff @(posedge clk) begin
    if (fire && len != 0) mem[addr] <= s_tdata;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      br       <= '0;
      filled   <= '0;
      m_tvalid <= 1'b0;
      m_tdata  <= '0;
      for (int i = 0; i < B; i++) ptr[i] <= '0;
    end else begin
      if (m_tvalid && m_tready) m_tvalid <= 1'b0;
      if (fire) begin
        m_tvalid <= 1'b1;
        if (len == 0)          m_tdata <= s_tdata;
        else if (filled[cur])  m_tdata <= mem[addr];
        else                   m_tdata <= '0;
        if (len != 0) begin
          if (ptr[cur] == len - 1'b1) begin
            ptr[cur]    <= '0;
            filled[cur] <= 1'b1;
          end else begin
            ptr[cur] <= ptr[cur] + 1'b1;
          end
        end
        br <= (cur == BW'(B - 1)) ? '0 : cur + 1'b1;
      end
    end
  end
endmodule
