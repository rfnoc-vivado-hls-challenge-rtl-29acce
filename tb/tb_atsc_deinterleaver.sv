// Testbench for atsc_deinterleaver (B = 52, M = 4). A behavioural
// convolutional interleaver (branch i delays by i*M of its own bytes, zeros
// at start) scrambles a random byte stream; the block under test must return
// the original stream delayed by exactly M*B*(B-1) = 10608 bytes, with zeros
// before that, under random gaps and back-pressure.
module tb_atsc_deinterleaver;
  localparam int B = 52, M = 4, DLY = M * B * (B - 1);
  localparam int NB = DLY + 3000;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic [7:0] s_tdata, m_tdata;
  logic s_tvalid, s_tready, m_tvalid, m_tready;
  logic sync = 1'b0;
  int checks = 0, failures = 0;
  logic [7:0] orig [NB];

  atsc_deinterleaver dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // interleaver model: one queue per branch, preloaded with i*M zeros
  logic [7:0] fifo [B][$];

  int n_out = 0;
  always @(negedge clk) begin
    m_tready = ($urandom % 5 != 0);
    #1;
    if (!rst && m_tvalid && m_tready) begin
      logic [7:0] e;
      e = (n_out < DLY) ? 8'h00 : orig[n_out - DLY];
      checks++;
      if (m_tdata != e) begin
        failures++;
        if (failures < 10) $display("byte %0d: got %h expected %h", n_out, m_tdata, e);
      end
      n_out++;
      if (n_out == NB) begin
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    s_tvalid = 0; s_tdata = 0;
    for (int i = 0; i < B; i++) repeat (i * M) fifo[i].push_back(8'h00);
    for (int n = 0; n < NB; n++) orig[n] = 8'($urandom | 1);
    repeat (4) @(negedge clk);
    rst = 0;
    for (int n = 0; n < NB; n++) begin
      logic [7:0] v;
      fifo[n % B].push_back(orig[n]);
      v = fifo[n % B].pop_front();
      if ($urandom % 6 == 0) @(negedge clk);
      @(negedge clk);
      s_tvalid = 1; s_tdata = v;
      #1;
      while (!s_tready) begin @(negedge clk); #1; end
      @(negedge clk);
      s_tvalid = 0;
    end
  end
endmodule
