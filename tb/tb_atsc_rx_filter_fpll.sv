// Testbench for atsc_rx_filter_fpll. A complex pilot tone (amplitude 8000,
// 2 kHz off the nominal -2.691 MHz pilot offset) at 6.25 MS/s is sent in
// packets of 32 samples. Checks: every packet of 32 inputs gives 60 or 61
// real outputs closed by tlast; after the loop has pulled in, the output is
// steady (within 10% of its mean) and positive, i.e. the pilot, passed by the
// matched filter's band edge, has been brought to DC on the real axis.
module tb_atsc_rx_filter_fpll;
  import atsc_pkg::*;
  localparam int NPKT = 260;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic set_stb = 1'b0;
  logic [7:0] set_addr = '0;
  logic [31:0] set_data = '0;
  logic rb_stb;
  logic [31:0] rb_data;
  csample_t s_tdata;
  sample_t  m_tdata;
  logic s_tvalid, s_tready, s_tlast, m_tvalid, m_tready, m_tlast;
  int checks = 0, failures = 0;

  atsc_rx_filter_fpll dut (.*);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_out = 0, pkt_cnt = 0, n_pkt = 0;
  int tailv [$];
  always @(negedge clk) begin
    m_tready = ($urandom % 6 != 0);
    #1;
    if (!rst && m_tvalid && m_tready) begin
      n_out++;
      pkt_cnt++;
      tailv.push_back(int'(m_tdata));
      if (tailv.size() > 1000) void'(tailv.pop_front());
      if (m_tlast) begin
        checks++;
        n_pkt++;
        if (pkt_cnt != 60 && pkt_cnt != 61) begin
          failures++;
          $display("packet of %0d outputs", pkt_cnt);
        end
        pkt_cnt = 0;
      end
    end
  end

  initial begin
    real ph, w, mean;
    s_tvalid = 0; s_tdata = '0; s_tlast = 0;
    ph = 0.3;
    w = 2.0 * 3.14159265358979 * (-2.691e6 + 2000.0) / 6.25e6;
    repeat (4) @(negedge clk);
    rst = 0;
    for (int n = 0; n < NPKT * 32; n++) begin
      @(negedge clk);
      s_tvalid = 1;
      s_tdata.i = sample_t'($rtoi(8000.0 * $cos(ph)));
      s_tdata.q = sample_t'($rtoi(8000.0 * $sin(ph)));
      s_tlast = (n % 32 == 31);
      ph += w;
      #1;
      while (!s_tready) begin @(negedge clk); #1; end
      @(negedge clk);
      s_tvalid = 0;
    end
    wait (n_pkt == NPKT);
    mean = 0.0;
    foreach (tailv[i]) mean += tailv[i];
    mean = mean / tailv.size();
    checks++;
    if (mean < 2000.0) begin
      failures++;
      $display("output mean %f: pilot not brought to the real axis", mean);
    end
    foreach (tailv[i]) begin
      checks++;
      if (tailv[i] > mean * 1.1 || tailv[i] < mean * 0.9) failures++;
    end
    $display("outputs %0d, steady-state mean %f", n_out, mean);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
