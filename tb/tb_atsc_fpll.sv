// Testbench for atsc_fpll. The input is a pure pilot: a complex tone of
// amplitude 8000 at the expected pilot offset (-2.691 MHz at 11.8385 MS/s)
// plus a frequency error of DF_HZ and a random start phase. Checks:
//   - one real output per complex input, with the output ready one cycle
//     after the input is taken (latency 1), also under back-pressure;
//   - after the loop has had LOCK samples to pull in, every output is within
//     5% of +8000: the pilot has been rotated onto the positive real axis,
//     i.e. frequency and phase are both acquired.
// A run with a larger frequency error (20 kHz) is made after a reset.
module tb_atsc_fpll;
  import atsc_pkg::*;
  localparam int NS   = 8000;
  localparam int LOCK = 5000;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  csample_t s_tdata;
  sample_t  m_tdata;
  logic s_tvalid, s_tready, s_tlast, m_tvalid, m_tready, m_tlast;
  int checks = 0, failures = 0;

  atsc_fpll dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_out;
  int n_bad;

  always @(negedge clk) begin
    m_tready = ($urandom % 8 != 0);
    #1;
    if (!rst && m_tvalid && m_tready) begin
      if (n_out >= LOCK) begin
        checks++;
        if (m_tdata > 16'sd8400 || m_tdata < 16'sd7600) begin
          failures++;
          n_bad++;
          if (n_bad < 5) $display("not locked at sample %0d: %0d", n_out, m_tdata);
        end
      end
      n_out++;
    end
  end

  task automatic run(input real df_hz);
    real ph, w;
    ph = real'($urandom % 1000) / 1000.0 * 6.2831853;
    w  = 2.0 * 3.14159265358979 * (-2.691e6 + df_hz) / 11.8385e6;
    rst = 1; n_out = 0; n_bad = 0;
    s_tvalid = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < NS; n++) begin
      @(negedge clk);
      s_tvalid = 1;
      s_tdata.i = sample_t'($rtoi(8000.0 * $cos(ph)));
      s_tdata.q = sample_t'($rtoi(8000.0 * $sin(ph)));
      s_tlast = (n % 64 == 63);
      ph = ph + w;
      #1;
      while (!s_tready) begin @(negedge clk); #1; end
      // latency: output valid right after the edge that takes the input
      @(negedge clk);
      s_tvalid = 0;
      checks++;
      if (!m_tvalid) failures++;
    end
    repeat (4) @(negedge clk);
    checks++;
    if (n_out != NS) begin
      failures++;
      $display("output count %0d, expected %0d", n_out, NS);
    end
  endtask

  initial begin
    s_tvalid = 0; s_tdata = '0; s_tlast = 0;
    run(3000.0);
    run(-20000.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
