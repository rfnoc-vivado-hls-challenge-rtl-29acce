// Testbench for agc. A floating-point model of the same control law
// (y = x*g; g += rate*(ref - |y|); 0 <= g <= max) runs beside the block and
// each output must match it within a small tolerance. A faster rate and a
// lower maximum gain are used so that convergence and clamping happen in a
// short run: phase 1 feeds a +-0.5 square wave and checks that the output
// settles at the reference 4.0; phase 2 feeds zeros until the gain sits at
// the maximum, then checks the gain through the output.
module tb_agc;
  import atsc_pkg::*;
  localparam longint unsigned RATE_Q32 = 64'd1 << 22;   // ~ 1e-3
  localparam longint unsigned MAXG     = 64'd20 << 24;  // 20.0
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  sample_t s_tdata, m_tdata;
  logic s_tvalid, s_tready, s_tlast, m_tvalid, m_tready, m_tlast;
  int checks = 0, failures = 0;

  agc #(.RATE_Q32(RATE_Q32), .MAX_GAIN(MAXG)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real g = 1.0;
  real rate = real'(RATE_Q32) / (2.0 ** 32);
  real y;

  task automatic send(input int x, input bit chk_ref);
    real yr;
    s_tvalid <= 1; s_tdata <= sample_t'(x);
    @(posedge clk);
    while (!s_tready) @(posedge clk);
    s_tvalid <= 0;
    // model
    y = x * g;
    if (y > 32767.0) y = 32767.0;
    if (y < -32768.0) y = -32768.0;
    g = g + rate * (4.0 - ((y < 0) ? -y : y) / 256.0);
    if (g > 20.0) g = 20.0;
    if (g < 0.0) g = 0.0;
    @(negedge clk);
    if (chk_ref) begin
      checks++;
      yr = real'(m_tdata);
      if (!m_tvalid || ((yr - y) > 2.0 + 0.01 * ((y < 0) ? -y : y)) ||
          ((y - yr) > 2.0 + 0.01 * ((y < 0) ? -y : y))) begin
        failures++;
        if (failures < 10) $display("x=%0d got %0d expected %f", x, m_tdata, y);
      end
    end
  endtask

  initial begin
    s_tvalid = 0; s_tdata = 0; s_tlast = 0; m_tready = 1;
    repeat (4) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int n = 0; n < 8000; n++) send((n % 2) ? 128 : -128, 1'b1);
    // settled at reference 4.0 = 1024
    checks++;
    if (m_tdata > 16'sd1044 || m_tdata < -16'sd1044 || (m_tdata < 16'sd1004 && m_tdata > -16'sd1004)) begin
      failures++;
      $display("AGC did not settle: %0d", m_tdata);
    end
    for (int n = 0; n < 6000; n++) send(0, 1'b0);
    send(100, 1'b0);
    checks++;
    if (m_tdata != 16'sd2000) begin
      failures++;
      $display("gain not clamped at 20: output %0d", m_tdata);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
