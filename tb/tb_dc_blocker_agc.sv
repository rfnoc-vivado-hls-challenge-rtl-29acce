// Testbench for dc_blocker_agc: a sine of amplitude 300 on a DC offset of
// 2000 goes through the merged block. The reference is a direct-sum model of
// the DC blocker followed by a floating-point AGC (rate 1e-5, reference 4.0,
// i.e. 1024, gain starting at 1); outputs must agree within 1% + 2 LSB, and
// tlast must follow the 128-sample packets.
module tb_dc_blocker_agc;
  import atsc_pkg::*;
  localparam int D = 128;
  localparam int NS = 2000;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic set_stb = 1'b0;
  logic [7:0] set_addr = '0;
  logic [31:0] set_data = '0;
  logic rb_stb;
  logic [31:0] rb_data;
  sample_t s_tdata, m_tdata;
  logic s_tvalid, s_tready, s_tlast, m_tvalid, m_tready, m_tlast;
  int checks = 0, failures = 0;
  int x [NS];
  longint m1 [NS];

  dc_blocker_agc dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int xat(int n);
    return (n < 0) ? 0 : x[n];
  endfunction
  function automatic longint m1at(int n);
    return (n < 0) ? 0 : m1[n];
  endfunction

  initial begin
    s_tvalid = 0; s_tdata = 0; s_tlast = 0;
    for (int n = 0; n < NS; n++) x[n] = 2000 + $rtoi(300.0 * $sin(2.0 * 3.14159265 * n / 37.0));
    for (int n = 0; n < NS; n++) begin
      m1[n] = 0;
      for (int k = 0; k < D; k++) m1[n] += xat(n - k);
    end
    repeat (4) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < NS; n++) begin
      @(negedge clk);
      s_tvalid = 1; s_tdata = sample_t'(x[n]); s_tlast = (n % D == D - 1);
      #1;
      while (!s_tready) begin @(negedge clk); #1; end
      @(negedge clk);
      s_tvalid = 0;
      if ($urandom % 3 == 0) @(negedge clk);
    end
  end

  int n_out = 0;
  real g = 1.0;
  initial m_tready = 0;
  always @(negedge clk) begin
    m_tready = ($urandom % 4 != 0);
    #1;
    begin
      if (m_tvalid && m_tready) begin
        longint m2, yd;
        real y, tol;
        m2 = 0;
        for (int k = 0; k < D; k++) m2 += m1at(n_out - k);
        yd = longint'(xat(n_out - D + 1)) - ((m2 >= 0) ? m2 / (D * D) : -((-m2 + D * D - 1) / (D * D)));
        y = real'(yd) * g;
        g = g + 1.0e-5 * (4.0 - ((y < 0) ? -y : y) / 256.0);
        tol = 2.0 + 0.01 * ((y < 0) ? -y : y);
        checks++;
        if (real'(m_tdata) - y > tol || y - real'(m_tdata) > tol || m_tlast != (n_out % D == D - 1)) begin
          failures++;
          if (failures < 10) $display("n=%0d got %0d expected %f", n_out, m_tdata, y);
        end
        n_out++;
        if (n_out == NS) begin
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end
endmodule
