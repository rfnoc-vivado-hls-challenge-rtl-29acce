// Testbench for dc_blocker (D = 128). The reference sums the input history
// directly (no running sums): m1[n] = sum of the last L inputs,
// m2[n] = sum of the last L values of m1, y[n] = x[n-L+1] - floor(m2/L^2),
// and every output must match exactly. The input is a DC offset plus noise,
// fed with random gaps and back-pressure; after the start-up the mean of the
// output must be near zero, and tlast must travel with its sample.
// Phase 1 runs at the default length L = 128. Phase 2 sets L = 32 over the
// settings bus (log2 = 5), checks the readback, and repeats the comparison
// from an empty history. A request above the maximum must read back as 7.
module tb_dc_blocker;
  import atsc_pkg::*;
  localparam int D = 128;
  localparam int NS = 1500;
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
  int len = D;

  dc_blocker #(.D(D)) dut (.*);

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

  int n_out = 0;
  longint mean_acc = 0;
  initial m_tready = 0;
  always @(negedge clk) begin
    m_tready = ($urandom % 4 != 0);
    #1;
    if (m_tvalid && m_tready) begin
      longint m2, y, l2;
      l2 = longint'(len) * len;
      m2 = 0;
      for (int k = 0; k < len; k++) m2 += m1at(n_out - k);
      y = longint'(xat(n_out - len + 1)) - ((m2 >= 0) ? m2 / l2 : -((-m2 + l2 - 1) / l2));
      checks++;
      if (longint'(m_tdata) != y || m_tlast != (n_out % D == D - 1)) begin
        failures++;
        if (failures < 10) $display("L=%0d n=%0d got %0d expected %0d", len, n_out, m_tdata, y);
      end
      if (n_out >= 3 * len) mean_acc += longint'(m_tdata);
      n_out++;
    end
  end

  task automatic run_phase(input int dc);
    for (int n = 0; n < NS; n++) x[n] = dc + int'($urandom % 2001) - 1000;
    for (int n = 0; n < NS; n++) begin
      m1[n] = 0;
      for (int k = 0; k < len; k++) m1[n] += xat(n - k);
    end
    n_out = 0;
    mean_acc = 0;
    for (int n = 0; n < NS; n++) begin
      while ($urandom % 5 == 0) @(negedge clk);
      @(negedge clk);
      s_tvalid = 1; s_tdata = sample_t'(x[n]); s_tlast = (n % D == D - 1);
      #1;
      while (!s_tready) begin @(negedge clk); #1; end
      @(negedge clk);
      s_tvalid = 0;
    end
    wait (n_out == NS);
    checks++;
    if (mean_acc / (NS - 3 * len) > 40 || mean_acc / (NS - 3 * len) < -40) begin
      failures++;
      $display("DC not removed: mean %0d", mean_acc / (NS - 3 * len));
    end
  endtask

  task automatic set_len(input int lg, input int expect_rb);
    @(negedge clk);
    set_stb = 1; set_addr = 8'd0; set_data = 32'(lg);
    @(negedge clk);
    set_stb = 0;
    checks++;
    if (!rb_stb || rb_data != 32'(expect_rb)) begin
      failures++;
      $display("readback: stb %0b data %0d, expected %0d", rb_stb, rb_data, expect_rb);
    end
  endtask

  initial begin
    s_tvalid = 0; s_tdata = 0; s_tlast = 0;
    repeat (4) @(negedge clk);
    rst = 0;
    run_phase(3000);
    set_len(5, 5);
    len = 32;
    run_phase(-2500);
    set_len(12, 7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
