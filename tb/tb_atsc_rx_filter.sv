// Testbench for atsc_rx_filter. Random complex samples (|I|,|Q| <= 8000)
// arrive in packets of 32 with tlast on the last. A floating-point model
// computes the root-raised-cosine prototype (roll-off 0.1152, half the ATSC
// symbol rate, 16 arms of 19 taps at 16 x 6.25 MHz, each arm summing to 1)
// and runs the same phase-accumulator resampler; every output must be within
// 16 LSB of the model (coefficient rounding), each packet of 32 inputs must
// give 60 or 61 outputs closed by tlast, and both 60 and 61 must occur.
// Four more packets run with the output always ready and count the clocks:
// at most 18 clocks per output, so that a 214 MHz clock carries the
// 11.8385 MS/s output rate (214 / 11.8385 = 18.08).
// Then the resampling step is rewritten over the settings bus to 1.0, after
// which each packet must give exactly 32 outputs; the write must be
// answered by rb_stb with the new value.
module tb_atsc_rx_filter;
  import atsc_pkg::*;
  localparam int NF = 16, TPA = 19, NT = NF * TPA;
  localparam int NPKT = 12;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic set_stb;
  logic [7:0] set_addr;
  logic [31:0] set_data;
  logic rb_stb;
  logic [31:0] rb_data;
  csample_t s_tdata, m_tdata;
  logic s_tvalid, s_tready, s_tlast, m_tvalid, m_tready, m_tlast;
  int checks = 0, failures = 0;

  atsc_rx_filter dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real h [NT];
  int  xi [$], xq [$];
  real ei [$], eq [$];
  bit  el [$];

  function automatic real rrc(real t, real a);
    real pi = 3.14159265358979323846;
    if (t == 0.0) return 1.0 - a + 4.0 * a / pi;
    if (4.0 * a * t == 1.0 || 4.0 * a * t == -1.0)
      return a / $sqrt(2.0) * ((1.0 + 2.0 / pi) * $sin(pi / (4.0 * a)) + (1.0 - 2.0 / pi) * $cos(pi / (4.0 * a)));
    return ($sin(pi * t * (1.0 - a)) + 4.0 * a * t * $cos(pi * t * (1.0 + a))) / (pi * t * (1.0 - 16.0 * a * a * t * t));
  endfunction

  // model: feed one input, queue the expected outputs
  longint acc = 0;
  longint step;
  task automatic model(input int i, input int q, input bit last);
    xi.push_front(i); xq.push_front(q);
    while (acc < (64'd1 << 24)) begin
      real si, sq;
      int arm;
      arm = int'(acc >> 20);
      si = 0.0; sq = 0.0;
      for (int k = 0; k < TPA; k++)
        if (k < xi.size()) begin
          si += xi[k] * h[k * NF + arm];
          sq += xq[k] * h[k * NF + arm];
        end
      ei.push_back(si); eq.push_back(sq);
      acc += step;
      el.push_back(last && acc >= (64'd1 << 24));
    end
    acc -= (64'd1 << 24);
  endtask

  int n_out = 0, pkt_cnt = 0, seen60 = 0, seen61 = 0, expect_pkt = 0;
  bit full_rate = 0;
  always @(negedge clk) begin
    m_tready = full_rate || ($urandom % 4 != 0);
    #1;
    if (!rst && m_tvalid && m_tready) begin
      real gi, gq;
      gi = ei.pop_front(); gq = eq.pop_front();
      checks++;
      if (real'(m_tdata.i) - gi > 16.0 || gi - real'(m_tdata.i) > 16.0 ||
          real'(m_tdata.q) - gq > 16.0 || gq - real'(m_tdata.q) > 16.0 || m_tlast != el.pop_front()) begin
        failures++;
        if (failures < 10) $display("out %0d: got %0d,%0d expected %f,%f", n_out, m_tdata.i, m_tdata.q, gi, gq);
      end
      n_out++;
      pkt_cnt++;
      if (m_tlast) begin
        checks++;
        if (expect_pkt == 0) begin
          if (pkt_cnt == 60) seen60++;
          else if (pkt_cnt == 61) seen61++;
          else begin failures++; $display("packet of %0d outputs", pkt_cnt); end
        end else if (pkt_cnt != expect_pkt) begin
          failures++; $display("packet of %0d outputs, expected %0d", pkt_cnt, expect_pkt);
        end
        pkt_cnt = 0;
      end
    end
  end

  task automatic send_packets(input int npkt);
    for (int p = 0; p < npkt; p++)
      for (int n = 0; n < 32; n++) begin
        int i, q;
        i = int'($urandom % 16001) - 8000;
        q = int'($urandom % 16001) - 8000;
        model(i, q, n == 31);
        @(negedge clk);
        s_tvalid = 1; s_tdata.i = sample_t'(i); s_tdata.q = sample_t'(q); s_tlast = (n == 31);
        #1;
        while (!s_tready) begin @(negedge clk); #1; end
        @(negedge clk);
        s_tvalid = 0;
      end
  endtask

  initial begin
    real sum, sps;
    s_tvalid = 0; s_tdata = '0; s_tlast = 0; set_stb = 0; set_addr = 0; set_data = 0;
    sps = 6.25e6 * NF / (4.5e6 / 286.0 * 684.0 / 2.0);
    sum = 0.0;
    for (int i = 0; i < NT; i++) begin
      h[i] = rrc((i - (NT - 1) / 2.0) / sps, 0.1152);
      sum += h[i];
    end
    for (int i = 0; i < NT; i++) h[i] = h[i] * NF / sum / 1.0;
    step = longint'($rtoi(6.25e6 / 11.8385e6 * (2.0 ** 24) + 0.5));
    repeat (4) @(negedge clk);
    rst = 0;
    send_packets(NPKT);
    wait (ei.size() == 0);
    checks++;
    if (seen60 == 0 || seen61 == 0) begin
      failures++;
      $display("60/61 pattern not seen: %0d x 60, %0d x 61", seen60, seen61);
    end
    // rate: no back-pressure, count clocks per output
    begin
      longint t0, cyc;
      int n0;
      full_rate = 1;
      t0 = longint'($time);
      n0 = n_out;
      send_packets(4);
      wait (ei.size() == 0);
      cyc = (longint'($time) - t0) / 10;
      full_rate = 0;
      checks++;
      $display("rate: %0d outputs in %0d clocks", n_out - n0, cyc);
      if (cyc > 18 * longint'(n_out - n0)) begin
        failures++;
        $display("too slow for 11.8385 MS/s at 214 MHz");
      end
    end
    // settings bus: step = 1.0
    @(negedge clk);
    set_stb = 1; set_addr = 8'd0; set_data = 32'h0100_0000;
    @(negedge clk);
    set_stb = 0;
    checks++;
    if (!rb_stb || rb_data != 32'h0100_0000) begin
      failures++;
      $display("readback: stb %0b data %h", rb_stb, rb_data);
    end
    step = 64'd1 << 24;
    expect_pkt = 32;
    send_packets(3);
    wait (ei.size() == 0);
    repeat (30) @(negedge clk);
    $display("packets: %0d of 60, %0d of 61; outputs %0d", seen60, seen61, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
