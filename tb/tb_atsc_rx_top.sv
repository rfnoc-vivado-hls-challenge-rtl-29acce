// End-to-end testbench for atsc_rx_top at its default parameters. The three
// chains run at the same time:
//   frontend  a complex pilot (2 kHz off its nominal -2.691 MHz) plus a test
//             tone at -1 MHz and a DC offset, 6.25 MS/s in packets of 32:
//             every packet must give 60 or 61 outputs; once settled the
//             output must have no DC (pilot removed after being brought to
//             DC by the FPLL) and a non-trivial level (AGC);
//   backend   random 187-byte messages are RS(207,187)-encoded, given 0..8 or 11
//             byte errors, convolutionally interleaved (B = 52, M = 4),
//             trellis-encoded over 12 coders and sent as noisy soft symbols;
//             the output must repeat every correctable message exactly, with
//             the injected error count (a rare trellis decoding error may add
//             up to two bytes, which the RS code corrects), and flag the
//             11-error packets;
//   depad     256-byte padded packets must come out as their first 188 bytes.
// Each mechanism (60- and 61-output packets, settings writes on
// both buses answered by the right readback, input stalls,
// trellis corrections, RS corrections, RS failure, dropped pad bytes) is
// counted and must occur at least once.
module tb_atsc_rx_top;
  import atsc_pkg::*;
  localparam int NRS = 24, NP = 20, K = 187, N = 207;
  localparam int DLY = 4 * 52 * 51;
  localparam int LVL = 256;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic        fe_set_stb = 0;
  logic [7:0]  fe_set_addr = 0;
  logic [31:0] fe_set_data = 0;
  logic        fe_rb_stb;
  logic [31:0] fe_rb_data;
  logic        dcb_set_stb = 0;
  logic [7:0]  dcb_set_addr = 0;
  logic [31:0] dcb_set_data = 0;
  logic        dcb_rb_stb;
  logic [31:0] dcb_rb_data;
  csample_t    fe_s_tdata;
  logic        fe_s_tvalid = 0, fe_s_tready, fe_s_tlast = 0;
  sample_t     fe_m_tdata;
  logic        fe_m_tvalid, fe_m_tready, fe_m_tlast;
  logic signed [15:0] be_s_tdata = 0;
  logic        be_s_tvalid = 0, be_s_tready, be_sync = 0;
  logic [7:0]  be_m_tdata;
  logic        be_m_tvalid, be_m_tready, be_m_tlast;
  logic [3:0]  be_err_count;
  logic [7:0]  dp_s_tdata = 0, dp_m_tdata;
  logic        dp_s_tvalid = 0, dp_s_tready, dp_s_tlast = 0;
  logic        dp_m_tvalid, dp_m_tready, dp_m_tlast;

  atsc_rx_top dut (.*);

  int checks = 0, failures = 0;
  // mechanism counters
  int n_pkt60 = 0, n_pkt61 = 0, n_setwr = 0, n_fe_stall = 0, n_be_stall = 0;
  int n_hard_err = 0, n_rs_fixed = 0, n_rs_fail = 0, n_pad_drop = 0;
  bit fe_done = 0, be_done = 0, dp_done = 0;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog: fe %0b be %0b dp %0b", fe_done, be_done, dp_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (fe_s_tvalid && !fe_s_tready) n_fe_stall++;
    if (be_s_tvalid && !be_s_tready) n_be_stall++;
  end

  // ------------------------------------------------------------ frontend
  localparam int FE_PKT = 400;
  int fe_pkt_cnt = 0, fe_npkt = 0, fe_nout = 0;
  real fe_sum = 0.0, fe_abs = 0.0;
  int fe_ncount = 0;
  always @(negedge clk) begin
    fe_m_tready = ($urandom % 5 != 0);
    #1;
    if (!rst && fe_m_tvalid && fe_m_tready) begin
      fe_pkt_cnt++;
      fe_nout++;
      if (fe_nout > 16000) begin
        fe_sum += real'(fe_m_tdata);
        fe_abs += (fe_m_tdata < 0) ? -real'(fe_m_tdata) : real'(fe_m_tdata);
        fe_ncount++;
      end
      if (fe_m_tlast) begin
        checks++;
        fe_npkt++;
        if (fe_pkt_cnt == 60) n_pkt60++;
        else if (fe_pkt_cnt == 61) n_pkt61++;
        else begin failures++; $display("frontend packet of %0d", fe_pkt_cnt); end
        fe_pkt_cnt = 0;
      end
    end
  end

  task automatic frontend();
    real ph, w, ph2, w2;
    ph = 0.7; ph2 = 0.0;
    w  = 2.0 * 3.14159265358979 * (-2.691e6 + 2000.0) / 6.25e6;
    w2 = 2.0 * 3.14159265358979 * (-1.0e6) / 6.25e6;
    // settings bus: write the default resampling step
    @(negedge clk);
    fe_set_stb = 1; fe_set_addr = 0;
    fe_set_data = 32'($rtoi(6.25e6 / 11.8385e6 * (2.0 ** 24) + 0.5));
    @(negedge clk);
    fe_set_stb = 0;
    checks++;
    if (!fe_rb_stb || fe_rb_data != fe_set_data) failures++;
    else n_setwr++;
    // DC blocker length: write the default, 128 = 2^7
    dcb_set_stb = 1; dcb_set_addr = 0; dcb_set_data = 7;
    @(negedge clk);
    dcb_set_stb = 0;
    checks++;
    if (!dcb_rb_stb || dcb_rb_data != 7) failures++;
    else n_setwr++;
    for (int n = 0; n < FE_PKT * 32; n++) begin
      @(negedge clk);
      fe_s_tvalid = 1;
      fe_s_tdata.i = sample_t'($rtoi(6000.0 * $cos(ph) + 3000.0 * $cos(ph2) + 500.0));
      fe_s_tdata.q = sample_t'($rtoi(6000.0 * $sin(ph) + 3000.0 * $sin(ph2) - 300.0));
      fe_s_tlast = (n % 32 == 31);
      ph += w; ph2 += w2;
      #1;
      while (!fe_s_tready) begin @(negedge clk); #1; end
      @(negedge clk);
      fe_s_tvalid = 0;
    end
    wait (fe_npkt == FE_PKT);
    checks++;
    if (fe_sum / fe_ncount > 0.05 * fe_abs / fe_ncount || fe_sum / fe_ncount < -0.05 * fe_abs / fe_ncount) begin
      failures++;
      $display("frontend output has DC: mean %f, mean abs %f", fe_sum / fe_ncount, fe_abs / fe_ncount);
    end
    checks++;
    if (fe_abs / fe_ncount < 500.0) begin
      failures++;
      $display("frontend output level too low: %f", fe_abs / fe_ncount);
    end
    $display("frontend: %0d outputs, mean %f, mean abs %f", fe_nout, fe_sum / fe_ncount, fe_abs / fe_ncount);
    fe_done = 1;
  endtask

  // ------------------------------------------------------------- backend
  int alog [512];
  int lg [256];
  int gen [NP + 1];
  function automatic int mul(int a, int b);
    if (a == 0 || b == 0) return 0;
    return alog[lg[a] + lg[b]];
  endfunction

  logic [7:0] be_exp [$];     // expected output bytes (zero packets first)
  int         be_nerr [$];    // injected errors per packet
  int be_nout = 0;
  always @(negedge clk) begin
    be_m_tready = ($urandom % 4 != 0);
    #1;
    if (!rst && be_m_tvalid && be_m_tready) begin
      logic [7:0] e;
      e = be_exp.pop_front();
      checks++;
      if ((be_nerr[0] <= 8 && be_m_tdata != e) || be_m_tlast != (be_nout % K == K - 1)) begin
        failures++;
        if (failures < 10) $display("backend byte %0d: got %h expected %h", be_nout, be_m_tdata, e);
      end
      be_nout++;
      if (be_nout % K == 0) begin
        int ne;
        ne = be_nerr.pop_front();
        checks++;
        // a rare trellis decoding error adds byte errors of its own
        if ((ne <= 8 && (be_err_count < 4'(ne) || be_err_count > 4'(ne + 2))) || (ne > 10 && be_err_count != 4'd15)) begin
          failures++;
          $display("backend packet %0d with %0d errors: err_count %0d", be_nout / K - 1, ne, be_err_count);
        end
        if (be_err_count == 4'd15) n_rs_fail++;
        else if (be_err_count != 0) n_rs_fixed++;
      end
    end
  end

  task automatic backend();
    logic [7:0] stream [$];
    logic [7:0] fifo [52][$];
    bit s1 [12], s0 [12], pz2 [12];
    int x, nsym;
    x = 1;
    for (int i = 0; i < 255; i++) begin
      alog[i] = x; alog[i + 255] = x; lg[x] = i;
      x = x << 1;
      if (x & 256) x = x ^ 'h11D;
    end
    for (int i = 0; i <= NP; i++) gen[i] = 0;
    gen[0] = 1;
    for (int j = 0; j < NP; j++) begin
      for (int i = NP; i > 0; i--) gen[i] = gen[i - 1] ^ mul(gen[i], alog[j]);
      gen[0] = mul(gen[0], alog[j]);
    end
    // the deinterleaver's start-up zeros form (DLY + filler)/207 zero packets
    for (int p = 0; p < (DLY + N - DLY % N) / N; p++) begin
      be_nerr.push_back(0);
      repeat (K) be_exp.push_back(8'h00);
    end
    repeat (N - DLY % N) stream.push_back(8'h00);
    for (int p = 0; p < NRS; p++) begin
      logic [7:0] cw [N];
      int rem [NP];
      int ne;
      for (int i = 0; i < NP; i++) rem[i] = 0;
      for (int i = 0; i < K; i++) begin
        int fb;
        cw[i] = 8'($urandom);
        be_exp.push_back(cw[i]);
        fb = cw[i] ^ rem[NP - 1];
        for (int k = NP - 1; k > 0; k--) rem[k] = rem[k - 1] ^ mul(fb, gen[k]);
        rem[0] = mul(fb, gen[0]);
      end
      for (int i = 0; i < NP; i++) cw[K + i] = 8'(rem[NP - 1 - i]);
      ne = (p % 6 == 5) ? 11 : (p % 9);
      for (int k = 0; k < ne; k++) cw[(k * 17 + p) % N] ^= 8'(($urandom % 255) + 1);
      be_nerr.push_back(ne);
      for (int i = 0; i < N; i++) stream.push_back(cw[i]);
    end
    repeat (DLY + 2 * N) stream.push_back(8'h00);     // flush
    for (int p = 0; p < 60; p++) begin
      be_nerr.push_back(0);
      repeat (K) be_exp.push_back(8'h00);
    end
    // interleave
    for (int i = 0; i < 52; i++) repeat (i * 4) fifo[i].push_back(8'h00);
    for (int n = 0; n < stream.size(); n++) begin
      fifo[n % 52].push_back(stream[n]);
      stream[n] = fifo[n % 52].pop_front();
    end
    // trellis-encode and send
    for (int c = 0; c < 12; c++) begin s1[c] = 0; s0[c] = 0; pz2[c] = 0; end
    nsym = (stream.size() / 12) * 48;
    for (int j = 0; j < nsym; j++) begin
      int c, g, m, lvl, noise, hard;
      bit x2, x1, z2, z0, t;
      c = j % 12; g = (j / 12) % 4; m = j / 48;
      x2 = stream[m * 12 + c][7 - 2 * g];
      x1 = stream[m * 12 + c][6 - 2 * g];
      z2 = x2 ^ pz2[c]; pz2[c] = z2;
      z0 = s0[c];
      t = s1[c]; s1[c] = x1 ^ s0[c]; s0[c] = t;
      lvl = 2 * (4 * int'(z2) + 2 * int'(x1) + int'(z0)) - 7;
      noise = int'($urandom % (2 * (LVL * 6 / 10) + 1)) - LVL * 6 / 10;
      if ($urandom % 150 == 0) noise += ((noise >= 0) ? 1 : -1) * (LVL * 12 / 10);
      hard = (lvl * LVL + noise + 8 * LVL) / (2 * LVL);
      if (2 * hard - 7 != lvl) n_hard_err++;
      @(negedge clk);
      be_s_tvalid = 1; be_s_tdata = 16'(lvl * LVL + noise);
      #1;
      while (!be_s_tready) begin @(negedge clk); #1; end
      @(posedge clk);
    end
    @(negedge clk);
    be_s_tvalid = 0;
    repeat (200) @(negedge clk);
    checks++;
    if (be_nout < ((DLY + N) / N + NRS) * K) begin
      failures++;
      $display("backend delivered %0d bytes only", be_nout);
    end
    $display("backend: %0d bytes out, %0d symbols with wrong hard decision", be_nout, n_hard_err);
    be_done = 1;
  endtask

  // --------------------------------------------------------------- depad
  localparam int DP_PKT = 6;
  logic [7:0] dp_data [DP_PKT * 256];
  int dp_nout = 0;
  always @(negedge clk) begin
    dp_m_tready = ($urandom % 3 != 0);
    #1;
    if (!rst && dp_m_tvalid && dp_m_tready) begin
      int idx;
      idx = (dp_nout / 188) * 256 + dp_nout % 188;
      checks++;
      if (dp_m_tdata != dp_data[idx] || dp_m_tlast != (dp_nout % 188 == 187)) begin
        failures++;
        $display("depad byte %0d: got %h expected %h", dp_nout, dp_m_tdata, dp_data[idx]);
      end
      dp_nout++;
    end
  end
  always @(posedge clk) if (dp_s_tvalid && dp_s_tready && !dp_m_tvalid) n_pad_drop++;

  task automatic depad();
    for (int i = 0; i < DP_PKT * 256; i++) dp_data[i] = 8'($urandom);
    for (int i = 0; i < DP_PKT * 256; i++) begin
      @(negedge clk);
      dp_s_tvalid = 1; dp_s_tdata = dp_data[i]; dp_s_tlast = (i % 256 == 255);
      #1;
      while (!dp_s_tready) begin @(negedge clk); #1; end
      @(negedge clk);
      dp_s_tvalid = 0;
    end
    repeat (10) @(negedge clk);
    checks++;
    if (dp_nout != DP_PKT * 188) begin failures++; $display("depad gave %0d bytes", dp_nout); end
    dp_done = 1;
  endtask

  // ---------------------------------------------------------------- main
  initial begin
    fe_s_tdata = '0;
    repeat (4) @(negedge clk);
    rst = 0;
    fork
      frontend();
      backend();
      depad();
    join
    $display("mechanisms: pkt60 %0d pkt61 %0d setwr %0d fe_stall %0d be_stall %0d trellis_fix %0d rs_fixed %0d rs_fail %0d pad_drop %0d",
             n_pkt60, n_pkt61, n_setwr, n_fe_stall, n_be_stall, n_hard_err, n_rs_fixed, n_rs_fail, n_pad_drop);
    checks += 9;
    if (n_pkt60 == 0)    failures++;
    if (n_pkt61 == 0)    failures++;
    if (n_setwr < 2)     failures++;
    if (n_fe_stall == 0) failures++;
    if (n_be_stall == 0) failures++;
    if (n_hard_err == 0) failures++;
    if (n_rs_fixed == 0) failures++;
    if (n_rs_fail == 0)  failures++;
    if (n_pad_drop == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
