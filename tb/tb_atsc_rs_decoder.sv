// Testbench for atsc_rs_decoder. Random 187-byte messages are encoded with a
// behavioural systematic RS(207,187) encoder (GF(256) with polynomial 0x11D,
// generator prod (x + alpha^j), j = 0..19, built from log/antilog tables
// here), then 0..10 byte errors are injected at random positions. The decoder
// must return the message exactly, report the number of errors on
// err_count, and put tlast on the 187th byte. Packets with 16 errors must be
// flagged as uncorrectable (err_count = 15). Random gaps and back-pressure
// on both sides.
module tb_atsc_rs_decoder;
  localparam int N = 207, K = 187, NP = 20;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic [7:0] s_tdata, m_tdata;
  logic s_tvalid, s_tready, s_tlast, m_tvalid, m_tready, m_tlast;
  logic [3:0] err_count;
  int checks = 0, failures = 0;

  atsc_rs_decoder dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int alog [512];
  int lg [256];
  int gen [NP + 1];

  function automatic int mul(int a, int b);
    if (a == 0 || b == 0) return 0;
    return alog[lg[a] + lg[b]];
  endfunction

  // expected results per packet
  logic [7:0] msgs [$];
  int         nerr [$];

  int n_out = 0;
  always @(negedge clk) begin
    m_tready = ($urandom % 4 != 0);
    #1;
    if (!rst && m_tvalid && m_tready) begin
      logic [7:0] e;
      e = msgs.pop_front();
      checks++;
      if (nerr[0] <= 10 && m_tdata != e) begin
        failures++;
        if (failures < 10) $display("packet byte %0d: got %h expected %h", n_out % K, m_tdata, e);
      end
      if (m_tlast != (n_out % K == K - 1)) failures++;
      n_out++;
      if (n_out % K == 0) begin
        int ne;
        ne = nerr.pop_front();
        checks++;
        if (err_count != ((ne <= 10) ? 4'(ne) : 4'd15)) begin
          failures++;
          $display("packet with %0d errors: err_count %0d", ne, err_count);
        end
      end
    end
  end

  initial begin
    int x;
    int e_list [14] = '{0, 1, 2, 3, 5, 7, 9, 10, 10, 16, 4, 8, 6, 0};
    s_tvalid = 0; s_tdata = 0; s_tlast = 0;
    x = 1;
    for (int i = 0; i < 255; i++) begin
      alog[i] = x; alog[i + 255] = x; lg[x] = i;
      x = x << 1;
      if (x & 256) x = x ^ 'h11D;
    end
    alog[510] = alog[0]; alog[511] = alog[1];
    // generator polynomial
    for (int i = 0; i <= NP; i++) gen[i] = 0;
    gen[0] = 1;
    for (int j = 0; j < NP; j++) begin
      for (int i = NP; i > 0; i--) gen[i] = gen[i - 1] ^ mul(gen[i], alog[j]);
      gen[0] = mul(gen[0], alog[j]);
    end
    repeat (4) @(negedge clk);
    rst = 0;
    foreach (e_list[p]) begin
      logic [7:0] cw [N];
      int rem [NP];
      int synd;
      for (int i = 0; i < NP; i++) rem[i] = 0;
      for (int i = 0; i < K; i++) begin
        int fb;
        cw[i] = 8'($urandom);
        msgs.push_back(cw[i]);
        fb = cw[i] ^ rem[NP - 1];
        for (int k = NP - 1; k > 0; k--) rem[k] = rem[k - 1] ^ mul(fb, gen[k]);
        rem[0] = mul(fb, gen[0]);
      end
      for (int i = 0; i < NP; i++) cw[K + i] = 8'(rem[NP - 1 - i]);
      // sanity: the codeword has zero syndromes
      for (int j = 0; j < NP; j++) begin
        synd = 0;
        for (int i = 0; i < N; i++) synd = mul(synd, alog[j]) ^ cw[i];
        if (synd != 0) begin failures++; $display("encoder model broken"); end
      end
      // inject errors at distinct positions
      begin
        bit hit [N];
        for (int i = 0; i < N; i++) hit[i] = 0;
        for (int k = 0; k < e_list[p]; k++) begin
          int pos;
          do pos = int'($urandom % N); while (hit[pos]);
          hit[pos] = 1;
          cw[pos] = cw[pos] ^ 8'(($urandom % 255) + 1);
        end
      end
      nerr.push_back(e_list[p]);
      for (int i = 0; i < N; i++) begin
        if ($urandom % 5 == 0) @(negedge clk);
        @(negedge clk);
        s_tvalid = 1; s_tdata = cw[i]; s_tlast = (i == N - 1);
        #1;
        while (!s_tready) begin @(negedge clk); #1; end
        @(posedge clk);
        @(negedge clk);
        s_tvalid = 0;
      end
    end
    wait (msgs.size() == 0);
    repeat (10) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
