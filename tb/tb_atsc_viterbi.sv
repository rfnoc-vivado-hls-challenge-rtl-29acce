// Testbench for atsc_viterbi. A behavioural 8-VSB trellis encoder (12
// coders, x2 precoded, 4-state coder on x1, symbol j to coder j mod 12, each
// byte as four dibits MSB first) maps random bytes to levels -7..+7 times
// LVL; every symbol gets uniform noise of +-0.7*LVL and one in 60 symbols an
// extra +-1.3*LVL push, enough to make the nearest-level decision wrong. The
// decoded bytes must equal the sent bytes, in order; the number of symbols
// whose hard decision was wrong is counted and must be non-zero; and the
// first byte must leave after 12*(TB-1)+36 symbols.
module tb_atsc_viterbi;
  localparam int TB = 32, LVL = 256, NDEC = 12;
  localparam int NBYTES = 2400;
  localparam int NSYM = NBYTES * 4;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic signed [15:0] s_tdata;
  logic [7:0] m_tdata;
  logic s_tvalid, s_tready, m_tvalid, m_tready;
  int checks = 0, failures = 0;

  atsc_viterbi #(.TB(TB), .LVL(LVL)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] bytes [NBYTES];
  int sym [NSYM];
  int hard_errors = 0;
  int n_sent = 0, n_out = 0, first_at = -1;

  always @(negedge clk) begin
    m_tready = ($urandom % 5 != 0);
    #1;
    if (!rst && m_tvalid && m_tready) begin
      if (first_at < 0) first_at = n_sent;
      checks++;
      if (m_tdata != bytes[n_out]) begin
        failures++;
        if (failures < 10) $display("byte %0d: got %h expected %h", n_out, m_tdata, bytes[n_out]);
      end
      n_out++;
    end
  end

  initial begin
    bit s1 [NDEC], s0 [NDEC], pz2 [NDEC];
    s_tvalid = 0; s_tdata = 0;
    for (int i = 0; i < NBYTES; i++) bytes[i] = 8'($urandom);
    for (int c = 0; c < NDEC; c++) begin s1[c] = 0; s0[c] = 0; pz2[c] = 0; end
    for (int j = 0; j < NSYM; j++) begin
      int c, g, m, lvl, noise, hard;
      bit x2, x1, z2, z1, z0, t;
      c = j % NDEC; g = (j / NDEC) % 4; m = j / (4 * NDEC);
      x2 = bytes[m * NDEC + c][7 - 2 * g];
      x1 = bytes[m * NDEC + c][6 - 2 * g];
      z2 = x2 ^ pz2[c]; pz2[c] = z2;
      z1 = x1; z0 = s0[c];
      t = s1[c]; s1[c] = x1 ^ s0[c]; s0[c] = t;
      lvl = 2 * (4 * z2 + 2 * z1 + z0) - 7;
      noise = int'($urandom % (2 * (LVL * 7 / 10) + 1)) - LVL * 7 / 10;
      if ($urandom % 60 == 0) noise += ((noise >= 0) ? 1 : -1) * (LVL * 13 / 10);
      sym[j] = lvl * LVL + noise;
      hard = (sym[j] + 8 * LVL) / (2 * LVL);   // nearest level index 0..7
      if (hard < 0) hard = 0;
      if (hard > 7) hard = 7;
      if (2 * hard - 7 != lvl) hard_errors++;
    end
    repeat (4) @(negedge clk);
    rst = 0;
    for (int j = 0; j < NSYM; j++) begin
      @(negedge clk);
      s_tvalid = 1; s_tdata = 16'(sym[j]);
      #1;
      while (!s_tready) begin @(negedge clk); #1; end
      @(posedge clk);
      n_sent++;
    end
    @(negedge clk);
    s_tvalid = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (n_out < NBYTES - 3 * TB - NDEC) begin
      failures++;
      $display("only %0d bytes decoded", n_out);
    end
    checks++;
    if (hard_errors == 0) failures++;
    checks++;
    if (first_at != NDEC * (TB - 1) + 36 + 1) begin
      failures++;
      $display("first byte after %0d symbols", first_at);
    end
    $display("symbols with wrong hard decision: %0d, bytes decoded: %0d", hard_errors, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
