// Testbench for atsc_depad: sends padded 256-byte packets of random bytes
// with random gaps on both sides and checks that exactly the first 188
// bytes of each packet come out, in order, with tlast on the 188th.
module tb_atsc_depad;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic [7:0] s_tdata, m_tdata;
  logic s_tvalid, s_tready, s_tlast, m_tvalid, m_tready, m_tlast;
  int checks = 0, failures = 0;
  localparam int NPKT = 5;
  logic [7:0] data [NPKT*256];
  int exp_q [$];

  atsc_depad dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // source
  initial begin
    s_tvalid = 0; s_tdata = 0; s_tlast = 0;
    for (int i = 0; i < NPKT*256; i++) begin
      data[i] = 8'($urandom);
      if (i % 256 < 188) exp_q.push_back(i);
    end
    repeat (4) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < NPKT*256; i++) begin
      while ($urandom % 4 == 0) @(negedge clk);
      @(negedge clk);
      s_tvalid = 1; s_tdata = data[i]; s_tlast = (i % 256 == 255);
      #1;
      while (!s_tready) begin @(negedge clk); #1; end
      @(negedge clk);
      s_tvalid = 0;
    end
  end

  // sink
  int got = 0;
  initial m_tready = 0;
  always @(negedge clk) begin
    m_tready = ($urandom % 4 != 0);
    #1;
    begin
      if (m_tvalid && m_tready) begin
        int idx;
        idx = exp_q.pop_front();
        checks++;
        if (m_tdata !== data[idx] || m_tlast !== (idx % 256 == 187)) begin
          failures++;
          $display("mismatch at byte %0d: got %h last %0b exp %h prev %h next %h", idx, m_tdata, m_tlast, data[idx], data[idx-1], data[idx+1]);
        end
        got++;
        if (got == NPKT*188) begin
          repeat (20) @(posedge clk);
          checks++;
          if (m_tvalid) failures++;
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end
endmodule
