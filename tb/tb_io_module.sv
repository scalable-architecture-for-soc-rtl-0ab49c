// tb_io_module: self-checking test of the I/O module. Two camera frames of
// random bytes with random valid gaps must come out as, per frame, one
// address word and the bytes packed four to a word (first byte lowest); the
// transmit FIFO is randomly full. Words written to the module (with address
// words and a read request mixed in, which must be dropped) must come out as
// a byte stream, lowest byte first, under random bs_ready.
module tb_io_module;
  import hibi_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [31:0] in_dst = 32'h0000_0003;
  logic        cam_valid = 0, cam_sof = 0, cam_ready;
  logic [7:0]  cam_data = 0;
  logic        bs_valid, bs_ready = 0;
  logic [7:0]  bs_data;
  logic        tx_hi_we, tx_lo_we, tx_hi_full, tx_lo_full, rx_hi_re, rx_lo_re;
  hibi_word_t  tx_word, rx_hi_word, rx_lo_word;
  logic        rx_hi_empty, rx_lo_empty;

  io_module dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  hibi_word_t txq[$];
  bit rfull = 0;
  assign tx_lo_full = rfull;
  assign tx_hi_full = 1'b0;
  always @(posedge clk) begin
    if (tx_lo_we && !tx_lo_full) txq.push_back(tx_word);
    check(!tx_hi_we, "high-priority transmit used");
    rfull <= ($urandom_range(3) == 0);
  end

  hibi_word_t rxq_lo[$], rxq_hi[$];
  always_comb begin
    rx_hi_empty = (rxq_hi.size() == 0);
    rx_lo_empty = (rxq_lo.size() == 0);
    rx_hi_word  = rx_hi_empty ? '0 : rxq_hi[0];
    rx_lo_word  = rx_lo_empty ? '0 : rxq_lo[0];
  end
  byte unsigned out_bytes[$];
  always @(posedge clk) begin
    if (rx_hi_re && !rx_hi_empty) void'(rxq_hi.pop_front());
    if (rx_lo_re && !rx_lo_empty) void'(rxq_lo.pop_front());
    if (bs_valid && bs_ready) out_bytes.push_back(bs_data);
    bs_ready <= ($urandom_range(2) != 0);
  end

  byte unsigned frame [2][32];
  initial begin
    hibi_word_t x;
    byte unsigned exp_out[$];
    repeat (2) @(posedge clk);
    rst_n = 1;
    // two frames of 32 bytes
    for (int f = 0; f < 2; f++)
      for (int i = 0; i < 32; i++) begin
        frame[f][i] = 8'($urandom);
        @(negedge clk);
        while ($urandom_range(3) == 0) begin cam_valid = 0; @(negedge clk); end
        cam_valid = 1; cam_sof = (i == 0); cam_data = frame[f][i];
        @(posedge clk);
        while (!cam_ready) @(posedge clk);
      end
    @(negedge clk); cam_valid = 0;
    repeat (20) @(posedge clk);
    check(txq.size() == 18, $sformatf("%0d words sent, expected 18", txq.size()));
    if (txq.size() == 18)
      for (int f = 0; f < 2; f++) begin
        check(txq[9*f].av && txq[9*f].data == in_dst, "frame address word");
        for (int k = 0; k < 8; k++)
          check(!txq[9*f+1+k].av && txq[9*f+1+k].data ==
                {frame[f][4*k+3], frame[f][4*k+2], frame[f][4*k+1], frame[f][4*k]},
                $sformatf("frame %0d word %0d", f, k));
      end

    // output side
    x = '0; x.av = 1; x.data = 32'h0100_0000; rxq_lo.push_back(x);
    for (int k = 0; k < 6; k++) begin
      x = '0; x.data = $urandom; rxq_lo.push_back(x);
      for (int b = 0; b < 4; b++) exp_out.push_back(x.data[8*b +: 8]);
      if (k == 2) begin
        x = '0; x.av = 1; x.cmd = CMD_RD; x.data = 32'h0100_0000; rxq_lo.push_back(x);
        x = '0; x.cmd = CMD_RD; x.data = 32'h1; rxq_lo.push_back(x);
      end
    end
    repeat (200) @(posedge clk);
    check(out_bytes.size() == exp_out.size(),
          $sformatf("%0d bytes out, expected %0d", out_bytes.size(), exp_out.size()));
    for (int i = 0; i < exp_out.size() && i < out_bytes.size(); i++)
      check(out_bytes[i] == exp_out[i], $sformatf("output byte %0d", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
