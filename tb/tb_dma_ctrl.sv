// tb_dma_ctrl: self-checking test of the DMA and interrupt controller on its
// own. The test models the data memory (one cycle read latency) and the
// wrapper FIFOs (queues, with the transmit side randomly full) and checks:
// a block write (address word, data from memory, done status and
// interrupt), a read request (address word plus [mem, len, return]), receive
// channels filling memory and raising their status, a disabled channel
// holding its data back until enabled, the high-priority FIFO being served
// first, and a remote read request served from memory without processor
// help.
module tb_dma_ctrl;
  import hibi_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        reg_sel = 0, reg_we = 0, irq;
  logic [5:0]  reg_addr = 0;
  logic [31:0] reg_wdata = 0, reg_rdata;
  logic        mem_en, mem_we;
  logic [9:0]  mem_addr;
  logic [31:0] mem_wdata, mem_rdata;
  logic        tx_hi_we, tx_lo_we, tx_hi_full, tx_lo_full, rx_hi_re, rx_lo_re;
  hibi_word_t  tx_word, rx_hi_word, rx_lo_word;
  logic        rx_hi_empty, rx_lo_empty;

  dma_ctrl #(.N_RX_CH(4), .MEM_AW(10)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // memory model
  logic [31:0] mem [1024];
  always_ff @(posedge clk) begin
    if (mem_en && mem_we) mem[mem_addr] <= mem_wdata;
    if (mem_en && !mem_we) mem_rdata <= mem[mem_addr];
  end

  // transmit FIFOs: record words; randomly full
  hibi_word_t txq_lo[$], txq_hi[$];
  bit rnd_full = 0;
  assign tx_hi_full = rnd_full;
  assign tx_lo_full = rnd_full;
  always @(posedge clk) begin
    if (tx_hi_we && !tx_hi_full) txq_hi.push_back(tx_word);
    if (tx_lo_we && !tx_lo_full) txq_lo.push_back(tx_word);
    rnd_full <= ($urandom_range(3) == 0);
  end

  // receive FIFOs fed by the test
  hibi_word_t rxq_lo[$], rxq_hi[$];
  int pop_order[$];    // 1 = hi, 0 = lo, in pop order
  always_comb begin
    rx_hi_empty = (rxq_hi.size() == 0);
    rx_lo_empty = (rxq_lo.size() == 0);
    rx_hi_word  = rx_hi_empty ? '0 : rxq_hi[0];
    rx_lo_word  = rx_lo_empty ? '0 : rxq_lo[0];
  end
  always @(posedge clk) begin
    if (rx_hi_re && !rx_hi_empty) begin void'(rxq_hi.pop_front()); pop_order.push_back(1); end
    if (rx_lo_re && !rx_lo_empty) begin void'(rxq_lo.pop_front()); pop_order.push_back(0); end
  end

  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk); reg_sel = 1; reg_we = 1; reg_addr = 6'(a); reg_wdata = d;
    @(negedge clk); reg_sel = 0; reg_we = 0;
  endtask
  task automatic rd(input int a, output logic [31:0] d);
    @(negedge clk); reg_sel = 1; reg_we = 0; reg_addr = 6'(a);
    #1 d = reg_rdata;
    @(negedge clk); reg_sel = 0;
  endtask
  task automatic wait_tx_idle();
    logic [31:0] d;
    d = 1;
    for (int i = 0; i < 2000 && d[0]; i++) rd(4, d);
  endtask
  function automatic hibi_word_t w(bit av, hibi_cmd_e c, logic [31:0] d);
    hibi_word_t x;
    x.av = av; x.hi = 0; x.cmd = c; x.data = d;
    return x;
  endfunction

  initial begin
    logic [31:0] d;
    hibi_word_t x;
    for (int i = 0; i < 1024; i++) mem[i] = 32'hC000_0000 + 32'(i);
    repeat (2) @(posedge clk);
    rst_n = 1;

    // --- block write of 20 words from 100 to agent 3, channel 2
    wr(6, 32'h0000_030F);      // irq mask: channels, tx done, served
    wr(0, 100); wr(1, 20); wr(2, 32'h0300_0002);
    wr(4, 32'h1);
    wait_tx_idle();
    check(txq_lo.size() == 21, $sformatf("block write: %0d words queued", txq_lo.size()));
    if (txq_lo.size() == 21) begin
      check(txq_lo[0].av && txq_lo[0].data == 32'h0300_0002 && txq_lo[0].cmd == CMD_WR,
            "block write address word");
      for (int i = 0; i < 20; i++)
        if (txq_lo[i+1].av || txq_lo[i+1].data != 32'hC000_0000 + 32'(100 + i)) begin
          check(0, $sformatf("block write word %0d", i)); break;
        end
    end
    rd(5, d);
    check(d[8] && irq, "transmit done status / irq");
    wr(5, 32'h100);
    rd(5, d);
    check(!d[8] && !irq, "status clear");
    txq_lo.delete();

    // --- high-priority read request
    wr(0, 32'h40); wr(1, 7); wr(2, 32'h0000_0000); wr(3, 32'h0500_0001);
    wr(4, 32'h7);
    wait_tx_idle();
    check(txq_hi.size() == 4 && txq_lo.size() == 0, "read request goes to the high FIFO");
    if (txq_hi.size() == 4)
      check(txq_hi[0].av && txq_hi[0].cmd == CMD_RD && txq_hi[1].data == 32'h40
            && txq_hi[2].data == 7 && txq_hi[3].data == 32'h0500_0001 && txq_hi[3].cmd == CMD_RD,
            "read request words");
    txq_hi.delete();
    wr(5, 32'hFFFF);

    // --- receive: channel 1 enabled, channel 2 not yet
    wr(8 + 4*1, 500); wr(9 + 4*1, 5); wr(10 + 4*1, 1);
    wr(8 + 4*2, 600); wr(9 + 4*2, 3);
    rxq_lo.push_back(w(1, CMD_WR, 32'h0000_0002));
    for (int i = 0; i < 3; i++) rxq_lo.push_back(w(0, CMD_WR, 32'hB000_0000 + 32'(i)));
    rxq_hi.push_back(w(1, CMD_WR, 32'h0000_0001));
    for (int i = 0; i < 5; i++) rxq_hi.push_back(w(0, CMD_WR, 32'hA000_0000 + 32'(i)));
    repeat (40) @(posedge clk);
    check(rxq_hi.size() == 0, "channel 1 data not taken");
    check(rxq_lo.size() == 3, $sformatf("disabled channel: %0d words left, expected 3", rxq_lo.size()));
    for (int i = 0; i < 5; i++) check(mem[500 + i] == 32'hA000_0000 + 32'(i), "channel 1 data in memory");
    check(pop_order.size() >= 6 && pop_order[0] == 1 && pop_order[5] == 1,
          "high-priority FIFO not served first");
    rd(5, d);
    check(d[3:0] == 4'b0010 && irq, "channel 1 done status");
    rd(11 + 4*1, d);
    check(d == 5, "channel 1 count");
    wr(10 + 4*2, 1);
    repeat (20) @(posedge clk);
    check(rxq_lo.size() == 0, "channel 2 did not resume");
    for (int i = 0; i < 3; i++) check(mem[600 + i] == 32'hB000_0000 + 32'(i), "channel 2 data in memory");
    rd(5, d);
    check(d[3:0] == 4'b0110, "channel 2 done status");
    wr(5, 32'hFFFF);

    // --- remote read request: 6 words from 200, returned to 0x0400_0003
    rxq_lo.push_back(w(1, CMD_RD, 32'h0000_0000));
    rxq_lo.push_back(w(0, CMD_RD, 200));
    rxq_lo.push_back(w(0, CMD_RD, 6));
    rxq_lo.push_back(w(0, CMD_RD, 32'h0400_0003));
    repeat (60) @(posedge clk);
    check(txq_lo.size() == 7, $sformatf("remote read: %0d words sent", txq_lo.size()));
    if (txq_lo.size() == 7) begin
      check(txq_lo[0].av && txq_lo[0].data == 32'h0400_0003, "remote read return address");
      for (int i = 0; i < 6; i++)
        check(txq_lo[i+1].data == 32'hC000_0000 + 32'(200 + i), "remote read data");
    end
    rd(5, d);
    check(d[9] && !d[8], "remote read served status");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #500000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
