// tb_proc_unit: self-checking test of one processing unit without its
// processor: the test plays the processor on the memory bus and the wrapper
// FIFOs on the HIBI side. It checks the address decoder and the one-cycle
// read latency (program memory loaded through the load port, data memory
// with byte enables, DMA registers), a DMA block write that sends what the
// processor stored, and received words that the DMA controller writes into
// data memory where the processor then reads them, with the interrupt.
module tb_proc_unit;
  import hibi_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        cpu_req = 0, cpu_we = 0, cpu_rvalid, irq;
  logic [3:0]  cpu_be = 4'hF;
  logic [31:0] cpu_addr = 0, cpu_wdata = 0, cpu_rdata;
  logic        pl_we = 0;
  logic [7:0]  pl_addr = 0;
  logic [31:0] pl_data = 0;
  logic        tx_hi_we, tx_lo_we, tx_hi_full, tx_lo_full, rx_hi_re, rx_lo_re;
  hibi_word_t  tx_word, rx_hi_word, rx_lo_word;
  logic        rx_hi_empty, rx_lo_empty;

  proc_unit #(.DMEM_WORDS(512), .PMEM_WORDS(256), .N_RX_CH(2)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  hibi_word_t txq[$], rxq[$];
  assign tx_hi_full = 1'b0;
  assign tx_lo_full = 1'b0;
  always_comb begin
    rx_hi_empty = 1'b1;
    rx_hi_word  = '0;
    rx_lo_empty = (rxq.size() == 0);
    rx_lo_word  = rx_lo_empty ? '0 : rxq[0];
  end
  always @(posedge clk) if (rst_n) begin
    if (tx_lo_we || tx_hi_we) txq.push_back(tx_word);
    if (rx_lo_re && !rx_lo_empty) void'(rxq.pop_front());
  end

  task automatic cw(input logic [31:0] a, input logic [31:0] d, input logic [3:0] be = 4'hF);
    @(negedge clk); cpu_req = 1; cpu_we = 1; cpu_addr = a; cpu_wdata = d; cpu_be = be;
    @(negedge clk); cpu_req = 0; cpu_we = 0;
  endtask
  task automatic cr(input logic [31:0] a, output logic [31:0] d);
    @(negedge clk); cpu_req = 1; cpu_we = 0; cpu_addr = a;
    @(negedge clk); cpu_req = 0;
    check(cpu_rvalid, "read data not valid one cycle later");
    d = cpu_rdata;
  endtask

  initial begin
    logic [31:0] d;
    hibi_word_t x;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // program memory through the load port
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); pl_we = 1; pl_addr = 8'(i); pl_data = 32'hF000_0000 | 32'(i * 3);
    end
    @(negedge clk); pl_we = 0;
    for (int i = 0; i < 256; i += 37) begin
      cr(32'(i * 4), d);
      check(d == (32'hF000_0000 | 32'(i * 3)), $sformatf("program word %0d", i));
    end
    cw(32'h0000_0010, 32'hDEAD_BEEF);   // writes to program memory are ignored
    cr(32'h0000_0010, d);
    check(d == 32'hF000_000C, "program memory was written by the processor");
    // data memory with byte enables
    for (int i = 0; i < 16; i++) cw(32'h1000_0000 + 32'(i * 4), 32'h1111_0000 + 32'(i));
    cw(32'h1000_0008, 32'hAB00_0000, 4'b1000);
    cr(32'h1000_0008, d);
    check(d == 32'hAB11_0002, "byte-enable write");
    // DMA block write of data words 4..11 to 0x0500_0001
    cw(32'h2000_0018, 32'h0000_0103);               // IRQ_MASK
    cw(32'h2000_0000, 4); cw(32'h2000_0004, 8); cw(32'h2000_0008, 32'h0500_0001);
    cr(32'h2000_0008, d);
    check(d == 32'h0500_0001, "DMA register read back");
    cw(32'h2000_0010, 1);
    repeat (40) @(posedge clk);
    check(txq.size() == 9, $sformatf("DMA sent %0d words, expected 9", txq.size()));
    if (txq.size() == 9) begin
      check(txq[0].av && txq[0].data == 32'h0500_0001, "DMA address word");
      for (int i = 0; i < 8; i++)
        check(txq[i+1].data == 32'h1111_0000 + 32'(i + 4), $sformatf("DMA word %0d", i));
    end
    check(irq, "no interrupt after transmit");
    cw(32'h2000_0014, 32'hFFFF);
    check(!irq, "interrupt not cleared");
    // receive 6 words on channel 1 into data words 100..105
    cw(32'h2000_0000 + 4 * (8 + 4), 100); cw(32'h2000_0000 + 4 * (9 + 4), 6);
    cw(32'h2000_0000 + 4 * (10 + 4), 1);
    x = '0; x.av = 1; x.data = 32'h0000_0001; rxq.push_back(x);
    for (int i = 0; i < 6; i++) begin x = '0; x.data = 32'h7700_0000 + 32'(i); rxq.push_back(x); end
    repeat (20) @(posedge clk);
    check(irq, "no interrupt after receive");
    for (int i = 0; i < 6; i++) begin
      cr(32'h1000_0000 + 32'((100 + i) * 4), d);
      check(d == 32'h7700_0000 + 32'(i), $sformatf("received word %0d", i));
    end
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
