// tb_hibi_wrapper: self-checking test of the HIBI wrapper.
//
// Three wrappers (agents 0, 1, 2) share one segment; the IP clock and the bus
// clock are unrelated. Agents 0 and 1 send blocks of numbered words to agent
// 2 while agent 2's receiver is sometimes held back. The test checks that
// every block arrives complete, in order and in the right priority FIFO,
// that at most one wrapper drives at a time, that round-robin competition
// with a send limit interleaves the two senders, that priority competition
// lets agent 0 finish first, that a TDMA slot owner wins over competition,
// that a full receiver makes the sender retry, and that an interrupted
// transfer resumes with its address word sent again.
module tb_hibi_wrapper;
  import hibi_pkg::*;

  localparam int N = 3;
  logic rst_n = 1'b0;
  logic ip_clk = 1'b0, bus_clk = 1'b0;
  always #5 ip_clk = ~ip_clk;
  always #3.5 bus_clk = ~bus_clk;

  logic       tx_hi_we[N], tx_lo_we[N], tx_hi_full[N], tx_lo_full[N];
  hibi_word_t tx_word[N], rx_hi_word[N], rx_lo_word[N];
  logic       rx_hi_re[N], rx_lo_re[N], rx_hi_empty[N], rx_lo_empty[N];
  hibi_drv_t  drv[N];
  logic [MAX_AGENTS-1:0] req[N];
  logic       full[N];
  hibi_drv_t  bus;
  logic [MAX_AGENTS-1:0] req_all;
  logic       full_all;
  logic       cfg_we = 1'b0;
  logic [4:0] cfg_addr = '0;
  logic [31:0] cfg_data = '0;

  hibi_segment #(.N_PORTS(N)) u_seg (.clk(bus_clk), .rst_n, .drv, .req, .full,
                                     .bus, .req_all, .full_all);
  for (genvar g = 0; g < N; g++) begin : g_w
    hibi_wrapper #(.AGENT_ID(g), .N_AGENTS(N), .TX_DEPTH(8), .RX_DEPTH(4)) u_w (
      .rst_n, .ip_clk, .bus_clk,
      .tx_hi_we(tx_hi_we[g]), .tx_lo_we(tx_lo_we[g]), .tx_word(tx_word[g]),
      .tx_hi_full(tx_hi_full[g]), .tx_lo_full(tx_lo_full[g]),
      .rx_hi_re(rx_hi_re[g]), .rx_lo_re(rx_lo_re[g]),
      .rx_hi_word(rx_hi_word[g]), .rx_lo_word(rx_lo_word[g]),
      .rx_hi_empty(rx_hi_empty[g]), .rx_lo_empty(rx_lo_empty[g]),
      .cfg_we, .cfg_addr, .cfg_data,
      .bus_in(bus), .req_in(req_all), .full_in(full_all),
      .drv_out(drv[g]), .req_out(req[g]), .full_out(full[g]));
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------ monitors
  int owner_switches = 0, full_cycles = 0, addr_words = 0;
  int last_drv = -1;
  int first_word_cycle[N], last_word_cycle[N];
  int bus_cycle = 0;
  always @(posedge bus_clk) if (rst_n) begin
    int cnt;
    cnt = 0;
    bus_cycle++;
    for (int g = 0; g < N; g++)
      if (drv[g].valid) begin
        cnt++;
        if (g != last_drv && last_drv >= 0) owner_switches++;
        last_drv = g;
        if (!drv[g].word.av) begin
          if (first_word_cycle[g] < 0) first_word_cycle[g] = bus_cycle;
          last_word_cycle[g] = bus_cycle;
        end
      end
    if (cnt > 1) begin
      failures++;
      $display("FAIL: %0d drivers at once", cnt);
    end
    if (full_all) full_cycles++;
    if (bus.valid && bus.word.av && !full_all) addr_words++;
  end

  // receiver on agent 2: stores words per source agent and priority
  int got_lo[2][$], got_hi[2][$];
  int cur_src_lo = -1, cur_src_hi = -1;
  bit rx_hold = 1'b0;
  always_comb begin
    rx_hi_re[2] = !rx_hi_empty[2] && !rx_hold;
    rx_lo_re[2] = !rx_lo_empty[2] && !rx_hold && rx_hi_empty[2];
    for (int g = 0; g < 2; g++) begin
      rx_hi_re[g] = !rx_hi_empty[g];
      rx_lo_re[g] = !rx_lo_empty[g];
    end
  end
  always @(posedge ip_clk) if (rst_n) begin
    if (rx_hi_re[2]) begin
      if (rx_hi_word[2].av) cur_src_hi = int'(rx_hi_word[2].data[7:0]);
      else got_hi[cur_src_hi].push_back(int'(rx_hi_word[2].data));
    end else if (rx_lo_re[2]) begin
      if (rx_lo_word[2].av) cur_src_lo = int'(rx_lo_word[2].data[7:0]);
      else got_lo[cur_src_lo].push_back(int'(rx_lo_word[2].data));
    end
  end

  // ------------------------------------------------------------- drivers
  initial for (int g = 0; g < N; g++) begin
    tx_hi_we[g] = 0; tx_lo_we[g] = 0; tx_word[g] = '0;
    first_word_cycle[g] = -1; last_word_cycle[g] = -1;
  end

  // send an address word then n data words base, base+1, ... to agent 2;
  // the low address byte names the sender
  task automatic send(input int src, input int n, input int base, input bit hi);
    for (int i = -1; i < n; i++) begin
      @(negedge ip_clk);
      while (hi ? tx_hi_full[src] : tx_lo_full[src]) @(negedge ip_clk);
      tx_word[src].av   = (i < 0);
      tx_word[src].hi   = hi;
      tx_word[src].cmd  = CMD_WR;
      tx_word[src].data = (i < 0) ? ((32'd2 << AGENT_LSB) | 32'(src)) : 32'(base + i);
      if (hi) tx_hi_we[src] = 1; else tx_lo_we[src] = 1;
      @(negedge ip_clk);
      tx_hi_we[src] = 0; tx_lo_we[src] = 0;
      @(posedge ip_clk);
    end
  endtask

  task automatic write_cfg(input logic [4:0] a, input logic [31:0] d);
    @(negedge bus_clk);
    cfg_we = 1; cfg_addr = a; cfg_data = d;
    @(negedge bus_clk);
    cfg_we = 0;
  endtask

  function automatic logic [31:0] cfg_word(arb_mode_e m, bit tdma, int slen, int nsl, int maxs);
    arb_cfg_t c;
    c.mode = m; c.tdma_en = tdma; c.slot_len = 5'(slen); c.n_slots_m1 = 4'(nsl);
    c.max_send = 8'(maxs);
    return 32'(c);
  endfunction

  task automatic wait_quiet();
    repeat (300) @(posedge ip_clk);
  endtask

  task automatic clear();
    for (int s = 0; s < 2; s++) begin got_lo[s].delete(); got_hi[s].delete(); end
    for (int g = 0; g < N; g++) begin first_word_cycle[g] = -1; last_word_cycle[g] = -1; end
    owner_switches = 0; last_drv = -1;
  endtask

  task automatic check_block(input int src, input int n, input int base, input bit hi);
    int q[$];
    q = hi ? got_hi[src] : got_lo[src];
    check(q.size() == n, $sformatf("agent %0d sent %0d words, %0d arrived", src, n, q.size()));
    for (int i = 0; i < q.size() && i < n; i++)
      if (q[i] != base + i) begin
        check(0, $sformatf("agent %0d word %0d = %0d, expected %0d", src, i, q[i], base + i));
        break;
      end
  endtask

  initial begin
    repeat (3) @(posedge ip_clk);
    rst_n = 1;
    repeat (3) @(posedge ip_clk);

    // 1. round-robin, at most 4 words per ownership: both senders interleave;
    //    receiver held back part of the time so that its FIFO fills
    clear();
    write_cfg(5'd0, cfg_word(ARB_ROUND_ROBIN, 0, 7, 0, 4));
    fork
      send(0, 40, 1000, 0);
      send(1, 40, 2000, 0);
      begin
        repeat (20) @(posedge ip_clk);
        rx_hold = 1;
        repeat (60) @(posedge ip_clk);
        rx_hold = 0;
      end
    join
    wait_quiet();
    check_block(0, 40, 1000, 0);
    check_block(1, 40, 2000, 0);
    check(owner_switches >= 4, $sformatf("round robin: %0d owner switches", owner_switches));
    check(full_cycles > 0, "receiver FIFO never reported full");
    check(addr_words > 2, $sformatf("only %0d address words: no resend after losing the bus", addr_words));

    // 2. priority competition: agent 0 beats agent 1
    clear();
    write_cfg(5'd0, cfg_word(ARB_PRIORITY, 0, 7, 0, 4));
    fork
      send(0, 30, 3000, 0);
      send(1, 30, 4000, 0);
    join
    wait_quiet();
    check_block(0, 30, 3000, 0);
    check_block(1, 30, 4000, 0);
    check(last_word_cycle[0] < last_word_cycle[1], "priority: agent 0 did not finish first");

    // 3. TDMA: the single slot belongs to agent 1, which then wins although
    //    priority competition would favour agent 0
    clear();
    write_cfg(5'd16, 32'd1);
    write_cfg(5'd0, cfg_word(ARB_PRIORITY, 1, 7, 0, 0));
    fork
      send(0, 30, 5000, 0);
      send(1, 30, 6000, 0);
    join
    wait_quiet();
    check_block(0, 30, 5000, 0);
    check_block(1, 30, 6000, 0);
    check(last_word_cycle[1] < last_word_cycle[0], "TDMA: slot owner did not finish first");

    // 4. high-priority transfer arrives in the high-priority FIFO
    clear();
    write_cfg(5'd0, cfg_word(ARB_ROUND_ROBIN, 0, 7, 0, 0));
    fork
      send(0, 10, 7000, 1);
      send(1, 10, 8000, 0);
    join
    wait_quiet();
    check_block(0, 10, 7000, 1);
    check_block(1, 10, 8000, 0);
    check(got_lo[0].size() == 0, "high-priority words leaked into the low FIFO");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
