// tb_video_encoder_top: end-to-end test of the encoder SoC at its default
// size (nine slaves, QCIF frame), with the test playing the part of the
// processors' software on their memory buses.
//
// One frame goes through the whole data flow of the design:
//  1. the same program image is loaded into all slaves at once and read back
//     from every one of them;
//  2. a raw 4:2:0 QCIF frame (38016 bytes, generated from a formula) enters
//     the I/O module and lands in the master's data memory by DMA;
//  3. the master sends each slave its encoding parameters (high priority)
//     and its slice of macroblock rows (low priority); halfway the bus is
//     switched from round-robin to priority competition;
//  4. neighbouring slaves exchange their boundary macroblock rows;
//  5. each slave computes a stand-in for its bitstream (checksums of what it
//     received; no real encoder runs here) and one slave fetches a motion
//     estimation window from the master's memory by a remote read (the
//     shared-memory approach);
//  6. the master collects the slaves' bitstreams one after the other, each
//     started by a high-priority message, and sends the merged stream to the
//     I/O module, whose byte output is compared with the expected stream.
// Expected values are computed here from the frame formula. The test also
// counts TDMA, round-robin and priority bus grants, full-FIFO retries,
// high-priority words, resent address words, interrupts and remote reads,
// and fails if any of them never happened.
module tb_video_encoder_top;
  import hibi_pkg::*;

  localparam int N      = 9;            // slaves (top default)
  localparam int NAG    = N + 2;
  localparam int ROWS   = 9;            // QCIF macroblock rows
  localparam int FBYTES = 38016;        // QCIF 4:2:0 frame
  localparam int FW     = FBYTES / 4;   // frame words
  localparam int RW     = FW / ROWS;    // words per macroblock row (1056)
  localparam int BSW    = 14;           // bitstream words per slave (~500 B / 9)
  localparam int MEWIN  = 9 * 384 / 4;  // motion estimation window, words (864)
  // slave memory map (words)
  localparam int S_SLICE = 0, S_UP = 3200, S_DN = 4300, S_PAR = 5400, S_BS = 5500,
                 S_GO = 5600, S_ME = 6000;
  // master memory map (words)
  localparam int M_FRAME = 0, M_BS = 10000, M_PAR = 12000;

  logic rst_n = 0, ip_clk = 0, bus_clk = 0;
  always #5 ip_clk = ~ip_clk;    // 100 MHz processors
  always #4 bus_clk = ~bus_clk;  // 125 MHz bus

  logic        hibi_cfg_we = 0;
  logic [4:0]  hibi_cfg_addr = 0;
  logic [31:0] hibi_cfg_data = 0;
  logic        m_cpu_req = 0, m_cpu_we = 0, m_cpu_rvalid, m_irq;
  logic [3:0]  m_cpu_be = 4'hF;
  logic [31:0] m_cpu_addr = 0, m_cpu_wdata = 0, m_cpu_rdata;
  logic        m_pl_we = 0;
  logic [11:0] m_pl_addr = 0;
  logic [31:0] m_pl_data = 0;
  logic        s_cpu_req[N], s_cpu_we[N], s_cpu_rvalid[N], s_irq[N];
  logic [3:0]  s_cpu_be[N];
  logic [31:0] s_cpu_addr[N], s_cpu_wdata[N], s_cpu_rdata[N];
  logic        s_pl_we = 0;
  logic [12:0] s_pl_addr = 0;
  logic [31:0] s_pl_data = 0;
  logic [31:0] io_in_dst = 32'h0000_0000;   // master, channel 0
  logic        cam_valid = 0, cam_sof = 0, cam_ready;
  logic [7:0]  cam_data = 0;
  logic        bs_valid, bs_ready = 0;
  logic [7:0]  bs_data;

  video_encoder_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------------------- the frame
  function automatic byte unsigned pix(input int i);
    return 8'((i * 13) ^ (i >> 7) ^ (i >> 11));
  endfunction
  function automatic logic [31:0] fword(input int j);
    return {pix(4*j+3), pix(4*j+2), pix(4*j+1), pix(4*j)};
  endfunction
  function automatic int first_row(input int s);
    return s * ROWS / N;
  endfunction
  function automatic int nrows(input int s);
    return (s + 1) * ROWS / N - s * ROWS / N;
  endfunction
  function automatic logic [31:0] sum_words(input int w0, input int n);
    logic [31:0] a;
    a = 0;
    for (int j = 0; j < n; j++) a += fword(w0 + j);
    return a;
  endfunction
  // stand-in bitstream of slave s, from what it should have received
  function automatic logic [31:0] bs_word(input int s, input int k);
    logic [31:0] c_slice, c_rows;
    c_slice = sum_words(first_row(s) * RW, nrows(s) * RW);
    c_rows  = 0;
    if (s > 0)     c_rows += sum_words((first_row(s) - 1) * RW, RW);
    if (s < N - 1) c_rows += sum_words(first_row(s + 1) * RW, RW);
    case (k)
      0: return 32'hB500_0000 | 32'(s);
      1: return c_slice;
      2: return c_rows;
      default: return c_slice ^ (32'h0101_0101 * 32'(k));
    endcase
  endfunction

  // ----------------------------------------------------------- bus access
  task automatic mw(input int a, input logic [31:0] d);   // master data/regs
    @(negedge ip_clk); m_cpu_req = 1; m_cpu_we = 1; m_cpu_addr = 32'(a); m_cpu_wdata = d;
    @(negedge ip_clk); m_cpu_req = 0; m_cpu_we = 0;
  endtask
  task automatic mr(input int a, output logic [31:0] d);
    @(negedge ip_clk); m_cpu_req = 1; m_cpu_we = 0; m_cpu_addr = 32'(a);
    @(negedge ip_clk); m_cpu_req = 0; d = m_cpu_rdata;
  endtask
  task automatic sw(input int s, input int a, input logic [31:0] d);
    @(negedge ip_clk); s_cpu_req[s] = 1; s_cpu_we[s] = 1; s_cpu_addr[s] = 32'(a); s_cpu_wdata[s] = d;
    @(negedge ip_clk); s_cpu_req[s] = 0; s_cpu_we[s] = 0;
  endtask
  task automatic sr(input int s, input int a, output logic [31:0] d);
    @(negedge ip_clk); s_cpu_req[s] = 1; s_cpu_we[s] = 0; s_cpu_addr[s] = 32'(a);
    @(negedge ip_clk); s_cpu_req[s] = 0; d = s_cpu_rdata[s];
  endtask
  // address helpers
  function automatic int dm(input int w); return 32'h1000_0000 + 4 * w; endfunction
  function automatic int rg(input int r); return 32'h2000_0000 + 4 * r; endfunction
  function automatic int rxr(input int c, input int k); return rg(8 + 4 * c + k); endfunction
  function automatic logic [31:0] haddr(input int agent, input int ch);
    return (32'(agent) << AGENT_LSB) | 32'(ch);
  endfunction

  // DMA job on the master / a slave: mem, len, dst, ctrl
  task automatic m_tx(input int mem, input int len, input logic [31:0] dst, input logic [31:0] ctrl);
    logic [31:0] d;
    mw(rg(0), 32'(mem)); mw(rg(1), 32'(len)); mw(rg(2), dst); mw(rg(4), ctrl);
    d = 1;
    while (d[0]) mr(rg(4), d);
  endtask
  task automatic s_tx_start(input int s, input int mem, input int len, input logic [31:0] dst,
                            input logic [31:0] ret, input logic [31:0] ctrl);
    sw(s, rg(0), 32'(mem)); sw(s, rg(1), 32'(len)); sw(s, rg(2), dst); sw(s, rg(3), ret);
    sw(s, rg(4), ctrl);
  endtask
  task automatic s_wait_idle(input int s);
    logic [31:0] d;
    d = 1;
    while (d[0]) sr(s, rg(4), d);
  endtask
  task automatic s_wait_status(input int s, input logic [15:0] bits);
    logic [31:0] d;
    d = 0;
    while ((d[15:0] & bits) != bits) sr(s, rg(5), d);
    sw(s, rg(5), 32'(bits));
  endtask
  task automatic m_wait_status(input logic [15:0] bits);
    logic [31:0] d;
    d = 0;
    while ((d[15:0] & bits) != bits) mr(rg(5), d);
    mw(rg(5), 32'(bits));
  endtask
  task automatic s_arm(input int s, input int c, input int mem, input int len);
    sw(s, rxr(c, 0), 32'(mem)); sw(s, rxr(c, 1), 32'(len)); sw(s, rxr(c, 2), 1);
  endtask
  task automatic m_arm(input int c, input int mem, input int len);
    mw(rxr(c, 0), 32'(mem)); mw(rxr(c, 1), 32'(len)); mw(rxr(c, 2), 1);
  endtask

  task automatic cfg(input logic [4:0] a, input logic [31:0] d);
    @(negedge bus_clk); hibi_cfg_we = 1; hibi_cfg_addr = a; hibi_cfg_data = d;
    @(negedge bus_clk); hibi_cfg_we = 0;
  endtask
  function automatic logic [31:0] arb(arb_mode_e m, bit tdma, int nsl, int maxs);
    arb_cfg_t c;
    c.mode = m; c.tdma_en = tdma; c.slot_len = 5'd7; c.n_slots_m1 = 4'(nsl);
    c.max_send = 8'(maxs);
    return 32'(c);
  endfunction

  // ------------------------------------------------------------- monitors
  int n_tdma = 0, n_rr = 0, n_prio = 0, n_full = 0, n_hi = 0, n_addr = 0;
  int n_irq = 0, n_mode_switch = 0, bus_words = 0, bus_cycles = 0;
  bit prev_mode = 0, prev_irq = 0;
  always @(posedge bus_clk) if (rst_n) begin
    bus_cycles++;
    if (!dut.bus.lock && |dut.req_all) begin
      if (dut.g_wrap[0].u_wrap.cfg.tdma_en && dut.req_all[dut.g_wrap[0].u_wrap.owner_next])
        n_tdma++;
      else if (dut.g_wrap[0].u_wrap.cfg.mode == ARB_PRIORITY) n_prio++;
      else n_rr++;
    end
    if (dut.full_all) n_full++;
    if (dut.bus.valid && !dut.full_all) begin
      bus_words++;
      if (dut.bus.word.hi) n_hi++;
      if (dut.bus.word.av) n_addr++;
    end
    if (1'(dut.g_wrap[0].u_wrap.cfg.mode) != prev_mode) n_mode_switch++;
    prev_mode = 1'(dut.g_wrap[0].u_wrap.cfg.mode);
  end
  always @(posedge ip_clk) if (rst_n) begin
    bit any;
    any = m_irq;
    for (int s = 0; s < N; s++) any |= s_irq[s];
    if (any && !prev_irq) n_irq++;
    prev_irq = any;
  end

  // compressed stream out of the I/O module
  byte unsigned out_bytes[$];
  always @(posedge ip_clk) if (rst_n) begin
    if (bs_valid && bs_ready) out_bytes.push_back(bs_data);
    bs_ready <= ($urandom_range(3) != 0);
  end

  // camera: one frame, with random gaps
  task automatic camera_frame();
    for (int i = 0; i < FBYTES; i++) begin
      @(negedge ip_clk);
      while ($urandom_range(7) == 0) begin cam_valid = 0; @(negedge ip_clk); end
      cam_valid = 1; cam_sof = (i == 0); cam_data = pix(i);
      @(posedge ip_clk);
      while (!cam_ready) @(posedge ip_clk);
    end
    @(negedge ip_clk); cam_valid = 0; cam_sof = 0;
  endtask

  // ------------------------------------------------------------ the flow
  initial begin
    logic [31:0] d, e;
    int start_cycle;
    for (int s = 0; s < N; s++) begin
      s_cpu_req[s] = 0; s_cpu_we[s] = 0; s_cpu_be[s] = 4'hF; s_cpu_addr[s] = 0; s_cpu_wdata[s] = 0;
    end
    repeat (4) @(posedge ip_clk);
    rst_n = 1;
    repeat (4) @(posedge ip_clk);

    // bus: TDMA, one slot per agent, round-robin for unused slots, 16-word bursts
    cfg(5'd0, arb(ARB_ROUND_ROBIN, 1, NAG - 1, 16));

    // 1. one program image for all slaves, another for the master
    for (int i = 0; i < 64; i++) begin
      @(negedge ip_clk);
      s_pl_we = 1; s_pl_addr = 13'(i * 97); s_pl_data = 32'hE1A0_0000 ^ 32'(i * 7919);
      m_pl_we = 1; m_pl_addr = 12'(i * 37); m_pl_data = 32'hEA00_0000 ^ 32'(i);
    end
    @(negedge ip_clk); s_pl_we = 0; m_pl_we = 0;
    for (int s = 0; s < N; s++) begin
      sr(s, 4 * 97 * 5, d);
      check(d == (32'hE1A0_0000 ^ 32'(5 * 7919)), $sformatf("slave %0d program word", s));
      sr(s, 4 * 97 * 63, d);
      check(d == (32'hE1A0_0000 ^ 32'(63 * 7919)), $sformatf("slave %0d program word", s));
    end
    mr(4 * 37 * 9, d);
    check(d == (32'hEA00_0000 ^ 32'd9), "master program word");

    // 2. frame input into the master's memory
    mw(rg(6), 32'h0000_030F);
    for (int s = 0; s < N; s++) sw(s, rg(6), 32'h0000_030F);
    m_arm(0, M_FRAME, FW);
    start_cycle = bus_cycles;
    camera_frame();
    m_wait_status(16'h0001);
    $display("frame input done after %0d bus cycles", bus_cycles - start_cycle);
    for (int k = 0; k < 40; k++) begin
      int j;
      j = (k == 0) ? 0 : (k == 39) ? FW - 1 : $urandom_range(FW - 1);
      mr(dm(M_FRAME + j), d);
      check(d == fword(j), $sformatf("master frame word %0d = %h, expected %h", j, d, fword(j)));
    end

    // 3. parameters and slices to the slaves
    for (int s = 0; s < N; s++) begin
      s_arm(s, 0, S_SLICE, nrows(s) * RW);
      s_arm(s, 1, S_PAR, 4);
      if (s > 0)     s_arm(s, 2, S_UP, RW);
      if (s < N - 1) s_arm(s, 3, S_DN, RW);
    end
    for (int s = 0; s < N; s++) begin
      if (s == N / 2) cfg(5'd0, arb(ARB_PRIORITY, 0, NAG - 1, 16));   // mode switch
      mw(dm(M_PAR + 4*s), 32'(s)); mw(dm(M_PAR + 4*s + 1), 32'(first_row(s)));
      mw(dm(M_PAR + 4*s + 2), 32'(nrows(s))); mw(dm(M_PAR + 4*s + 3), 32'(N));
      m_tx(M_PAR + 4*s, 4, haddr(s + 2, 1), 32'h3);            // high priority
      m_tx(M_FRAME + first_row(s) * RW, nrows(s) * RW, haddr(s + 2, 0), 32'h1);
    end
    m_wait_status(16'h0100);
    for (int s = 0; s < N; s++) begin
      s_wait_status(s, 16'h0003);
      sr(s, dm(S_PAR + 1), d);
      check(d == 32'(first_row(s)), $sformatf("slave %0d parameters", s));
    end

    // 4. boundary rows: bottom row down, top row up (all slaves at once)
    for (int s = 0; s < N - 1; s++)
      s_tx_start(s, S_SLICE + (nrows(s) - 1) * RW, RW, haddr(s + 3, 2), 0, 32'h1);
    for (int s = 0; s < N - 1; s++) s_wait_idle(s);
    for (int s = 1; s < N; s++)
      s_tx_start(s, S_SLICE, RW, haddr(s + 1, 3), 0, 32'h1);
    for (int s = 0; s < N; s++) begin
      s_wait_idle(s);
      s_wait_status(s, 16'((s > 0 ? 4 : 0) | (s < N - 1 ? 8 : 0)));
    end

    // 5. stand-in encoding: checksums read back over each slave's bus
    for (int s = 0; s < N; s++) begin
      logic [31:0] c_slice, c_rows;
      c_slice = 0; c_rows = 0;
      for (int j = 0; j < nrows(s) * RW; j++) begin sr(s, dm(S_SLICE + j), d); c_slice += d; end
      if (s > 0)     for (int j = 0; j < RW; j++) begin sr(s, dm(S_UP + j), d); c_rows += d; end
      if (s < N - 1) for (int j = 0; j < RW; j++) begin sr(s, dm(S_DN + j), d); c_rows += d; end
      check(c_slice == bs_word(s, 1), $sformatf("slave %0d slice checksum", s));
      check(c_rows == bs_word(s, 2), $sformatf("slave %0d neighbour rows checksum", s));
      sw(s, dm(S_BS), 32'hB500_0000 | 32'(s));
      sw(s, dm(S_BS + 1), c_slice);
      sw(s, dm(S_BS + 2), c_rows);
      for (int k = 3; k < BSW; k++) sw(s, dm(S_BS + k), c_slice ^ (32'h0101_0101 * 32'(k)));
    end
    // shared-memory approach: slave 0 reads a motion estimation window
    // (nine macroblocks) straight from the master's memory
    s_arm(0, 1, S_ME, MEWIN);
    s_tx_start(0, M_FRAME + RW, MEWIN, haddr(0, 0), haddr(2, 1), 32'h5);
    s_wait_status(0, 16'h0002);
    for (int k = 0; k < 24; k++) begin
      int j;
      j = (k == 23) ? MEWIN - 1 : $urandom_range(MEWIN - 1);
      sr(0, dm(S_ME + j), d);
      check(d == fword(RW + j), $sformatf("ME window word %0d", j));
    end
    m_wait_status(16'h0200);

    // 6. collect the bitstreams, one slave after the other
    cfg(5'd0, arb(ARB_ROUND_ROBIN, 1, NAG - 1, 4));
    for (int s = 0; s < N; s++) s_arm(s, 1, S_GO, 1);
    mw(dm(M_PAR), 32'h60);
    for (int s = 0; s < N; s++) begin
      m_arm(1, M_BS + s * BSW, BSW);
      m_tx(M_PAR, 1, haddr(s + 2, 1), 32'h3);                    // "go" message
      s_wait_status(s, 16'h0002);
      s_tx_start(s, S_BS, BSW, haddr(0, 1), 0, 32'h1);
      m_wait_status(16'h0002);
    end
    // merged stream to the I/O module
    m_tx(M_BS, N * BSW, haddr(1, 0), 32'h1);
    for (int t = 0; t < 5000 && out_bytes.size() < N * BSW * 4; t++) @(posedge ip_clk);
    check(out_bytes.size() == N * BSW * 4,
          $sformatf("%0d stream bytes out, expected %0d", out_bytes.size(), N * BSW * 4));
    for (int s = 0; s < N; s++)
      for (int k = 0; k < BSW; k++) begin
        e = bs_word(s, k);
        d = 0;
        for (int b = 0; b < 4; b++)
          if ((s * BSW + k) * 4 + b < out_bytes.size()) d[8*b +: 8] = out_bytes[(s * BSW + k) * 4 + b];
        if (d != e) begin
          check(0, $sformatf("stream word %0d of slave %0d = %h, expected %h", k, s, d, e));
          break;
        end
      end
    checks++;

    // every mechanism must have happened
    $display("grants: tdma %0d round-robin %0d priority %0d; full %0d; hi words %0d; addr words %0d; irqs %0d; mode switches %0d; bus words %0d in %0d cycles",
             n_tdma, n_rr, n_prio, n_full, n_hi, n_addr, n_irq, n_mode_switch, bus_words, bus_cycles);
    check(n_tdma > 0, "no TDMA grant");
    check(n_rr > 0, "no round-robin grant");
    check(n_prio > 0, "no priority grant");
    check(n_full > 0, "no full-FIFO retry");
    check(n_hi > 0, "no high-priority word");
    check(n_addr > 2 * N, "no resent address words");
    check(n_irq > 0, "no interrupt");
    check(n_mode_switch >= 2, "no arbitration mode switch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
