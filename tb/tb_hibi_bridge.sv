// tb_hibi_bridge: self-checking test of the segment bridge. Segment A
// (bus clock 7 ns) holds a plain wrapper, agent 0 at 0x0000_0000, and the
// bridge's side A, agent 1; segment B (bus clock 11 ns) holds the bridge's
// side B, agent 0, and a plain wrapper, agent 1 at 0x8100_0000. Blocks are
// sent in both directions at once, high and low priority, with the far
// receiver stalled for a while; every word must arrive in order in the FIFO
// of its priority, behind the address word it was sent with.
module tb_hibi_bridge;
  import hibi_pkg::*;
  logic rst_n = 0;
  logic clk_a = 0, clk_b = 0, ip_clk = 0;
  always #3.5 clk_a = ~clk_a;
  always #5.5 clk_b = ~clk_b;
  always #5 ip_clk = ~ip_clk;

  // segment A: port 0 = end point, port 1 = bridge
  hibi_drv_t a_drv[2], b_drv[2], a_bus, b_bus;
  logic [MAX_AGENTS-1:0] a_req[2], b_req[2], a_req_all, b_req_all;
  logic a_full[2], b_full[2], a_full_all, b_full_all;

  hibi_segment #(.N_PORTS(2)) u_sa (.clk(clk_a), .rst_n, .drv(a_drv), .req(a_req),
    .full(a_full), .bus(a_bus), .req_all(a_req_all), .full_all(a_full_all));
  hibi_segment #(.N_PORTS(2)) u_sb (.clk(clk_b), .rst_n, .drv(b_drv), .req(b_req),
    .full(b_full), .bus(b_bus), .req_all(b_req_all), .full_all(b_full_all));

  hibi_bridge #(.A_ID(1), .A_N_AGENTS(2), .B_ID(0), .B_N_AGENTS(2)) dut (
    .rst_n, .clk_a, .clk_b,
    .a_cfg_we(1'b0), .a_cfg_addr(5'd0), .a_cfg_data(32'd0),
    .a_bus_in(a_bus), .a_req_in(a_req_all), .a_full_in(a_full_all),
    .a_drv_out(a_drv[1]), .a_req_out(a_req[1]), .a_full_out(a_full[1]),
    .b_cfg_we(1'b0), .b_cfg_addr(5'd0), .b_cfg_data(32'd0),
    .b_bus_in(b_bus), .b_req_in(b_req_all), .b_full_in(b_full_all),
    .b_drv_out(b_drv[0]), .b_req_out(b_req[0]), .b_full_out(b_full[0]));

  // end points: index 0 on segment A, index 1 on segment B
  logic       tx_hi_we[2], tx_lo_we[2], tx_hi_full[2], tx_lo_full[2];
  hibi_word_t tx_word[2], rx_hi_word[2], rx_lo_word[2];
  logic       rx_hi_re[2], rx_lo_re[2], rx_hi_empty[2], rx_lo_empty[2];

  hibi_wrapper #(.AGENT_ID(0), .N_AGENTS(2), .ADDR_LO(32'h0000_0000), .ADDR_HI(32'h00FF_FFFF)) u_ea (
    .rst_n, .ip_clk, .bus_clk(clk_a),
    .tx_hi_we(tx_hi_we[0]), .tx_lo_we(tx_lo_we[0]), .tx_word(tx_word[0]),
    .tx_hi_full(tx_hi_full[0]), .tx_lo_full(tx_lo_full[0]),
    .rx_hi_re(rx_hi_re[0]), .rx_lo_re(rx_lo_re[0]), .rx_hi_word(rx_hi_word[0]),
    .rx_lo_word(rx_lo_word[0]), .rx_hi_empty(rx_hi_empty[0]), .rx_lo_empty(rx_lo_empty[0]),
    .cfg_we(1'b0), .cfg_addr(5'd0), .cfg_data(32'd0),
    .bus_in(a_bus), .req_in(a_req_all), .full_in(a_full_all),
    .drv_out(a_drv[0]), .req_out(a_req[0]), .full_out(a_full[0]));
  hibi_wrapper #(.AGENT_ID(1), .N_AGENTS(2), .ADDR_LO(32'h8100_0000), .ADDR_HI(32'h81FF_FFFF)) u_eb (
    .rst_n, .ip_clk, .bus_clk(clk_b),
    .tx_hi_we(tx_hi_we[1]), .tx_lo_we(tx_lo_we[1]), .tx_word(tx_word[1]),
    .tx_hi_full(tx_hi_full[1]), .tx_lo_full(tx_lo_full[1]),
    .rx_hi_re(rx_hi_re[1]), .rx_lo_re(rx_lo_re[1]), .rx_hi_word(rx_hi_word[1]),
    .rx_lo_word(rx_lo_word[1]), .rx_hi_empty(rx_hi_empty[1]), .rx_lo_empty(rx_lo_empty[1]),
    .cfg_we(1'b0), .cfg_addr(5'd0), .cfg_data(32'd0),
    .bus_in(b_bus), .req_in(b_req_all), .full_in(b_full_all),
    .drv_out(b_drv[1]), .req_out(b_req[1]), .full_out(b_full[1]));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // receivers: [end point][priority] word lists, address words included
  logic [32:0] got [2][2][$];
  bit hold[2] = '{0, 0};
  always_comb
    for (int e = 0; e < 2; e++) begin
      rx_hi_re[e] = !rx_hi_empty[e] && !hold[e];
      rx_lo_re[e] = !rx_lo_empty[e] && !hold[e];
    end
  always @(posedge ip_clk)
    if (rst_n) for (int e = 0; e < 2; e++) begin
      if (rx_hi_re[e]) got[e][1].push_back({rx_hi_word[e].av, rx_hi_word[e].data});
      if (rx_lo_re[e]) got[e][0].push_back({rx_lo_word[e].av, rx_lo_word[e].data});
    end

  initial for (int e = 0; e < 2; e++) begin
    tx_hi_we[e] = 0; tx_lo_we[e] = 0; tx_word[e] = '0;
  end

  task automatic send(input int e, input logic [31:0] dst, input int n, input int base, input bit hi);
    for (int i = -1; i < n; i++) begin
      @(negedge ip_clk);
      while (hi ? tx_hi_full[e] : tx_lo_full[e]) @(negedge ip_clk);
      tx_word[e].av = (i < 0); tx_word[e].hi = hi; tx_word[e].cmd = CMD_WR;
      tx_word[e].data = (i < 0) ? dst : 32'(base + i);
      if (hi) tx_hi_we[e] = 1; else tx_lo_we[e] = 1;
      @(negedge ip_clk);
      tx_hi_we[e] = 0; tx_lo_we[e] = 0;
    end
  endtask

  // the data words of got[e][p], in order; the first entry must be dst
  task automatic check_rx(input int e, input int p, input logic [31:0] dst, input int n, input int base);
    int k;
    k = 0;
    check(got[e][p].size() > 0 && got[e][p][0] == {1'b1, dst},
          $sformatf("end %0d prio %0d: address word missing", e, p));
    foreach (got[e][p][i]) begin
      if (got[e][p][i][32]) begin
        if (got[e][p][i][31:0] != dst) check(0, "wrong address word");
      end else begin
        if (got[e][p][i][31:0] != 32'(base + k)) begin
          check(0, $sformatf("end %0d prio %0d word %0d", e, p, k)); break;
        end
        k++;
      end
    end
    check(k == n, $sformatf("end %0d prio %0d: %0d of %0d words", e, p, k, n));
  endtask

  initial begin
    repeat (4) @(posedge clk_b);
    rst_n = 1;
    repeat (4) @(posedge clk_b);
    fork
      begin
        send(0, 32'h8100_0010, 50, 100, 0);
        send(0, 32'h8100_0020, 20, 900, 1);
      end
      send(1, 32'h0000_0030, 40, 500, 0);
      begin hold[1] = 1; repeat (80) @(posedge ip_clk); hold[1] = 0; end
    join
    repeat (400) @(posedge ip_clk);
    check_rx(1, 0, 32'h8100_0010, 50, 100);
    check_rx(1, 1, 32'h8100_0020, 20, 900);
    check_rx(0, 0, 32'h0000_0030, 40, 500);
    check(got[0][1].size() == 0, "segment A end point got high-priority words");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog, received %0d %0d %0d %0d", got[0][0].size(), got[0][1].size(),
             got[1][0].size(), got[1][1].size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
