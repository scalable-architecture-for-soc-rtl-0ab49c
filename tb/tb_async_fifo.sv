// tb_async_fifo: self-checking test of the dual-clock FIFO. A writer on a
// 7 ns clock pushes numbered words with random gaps; a reader on an 11 ns
// clock pops them with random stalls, so the FIFO runs both full and empty.
// The test checks that every word arrives once and in order, that full is
// raised and no word is lost while it is, that rcount never exceeds DEPTH and
// never claims more words than have been written, and that the head word is
// valid whenever empty is low. A second phase swaps the clock speeds.
module tb_async_fifo;
  localparam int W = 16, D = 8, N = 3000;
  logic rst_n = 0, wclk = 0, rclk = 0;
  real wper = 3.5, rper = 5.5;
  always #(wper) wclk = ~wclk;
  always #(rper) rclk = ~rclk;

  logic we = 0, re, full, empty;
  logic [W-1:0] wdata = 0, rdata;
  logic [$clog2(D):0] rcount;

  async_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int wcount = 0, rcnt = 0, full_seen = 0, max_rcount = 0;
  bit stall = 0;
  assign re = !empty && !stall;

  always @(posedge rclk) if (rst_n) begin
    if (int'(rcount) > max_rcount) max_rcount = int'(rcount);
    if (int'(rcount) > wcount - rcnt) check(0, $sformatf("rcount %0d exceeds written words", rcount));
    if (re) begin
      check(rdata == W'(rcnt), $sformatf("word %0d read as %0d", rcnt, rdata));
      rcnt++;
    end
    stall <= ($urandom_range(2) == 0);
  end
  always @(posedge wclk) if (rst_n) begin
    if (full) full_seen++;
    if (we && !full) wcount++;
  end

  task automatic run_phase(input int n);
    int target;
    target = wcount + n;
    while (wcount < target) begin
      @(negedge wclk);
      we = ($urandom_range(3) != 0);
      wdata = W'(wcount);
    end
    @(negedge wclk); we = 0;
    repeat (40) @(posedge rclk);
  endtask

  initial begin
    repeat (3) @(posedge rclk);
    rst_n = 1;
    run_phase(N);
    check(rcnt == wcount, $sformatf("phase 1: %0d written, %0d read", wcount, rcnt));
    check(full_seen > 0, "phase 1: FIFO never full");
    check(empty && rcount == 0, "phase 1: not empty at the end");
    full_seen = 0;
    wper = 6.5; rper = 2.5;
    run_phase(N);
    check(rcnt == wcount, $sformatf("phase 2: %0d written, %0d read", wcount, rcnt));
    check(max_rcount <= D && max_rcount > 1, $sformatf("rcount peak %0d", max_rcount));
    check(empty, "phase 2: not empty at the end");
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
