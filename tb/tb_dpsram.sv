// tb_dpsram: self-checking test of the dual-port data memory.
// Writes random words through both ports (with random byte enables on port
// A), reads them back through the other port, checks the one-cycle read
// latency, that read data holds between reads, and that port B wins a
// same-cycle write to the same word. A reference array is kept in the test.
module tb_dpsram;
  localparam int W = 256;
  logic clk = 0;
  always #5 clk = ~clk;
  logic a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [3:0] a_be = 4'hF, b_be = 4'hF;
  logic [7:0] a_addr = 0, b_addr = 0;
  logic [31:0] a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;
  logic [31:0] ref_mem [W];
  int checks = 0, failures = 0;

  dpsram #(.WORDS(W)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    // fill through port B
    for (int i = 0; i < W; i++) begin
      @(negedge clk); b_en = 1; b_we = 1; b_addr = 8'(i); b_wdata = $urandom;
      ref_mem[i] = b_wdata;
    end
    @(negedge clk); b_en = 0; b_we = 0;
    // byte writes through port A
    for (int k = 0; k < 200; k++) begin
      int i;
      i = $urandom_range(W - 1);
      @(negedge clk); a_en = 1; a_we = 1; a_addr = 8'(i); a_wdata = $urandom; a_be = 4'($urandom);
      for (int b = 0; b < 4; b++) if (a_be[b]) ref_mem[i][8*b +: 8] = a_wdata[8*b +: 8];
    end
    @(negedge clk); a_en = 0; a_we = 0;
    // same word from both ports: port B wins
    @(negedge clk); a_en = 1; a_we = 1; a_be = 4'hF; a_addr = 8'd7; a_wdata = 32'hAAAA_AAAA;
    b_en = 1; b_we = 1; b_addr = 8'd7; b_wdata = 32'h5555_5555; ref_mem[7] = 32'h5555_5555;
    @(negedge clk); a_en = 0; a_we = 0; b_en = 0; b_we = 0;
    // read back through both ports
    for (int i = 0; i < W; i++) begin
      @(negedge clk); a_en = 1; a_we = 0; a_addr = 8'(i); b_en = 1; b_we = 0; b_addr = 8'(W - 1 - i);
      @(posedge clk); #1;
      check(a_rdata == ref_mem[i], $sformatf("port A word %0d", i));
      check(b_rdata == ref_mem[W-1-i], $sformatf("port B word %0d", W - 1 - i));
    end
    // read data holds while the port is idle
    @(negedge clk); a_en = 0; b_en = 0;
    repeat (3) @(posedge clk);
    #1 check(a_rdata == ref_mem[W-1], "port A data not held");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
