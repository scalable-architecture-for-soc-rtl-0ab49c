// tb_hibi_segment: self-checking test of the bus segment. Random cycles in
// which one wrapper (or none) drives a word, with random request and full
// bits from every port; the bus, the request vector and the full flag must
// be the OR of all ports, computed here independently.
module tb_hibi_segment;
  import hibi_pkg::*;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  hibi_drv_t drv[N];
  logic [MAX_AGENTS-1:0] req[N];
  logic full[N];
  hibi_drv_t bus;
  logic [MAX_AGENTS-1:0] req_all;
  logic full_all;
  int checks = 0, failures = 0;

  hibi_segment #(.N_PORTS(N)) dut (.*);

  initial begin
    for (int p = 0; p < N; p++) begin drv[p] = '0; req[p] = '0; full[p] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 500; k++) begin
      int owner;
      hibi_drv_t exp_bus;
      logic [MAX_AGENTS-1:0] exp_req;
      logic exp_full;
      @(negedge clk);
      owner = $urandom_range(N);       // N means nobody drives
      exp_bus = '0; exp_req = '0; exp_full = 0;
      for (int p = 0; p < N; p++) begin
        drv[p] = '0;
        if (p == owner) begin
          drv[p].valid = 1; drv[p].lock = 1'($urandom);
          drv[p].word.av = 1'($urandom); drv[p].word.hi = 1'($urandom);
          drv[p].word.data = $urandom;
          exp_bus = drv[p];
        end
        req[p] = '0;
        req[p][p] = 1'($urandom);
        exp_req[p] = req[p][p];
        full[p] = ($urandom_range(7) == 0);
        exp_full |= full[p];
      end
      #1;
      checks++;
      if (bus !== exp_bus || req_all !== exp_req || full_all !== exp_full) begin
        failures++;
        $display("FAIL: cycle %0d bus %h/%h req %h/%h full %0d/%0d", k, bus, exp_bus,
                 req_all, exp_req, full_all, exp_full);
      end
    end
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
