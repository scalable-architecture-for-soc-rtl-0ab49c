// tb_prog_rom: self-checking test of the program memory. Loads an image
// through the load port (word i = a hash of i), then reads it back through
// the processor port with one cycle of latency, in random order.
module tb_prog_rom;
  localparam int W = 100;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en = 0, ld_we = 0;
  logic [6:0] addr = 0, ld_addr = 0;
  logic [31:0] rdata, ld_data = 0;
  int checks = 0, failures = 0;

  prog_rom #(.WORDS(W)) dut (.*);

  function automatic logic [31:0] img(input int i);
    return 32'(i) * 32'h9E37_79B9 ^ 32'h1234_5678;
  endfunction

  initial begin
    for (int i = 0; i < W; i++) begin
      @(negedge clk); ld_we = 1; ld_addr = 7'(i); ld_data = img(i);
    end
    @(negedge clk); ld_we = 0;
    for (int k = 0; k < 300; k++) begin
      int i;
      i = $urandom_range(W - 1);
      @(negedge clk); en = 1; addr = 7'(i);
      @(posedge clk); #1;
      checks++;
      if (rdata !== img(i)) begin
        failures++;
        $display("FAIL: word %0d = %h, expected %h", i, rdata, img(i));
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
