// dpsram: dual-port data memory of a processing unit.
//
// Port A belongs to the processor, port B to the DMA controller; both are
// 32 bits wide with byte write enables and run on the same clock. A read
// returns its word one cycle later on rdata, which then holds until the next
// read on that port, so a port can wait before using the word. Writes to the
// same word from both ports in one cycle resolve in favour of port B. The
// dual-port data memory (DPSRAM) follows the document; the word width, byte
// enables, latency and collision rule are this design's own choices. The
// default depth holds the slave data memory of the local-memory approach for
// QCIF with nine slaves (about 38.7 kB, see the sizing in the README).
module dpsram #(
  parameter int unsigned WORDS = 9728,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  // port A
  input  logic          a_en,
  input  logic          a_we,
  input  logic [3:0]    a_be,
  input  logic [AW-1:0] a_addr,
  input  logic [31:0]   a_wdata,
  output logic [31:0]   a_rdata,
  // port B
  input  logic          b_en,
  input  logic          b_we,
  input  logic [3:0]    b_be,
  input  logic [AW-1:0] b_addr,
  input  logic [31:0]   b_wdata,
  output logic [31:0]   b_rdata
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (a_en && a_we && 32'(a_addr) < WORDS)
      for (int b = 0; b < 4; b++)
        if (a_be[b] && !(b_en && b_we && b_be[b] && b_addr == a_addr))
          mem[a_addr][8*b +: 8] <= a_wdata[8*b +: 8];
    if (b_en && b_we && 32'(b_addr) < WORDS)
      for (int b = 0; b < 4; b++)
        if (b_be[b]) mem[b_addr][8*b +: 8] <= b_wdata[8*b +: 8];
  end

  always_ff @(posedge clk) begin
    if (a_en && !a_we) a_rdata <= (32'(a_addr) < WORDS) ? mem[a_addr] : 32'h0;
    if (b_en && !b_we) b_rdata <= (32'(b_addr) < WORDS) ? mem[b_addr] : 32'h0;
  end

endmodule
