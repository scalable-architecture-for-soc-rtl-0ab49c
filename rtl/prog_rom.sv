// prog_rom: local program memory of a processing unit.
//
// The processor reads it through a single read port with one cycle of
// latency, like the data memory. Its contents are the encoder program, which
// is not part of this design, so the memory has a load port through which the
// program image is written at boot; the processor itself cannot write it. In
// the encoder all slaves share one load port and so hold identical copies,
// which is the single-program, multiple-data arrangement of the document.
// Sizes follow the document: 10 kB for the master, 25 kB for a slave; the
// default is the slave's 6250 words. The load port is this design's choice.
module prog_rom #(
  parameter int unsigned WORDS = 6250,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  // processor read port
  input  logic          en,
  input  logic [AW-1:0] addr,
  output logic [31:0]   rdata,
  // boot load port
  input  logic          ld_we,
  input  logic [AW-1:0] ld_addr,
  input  logic [31:0]   ld_data
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (ld_we && 32'(ld_addr) < WORDS) mem[ld_addr] <= ld_data;
    if (en) rdata <= (32'(addr) < WORDS) ? mem[addr] : 32'h0;
  end

endmodule
