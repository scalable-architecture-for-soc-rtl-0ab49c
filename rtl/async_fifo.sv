// async_fifo: first-word-fall-through FIFO between two clock domains.
//
// The write and read pointers are kept in binary and in Gray code; each side
// sees the other's Gray pointer through a two-flop synchronizer, so full and
// empty are conservative and never wrong. The head word is visible on rdata
// whenever empty is low, and re pops it. DEPTH must be a power of two. The
// read side also reports how many words it can see (rcount). Used by the HIBI
// wrapper to cross between the IP clock and the bus clock, as the wrapper in
// the document supports several clock domains; the structure is this design's
// own choice. Reset is asynchronous and clears both sides.
module async_fifo #(
  parameter int unsigned WIDTH = 35,
  parameter int unsigned DEPTH = 8
) (
  input  logic             rst_n,
  // write side
  input  logic             wclk,
  input  logic             we,
  input  logic [WIDTH-1:0] wdata,
  output logic             full,
  // read side
  input  logic             rclk,
  input  logic             re,
  output logic [WIDTH-1:0] rdata,
  output logic             empty,
  output logic [$clog2(DEPTH):0] rcount
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;  // read pointer seen in write domain
  logic [AW:0] wgray_r1, wgray_r2;  // write pointer seen in read domain
  logic [AW:0] wbin_next, rbin_next, wbin_r;

  logic [AW:0] wgray_next, rgray_next;


  // write side
  assign wbin_next = wbin + {{AW{1'b0}}, 1'b1};
  assign wgray_next = wbin_next ^ (wbin_next >> 1);
  assign full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  always_ff @(posedge wclk or negedge rst_n) begin
    if (!rst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray; rgray_w2 <= rgray_w1;
      if (we && !full) begin
        wbin  <= wbin_next;
        wgray <= wgray_next;
      end
    end
  end

  always_ff @(posedge wclk) begin
    if (we && !full) mem[wbin[AW-1:0]] <= wdata;
  end

  // read side
  assign rbin_next = rbin + {{AW{1'b0}}, 1'b1};
  assign rgray_next = rbin_next ^ (rbin_next >> 1);
  assign empty  = (rgray == wgray_r2);
  always_comb begin
    for (int i = 0; i <= int'(AW); i++) wbin_r[i] = ^(wgray_r2 >> i);
  end
  assign rcount = wbin_r - rbin;
  assign rdata  = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk or negedge rst_n) begin
    if (!rst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray; wgray_r2 <= wgray_r1;
      if (re && !empty) begin
        rbin  <= rbin_next;
        rgray <= rgray_next;
      end
    end
  end

  initial assert (DEPTH >= 4 && (1 << AW) == DEPTH)
    else $error("async_fifo: DEPTH must be a power of two, at least 4");

endmodule
