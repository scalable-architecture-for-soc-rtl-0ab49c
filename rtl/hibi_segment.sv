// hibi_segment: the shared signals of one HIBI bus segment.
//
// Every wrapper drives all-zero outputs unless it owns the bus, so the bus is
// the OR of all wrapper outputs; the request vectors (each wrapper sets only
// its own bit) and the per-receiver full flags are ORed the same way. The
// result goes back to every wrapper in the same cycle. That a segment is a set
// of shared signals with no central arbiter follows the document; the OR-bus
// is this design's own choice. An assertion checks that at most one wrapper
// drives a word in any cycle, which the distributed arbitration must ensure.
module hibi_segment
  import hibi_pkg::*;
#(
  parameter int unsigned N_PORTS = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  hibi_drv_t             drv    [N_PORTS],
  input  logic [MAX_AGENTS-1:0] req    [N_PORTS],
  input  logic                  full   [N_PORTS],
  output hibi_drv_t             bus,
  output logic [MAX_AGENTS-1:0] req_all,
  output logic                  full_all
);
  logic [N_PORTS-1:0] drivers;

  always_comb begin
    bus      = '0;
    req_all  = '0;
    full_all = 1'b0;
    for (int p = 0; p < int'(N_PORTS); p++) begin
      bus      = bus | drv[p];
      req_all  = req_all | req[p];
      full_all = full_all | full[p];
      drivers[p] = drv[p].valid;
    end
  end

  // only one owner at a time
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(drivers))
    else $error("hibi_segment: %0d wrappers drive the bus at once", $countones(drivers));

endmodule
