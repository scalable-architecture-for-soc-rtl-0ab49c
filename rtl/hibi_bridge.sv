// hibi_bridge: joins two HIBI bus segments that may run on different clocks.
//
// It is two HIBI wrappers back to back. Wrapper A sits on segment A and
// accepts the address range of segment B (B_LO..B_HI); wrapper B sits on
// segment B and accepts the range of segment A. Every word, address words
// included, that one wrapper receives is pushed into the other's transmit
// FIFO of the same priority, so a transfer crosses unchanged and its address
// word leads it on the far segment. The forwarding logic runs on clk_a;
// wrapper B's FIFOs cross to clk_b. A full far-side FIFO leaves the word in
// the near receive FIFO, which then fills and makes the sender on the near
// segment retry. That a bridge made of two wrappers links segments in
// separate clock domains follows the document; the forwarding scheme is this
// design's own. Each side has its own agent number on its segment and takes
// part in that segment's arbitration like any other wrapper.
module hibi_bridge
  import hibi_pkg::*;
#(
  parameter int unsigned A_ID       = 0,
  parameter int unsigned A_N_AGENTS = 2,
  parameter int unsigned B_ID       = 0,
  parameter int unsigned B_N_AGENTS = 2,
  parameter logic [31:0] A_LO = 32'h0000_0000,  // addresses that live on segment A
  parameter logic [31:0] A_HI = 32'h7FFF_FFFF,
  parameter logic [31:0] B_LO = 32'h8000_0000,  // addresses that live on segment B
  parameter logic [31:0] B_HI = 32'hFFFF_FFFF,
  parameter int unsigned DEPTH = 8
) (
  input  logic                  rst_n,
  input  logic                  clk_a,
  input  logic                  clk_b,
  // segment A (clk_a)
  input  logic                  a_cfg_we,
  input  logic [4:0]            a_cfg_addr,
  input  logic [31:0]           a_cfg_data,
  input  hibi_drv_t             a_bus_in,
  input  logic [MAX_AGENTS-1:0] a_req_in,
  input  logic                  a_full_in,
  output hibi_drv_t             a_drv_out,
  output logic [MAX_AGENTS-1:0] a_req_out,
  output logic                  a_full_out,
  // segment B (clk_b)
  input  logic                  b_cfg_we,
  input  logic [4:0]            b_cfg_addr,
  input  logic [31:0]           b_cfg_data,
  input  hibi_drv_t             b_bus_in,
  input  logic [MAX_AGENTS-1:0] b_req_in,
  input  logic                  b_full_in,
  output hibi_drv_t             b_drv_out,
  output logic [MAX_AGENTS-1:0] b_req_out,
  output logic                  b_full_out
);
  hibi_word_t a_tx, b_tx, a_rx_hi, a_rx_lo, b_rx_hi, b_rx_lo;
  logic a_tx_hi_we, a_tx_lo_we, a_tx_hi_full, a_tx_lo_full;
  logic b_tx_hi_we, b_tx_lo_we, b_tx_hi_full, b_tx_lo_full;
  logic a_rx_hi_re, a_rx_lo_re, a_rx_hi_empty, a_rx_lo_empty;
  logic b_rx_hi_re, b_rx_lo_re, b_rx_hi_empty, b_rx_lo_empty;

  hibi_wrapper #(.AGENT_ID(A_ID), .N_AGENTS(A_N_AGENTS), .ADDR_LO(B_LO), .ADDR_HI(B_HI),
                 .TX_DEPTH(DEPTH), .RX_DEPTH(DEPTH)) u_a (
    .rst_n, .ip_clk(clk_a), .bus_clk(clk_a),
    .tx_hi_we(a_tx_hi_we), .tx_lo_we(a_tx_lo_we), .tx_word(a_tx),
    .tx_hi_full(a_tx_hi_full), .tx_lo_full(a_tx_lo_full),
    .rx_hi_re(a_rx_hi_re), .rx_lo_re(a_rx_lo_re), .rx_hi_word(a_rx_hi), .rx_lo_word(a_rx_lo),
    .rx_hi_empty(a_rx_hi_empty), .rx_lo_empty(a_rx_lo_empty),
    .cfg_we(a_cfg_we), .cfg_addr(a_cfg_addr), .cfg_data(a_cfg_data),
    .bus_in(a_bus_in), .req_in(a_req_in), .full_in(a_full_in),
    .drv_out(a_drv_out), .req_out(a_req_out), .full_out(a_full_out));

  hibi_wrapper #(.AGENT_ID(B_ID), .N_AGENTS(B_N_AGENTS), .ADDR_LO(A_LO), .ADDR_HI(A_HI),
                 .TX_DEPTH(DEPTH), .RX_DEPTH(DEPTH)) u_b (
    .rst_n, .ip_clk(clk_a), .bus_clk(clk_b),
    .tx_hi_we(b_tx_hi_we), .tx_lo_we(b_tx_lo_we), .tx_word(b_tx),
    .tx_hi_full(b_tx_hi_full), .tx_lo_full(b_tx_lo_full),
    .rx_hi_re(b_rx_hi_re), .rx_lo_re(b_rx_lo_re), .rx_hi_word(b_rx_hi), .rx_lo_word(b_rx_lo),
    .rx_hi_empty(b_rx_hi_empty), .rx_lo_empty(b_rx_lo_empty),
    .cfg_we(b_cfg_we), .cfg_addr(b_cfg_addr), .cfg_data(b_cfg_data),
    .bus_in(b_bus_in), .req_in(b_req_in), .full_in(b_full_in),
    .drv_out(b_drv_out), .req_out(b_req_out), .full_out(b_full_out));

  // A -> B: high priority first; the transmit word is shared by both FIFOs
  always_comb begin
    b_tx_hi_we = 1'b0; b_tx_lo_we = 1'b0; a_rx_hi_re = 1'b0; a_rx_lo_re = 1'b0;
    b_tx = a_rx_lo;
    if (!a_rx_hi_empty && !b_tx_hi_full) begin
      b_tx = a_rx_hi; b_tx_hi_we = 1'b1; a_rx_hi_re = 1'b1;
    end else if (!a_rx_lo_empty && !b_tx_lo_full) begin
      b_tx = a_rx_lo; b_tx_lo_we = 1'b1; a_rx_lo_re = 1'b1;
    end
  end

  // B -> A
  always_comb begin
    a_tx_hi_we = 1'b0; a_tx_lo_we = 1'b0; b_rx_hi_re = 1'b0; b_rx_lo_re = 1'b0;
    a_tx = b_rx_lo;
    if (!b_rx_hi_empty && !a_tx_hi_full) begin
      a_tx = b_rx_hi; a_tx_hi_we = 1'b1; b_rx_hi_re = 1'b1;
    end else if (!b_rx_lo_empty && !a_tx_lo_full) begin
      a_tx = b_rx_lo; a_tx_lo_we = 1'b1; b_rx_lo_re = 1'b1;
    end
  end

endmodule
