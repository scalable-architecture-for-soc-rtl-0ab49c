// video_encoder_top: scalable master-slave video encoder SoC.
//
// A frame is cut into slices of whole macroblock rows; each of N_SLAVES
// identical slave processing units encodes one slice with the same program
// (single program, multiple data), while a master processing unit stores the
// frames, hands out the slices, collects and merges the slaves' bitstreams
// and runs the global rate control. An I/O module brings raw video in and
// takes the compressed stream out. All of them hang, each behind its own
// HIBI wrapper, on one 32-bit HIBI bus segment with distributed arbitration.
//
// Agents on the segment (the agent number is also the top byte of every
// HIBI address of that unit):
//   0            master processing unit (its data memory also serves as the
//                slaves' shared memory through remote reads)
//   1            I/O module
//   2..N_SLAVES+1 slave processing units 1..N_SLAVES
//
// The processor cores (one per processing unit) are not part of this RTL:
// each unit's memory bus, interrupt and program-load port are ports of the
// top. All slaves share one program-load port, so they always hold the same
// program. The HIBI arbitration configuration is written to every wrapper at
// once through the hibi_cfg port. The processors and the DMA controllers run
// on ip_clk, the bus segment on bus_clk; the two may be unrelated.
//
// The structure (master, slaves, I/O module, wrappers, one bus, 32-bit HIBI,
// memories per unit) follows the document. Default sizes: nine slaves (the
// largest configuration evaluated for QCIF), slave data memory 9728 words
// and master data memory 23040 words (local-memory approach, QCIF, nine
// slaves), program memories 25 kB and 10 kB. FIFO depths and the number of
// DMA receive channels are this design's own choices.
//
// Lint note: rst_n is reported as used both synchronously and
// asynchronously. The synchronous use is the disable condition of the
// segment's one-driver assertion, which is not part of the circuit.
module video_encoder_top
  import hibi_pkg::*;
#(
  parameter int unsigned N_SLAVES          = 9,
  parameter int unsigned MASTER_DMEM_WORDS = 23040,
  parameter int unsigned SLAVE_DMEM_WORDS  = 9728,
  parameter int unsigned MASTER_PMEM_WORDS = 2500,
  parameter int unsigned SLAVE_PMEM_WORDS  = 6250,
  parameter int unsigned N_RX_CH           = 4,
  parameter int unsigned FIFO_DEPTH        = 8,
  localparam int unsigned MPAW = $clog2(MASTER_PMEM_WORDS),
  localparam int unsigned SPAW = $clog2(SLAVE_PMEM_WORDS)
) (
  input  logic        rst_n,
  input  logic        ip_clk,
  input  logic        bus_clk,
  // HIBI arbitration configuration, broadcast to every wrapper (bus_clk)
  input  logic        hibi_cfg_we,
  input  logic [4:0]  hibi_cfg_addr,
  input  logic [31:0] hibi_cfg_data,
  // master processor memory bus
  input  logic        m_cpu_req,
  input  logic        m_cpu_we,
  input  logic [3:0]  m_cpu_be,
  input  logic [31:0] m_cpu_addr,
  input  logic [31:0] m_cpu_wdata,
  output logic [31:0] m_cpu_rdata,
  output logic        m_cpu_rvalid,
  output logic        m_irq,
  input  logic            m_pl_we,
  input  logic [MPAW-1:0] m_pl_addr,
  input  logic [31:0]     m_pl_data,
  // slave processor memory buses
  input  logic        s_cpu_req   [N_SLAVES],
  input  logic        s_cpu_we    [N_SLAVES],
  input  logic [3:0]  s_cpu_be    [N_SLAVES],
  input  logic [31:0] s_cpu_addr  [N_SLAVES],
  input  logic [31:0] s_cpu_wdata [N_SLAVES],
  output logic [31:0] s_cpu_rdata [N_SLAVES],
  output logic        s_cpu_rvalid[N_SLAVES],
  output logic        s_irq       [N_SLAVES],
  // one program-load port for all slaves
  input  logic            s_pl_we,
  input  logic [SPAW-1:0] s_pl_addr,
  input  logic [31:0]     s_pl_data,
  // I/O module: raw video in, compressed stream out
  input  logic [31:0] io_in_dst,
  input  logic        cam_valid,
  input  logic        cam_sof,
  input  logic [7:0]  cam_data,
  output logic        cam_ready,
  output logic        bs_valid,
  output logic [7:0]  bs_data,
  input  logic        bs_ready
);
  localparam int unsigned N_AG = N_SLAVES + 2;

  initial assert (N_SLAVES >= 1 && N_AG <= MAX_AGENTS)
    else $error("video_encoder_top: N_SLAVES out of range");

  // wrapper IP-side signals per agent
  logic       tx_hi_we [N_AG], tx_lo_we [N_AG], tx_hi_full[N_AG], tx_lo_full[N_AG];
  hibi_word_t tx_word  [N_AG], rx_hi_word[N_AG], rx_lo_word[N_AG];
  logic       rx_hi_re [N_AG], rx_lo_re [N_AG], rx_hi_empty[N_AG], rx_lo_empty[N_AG];
  // segment signals
  hibi_drv_t             drv  [N_AG];
  logic [MAX_AGENTS-1:0] req  [N_AG];
  logic                  full [N_AG];
  hibi_drv_t             bus;
  logic [MAX_AGENTS-1:0] req_all;
  logic                  full_all;

  hibi_segment #(.N_PORTS(N_AG)) u_seg (
    .clk(bus_clk), .rst_n, .drv, .req, .full, .bus, .req_all, .full_all);

  for (genvar g = 0; g < int'(N_AG); g++) begin : g_wrap
    hibi_wrapper #(.AGENT_ID(g), .N_AGENTS(N_AG),
                   .TX_DEPTH(FIFO_DEPTH), .RX_DEPTH(FIFO_DEPTH)) u_wrap (
      .rst_n, .ip_clk, .bus_clk,
      .tx_hi_we(tx_hi_we[g]), .tx_lo_we(tx_lo_we[g]), .tx_word(tx_word[g]),
      .tx_hi_full(tx_hi_full[g]), .tx_lo_full(tx_lo_full[g]),
      .rx_hi_re(rx_hi_re[g]), .rx_lo_re(rx_lo_re[g]),
      .rx_hi_word(rx_hi_word[g]), .rx_lo_word(rx_lo_word[g]),
      .rx_hi_empty(rx_hi_empty[g]), .rx_lo_empty(rx_lo_empty[g]),
      .cfg_we(hibi_cfg_we), .cfg_addr(hibi_cfg_addr), .cfg_data(hibi_cfg_data),
      .bus_in(bus), .req_in(req_all), .full_in(full_all),
      .drv_out(drv[g]), .req_out(req[g]), .full_out(full[g]));
  end

  // master processing unit, agent 0
  proc_unit #(.DMEM_WORDS(MASTER_DMEM_WORDS), .PMEM_WORDS(MASTER_PMEM_WORDS),
              .N_RX_CH(N_RX_CH)) u_master (
    .clk(ip_clk), .rst_n,
    .cpu_req(m_cpu_req), .cpu_we(m_cpu_we), .cpu_be(m_cpu_be), .cpu_addr(m_cpu_addr),
    .cpu_wdata(m_cpu_wdata), .cpu_rdata(m_cpu_rdata), .cpu_rvalid(m_cpu_rvalid),
    .irq(m_irq), .pl_we(m_pl_we), .pl_addr(m_pl_addr), .pl_data(m_pl_data),
    .tx_hi_we(tx_hi_we[0]), .tx_lo_we(tx_lo_we[0]), .tx_word(tx_word[0]),
    .tx_hi_full(tx_hi_full[0]), .tx_lo_full(tx_lo_full[0]),
    .rx_hi_re(rx_hi_re[0]), .rx_lo_re(rx_lo_re[0]),
    .rx_hi_word(rx_hi_word[0]), .rx_lo_word(rx_lo_word[0]),
    .rx_hi_empty(rx_hi_empty[0]), .rx_lo_empty(rx_lo_empty[0]));

  // I/O module, agent 1
  io_module u_io (
    .clk(ip_clk), .rst_n, .in_dst(io_in_dst),
    .cam_valid, .cam_sof, .cam_data, .cam_ready, .bs_valid, .bs_data, .bs_ready,
    .tx_hi_we(tx_hi_we[1]), .tx_lo_we(tx_lo_we[1]), .tx_word(tx_word[1]),
    .tx_hi_full(tx_hi_full[1]), .tx_lo_full(tx_lo_full[1]),
    .rx_hi_re(rx_hi_re[1]), .rx_lo_re(rx_lo_re[1]),
    .rx_hi_word(rx_hi_word[1]), .rx_lo_word(rx_lo_word[1]),
    .rx_hi_empty(rx_hi_empty[1]), .rx_lo_empty(rx_lo_empty[1]));

  // slave processing units, agents 2..N_SLAVES+1
  for (genvar s = 0; s < int'(N_SLAVES); s++) begin : g_slave
    localparam int unsigned A = s + 2;
    proc_unit #(.DMEM_WORDS(SLAVE_DMEM_WORDS), .PMEM_WORDS(SLAVE_PMEM_WORDS),
                .N_RX_CH(N_RX_CH)) u_slave (
      .clk(ip_clk), .rst_n,
      .cpu_req(s_cpu_req[s]), .cpu_we(s_cpu_we[s]), .cpu_be(s_cpu_be[s]),
      .cpu_addr(s_cpu_addr[s]), .cpu_wdata(s_cpu_wdata[s]), .cpu_rdata(s_cpu_rdata[s]),
      .cpu_rvalid(s_cpu_rvalid[s]), .irq(s_irq[s]),
      .pl_we(s_pl_we), .pl_addr(s_pl_addr), .pl_data(s_pl_data),
      .tx_hi_we(tx_hi_we[A]), .tx_lo_we(tx_lo_we[A]), .tx_word(tx_word[A]),
      .tx_hi_full(tx_hi_full[A]), .tx_lo_full(tx_lo_full[A]),
      .rx_hi_re(rx_hi_re[A]), .rx_lo_re(rx_lo_re[A]),
      .rx_hi_word(rx_hi_word[A]), .rx_lo_word(rx_lo_word[A]),
      .rx_hi_empty(rx_hi_empty[A]), .rx_lo_empty(rx_lo_empty[A]));
  end

endmodule
