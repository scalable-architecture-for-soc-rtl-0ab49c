// proc_unit: one processing unit of the encoder, used both as the master
// module and as every slave module (they have the same internal structure).
//
// It holds everything of the unit except the processor core: the program
// memory, the dual-port data memory and the DMA/interrupt controller, joined
// by an address decoder on the processor's memory bus. The processor core's
// bus is a port of this module. Word accesses with byte enables; cpu_addr is
// a byte address, decoded on its top nibble:
//   0x0xxx_xxxx  program memory (read only; writes are ignored)
//   0x1xxx_xxxx  data memory, port A (port B belongs to the DMA controller)
//   0x2xxx_xxxx  DMA controller registers (word offset = cpu_addr[7:2])
// Every access takes one cycle; read data comes with cpu_rvalid in the next
// cycle. The HIBI side is the DMA controller's connection to a wrapper.
// The set of parts and that the DMA controller sits on the processor's data
// memory bus follow the document; the address map and bus timing are this
// design's own. Default sizes are those of a slave for QCIF with nine slaves
// in the local-memory approach.
//
// Lint note: address bits 27:16 (above the largest memory) and 1:0 (byte
// offset; byte lanes come from cpu_be) are not decoded.
module proc_unit
  import hibi_pkg::*;
#(
  parameter int unsigned DMEM_WORDS = 9728,
  parameter int unsigned PMEM_WORDS = 6250,
  parameter int unsigned N_RX_CH    = 4,
  localparam int unsigned DAW = $clog2(DMEM_WORDS),
  localparam int unsigned PAW = $clog2(PMEM_WORDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor memory bus
  input  logic              cpu_req,
  input  logic              cpu_we,
  input  logic [3:0]        cpu_be,
  input  logic [31:0]       cpu_addr,
  input  logic [31:0]       cpu_wdata,
  output logic [31:0]       cpu_rdata,
  output logic              cpu_rvalid,
  output logic              irq,
  // program load port
  input  logic              pl_we,
  input  logic [PAW-1:0]    pl_addr,
  input  logic [31:0]       pl_data,
  // HIBI wrapper IP side
  output logic              tx_hi_we,
  output logic              tx_lo_we,
  output hibi_word_t        tx_word,
  input  logic              tx_hi_full,
  input  logic              tx_lo_full,
  output logic              rx_hi_re,
  output logic              rx_lo_re,
  input  hibi_word_t        rx_hi_word,
  input  hibi_word_t        rx_lo_word,
  input  logic              rx_hi_empty,
  input  logic              rx_lo_empty
);
  typedef enum logic [1:0] {SEL_PMEM, SEL_DMEM, SEL_DMA, SEL_NONE} sel_e;

  sel_e        sel, sel_q;
  logic        rd_q;
  logic [31:0] pmem_rdata, dmem_rdata, dma_rdata, dma_rdata_q;

  always_comb begin
    unique case (cpu_addr[31:28])
      4'h0:    sel = SEL_PMEM;
      4'h1:    sel = SEL_DMEM;
      4'h2:    sel = SEL_DMA;
      default: sel = SEL_NONE;
    endcase
  end

  prog_rom #(.WORDS(PMEM_WORDS)) u_pmem (
    .clk, .en(cpu_req && !cpu_we && sel == SEL_PMEM), .addr(cpu_addr[PAW+1:2]),
    .rdata(pmem_rdata), .ld_we(pl_we), .ld_addr(pl_addr), .ld_data(pl_data));

  logic              m_en, m_we;
  logic [DAW-1:0]    m_addr;
  logic [31:0]       m_wdata, m_rdata;

  dpsram #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk,
    .a_en(cpu_req && sel == SEL_DMEM), .a_we(cpu_we), .a_be(cpu_be),
    .a_addr(cpu_addr[DAW+1:2]), .a_wdata(cpu_wdata), .a_rdata(dmem_rdata),
    .b_en(m_en), .b_we(m_we), .b_be(4'hF), .b_addr(m_addr), .b_wdata(m_wdata),
    .b_rdata(m_rdata));

  dma_ctrl #(.N_RX_CH(N_RX_CH), .MEM_AW(DAW)) u_dma (
    .clk, .rst_n,
    .reg_sel(cpu_req && sel == SEL_DMA), .reg_we(cpu_we), .reg_addr(cpu_addr[7:2]),
    .reg_wdata(cpu_wdata), .reg_rdata(dma_rdata), .irq,
    .mem_en(m_en), .mem_we(m_we), .mem_addr(m_addr), .mem_wdata(m_wdata),
    .mem_rdata(m_rdata),
    .tx_hi_we, .tx_lo_we, .tx_word, .tx_hi_full, .tx_lo_full,
    .rx_hi_re, .rx_lo_re, .rx_hi_word, .rx_lo_word, .rx_hi_empty, .rx_lo_empty);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q        <= 1'b0;
      sel_q       <= SEL_NONE;
      dma_rdata_q <= '0;
    end else begin
      rd_q        <= cpu_req && !cpu_we;
      sel_q       <= sel;
      dma_rdata_q <= dma_rdata;
    end
  end

  assign cpu_rvalid = rd_q;
  always_comb begin
    case (sel_q)
      SEL_PMEM: cpu_rdata = pmem_rdata;
      SEL_DMEM: cpu_rdata = dmem_rdata;
      SEL_DMA:  cpu_rdata = dma_rdata_q;
      default:  cpu_rdata = 32'h0;
    endcase
  end

endmodule
