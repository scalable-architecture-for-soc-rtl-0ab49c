// dma_ctrl: DMA and interrupt controller that adapts a processor's data bus
// to a HIBI wrapper.
//
// The processor programs it through memory-mapped registers and then goes on
// computing while the transfers run in the background. It has one transmit
// engine and N_RX_CH receive channels that can all be active at once:
//  * Transmit: a block (or a single word, length 1) is read from the local
//    data memory and sent as a HIBI write to TX_DST, on the high- or
//    low-priority FIFO. With the read-request bit set, it instead sends a
//    read request to TX_DST carrying [TX_MEM, TX_LEN, TX_RET]: the remote
//    DMA controller returns TX_LEN words from its memory at TX_MEM as a write
//    to TX_RET, which should be one of our own receive channels.
//  * Receive: incoming write data whose address has channel number c in its
//    low byte is stored at RXc_MEM, RXc_MEM+1, ... until RXc_LEN words have
//    arrived; then the channel disables itself and raises its status bit.
//    Data for a channel that is not enabled waits in the wrapper FIFO, which
//    fills and makes the sender retry: a receiver is never overrun.
//  * Remote reads: an incoming read request is served by the transmit engine
//    without the processor, ahead of the processor's next job. This is what
//    lets slaves use the master's data memory as their shared memory.
// The high-priority receive FIFO is always served first.
//
// Registers (word offsets, 32 bits):
//   0 TX_MEM   1 TX_LEN   2 TX_DST   3 TX_RET
//   4 TX_CTRL  write: bit0 start, bit1 high priority, bit2 read request;
//              read: bit0 busy
//   5 STATUS   bits [N_RX_CH-1:0] channel done, bit 8 transmit done,
//              bit 9 remote read served; write 1 to clear
//   6 IRQ_MASK irq = |(STATUS & IRQ_MASK)
//   8+4c RXc_MEM  9+4c RXc_LEN  10+4c RXc_CTRL (bit0 enable)  11+4c RXc_CNT (read)
// Register reads are answered combinationally; the processing unit registers
// them. The memory port has one cycle of read latency; receive writes take it
// first and the transmit engine waits. A transmitted word needs at least two
// cycles.
//
// That the adapter contains a DMA and an interrupt controller behind memory
// mapped registers, supports single and block writes and reads, several
// simultaneous transfers and prioritized transfers over the wrapper's
// parallel FIFOs follows the document. The register map, the read-request
// format, channel addressing and the serving of remote reads are this
// design's own.
module dma_ctrl
  import hibi_pkg::*;
#(
  parameter int unsigned N_RX_CH = 4,
  parameter int unsigned MEM_AW  = 14
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor register port
  input  logic              reg_sel,
  input  logic              reg_we,
  input  logic [5:0]        reg_addr,
  input  logic [31:0]       reg_wdata,
  output logic [31:0]       reg_rdata,
  output logic              irq,
  // data memory port
  output logic              mem_en,
  output logic              mem_we,
  output logic [MEM_AW-1:0] mem_addr,
  output logic [31:0]       mem_wdata,
  input  logic [31:0]       mem_rdata,
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
  localparam int unsigned CW = (N_RX_CH > 1) ? $clog2(N_RX_CH) : 1;

  initial assert (N_RX_CH >= 1 && N_RX_CH <= 8)
    else $error("dma_ctrl: N_RX_CH must be 1..8");

  // ------------------------------------------------------------ registers
  logic [31:0] tx_mem_r, tx_len_r, tx_dst_r, tx_ret_r;
  logic        tx_hi_r, tx_rd_r, tx_start_pend;
  logic [15:0] status, irq_mask;
  logic [31:0] rx_mem [N_RX_CH];
  logic [31:0] rx_len [N_RX_CH];
  logic [31:0] rx_cnt [N_RX_CH];
  logic        rx_en  [N_RX_CH];

  // events from the engines
  logic        ev_tx_done, ev_srv_done, ev_job_taken;
  logic [N_RX_CH-1:0] ev_ch_done;
  logic        rx_wr_fire;
  logic [CW-1:0] rx_wr_ch;
  logic        tx_busy;

  logic        wr;
  logic [5:0]  ra;
  assign wr = reg_sel && reg_we;
  assign ra = reg_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_mem_r <= '0; tx_len_r <= '0; tx_dst_r <= '0; tx_ret_r <= '0;
      tx_hi_r <= 1'b0; tx_rd_r <= 1'b0; tx_start_pend <= 1'b0;
      status <= '0; irq_mask <= '0;
      for (int c = 0; c < int'(N_RX_CH); c++) begin
        rx_mem[c] <= '0; rx_len[c] <= '0; rx_cnt[c] <= '0; rx_en[c] <= 1'b0;
      end
    end else begin
      if (ev_job_taken) tx_start_pend <= 1'b0;
      if (wr) begin
        case (ra)
          6'd0: tx_mem_r <= reg_wdata;
          6'd1: tx_len_r <= reg_wdata;
          6'd2: tx_dst_r <= reg_wdata;
          6'd3: tx_ret_r <= reg_wdata;
          6'd4: if (reg_wdata[0]) begin
                  tx_start_pend <= 1'b1;
                  tx_hi_r       <= reg_wdata[1];
                  tx_rd_r       <= reg_wdata[2];
                end
          6'd6: irq_mask <= reg_wdata[15:0];
          default: ;
        endcase
      end
      // status: set by events, cleared by writing ones
      status <= (status & ~((wr && ra == 6'd5) ? reg_wdata[15:0] : 16'h0))
              | 16'(ev_ch_done) | (ev_tx_done ? 16'h0100 : 16'h0)
              | (ev_srv_done ? 16'h0200 : 16'h0);
      for (int c = 0; c < int'(N_RX_CH); c++) begin
        if (wr && ra == 6'(8 + 4*c))  rx_mem[c] <= reg_wdata;
        if (wr && ra == 6'(9 + 4*c))  rx_len[c] <= reg_wdata;
        if (wr && ra == 6'(10 + 4*c)) begin
          rx_en[c]  <= reg_wdata[0];
          rx_cnt[c] <= '0;
        end
        if (rx_wr_fire && rx_wr_ch == CW'(c)) begin
          rx_cnt[c] <= rx_cnt[c] + 32'd1;
          if (rx_cnt[c] + 32'd1 >= rx_len[c]) rx_en[c] <= 1'b0;
        end
      end
    end
  end

  always_comb begin
    reg_rdata = '0;
    case (ra)
      6'd0: reg_rdata = tx_mem_r;
      6'd1: reg_rdata = tx_len_r;
      6'd2: reg_rdata = tx_dst_r;
      6'd3: reg_rdata = tx_ret_r;
      6'd4: reg_rdata = {31'h0, tx_busy || tx_start_pend};
      6'd5: reg_rdata = {16'h0, status};
      6'd6: reg_rdata = {16'h0, irq_mask};
      default: ;
    endcase
    for (int c = 0; c < int'(N_RX_CH); c++) begin
      if (ra == 6'(8 + 4*c))  reg_rdata = rx_mem[c];
      if (ra == 6'(9 + 4*c))  reg_rdata = rx_len[c];
      if (ra == 6'(10 + 4*c)) reg_rdata = {31'h0, rx_en[c]};
      if (ra == 6'(11 + 4*c)) reg_rdata = rx_cnt[c];
    end
  end

  assign irq = |(status & irq_mask);

  // --------------------------------------------------------- receive side
  // per-queue context of the running transfer (index 1 = high priority)
  logic [31:0] ctx_addr [2];
  hibi_cmd_e   ctx_cmd  [2];
  logic [1:0]  rq_idx   [2];
  // one pending remote read request
  logic        srv_pend;
  logic [31:0] srv_mem, srv_len, srv_ret;
  logic        srv_taken;

  hibi_word_t  head [2];
  logic        qempty [2];
  logic        can [2];
  logic        rq;          // queue served this cycle
  logic        rx_pop;
  logic [7:0]  hd_ch [2];

  assign head[0] = rx_lo_word;   assign qempty[0] = rx_lo_empty;
  assign head[1] = rx_hi_word;   assign qempty[1] = rx_hi_empty;

  always_comb begin
    for (int i = 0; i < 2; i++) begin
      hd_ch[i] = ctx_addr[i][7:0];
      if (qempty[i])            can[i] = 1'b0;
      else if (head[i].av)      can[i] = 1'b1;
      else if (ctx_cmd[i] == CMD_RD)
        can[i] = !srv_pend;
      else if (32'(hd_ch[i]) >= N_RX_CH)
        can[i] = 1'b1;                      // unknown channel: word dropped
      else
        can[i] = rx_en[hd_ch[i][CW-1:0]];
    end
    rq     = can[1] ? 1'b1 : 1'b0;
    rx_pop = can[1] || can[0];
    rx_hi_re = rx_pop &&  rq;
    rx_lo_re = rx_pop && !rq;
    rx_wr_fire = rx_pop && !head[rq].av && ctx_cmd[rq] == CMD_WR
              && 32'(hd_ch[rq]) < N_RX_CH;
    rx_wr_ch   = hd_ch[rq][CW-1:0];
    ev_ch_done = '0;
    if (rx_wr_fire && rx_cnt[rx_wr_ch] + 32'd1 >= rx_len[rx_wr_ch])
      ev_ch_done[rx_wr_ch] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctx_addr <= '{default: '0};
      ctx_cmd  <= '{default: CMD_WR};
      rq_idx   <= '{default: '0};
      srv_pend <= 1'b0;
      srv_mem <= '0; srv_len <= '0; srv_ret <= '0;
    end else begin
      if (srv_taken) srv_pend <= 1'b0;
      if (rx_pop) begin
        if (head[rq].av) begin
          ctx_addr[rq] <= head[rq].data;
          ctx_cmd[rq]  <= head[rq].cmd;
          rq_idx[rq]   <= '0;
        end else if (ctx_cmd[rq] == CMD_RD) begin
          case (rq_idx[rq])
            2'd0: srv_mem <= head[rq].data;
            2'd1: srv_len <= head[rq].data;
            default: begin
              srv_ret  <= head[rq].data;
              srv_pend <= 1'b1;
            end
          endcase
          rq_idx[rq] <= (rq_idx[rq] == 2'd2) ? 2'd0 : rq_idx[rq] + 2'd1;
        end
      end
    end
  end

  // -------------------------------------------------------- transmit side
  typedef enum logic [2:0] {TX_IDLE, TX_ADDR, TX_REQ, TX_ISSUE, TX_DATA, TX_DONE} tx_state_e;
  tx_state_e   st;
  logic [31:0] j_mem, j_len, j_dst, j_ret;
  logic        j_hi, j_rd, j_srv;
  logic [1:0]  j_idx;
  logic        q_full;

  assign q_full  = j_hi ? tx_hi_full : tx_lo_full;
  assign tx_busy = (st != TX_IDLE);
  assign srv_taken    = (st == TX_IDLE) && srv_pend;
  assign ev_job_taken = (st == TX_IDLE) && !srv_pend && tx_start_pend;

  always_comb begin
    tx_word  = '0;
    tx_hi_we = 1'b0;
    tx_lo_we = 1'b0;
    case (st)
      TX_ADDR: begin
        tx_word.av   = 1'b1;
        tx_word.cmd  = j_rd ? CMD_RD : CMD_WR;
        tx_word.data = j_dst;
      end
      TX_REQ: begin
        tx_word.cmd  = CMD_RD;
        tx_word.data = (j_idx == 2'd0) ? j_mem : (j_idx == 2'd1) ? j_len : j_ret;
      end
      TX_DATA: tx_word.data = mem_rdata;
      default: ;
    endcase
    tx_word.hi = j_hi;
    if ((st == TX_ADDR || st == TX_REQ || st == TX_DATA) && !q_full) begin
      tx_hi_we = j_hi;
      tx_lo_we = !j_hi;
    end
  end

  // memory port: receive writes first, transmit reads otherwise
  always_comb begin
    mem_en    = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = '0;
    mem_wdata = head[rq].data;
    if (rx_wr_fire) begin
      mem_en   = 1'b1;
      mem_we   = 1'b1;
      mem_addr = MEM_AW'(rx_mem[rx_wr_ch] + rx_cnt[rx_wr_ch]);
    end else if (st == TX_ISSUE) begin
      mem_en   = 1'b1;
      mem_addr = MEM_AW'(j_mem);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= TX_IDLE;
      j_mem <= '0; j_len <= '0; j_dst <= '0; j_ret <= '0;
      j_hi <= 1'b0; j_rd <= 1'b0; j_srv <= 1'b0; j_idx <= '0;
    end else begin
      case (st)
        TX_IDLE: begin
          if (srv_pend) begin
            j_mem <= srv_mem; j_len <= srv_len; j_dst <= srv_ret; j_ret <= '0;
            j_hi <= 1'b0; j_rd <= 1'b0; j_srv <= 1'b1;
            st <= TX_ADDR;
          end else if (tx_start_pend) begin
            j_mem <= tx_mem_r; j_len <= tx_len_r; j_dst <= tx_dst_r; j_ret <= tx_ret_r;
            j_hi <= tx_hi_r; j_rd <= tx_rd_r; j_srv <= 1'b0;
            st <= TX_ADDR;
          end
        end
        TX_ADDR: if (!q_full) begin
          j_idx <= '0;
          st <= j_rd ? TX_REQ : (j_len == 0 ? TX_DONE : TX_ISSUE);
        end
        TX_REQ: if (!q_full) begin
          j_idx <= j_idx + 2'd1;
          if (j_idx == 2'd2) st <= TX_DONE;
        end
        TX_ISSUE: if (!rx_wr_fire) st <= TX_DATA;
        TX_DATA: if (!q_full) begin
          j_mem <= j_mem + 32'd1;
          j_len <= j_len - 32'd1;
          st <= (j_len == 32'd1) ? TX_DONE : TX_ISSUE;
        end
        default: st <= TX_IDLE;   // TX_DONE
      endcase
    end
  end

  assign ev_tx_done  = (st == TX_DONE) && !j_srv;
  assign ev_srv_done = (st == TX_DONE) &&  j_srv;

endmodule
