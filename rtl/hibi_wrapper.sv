// hibi_wrapper: connects one IP block to a HIBI bus segment.
//
// The IP side has two transmit and two receive FIFOs, one pair for
// high-priority and one for low-priority transfers. The FIFOs cross from the
// IP clock to the bus clock, so every IP block and every segment may run at
// its own frequency. A transfer is an address word followed by data words.
//
// Arbitration is distributed: there is no central arbiter. Every wrapper on a
// segment holds the same runtime configuration (written through the cfg port
// at the same time in all of them), the same TDMA slot counter and the same
// round-robin pointer, and sees the same request vector and lock signal. From
// these each wrapper works out on its own which agent gets the bus next, and
// only the winner starts driving. Two levels, as in the document: first the
// TDMA slot table gives the owner of the current slot the bus whenever it has
// data; slots whose owner has nothing to send, and all time when TDMA is off,
// go to competition, either round-robin or fixed priority (lower agent number
// wins).
//
// Timing, all on bus_clk: the owner drives drv_out combinationally from the
// head of the selected FIFO; a receiver that cannot store the word raises
// full in the same cycle and the owner simply drives the word again later.
// lock stays high while the owner keeps the bus; the cycle in which it is low
// carries the owner's last word and is also the arbitration cycle, so a new
// owner drives in the very next cycle. An owner gives up the bus when its
// queue runs dry, when it has sent max_send words, or when the next cycle
// belongs to another agent's TDMA slot and that agent is requesting. When a
// transfer resumes after losing the bus, the wrapper sends its address word
// again first. Address matching uses the inclusive range ADDR_LO..ADDR_HI.
//
// The FIFO-based interface, two priorities with parallel FIFOs, multiple
// clock domains, TDMA plus round-robin or priority competition and runtime
// configuration follow the document. Signal encoding, the OR-bus, the full
// retry, the cfg register map and the release rules are this design's own.
//
// cfg port (bus_clk): address 0 = arb_cfg_t, addresses 16..31 = slot owner
// of slots 0..15. A cfg write also restarts the TDMA frame.
//
// Lint notes: cfg_data bits above the arb_cfg_t fields are ignored, the
// agent loop index uses only its low bits, and when ADDR_LO is 0 the lower
// bound of the address compare is always true (UNSIGNED/CMPCONST). None of
// these changes the circuit.
module hibi_wrapper
  import hibi_pkg::*;
#(
  parameter int unsigned AGENT_ID = 0,
  parameter int unsigned N_AGENTS = 4,
  parameter logic [31:0] ADDR_LO  = 32'(AGENT_ID) << AGENT_LSB,
  parameter logic [31:0] ADDR_HI  = ADDR_LO | ((32'd1 << AGENT_LSB) - 32'd1),
  parameter int unsigned TX_DEPTH = 8,
  parameter int unsigned RX_DEPTH = 8
) (
  input  logic                  rst_n,
  input  logic                  ip_clk,
  input  logic                  bus_clk,
  // IP side, ip_clk
  input  logic                  tx_hi_we,
  input  logic                  tx_lo_we,
  input  hibi_word_t            tx_word,
  output logic                  tx_hi_full,
  output logic                  tx_lo_full,
  input  logic                  rx_hi_re,
  input  logic                  rx_lo_re,
  output hibi_word_t            rx_hi_word,
  output hibi_word_t            rx_lo_word,
  output logic                  rx_hi_empty,
  output logic                  rx_lo_empty,
  // runtime configuration, bus_clk
  input  logic                  cfg_we,
  input  logic [4:0]            cfg_addr,
  input  logic [31:0]           cfg_data,
  // segment side, bus_clk
  input  hibi_drv_t             bus_in,
  input  logic [MAX_AGENTS-1:0] req_in,
  input  logic                  full_in,
  output hibi_drv_t             drv_out,
  output logic [MAX_AGENTS-1:0] req_out,
  output logic                  full_out
);
  localparam int unsigned SW  = $clog2(MAX_SLOTS);
  localparam int unsigned TCW = $clog2(TX_DEPTH) + 1;
  localparam int unsigned RCW = $clog2(RX_DEPTH) + 1;
  localparam int unsigned IDW = $clog2(MAX_AGENTS);
  localparam int unsigned WW  = $bits(hibi_word_t);

  initial assert (N_AGENTS <= MAX_AGENTS && AGENT_ID < N_AGENTS)
    else $error("hibi_wrapper: AGENT_ID/N_AGENTS out of range");

  // ---------------------------------------------------------------- FIFOs
  hibi_word_t txq_head [2];   // index 1 = high priority, 0 = low
  logic       txq_empty[2];
  logic       txq_pop  [2];
  logic [TCW-1:0] txq_cnt[2];
  logic [RCW-1:0] rxq_unused[2];
  logic       rxq_full [2];
  logic       rxq_push [2];
  hibi_word_t rx_in_word;

  async_fifo #(.WIDTH(WW), .DEPTH(TX_DEPTH)) u_tx_lo (
    .rst_n, .wclk(ip_clk), .we(tx_lo_we), .wdata(tx_word), .full(tx_lo_full),
    .rclk(bus_clk), .re(txq_pop[0]), .rdata(txq_head[0]), .empty(txq_empty[0]),
    .rcount(txq_cnt[0]));
  async_fifo #(.WIDTH(WW), .DEPTH(TX_DEPTH)) u_tx_hi (
    .rst_n, .wclk(ip_clk), .we(tx_hi_we), .wdata(tx_word), .full(tx_hi_full),
    .rclk(bus_clk), .re(txq_pop[1]), .rdata(txq_head[1]), .empty(txq_empty[1]),
    .rcount(txq_cnt[1]));
  async_fifo #(.WIDTH(WW), .DEPTH(RX_DEPTH)) u_rx_lo (
    .rst_n, .wclk(bus_clk), .we(rxq_push[0]), .wdata(rx_in_word), .full(rxq_full[0]),
    .rclk(ip_clk), .re(rx_lo_re), .rdata(rx_lo_word), .empty(rx_lo_empty),
    .rcount(rxq_unused[0]));
  async_fifo #(.WIDTH(WW), .DEPTH(RX_DEPTH)) u_rx_hi (
    .rst_n, .wclk(bus_clk), .we(rxq_push[1]), .wdata(rx_in_word), .full(rxq_full[1]),
    .rclk(ip_clk), .re(rx_hi_re), .rdata(rx_hi_word), .empty(rx_hi_empty),
    .rcount(rxq_unused[1]));

  // -------------------------------------------------------- configuration
  arb_cfg_t         cfg;
  logic [IDW-1:0]   slot_owner [MAX_SLOTS];
  logic [4:0]       slot_cyc;
  logic [SW-1:0]    slot_idx;
  logic [SW-1:0]    slot_idx_next;

  always_ff @(posedge bus_clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg <= ARB_CFG_RESET;
      for (int s = 0; s < int'(MAX_SLOTS); s++) slot_owner[s] <= IDW'(s % int'(N_AGENTS));
    end else if (cfg_we) begin
      if (cfg_addr == 5'd0) cfg <= arb_cfg_t'(cfg_data[$bits(arb_cfg_t)-1:0]);
      else if (cfg_addr[4]) slot_owner[cfg_addr[SW-1:0]] <= cfg_data[IDW-1:0];
    end
  end

  // TDMA frame counter, identical in every wrapper of the segment
  always_ff @(posedge bus_clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_cyc <= '0;
      slot_idx <= '0;
    end else if (cfg_we) begin
      slot_cyc <= '0;
      slot_idx <= '0;
    end else if (slot_cyc == cfg.slot_len) begin
      slot_cyc <= '0;
      slot_idx <= slot_idx_next;
    end else begin
      slot_cyc <= slot_cyc + 5'd1;
    end
  end

  always_comb begin
    slot_idx_next = slot_idx;
    if (slot_cyc == cfg.slot_len)
      slot_idx_next = (slot_idx >= cfg.n_slots_m1) ? '0 : slot_idx + SW'(1);
  end

  // owner of the slot that the next cycle belongs to
  logic [IDW-1:0] owner_next;
  assign owner_next = slot_owner[slot_idx_next];

  // ------------------------------------------------------------ arbitration
  logic [IDW-1:0] rr_last;     // last competition winner, same in all wrappers
  logic [IDW-1:0] winner;
  logic           any_req;

  always_comb begin
    logic found;
    int   a;
    a       = 0;
    winner  = rr_last;
    found   = 1'b0;
    any_req = |req_in[N_AGENTS-1:0];
    if (cfg.tdma_en && req_in[owner_next]) begin
      winner = owner_next;
      found  = 1'b1;
    end else if (cfg.mode == ARB_PRIORITY) begin
      for (int p = int'(N_AGENTS) - 1; p >= 0; p--)
        if (req_in[p]) begin
          winner = IDW'(p);
          found  = 1'b1;
        end
    end else begin
      for (int k = 1; k <= int'(N_AGENTS); k++) begin
        a = (int'(rr_last) + k) % int'(N_AGENTS);
        if (!found && req_in[a]) begin
          winner = IDW'(a);
          found  = 1'b1;
        end
      end
    end
    if (!found) winner = rr_last;
  end

  logic arb_cycle;           // bus free after this cycle
  assign arb_cycle = !bus_in.lock;

  always_ff @(posedge bus_clk or negedge rst_n) begin
    if (!rst_n) rr_last <= IDW'(N_AGENTS - 1);
    else if (arb_cycle && any_req) rr_last <= winner;
  end

  // ------------------------------------------------------------- transmit
  logic        own;          // this wrapper drives the bus this cycle
  logic        q;            // queue being sent: 1 high, 0 low
  logic        ins_addr;     // resend the saved address before the head
  hibi_word_t  saved_addr [2];
  logic [7:0]  sent;
  logic        cur_empty, last_word, preempt, accepted;
  hibi_word_t  cur_word;

  assign cur_empty = txq_empty[q];
  assign cur_word  = ins_addr ? saved_addr[q] : txq_head[q];
  assign preempt   = cfg.tdma_en && (owner_next != IDW'(AGENT_ID)) && req_in[owner_next];
  assign last_word = preempt
                  || (cfg.max_send != 8'd0 && sent == cfg.max_send - 8'd1)
                  || (!ins_addr && txq_cnt[q] <= TCW'(1));

  always_comb begin
    drv_out = '0;
    if (own && !cur_empty) begin
      drv_out.valid = 1'b1;
      drv_out.lock  = !last_word;
      drv_out.word  = cur_word;
      drv_out.word.hi = q;
    end
  end

  assign accepted = drv_out.valid && !full_in;

  always_comb begin
    txq_pop[0] = 1'b0;
    txq_pop[1] = 1'b0;
    if (accepted && !ins_addr) txq_pop[q] = 1'b1;
  end

  always_comb begin
    req_out = '0;
    req_out[AGENT_ID] = !txq_empty[0] || !txq_empty[1];
  end

  logic       q_new;
  assign q_new = !txq_empty[1];

  always_ff @(posedge bus_clk or negedge rst_n) begin
    if (!rst_n) begin
      own        <= 1'b0;
      q          <= 1'b0;
      ins_addr   <= 1'b0;
      sent       <= '0;
      saved_addr[0] <= '0;
      saved_addr[1] <= '0;
    end else begin
      if (accepted && cur_word.av) saved_addr[q] <= cur_word;
      if (own) begin
        if (accepted) begin
          sent     <= sent + 8'd1;
          ins_addr <= 1'b0;
        end
        if (!drv_out.lock) own <= 1'b0;
      end
      // arbitration: every wrapper computes the same winner
      if (arb_cycle && any_req && winner == IDW'(AGENT_ID)) begin
        own      <= 1'b1;
        sent     <= '0;
        q        <= q_new;
        ins_addr <= !txq_head[q_new].av;
      end
    end
  end

  // -------------------------------------------------------------- receive
  logic sel;                 // the running transfer is addressed to us
  logic hit;
  logic addr_match;

  assign addr_match = bus_in.word.data >= ADDR_LO && bus_in.word.data <= ADDR_HI;
  assign hit        = bus_in.valid && (bus_in.word.av ? addr_match : sel);
  assign rx_in_word = bus_in.word;
  assign full_out   = hit && rxq_full[bus_in.word.hi];
  assign rxq_push[0] = hit && !bus_in.word.hi && !rxq_full[0];
  assign rxq_push[1] = hit &&  bus_in.word.hi && !rxq_full[1];

  always_ff @(posedge bus_clk or negedge rst_n) begin
    if (!rst_n) sel <= 1'b0;
    else if (bus_in.valid && bus_in.word.av) sel <= addr_match;
  end

endmodule
