// hibi_pkg: types and constants shared by the HIBI bus, its wrappers, the
// DMA controller and the I/O module.
//
// A HIBI transfer is an address word (av = 1) followed by data words, all on
// the same 32-bit data lines. The address names the receiving agent in its top
// byte and a local channel or offset in the lower 24 bits. The command says
// whether the words are written to the receiver or are a read request, and the
// priority bit selects the high- or low-priority FIFO at both ends. The 32-bit
// width follows the document; the address split, command set and signal names
// are this design's own choices.
//
// Linted on its own, the package reports AGENT_LSB, MAX_AGENTS and
// ARB_CFG_RESET as unused; the modules that import it use them.
package hibi_pkg;

  localparam int unsigned HIBI_DW    = 32;  // data width of the bus
  localparam int unsigned AGENT_LSB  = 24;  // address bits [31:24] select the agent
  localparam int unsigned MAX_AGENTS = 32;  // width of the request vector on a segment
  localparam int unsigned MAX_SLOTS  = 16;  // size of the TDMA slot table

  typedef enum logic {
    CMD_WR = 1'b0,  // write data words to the address
    CMD_RD = 1'b1   // read request: [remote addr, count, return address]
  } hibi_cmd_e;

  typedef enum logic {
    ARB_ROUND_ROBIN = 1'b0,
    ARB_PRIORITY    = 1'b1
  } arb_mode_e;

  // One word as it is stored in a wrapper FIFO and as it travels on the bus.
  typedef struct packed {
    logic              av;    // 1: address word, 0: data word
    logic              hi;    // high-priority transfer
    hibi_cmd_e         cmd;
    logic [HIBI_DW-1:0] data;
  } hibi_word_t;

  // What one wrapper drives towards its segment. Idle outputs are all zero so
  // that the segment can OR them together.
  typedef struct packed {
    logic       valid;  // a word is on the bus this cycle
    logic       lock;   // owner keeps the bus after this cycle
    hibi_word_t word;
  } hibi_drv_t;

  // Runtime arbitration parameters, identical in every wrapper of a segment.
  typedef struct packed {
    arb_mode_e                   mode;       // competition for unused slots
    logic                        tdma_en;    // use the slot table
    logic [4:0]                  slot_len;   // cycles per slot, minus one
    logic [$clog2(MAX_SLOTS)-1:0] n_slots_m1; // slots per frame, minus one
    logic [7:0]                  max_send;   // words per ownership, 0 = no limit
  } arb_cfg_t;

  localparam arb_cfg_t ARB_CFG_RESET = '{
    mode: ARB_ROUND_ROBIN, tdma_en: 1'b0, slot_len: 5'd7,
    n_slots_m1: '0, max_send: 8'd16};

endpackage
