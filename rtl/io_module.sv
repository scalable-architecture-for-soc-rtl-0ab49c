// io_module: connects the encoder to the outside world over HIBI.
//
// Input side: a camera-style byte stream of raw YUV video (cam_valid /
// cam_ready handshake, cam_sof on the first byte of a frame) is packed four
// bytes to a word, first byte in bits [7:0], and written over HIBI to the
// address in_dst, normally a receive channel of the master's DMA controller.
// At the first byte of every frame an address word is sent first. Frames are
// taken to be a whole number of words long (QCIF 4:2:0 is 38016 bytes).
// Output side: data words written to this agent (the compressed bitstream
// merged by the master) are unpacked into bytes, [7:0] first, on bs_valid /
// bs_ready. Address words and read requests addressed to it are dropped.
// Transmission uses the low-priority FIFO. That the I/O module takes raw
// video in and sends the compressed stream out, and that it talks to the
// master over HIBI, follows the document; the stream interfaces and packing
// are this design's own.
//
// Lint note: the hi bit of a received word is not used, since both receive
// FIFOs are drained the same way.
module io_module
  import hibi_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] in_dst,
  // raw video in
  input  logic        cam_valid,
  input  logic        cam_sof,
  input  logic [7:0]  cam_data,
  output logic        cam_ready,
  // compressed stream out
  output logic        bs_valid,
  output logic [7:0]  bs_data,
  input  logic        bs_ready,
  // HIBI wrapper IP side
  output logic        tx_hi_we,
  output logic        tx_lo_we,
  output hibi_word_t  tx_word,
  input  logic        tx_hi_full,
  input  logic        tx_lo_full,
  output logic        rx_hi_re,
  output logic        rx_lo_re,
  input  hibi_word_t  rx_hi_word,
  input  hibi_word_t  rx_lo_word,
  input  logic        rx_hi_empty,
  input  logic        rx_lo_empty
);
  // ---------------------------------------------------------------- input
  logic        addr_done;   // address word of the current frame sent
  logic        send_addr;
  logic [1:0]  nbytes;
  logic [23:0] pack;
  logic        take;

  assign send_addr = cam_valid && cam_sof && !addr_done;
  assign cam_ready = !tx_lo_full && !send_addr;
  assign take      = cam_valid && cam_ready;

  always_comb begin
    tx_word  = '0;
    tx_hi_we = 1'b0;
    tx_lo_we = 1'b0;
    if (send_addr) begin
      tx_word.av   = 1'b1;
      tx_word.cmd  = CMD_WR;
      tx_word.data = in_dst;
      tx_lo_we     = !tx_lo_full;
    end else if (take && !cam_sof && nbytes == 2'd3) begin
      tx_word.data = {cam_data, pack};
      tx_lo_we     = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_done <= 1'b0;
      nbytes    <= '0;
      pack      <= '0;
    end else begin
      if (send_addr && !tx_lo_full) addr_done <= 1'b1;
      if (take) begin
        if (!cam_sof) addr_done <= 1'b0;
        // a start of frame restarts the packing
        if (cam_sof) begin
          nbytes <= 2'd1;
          pack   <= {16'h0, cam_data};
        end else begin
          nbytes <= nbytes + 2'd1;
          pack[8*nbytes +: 8] <= cam_data;
        end
      end
    end
  end

  // --------------------------------------------------------------- output
  logic [31:0] obuf;
  logic [2:0]  oleft;       // bytes left in obuf
  logic        use_hi;
  hibi_word_t  rhead;

  assign use_hi = !rx_hi_empty;
  assign rhead  = use_hi ? rx_hi_word : rx_lo_word;
  // load a new word when the buffer is empty or its last byte leaves now
  logic load_ok;
  assign load_ok = (oleft == 3'd0) || (oleft == 3'd1 && bs_ready);
  always_comb begin
    rx_hi_re = 1'b0;
    rx_lo_re = 1'b0;
    if (!rx_hi_empty || !rx_lo_empty) begin
      // drop address words and read requests at once, data words when room
      if (rhead.av || rhead.cmd == CMD_RD || load_ok) begin
        rx_hi_re = use_hi;
        rx_lo_re = !use_hi;
      end
    end
  end

  logic load;
  assign load = (rx_hi_re || rx_lo_re) && !rhead.av && rhead.cmd == CMD_WR;
  assign bs_valid = (oleft != 3'd0);
  assign bs_data  = obuf[7:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      obuf  <= '0;
      oleft <= '0;
    end else if (load) begin
      obuf  <= rhead.data;
      oleft <= 3'd4;
    end else if (bs_valid && bs_ready) begin
      obuf  <= {8'h0, obuf[31:8]};
      oleft <= oleft - 3'd1;
    end
  end

  // the high-priority transmit FIFO is not used
  logic unused;
  assign unused = tx_hi_full;

endmodule
