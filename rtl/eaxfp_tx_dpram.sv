// eaxfp_tx_dpram: transmit buffer of one GMII lane (a "Tx_DPRAM").
//
// The write side runs on the 125 MHz GMII clock. A frame arriving on GMII
// (gmii_tx_en high, preamble and SFD included) is written, as it arrives,
// into one fixed-size slot of a dual-clock RAM in XGMII form: the first
// preamble byte becomes the /S/ start character, bytes flagged by
// gmii_tx_er become /E/, and the byte after the last one becomes /T/, with
// /I/ filling the rest of that 64-bit word. Every slot is large enough for
// a maximum-size frame (MAX_FRAME bytes plus 8 bytes of preamble/SFD), so
// any frame fits in any slot; this is the frame composition step of the
// padding added round robin (PARR) distribution. The padding itself is
// not stored: the reader sends idle for the slot words past the frame.
//
// The read side runs on the XGMII clock and is served by the frame
// multiplexer: rd_avail says a complete frame waits, rd_len is its length
// in 64-bit words, rd_widx selects a word of the head slot and rd_data
// returns it one clock later; rd_release frees the slot.
//
// Flow control: full is high (GMII clock domain) while no slot is free.
// A frame that starts while full, or grows past MAX_FRAME+8 bytes, is
// dropped whole and drop_toggle changes state once. Completed-slot and
// freed-slot counts cross the clock boundary as Gray-coded pointers.
//
// The slot count, the maximum frame size and the word format are this
// design's choices; the document gives the buffer's role (frame
// composition to the maximum 1 GbE size) and its position in front of
// the frame multiplexer.
module eaxfp_tx_dpram
  import eaxfp_pkg::*;
#(
  parameter int unsigned MAX_FRAME = 1518,
  parameter int unsigned SLOTS     = 4,
  localparam int unsigned FWORDS   = frame_words(MAX_FRAME),
  localparam int unsigned WIDX_W   = $clog2(FWORDS),
  localparam int unsigned SLOT_W   = (SLOTS > 1) ? $clog2(SLOTS) : 1,
  localparam int unsigned PTR_W    = SLOT_W + 1
) (
  // GMII side (125 MHz)
  input  logic              gmii_clk,
  input  logic              gmii_rst_n,
  input  logic [7:0]        gmii_tx_d,
  input  logic              gmii_tx_en,
  input  logic              gmii_tx_er,
  output logic              full,
  output logic              drop_toggle,
  // frame multiplexer side (XGMII clock)
  input  logic              rd_clk,
  input  logic              rd_rst_n,
  output logic              rd_avail,
  output logic [WIDX_W:0]   rd_len,
  input  logic [WIDX_W-1:0] rd_widx,
  output xgmii64_t          rd_data,
  input  logic              rd_release
);
  initial begin
    assert (SLOTS >= 1 && SLOTS <= 64 && (SLOTS & (SLOTS - 1)) == 0)
      else $error("SLOTS must be a power of two");
  end

  typedef enum logic [1:0] {W_IDLE, W_CAPTURE, W_DROP} wstate_t;

  // ---------------- write side (GMII clock) ----------------
  wstate_t           wstate;
  xgmii64_t          acc;         // word being assembled
  logic [2:0]        lane;        // next byte lane in acc
  logic [WIDX_W-1:0] widx;        // word index inside the slot
  logic [11:0]       nbytes;      // bytes stored, /S/ included
  logic [PTR_W-1:0]  wr_ptr;      // completed slots (binary)
  logic [PTR_W-1:0]  wr_ptr_gray;
  logic [PTR_W-1:0]  rd_ptr_gray_sync;
  logic [PTR_W-1:0]  rd_ptr_wsync;
  logic [WIDX_W:0]   len_mem [SLOTS];

  xgmii64_t          word_byte;   // acc with the current byte inserted
  xgmii64_t          word_term;   // acc with /T/ and /I/ filled in
  logic              ram_we;
  logic [SLOT_W+WIDX_W-1:0] ram_waddr;
  xgmii64_t          ram_wdata;

  assign rd_ptr_wsync = PTR_W'(gray2bin(8'(rd_ptr_gray_sync)));
  assign full = (PTR_W'(wr_ptr - rd_ptr_wsync) == PTR_W'(SLOTS));

  always_comb begin
    word_byte = acc;
    word_byte.d[lane*8 +: 8] = gmii_tx_er ? XGMII_ERROR : gmii_tx_d;
    word_byte.c[lane]        = gmii_tx_er;
    word_term = acc;
    for (int k = 0; k < 8; k++) begin
      if (k == int'(lane)) begin
        word_term.d[k*8 +: 8] = XGMII_TERM;
        word_term.c[k]        = 1'b1;
      end else if (k > int'(lane)) begin
        word_term.d[k*8 +: 8] = XGMII_IDLE;
        word_term.c[k]        = 1'b1;
      end
    end
  end

  always_comb begin
    ram_we    = 1'b0;
    ram_wdata = word_byte;
    ram_waddr = {wr_ptr[SLOT_W-1:0], widx};
    if (wstate == W_CAPTURE) begin
      if (!gmii_tx_en) begin
        ram_we    = 1'b1;
        ram_wdata = word_term;
      end else if (lane == 3'd7 && nbytes < 12'(8 + MAX_FRAME)) begin
        ram_we    = 1'b1;
      end
    end
  end

  always_ff @(posedge gmii_clk or negedge gmii_rst_n) begin
    if (!gmii_rst_n) begin
      wstate      <= W_IDLE;
      acc         <= XGMII64_IDLE;
      lane        <= '0;
      widx        <= '0;
      nbytes      <= '0;
      wr_ptr      <= '0;
      wr_ptr_gray <= '0;
      drop_toggle <= 1'b0;
      for (int s = 0; s < SLOTS; s++) len_mem[s] <= '0;
    end else begin
      unique case (wstate)
        W_IDLE: if (gmii_tx_en) begin
          if (full) begin
            wstate      <= W_DROP;
            drop_toggle <= ~drop_toggle;
          end else begin
            wstate   <= W_CAPTURE;
            acc      <= XGMII64_IDLE;
            acc.d[7:0] <= XGMII_START;
            acc.c[0] <= 1'b1;
            lane     <= 3'd1;
            widx     <= '0;
            nbytes   <= 12'd1;
          end
        end
        W_CAPTURE: begin
          if (!gmii_tx_en) begin
            // frame complete: commit the slot
            len_mem[wr_ptr[SLOT_W-1:0]] <= (WIDX_W+1)'(widx) + 1'b1;
            wr_ptr      <= wr_ptr + 1'b1;
            wr_ptr_gray <= PTR_W'(bin2gray(8'(PTR_W'(wr_ptr + 1'b1))));
            wstate      <= W_IDLE;
          end else if (nbytes >= 12'(8 + MAX_FRAME)) begin
            // oversize frame: abandon the slot
            wstate      <= W_DROP;
            drop_toggle <= ~drop_toggle;
          end else begin
            nbytes <= nbytes + 1'b1;
            lane   <= lane + 1'b1;
            if (lane == 3'd7) begin
              widx <= widx + 1'b1;
              acc  <= XGMII64_IDLE;
            end else begin
              acc  <= word_byte;
            end
          end
        end
        W_DROP: if (!gmii_tx_en) wstate <= W_IDLE;
        default: wstate <= W_IDLE;
      endcase
    end
  end

  // ---------------- read side (XGMII clock) ----------------
  logic [PTR_W-1:0] rd_ptr;
  logic [PTR_W-1:0] rd_ptr_gray;
  logic [PTR_W-1:0] wr_ptr_gray_sync;
  logic [PTR_W-1:0] wr_ptr_rsync;

  assign wr_ptr_rsync = PTR_W'(gray2bin(8'(wr_ptr_gray_sync)));
  assign rd_avail     = (wr_ptr_rsync != rd_ptr);
  assign rd_len       = len_mem[rd_ptr[SLOT_W-1:0]];

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rd_ptr      <= '0;
      rd_ptr_gray <= '0;
    end else if (rd_release && rd_avail) begin
      rd_ptr      <= rd_ptr + 1'b1;
      rd_ptr_gray <= PTR_W'(bin2gray(8'(PTR_W'(rd_ptr + 1'b1))));
    end
  end

  eaxfp_sync #(.WIDTH(PTR_W)) u_sync_wr (
    .dst_clk(rd_clk), .dst_rst_n(rd_rst_n), .d(wr_ptr_gray), .q(wr_ptr_gray_sync));
  eaxfp_sync #(.WIDTH(PTR_W)) u_sync_rd (
    .dst_clk(gmii_clk), .dst_rst_n(gmii_rst_n), .d(rd_ptr_gray), .q(rd_ptr_gray_sync));

  eaxfp_dpram #(.WIDTH($bits(xgmii64_t)), .DEPTH(SLOTS * (1 << WIDX_W))) u_ram (
    .wr_clk (gmii_clk),
    .wr_en  (ram_we),
    .wr_addr(ram_waddr),
    .wr_data(ram_wdata),
    .rd_clk (rd_clk),
    .rd_addr({rd_ptr[SLOT_W-1:0], rd_widx}),
    .rd_data(rd_data)
  );
endmodule
