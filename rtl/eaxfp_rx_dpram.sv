// eaxfp_rx_dpram: receive buffer of one GMII lane (an "Rx_DPRAM").
//
// The write side runs on the XGMII clock and is filled by the frame
// inverse multiplexer: whole frames in XGMII form (64-bit words, /S/ on
// lane 0 of the first word), one frame per fixed-size slot of a
// dual-clock RAM. wr_free is high while a slot is free; wr_commit hands a
// written slot over together with its length in bytes.
//
// The read side runs on the 125 MHz GMII clock and sends the stored
// frames out on GMII one byte per clock: the /S/ character is turned back
// into a preamble byte (0x55), the other bytes are sent as stored, and a
// byte that is an XGMII control character inside the frame (/E/) is sent
// with gmii_rx_er high. Between two frames gmii_rx_dv stays low for at
// least IPG+1 clocks. Slot counts cross the clock boundary as Gray-coded
// pointers.
//
// Timing: the first byte of a frame leaves two GMII clocks after the slot
// is seen complete; outputs are registered. The slot count and the IPG
// are this design's choices; the document gives the buffer's position
// between the frame inverse multiplexer and the GMII receive lane.
module eaxfp_rx_dpram
  import eaxfp_pkg::*;
#(
  parameter int unsigned MAX_FRAME = 1518,
  parameter int unsigned SLOTS     = 4,
  parameter int unsigned IPG       = 12,
  localparam int unsigned FWORDS   = frame_words(MAX_FRAME),
  localparam int unsigned WIDX_W   = $clog2(FWORDS),
  localparam int unsigned LEN_W    = WIDX_W + 3,
  localparam int unsigned SLOT_W   = (SLOTS > 1) ? $clog2(SLOTS) : 1,
  localparam int unsigned PTR_W    = SLOT_W + 1
) (
  // frame inverse multiplexer side (XGMII clock)
  input  logic              wr_clk,
  input  logic              wr_rst_n,
  output logic              wr_free,
  input  logic              wr_en,
  input  logic [WIDX_W-1:0] wr_widx,
  input  xgmii64_t          wr_data,
  input  logic              wr_commit,
  input  logic [LEN_W-1:0]  wr_len,
  // GMII side (125 MHz)
  input  logic              gmii_clk,
  input  logic              gmii_rst_n,
  output logic [7:0]        gmii_rx_d,
  output logic              gmii_rx_dv,
  output logic              gmii_rx_er
);
  initial begin
    assert (SLOTS >= 1 && SLOTS <= 64 && (SLOTS & (SLOTS - 1)) == 0)
      else $error("SLOTS must be a power of two");
  end

  // ---------------- write side (XGMII clock) ----------------
  logic [PTR_W-1:0] wr_ptr, wr_ptr_gray, rd_ptr_gray_sync, rd_ptr_wsync;
  logic [LEN_W-1:0] len_mem [SLOTS];

  assign rd_ptr_wsync = PTR_W'(gray2bin(8'(rd_ptr_gray_sync)));
  assign wr_free      = (PTR_W'(wr_ptr - rd_ptr_wsync) != PTR_W'(SLOTS));

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wr_ptr      <= '0;
      wr_ptr_gray <= '0;
      for (int s = 0; s < SLOTS; s++) len_mem[s] <= '0;
    end else if (wr_commit) begin
      len_mem[wr_ptr[SLOT_W-1:0]] <= wr_len;
      wr_ptr      <= wr_ptr + 1'b1;
      wr_ptr_gray <= PTR_W'(bin2gray(8'(PTR_W'(wr_ptr + 1'b1))));
    end
  end

  a_commit_free: assert property (@(posedge wr_clk) disable iff (!wr_rst_n)
    wr_commit |-> wr_free);

  // ---------------- read side (GMII clock) ----------------
  typedef enum logic [1:0] {R_IDLE, R_LOAD, R_SEND} rstate_t;

  rstate_t           rstate;
  logic [PTR_W-1:0]  rd_ptr, rd_ptr_gray, wr_ptr_gray_sync, wr_ptr_rsync;
  logic [WIDX_W-1:0] word_ptr;
  logic [LEN_W-1:0]  bidx, flen;
  logic [4:0]        ipg_cnt;
  xgmii64_t          cur_word, rd_q;
  logic              avail;
  logic [7:0]        byte_d;
  logic              byte_c;

  assign wr_ptr_rsync = PTR_W'(gray2bin(8'(wr_ptr_gray_sync)));
  assign avail        = (wr_ptr_rsync != rd_ptr);
  assign byte_d       = cur_word.d[bidx[2:0]*8 +: 8];
  assign byte_c       = cur_word.c[bidx[2:0]];

  always_ff @(posedge gmii_clk or negedge gmii_rst_n) begin
    if (!gmii_rst_n) begin
      rstate      <= R_IDLE;
      rd_ptr      <= '0;
      rd_ptr_gray <= '0;
      word_ptr    <= '0;
      bidx        <= '0;
      flen        <= '0;
      ipg_cnt     <= 5'(IPG);
      cur_word    <= XGMII64_IDLE;
      gmii_rx_d   <= '0;
      gmii_rx_dv  <= 1'b0;
      gmii_rx_er  <= 1'b0;
    end else begin
      gmii_rx_dv <= 1'b0;
      gmii_rx_er <= 1'b0;
      gmii_rx_d  <= '0;
      unique case (rstate)
        R_IDLE: begin
          word_ptr <= '0;
          if (ipg_cnt < 5'(IPG)) ipg_cnt <= ipg_cnt + 1'b1;
          else if (avail)        rstate  <= R_LOAD;
        end
        R_LOAD: begin
          cur_word <= rd_q;
          word_ptr <= WIDX_W'(1);
          bidx     <= '0;
          flen     <= len_mem[rd_ptr[SLOT_W-1:0]];
          rstate   <= R_SEND;
        end
        R_SEND: begin
          gmii_rx_dv <= 1'b1;
          if (bidx == '0) begin
            gmii_rx_d <= GMII_PREAMBLE;           // /S/ back to preamble
          end else begin
            gmii_rx_d  <= byte_d;
            gmii_rx_er <= byte_c;
          end
          if (bidx[2:0] == 3'd7) begin
            cur_word <= rd_q;
            word_ptr <= word_ptr + 1'b1;
          end
          bidx <= bidx + 1'b1;
          if (bidx == flen - 1'b1) begin
            rd_ptr      <= rd_ptr + 1'b1;
            rd_ptr_gray <= PTR_W'(bin2gray(8'(PTR_W'(rd_ptr + 1'b1))));
            ipg_cnt     <= '0;
            rstate      <= R_IDLE;
          end
        end
        default: rstate <= R_IDLE;
      endcase
    end
  end

  eaxfp_sync #(.WIDTH(PTR_W)) u_sync_wr (
    .dst_clk(gmii_clk), .dst_rst_n(gmii_rst_n), .d(wr_ptr_gray), .q(wr_ptr_gray_sync));
  eaxfp_sync #(.WIDTH(PTR_W)) u_sync_rd (
    .dst_clk(wr_clk), .dst_rst_n(wr_rst_n), .d(rd_ptr_gray), .q(rd_ptr_gray_sync));

  eaxfp_dpram #(.WIDTH($bits(xgmii64_t)), .DEPTH(SLOTS * (1 << WIDX_W))) u_ram (
    .wr_clk (wr_clk),
    .wr_en  (wr_en),
    .wr_addr({wr_ptr[SLOT_W-1:0], wr_widx}),
    .wr_data(wr_data),
    .rd_clk (gmii_clk),
    .rd_addr({rd_ptr[SLOT_W-1:0], word_ptr}),
    .rd_data(rd_q)
  );
endmodule
