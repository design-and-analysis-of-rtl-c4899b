// eaxfp_framer: Ethernet aggregation to XGMII framer (EAXFP), top level.
//
// Joins ten 1 Gb/s GMII lanes (8 bits at 125 MHz, coming from three
// network processors) into one 10 Gb/s XGMII (32 bits DDR at 156.25 MHz)
// and splits the XGMII back into the ten lanes, so that the processors
// together appear as one 10 GbE port.
//
// Transmit: each GMII lane writes its frames into its own Tx_DPRAM
// (eaxfp_tx_dpram), one frame per fixed-size slot. The frame multiplexer
// (eaxfp_frame_mux) visits the lanes in a fixed cyclic order and sends
// the head frame of each lane that has one, padded with idle to a fixed
// slot length (the padding added round robin, PARR, distribution). The
// 64-bit stream leaves through the DDR output stage (eaxfp_tx_ddr).
//
// Receive: the DDR input stage (eaxfp_rx_ddr) builds 64-bit words and
// aligns frame starts; the loop back block (eaxfp_loopback) may replace
// this stream by the local transmit stream; the frame inverse
// multiplexer (eaxfp_frame_inv_mux) hands successive frames to the ten
// Rx_DPRAMs (eaxfp_rx_dpram) in cyclic order, and each of those sends
// its frames out on its GMII receive lane.
//
// The processor interface (eaxfp_cpu_if), on the XGMII clock, holds the
// loopback and enable bits, the per-lane enables used at a link change,
// and per-lane counters. gmii_tx_full is the per-lane flow control
// output: while high, a new frame on that lane would be dropped.
//
// Clocks: gmii_clk (all ten lanes) and xgmii_clk, each with its own
// active-low reset, asynchronous assertion, released synchronously to
// its clock by the user. The XGMII transmit data is aligned to the edges
// of xgmii_clk (lanes 0-3 while it is high, 4-7 while low); the receive
// data is sampled on the rising edge (lanes 0-3) and the following
// falling edge (lanes 4-7).
//
// The block partition, lane count, clock rates and bus widths are the
// document's; buffer sizes, slot length, encodings and the register map
// are this design's.
module eaxfp_framer
  import eaxfp_pkg::*;
#(
  parameter int unsigned LANES      = 10,
  parameter int unsigned MAX_FRAME  = 1518,
  parameter int unsigned SLOT_WORDS = 192,
  parameter int unsigned TX_SLOTS   = 4,
  parameter int unsigned RX_SLOTS   = 4,
  parameter int unsigned GMII_IPG   = 12
) (
  input  logic             gmii_clk,
  input  logic             gmii_rst_n,
  input  logic             xgmii_clk,
  input  logic             xgmii_rst_n,
  // ten GMII transmit lanes (from the network processors)
  input  logic [7:0]       gmii_tx_d  [LANES],
  input  logic [LANES-1:0] gmii_tx_en,
  input  logic [LANES-1:0] gmii_tx_er,
  output logic [LANES-1:0] gmii_tx_full,
  // ten GMII receive lanes (to the network processors)
  output logic [7:0]       gmii_rx_d  [LANES],
  output logic [LANES-1:0] gmii_rx_dv,
  output logic [LANES-1:0] gmii_rx_er,
  // XGMII
  output logic [31:0]      xgmii_txd,
  output logic [3:0]       xgmii_txc,
  input  logic [31:0]      xgmii_rxd,
  input  logic [3:0]       xgmii_rxc,
  // line card processor bus
  input  logic             cpu_req,
  input  logic             cpu_we,
  input  logic [7:0]       cpu_addr,
  input  logic [31:0]      cpu_wdata,
  output logic [31:0]      cpu_rdata,
  output logic             cpu_ack
);
  localparam int unsigned FWORDS = frame_words(MAX_FRAME);
  localparam int unsigned WIDX_W = $clog2(FWORDS);
  localparam int unsigned LEN_W  = WIDX_W + 3;

  // control
  logic             loop_en, tx_enable, rx_enable, looped, rx_shifted;
  logic [LANES-1:0] tx_lane_en, rx_lane_en;

  // transmit path
  logic [LANES-1:0]  tx_avail, tx_release, tx_slot, tx_drop_toggle;
  logic [WIDX_W:0]   tx_len  [LANES];
  xgmii64_t          tx_rdata[LANES];
  logic [WIDX_W-1:0] tx_widx;
  xgmii64_t          tx_word;

  // receive path
  xgmii64_t          line_word, rx_word, rx_wdata;
  logic [LANES-1:0]  rx_free, rx_wen, rx_commit;
  logic [WIDX_W-1:0] rx_widx;
  logic [LEN_W-1:0]  rx_len;
  logic              rx_drop, rx_err;

  for (genvar i = 0; i < LANES; i++) begin : g_lane
    eaxfp_tx_dpram #(.MAX_FRAME(MAX_FRAME), .SLOTS(TX_SLOTS)) u_tx_dpram (
      .gmii_clk   (gmii_clk),
      .gmii_rst_n (gmii_rst_n),
      .gmii_tx_d  (gmii_tx_d[i]),
      .gmii_tx_en (gmii_tx_en[i]),
      .gmii_tx_er (gmii_tx_er[i]),
      .full       (gmii_tx_full[i]),
      .drop_toggle(tx_drop_toggle[i]),
      .rd_clk     (xgmii_clk),
      .rd_rst_n   (xgmii_rst_n),
      .rd_avail   (tx_avail[i]),
      .rd_len     (tx_len[i]),
      .rd_widx    (tx_widx),
      .rd_data    (tx_rdata[i]),
      .rd_release (tx_release[i])
    );

    eaxfp_rx_dpram #(.MAX_FRAME(MAX_FRAME), .SLOTS(RX_SLOTS), .IPG(GMII_IPG)) u_rx_dpram (
      .wr_clk    (xgmii_clk),
      .wr_rst_n  (xgmii_rst_n),
      .wr_free   (rx_free[i]),
      .wr_en     (rx_wen[i]),
      .wr_widx   (rx_widx),
      .wr_data   (rx_wdata),
      .wr_commit (rx_commit[i]),
      .wr_len    (rx_len),
      .gmii_clk  (gmii_clk),
      .gmii_rst_n(gmii_rst_n),
      .gmii_rx_d (gmii_rx_d[i]),
      .gmii_rx_dv(gmii_rx_dv[i]),
      .gmii_rx_er(gmii_rx_er[i])
    );
  end

  eaxfp_frame_mux #(.LANES(LANES), .MAX_FRAME(MAX_FRAME), .SLOT_WORDS(SLOT_WORDS)) u_frame_mux (
    .clk         (xgmii_clk),
    .rst_n       (xgmii_rst_n),
    .enable      (tx_enable),
    .lane_en     (tx_lane_en),
    .avail       (tx_avail),
    .len         (tx_len),
    .rd_data     (tx_rdata),
    .rd_widx     (tx_widx),
    .release_slot(tx_release),
    .tx_word     (tx_word),
    .slot_start  (tx_slot)
  );

  eaxfp_tx_ddr u_tx_ddr (
    .clk      (xgmii_clk),
    .rst_n    (xgmii_rst_n),
    .tx_word  (tx_word),
    .xgmii_txd(xgmii_txd),
    .xgmii_txc(xgmii_txc)
  );

  eaxfp_rx_ddr u_rx_ddr (
    .clk      (xgmii_clk),
    .rst_n    (xgmii_rst_n),
    .xgmii_rxd(xgmii_rxd),
    .xgmii_rxc(xgmii_rxc),
    .rx_word  (line_word),
    .shifted  (rx_shifted)
  );

  eaxfp_loopback u_loopback (
    .clk      (xgmii_clk),
    .rst_n    (xgmii_rst_n),
    .loop_en  (loop_en),
    .line_word(line_word),
    .tx_word  (tx_word),
    .rx_word  (rx_word),
    .looped   (looped)
  );

  eaxfp_frame_inv_mux #(.LANES(LANES), .MAX_FRAME(MAX_FRAME)) u_frame_inv_mux (
    .clk    (xgmii_clk),
    .rst_n  (xgmii_rst_n),
    .enable (rx_enable),
    .lane_en(rx_lane_en),
    .rx_word(rx_word),
    .wr_free(rx_free),
    .wr_en  (rx_wen),
    .wr_widx(rx_widx),
    .wr_data(rx_wdata),
    .commit (rx_commit),
    .wr_len (rx_len),
    .drop   (rx_drop),
    .err    (rx_err)
  );

  eaxfp_cpu_if #(.LANES(LANES)) u_cpu_if (
    .clk           (xgmii_clk),
    .rst_n         (xgmii_rst_n),
    .cpu_req       (cpu_req),
    .cpu_we        (cpu_we),
    .cpu_addr      (cpu_addr),
    .cpu_wdata     (cpu_wdata),
    .cpu_rdata     (cpu_rdata),
    .cpu_ack       (cpu_ack),
    .loop_en       (loop_en),
    .tx_enable     (tx_enable),
    .rx_enable     (rx_enable),
    .tx_lane_en    (tx_lane_en),
    .rx_lane_en    (rx_lane_en),
    .tx_slot       (tx_slot),
    .rx_commit     (rx_commit),
    .rx_drop       (rx_drop),
    .rx_err        (rx_err),
    .tx_drop_toggle(tx_drop_toggle),
    .tx_full       (gmii_tx_full),
    .rx_shifted    (rx_shifted),
    .looped        (looped)
  );
endmodule
