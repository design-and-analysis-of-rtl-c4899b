// eaxfp_loopback: loop back function block.
//
// Chooses the source of the receive path. With loop_en low the frame
// inverse multiplexer is fed from the XGMII receive input (line); with
// loop_en high it is fed from the framer's own XGMII transmit stream, so
// frames sent on the ten GMII transmit lanes come back on the GMII
// receive lanes without a PHY. The transmit output is not affected. A
// change of loop_en takes effect only in an idle column pair, so the
// receive path never sees half of a frame; an idle word is inserted
// while the switch happens. Output is registered: one clock latency.
//
// The document names the block and places it between the transmit and
// receive XGMII interfaces; the switch-at-idle rule is this design's.
module eaxfp_loopback
  import eaxfp_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     loop_en,
  input  xgmii64_t line_word,
  input  xgmii64_t tx_word,
  output xgmii64_t rx_word,
  output logic     looped      // selection in force
);
  logic     in_frame;  // the selected source is inside a frame
  xgmii64_t sel_word;
  logic     has_start, has_term;

  assign sel_word  = looped ? tx_word : line_word;
  assign has_start = sel_word.c[0] && sel_word.d[7:0] == XGMII_START;

  always_comb begin
    has_term = 1'b0;
    for (int k = 0; k < 8; k++)
      if (sel_word.c[k] && sel_word.d[k*8 +: 8] == XGMII_TERM) has_term = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      looped   <= 1'b0;
      in_frame <= 1'b0;
      rx_word  <= XGMII64_IDLE;
    end else begin
      if (!in_frame && !has_start && loop_en != looped) begin
        looped  <= loop_en;
        rx_word <= XGMII64_IDLE;
      end else begin
        rx_word <= sel_word;
        if (has_start && !has_term) in_frame <= 1'b1;
        else if (has_term)          in_frame <= 1'b0;
      end
    end
  end
endmodule
