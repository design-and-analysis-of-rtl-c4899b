// eaxfp_tx_ddr: XGMII transmit DDR output stage ("Tx_DDR Interface").
//
// Takes one internal 64-bit XGMII word (eight byte lanes with control
// flags) per rising edge of the 156.25 MHz clock and drives it onto the
// 32-bit XGMII as two transfers: byte lanes 0-3 while the clock is high,
// lanes 4-7 while it is low. It is the usual output-DDR structure: one
// flop per half on the rising edge, a falling-edge flop that re-times
// the upper half, and a multiplexer selected by the clock. The clock
// select is intended; in an FPGA this maps onto the I/O DDR output cell.
// The 90-degree clock shift that centres the data on the forwarded clock
// belongs to the clocking outside this module.
//
// Latency: the lower half of a word is on xgmii_txd during the high phase
// after the rising edge that samples it, the upper half during the
// following low phase. Reset drives idle. The document gives the block
// name, the 32-bit width and the 156.25 MHz DDR rate; the structure is
// this design's.
module eaxfp_tx_ddr
  import eaxfp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  xgmii64_t    tx_word,
  output logic [31:0] xgmii_txd,
  output logic [3:0]  xgmii_txc
);
  logic [35:0] lo_q, hi_hold, hi_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lo_q    <= {4'hF, {4{XGMII_IDLE}}};
      hi_hold <= {4'hF, {4{XGMII_IDLE}}};
    end else begin
      lo_q    <= {tx_word.c[3:0], tx_word.d[31:0]};
      hi_hold <= {tx_word.c[7:4], tx_word.d[63:32]};
    end
  end

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) hi_q <= {4'hF, {4{XGMII_IDLE}}};
    else        hi_q <= hi_hold;
  end

  assign {xgmii_txc, xgmii_txd} = clk ? lo_q : hi_q;
endmodule
