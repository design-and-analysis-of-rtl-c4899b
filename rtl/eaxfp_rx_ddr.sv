// eaxfp_rx_ddr: XGMII receive DDR input stage ("Rx_DDR Interface").
//
// Samples the 32-bit XGMII receive bus on both edges of the 156.25 MHz
// clock: byte lanes 0-3 on the rising edge, lanes 4-7 on the following
// falling edge, and joins each pair into one internal 64-bit word. The
// word then passes an alignment stage: XGMII lets a frame begin (/S/) on
// lane 0 or on lane 4 of a 64-bit word, while the frame inverse
// multiplexer expects it on lane 0. When /S/ is seen on lane 4 the stage
// switches to a half-word shift (lanes 4-7 of one word become lanes 0-3
// of the next) and stays shifted until a start arrives on lane 0 again.
// The four bytes dropped at a switch lie in the inter-frame gap.
//
// Latency: a word sampled around rising edge n appears on rx_word after
// rising edge n+2 (n+3 when shifted). shifted is high while the shift is
// applied. Reset gives idle. The document gives the block name, width and
// rate; the sampling edges and the alignment are this design's.
module eaxfp_rx_ddr
  import eaxfp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] xgmii_rxd,
  input  logic [3:0]  xgmii_rxc,
  output xgmii64_t    rx_word,
  output logic        shifted
);
  localparam logic [35:0] IDLE36 = {4'hF, {4{XGMII_IDLE}}};

  logic [35:0] lo_s, hi_s, prev_hi;
  xgmii64_t    raw;
  logic        start0, start4;

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) hi_s <= IDLE36;
    else        hi_s <= {xgmii_rxc, xgmii_rxd};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lo_s <= IDLE36;
      raw  <= XGMII64_IDLE;
    end else begin
      lo_s <= {xgmii_rxc, xgmii_rxd};
      raw  <= '{c: {hi_s[35:32], lo_s[35:32]}, d: {hi_s[31:0], lo_s[31:0]}};
    end
  end

  assign start0 = raw.c[0] && raw.d[7:0]   == XGMII_START;
  assign start4 = raw.c[4] && raw.d[39:32] == XGMII_START;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shifted <= 1'b0;
      prev_hi <= IDLE36;
      rx_word <= XGMII64_IDLE;
    end else begin
      prev_hi <= {raw.c[7:4], raw.d[63:32]};
      if (!shifted) begin
        if (start4 && !start0) begin
          shifted <= 1'b1;
          rx_word <= '{c: {4'hF, raw.c[3:0]}, d: {{4{XGMII_IDLE}}, raw.d[31:0]}};
        end else begin
          rx_word <= raw;
        end
      end else begin
        if (start0) begin
          shifted <= 1'b0;
          rx_word <= raw;
        end else begin
          rx_word <= '{c: {raw.c[3:0], prev_hi[35:32]}, d: {raw.d[31:0], prev_hi[31:0]}};
        end
      end
    end
  end
endmodule
