// eaxfp_cpu_if: line card processor interface of the framer.
//
// A small register file on a synchronous single-cycle bus, clocked by the
// XGMII clock. A write (cpu_req and cpu_we high) takes effect at the
// clock edge; a read returns cpu_rdata with cpu_ack one clock after the
// request. Addresses are word indices:
//
//   0x00 CTRL        rw  bit0 loopback, bit1 tx enable, bit2 rx enable (reset 0b110)
//   0x01 TX_LANE_EN  rw  lanes taking part in the transmit round robin (reset all ones)
//   0x02 RX_LANE_EN  rw  lanes receiving frames (reset all ones)
//   0x03 STATUS      ro  bits LANES-1:0 transmit buffer full, bit16 receive
//                        alignment shifted, bit17 loopback in force
//   0x04 RX_DROPS    ro  frames dropped by the frame inverse multiplexer
//   0x05 RX_ERRORS   ro  frames received with an error character
//   0x06 CLEAR       wo  any write clears all counters
//   0x10+i TX_FRAMES ro  frames sent from transmit lane i
//   0x20+i RX_FRAMES ro  frames handed to receive lane i
//   0x30+i TX_DROPS  ro  frames dropped at transmit lane i (buffer full or oversize)
//
// The lane enables are how the processor reacts to a link change: a lane
// whose GMII link goes down is taken out of both round robins and the
// remaining lanes carry the traffic. Transmit drop events and buffer-full
// flags come from the GMII clock domain as toggles and levels and are
// synchronized here. Unused addresses read as zero. Counters are 32 bits
// and wrap. The document names this block and says the framer is
// controlled through it by software; the register map is this design's.
module eaxfp_cpu_if #(
  parameter int unsigned LANES = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  // processor bus
  input  logic             cpu_req,
  input  logic             cpu_we,
  input  logic [7:0]       cpu_addr,
  input  logic [31:0]      cpu_wdata,
  output logic [31:0]      cpu_rdata,
  output logic             cpu_ack,
  // control
  output logic             loop_en,
  output logic             tx_enable,
  output logic             rx_enable,
  output logic [LANES-1:0] tx_lane_en,
  output logic [LANES-1:0] rx_lane_en,
  // events and status
  input  logic [LANES-1:0] tx_slot,          // clk domain pulses
  input  logic [LANES-1:0] rx_commit,        // clk domain pulses
  input  logic             rx_drop,          // clk domain pulse
  input  logic             rx_err,           // clk domain pulse
  input  logic [LANES-1:0] tx_drop_toggle,   // GMII clock domain toggles
  input  logic [LANES-1:0] tx_full,          // GMII clock domain levels
  input  logic             rx_shifted,
  input  logic             looped
);
  initial begin
    assert (LANES >= 1 && LANES <= 16) else $error("LANES must be 1..16");
  end

  localparam logic [7:0] A_CTRL = 8'h00, A_TXEN = 8'h01, A_RXEN = 8'h02,
                         A_STAT = 8'h03, A_RXDROP = 8'h04, A_RXERR = 8'h05,
                         A_CLEAR = 8'h06;

  logic [31:0]      tx_frames [LANES];
  logic [31:0]      rx_frames [LANES];
  logic [31:0]      tx_drops  [LANES];
  logic [31:0]      rx_drops, rx_errors;
  logic [LANES-1:0] drop_tog_s, drop_tog_q, full_s;
  logic             wr, clear;

  eaxfp_sync #(.WIDTH(LANES)) u_sync_drop (
    .dst_clk(clk), .dst_rst_n(rst_n), .d(tx_drop_toggle), .q(drop_tog_s));
  eaxfp_sync #(.WIDTH(LANES)) u_sync_full (
    .dst_clk(clk), .dst_rst_n(rst_n), .d(tx_full), .q(full_s));

  assign wr    = cpu_req && cpu_we;
  assign clear = wr && cpu_addr == A_CLEAR;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      loop_en    <= 1'b0;
      tx_enable  <= 1'b1;
      rx_enable  <= 1'b1;
      tx_lane_en <= '1;
      rx_lane_en <= '1;
    end else if (wr) begin
      unique case (cpu_addr)
        A_CTRL: {rx_enable, tx_enable, loop_en} <= cpu_wdata[2:0];
        A_TXEN: tx_lane_en <= cpu_wdata[LANES-1:0];
        A_RXEN: rx_lane_en <= cpu_wdata[LANES-1:0];
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      drop_tog_q <= '0;
      rx_drops   <= '0;
      rx_errors  <= '0;
      for (int i = 0; i < LANES; i++) begin
        tx_frames[i] <= '0;
        rx_frames[i] <= '0;
        tx_drops[i]  <= '0;
      end
    end else begin
      drop_tog_q <= drop_tog_s;
      if (clear) begin
        rx_drops  <= '0;
        rx_errors <= '0;
        for (int i = 0; i < LANES; i++) begin
          tx_frames[i] <= '0;
          rx_frames[i] <= '0;
          tx_drops[i]  <= '0;
        end
      end else begin
        if (rx_drop) rx_drops  <= rx_drops + 1'b1;
        if (rx_err)  rx_errors <= rx_errors + 1'b1;
        for (int i = 0; i < LANES; i++) begin
          if (tx_slot[i])   tx_frames[i] <= tx_frames[i] + 1'b1;
          if (rx_commit[i]) rx_frames[i] <= rx_frames[i] + 1'b1;
          if (drop_tog_s[i] != drop_tog_q[i]) tx_drops[i] <= tx_drops[i] + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cpu_rdata <= '0;
      cpu_ack   <= 1'b0;
    end else begin
      cpu_ack   <= cpu_req;
      cpu_rdata <= '0;
      if (cpu_req && !cpu_we) begin
        unique case (cpu_addr[7:4])
          4'h0: unique case (cpu_addr)
            A_CTRL:   cpu_rdata <= {29'd0, rx_enable, tx_enable, loop_en};
            A_TXEN:   cpu_rdata <= 32'(tx_lane_en);
            A_RXEN:   cpu_rdata <= 32'(rx_lane_en);
            A_STAT:   cpu_rdata <= {14'd0, looped, rx_shifted, 16'(full_s)};
            A_RXDROP: cpu_rdata <= rx_drops;
            A_RXERR:  cpu_rdata <= rx_errors;
            default:  cpu_rdata <= '0;
          endcase
          4'h1: if (int'(cpu_addr[3:0]) < LANES) cpu_rdata <= tx_frames[cpu_addr[3:0]];
          4'h2: if (int'(cpu_addr[3:0]) < LANES) cpu_rdata <= rx_frames[cpu_addr[3:0]];
          4'h3: if (int'(cpu_addr[3:0]) < LANES) cpu_rdata <= tx_drops[cpu_addr[3:0]];
          default: cpu_rdata <= '0;
        endcase
      end
    end
  end
endmodule
