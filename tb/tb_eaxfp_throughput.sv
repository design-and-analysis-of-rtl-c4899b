// tb_eaxfp_throughput: sustained full-load test of the EAXFP framer at its
// default size (ten lanes, 1518-byte maximum frame, 192-word slots).
//
// All ten GMII transmitters send maximum-size frames back to back, with
// the minimum 12-byte gap, for FRAMES frames each. That is the offered load
// of ten fully loaded Gigabit Ethernet ports. The XGMII output is looped
// through a channel model with the receive timing into the XGMII input, and
// ten GMII receive monitors check each frame against the byte pattern it
// was sent with (the pattern is a formula of lane, sequence number and byte
// index, so nothing has to be stored).
//
// Checked:
//   * every frame arrives once, unchanged, and in order for its lane;
//   * no transmit buffer ever raises gmii_tx_full, and nothing is dropped;
//   * consecutive /S/ on the line are never closer than one slot
//     (SLOT_WORDS words), and exactly one slot apart except for at most one
//     gap per round, where the slightly faster line waits for the inputs;
//   * the frame rate on the line is within 1% of the offered rate;
//   * the time from the end of a frame on GMII to its /S/ on the line is
//     never more than one round of the scheduler plus one slot.
// The measured rates and the longest wait are printed.
//
// Time base: one unit is 0.2 ns. The GMII clock period is 40 units (8 ns,
// 125 MHz) and the XGMII clock period is 32 units (6.4 ns, 156.25 MHz).
module tb_eaxfp_throughput;
  import eaxfp_pkg::*;

  localparam int LANES      = 10;
  localparam int MAX_FRAME  = 1518;
  localparam int SLOT_WORDS = 192;
  localparam int FRAMES     = 16;
  localparam int GCLK_P     = 40;
  localparam int XCLK_P     = 32;
  localparam int FLEN       = 8 + MAX_FRAME;  // bytes on GMII per frame
  // one round of the scheduler plus one slot, in time units
  localparam int ROUND_T = (LANES + 1) * SLOT_WORDS * XCLK_P;

  logic gclk = 0, xclk = 0, grst_n = 0, xrst_n = 0;
  always #20 gclk = ~gclk;
  always #16 xclk = ~xclk;

  logic [7:0]       tx_d [LANES];
  logic [LANES-1:0] tx_en = '0, tx_er = '0, tx_full;
  logic [7:0]       rx_d [LANES];
  logic [LANES-1:0] rx_dv, rx_er;
  logic [31:0]      xtxd, xrxd;
  logic [3:0]       xtxc, xrxc;
  logic             cpu_ack;
  logic [31:0]      cpu_rdata;

  initial for (int l = 0; l < LANES; l++) tx_d[l] = '0;

  eaxfp_framer dut (
    .gmii_clk(gclk), .gmii_rst_n(grst_n), .xgmii_clk(xclk), .xgmii_rst_n(xrst_n),
    .gmii_tx_d(tx_d), .gmii_tx_en(tx_en), .gmii_tx_er(tx_er), .gmii_tx_full(tx_full),
    .gmii_rx_d(rx_d), .gmii_rx_dv(rx_dv), .gmii_rx_er(rx_er),
    .xgmii_txd(xtxd), .xgmii_txc(xtxc), .xgmii_rxd(xrxd), .xgmii_rxc(xrxc),
    .cpu_req(1'b0), .cpu_we(1'b0), .cpu_addr(8'h00), .cpu_wdata(32'h0),
    .cpu_rdata(cpu_rdata), .cpu_ack(cpu_ack));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // expected byte i of frame number s of lane l
  function automatic logic [7:0] fbyte(input int l, input int s, input int i);
    case (i)
      0, 1, 2, 3, 4, 5, 6: return 8'h55;
      7:  return 8'hD5;
      8:  return 8'(l);
      9:  return 8'(s >> 8);
      10: return 8'(s);
      default: return 8'(l * 37 + s * 11 + i * 3);
    endcase
  endfunction

  // channel: the transmit bus delayed by three quarters of a clock
  logic [35:0] hist[$];
  initial begin
    repeat (4) hist.push_back({4'hF, {4{XGMII_IDLE}}});
    #4;
    forever begin
      hist.push_front({xtxc, xtxd});
      void'(hist.pop_back());
      {xrxc, xrxd} = hist[3];
      #8;
    end
  end

  // ---------------- GMII transmitters ----------------
  longint t_gmii_end[int];   // id = lane*65536 + seq
  int     sent = 0;
  task automatic sender(input int l);
    for (int s = 0; s < FRAMES; s++) begin
      for (int i = 0; i < FLEN; i++) begin
        @(negedge gclk);
        tx_en[l] = 1; tx_d[l] = fbyte(l, s, i);
      end
      @(negedge gclk);
      tx_en[l] = 0; tx_d[l] = '0;
      t_gmii_end[l * 65536 + s] = $time;
      sent++;
      repeat (11) @(negedge gclk);
    end
  endtask

  initial begin
    @(posedge grst_n);
    repeat (2) @(negedge gclk);
    for (int l = 0; l < LANES; l++) begin
      automatic int ll = l;
      fork sender(ll); join_none
    end
  end

  // ---------------- GMII receive monitors ----------------
  int delivered = 0;
  int last_seq[LANES] = '{default: -1};
  task automatic monitor(input int l);
    logic [7:0] b[$];
    int errs = 0;
    forever begin
      @(negedge gclk);
      if (rx_dv[l]) begin
        b.push_back(rx_d[l]);
        if (rx_er[l]) errs++;
      end else if (b.size() > 0) begin
        int src, seq, bad;
        src = b.size() > 10 ? int'(b[8]) : -1;
        seq = b.size() > 10 ? int'({b[9], b[10]}) : -1;
        bad = 0;
        if (src < 0 || src >= LANES || b.size() != FLEN) bad = 1;
        else for (int i = 0; i < FLEN; i++) if (b[i] != fbyte(src, seq, i)) bad++;
        check(bad == 0 && errs == 0,
              $sformatf("rx lane %0d: frame %0d/%0d corrupted (%0d bytes, %0d bad)",
                        l, src, seq, b.size(), bad));
        if (src >= 0 && src < LANES) begin
          check(seq == last_seq[src] + 1, $sformatf("lane %0d: frame %0d after %0d",
                                                   src, seq, last_seq[src]));
          last_seq[src] = seq;
        end
        delivered++;
        b.delete();
        errs = 0;
      end
    end
  endtask

  initial begin
    @(posedge grst_n);
    for (int l = 0; l < LANES; l++) begin
      automatic int ll = l;
      fork monitor(ll); join_none
    end
  end

  // ---------------- XGMII line monitor ----------------
  int      word_cnt = 0, last_start = -1, n_starts = 0;
  int      gaps_exact = 0, gaps_total = 0, gap_min = 1 << 30;
  longint  t_first = -1, t_last = -1;
  int      wait_max = 0;
  bit      in_frame = 0;
  int      nbytes = 0;
  logic [7:0] hdr[3];
  xgmii64_t lw;
  always @(posedge xclk) begin
    #8 {lw.c[3:0], lw.d[31:0]} = {xtxc, xtxd};
    @(negedge xclk);
    #8 {lw.c[7:4], lw.d[63:32]} = {xtxc, xtxd};
    word_cnt++;
    for (int k = 0; k < 8; k++) begin
      logic [7:0] b;
      b = lw.d[k*8 +: 8];
      if (!in_frame && lw.c[k] && b == XGMII_START) begin
        if (last_start >= 0) begin
          gaps_total++;
          if (word_cnt - last_start == SLOT_WORDS) gaps_exact++;
          if (word_cnt - last_start < gap_min) gap_min = word_cnt - last_start;
        end
        last_start = word_cnt;
        if (t_first < 0) t_first = $time;
        t_last = $time;
        n_starts++;
        in_frame = 1;
        nbytes = 1;
      end else if (in_frame) begin
        if (nbytes >= 8 && nbytes < 11) hdr[nbytes - 8] = b;
        if (nbytes == 11) begin
          int id;
          id = int'(hdr[0]) * 65536 + int'({hdr[1], hdr[2]});
          if (t_gmii_end.exists(id)) begin
            // start of the line frame, one word and a half before its header
            int w;
            w = int'($time - t_gmii_end[id]);
            if (w > wait_max) wait_max = w;
          end else check(0, $sformatf("line frame %0d/%0d not sent", hdr[0], {hdr[1], hdr[2]}));
        end
        if (lw.c[k] && b == XGMII_TERM) in_frame = 0;
        nbytes++;
      end
    end
  end

  int full_seen = 0;
  always @(posedge gclk) if (grst_n && tx_full != '0) full_seen++;

  initial begin
    real offered, measured, line_gbps;
    repeat (4) @(negedge xclk);
    grst_n = 1; xrst_n = 1;
    wait (sent == LANES * FRAMES);
    wait (delivered == LANES * FRAMES);
    repeat (2000) @(negedge gclk);
    check(delivered == LANES * FRAMES, $sformatf("delivered %0d of %0d", delivered, LANES * FRAMES));
    check(n_starts == LANES * FRAMES, $sformatf("%0d frames on the line", n_starts));
    for (int l = 0; l < LANES; l++)
      check(last_seq[l] == FRAMES - 1, $sformatf("lane %0d: last frame %0d", l, last_seq[l]));
    check(full_seen == 0, "a transmit buffer filled at full load");
    check(gap_min >= SLOT_WORDS, $sformatf("slots %0d words apart", gap_min));
    // the lanes finish their frames together and the line is slightly
    // faster than the offered load, so the line may wait for the inputs once
    // per round; every other gap is exactly one slot
    check(gaps_exact >= gaps_total - FRAMES,
          $sformatf("%0d of %0d slot gaps exact", gaps_exact, gaps_total));
    // offered: FRAMES per lane each 1538 byte times; line: frames between first and last /S/
    offered  = real'(LANES) / (real'(FLEN + 12) * GCLK_P);
    measured = real'(n_starts - 1) / real'(t_last - t_first);
    check(measured >= 0.99 * offered, $sformatf("line frame rate %f below offered %f", measured, offered));
    check(wait_max <= ROUND_T, $sformatf("longest wait %0d units above %0d", wait_max, ROUND_T));
    line_gbps = measured * MAX_FRAME * 8.0 / 0.2;
    $display("offered %0.1f Mb/s of frames, carried %0.1f Mb/s; longest wait %0.3f us (bound %0.3f us)",
             offered * MAX_FRAME * 8.0 / 0.2 * 1000.0, line_gbps * 1000.0,
             real'(wait_max) * 0.2e-3, real'(ROUND_T) * 0.2e-3);
    $display("%0d frames on the line, %0d of %0d gaps exactly one slot", n_starts, gaps_exact, gaps_total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #((FRAMES + 4) * (FLEN + 12) * GCLK_P * 2);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
