// tb_eaxfp_framer: end-to-end test of the EAXFP framer at its default size.
//
// Ten GMII transmitters send numbered frames into the framer. The XGMII
// output goes through a channel model (standing in for the 10 GbE PHY
// and the far end) back into the XGMII input, with the receive timing,
// and optionally shifted by one 32-bit transfer so that frames arrive
// starting on lane 4. Ten GMII receive monitors check every frame that
// comes out against a scoreboard of the frames sent. An XGMII monitor
// decodes the line and records the order and spacing of the slots.
//
// Checked: every frame arrives once and unchanged; frames of one lane
// stay in order; consecutive line frames go to consecutive receive lanes;
// slots are never closer than SLOT_WORDS words and are exactly that far
// apart when the line is saturated; ten lanes of maximum-size frames at
// GMII line rate pass without loss; the register counters agree with
// what was sent and dropped. Each mechanism below is made to happen and
// counted, and one that never happens counts as a failure: padding of
// short frames, round-robin skip of idle lanes, transmit overflow with
// gmii_tx_full, transmit lane disabled (link change), receive lane
// disabled, error character, receive drop, lane-4 alignment, loopback,
// oversize frame drop.
module tb_eaxfp_framer;
  import eaxfp_pkg::*;

  localparam int LANES      = 10;
  localparam int MAX_FRAME  = 1518;
  localparam int SLOT_WORDS = 192;
  localparam int TX_SLOTS   = 4;

  logic gclk = 0, xclk = 0, grst_n = 0, xrst_n = 0;
  always #20 gclk = ~gclk;
  always #16 xclk = ~xclk;

  logic [7:0]       tx_d [LANES];
  logic [LANES-1:0] tx_en = '0, tx_er = '0, tx_full;
  logic [7:0]       rx_d [LANES];
  logic [LANES-1:0] rx_dv, rx_er;
  logic [31:0]      xtxd, xrxd;
  logic [3:0]       xtxc, xrxc;
  logic             cpu_req = 0, cpu_we = 0, cpu_ack;
  logic [7:0]       cpu_addr = '0;
  logic [31:0]      cpu_wdata = '0, cpu_rdata;

  initial for (int l = 0; l < LANES; l++) tx_d[l] = '0;

  eaxfp_framer dut (
    .gmii_clk(gclk), .gmii_rst_n(grst_n), .xgmii_clk(xclk), .xgmii_rst_n(xrst_n),
    .gmii_tx_d(tx_d), .gmii_tx_en(tx_en), .gmii_tx_er(tx_er), .gmii_tx_full(tx_full),
    .gmii_rx_d(rx_d), .gmii_rx_dv(rx_dv), .gmii_rx_er(rx_er),
    .xgmii_txd(xtxd), .xgmii_txc(xtxc), .xgmii_rxd(xrxd), .xgmii_rxc(xrxc),
    .cpu_req(cpu_req), .cpu_we(cpu_we), .cpu_addr(cpu_addr), .cpu_wdata(cpu_wdata),
    .cpu_rdata(cpu_rdata), .cpu_ack(cpu_ack));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- channel model ----------------
  logic        chan_on = 1, chan_shift = 0;
  logic [35:0] ch_a = {4'hF, {4{XGMII_IDLE}}}, ch_b = {4'hF, {4{XGMII_IDLE}}};
  logic [35:0] hist[$];
  // delay line sampled every quarter clock: ch_a lags the transmit bus by
  // three quarters of a clock (receive timing), ch_b by one 32-bit
  // transfer more, which moves frame starts to lane 4
  initial begin
    repeat (6) hist.push_back({4'hF, {4{XGMII_IDLE}}});
    #4;
    forever begin
      hist.push_front({xtxc, xtxd});
      void'(hist.pop_back());
      ch_a = hist[3];
      ch_b = hist[5];
      #8;
    end
  end
  assign {xrxc, xrxd} = !chan_on ? {4'hF, {4{XGMII_IDLE}}} : (chan_shift ? ch_b : ch_a);

  // ---------------- scoreboard ----------------
  typedef struct { logic [7:0] b[$]; logic e[$]; } gframe_t;
  gframe_t expected[int];        // id = lane*65536 + seq
  int      rx_lane_of[int];
  int      seq_next[LANES] = '{default: 0};
  int      last_seq_rx[LANES] = '{default: -1};
  int      rx_count[LANES] = '{default: 0};
  int      delivered = 0;

  // ---------------- GMII transmitters ----------------
  typedef struct { int len; int err_at; bit expect_drop; } req_t;
  req_t txq[LANES][$];

  function automatic void queue_frame(input int l, input int len, input int err_at = -1,
                                      input bit expect_drop = 0);
    req_t r;
    r.len = len; r.err_at = err_at; r.expect_drop = expect_drop;
    txq[l].push_back(r);
  endfunction

  task automatic gmii_sender(input int l);
    forever begin
      req_t    r;
      gframe_t g;
      logic [7:0] b[$];
      int id;
      while (txq[l].size() == 0) @(negedge gclk);
      r  = txq[l].pop_front();
      id = l * 65536 + seq_next[l];
      for (int i = 0; i < 7; i++) b.push_back(8'h55);
      b.push_back(8'hD5);
      b.push_back(8'(l)); b.push_back(8'(seq_next[l] >> 8)); b.push_back(8'(seq_next[l]));
      b.push_back(8'(r.len >> 8)); b.push_back(8'(r.len));
      for (int i = 5; i < r.len; i++) b.push_back(8'($urandom));
      seq_next[l]++;
      foreach (b[i]) begin
        g.b.push_back(i == r.err_at ? XGMII_ERROR : b[i]);
        g.e.push_back(i == r.err_at);
      end
      if (!r.expect_drop) expected[id] = g;
      foreach (b[i]) begin
        @(negedge gclk);
        tx_en[l] = 1; tx_d[l] = b[i]; tx_er[l] = (i == r.err_at);
      end
      @(negedge gclk);
      tx_en[l] = 0; tx_er[l] = 0; tx_d[l] = '0;
      repeat (11) @(negedge gclk);
    end
  endtask

  initial begin
    @(posedge grst_n);
    for (int l = 0; l < LANES; l++) begin
      automatic int ll = l;
      fork gmii_sender(ll); join_none
    end
  end

  function automatic bit tx_idle();
    for (int l = 0; l < LANES; l++) if (txq[l].size() != 0 || tx_en[l]) return 0;
    return 1;
  endfunction

  // ---------------- GMII receive monitors ----------------
  int rx_err_frames = 0;
  task automatic gmii_monitor(input int l);
    gframe_t g;
    forever begin
      @(negedge gclk);
      if (rx_dv[l]) begin
        g.b.push_back(rx_d[l]);
        g.e.push_back(rx_er[l]);
      end else if (g.b.size() > 0) begin
        int id, src, seq;
        src = g.b.size() > 10 ? int'(g.b[8]) : -1;
        seq = g.b.size() > 10 ? {g.b[9], g.b[10]} : -1;
        id  = src * 65536 + seq;
        if (src < 0 || !expected.exists(id)) begin
          check(0, $sformatf("rx lane %0d: unknown or duplicate frame %0d/%0d", l, src, seq));
        end else begin
          check(g.b == expected[id].b && g.e == expected[id].e,
                $sformatf("rx lane %0d: frame %0d/%0d corrupted", l, src, seq));
          check(seq > last_seq_rx[src], $sformatf("frame %0d/%0d out of order", src, seq));
          last_seq_rx[src] = seq;
          if (g.e.sum() with (int'(item)) > 0) rx_err_frames++;
          expected.delete(id);
          rx_lane_of[id] = l;
          rx_count[l]++;
          delivered++;
        end
        g.b.delete(); g.e.delete();
      end
    end
  endtask

  initial begin
    @(posedge grst_n);
    for (int l = 0; l < LANES; l++) begin
      automatic int ll = l;
      fork gmii_monitor(ll); join_none
    end
  end

  // ---------------- XGMII line monitor ----------------
  int line_ids[$];
  int word_cnt = 0, last_start = -1;
  int spacing_min = 1 << 30, spacing_exact = 0, short_frames = 0, rr_skips = 0;
  int last_line_lane = -1;
  xgmii64_t lw;
  bit in_line_frame = 0;
  int line_bytes = 0;
  logic [7:0] hdr[3];
  always @(posedge xclk) begin
    #8 {lw.c[3:0], lw.d[31:0]} = {xtxc, xtxd};
    @(negedge xclk);
    #8 {lw.c[7:4], lw.d[63:32]} = {xtxc, xtxd};
    word_cnt++;
    for (int k = 0; k < 8; k++) begin
      logic [7:0] b;
      b = lw.d[k*8 +: 8];
      if (!in_line_frame && lw.c[k] && b == XGMII_START) begin
        check(k == 0, "transmit start not on lane 0");
        if (last_start >= 0) begin
          int s;
          s = word_cnt - last_start;
          if (s < spacing_min) spacing_min = s;
          if (s == SLOT_WORDS) spacing_exact++;
        end
        last_start = word_cnt;
        in_line_frame = 1;
        line_bytes = 1;
      end else if (in_line_frame) begin
        if (lw.c[k] && b == XGMII_TERM) begin
          int src;
          in_line_frame = 0;
          src = int'(hdr[0]);
          line_ids.push_back(src * 65536 + {hdr[1], hdr[2]});
          if (last_line_lane >= 0 && src != (last_line_lane + 1) % LANES && src != last_line_lane)
            rr_skips++;
          last_line_lane = src;
          if (line_bytes < 8 + MAX_FRAME) short_frames++;
        end else begin
          if (line_bytes >= 8 && line_bytes < 11) hdr[line_bytes - 8] = b;
          line_bytes++;
        end
      end
    end
  end

  // ---------------- processor bus ----------------
  task automatic cpu_write(input logic [7:0] a, input logic [31:0] d);
    @(negedge xclk); cpu_req = 1; cpu_we = 1; cpu_addr = a; cpu_wdata = d;
    @(negedge xclk); cpu_req = 0; cpu_we = 0;
  endtask
  task automatic cpu_read(input logic [7:0] a, output logic [31:0] d);
    @(negedge xclk); cpu_req = 1; cpu_we = 0; cpu_addr = a;
    @(negedge xclk); cpu_req = 0;
    d = cpu_rdata;
  endtask

  // wait until everything queued has been sent and delivered
  task automatic settle();
    int quiet;
    quiet = 0;
    while (quiet < 3000) begin
      @(negedge gclk);
      if (tx_idle() && rx_dv == '0 && !in_line_frame) quiet++; else quiet = 0;
    end
  endtask

  // mechanism counters
  int full_seen = 0;
  always @(posedge gclk) if (grst_n && tx_full != '0) full_seen++;
  int n_pad, n_skip, n_overflow, n_txlink, n_rxlink, n_err, n_rxdrop, n_align, n_loop, n_oversize;
  int n_saturate;

  initial begin
    logic [31:0] d;
    int prev_n, lost, sum;
    repeat (4) @(negedge xclk);
    grst_n = 1; xrst_n = 1;
    repeat (4) @(negedge xclk);
    cpu_read(8'h00, d);
    check(d == 32'h6, "CTRL reset value");

    // 1: every lane, random lengths
    for (int l = 0; l < LANES; l++) repeat (2) queue_frame(l, $urandom_range(60, MAX_FRAME));
    settle();
    check(delivered == 20, $sformatf("phase 1 delivered %0d", delivered));
    // consecutive line frames go to consecutive receive lanes
    for (int i = 1; i < line_ids.size(); i++)
      check(rx_lane_of[line_ids[i]] == (rx_lane_of[line_ids[i-1]] + 1) % LANES,
            $sformatf("line frame %0d not on the next receive lane", i));

    // 2: saturation, ten lanes of maximum-size frames at GMII line rate
    prev_n = spacing_exact;
    for (int l = 0; l < LANES; l++) repeat (4) queue_frame(l, MAX_FRAME);
    settle();
    check(delivered == 60, $sformatf("phase 2 delivered %0d", delivered));
    n_saturate = spacing_exact - prev_n;
    check(n_saturate >= 30, $sformatf("back-to-back slots at saturation %0d", n_saturate));
    check(tx_full == '0 && full_seen == 0, "transmit buffers filled at line rate");

    // 3: a few lanes with short frames: idle lanes skipped, short frames padded
    prev_n = rr_skips;
    n_pad = short_frames;
    queue_frame(1, 64); queue_frame(4, 64); queue_frame(7, 64);
    queue_frame(1, 100); queue_frame(4, 64); queue_frame(7, 80);
    settle();
    n_skip = rr_skips - prev_n;
    n_pad  = short_frames;
    check(delivered == 66, $sformatf("phase 3 delivered %0d", delivered));

    // 4: transmit lane 9 taken out (link change): its buffer fills, flow control, drops
    cpu_write(8'h01, 32'h1FF);
    for (int i = 0; i < TX_SLOTS; i++) queue_frame(9, 200);
    queue_frame(9, 200, -1, 1);
    queue_frame(9, 200, -1, 1);
    for (int l = 0; l < 9; l++) queue_frame(l, 300);
    settle();
    check(delivered == 75, $sformatf("phase 4 delivered %0d before re-enable", delivered));
    check(tx_full[9], "gmii_tx_full on the disabled lane");
    n_overflow = full_seen;
    cpu_read(8'h39, d);
    check(d == 2, $sformatf("TX_DROPS[9] = %0d", d));
    n_txlink = (d == 2);
    cpu_write(8'h01, 32'h3FF);
    settle();
    check(delivered == 79, $sformatf("phase 4 delivered %0d", delivered));

    // 5: receive lane 3 taken out
    cpu_write(8'h02, 32'h3F7);
    prev_n = rx_count[3];
    for (int l = 0; l < LANES; l++) queue_frame(l, 128);
    settle();
    check(rx_count[3] == prev_n, "frame given to a disabled receive lane");
    n_rxlink = delivered - 79;
    check(delivered == 89, $sformatf("phase 5 delivered %0d", delivered));
    cpu_write(8'h02, 32'h3FF);

    // 6: error character
    queue_frame(0, 500, 30);
    settle();
    n_err = rx_err_frames;
    cpu_read(8'h05, d);
    check(d == 1, $sformatf("RX_ERRORS = %0d", d));

    // 7: every receive lane off: frames dropped
    cpu_write(8'h02, 32'h0);
    queue_frame(2, 100, -1, 1);
    queue_frame(5, 100, -1, 1);
    settle();
    cpu_read(8'h04, d);
    check(d == 2, $sformatf("RX_DROPS = %0d", d));
    n_rxdrop = d;
    cpu_write(8'h02, 32'h3FF);

    // 8: channel delivers frames starting on lane 4
    chan_shift = 1;
    n_align = 0;
    for (int l = 0; l < LANES; l++) queue_frame(l, $urandom_range(60, 400));
    fork
      begin
        repeat (3000) begin
          @(negedge xclk);
          if (dut.rx_shifted) n_align++;
        end
      end
    join_none
    settle();
    check(delivered == 100, $sformatf("phase 8 delivered %0d", delivered));
    cpu_read(8'h03, d);
    check(d[16], "STATUS shows shifted alignment");
    chan_shift = 0;

    // 9: loopback with the line input dead
    chan_on = 0;
    cpu_write(8'h00, 32'h7);
    repeat (10) @(negedge xclk);
    cpu_read(8'h03, d);
    check(d[17], "STATUS shows loopback");
    n_loop = delivered;
    for (int l = 0; l < LANES; l++) queue_frame(l, $urandom_range(60, 400));
    settle();
    n_loop = delivered - n_loop;
    check(n_loop == 10, $sformatf("loopback delivered %0d", n_loop));
    cpu_write(8'h00, 32'h6);
    chan_on = 1;

    // 10: oversize frame is dropped at the transmit buffer
    queue_frame(5, MAX_FRAME + 1, -1, 1);
    queue_frame(5, 64);
    settle();
    cpu_read(8'h35, d);
    check(d == 1, $sformatf("TX_DROPS[5] = %0d", d));
    n_oversize = d;
    check(delivered == 111, $sformatf("phase 10 delivered %0d", delivered));

    // totals
    check(expected.size() == 0, $sformatf("%0d frames never delivered", expected.size()));
    sum = 0;
    for (int l = 0; l < LANES; l++) begin
      cpu_read(8'h10 + 8'(l), d);
      sum += d;
    end
    check(sum == line_ids.size(), $sformatf("TX_FRAMES total %0d, line frames %0d", sum, line_ids.size()));
    check(spacing_min >= SLOT_WORDS, $sformatf("slot spacing %0d below SLOT_WORDS", spacing_min));

    $display("mechanisms: padded=%0d rr_skip=%0d overflow=%0d tx_link=%0d rx_link=%0d error=%0d rx_drop=%0d align=%0d loopback=%0d oversize=%0d saturated_slots=%0d",
             n_pad, n_skip, n_overflow, n_txlink, n_rxlink, n_err, n_rxdrop, n_align, n_loop,
             n_oversize, n_saturate);
    check(n_pad > 0, "padding never happened");
    check(n_skip > 0, "round-robin skip never happened");
    check(n_overflow > 0, "transmit overflow never happened");
    check(n_txlink > 0, "transmit link change never happened");
    check(n_rxlink > 0, "receive link change never happened");
    check(n_err > 0, "error frame never happened");
    check(n_rxdrop > 0, "receive drop never happened");
    check(n_align > 0, "lane-4 alignment never happened");
    check(n_loop > 0, "loopback never happened");
    check(n_oversize > 0, "oversize drop never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge xclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
