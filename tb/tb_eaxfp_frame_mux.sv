// tb_eaxfp_frame_mux: self-checking test of the round-robin frame multiplexer.
//
// Behavioural lane buffers (queues of XGMII-form frames with a registered
// read port) feed the multiplexer. A monitor decodes the 64-bit output
// stream and checks, for every frame: that it comes from the lane the
// round robin should pick next (the next backlogged, enabled lane after
// the last one served, worked out here from the queues), that its words
// are the stored ones, and that the slot lasts exactly SLOT_WORDS words
// (one more when the same lane is served twice in a row). It also checks
// that a disabled lane is skipped, that nothing starts while enable is
// low, and the counter pulse on slot_start.
module tb_eaxfp_frame_mux;
  import eaxfp_pkg::*;

  localparam int LANES      = 4;
  localparam int MAX_FRAME  = 64;
  localparam int SLOT_WORDS = 12;
  localparam int FWORDS     = frame_words(MAX_FRAME);
  localparam int WIDX_W     = $clog2(FWORDS);

  logic clk = 0, rst_n = 0;
  always #16 clk = ~clk;

  logic              enable = 0;
  logic [LANES-1:0]  lane_en = '1;
  logic [LANES-1:0]  avail, release_slot, slot_start;
  logic [WIDX_W:0]   len [LANES];
  xgmii64_t          rd_data [LANES];
  logic [WIDX_W-1:0] rd_widx;
  xgmii64_t          tx_word;

  eaxfp_frame_mux #(.LANES(LANES), .MAX_FRAME(MAX_FRAME), .SLOT_WORDS(SLOT_WORDS)) dut (
    .clk(clk), .rst_n(rst_n), .enable(enable), .lane_en(lane_en), .avail(avail),
    .len(len), .rd_data(rd_data), .rd_widx(rd_widx), .release_slot(release_slot),
    .tx_word(tx_word), .slot_start(slot_start));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  typedef xgmii64_t frame_t[$];
  frame_t q[LANES][$];        // frames waiting in each lane buffer
  frame_t sent[LANES][$];     // frames selected for sending, for the monitor

  function automatic frame_t make_frame(input int n, input int tag);
    frame_t f;
    logic [7:0] b[$];
    logic       c[$];
    b.push_back(XGMII_START); c.push_back(1);
    for (int i = 0; i < 6; i++) begin b.push_back(8'h55); c.push_back(0); end
    b.push_back(8'hD5); c.push_back(0);
    b.push_back(8'(tag)); c.push_back(0);
    for (int i = 1; i < n; i++) begin b.push_back(8'($urandom)); c.push_back(0); end
    b.push_back(XGMII_TERM); c.push_back(1);
    while (b.size() % 8) begin b.push_back(XGMII_IDLE); c.push_back(1); end
    for (int w = 0; w < b.size() / 8; w++) begin
      xgmii64_t x;
      for (int k = 0; k < 8; k++) begin x.d[k*8 +: 8] = b[w*8+k]; x.c[k] = c[w*8+k]; end
      f.push_back(x);
    end
    return f;
  endfunction

  // behavioural lane buffers
  always_comb
    for (int l = 0; l < LANES; l++) begin
      avail[l] = q[l].size() > 0;
      len[l]   = avail[l] ? (WIDX_W+1)'(q[l][0].size()) : '0;
    end

  always @(posedge clk)
    for (int l = 0; l < LANES; l++) begin
      if (q[l].size() > 0 && int'(rd_widx) < q[l][0].size()) rd_data[l] <= q[l][0][rd_widx];
      else rd_data[l] <= '{c: 8'h00, d: 64'hDEAD_BEEF_DEAD_BEEF};
      if (release_slot[l]) q[l].delete(0);
    end

  // expected scheduling: reference round robin over the queues
  int last_lane = LANES - 1;
  int exp_lane_q[$];
  always @(posedge clk) if (rst_n && slot_start != 0) begin
    int pick;
    pick = -1;
    for (int k = 1; k <= LANES; k++) begin
      int l;
      l = (last_lane + k) % LANES;
      if (pick < 0 && lane_en[l] && q[l].size() > (release_slot[l] ? 1 : 0)) pick = l;
    end
    check($onehot(slot_start), "slot_start one-hot");
    check(pick >= 0 && slot_start == LANES'(1 << pick),
          $sformatf("round robin picked %b, expected lane %0d", slot_start, pick));
    check(enable, "slot started while disabled");
    last_lane = pick;
    exp_lane_q.push_back(pick);
    if (pick >= 0) sent[pick].push_back(q[pick][0]);
  end

  // output monitor
  int frames_seen = 0, same_lane_turns = 0, gap_checks = 0;
  int start_time = -1, prev_lane = -1;
  int cyc = 0;
  always @(posedge clk) cyc++;
  always @(posedge clk) if (rst_n && tx_word.c[0] && tx_word.d[7:0] == XGMII_START) begin
    automatic int l = exp_lane_q.size() ? exp_lane_q.pop_front() : -1;
    automatic frame_t f;
    automatic int    now = cyc;
    if (start_time >= 0 && now - start_time <= SLOT_WORDS + 1) begin
      automatic int want = (l == prev_lane) ? SLOT_WORDS + 1 : SLOT_WORDS;
      check(now - start_time == want, $sformatf("slot spacing %0d, expected %0d",
                                                now - start_time, want));
      gap_checks++;
      if (l == prev_lane) same_lane_turns++;
    end else if (start_time >= 0) begin
      check(now - start_time >= SLOT_WORDS, "slot shorter than SLOT_WORDS");
    end
    start_time = now;
    prev_lane  = l;
    frames_seen++;
    if (l < 0 || sent[l].size() == 0) begin
      check(0, "frame on the line that no lane released");
    end else begin
      f = sent[l].pop_front();
      for (int w = 0; w < f.size(); w++) begin
        check(tx_word == f[w], $sformatf("lane %0d word %0d: %h", l, w, tx_word));
        @(posedge clk);
      end
      // rest of the slot is idle
      for (int w = f.size(); w < SLOT_WORDS - 1; w++) begin
        check(tx_word == XGMII64_IDLE, $sformatf("padding word %0d not idle", w));
        @(posedge clk);
      end
    end
  end

  task automatic load(input int l, input int n);
    for (int i = 0; i < n; i++)
      q[l].push_back(make_frame($urandom_range(1, MAX_FRAME), l * 16 + i));
  endtask

  task automatic wait_drain();
    int busy;
    do begin
      repeat (SLOT_WORDS * 2) @(posedge clk);
      busy = 0;
      for (int l = 0; l < LANES; l++) if (lane_en[l]) busy += q[l].size();
    end while (busy != 0);
    repeat (SLOT_WORDS * 2) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 1: uneven backlog, all lanes enabled
    load(0, 3); load(2, 2); load(3, 1);
    @(negedge clk); enable = 1;
    wait_drain();
    check(frames_seen == 6, $sformatf("phase 1 frames %0d", frames_seen));
    // phase 2: lane 2 disabled (link down)
    @(negedge clk); lane_en = 4'b1011;
    load(0, 2); load(1, 2); load(2, 2); load(3, 2);
    wait_drain();
    check(q[2].size() == 2, "disabled lane was served");
    check(frames_seen == 12, $sformatf("phase 2 frames %0d", frames_seen));
    // phase 3: enable low holds everything back
    @(negedge clk); enable = 0;
    load(1, 1);
    repeat (SLOT_WORDS * 4) @(posedge clk);
    check(frames_seen == 12, "frame sent while disabled");
    // phase 4: re-enable, lane 2 comes back
    @(negedge clk); enable = 1; lane_en = '1;
    wait_drain();
    check(frames_seen == 15, $sformatf("phase 4 frames %0d", frames_seen));
    check(same_lane_turns > 0 && gap_checks > 5, "back-to-back cases not exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
