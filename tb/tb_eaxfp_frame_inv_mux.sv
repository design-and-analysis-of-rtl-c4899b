// tb_eaxfp_frame_inv_mux: self-checking test of the frame inverse multiplexer.
//
// Sends a 64-bit XGMII stream of random frames and idle gaps into the
// block. Behavioural lane buffers record the words written to each lane
// and the committed lengths. The test works out, at every /S/, which
// lane the cyclic distribution must pick (the next enabled lane with a
// free slot after the previous one) and checks that the frame lands
// there whole, with its length in bytes, and is committed exactly once.
// Covered: lanes with no free slot skipped, a disabled lane skipped,
// every lane full (frame dropped), receive disabled (dropped), an
// oversize frame (dropped), and a frame holding /E/ (err pulse).
module tb_eaxfp_frame_inv_mux;
  import eaxfp_pkg::*;

  localparam int LANES     = 4;
  localparam int MAX_FRAME = 64;
  localparam int FWORDS    = frame_words(MAX_FRAME);
  localparam int WIDX_W    = $clog2(FWORDS);
  localparam int LEN_W     = WIDX_W + 3;

  logic clk = 0, rst_n = 0;
  always #16 clk = ~clk;

  logic              enable = 1;
  logic [LANES-1:0]  lane_en = '1;
  xgmii64_t          rx_word = XGMII64_IDLE;
  logic [LANES-1:0]  wr_free = '1, wr_en, commit;
  logic [WIDX_W-1:0] wr_widx;
  xgmii64_t          wr_data;
  logic [LEN_W-1:0]  wr_len;
  logic              drop, err;

  eaxfp_frame_inv_mux #(.LANES(LANES), .MAX_FRAME(MAX_FRAME)) dut (
    .clk(clk), .rst_n(rst_n), .enable(enable), .lane_en(lane_en), .rx_word(rx_word),
    .wr_free(wr_free), .wr_en(wr_en), .wr_widx(wr_widx), .wr_data(wr_data),
    .commit(commit), .wr_len(wr_len), .drop(drop), .err(err));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  typedef xgmii64_t frame_t[$];
  typedef struct { frame_t w; int len; bit bad; } xf_t;

  function automatic xf_t make_frame(input int n, input bit with_err);
    xf_t f;
    logic [7:0] b[$];
    logic       c[$];
    b.push_back(XGMII_START); c.push_back(1);
    for (int i = 0; i < 6; i++) begin b.push_back(8'h55); c.push_back(0); end
    b.push_back(8'hD5); c.push_back(0);
    for (int i = 0; i < n; i++) begin
      if (with_err && i == n / 2) begin b.push_back(XGMII_ERROR); c.push_back(1); end
      else begin b.push_back(8'($urandom)); c.push_back(0); end
    end
    f.len = b.size();
    f.bad = with_err;
    b.push_back(XGMII_TERM); c.push_back(1);
    while (b.size() % 8) begin b.push_back(XGMII_IDLE); c.push_back(1); end
    for (int w = 0; w < b.size() / 8; w++) begin
      xgmii64_t x;
      for (int k = 0; k < 8; k++) begin x.d[k*8 +: 8] = b[w*8+k]; x.c[k] = c[w*8+k]; end
      f.w.push_back(x);
    end
    return f;
  endfunction

  xf_t      stream_q[$];      // frames still to send, in order
  xgmii64_t words[$];
  xf_t      exp_lane[LANES][$];
  frame_t   buf_w[LANES];
  int       last = LANES - 1;
  int       drops_exp = 0, drops_seen = 0, errs_exp = 0, errs_seen = 0, commits = 0;
  int       skipped_full = 0;

  task automatic send(input xf_t f, input int gap);
    stream_q.push_back(f);
    foreach (f.w[i]) words.push_back(f.w[i]);
    repeat (gap) words.push_back(XGMII64_IDLE);
  endtask

  // stream driver
  always @(negedge clk) rx_word <= words.size() ? words.pop_front() : XGMII64_IDLE;

  // reference distribution at each /S/, and lane buffer model
  always @(posedge clk) if (rst_n) begin
    if (rx_word.c[0] && rx_word.d[7:0] == XGMII_START) begin
      xf_t f;
      int pick;
      f = stream_q.pop_front();
      pick = -1;
      for (int k = 1; k <= LANES; k++) begin
        int l;
        l = (last + k) % LANES;
        if (pick < 0 && enable && lane_en[l] && wr_free[l]) pick = l;
        if (pick < 0 && enable && lane_en[l] && !wr_free[l]) skipped_full++;
      end
      if (pick < 0 || f.w.size() > FWORDS) drops_exp++;
      else begin
        exp_lane[pick].push_back(f);
        if (f.bad) errs_exp++;
      end
      if (pick >= 0) last = pick;
    end
    if (drop) drops_seen++;
    if (err)  errs_seen++;
    check($onehot0(wr_en), "wr_en one-hot");
    for (int l = 0; l < LANES; l++) begin
      if (wr_en[l]) begin
        if (int'(wr_widx) == 0) buf_w[l] = {};
        check(int'(wr_widx) == buf_w[l].size(), $sformatf("lane %0d word index %0d", l, wr_widx));
        buf_w[l].push_back(wr_data);
      end
      if (commit[l]) begin
        xf_t e;
        commits++;
        if (exp_lane[l].size() == 0) check(0, $sformatf("unexpected commit on lane %0d", l));
        else begin
          e = exp_lane[l].pop_front();
          check(buf_w[l] == e.w, $sformatf("lane %0d frame words differ", l));
          check(int'(wr_len) == e.len, $sformatf("lane %0d length %0d, expected %0d", l, wr_len, e.len));
          check(err == e.bad, "err pulse with commit");
        end
      end
    end
  end

  task automatic drain();
    wait (words.size() == 0);
    repeat (4) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // even distribution
    for (int i = 0; i < 12; i++) send(make_frame($urandom_range(1, MAX_FRAME), 0), $urandom_range(1, 3));
    drain();
    // lanes 1 and 2 have no free slot
    @(negedge clk); wr_free = 4'b1001;
    for (int i = 0; i < 6; i++) send(make_frame($urandom_range(1, MAX_FRAME), 0), 2);
    drain();
    // lane 3 disabled (link down), one frame with an error character
    @(negedge clk); wr_free = '1; lane_en = 4'b0111;
    for (int i = 0; i < 6; i++) send(make_frame($urandom_range(1, MAX_FRAME), i == 2), 1);
    drain();
    // no lane free: dropped
    @(negedge clk); lane_en = '1; wr_free = '0;
    send(make_frame(40, 0), 2);
    drain();
    // receive disabled: dropped
    @(negedge clk); wr_free = '1; enable = 0;
    send(make_frame(40, 0), 2);
    drain();
    // oversize frame dropped, the next one kept
    @(negedge clk); enable = 1;
    send(make_frame(MAX_FRAME + 10, 0), 2);
    send(make_frame(MAX_FRAME, 0), 2);
    drain();
    check(commits == 25, $sformatf("commits %0d", commits));
    check(drops_seen == drops_exp && drops_exp == 3, $sformatf("drops %0d/%0d", drops_seen, drops_exp));
    check(errs_seen == errs_exp && errs_exp == 1, $sformatf("errors %0d/%0d", errs_seen, errs_exp));
    check(skipped_full > 0, "full lanes skipped");
    for (int l = 0; l < LANES; l++) check(exp_lane[l].size() == 0, $sformatf("lane %0d frames missing", l));
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
