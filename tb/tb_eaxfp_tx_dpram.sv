// tb_eaxfp_tx_dpram: self-checking test of one transmit lane buffer.
//
// Sends GMII frames of random length (preamble, SFD, payload) into the
// buffer and reads the slots back on the XGMII clock the way the frame
// multiplexer does. Every stored word is compared with the XGMII form
// worked out here from the bytes sent: /S/ first, data, /T/, then /I/.
// Also checked: the word count of each slot, a GMII error byte stored as
// /E/, the full flag once every slot holds a frame, a frame dropped
// while full and an oversize frame dropped, each with one drop toggle.
// The two clocks keep the 125 MHz : 156.25 MHz ratio (periods of 40 and 32 time units).
module tb_eaxfp_tx_dpram;
  import eaxfp_pkg::*;

  localparam int MAX_FRAME = 64;
  localparam int SLOTS     = 2;
  localparam int FWORDS    = frame_words(MAX_FRAME);
  localparam int WIDX_W    = $clog2(FWORDS);

  logic gmii_clk = 0, xclk = 0, gmii_rst_n = 0, xrst_n = 0;
  always #20 gmii_clk = ~gmii_clk;
  always #16 xclk = ~xclk;

  logic [7:0] tx_d = '0;
  logic tx_en = 0, tx_er = 0;
  logic full, drop_toggle, rd_avail, rd_release = 0;
  logic [WIDX_W:0] rd_len;
  logic [WIDX_W-1:0] rd_widx = '0;
  xgmii64_t rd_data;

  eaxfp_tx_dpram #(.MAX_FRAME(MAX_FRAME), .SLOTS(SLOTS)) dut (
    .gmii_clk(gmii_clk), .gmii_rst_n(gmii_rst_n), .gmii_tx_d(tx_d),
    .gmii_tx_en(tx_en), .gmii_tx_er(tx_er), .full(full), .drop_toggle(drop_toggle),
    .rd_clk(xclk), .rd_rst_n(xrst_n), .rd_avail(rd_avail), .rd_len(rd_len),
    .rd_widx(rd_widx), .rd_data(rd_data), .rd_release(rd_release));

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // expected bytes and control flags of a frame in XGMII form
  typedef struct { logic [7:0] b[$]; logic c[$]; } xframe_t;
  xframe_t exp_q[$];

  task automatic send_frame(input int n, input int err_at);
    xframe_t x;
    logic [7:0] bytes[$];
    for (int i = 0; i < 7; i++) bytes.push_back(8'h55);
    bytes.push_back(8'hD5);
    for (int i = 0; i < n; i++) bytes.push_back(8'($urandom));
    foreach (bytes[i]) begin
      @(negedge gmii_clk);
      tx_en = 1; tx_d = bytes[i]; tx_er = (i == err_at);
      if (i == 0)           begin x.b.push_back(XGMII_START); x.c.push_back(1); end
      else if (i == err_at) begin x.b.push_back(XGMII_ERROR); x.c.push_back(1); end
      else                  begin x.b.push_back(bytes[i]);    x.c.push_back(0); end
    end
    @(negedge gmii_clk);
    tx_en = 0; tx_er = 0; tx_d = '0;
    x.b.push_back(XGMII_TERM); x.c.push_back(1);
    while (x.b.size() % 8 != 0) begin x.b.push_back(XGMII_IDLE); x.c.push_back(1); end
    exp_q.push_back(x);
    repeat (12) @(negedge gmii_clk);
  endtask

  task automatic read_slot();
    xframe_t x;
    int words;
    while (!rd_avail) @(negedge xclk);
    x = exp_q.pop_front();
    words = x.b.size() / 8;
    check(int'(rd_len) == words, $sformatf("slot length %0d, expected %0d", rd_len, words));
    for (int w = 0; w < words; w++) begin
      rd_widx = WIDX_W'(w);
      @(negedge xclk);
      for (int k = 0; k < 8; k++) begin
        check(rd_data.d[k*8 +: 8] == x.b[w*8+k] && rd_data.c[k] == x.c[w*8+k],
              $sformatf("word %0d lane %0d: %h/%b, expected %h/%b", w, k,
                        rd_data.d[k*8 +: 8], rd_data.c[k], x.b[w*8+k], x.c[w*8+k]));
      end
    end
    rd_release = 1;
    @(negedge xclk);
    rd_release = 0;
    rd_widx = '0;
    repeat (4) @(negedge xclk);
  endtask

  initial begin
    logic tog;
    repeat (3) @(negedge gmii_clk);
    gmii_rst_n = 1; xrst_n = 1;
    repeat (3) @(negedge gmii_clk);
    // frames of random length, each read back right away
    for (int f = 0; f < 20; f++) begin
      send_frame(1 + $urandom_range(0, MAX_FRAME - 1), (f == 5) ? 20 : -1);
      read_slot();
    end
    // boundary: largest frame
    send_frame(MAX_FRAME, -1);
    read_slot();
    // fill both slots, then a frame must be dropped
    tog = drop_toggle;
    check(!full, "full before filling");
    send_frame(10, -1);
    send_frame(30, -1);
    repeat (4) @(negedge gmii_clk);
    check(full, "full after filling every slot");
    send_frame(12, -1);
    void'(exp_q.pop_back());
    check(drop_toggle != tog, "drop toggle when full");
    read_slot();
    read_slot();
    repeat (6) @(negedge gmii_clk);
    check(!full, "full cleared after reading");
    // oversize frame is dropped, next one is kept
    tog = drop_toggle;
    send_frame(MAX_FRAME + 3, -1);
    void'(exp_q.pop_back());
    check(drop_toggle != tog, "drop toggle for oversize frame");
    repeat (6) @(negedge xclk);
    check(!rd_avail, "oversize frame not stored");
    send_frame(40, -1);
    read_slot();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge gmii_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
