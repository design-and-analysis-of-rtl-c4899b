// tb_eaxfp_rx_dpram: self-checking test of one receive lane buffer.
//
// Writes frames in XGMII form into the buffer on the XGMII clock, as the
// frame inverse multiplexer does, and checks the GMII output: each frame
// comes out once, in order, with rx_dv high for exactly its length, the
// /S/ byte turned into 0x55, the other bytes as written, rx_er high on
// the byte that was /E/ and only there, and at least IPG idle clocks
// between frames. The write side must report no free slot once SLOTS
// frames wait, and free slots again after they have been sent.
module tb_eaxfp_rx_dpram;
  import eaxfp_pkg::*;

  localparam int MAX_FRAME = 64;
  localparam int SLOTS     = 2;
  localparam int IPG       = 12;
  localparam int FWORDS    = frame_words(MAX_FRAME);
  localparam int WIDX_W    = $clog2(FWORDS);
  localparam int LEN_W     = WIDX_W + 3;

  logic gclk = 0, xclk = 0, grst_n = 0, xrst_n = 0;
  always #20 gclk = ~gclk;
  always #16 xclk = ~xclk;

  logic              wr_free, wr_en = 0, wr_commit = 0;
  logic [WIDX_W-1:0] wr_widx = '0;
  xgmii64_t          wr_data = XGMII64_IDLE;
  logic [LEN_W-1:0]  wr_len = '0;
  logic [7:0]        rx_d;
  logic              rx_dv, rx_er;

  eaxfp_rx_dpram #(.MAX_FRAME(MAX_FRAME), .SLOTS(SLOTS), .IPG(IPG)) dut (
    .wr_clk(xclk), .wr_rst_n(xrst_n), .wr_free(wr_free), .wr_en(wr_en),
    .wr_widx(wr_widx), .wr_data(wr_data), .wr_commit(wr_commit), .wr_len(wr_len),
    .gmii_clk(gclk), .gmii_rst_n(grst_n), .gmii_rx_d(rx_d), .gmii_rx_dv(rx_dv),
    .gmii_rx_er(rx_er));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  typedef struct { logic [7:0] b[$]; logic e[$]; } gf_t;   // expected GMII bytes
  gf_t exp_q[$];

  task automatic write_frame(input int n, input int err_at);
    logic [7:0] b[$];
    logic       c[$];
    gf_t g;
    b.push_back(XGMII_START); c.push_back(1);
    for (int i = 0; i < 6; i++) begin b.push_back(8'h55); c.push_back(0); end
    b.push_back(8'hD5); c.push_back(0);
    for (int i = 0; i < n; i++) begin
      if (i == err_at) begin b.push_back(XGMII_ERROR); c.push_back(1); end
      else begin b.push_back(8'($urandom)); c.push_back(0); end
    end
    foreach (b[i]) begin
      g.b.push_back(i == 0 ? 8'h55 : b[i]);
      g.e.push_back(i != 0 && c[i]);
    end
    exp_q.push_back(g);
    wr_len = LEN_W'(b.size());
    b.push_back(XGMII_TERM); c.push_back(1);
    while (b.size() % 8) begin b.push_back(XGMII_IDLE); c.push_back(1); end
    while (!wr_free) @(negedge xclk);
    for (int w = 0; w < b.size() / 8; w++) begin
      for (int k = 0; k < 8; k++) begin wr_data.d[k*8 +: 8] = b[w*8+k]; wr_data.c[k] = c[w*8+k]; end
      wr_en = 1; wr_widx = WIDX_W'(w);
      wr_commit = (w == b.size() / 8 - 1);
      @(negedge xclk);
    end
    wr_en = 0; wr_commit = 0;
    @(negedge xclk);
  endtask

  // GMII monitor
  int frames_out = 0, gap = 100, min_gap = 100, bi = 0;
  gf_t cur;
  logic in_f = 0;
  always @(posedge gclk) if (grst_n) begin
    if (rx_dv) begin
      if (!in_f) begin
        in_f = 1; bi = 0;
        min_gap = (gap < min_gap) ? gap : min_gap;
        if (exp_q.size()) cur = exp_q.pop_front();
        else check(0, "frame out that was never written");
      end
      if (bi < cur.b.size())
        check(rx_d == cur.b[bi] && rx_er == cur.e[bi],
              $sformatf("frame %0d byte %0d: %h er=%b, expected %h er=%b", frames_out, bi,
                        rx_d, rx_er, cur.b[bi], cur.e[bi]));
      else check(0, "frame longer than written");
      bi++;
      gap = 0;
    end else begin
      if (in_f) begin
        check(bi == cur.b.size(), $sformatf("frame %0d length %0d, expected %0d", frames_out, bi, cur.b.size()));
        frames_out++;
      end
      check(!rx_er, "rx_er outside a frame");
      in_f = 0;
      gap++;
    end
  end

  initial begin
    repeat (3) @(negedge gclk);
    grst_n = 1; xrst_n = 1;
    repeat (3) @(negedge xclk);
    for (int i = 0; i < 20; i++) write_frame($urandom_range(1, MAX_FRAME), i == 7 ? 5 : -1);
    write_frame(MAX_FRAME, -1);
    wait (exp_q.size() == 0);
    repeat (200) @(negedge gclk);
    // fill every slot faster than GMII drains
    write_frame(MAX_FRAME, -1);
    write_frame(MAX_FRAME, -1);
    write_frame(MAX_FRAME, -1);
    check(!wr_free, "no free slot with every slot written");
    wait (exp_q.size() == 0);
    repeat (200) @(negedge gclk);
    check(wr_free, "slots free after draining");
    check(frames_out == 24, $sformatf("frames out %0d", frames_out));
    check(min_gap >= IPG, $sformatf("inter-frame gap %0d", min_gap));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge gclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
