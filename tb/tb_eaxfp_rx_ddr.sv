// tb_eaxfp_rx_ddr: self-checking test of the XGMII DDR input stage.
//
// Drives a 32-bit XGMII stream with the receive timing (lanes 0-3 stable
// around the rising edge, lanes 4-7 around the falling edge). Frames of
// random length are separated by a random number of idle columns, so
// that their /S/ falls sometimes on lane 0 and sometimes on lane 4 of a
// 64-bit word. The test checks that every frame comes out of the stage
// with /S/ on lane 0 and with exactly the bytes sent up to /T/, that no
// /S/ ever appears on lane 4 of the output, and that both alignments
// (shifted and not shifted) were used.
module tb_eaxfp_rx_ddr;
  import eaxfp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #16 clk = ~clk;

  logic [31:0] rxd = {4{XGMII_IDLE}};
  logic [3:0]  rxc = 4'hF;
  xgmii64_t    rx_word;
  logic        shifted;

  eaxfp_rx_ddr dut (.clk(clk), .rst_n(rst_n), .xgmii_rxd(rxd), .xgmii_rxc(rxc),
                    .rx_word(rx_word), .shifted(shifted));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  typedef logic [7:0] bytes_t[$];
  bytes_t exp_q[$];
  logic [35:0] cols[$];          // 32-bit columns to send, {ctrl, data}

  task automatic add_frame(input int n);
    bytes_t f;
    logic [8:0] b[$];           // {ctrl, byte}
    b.push_back({1'b1, XGMII_START});
    for (int i = 0; i < 6; i++) b.push_back({1'b0, 8'h55});
    b.push_back({1'b0, 8'hD5});
    for (int i = 0; i < n; i++) b.push_back({1'b0, 8'($urandom)});
    foreach (b[i]) f.push_back(b[i][7:0]);
    exp_q.push_back(f);
    b.push_back({1'b1, XGMII_TERM});
    while (b.size() % 4) b.push_back({1'b1, XGMII_IDLE});
    for (int i = 0; i < b.size(); i += 4)
      cols.push_back({b[i+3][8], b[i+2][8], b[i+1][8], b[i][8],
                      b[i+3][7:0], b[i+2][7:0], b[i+1][7:0], b[i][7:0]});
  endtask

  task automatic add_idle(input int n);
    repeat (n) cols.push_back({4'hF, {4{XGMII_IDLE}}});
  endtask

  // driver: even columns go out around the rising edge, odd ones around the falling edge
  initial begin
    @(posedge rst_n);
    @(negedge clk);
    forever begin
      #8;
      {rxc, rxd} = cols.size() ? cols.pop_front() : {4'hF, {4{XGMII_IDLE}}};
      @(posedge clk); #8;
      {rxc, rxd} = cols.size() ? cols.pop_front() : {4'hF, {4{XGMII_IDLE}}};
      @(negedge clk);
    end
  end

  // monitor
  int frames_ok = 0, shifted_cycles = 0, plain_cycles = 0;
  bytes_t cur;
  logic   in_frame = 0;
  always @(posedge clk) if (rst_n) begin
    if (shifted) shifted_cycles++; else plain_cycles++;
    if (rx_word.c[4] && rx_word.d[39:32] == XGMII_START) check(0, "start left on lane 4");
    for (int k = 0; k < 8; k++) begin
      logic [7:0] b;
      b = rx_word.d[k*8 +: 8];
      if (!in_frame) begin
        if (rx_word.c[k] && b == XGMII_START) begin
          check(k == 0, $sformatf("start on lane %0d", k));
          in_frame = 1;
          cur = {b};
        end
      end else if (rx_word.c[k] && b == XGMII_TERM) begin
        bytes_t e;
        in_frame = 0;
        if (exp_q.size()) e = exp_q.pop_front();
        check(cur == e, $sformatf("frame %0d bytes differ (%0d vs %0d)", frames_ok, cur.size(), e.size()));
        frames_ok++;
      end else begin
        cur.push_back(b);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 60; i++) begin
      add_idle($urandom_range(3, 6));
      add_frame($urandom_range(1, 100));
    end
    add_idle(8);
    wait (cols.size() == 0);
    repeat (10) @(posedge clk);
    check(frames_ok == 60, $sformatf("frames received %0d", frames_ok));
    check(exp_q.size() == 0, "frames lost");
    check(shifted_cycles > 0 && plain_cycles > 0, "both alignments used");
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
