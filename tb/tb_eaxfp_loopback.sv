// tb_eaxfp_loopback: self-checking test of the loop back block.
//
// Two independent XGMII streams of frames (line and local transmit) feed
// the block while loop_en is switched at random times, often in the
// middle of a frame. Checked every clock: the output is the previous
// clock's word of the selected source, or one idle word at the moment
// the selection changes; the selection changes only while the old source
// is between frames; and every frame on the output is whole (no idle
// word and no second /S/ between its /S/ and /T/). Both directions of
// switching must occur, including requests made mid-frame.
module tb_eaxfp_loopback;
  import eaxfp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #16 clk = ~clk;

  logic     loop_en = 0, looped;
  xgmii64_t line_word = XGMII64_IDLE, tx_word = XGMII64_IDLE, rx_word;

  eaxfp_loopback dut (.clk(clk), .rst_n(rst_n), .loop_en(loop_en), .line_word(line_word),
                      .tx_word(tx_word), .rx_word(rx_word), .looped(looped));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic xgmii64_t data_word();
    return '{c: 8'h00, d: {$urandom, $urandom}};
  endfunction
  function automatic xgmii64_t start_word();
    return '{c: 8'h01, d: {{7{8'h55}}, XGMII_START}};
  endfunction
  function automatic xgmii64_t term_word();
    return '{c: 8'hF8, d: {{4{XGMII_IDLE}}, XGMII_TERM, 24'hA5A5A5}};
  endfunction

  // a frame source: start, 2..6 data words, terminate, 1..3 idle
  task automatic gen(ref xgmii64_t w, input int seed_off);
    forever begin
      @(negedge clk); w = start_word();
      repeat ($urandom_range(2, 6)) begin @(negedge clk); w = data_word(); end
      @(negedge clk); w = term_word();
      repeat ($urandom_range(1, 3) + seed_off) begin @(negedge clk); w = XGMII64_IDLE; end
    end
  endtask

  initial begin @(posedge rst_n); fork gen(line_word, 0); gen(tx_word, 1); join_none end

  function automatic bit is_start(xgmii64_t w); return w.c[0] && w.d[7:0] == XGMII_START; endfunction
  function automatic bit is_term(xgmii64_t w);
    for (int k = 0; k < 8; k++) if (w.c[k] && w.d[k*8 +: 8] == XGMII_TERM) return 1;
    return 0;
  endfunction

  xgmii64_t prev_line = XGMII64_IDLE, prev_tx = XGMII64_IDLE;
  logic     prev_looped = 0;
  bit       src_in_frame[2] = '{0, 0};
  bit       out_in_frame = 0;
  int       to_loop = 0, to_line = 0, midframe_requests = 0;

  always @(posedge clk) if (rst_n) begin
    // output against the sources one clock earlier
    if (looped != prev_looped) begin
      check(rx_word == XGMII64_IDLE, "idle at switch");
      check(!src_in_frame[prev_looped], "switched inside a frame");
      if (looped) to_loop++; else to_line++;
    end else begin
      check(rx_word == (prev_looped ? prev_tx : prev_line),
            $sformatf("output %h is not the selected source", rx_word));
    end
    if (loop_en != looped && src_in_frame[looped]) midframe_requests++;
    // output frames are whole
    if (out_in_frame) begin
      check(rx_word != XGMII64_IDLE && !is_start(rx_word), "frame broken on output");
      if (is_term(rx_word)) out_in_frame = 0;
    end else if (is_start(rx_word)) out_in_frame = !is_term(rx_word);
    // source frame tracking (state after this clock's word)
    if (is_start(line_word)) src_in_frame[0] = 1; else if (is_term(line_word)) src_in_frame[0] = 0;
    if (is_start(tx_word))   src_in_frame[1] = 1; else if (is_term(tx_word))   src_in_frame[1] = 0;
    prev_line   = line_word;
    prev_tx     = tx_word;
    prev_looped = looped;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 40; i++) begin
      repeat ($urandom_range(5, 30)) @(negedge clk);
      loop_en = ~loop_en;
    end
    repeat (30) @(negedge clk);
    check(to_loop >= 5 && to_line >= 5, $sformatf("switches %0d/%0d", to_loop, to_line));
    check(midframe_requests > 0, "no mid-frame switch request");
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
