// tb_eaxfp_tx_ddr: self-checking test of the XGMII DDR output stage.
//
// Feeds random 64-bit words, one per rising edge, and samples the 32-bit
// output in the middle of each clock phase: the high phase after the
// rising edge that took a word must show its lanes 0-3 and the low phase
// that follows its lanes 4-7, control flags included. Reset must drive
// idle on both phases.
module tb_eaxfp_tx_ddr;
  import eaxfp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #16 clk = ~clk;

  xgmii64_t    tx_word = XGMII64_IDLE;
  logic [31:0] txd;
  logic [3:0]  txc;

  eaxfp_tx_ddr dut (.clk(clk), .rst_n(rst_n), .tx_word(tx_word), .xgmii_txd(txd), .xgmii_txc(txc));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    xgmii64_t w;
    repeat (2) @(posedge clk);
    #8 check(txd == 32'h07070707 && txc == 4'hF, "reset high phase idle");
    @(negedge clk); #8 check(txd == 32'h07070707 && txc == 4'hF, "reset low phase idle");
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      w.d = {$urandom, $urandom};
      w.c = 8'($urandom);
      tx_word = w;                       // set up before the rising edge
      @(posedge clk); #8;
      check({txc, txd} == {w.c[3:0], w.d[31:0]},
            $sformatf("word %0d high phase %h/%h", i, txc, txd));
      @(negedge clk); #8;
      check({txc, txd} == {w.c[7:4], w.d[63:32]},
            $sformatf("word %0d low phase %h/%h", i, txc, txd));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
