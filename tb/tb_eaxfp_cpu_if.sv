// tb_eaxfp_cpu_if: self-checking test of the processor register interface.
//
// Checks the reset values, writes and read-back of the control registers
// and their effect on the control outputs, one-clock read latency with
// cpu_ack, the status bits (transmit-full flags from the GMII clock
// domain, alignment, loopback), every event counter against counts kept
// here while random event pulses and GMII-domain drop toggles are
// applied, the counter clear, and zero for unused addresses.
module tb_eaxfp_cpu_if;
  localparam int LANES = 10;

  logic clk = 0, gclk = 0, rst_n = 0;
  always #16 clk = ~clk;
  always #20 gclk = ~gclk;

  logic             cpu_req = 0, cpu_we = 0, cpu_ack;
  logic [7:0]       cpu_addr = '0;
  logic [31:0]      cpu_wdata = '0, cpu_rdata;
  logic             loop_en, tx_enable, rx_enable;
  logic [LANES-1:0] tx_lane_en, rx_lane_en;
  logic [LANES-1:0] tx_slot = '0, rx_commit = '0, tx_drop_toggle = '0, tx_full = '0;
  logic             rx_drop = 0, rx_err = 0, rx_shifted = 0, looped = 0;

  eaxfp_cpu_if #(.LANES(LANES)) dut (
    .clk(clk), .rst_n(rst_n), .cpu_req(cpu_req), .cpu_we(cpu_we), .cpu_addr(cpu_addr),
    .cpu_wdata(cpu_wdata), .cpu_rdata(cpu_rdata), .cpu_ack(cpu_ack), .loop_en(loop_en),
    .tx_enable(tx_enable), .rx_enable(rx_enable), .tx_lane_en(tx_lane_en),
    .rx_lane_en(rx_lane_en), .tx_slot(tx_slot), .rx_commit(rx_commit), .rx_drop(rx_drop),
    .rx_err(rx_err), .tx_drop_toggle(tx_drop_toggle), .tx_full(tx_full),
    .rx_shifted(rx_shifted), .looped(looped));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); cpu_req = 1; cpu_we = 1; cpu_addr = a; cpu_wdata = d;
    @(negedge clk); cpu_req = 0; cpu_we = 0;
  endtask

  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk); cpu_req = 1; cpu_we = 0; cpu_addr = a;
    @(negedge clk); cpu_req = 0;
    check(cpu_ack, "ack one clock after a read");
    d = cpu_rdata;
  endtask

  task automatic expect_reg(input logic [7:0] a, input logic [31:0] e, input string what);
    logic [31:0] d;
    rd(a, d);
    check(d == e, $sformatf("%s: read %h, expected %h", what, d, e));
  endtask

  int n_tx[LANES] = '{default: 0}, n_rx[LANES] = '{default: 0}, n_drop[LANES] = '{default: 0};
  int n_rxdrop = 0, n_rxerr = 0;

  task automatic events(input int cycles);
    fork
      begin
       repeat (cycles) begin
        @(negedge clk);
        tx_slot   = LANES'($urandom) & LANES'($urandom);
        rx_commit = LANES'($urandom) & LANES'($urandom);
        rx_drop   = ($urandom % 5) == 0;
        rx_err    = ($urandom % 7) == 0;
        for (int l = 0; l < LANES; l++) begin
          n_tx[l] += tx_slot[l];
          n_rx[l] += rx_commit[l];
        end
        n_rxdrop += rx_drop;
        n_rxerr  += rx_err;
       end
       @(negedge clk);
       tx_slot = '0; rx_commit = '0; rx_drop = 0; rx_err = 0;
      end
      repeat (cycles / 8) begin
        int l;
        repeat (8) @(negedge gclk);
        l = $urandom_range(0, LANES - 1);
        tx_drop_toggle[l] = ~tx_drop_toggle[l];
        n_drop[l]++;
      end
    join
    repeat (4) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // reset values
    check(!loop_en && tx_enable && rx_enable, "control outputs after reset");
    check(tx_lane_en == '1 && rx_lane_en == '1, "lane enables after reset");
    expect_reg(8'h00, 32'h6, "CTRL reset");
    expect_reg(8'h01, 32'h3FF, "TX_LANE_EN reset");
    expect_reg(8'h02, 32'h3FF, "RX_LANE_EN reset");
    // writes
    wr(8'h00, 32'h1);
    check(loop_en && !tx_enable && !rx_enable, "CTRL write reaches outputs");
    expect_reg(8'h00, 32'h1, "CTRL read back");
    wr(8'h01, 32'h2A5);
    wr(8'h02, 32'h15A);
    check(tx_lane_en == 10'h2A5 && rx_lane_en == 10'h15A, "lane enable outputs");
    expect_reg(8'h01, 32'h2A5, "TX_LANE_EN read back");
    expect_reg(8'h02, 32'h15A, "RX_LANE_EN read back");
    wr(8'h00, 32'h6);
    // status
    tx_full = 10'h301; rx_shifted = 1; looped = 1;
    repeat (4) @(negedge clk);
    expect_reg(8'h03, 32'h0003_0301, "STATUS");
    tx_full = '0; rx_shifted = 0; looped = 0;
    // counters
    events(300);
    for (int l = 0; l < LANES; l++) begin
      expect_reg(8'h10 + 8'(l), 32'(n_tx[l]),   $sformatf("TX_FRAMES[%0d]", l));
      expect_reg(8'h20 + 8'(l), 32'(n_rx[l]),   $sformatf("RX_FRAMES[%0d]", l));
      expect_reg(8'h30 + 8'(l), 32'(n_drop[l]), $sformatf("TX_DROPS[%0d]", l));
    end
    expect_reg(8'h04, 32'(n_rxdrop), "RX_DROPS");
    expect_reg(8'h05, 32'(n_rxerr),  "RX_ERRORS");
    expect_reg(8'h1A, 32'h0, "unused address");
    expect_reg(8'h7F, 32'h0, "unused address");
    // clear
    wr(8'h06, 32'h0);
    expect_reg(8'h13, 32'h0, "TX_FRAMES cleared");
    expect_reg(8'h04, 32'h0, "RX_DROPS cleared");
    expect_reg(8'h35, 32'h0, "TX_DROPS cleared");
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
