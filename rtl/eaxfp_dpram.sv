// eaxfp_dpram: simple dual-port RAM with independent write and read clocks.
//
// One write port (wr_clk) and one read port (rd_clk) of WIDTH bits and
// DEPTH words, as found in FPGA block RAM. The read is registered: the
// word at rd_addr appears on rd_data one rd_clk edge later. The contents
// are not reset; the framer reads only words it has written.
module eaxfp_dpram #(
  parameter int unsigned WIDTH = 72,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             wr_clk,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_clk,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge wr_clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge rd_clk) begin
    rd_data <= mem[rd_addr];
  end
endmodule
