// eaxfp_sync: two-flop synchronizer for a bus of WIDTH bits.
//
// Used only for Gray-coded slot pointers and toggle signals, where at
// most one bit changes at a time, so the bus may be synchronized bit by
// bit. Output follows the input two dst_clk edges later. Reset value 0.
module eaxfp_sync #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             dst_clk,
  input  logic             dst_rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] meta;

  always_ff @(posedge dst_clk or negedge dst_rst_n) begin
    if (!dst_rst_n) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
