// eaxfp_frame_mux: round-robin frame multiplexer ("Frame Mux").
//
// Builds the XGMII transmit stream from the ten Tx_DPRAM lane buffers.
// Lanes are served in a fixed cyclic order; after a lane has sent one
// frame the scheduler moves to the next lane in order that holds a
// complete frame and is enabled, skipping the others, so only backlogged
// lanes use line time. Each frame occupies a slot of exactly SLOT_WORDS
// 64-bit XGMII words: the stored words of the frame, then idle words up
// to the fixed slot length. Because every slot has the same length the
// scheduler needs no frame-length arithmetic, and frames leave in the
// order the round robin picks them, each once.
//
// Timing: a lane is selected one clock before its first word is read;
// the read address rd_widx is shared by all lanes, and the word read
// appears on tx_word two clocks after its address. Back-to-back slots of
// different lanes follow each other with no gap; a lane that is picked
// again right after its own slot waits one idle clock. slot_start pulses
// (one-hot) when a lane is selected, for the frame counters.
//
// The round robin order and the padding to a fixed length follow the
// document. SLOT_WORDS (192 words = 1536 bytes, so that ten lanes of
// maximum-size frames at 1 Gb/s fit in 10 Gb/s) and the one-clock
// turnaround are this design's choices.
module eaxfp_frame_mux
  import eaxfp_pkg::*;
#(
  parameter int unsigned LANES      = 10,
  parameter int unsigned MAX_FRAME  = 1518,
  parameter int unsigned SLOT_WORDS = 192,
  localparam int unsigned FWORDS    = frame_words(MAX_FRAME),
  localparam int unsigned WIDX_W    = $clog2(FWORDS),
  localparam int unsigned LANE_W    = $clog2(LANES),
  localparam int unsigned SW_W      = $clog2(SLOT_WORDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,        // start no new slot while low
  input  logic [LANES-1:0]  lane_en,       // lanes taking part in the round robin
  // lane buffers
  input  logic [LANES-1:0]  avail,
  input  logic [WIDX_W:0]   len     [LANES],
  input  xgmii64_t          rd_data [LANES],
  output logic [WIDX_W-1:0] rd_widx,
  output logic [LANES-1:0]  release_slot,
  // XGMII transmit stream
  output xgmii64_t          tx_word,
  output logic [LANES-1:0]  slot_start
);
  initial begin
    assert (SLOT_WORDS > FWORDS) else $error("SLOT_WORDS must exceed the frame word count");
  end

  logic              busy;
  logic [LANE_W-1:0] cur;
  logic [SW_W-1:0]   widx;
  logic [WIDX_W:0]   cur_len;
  logic              valid_d;
  logic [LANE_W-1:0] lane_d;
  logic              last_word;

  logic              found;
  logic [LANE_W-1:0] pick;
  logic [LANES-1:0]  cand;

  assign last_word = busy && (widx == SW_W'(SLOT_WORDS - 1));
  assign rd_widx   = WIDX_W'(widx);

  // lanes that may be picked now; the lane just finishing is left out
  // because its buffer pointer has not advanced yet
  always_comb begin
    cand = avail & lane_en;
    if (last_word) cand[cur] = 1'b0;
  end

  // next candidate after cur in cyclic order
  always_comb begin
    found = 1'b0;
    pick  = cur;
    for (int k = 1; k <= LANES; k++) begin
      logic [LANE_W-1:0] l;
      l = LANE_W'((int'(cur) + k) % LANES);
      if (!found && cand[l]) begin
        found = 1'b1;
        pick  = l;
      end
    end
  end

  always_comb begin
    release_slot = '0;
    if (last_word) release_slot[cur] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      cur        <= LANE_W'(LANES - 1);
      widx       <= '0;
      cur_len    <= '0;
      valid_d    <= 1'b0;
      lane_d     <= '0;
      tx_word    <= XGMII64_IDLE;
      slot_start <= '0;
    end else begin
      slot_start <= '0;
      if (!busy || last_word) begin
        widx <= '0;
        busy <= 1'b0;
        if (enable && found) begin
          busy             <= 1'b1;
          cur              <= pick;
          cur_len          <= len[pick];
          slot_start[pick] <= 1'b1;
        end
      end else begin
        widx <= widx + 1'b1;
      end
      // read pipeline: address this clock, RAM data next, output after
      valid_d <= busy && ((WIDX_W+1)'(widx) < cur_len);
      lane_d  <= cur;
      tx_word <= valid_d ? rd_data[lane_d] : XGMII64_IDLE;
    end
  end

  for (genvar i = 0; i < LANES; i++) begin : g_chk
    a_release_avail: assert property (@(posedge clk) disable iff (!rst_n)
      release_slot[i] |-> avail[i]);
  end
endmodule
