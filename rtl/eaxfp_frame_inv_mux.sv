// eaxfp_frame_inv_mux: frame inverse multiplexer ("Frame Inverse Mux").
//
// Splits the received XGMII stream (64-bit words, /S/ aligned to lane 0)
// into frames and hands each whole frame to one of the ten Rx_DPRAM lane
// buffers. Lanes are chosen in a fixed cyclic order: each new frame goes
// to the next enabled lane after the previous one that has a free slot,
// so consecutive frames are spread evenly over the lanes and no lane is
// tied to a MAC address. A frame is written word by word from its /S/
// word to the word holding /T/; on that word the lane's slot is
// committed with the frame's length in bytes (/S/ and preamble included,
// /T/ excluded).
//
// A frame is dropped whole (drop pulses once) when no enabled lane has a
// free slot at its /S/, when rx is disabled, or when it runs past the
// maximum stored length; bytes after a drop are ignored up to the next
// /T/. Control characters other than /I/, /S/ (lane 0 of the first word)
// and /T/ inside a frame are stored as they are; err pulses on commit of
// such a frame and the lane buffer signals them as GMII receive errors.
//
// Timing: one word per clock, no back-pressure (XGMII has none); the
// commit is in the same clock as the write of the last word. commit is
// one-hot and also serves as the per-lane frame counter event. The
// cyclic distribution follows the document; the skip-when-full rule and
// the drop rules are this design's.
module eaxfp_frame_inv_mux
  import eaxfp_pkg::*;
#(
  parameter int unsigned LANES     = 10,
  parameter int unsigned MAX_FRAME = 1518,
  localparam int unsigned FWORDS   = frame_words(MAX_FRAME),
  localparam int unsigned WIDX_W   = $clog2(FWORDS),
  localparam int unsigned LANE_W   = $clog2(LANES),
  localparam int unsigned LEN_W    = WIDX_W + 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  input  logic [LANES-1:0]  lane_en,
  input  xgmii64_t          rx_word,
  // lane buffers
  input  logic [LANES-1:0]  wr_free,
  output logic [LANES-1:0]  wr_en,
  output logic [WIDX_W-1:0] wr_widx,
  output xgmii64_t          wr_data,
  output logic [LANES-1:0]  commit,
  output logic [LEN_W-1:0]  wr_len,
  // events
  output logic              drop,
  output logic              err
);
  typedef enum logic [1:0] {S_IDLE, S_RECV, S_DROP} state_t;

  state_t            state;
  logic [LANE_W-1:0] cur;       // lane receiving the frame
  logic [LANE_W-1:0] last;      // lane given the previous frame
  logic [WIDX_W-1:0] widx;
  logic              bad;       // stray control character seen

  logic              is_start, has_term, bad_word;
  logic [2:0]        term_pos;
  logic              found;
  logic [LANE_W-1:0] pick;
  logic [LANES-1:0]  cand;

  assign is_start = rx_word.c[0] && rx_word.d[7:0] == XGMII_START;
  assign cand     = wr_free & lane_en;

  // first /T/ in the word, and any other control character before it
  always_comb begin
    has_term = 1'b0;
    term_pos = '0;
    bad_word = 1'b0;
    for (int k = 0; k < 8; k++) begin
      if (!has_term && rx_word.c[k]) begin
        if (rx_word.d[k*8 +: 8] == XGMII_TERM) begin
          has_term = 1'b1;
          term_pos = 3'(k);
        end else if (!(k == 0 && state == S_IDLE)) begin
          bad_word = 1'b1;
        end
      end
    end
  end

  always_comb begin
    found = 1'b0;
    pick  = last;
    for (int k = 1; k <= LANES; k++) begin
      logic [LANE_W-1:0] l;
      l = LANE_W'((int'(last) + k) % LANES);
      if (!found && cand[l]) begin
        found = 1'b1;
        pick  = l;
      end
    end
  end

  always_comb begin
    wr_en   = '0;
    commit  = '0;
    wr_data = rx_word;
    wr_widx = widx;
    wr_len  = LEN_W'({widx, term_pos});
    drop    = 1'b0;
    err     = 1'b0;
    unique case (state)
      S_IDLE: if (is_start) begin
        wr_widx = '0;
        wr_len  = LEN_W'(term_pos);
        if (enable && found) begin
          wr_en[pick] = 1'b1;
          if (has_term) begin
            commit[pick] = 1'b1;
            err          = bad_word;
          end
        end else begin
          drop = 1'b1;
        end
      end
      S_RECV: begin
        if (has_term) begin
          wr_en[cur]  = 1'b1;
          commit[cur] = 1'b1;
          err         = bad || bad_word;
        end else if (widx == WIDX_W'(FWORDS - 1)) begin
          drop = 1'b1;           // too long for a slot
        end else begin
          wr_en[cur] = 1'b1;
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cur   <= '0;
      last  <= LANE_W'(LANES - 1);
      widx  <= '0;
      bad   <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (is_start) begin
          if (enable && found) begin
            cur   <= pick;
            last  <= pick;
            widx  <= WIDX_W'(1);
            bad   <= bad_word;
            state <= has_term ? S_IDLE : S_RECV;
          end else begin
            state <= has_term ? S_IDLE : S_DROP;
          end
        end
        S_RECV: begin
          widx <= widx + 1'b1;
          bad  <= bad || bad_word;
          if (has_term) state <= S_IDLE;
          else if (widx == WIDX_W'(FWORDS - 1)) state <= S_DROP;
        end
        S_DROP: if (has_term) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  a_commit_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(commit));
endmodule
