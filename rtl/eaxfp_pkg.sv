// eaxfp_pkg: types and constants shared by the EAXFP framer.
//
// The framer moves Ethernet frames between ten GMII lanes (8 bits at
// 125 MHz each) and one XGMII (32 bits DDR at 156.25 MHz). Inside the
// XGMII clock domain the XGMII is carried as one 64-bit word per clock,
// eight byte lanes with one control bit each, lane 0 first on the wire.
// The control characters are the IEEE 802.3 clause 46 codes. The slot
// pointers that cross between the two clock domains are Gray coded; the
// conversion functions are here.
package eaxfp_pkg;

  // XGMII control characters (802.3 clause 46)
  localparam logic [7:0] XGMII_IDLE  = 8'h07;
  localparam logic [7:0] XGMII_START = 8'hFB;
  localparam logic [7:0] XGMII_TERM  = 8'hFD;
  localparam logic [7:0] XGMII_ERROR = 8'hFE;

  // Ethernet preamble byte on GMII
  localparam logic [7:0] GMII_PREAMBLE = 8'h55;

  // One internal XGMII column pair: 8 byte lanes, lane 0 in d[7:0]
  typedef struct packed {
    logic [7:0]  c;   // control flag per byte lane
    logic [63:0] d;   // data, byte lane k in d[8k+7:8k]
  } xgmii64_t;

  localparam xgmii64_t XGMII64_IDLE = '{c: 8'hFF, d: {8{XGMII_IDLE}}};

  // Word count limit of a stored frame: preamble+SFD (8 bytes) plus the
  // frame, plus the terminate character, rounded up to whole 64-bit words.
  function automatic int unsigned frame_words(input int unsigned max_frame);
    return (8 + max_frame + 1 + 7) / 8;
  endfunction

  function automatic logic [7:0] bin2gray(input logic [7:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [7:0] gray2bin(input logic [7:0] g);
    logic [7:0] b;
    b[7] = g[7];
    for (int i = 6; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

endpackage
