// ucf_pkg: constants and types shared by the Unified Communication Framework
// (UCF) link ends and the PENeLOPE signal detection unit.
//
// A UCF link carries 32-bit words, each byte with a CharIsK flag, over an
// 8b/10b coded serial lane. Words are written least significant byte first:
// x"4567BCDC" with CharIsK 4'b0011 has the K characters DC (K28.6) and BC
// (K28.5) in bytes 0 and 1. The control words below are the patterns of the
// UCF transport layer; the CharIsK values of the SOF/EOF words, the fill
// character and the alignment word taken from the initialization figure are
// choices of this implementation and are documented at each constant.
// Not every module uses every constant, so a lint of one module with this
// package reports the others as unused parameters.
package ucf_pkg;

  // One beat of the user interface (AXI-stream like: valid, ready, keep, last, data).
  typedef struct packed {
    logic        valid;
    logic [31:0] data;
    logic [3:0]  keep;
    logic        last;
  } axis_t;

  localparam axis_t AXIS_IDLE = '{valid: 1'b0, data: 32'h0, keep: 4'h0, last: 1'b0};

  // A 32-bit word on the link with its CharIsK flags.
  typedef struct packed {
    logic [31:0] data;
    logic [3:0]  k;
  } lword_t;

  // Initialization. The text names x"BCDCBCDC" for alignment, the figure of
  // the initialization sequence prints x"FCDCBCDC"; the printed value is used.
  localparam lword_t W_ALIGN    = '{data: 32'hFCDC_BCDC, k: 4'b1111};
  localparam lword_t W_POLARITY = '{data: 32'h4567_BCDC, k: 4'b0011};
  localparam lword_t W_CONSTHDR = '{data: 32'hDCDC_BCDC, k: 4'b1111};
  // Idle / activation pattern.
  localparam lword_t W_IDLE     = '{data: 32'h01FC_BCDC, k: 4'b0111};
  // TCS start and end of frame (end of frame is shared by all frames).
  localparam lword_t W_TCS_SOF  = '{data: 32'hA6DC_A6DC, k: 4'b0101};
  localparam lword_t W_EOF      = '{data: 32'hA3DC_BCDC, k: 4'b0111};
  // Clock correction pattern.
  localparam lword_t W_CCP      = '{data: 32'hFCFC_BCDC, k: 4'b1111};

  // USP start of frame: {id, 5C, BC, DC}, CharIsK 0111.
  localparam logic [23:0] USP_SOF_LOW = 24'h5C_BCDC;
  // Veto word: {16 veto bits, 5C, DC}, CharIsK 0011.
  localparam logic [15:0] VETO_LOW = 16'h5C_DC;
  // Fill character for bytes without keep (K28.0).
  localparam logic [7:0]  K_FILL = 8'h1C;

  localparam int VETO_BITS = 64;

  function automatic lword_t usp_sof(input logic [7:0] id);
    return '{data: {id, USP_SOF_LOW}, k: 4'b0111};
  endfunction

  function automatic lword_t veto_word(input logic [15:0] bits);
    return '{data: {bits, VETO_LOW}, k: 4'b0011};
  endfunction

  function automatic logic lw_eq(input lword_t a, input lword_t b);
    return (a.data == b.data) && (a.k == b.k);
  endfunction

  // Signal detection parameters of a processing unit (table of user
  // adjustable parameters in the SDU description).
  typedef struct packed {
    logic [4:0] delay;          // iDelay
    logic [3:0] factor;         // iFactor
    logic [3:0] nmb_samples;    // iNMBSamples
    logic [7:0] nmb_samples_fr; // iNMBSamplesFr
    logic [3:0] avg_pow;        // iAveragePower
  } pu_cfg_t;

  // Typical setting: delay 5, factor 5, 3 samples, 30 samples per frame,
  // 2^12 samples averaged.

endpackage
