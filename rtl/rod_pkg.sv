// rod_pkg: types and constants shared by the ROD slave blocks.
//
// The 32-bit module data words carried from the formatter links through the
// event fragment builder (EFB) to the router are classified by bits [31:29]:
// 001 module header, 100 hit, 010 module trailer, 000 front-end flag/error.
// The hit layout follows the Pixel (FEI3/MCC) mapping: row in [7:0] (0..159),
// column in [12:8] (0..17), MCC number in [15:13], ToT in [23:16], FE number
// in [27:24]; bit 28 is taken as the top bit of the 8-bit chip ID.
//
// The module header layout is this design's own choice, picked so that the
// L1ID / BCID mismatch flags sit in bits 26 and 25 and the ROD-inserted
// header reads 0x21xxBAAD as the Pixel data format prescribes:
//   [31:29]=001 [28:27]=0 [26] L1ID error [25] BCID error [24] ROD inserted
//   [23:20] link  [19:16] skipped trigger count  [15:8] L1ID  [7:0] BCID
// Module trailers carry the triggers-in-flight count in [9:4].
// ROD-inserted empty event trailers: ROD veto 0x4080_lBAD, skipped trigger
// 0x400l_ACCA (both from the Pixel format), module timeout 0x4040_lBAD (own
// choice), l = link number.
package rod_pkg;

  localparam int unsigned WORD_W = 32;

  localparam logic [2:0] TYPE_HDR  = 3'b001;
  localparam logic [2:0] TYPE_HIT  = 3'b100;
  localparam logic [2:0] TYPE_TRL  = 3'b010;
  localparam logic [2:0] TYPE_FLAG = 3'b000;

  // Pixel FEI3 front end geometry
  localparam int unsigned FE_ROWS = 160;
  localparam int unsigned FE_COLS = 18;

  // header bit positions
  localparam int unsigned HDR_L1ERR_BIT  = 26;
  localparam int unsigned HDR_BCERR_BIT  = 25;
  localparam int unsigned HDR_RODINS_BIT = 24;

  // S-Link framing (ATLAS ROD fragment conventions)
  localparam logic [31:0] SLINK_BOF       = 32'hB0F0_0000;
  localparam logic [31:0] SLINK_EOF       = 32'hE0F0_0000;
  localparam logic [31:0] ROD_HDR_MARKER  = 32'hEE12_34EE;
  localparam int unsigned SLINK_HDR_WORDS = 10;
  localparam int unsigned SLINK_TRL_WORDS = 6;
  localparam int unsigned EXT_L1ID_WORD   = 6;   // 0-based index (word 7 of 10)

  typedef enum logic [1:0] {
    EV_MODULE  = 2'd0,
    EV_VETO    = 2'd1,
    EV_SKIP    = 2'd2,
    EV_TIMEOUT = 2'd3
  } ev_kind_e;

  // histogram readout schemes
  typedef enum logic [1:0] {
    RO_LONG_TOT    = 2'd0,
    RO_SHORT_TOT   = 2'd1,
    RO_ONLINE_OCC  = 2'd2,
    RO_OFFLINE_OCC = 2'd3
  } ro_scheme_e;

  // master event information pushed for every L1A
  typedef struct packed {
    logic [7:0]  ecrid;
    logic [23:0] l1id;
    logic [11:0] bcid;
    logic [7:0]  trig_type;
  } ev_info_t;

  // hit handed from the router to the histogrammer
  typedef struct packed {
    logic [7:0] chip;   // {MCC#, FE#}
    logic [7:0] row;
    logic [4:0] col;
    logic [7:0] tot;
  } hit_t;

  function automatic logic [31:0] dummy_header(input logic [3:0] link);
    return {8'h21, link, 4'h0, 16'hBAAD};
  endfunction

  function automatic logic [31:0] dummy_trailer(input ev_kind_e kind, input logic [3:0] link);
    case (kind)
      EV_VETO:    return {16'h4080, link, 12'hBAD};
      EV_SKIP:    return {12'h400, link, 16'hACCA};
      default:    return {16'h4040, link, 12'hBAD};
    endcase
  endfunction

  // classify a module trailer word back into the event kind
  function automatic ev_kind_e trailer_kind(input logic [31:0] w);
    if (w[31:24] == 8'h40 && w[23:16] == 8'h80 && w[11:0] == 12'hBAD) return EV_VETO;
    if (w[31:20] == 12'h400 && w[15:0] == 16'hACCA)                   return EV_SKIP;
    if (w[31:24] == 8'h40 && w[23:16] == 8'h40 && w[11:0] == 12'hBAD) return EV_TIMEOUT;
    return EV_MODULE;
  endfunction

endpackage
