// Shared types and constants of the reconfigurable header-parser chain.
//
// The parser chain moves packets as 64-bit beats with start-of-packet,
// end-of-packet and a byte count for the last beat, qualified by a
// sender-ready / receiver-ready pair (a beat moves on a cycle where both
// are high). The flag names SR, DR, SP, EP and SZ and the 64-bit width come
// from the parser bus definition; the 3-bit byte count (0 meaning all eight
// bytes) and the struct packing are choices of this design.
//
// The package also holds the MainBus function codes and status words, the
// bit layout of the two coarse parser-core configuration images and the
// utility-packet format used by the coarse parser programmer.
package hp_pkg;

  // ---------------- parser bus ----------------
  localparam int unsigned PB_W = 64;   // parser chain data width

  typedef struct packed {
    logic [PB_W-1:0] data;
    logic            sop;
    logic            eop;
    logic [2:0]      sz;    // valid bytes in an eop beat, 0 = 8
  } pbeat_t;

  // ---------------- info bus ----------------
  localparam int unsigned INFO_W   = 256;  // fixed width of a stage's info bus
  localparam int unsigned INFOL_W  = 9;    // width of the info length field (bits)

  // ---------------- MainBus ----------------
  typedef enum logic [4:0] {
    FN_FIFO_STATUS    = 5'h00,
    FN_FIFO_LASTDATA  = 5'h01,
    FN_FIFO_VERSION   = 5'h02,
    FN_NSPI_REQRES    = 5'h03,
    FN_NSPI_READRES_HI= 5'h04,
    FN_NSPI_READRES_LO= 5'h05,
    FN_ICAP_LAST      = 5'h06
  } mb_fn_e;

  localparam logic [31:0] ST_PASSED   = 32'hDA7A2EC1;
  localparam logic [31:0] ST_BLOCKED  = 32'hDA7AFA2F;
  localparam logic [31:0] ST_DROPPED  = 32'hDA7AB10C;
  localparam logic [31:0] ST_NSPI_OK  = 32'h9E7AD2E5;
  localparam logic [31:0] ST_BADOP    = 32'hABADC0DE;

  // packet word travelling from the MainBus into the parser clock domain
  typedef struct packed {
    logic [31:0] data;
    logic        sp;
    logic        ep;
    logic [2:0]  sz;
  } mbpkt_t;

  // ---------------- coarse parser processors ----------------
  localparam int unsigned CFG_W = 128;  // configuration memory of one core

  // processor states; the small core's ENState / EPState fields hold one of
  // these encodings
  typedef enum logic [3:0] {
    PS_OFF   = 4'd0,
    PS_PROG  = 4'd1,
    PS_INIT  = 4'd2,
    PS_IDLE  = 4'd3,
    PS_PARSE = 4'd4,
    PS_PASS  = 4'd5
  } pstate_e;

  // one field: chunk index, right shift from the chunk's low end, width
  // (width 0 stands for all 64 bits)
  typedef struct packed {
    logic [3:0] count;
    logic [5:0] shift;
    logic [5:0] width;
  } fld_t;

  typedef struct packed {
    pstate_e     epstate;   // [127:124]
    pstate_e     enstate;   // [123:120]
    logic [7:0]  res0;      // [119:112]
    logic [3:0]  pid;       // [111:108]
    logic [2:0]  res1;      // [107:105]
    logic        ig;        // [104]
    logic [7:0]  total;     // [103:96]
    fld_t        re2;       // [95:80]
    fld_t        rs2;       // [79:64]
    fld_t        re1;       // [63:48]
    fld_t        rs1;       // [47:32]
    fld_t        eth;       // [31:16]
    logic [15:0] ethertype; // [15:0]
  } small_cfg_t;

  typedef struct packed {
    logic [2:0] count;
    logic [5:0] shift;
    logic [5:0] width;
  } lfld_t;

  typedef struct packed {
    logic [3:0]  pid;       // [127:124]
    logic        ig;        // [123]
    logic [5:0]  cluop;     // [122:117]
    logic [10:0] setval2;   // [116:106]
    logic [15:0] setval1;   // [105:90]
    lfld_t       v2;        // [89:75]
    lfld_t       v1;        // [74:60]
    lfld_t       re;        // [59:45]
    lfld_t       rs;        // [44:30]
    logic [1:0]  ec;        // [29:28]
    logic [5:0]  ethshift;  // [27:22]
    logic [5:0]  ethwidth;  // [21:16]
    logic [15:0] ethertype; // [15:0]
  } large_cfg_t;

  // extract a field of 'width' bits (0 = 64) that starts 'shift' bits above
  // the low end of a chunk
  function automatic logic [63:0] fld_extract(logic [63:0] chunk,
                                              logic [5:0] shift,
                                              logic [5:0] width);
    logic [63:0] m;
    m = (width == 6'd0) ? '1 : ((64'd1 << width) - 64'd1);
    return (chunk >> shift) & m;
  endfunction

  function automatic logic [6:0] fld_len(logic [5:0] width);
    return (width == 6'd0) ? 7'd64 : {1'b0, width};
  endfunction

  // ---------------- coarse programmer utility packets ----------------
  localparam logic [15:0] UTIL_ETYPE = 16'hFFFF;
  localparam logic [3:0]  UOP_BITSTREAM = 4'h0;
  localparam logic [3:0]  UOP_SWITCH    = 4'h1;
  localparam int unsigned NET_CFG_W     = 12;

endpackage
