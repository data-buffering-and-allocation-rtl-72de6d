// gtm_pkg -- types and constants shared by the template-matching accelerator.
//
// The accelerator applies sparse masks ("templates") to an 8-bit image kept
// in four external 32-bit SRAMs.  Each SRAM word holds K = 4 consecutive
// pixels of a row-major image, so pixel n lives in word n/4, byte lane n%4.
// An active point of a mask is stored as its row-major pixel offset from the
// window's anchor pixel plus one tag bit that says whether it belongs to the
// target or to the background half of a template pair.
//
// Numbers that follow the source design: 8-bit pixels, 32-bit memory ports,
// four memory ports, 1 MB per memory, 480x640 frames, 60 active points per
// Round 0 template pair, six Round 0 pairs, 80 active points per Round 1
// template applied four points per cycle, 2 or 5 Round 1 templates per
// target super-group, a 64-entry internal buffer.  The result-word layout,
// the score width and the offset width are this design's own choices.
package gtm_pkg;

  localparam int unsigned PIX_W      = 8;    // bits per pixel
  localparam int unsigned K          = 4;    // pixels per memory word
  localparam int unsigned WORD_W     = PIX_W * K;
  localparam int unsigned ADDR_W     = 18;   // 1 MB / 4 B words
  localparam int unsigned PADDR_W    = ADDR_W + 2;  // pixel address
  localparam int unsigned OFF_W      = 15;   // active-point pixel offset
  // Words left unused after the frame, so that no window, however far its
  // points reach, reads the Round 0 summary that follows.
  localparam int unsigned GUARD_WORDS = 2 ** (OFF_W - 2);
  localparam int unsigned N_MEM      = 4;    // memory ports on the board

  localparam int unsigned R0_POINTS  = 60;   // active points per Round 0 pair
  localparam int unsigned R0_DEPTH   = 64;   // internal buffer / point FIFO depth
  localparam int unsigned R0_PAIRS   = 6;    // Round 0 template pairs
  localparam int unsigned R1_POINTS  = 80;   // active points per Round 1 template
  localparam int unsigned R1_ROWS    = R1_POINTS / N_MEM;  // 20 cycles per template
  localparam int unsigned R1_TPL_MAX = 32;   // Round 1 template store

  localparam int unsigned ACC_W      = 16;   // signed accumulator
  localparam int unsigned SCORE_W    = 13;   // stored, saturated Round 0 score
  localparam int unsigned SG_W       = 3;    // super-group (= best pair) index

  typedef logic [PIX_W-1:0]  pix_t;
  typedef logic [ADDR_W-1:0] waddr_t;
  typedef logic [WORD_W-1:0] word_t;

  // One active point: background/target tag and pixel offset.
  typedef struct packed {
    logic             tgt;
    logic [OFF_W-1:0] off;
  } apoint_t;

  // Request from a unit to a single-port SRAM.  Read data returns on the
  // cycle after a read request.
  typedef struct packed {
    logic   req;
    logic   we;
    waddr_t addr;
    word_t  wdata;
  } mem_req_t;

  // Round 0 summary per pixel, two per memory word (even pixel in the low half).
  typedef struct packed {
    logic [SG_W-1:0]           sg;
    logic signed [SCORE_W-1:0] score;
  } r0_res_t;

  // Host-to-memory image word.
  typedef struct packed {
    waddr_t addr;
    word_t  data;
  } load_word_t;

  // Round 1 result handed back to the host.
  typedef struct packed {
    logic [PADDR_W-1:0]      pix;
    logic [SG_W-1:0]         sg;
    logic [4:0]              tpl;
    logic signed [ACC_W-1:0] score;
  } r1_res_t;

  // Which unit owns the memory ports.
  typedef enum logic [1:0] {
    OWN_HOST = 2'd0,
    OWN_R0   = 2'd1,
    OWN_R1   = 2'd2
  } owner_e;

  // +pixel for a target point, -pixel for a background point.
  function automatic logic signed [ACC_W-1:0] signed_pix(input pix_t p, input logic tgt);
    logic signed [ACC_W-1:0] v;
    v = $signed({{(ACC_W-PIX_W){1'b0}}, p});
    return tgt ? v : -v;
  endfunction

  function automatic logic signed [SCORE_W-1:0] sat_score(input logic signed [ACC_W-1:0] a);
    localparam logic signed [ACC_W-1:0] HI = (1 <<< (SCORE_W-1)) - 1;
    localparam logic signed [ACC_W-1:0] LO = -(1 <<< (SCORE_W-1));
    if (a > HI)      return HI[SCORE_W-1:0];
    else if (a < LO) return LO[SCORE_W-1:0];
    else             return a[SCORE_W-1:0];
  endfunction

endpackage
