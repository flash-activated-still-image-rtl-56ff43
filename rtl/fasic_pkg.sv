// fasic_pkg: types and constants shared by the flash-activated still image capturer.
//
// Holds the OPB bus bundles (as structs, one per direction), the capture state
// machine encoding and the BT.656 constants. The address map (GPIO at
// 0x80000300, ZBT memory window 0x80100000-0x801FFFFF) and the BT.656 codes
// (TRS preamble 3FF 000 000, XY = 1 F V H P3 P2 P1 P0, line-count reload values
// 266/313) come from the design description; the OPB signal subset and the
// little-endian [31:0] bit order are this implementation's choice.
package fasic_pkg;

  // ---------------- address map ----------------
  localparam logic [31:0] GPIO_BASE = 32'h8000_0300;
  localparam logic [31:0] EMC_BASE  = 32'h8010_0000;
  localparam logic [31:0] EMC_HIGH  = 32'h801F_FFFF;

  // ---------------- OPB bundles ----------------
  // Master -> bus
  typedef struct packed {
    logic        request;
    logic        select;
    logic        rnw;      // 1 = read, 0 = write
    logic [3:0]  be;
    logic [31:0] abus;
    logic [31:0] dbus;
  } opb_m2b_t;

  // Bus -> master
  typedef struct packed {
    logic        grant;
    logic        xferack;
    logic        errack;
    logic        retry;
    logic [31:0] dbus;
  } opb_b2m_t;

  // Bus -> slave
  typedef struct packed {
    logic        select;
    logic        rnw;
    logic [3:0]  be;
    logic [31:0] abus;
    logic [31:0] dbus;
  } opb_b2s_t;

  // Slave -> bus (OR-combined, all zero when not addressed)
  typedef struct packed {
    logic        xferack;
    logic        errack;
    logic        retry;
    logic [31:0] dbus;
  } opb_s2b_t;

  // ---------------- capture state machine ----------------
  typedef enum logic [2:0] {
    ST_A_RESET   = 3'd0,  // waiting for write_en
    ST_B_LOOK    = 3'd1,  // counting energy, frame counter held at zero
    ST_C_WAITEND = 3'd2,  // flash frame found, wait for its end
    ST_D_WAITSTART = 3'd3,// wait for start of next frame to write
    ST_E_INC     = 3'd4,  // increment frame counter
    ST_F_WRITE   = 3'd5,  // frame being written
    ST_G_DONE    = 3'd6   // all frames written
  } cap_state_t;

  // ---------------- BT.656 ----------------
  localparam int VID_W = 10;                 // decoder sample width
  localparam logic [VID_W-1:0] TRS_FF = 10'h3FF;
  localparam logic [VID_W-1:0] TRS_00 = 10'h000;
  localparam int NTSC_LINES  = 525;
  localparam int PAL_LINES   = 625;
  localparam int NTSC_F_LOAD = 266;          // line number where F goes 0 -> 1
  localparam int PAL_F_LOAD  = 313;
  // Words from EAV XY to SAV XY: NTSC 272 (138 blank samples), PAL 284 (144).
  localparam int FMT_SPLIT   = 278;
  localparam int ACTIVE_WORDS = 1440;        // 720 samples, Cb Y Cr Y ...

  // Protection bits of an XY word for given F, V, H.
  function automatic logic [3:0] xy_protect(input logic f, input logic v, input logic h);
    return {v ^ h, f ^ h, f ^ v, f ^ v ^ h};
  endfunction

endpackage
