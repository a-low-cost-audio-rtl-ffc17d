// lit_pkg: types and constants shared by the LIT audio-computer SoC blocks.
//
// Holds the cache geometry (128 kB, 4 ways, 512 sets, 64-byte lines, sixteen
// 2048x32 data banks, 5-bit tags and a 6-bit true-LRU word per set), the
// power-mode encoding used by the wakeup interrupt controller, the ratio
// encoding of the step-down switched-capacitor network and its switch
// schedule (one entry per switch ck1..ck11 and per ratio). The geometry and
// the switch schedule are the published ones; the encodings are this
// design's own.
package lit_pkg;

  // ---------------- cache geometry ----------------
  localparam int unsigned CACHE_WAYS      = 4;
  localparam int unsigned CACHE_SETS      = 512;   // 512-entry tag and LRU banks
  localparam int unsigned CACHE_LINE_WDS  = 16;    // 32-bit words per line (64 B)
  localparam int unsigned CACHE_TAG_W     = 5;     // Tag[4:0]
  localparam int unsigned CACHE_LRU_W     = 6;     // LRU[5:0], pairwise order bits
  localparam int unsigned CACHE_BANKS     = 16;    // 16 data banks of 2048x32 (8 kB)
  localparam int unsigned CACHE_BANK_DEPTH = 2048;

  // ---------------- power modes ----------------
  typedef enum logic [2:0] {
    PM_ACTIVE   = 3'd0,
    PM_STANDBY  = 3'd1,
    PM_DEEP     = 3'd2,
    PM_WAKE_LDO = 3'd3,   // wakeup: Active LDO on, waiting for it to settle
    PM_WAKE_CLK = 3'd4,   // wakeup: clock generator running
    PM_WAKE_MEM = 3'd5    // wakeup: cache powered, core still gated
  } pmode_e;

  // wake-source bit positions in event masks
  localparam int unsigned EV_TIMER = 0;
  localparam int unsigned EV_GPIO  = 1;
  localparam int unsigned EV_CDC   = 2;

  // ---------------- step-down SCN ----------------
  typedef enum logic [2:0] {
    SCN_R25  = 3'd0,
    SCN_R33  = 3'd1,
    SCN_R50  = 3'd2,
    SCN_R66  = 3'd3,
    SCN_R75  = 3'd4,
    SCN_R100 = 3'd5
  } scn_ratio_e;

  // state of one switch: open, closed, closed in phase 1, closed in phase 2
  typedef enum logic [1:0] {
    SW_OFF = 2'd0,
    SW_ON  = 2'd1,
    SW_P1  = 2'd2,
    SW_P2  = 2'd3
  } sw_mode_e;

  // Switch schedule of the step-down network. Index k = 1..11 is switch ck<k>.
  function automatic sw_mode_e scn_switch_mode(scn_ratio_e r, int unsigned k);
    sw_mode_e m;
    m = SW_OFF;
    unique case (r)
      SCN_R25: case (k)
        1: m = SW_P1;  2: m = SW_P2;  3: m = SW_P2;  4: m = SW_P2;
        5: m = SW_P1;  6: m = SW_P1;  7: m = SW_P2;  8: m = SW_P2;
        9: m = SW_P2; 10: m = SW_P1; 11: m = SW_ON;
        default: m = SW_OFF;
      endcase
      SCN_R33: case (k)
        1: m = SW_P1;  2: m = SW_P2;  3: m = SW_ON;  4: m = SW_P2;
        5: m = SW_P1;  6: m = SW_P1;  7: m = SW_P2;  8: m = SW_P2;
        9: m = SW_P2; 10: m = SW_P1; 11: m = SW_OFF;
        default: m = SW_OFF;
      endcase
      SCN_R50: case (k)
        1: m = SW_P1;  2: m = SW_P2;  3: m = SW_ON;  4: m = SW_ON;
        5: m = SW_OFF; 6: m = SW_OFF; 7: m = SW_ON;  8: m = SW_ON;
        9: m = SW_P2; 10: m = SW_P1; 11: m = SW_ON;
        default: m = SW_OFF;
      endcase
      SCN_R66: case (k)
        1: m = SW_P1;  2: m = SW_P2;  3: m = SW_ON;  4: m = SW_P1;
        5: m = SW_P2;  6: m = SW_P2;  7: m = SW_P1;  8: m = SW_P1;
        9: m = SW_P2; 10: m = SW_P1; 11: m = SW_OFF;
        default: m = SW_OFF;
      endcase
      SCN_R75: case (k)
        1: m = SW_P1;  2: m = SW_P2;  3: m = SW_P1;  4: m = SW_P1;
        5: m = SW_P2;  6: m = SW_P2;  7: m = SW_P1;  8: m = SW_P1;
        9: m = SW_P2; 10: m = SW_P1; 11: m = SW_ON;
        default: m = SW_OFF;
      endcase
      default: case (k)   // SCN_R100
        1: m = SW_ON;  2: m = SW_ON;  3: m = SW_ON;  4: m = SW_ON;
        5: m = SW_OFF; 6: m = SW_OFF; 7: m = SW_ON;  8: m = SW_ON;
        9: m = SW_ON; 10: m = SW_OFF; 11: m = SW_ON;
        default: m = SW_OFF;
      endcase
    endcase
    return m;
  endfunction

endpackage
