// ahb_pkg: types and constants shared by the AHB-Lite bus system.
//
// Holds the AHB-Lite encodings of HTRANS, HBURST, HSIZE and HRESP, the
// numbering of the monitor's scoreboard checks, and small helper functions
// (burst length, next burst address). The encodings are those of the AMBA
// AHB-Lite specification; the check list follows the rows of the design's
// assertion scoreboard. Addresses in this system count 32-bit words, so a
// burst beat advances the address by one.
package ahb_pkg;

  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_e;

  typedef enum logic [2:0] {
    HBURST_SINGLE = 3'b000,
    HBURST_INCR   = 3'b001,
    HBURST_WRAP4  = 3'b010,
    HBURST_INCR4  = 3'b011,
    HBURST_WRAP8  = 3'b100,
    HBURST_INCR8  = 3'b101,
    HBURST_WRAP16 = 3'b110,
    HBURST_INCR16 = 3'b111
  } hburst_e;

  typedef enum logic [2:0] {
    HSIZE_BYTE  = 3'b000,
    HSIZE_HALF  = 3'b001,
    HSIZE_WORD  = 3'b010
  } hsize_e;

  localparam logic HRESP_OKAY  = 1'b0;
  localparam logic HRESP_ERROR = 1'b1;

  localparam int unsigned ADDR_W = 32;
  localparam int unsigned DATA_W = 32;

  // Scoreboard check numbering (index into the monitor's counter arrays).
  localparam int unsigned CHK_ERROR       = 0;   // unmapped address gets ERROR
  localparam int unsigned CHK_RO_ERROR    = 1;   // write to read-only word gets ERROR
  localparam int unsigned CHK_BASIC_WR    = 2;   // single write gets OKAY
  localparam int unsigned CHK_BASIC_RD    = 3;   // single read gets OKAY
  localparam int unsigned CHK_BURST_WR    = 4;   // burst write beat gets OKAY
  localparam int unsigned CHK_BURST_RD    = 5;   // burst read beat gets OKAY
  localparam int unsigned CHK_HREADY      = 6;   // two-cycle ERROR response
  localparam int unsigned CHK_BUSY_SEQ    = 7;   // BUSY in fixed burst followed by BUSY/SEQ
  localparam int unsigned CHK_SEQ_WAIT    = 8;   // waited transfer holds address/control
  localparam int unsigned CHK_COUNT4      = 9;   // 4-beat burst has 4 beats
  localparam int unsigned CHK_COUNT8      = 10;
  localparam int unsigned CHK_COUNT16     = 11;
  localparam int unsigned CHK_ADDR4       = 12;  // 4-beat burst address sequence
  localparam int unsigned CHK_ADDR8       = 13;
  localparam int unsigned CHK_ADDR16      = 14;
  localparam int unsigned NUM_CHECKS      = 15;

  // Beats of a fixed-length burst; 0 for SINGLE and undefined-length INCR.
  function automatic int unsigned burst_len(logic [2:0] hburst);
    case (hburst)
      HBURST_WRAP4,  HBURST_INCR4:  return 4;
      HBURST_WRAP8,  HBURST_INCR8:  return 8;
      HBURST_WRAP16, HBURST_INCR16: return 16;
      default:                      return 0;
    endcase
  endfunction

  function automatic logic burst_is_wrap(logic [2:0] hburst);
    return (hburst == HBURST_WRAP4) || (hburst == HBURST_WRAP8) ||
           (hburst == HBURST_WRAP16);
  endfunction

  // Word address of the beat after 'addr' in a burst of type 'hburst'.
  function automatic logic [ADDR_W-1:0] next_beat_addr(logic [ADDR_W-1:0] addr,
                                                       logic [2:0]        hburst);
    logic [ADDR_W-1:0] mask;
    logic [ADDR_W-1:0] inc;
    inc = addr + 1'b1;
    if (burst_is_wrap(hburst)) begin
      mask = ADDR_W'(burst_len(hburst) - 1);
      return (addr & ~mask) | (inc & mask);
    end
    return inc;
  endfunction

endpackage
