// ahb_master_bfm: behavioural AHB-Lite master (bus functional model).
//
// Not synthesizable. Drives the bus through the master modport from tasks:
//   write / read                 one SINGLE transfer
//   burst(addr, len, busy, wrap, write, wdata, rdata, nerr)
//                                a burst of len beats (1 = SINGLE, 4/8/16 =
//                                INCRx or WRAPx, anything else = INCR), with
//                                'busy' BUSY cycles before every SEQ beat
//   burst_write / burst_read     incrementing bursts, as the design's tests use
// Signals change at the falling HCLK edge and are sampled by the design at
// the rising edge. Response signals of the design depend only on its
// registers, so the values seen at the falling edge are those the next
// rising edge sees: a beat completes at that edge when HREADY is high.
// Addresses count words; each beat adds one (wrapping for WRAPx).
// Counters: n_beats (completed NONSEQ/SEQ beats), n_wait (cycles with
// HREADY low), n_busy (BUSY transfers accepted), n_err (beats answered ERROR).
module ahb_master_bfm
  import ahb_pkg::*;
(
  ahb_if.master bus
);

  int unsigned n_beats = 0;
  int unsigned n_wait  = 0;
  int unsigned n_busy  = 0;
  int unsigned n_err   = 0;

  initial begin
    bus.HADDR  = '0;
    bus.HWRITE = 1'b0;
    bus.HSIZE  = HSIZE_WORD;
    bus.HBURST = HBURST_SINGLE;
    bus.HTRANS = HTRANS_IDLE;
    bus.HWDATA = '0;
  end

  function automatic logic [2:0] burst_code(int unsigned len, bit wrap);
    case (len)
      1:  return HBURST_SINGLE;
      4:  return wrap ? HBURST_WRAP4  : HBURST_INCR4;
      8:  return wrap ? HBURST_WRAP8  : HBURST_INCR8;
      16: return wrap ? HBURST_WRAP16 : HBURST_INCR16;
      default: return HBURST_INCR;
    endcase
  endfunction

  task automatic burst(input logic [31:0] addr, input int unsigned len,
                       input int unsigned busy, input bit wrap, input bit write,
                       input logic [31:0] wdata [16], output logic [31:0] rdata [16],
                       output int unsigned nerr);
    logic [2:0]  hb;
    logic [31:0] a_addr;
    int          a, d, busy_left;
    bit          drive_busy;
    hb        = burst_code(len, wrap);
    a         = 0;
    d         = -1;
    a_addr    = addr;
    busy_left = 0;
    nerr      = 0;
    for (int i = 0; i < 16; i++) rdata[i] = '0;
    while (a < int'(len) || d >= 0) begin
      @(negedge bus.HCLK);
      drive_busy = (a > 0 && a < int'(len) && busy_left > 0);
      if (a < int'(len)) begin
        bus.HADDR  = a_addr;
        bus.HWRITE = write;
        bus.HSIZE  = HSIZE_WORD;
        bus.HBURST = hb;
        bus.HTRANS = drive_busy ? HTRANS_BUSY : (a == 0) ? HTRANS_NONSEQ : HTRANS_SEQ;
      end else begin
        bus.HTRANS = HTRANS_IDLE;
        bus.HBURST = HBURST_SINGLE;
      end
      if (d >= 0 && write) bus.HWDATA = wdata[d];
      if (!bus.HREADY) n_wait++;
      else begin
        if (d >= 0) begin
          if (!write) rdata[d] = bus.HRDATA;
          if (bus.HRESP) begin
            nerr++;
            n_err++;
          end
          n_beats++;
        end
        if (a < int'(len) && !drive_busy) begin
          d = a;
          a++;
          a_addr    = next_beat_addr(a_addr, hb);
          busy_left = int'(busy);
        end else begin
          d = -1;
          if (drive_busy) begin
            busy_left--;
            n_busy++;
          end
        end
      end
    end
    @(negedge bus.HCLK);
    bus.HTRANS = HTRANS_IDLE;
  endtask

  task automatic write(input logic [31:0] addr, input logic [31:0] data,
                       output int unsigned nerr);
    logic [31:0] wd [16];
    logic [31:0] rd [16];
    for (int i = 0; i < 16; i++) wd[i] = data;
    burst(addr, 1, 0, 1'b0, 1'b1, wd, rd, nerr);
  endtask

  task automatic read(input logic [31:0] addr, output logic [31:0] data,
                      output int unsigned nerr);
    logic [31:0] wd [16];
    logic [31:0] rd [16];
    for (int i = 0; i < 16; i++) wd[i] = '0;
    burst(addr, 1, 0, 1'b0, 1'b0, wd, rd, nerr);
    data = rd[0];
  endtask

  task automatic burst_write(input logic [31:0] addr, input int unsigned len,
                             input int unsigned busy, input logic [31:0] wdata [16],
                             output int unsigned nerr);
    logic [31:0] rd [16];
    burst(addr, len, busy, 1'b0, 1'b1, wdata, rd, nerr);
  endtask

  task automatic burst_read(input logic [31:0] addr, input int unsigned len,
                            input int unsigned busy, output logic [31:0] rdata [16],
                            output int unsigned nerr);
    logic [31:0] wd [16];
    for (int i = 0; i < 16; i++) wd[i] = '0;
    burst(addr, len, busy, 1'b0, 1'b0, wd, rdata, nerr);
  endtask

endmodule
