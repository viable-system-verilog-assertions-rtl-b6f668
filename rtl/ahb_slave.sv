// ahb_slave: AHB-Lite RAM slave.
//
// The slave holds 2**SLAVE_ADDR_BITS 32-bit words and answers the transfers
// the decoder selects it for. A transfer is accepted in its address phase
// (HSEL, HREADY and HTRANS NONSEQ/SEQ at a rising HCLK edge). In the data
// phase that follows the slave
//   * holds HREADYOUT low for WAIT_STATES cycles, then completes with OKAY;
//     a write stores HWDATA at the completing edge, a read presents the word
//     on HRDATA throughout the data phase;
//   * answers a write to one of the first RO_WORDS words (the read-only
//     region) with the two-cycle AHB-Lite ERROR: HREADYOUT low and HRESP
//     high, then both high. The word is not changed.
// IDLE and BUSY transfers get a zero-wait OKAY. Read-only words read as 0.
//
// Addresses count 32-bit words; HADDR[SLAVE_ADDR_BITS-1:0] picks the word.
// HSIZE and HBURST are accepted but every transfer moves a whole word; the
// master supplies every beat's address, so bursts of all kinds work.
//
// Read data is read from the RAM at the address-phase edge and registered;
// a write completing at that same edge is forwarded, so a read right after
// a write to the same word returns the new value.
//
// From the design: the port list, the RAM, the 1 Ki-word size, the read-only
// first four words and the ERROR for writes to them, wait states on HREADY,
// and a write completing with HREADY high in the cycle after its address
// phase, which makes zero wait states the default. This design's choices:
// the wait-state parameter itself, word addressing of HSIZE-sized
// transfers, the ERROR timing, reset of the control state only (the RAM is
// not reset) and the 0 read from read-only words.
module ahb_slave
  import ahb_pkg::*;
#(
  parameter int unsigned SLAVE_ADDR_BITS = 10,
  parameter int unsigned RO_WORDS        = 4,
  parameter int unsigned WAIT_STATES     = 0
) (
  input  logic              HCLK,
  input  logic              HRESETn,
  input  logic              HSEL,
  input  logic [ADDR_W-1:0] HADDR,
  input  logic              HWRITE,
  input  logic [2:0]        HSIZE,
  input  logic [2:0]        HBURST,
  input  logic [1:0]        HTRANS,
  input  logic              HREADY,
  input  logic [DATA_W-1:0] HWDATA,
  output logic              HREADYOUT,
  output logic              HRESP,
  output logic [DATA_W-1:0] HRDATA
);

  localparam int unsigned WORDS = 2 ** SLAVE_ADDR_BITS;
  localparam int unsigned WCW   = (WAIT_STATES > 0) ? $clog2(WAIT_STATES + 1) : 1;

  typedef enum logic [1:0] {
    DP_NONE,   // no data phase for this slave, or OKAY ready
    DP_WAIT,   // waited OKAY data phase
    DP_ERR1,   // first ERROR cycle (HREADYOUT low)
    DP_ERR2    // second ERROR cycle (HREADYOUT high)
  } dp_state_e;

  logic [DATA_W-1:0] mem [WORDS];

  dp_state_e                  state;
  logic [WCW-1:0]             wcnt;
  logic                       dp_write;   // data phase is an OKAY write
  logic [SLAVE_ADDR_BITS-1:0] dp_idx;
  logic [DATA_W-1:0]          rdata_q;

  logic                       accept;
  logic [SLAVE_ADDR_BITS-1:0] a_idx;
  logic                       a_ro;
  logic                       wr_now;

  assign accept = HSEL && HREADY && HTRANS[1];
  assign a_idx  = HADDR[SLAVE_ADDR_BITS-1:0];
  assign a_ro   = (a_idx < SLAVE_ADDR_BITS'(RO_WORDS));
  // A write data phase completes at this edge.
  assign wr_now = dp_write && HREADY;

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) begin
      state    <= DP_NONE;
      wcnt     <= '0;
      dp_write <= 1'b0;
      dp_idx   <= '0;
      rdata_q  <= '0;
    end else begin
      case (state)
        DP_WAIT: begin
          wcnt <= wcnt - 1'b1;
          if (wcnt == WCW'(1)) state <= DP_NONE;
        end
        DP_ERR1: state <= DP_ERR2;
        default: ;
      endcase

      if (HREADY) begin
        // Previous data phase ends here; sample the next address phase.
        dp_write <= 1'b0;
        if (state == DP_ERR2) state <= DP_NONE;
        if (accept) begin
          dp_idx <= a_idx;
          if (HWRITE && a_ro) begin
            state <= DP_ERR1;
          end else begin
            dp_write <= HWRITE;
            if (WAIT_STATES > 0) begin
              state <= DP_WAIT;
              wcnt  <= WCW'(WAIT_STATES);
            end else begin
              state <= DP_NONE;
            end
            if (!HWRITE) begin
              if (a_ro)                        rdata_q <= '0;
              else if (wr_now && dp_idx == a_idx) rdata_q <= HWDATA;
              else                             rdata_q <= mem[a_idx];
            end
          end
        end
      end
    end
  end

  always_ff @(posedge HCLK) begin
    if (wr_now) mem[dp_idx] <= HWDATA;
  end

  assign HREADYOUT = !(state == DP_WAIT || state == DP_ERR1);
  assign HRESP     = (state == DP_ERR1 || state == DP_ERR2) ? HRESP_ERROR : HRESP_OKAY;
  assign HRDATA    = rdata_q;

  // HSIZE and HBURST are part of the slave's interface but need no logic:
  // every transfer is a whole word at the address the master gives.
  logic unused_ctrl;
  assign unused_ctrl = ^{HSIZE, HBURST, HTRANS[0], HADDR[ADDR_W-1:SLAVE_ADDR_BITS]};

  // An ERROR response is two cycles: HREADYOUT low then high, HRESP high in both.
  a_err_two_cycle: assert property (@(posedge HCLK) disable iff (!HRESETn)
      (HRESP && !HREADYOUT) |=> (HRESP && HREADYOUT));
  a_err_first: assert property (@(posedge HCLK) disable iff (!HRESETn)
      (HRESP && HREADYOUT) |-> $past(HRESP && !HREADYOUT));

endmodule
