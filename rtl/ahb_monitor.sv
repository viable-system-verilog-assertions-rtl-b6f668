// ahb_monitor: protocol checker and assertion scoreboard for the AHB-Lite bus.
//
// Observes the bus through the monitor modport and, every HCLK cycle,
// evaluates fifteen checks. Each evaluation adds one to chk_total[i]; each
// violation also adds one to chk_fail[i] (pass count = total - fail). The
// checks, indexed by the CHK_* constants of ahb_pkg:
//   ERROR        a transfer to an address beyond the last slave ends in ERROR
//   RO_ERROR     a write to a read-only word (offset < RO_WORDS) ends in ERROR
//   BASIC_WR/RD  a SINGLE write/read to a mapped, allowed word ends in OKAY
//   BURST_WR/RD  each burst beat to a mapped, allowed word ends in OKAY
//   HREADY       an ERROR completes (HRESP, HREADY high) only after a cycle
//                with HRESP high and HREADY low
//   BUSY_SEQ     a BUSY inside a fixed-length burst is followed by BUSY or SEQ
//   SEQ_WAIT     a NONSEQ/SEQ held by HREADY low keeps address and control
//   COUNT4/8/16  a 4/8/16-beat burst has exactly 4/8/16 beats (evaluated when
//                the next NONSEQ or IDLE is accepted; skipped after an ERROR)
//   ADDR4/8/16   each SEQ beat of a 4/8/16-beat burst has the next address:
//                +1 word for INCRx, wrapping in an x-word block for WRAPx
// Response checks are evaluated at the edge where a data phase completes
// (HREADY high); address checks at the edge where a transfer is accepted.
// Counters are CNT_W bits and wrap. With ASSERT_ON=1 the same rules are also
// stated as SVA properties that report violations as warnings when they
// happen; the simulation goes on and the counters keep the record. With
// ZERO_WAIT_WRITES=1 a further property requires writes to complete
// without wait states.
//
// From the design: the monitor's place on the bus, the list of checks (from
// its assertion scoreboard), the unmapped-address and read-only-word rules.
// This design's reading: the exact rule behind each scoreboard row other
// than those two, evaluating responses in the data phase, and word addressing.
module ahb_monitor
  import ahb_pkg::*;
#(
  parameter int unsigned NUM_SLAVES      = 3,
  parameter int unsigned SLAVE_ADDR_BITS = 10,
  parameter int unsigned RO_WORDS        = 4,
  parameter int unsigned CNT_W           = 16,
  parameter bit          ASSERT_ON       = 1'b1,
  parameter bit          ZERO_WAIT_WRITES = 1'b1
) (
  ahb_if.monitor     bus,
  output logic [CNT_W-1:0] chk_total [NUM_CHECKS],
  output logic [CNT_W-1:0] chk_fail  [NUM_CHECKS]
);

  localparam logic [ADDR_W-1:0] LIMIT = ADDR_W'(NUM_SLAVES) << SLAVE_ADDR_BITS;

  logic clk, rst_n;
  assign clk   = bus.HCLK;
  assign rst_n = bus.HRESETn;

  // ---------------------------------------------------------------- history
  logic [ADDR_W-1:0] p_addr;
  logic [1:0]        p_trans;
  logic              p_write;
  logic [2:0]        p_burst, p_size;
  logic              p_ready, p_resp;

  // data phase in progress
  logic              dp_valid, dp_write;
  logic [ADDR_W-1:0] dp_addr;
  logic [2:0]        dp_burst;

  // open burst
  logic              b_open, b_err;
  logic [2:0]        b_type;
  logic [4:0]        b_beats;
  logic [ADDR_W-1:0] b_last;

  logic [NUM_CHECKS-1:0] eval, fail;

  logic accept, acc_nonseq, acc_seq, acc_idle;
  assign accept     = bus.HREADY && bus.HTRANS[1];
  assign acc_nonseq = bus.HREADY && bus.HTRANS == HTRANS_NONSEQ;
  assign acc_seq    = bus.HREADY && bus.HTRANS == HTRANS_SEQ;
  assign acc_idle   = bus.HREADY && bus.HTRANS == HTRANS_IDLE;

  function automatic int unsigned count_chk(int unsigned len);
    return (len == 4) ? CHK_COUNT4 : (len == 8) ? CHK_COUNT8 : CHK_COUNT16;
  endfunction

  function automatic int unsigned addr_chk(int unsigned len);
    return (len == 4) ? CHK_ADDR4 : (len == 8) ? CHK_ADDR8 : CHK_ADDR16;
  endfunction

  // ---------------------------------------------------------------- checks
  always_comb begin
    logic        dp_unmapped, dp_ro;
    int unsigned blen;
    eval = '0;
    fail = '0;
    dp_unmapped = (dp_addr >= LIMIT);
    dp_ro       = (dp_addr[SLAVE_ADDR_BITS-1:0] < SLAVE_ADDR_BITS'(RO_WORDS));
    blen        = burst_len(b_type);

    // Responses, at the completing edge of a data phase.
    if (dp_valid && bus.HREADY) begin
      if (dp_unmapped) begin
        eval[CHK_ERROR] = 1'b1;
        fail[CHK_ERROR] = !bus.HRESP;
      end else if (dp_write && dp_ro) begin
        eval[CHK_RO_ERROR] = 1'b1;
        fail[CHK_RO_ERROR] = !bus.HRESP;
      end else if (dp_burst == HBURST_SINGLE) begin
        eval[dp_write ? CHK_BASIC_WR : CHK_BASIC_RD] = 1'b1;
        fail[dp_write ? CHK_BASIC_WR : CHK_BASIC_RD] = bus.HRESP;
      end else begin
        eval[dp_write ? CHK_BURST_WR : CHK_BURST_RD] = 1'b1;
        fail[dp_write ? CHK_BURST_WR : CHK_BURST_RD] = bus.HRESP;
      end
    end

    // Two-cycle ERROR.
    if (bus.HRESP && bus.HREADY) begin
      eval[CHK_HREADY] = 1'b1;
      fail[CHK_HREADY] = !(p_resp && !p_ready);
    end

    // BUSY inside a fixed-length burst.
    if (p_trans == HTRANS_BUSY && burst_len(p_burst) != 0 && !b_err && !bus.HRESP) begin
      eval[CHK_BUSY_SEQ] = 1'b1;
      fail[CHK_BUSY_SEQ] = !(bus.HTRANS == HTRANS_BUSY || bus.HTRANS == HTRANS_SEQ);
    end

    // A waited transfer is held (an ERROR lets the master cancel it).
    if (!p_ready && p_trans[1] && !p_resp && !bus.HRESP) begin
      eval[CHK_SEQ_WAIT] = 1'b1;
      fail[CHK_SEQ_WAIT] = (bus.HADDR != p_addr) || (bus.HTRANS != p_trans) ||
                           (bus.HWRITE != p_write) || (bus.HBURST != p_burst) ||
                           (bus.HSIZE != p_size);
    end

    // Beat count, when the burst ends.
    if ((acc_nonseq || acc_idle) && b_open && blen != 0 && !b_err) begin
      eval[count_chk(blen)] = 1'b1;
      fail[count_chk(blen)] = (int'(b_beats) != blen);
    end

    // Address of each SEQ beat.
    if (acc_seq && b_open && blen != 0) begin
      eval[addr_chk(blen)] = 1'b1;
      fail[addr_chk(blen)] = (bus.HADDR != next_beat_addr(b_last, b_type));
    end
  end

  // ---------------------------------------------------------------- state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_addr   <= '0;
      p_trans  <= HTRANS_IDLE;
      p_write  <= 1'b0;
      p_burst  <= '0;
      p_size   <= '0;
      p_ready  <= 1'b1;
      p_resp   <= 1'b0;
      dp_valid <= 1'b0;
      dp_write <= 1'b0;
      dp_addr  <= '0;
      dp_burst <= '0;
      b_open   <= 1'b0;
      b_err    <= 1'b0;
      b_type   <= '0;
      b_beats  <= '0;
      b_last   <= '0;
      for (int i = 0; i < NUM_CHECKS; i++) begin
        chk_total[i] <= '0;
        chk_fail[i]  <= '0;
      end
    end else begin
      p_addr  <= bus.HADDR;
      p_trans <= bus.HTRANS;
      p_write <= bus.HWRITE;
      p_burst <= bus.HBURST;
      p_size  <= bus.HSIZE;
      p_ready <= bus.HREADY;
      p_resp  <= bus.HRESP;

      if (bus.HREADY) begin
        dp_valid <= accept;
        dp_write <= bus.HWRITE;
        dp_addr  <= bus.HADDR;
        dp_burst <= bus.HBURST;
      end

      if (bus.HRESP && b_open) b_err <= 1'b1;
      if (acc_nonseq) begin
        b_open  <= 1'b1;
        b_err   <= 1'b0;
        b_type  <= bus.HBURST;
        b_beats <= 5'd1;
        b_last  <= bus.HADDR;
      end else if (acc_seq && b_open) begin
        b_beats <= b_beats + 1'b1;
        b_last  <= bus.HADDR;
      end else if (acc_idle) begin
        b_open  <= 1'b0;
      end

      for (int i = 0; i < NUM_CHECKS; i++) begin
        if (eval[i]) chk_total[i] <= chk_total[i] + 1'b1;
        if (fail[i]) chk_fail[i]  <= chk_fail[i] + 1'b1;
      end
    end
  end

  logic unused_data;
  assign unused_data = ^{bus.HWDATA, bus.HRDATA};

  // ---------------------------------------------------------------- SVA
  if (ASSERT_ON) begin : g_sva
    default clocking cb @(posedge clk); endclocking
    default disable iff (!rst_n);

    p_error_check: assert property (
      (bus.HREADY && bus.HTRANS[1] && bus.HADDR >= LIMIT) |=> bus.HRESP)
      else $warning("error_check: unmapped address without ERROR");

    p_read_only_error_check: assert property (
      (bus.HREADY && bus.HTRANS[1] && bus.HWRITE && bus.HADDR < LIMIT &&
       bus.HADDR[SLAVE_ADDR_BITS-1:0] < SLAVE_ADDR_BITS'(RO_WORDS)) |=> bus.HRESP)
      else $warning("read_only_error_check: write to read-only word without ERROR");

    p_hready_check: assert property (
      (bus.HRESP && bus.HREADY) |-> $past(bus.HRESP && !bus.HREADY))
      else $warning("hready_check: one-cycle ERROR response");

    p_okay_wait: assert property (
      (bus.HRESP && !bus.HREADY) |=> (bus.HRESP && bus.HREADY))
      else $warning("hready_check: ERROR not completed in the next cycle");

    p_sequential_wait: assert property (
      (!bus.HREADY && bus.HTRANS[1] && !bus.HRESP) |=>
        (bus.HRESP || ($stable(bus.HADDR) && $stable(bus.HTRANS) &&
                       $stable(bus.HWRITE) && $stable(bus.HBURST))))
      else $warning("sequential_wait_check: waited transfer changed");

    p_address_change: assert property (
      (acc_seq && b_open && burst_len(b_type) != 0) |->
        bus.HADDR == next_beat_addr(b_last, b_type))
      else $warning("address_change: wrong burst address");

    // A write is not waited: HREADY is high in the cycle after HWRITE rises
    // (an ERROR, which starts with HREADY low, excepted). Only meaningful
    // when the slaves insert no wait states.
    if (ZERO_WAIT_WRITES) begin : g_zero_wait
      p_basic_write: assert property (
        disable iff (!rst_n || ((bus.HTRANS == HTRANS_IDLE || bus.HTRANS == HTRANS_BUSY) &&
                                bus.HBURST != HBURST_SINGLE))
        $rose(bus.HWRITE) |=> (bus.HREADY || bus.HRESP))
        else $warning("basic_write: write was waited");
    end
  end

endmodule
