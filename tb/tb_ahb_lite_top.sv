// tb_ahb_lite_top: end-to-end test of the AHB-Lite bus system.
//
// Runs the whole system (three 1 Ki-word slaves) from the master model,
// with one wait state per OKAY transfer so that waited transfers occur. A reference array of all mapped
// words gives the expected read data. The test performs:
//   * basic operations: ten random writes and read-backs per slave;
//   * the design's burst test cases on every slave: INCR4 at offset 5,
//     INCR8 at 10, INCR16 at 25, with 0 and with 2 BUSY cycles per beat;
//   * WRAP4/8/16 bursts and an undefined-length INCR burst;
//   * writes to the read-only words of each slave (ERROR, word unchanged);
//   * reads and writes past the last slave (ERROR from the default slave);
// checks the wait cycles of each transfer type (WAIT_STATES per OKAY beat,
// one per ERROR), and finally compares the monitor's scoreboard with the
// transfers issued: no failures, and exact evaluation counts for the
// response, burst-count and burst-address checks. Every mechanism (wait
// state, BUSY, wrap, read-only ERROR, unmapped ERROR, each slave, each
// check) must have occurred at least once.
module tb_ahb_lite_top;
  import ahb_pkg::*;

  localparam int unsigned NS  = 3;
  localparam int unsigned SAB = 10;
  localparam int unsigned RO  = 4;
  localparam int unsigned WS  = 1;
  localparam int unsigned WORDS = NS << SAB;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  ahb_if bus (.HCLK(clk), .HRESETn(rst_n));
  ahb_master_bfm bfm (.bus(bus.master));

  logic [15:0] chk_total [NUM_CHECKS];
  logic [15:0] chk_fail  [NUM_CHECKS];

  ahb_lite_top #(.WAIT_STATES(WS)) dut (
    .HCLK(clk), .HRESETn(rst_n),
    .HADDR(bus.HADDR), .HWRITE(bus.HWRITE), .HSIZE(bus.HSIZE), .HBURST(bus.HBURST),
    .HTRANS(bus.HTRANS), .HWDATA(bus.HWDATA),
    .HRDATA(bus.HRDATA), .HREADY(bus.HREADY), .HRESP(bus.HRESP),
    .chk_total(chk_total), .chk_fail(chk_fail));

  int checks = 0;
  int failures = 0;
  logic [31:0] ref_mem [WORDS];
  bit          ref_ok  [WORDS];   // word written since reset (RAM is not reset)

  // expected scoreboard evaluations
  int exp_tot [NUM_CHECKS] = '{default: 0};
  // mechanisms seen
  int n_slave_hits [NS] = '{default: 0};
  int n_wrap = 0;
  int n_undef = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit is_ro(logic [31:0] a);
    return a < WORDS && a[SAB-1:0] < SAB'(RO);
  endfunction

  // One burst (len 1 = SINGLE) with full checking against the reference.
  task automatic xfer(input logic [31:0] addr, input int unsigned len, input int unsigned busy,
                      input bit wrap, input bit write);
    logic [31:0] wd [16];
    logic [31:0] rd [16];
    logic [31:0] a;
    logic [2:0]  hb;
    int unsigned nerr, w0, exp_err, exp_wait;
    hb = bfm.burst_code(len, wrap);
    foreach (wd[i]) wd[i] = $urandom;
    w0 = bfm.n_wait;
    bfm.burst(addr, len, busy, wrap, write, wd, rd, nerr);
    a = addr;
    exp_err = 0;
    exp_wait = 0;
    for (int i = 0; i < int'(len); i++) begin
      if (a >= WORDS) begin
        exp_err++;
        exp_wait += 1;
        exp_tot[CHK_ERROR]++;
      end else if (write && is_ro(a)) begin
        exp_err++;
        exp_wait += 1;
        exp_tot[CHK_RO_ERROR]++;
      end else begin
        exp_wait += WS;
        n_slave_hits[a >> SAB]++;
        if (len == 1) exp_tot[write ? CHK_BASIC_WR : CHK_BASIC_RD]++;
        else          exp_tot[write ? CHK_BURST_WR : CHK_BURST_RD]++;
        if (write) begin
          ref_mem[a] = wd[i];
          ref_ok[a]  = 1'b1;
        end else if (is_ro(a) || ref_ok[a])
          check(rd[i] == (is_ro(a) ? 32'h0 : ref_mem[a]),
                   $sformatf("read %h beat %0d got %h expected %h", addr, i, rd[i], ref_mem[a]));
      end
      a = next_beat_addr(a, hb);
    end
    check(nerr == exp_err, $sformatf("%h len %0d: %0d ERROR beats, expected %0d",
                                     addr, len, nerr, exp_err));
    check(bfm.n_wait - w0 == exp_wait, $sformatf("%h len %0d: %0d wait cycles, expected %0d",
                                                 addr, len, bfm.n_wait - w0, exp_wait));
    if (burst_len(hb) != 0) begin
      // the beat count is not judged for a burst that received an ERROR
      if (exp_err == 0)
        exp_tot[(len == 4) ? CHK_COUNT4 : (len == 8) ? CHK_COUNT8 : CHK_COUNT16]++;
      exp_tot[(len == 4) ? CHK_ADDR4 : (len == 8) ? CHK_ADDR8 : CHK_ADDR16] += len - 1;
    end
    if (wrap) n_wrap++;
    if (hb == HBURST_INCR) n_undef++;
  endtask

  initial begin
    logic [31:0] a;
    for (int i = 0; i < int'(WORDS); i++) begin
      ref_mem[i] = 32'h0;
      ref_ok[i]  = 1'b0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // Basic operations, ten per slave.
    for (int s = 0; s < int'(NS); s++) begin
      logic [31:0] addrs [10];
      for (int i = 0; i < 10; i++) begin
        addrs[i] = 32'((s << SAB) + $urandom_range(RO, (1 << SAB) - 1));
        xfer(addrs[i], 1, 0, 0, 1);
      end
      for (int i = 0; i < 10; i++) xfer(addrs[i], 1, 0, 0, 0);
    end

    // Burst test cases on every slave, with 0 and 2 BUSY cycles.
    for (int s = 0; s < int'(NS); s++)
      for (int busy = 0; busy <= 2; busy += 2) begin
        xfer(32'((s << SAB) + 5),  4,  busy, 0, 1);
        xfer(32'((s << SAB) + 5),  4,  busy, 0, 0);
        xfer(32'((s << SAB) + 10), 8,  busy, 0, 1);
        xfer(32'((s << SAB) + 10), 8,  busy, 0, 0);
        xfer(32'((s << SAB) + 25), 16, busy, 0, 1);
        xfer(32'((s << SAB) + 25), 16, busy, 0, 0);
      end

    // Wrapping bursts and an undefined-length burst.
    xfer(32'h0000_0046, 4, 0, 1, 1);   xfer(32'h0000_0046, 4, 1, 1, 0);
    xfer(32'h0000_0455, 8, 1, 1, 1);   xfer(32'h0000_0455, 8, 0, 1, 0);
    xfer(32'h0000_0a3b, 16, 0, 1, 1);  xfer(32'h0000_0a3b, 16, 0, 1, 0);
    xfer(32'h0000_0300, 5, 0, 0, 1);   xfer(32'h0000_0300, 5, 1, 0, 0);

    // Read-only words of every slave.
    for (int s = 0; s < int'(NS); s++) begin
      a = 32'((s << SAB) + $urandom_range(0, RO - 1));
      xfer(a, 1, 0, 0, 1);
      xfer(a, 1, 0, 0, 0);
    end

    // Past the last slave.
    xfer(32'(WORDS), 1, 0, 0, 1);
    xfer(32'(WORDS + 77), 1, 0, 0, 0);
    xfer(32'h8000_0000, 1, 0, 0, 1);
    // A burst that runs from the last slave into unmapped space.
    xfer(32'(WORDS - 2), 4, 0, 0, 0);

    repeat (4) @(posedge clk);

    // Scoreboard.
    exp_tot[CHK_HREADY] = exp_tot[CHK_ERROR] + exp_tot[CHK_RO_ERROR];
    for (int i = 0; i < NUM_CHECKS; i++) begin
      check(chk_fail[i] == 0, $sformatf("monitor check %0d failed %0d times", i, chk_fail[i]));
      if (i == CHK_BUSY_SEQ || i == CHK_SEQ_WAIT)
        check(chk_total[i] > 0, $sformatf("monitor check %0d never evaluated", i));
      else
        check(int'(chk_total[i]) == exp_tot[i],
              $sformatf("monitor check %0d evaluated %0d expected %0d", i, chk_total[i], exp_tot[i]));
    end

    // Every mechanism happened.
    check(bfm.n_wait > 0, "wait states occurred");
    check(bfm.n_busy > 0, "BUSY transfers occurred");
    check(exp_tot[CHK_ERROR] > 0, "default-slave ERROR occurred");
    check(exp_tot[CHK_RO_ERROR] > 0, "read-only ERROR occurred");
    check(n_wrap > 0, "wrapping bursts occurred");
    check(n_undef > 0, "undefined-length burst occurred");
    for (int s = 0; s < int'(NS); s++) check(n_slave_hits[s] > 0, $sformatf("slave %0d used", s));
    $display("mechanisms: beats=%0d wait_cycles=%0d busy=%0d errors=%0d wraps=%0d",
             bfm.n_beats, bfm.n_wait, bfm.n_busy, bfm.n_err, n_wrap);
    for (int i = 0; i < NUM_CHECKS; i++)
      $display("scoreboard check %2d: total %0d pass %0d fail %0d", i, chk_total[i],
               chk_total[i] - chk_fail[i], chk_fail[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
