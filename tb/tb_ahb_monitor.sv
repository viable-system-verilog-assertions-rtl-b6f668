// tb_ahb_monitor: self-checking test of the protocol monitor / scoreboard.
//
// Part A: legal traffic. The master model talks to one RAM slave (one wait
// state) through an ahb_if bundle watched by a monitor with its SVA
// enabled. The test counts the transfers it issues and expects exactly
// those numbers of evaluations, and no failure, in the scoreboard.
// Part B: a second bundle is driven cycle by cycle by the test itself,
// slave side included, with deliberate violations of every rule that can be
// broken from outside (unmapped OKAY, read-only OKAY, single-cycle ERROR,
// a waited transfer that changes, a short burst, a skipped burst address,
// BUSY followed by NONSEQ), plus legal wrapping and 16-beat bursts. Its
// monitor has the SVA switched off; evaluations and failures per check are
// compared with counts worked out by hand for the script.
module tb_ahb_monitor;
  import ahb_pkg::*;

  localparam int unsigned SAB = 6;
  localparam int unsigned RO  = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- part A
  ahb_if bus_a (.HCLK(clk), .HRESETn(rst_n));
  ahb_master_bfm bfm (.bus(bus_a.master));
  logic rdy_a;
  ahb_slave #(.SLAVE_ADDR_BITS(SAB), .RO_WORDS(RO), .WAIT_STATES(1)) u_slave (
    .HCLK(clk), .HRESETn(rst_n), .HSEL(1'b1),
    .HADDR(bus_a.HADDR), .HWRITE(bus_a.HWRITE), .HSIZE(bus_a.HSIZE),
    .HBURST(bus_a.HBURST), .HTRANS(bus_a.HTRANS), .HREADY(bus_a.HREADY),
    .HWDATA(bus_a.HWDATA), .HREADYOUT(rdy_a), .HRESP(bus_a.HRESP),
    .HRDATA(bus_a.HRDATA));
  assign bus_a.HREADY = rdy_a;

  logic [15:0] tot_a [NUM_CHECKS];
  logic [15:0] fail_a [NUM_CHECKS];
  ahb_monitor #(.NUM_SLAVES(1), .SLAVE_ADDR_BITS(SAB), .RO_WORDS(RO), .ASSERT_ON(1'b1),
                .ZERO_WAIT_WRITES(1'b0))
    u_mon_a (.bus(bus_a.monitor), .chk_total(tot_a), .chk_fail(fail_a));

  // ---------------------------------------------------------------- part B
  ahb_if bus_b (.HCLK(clk), .HRESETn(rst_n));
  logic [15:0] tot_b [NUM_CHECKS];
  logic [15:0] fail_b [NUM_CHECKS];
  ahb_monitor #(.NUM_SLAVES(2), .SLAVE_ADDR_BITS(SAB), .RO_WORDS(RO), .ASSERT_ON(1'b0))
    u_mon_b (.bus(bus_b.monitor), .chk_total(tot_b), .chk_fail(fail_b));

  task automatic cyc(input logic [1:0] trans, input int addr, input bit write,
                     input logic [2:0] burst, input bit ready, input bit resp);
    @(negedge clk);
    bus_b.HTRANS = trans;
    bus_b.HADDR  = 32'(addr);
    bus_b.HWRITE = write;
    bus_b.HBURST = burst;
    bus_b.HSIZE  = HSIZE_WORD;
    bus_b.HREADY = ready;
    bus_b.HRESP  = resp;
    bus_b.HWDATA = $urandom;
    bus_b.HRDATA = $urandom;
  endtask

  task automatic idle(input int n);
    repeat (n) cyc(HTRANS_IDLE, 0, 0, HBURST_SINGLE, 1, 0);
  endtask

  task automatic expect_counts(input string tag, ref logic [15:0] tot [NUM_CHECKS],
                               ref logic [15:0] fl [NUM_CHECKS],
                               input int et [NUM_CHECKS], input int ef [NUM_CHECKS]);
    for (int i = 0; i < NUM_CHECKS; i++) begin
      if (et[i] >= 0)
        check(int'(tot[i]) == et[i], $sformatf("%s check %0d evaluated %0d expected %0d",
                                               tag, i, tot[i], et[i]));
      else
        check(tot[i] > 0, $sformatf("%s check %0d never evaluated", tag, i));
      check(int'(fl[i]) == ef[i], $sformatf("%s check %0d failed %0d expected %0d",
                                            tag, i, fl[i], ef[i]));
    end
  endtask

  initial begin
    logic [31:0] wd [16];
    logic [31:0] rd [16];
    logic [31:0] d;
    logic [31:0] ref_w [64];
    int unsigned nerr;
    int et [NUM_CHECKS];
    int ef [NUM_CHECKS];

    bus_b.HTRANS = HTRANS_IDLE; bus_b.HADDR = '0; bus_b.HWRITE = 0;
    bus_b.HBURST = HBURST_SINGLE; bus_b.HSIZE = HSIZE_WORD; bus_b.HREADY = 1;
    bus_b.HRESP = 0; bus_b.HWDATA = '0; bus_b.HRDATA = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // ---------------- part A: legal traffic
    for (int i = 10; i < 15; i++) begin
      ref_w[i] = $urandom;
      bfm.write(32'(i), ref_w[i], nerr);
    end
    for (int i = 10; i < 15; i++) begin
      bfm.read(32'(i), d, nerr);
      check(d == ref_w[i], "part A read data");
    end
    bfm.write(32'd1, 32'h1, nerr);
    check(nerr == 1, "part A read-only write answered ERROR");
    bfm.write(32'd2, 32'h2, nerr);
    foreach (wd[i]) wd[i] = $urandom;
    bfm.burst(32'd20, 4, 1, 1'b0, 1'b1, wd, rd, nerr);
    bfm.burst(32'd20, 4, 0, 1'b0, 1'b0, wd, rd, nerr);
    for (int i = 0; i < 4; i++) check(rd[i] == wd[i], "part A INCR4 data");
    bfm.burst(32'd22, 8, 2, 1'b1, 1'b1, wd, rd, nerr);
    bfm.burst(32'd22, 8, 0, 1'b1, 1'b0, wd, rd, nerr);
    for (int i = 0; i < 8; i++) check(rd[i] == wd[i], "part A WRAP8 data");
    bfm.burst(32'd30, 16, 0, 1'b0, 1'b1, wd, rd, nerr);
    bfm.burst(32'd30, 16, 0, 1'b0, 1'b0, wd, rd, nerr);
    for (int i = 0; i < 16; i++) check(rd[i] == wd[i], "part A INCR16 data");
    repeat (3) @(posedge clk);
    et = '{0, 2, 5, 5, 28, 28, 2, -1, -1, 2, 2, 2, 6, 14, 30};
    // -1: evaluated at least once (BUSY and wait counts depend on timing);
    // no unmapped address exists with one slave decoding every address.
    ef = '{default: 0};
    expect_counts("A", tot_a, fail_a, et, ef);

    // ---------------- part B: scripted bus with violations
    idle(2);
    // unmapped address answered OKAY
    cyc(HTRANS_NONSEQ, 200, 0, HBURST_SINGLE, 1, 0);
    idle(1);
    // unmapped address answered by a proper two-cycle ERROR
    cyc(HTRANS_NONSEQ, 300, 1, HBURST_SINGLE, 1, 0);
    cyc(HTRANS_IDLE, 0, 0, HBURST_SINGLE, 0, 1);
    cyc(HTRANS_IDLE, 0, 0, HBURST_SINGLE, 1, 1);
    // single write answered by a one-cycle ERROR
    cyc(HTRANS_NONSEQ, 10, 1, HBURST_SINGLE, 1, 0);
    cyc(HTRANS_IDLE, 0, 0, HBURST_SINGLE, 1, 1);
    // write to a read-only word (slave 1, offset 2) answered OKAY
    cyc(HTRANS_NONSEQ, 66, 1, HBURST_SINGLE, 1, 0);
    idle(1);
    // waited transfer changes its address
    cyc(HTRANS_NONSEQ, 20, 0, HBURST_SINGLE, 1, 0);
    cyc(HTRANS_NONSEQ, 21, 0, HBURST_SINGLE, 0, 0);
    cyc(HTRANS_NONSEQ, 22, 0, HBURST_SINGLE, 1, 0);
    idle(1);
    // INCR4 with a skipped address, three beats, BUSY then NONSEQ
    cyc(HTRANS_NONSEQ, 40, 0, HBURST_INCR4, 1, 0);
    cyc(HTRANS_SEQ,    41, 0, HBURST_INCR4, 1, 0);
    cyc(HTRANS_SEQ,    43, 0, HBURST_INCR4, 1, 0);
    cyc(HTRANS_BUSY,   44, 0, HBURST_INCR4, 1, 0);
    cyc(HTRANS_NONSEQ, 50, 0, HBURST_SINGLE, 1, 0);
    idle(1);
    // legal WRAP8 read starting at 6: 6 7 0 1 2 3 4 5
    cyc(HTRANS_NONSEQ, 6, 0, HBURST_WRAP8, 1, 0);
    for (int i = 7; i < 14; i++) cyc(HTRANS_SEQ, i % 8, 0, HBURST_WRAP8, 1, 0);
    idle(1);
    // legal INCR16 write at 70
    cyc(HTRANS_NONSEQ, 70, 1, HBURST_INCR16, 1, 0);
    for (int i = 71; i < 86; i++) cyc(HTRANS_SEQ, i, 1, HBURST_INCR16, 1, 0);
    idle(3);
    //      ERR RO BW BR BUW BUR HRDY BSY SQW C4 C8 C16 A4 A8 A16
    et = '{ 2,  1, 1, 3, 16, 11, 2,   1,  1,  1, 1, 1,  2, 7, 15};
    ef = '{ 1,  1, 1, 0, 0,  0,  1,   1,  1,  1, 0, 0,  1, 0, 0};
    expect_counts("B", tot_b, fail_b, et, ef);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
