// tb_ahb_if: the bus bundle in the master / interface / slave / monitor
// arrangement.
//
// The master model drives the bundle's master modport, one RAM slave (the
// design's default size and wait states) answers on it directly, and the
// monitor watches the monitor modport. The test runs the design's burst
// test cases: INCR4 at address 5, INCR8 at 10 and INCR16 at 25, each
// written and read back with no BUSY cycles, then the same with BUSY
// cycles, and checks the read data, that every bundle signal reaches the
// slave and the monitor, and that the monitor saw no violation.
module tb_ahb_if;
  import ahb_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  ahb_if bus (.HCLK(clk), .HRESETn(rst_n));
  ahb_master_bfm bfm (.bus(bus.master));

  logic rdy;
  ahb_slave u_slave (
    .HCLK(bus.HCLK), .HRESETn(bus.HRESETn), .HSEL(1'b1),
    .HADDR(bus.HADDR), .HWRITE(bus.HWRITE), .HSIZE(bus.HSIZE),
    .HBURST(bus.HBURST), .HTRANS(bus.HTRANS), .HREADY(bus.HREADY),
    .HWDATA(bus.HWDATA), .HREADYOUT(rdy), .HRESP(bus.HRESP),
    .HRDATA(bus.HRDATA));
  assign bus.HREADY = rdy;

  logic [15:0] tot [NUM_CHECKS];
  logic [15:0] fl  [NUM_CHECKS];
  ahb_monitor #(.NUM_SLAVES(1)) u_mon (.bus(bus.monitor), .chk_total(tot), .chk_fail(fl));

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
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] data_burst [16];
    logic [31:0] data_burst_read [16];
    int unsigned nerr;
    int addrs [3] = '{5, 10, 25};
    int lens  [3] = '{4, 8, 16};
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int busy = 0; busy < 2; busy++)
      for (int t = 0; t < 3; t++) begin
        foreach (data_burst[i]) data_burst[i] = $urandom;
        bfm.burst_write(32'(addrs[t]), lens[t], busy, data_burst, nerr);
        check(nerr == 0, "burst write OKAY");
        bfm.burst_read(32'(addrs[t]), lens[t], busy, data_burst_read, nerr);
        check(nerr == 0, "burst read OKAY");
        for (int i = 0; i < lens[t]; i++)
          check(data_burst_read[i] == data_burst[i],
                $sformatf("BUSY %0d BURST%0d beat %0d: wrote %h read %h", busy, lens[t], i,
                          data_burst[i], data_burst_read[i]));
      end
    // Address and control reach the slave side through the bundle.
    @(negedge clk);
    bus.HADDR = 32'h0000_0155; bus.HWRITE = 1'b1; bus.HTRANS = HTRANS_NONSEQ;
    bus.HBURST = HBURST_SINGLE; bus.HSIZE = HSIZE_WORD;
    #1;
    check(u_slave.HADDR == 32'h155 && u_slave.HWRITE && u_slave.HTRANS == HTRANS_NONSEQ,
          "bundle carries address and control");
    @(negedge clk);
    bus.HTRANS = HTRANS_IDLE;
    bus.HWDATA = 32'hcafe_f00d;
    while (!bus.HREADY) @(negedge clk);
    @(negedge clk);
    bfm.read(32'h155, data_burst_read[0], nerr);
    check(data_burst_read[0] == 32'hcafe_f00d, "write through the bundle");
    repeat (2) @(posedge clk);
    for (int i = 0; i < NUM_CHECKS; i++) check(fl[i] == 0, $sformatf("monitor check %0d", i));
    check(tot[CHK_COUNT4] == 4 && tot[CHK_COUNT8] == 4 && tot[CHK_COUNT16] == 4,
          "monitor saw every burst");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
