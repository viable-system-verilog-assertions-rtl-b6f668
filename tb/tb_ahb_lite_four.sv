// tb_ahb_lite_four: the bus system built with four slaves.
//
// The slave count is a parameter; this test builds the system with
// NUM_SLAVES = 4 and checks that the address map grows with it: a word
// written in every slave's window reads back, the read-only words of the
// fourth slave refuse writes, the first word past the fourth window gets
// the default slave's ERROR, and the monitor judges the new map (no check
// fails, one unmapped access counted).
module tb_ahb_lite_four;
  import ahb_pkg::*;

  localparam int unsigned NS = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  ahb_if bus (.HCLK(clk), .HRESETn(rst_n));
  ahb_master_bfm bfm (.bus(bus.master));

  logic [15:0] chk_total [NUM_CHECKS];
  logic [15:0] chk_fail  [NUM_CHECKS];

  ahb_lite_top #(.NUM_SLAVES(NS)) dut (
    .HCLK(clk), .HRESETn(rst_n),
    .HADDR(bus.HADDR), .HWRITE(bus.HWRITE), .HSIZE(bus.HSIZE), .HBURST(bus.HBURST),
    .HTRANS(bus.HTRANS), .HWDATA(bus.HWDATA),
    .HRDATA(bus.HRDATA), .HREADY(bus.HREADY), .HRESP(bus.HRESP),
    .chk_total(chk_total), .chk_fail(chk_fail));

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

  initial begin
    logic [31:0] d, w [NS];
    int unsigned nerr;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int s = 0; s < int'(NS); s++) begin
      w[s] = $urandom;
      bfm.write(32'((s << 10) + 100), w[s], nerr);
      check(nerr == 0, $sformatf("write slave %0d OKAY", s));
    end
    for (int s = 0; s < int'(NS); s++) begin
      bfm.read(32'((s << 10) + 100), d, nerr);
      check(nerr == 0 && d == w[s], $sformatf("slave %0d read %h expected %h", s, d, w[s]));
    end
    bfm.write(32'((3 << 10) + 2), 32'h5555_aaaa, nerr);
    check(nerr == 1, "read-only word of the fourth slave refuses a write");
    bfm.read(32'(NS << 10), d, nerr);
    check(nerr == 1, "first word past the fourth slave gets ERROR");
    bfm.read(32'((NS << 10) - 1), d, nerr);
    check(nerr == 0, "last word of the fourth slave is mapped");
    repeat (3) @(posedge clk);
    for (int i = 0; i < NUM_CHECKS; i++)
      check(chk_fail[i] == 0, $sformatf("monitor check %0d failed", i));
    check(chk_total[CHK_ERROR] == 1 && chk_total[CHK_RO_ERROR] == 1,
          "monitor counted one unmapped and one read-only access");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
