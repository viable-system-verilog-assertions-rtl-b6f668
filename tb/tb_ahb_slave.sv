// tb_ahb_slave: self-checking test of the AHB-Lite RAM slave.
//
// Runs the slave test (ahb_slave_check) twice side by side: with no wait
// states, the default, and with two. Each run fills and reads back a
// 64-word slave, checks wait cycles per transfer, the read-only words and
// their two-cycle ERROR, INCR/WRAP bursts with BUSY cycles, and write-to-read
// forwarding. The result sums both runs.
module tb_ahb_slave;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic done0, done2;
  int   checks0, checks2, failures0, failures2;

  ahb_slave_check #(.WS(0)) u_ws0 (.clk(clk), .done(done0), .checks(checks0), .failures(failures0));
  ahb_slave_check #(.WS(2)) u_ws2 (.clk(clk), .done(done2), .checks(checks2), .failures(failures2));

  initial begin
    fork
      begin
        wait (done0 && done2);
        $display("TB_RESULT checks=%0d failures=%0d", checks0 + checks2, failures0 + failures2);
      end
      begin
        repeat (20000) @(posedge clk);
        $display("FAIL: watchdog expired");
        $display("TB_RESULT checks=%0d failures=%0d", checks0 + checks2,
                 failures0 + failures2 + 1);
      end
    join_any
    $finish;
  end
endmodule
