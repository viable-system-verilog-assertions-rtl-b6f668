// tb_ahb_default_slave: self-checking test of the default (ERROR) slave.
//
// Drives HSEL, HTRANS and HREADY directly and compares HREADYOUT and HRESP
// each cycle with a reference model of the two-cycle ERROR response: an
// accepted NONSEQ/SEQ gives (low, ERROR) then (high, ERROR); anything else
// gives (high, OKAY). HREADY is fed back from HREADYOUT as on the bus,
// except in random cycles where another slave would hold it low.
module tb_ahb_default_slave;
  import ahb_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       hsel, hready_other, hready, hreadyout, hresp;
  logic [1:0] htrans;

  ahb_default_slave dut (.HCLK(clk), .HRESETn(rst_n), .HSEL(hsel), .HTRANS(htrans),
                         .HREADY(hready), .HREADYOUT(hreadyout), .HRESP(hresp));
  assign hready = hreadyout && hready_other;

  int checks = 0;
  int failures = 0;
  int errors_seen = 0;
  int state = 0;   // reference: 0 OKAY, 1 first ERROR cycle, 2 second
  int nxt;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hsel = 0; htrans = HTRANS_IDLE; hready_other = 1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      checks++;
      if (hreadyout !== (state != 1) || hresp !== (state != 0)) begin
        failures++;
        $display("FAIL: cycle %0d state %0d hreadyout %b hresp %b", cyc, state, hreadyout, hresp);
      end
      if (state == 1) errors_seen++;
      hsel = ($urandom_range(0, 3) != 0);
      htrans = 2'($urandom_range(0, 3));
      hready_other = (state != 0) || ($urandom_range(0, 7) != 0);
      #1;
      // reference update from the values the next edge samples
      if (state == 1) nxt = 2;
      else nxt = (hsel && hready && htrans[1]) ? 1 : 0;
      @(posedge clk);
      state = nxt;
    end
    checks++;
    if (errors_seen < 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
