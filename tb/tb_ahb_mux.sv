// tb_ahb_mux: self-checking test of the response multiplexer.
//
// Drives random per-slave read data, ready and response, and a random
// MUX_SEL each cycle. A reference copy of the select is taken at every
// rising edge where the multiplexer's own HREADY output is high (the end of
// an address phase); the outputs must then equal that slave's signals
// until the next such edge, including cycles where the slave holds HREADY
// low. Also checks that after reset the default slave is selected.
module tb_ahb_mux;
  import ahb_pkg::*;

  localparam int unsigned NS    = 3;
  localparam int unsigned SEL_W = $clog2(NS + 1);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [SEL_W-1:0] mux_sel;
  logic [31:0]      s_hrdata [NS+1];
  logic [NS:0]      s_hreadyout, s_hresp;
  logic [31:0]      hrdata;
  logic             hready, hresp;

  ahb_mux dut (.HCLK(clk), .HRESETn(rst_n), .MUX_SEL(mux_sel), .s_hrdata(s_hrdata),
               .s_hreadyout(s_hreadyout), .s_hresp(s_hresp),
               .HRDATA(hrdata), .HREADY(hready), .HRESP(hresp));

  int checks = 0;
  int failures = 0;
  int held = 0;          // cycles in which a low HREADY held the select
  int ref_sel = NS;
  int nxt;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic randomize_inputs();
    mux_sel = SEL_W'($urandom_range(0, NS));
    for (int k = 0; k <= NS; k++) begin
      s_hrdata[k]    = $urandom;
      s_hreadyout[k] = ($urandom_range(0, 2) != 0);
      s_hresp[k]     = ($urandom_range(0, 3) == 0);
    end
  endtask

  initial begin
    randomize_inputs();
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (hrdata !== s_hrdata[NS] || hready !== s_hreadyout[NS]) begin
      failures++;
      $display("FAIL: reset select is not the default slave");
    end
    @(negedge clk) rst_n = 1;
    #1;
    nxt = hready ? int'(mux_sel) : ref_sel;
    @(posedge clk);
    ref_sel = nxt;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      randomize_inputs();
      #1;
      checks++;
      if (hrdata !== s_hrdata[ref_sel] || hready !== s_hreadyout[ref_sel] ||
          hresp !== s_hresp[ref_sel]) begin
        failures++;
        $display("FAIL: cycle %0d selected %0d", cyc, ref_sel);
      end
      nxt = hready ? int'(mux_sel) : ref_sel;
      if (!hready) held++;
      @(posedge clk);
      ref_sel = nxt;
    end
    checks++;
    if (held < 50) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
