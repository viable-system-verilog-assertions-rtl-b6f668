// tb_ahb_lite_replay: replays a recorded test sequence on the bus system.
//
// The sequence is the basic-operation and burst test used to qualify the
// design: ten write/read-back pairs on slave 1 and ten on slave 2 at fixed
// addresses and data, then a four-beat incrementing burst of the values
// 0x3b, 0x3d, 0x3f, 0x41 written and read back at word 6 of slave 1 and at
// word 0x706 of slave 2. Each read must return what was written, each
// transfer must be OKAY, and the monitor must report no failure. Basic
// and burst pass/fail totals per slave are printed at the end. The system
// is built with all parameters at their defaults, so every OKAY transfer
// completes without wait states: that is checked too.
module tb_ahb_lite_replay;
  import ahb_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  ahb_if bus (.HCLK(clk), .HRESETn(rst_n));
  ahb_master_bfm bfm (.bus(bus.master));

  logic [15:0] chk_total [NUM_CHECKS];
  logic [15:0] chk_fail  [NUM_CHECKS];

  ahb_lite_top dut (
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

  localparam logic [31:0] S1_ADDR [10] = '{32'h3e9, 32'h257, 32'h03d, 32'h1b4, 32'h3a2,
                                           32'h0b7, 32'h3e9, 32'h2bd, 32'h257, 32'h2b1};
  localparam logic [31:0] S1_DATA [10] = '{32'h39944c90, 32'h684b2ef0, 32'h36c11d55,
                                           32'h9e39f4a3, 32'hd923ad20, 32'h2856744e,
                                           32'h649a607d, 32'hb5a9a03b, 32'he1da356c,
                                           32'hafd15eef};
  localparam logic [31:0] S2_ADDR [10] = '{32'h5bd, 32'h692, 32'h447, 32'h661, 32'h5cf,
                                           32'h787, 32'h468, 32'h58d, 32'h7a1, 32'h748};
  localparam logic [31:0] S2_DATA [10] = '{32'h6f424c03, 32'h6281acc4, 32'hbbac35c3,
                                           32'hd5579d1b, 32'h524ddf99, 32'h975e6523,
                                           32'h93e2db7f, 32'h0f4f4764, 32'haf224f5b,
                                           32'h713f883f};

  int basic_pass [2] = '{0, 0};
  int burst_pass [2] = '{0, 0};

  initial begin
    logic [31:0] d;
    logic [31:0] wd [16];
    logic [31:0] rd [16];
    int unsigned nerr;
    bit ok;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    for (int s = 0; s < 2; s++)
      for (int i = 0; i < 10; i++) begin
        logic [31:0] a, w;
        a = (s == 0) ? S1_ADDR[i] : S2_ADDR[i];
        w = (s == 0) ? S1_DATA[i] : S2_DATA[i];
        bfm.write(a, w, nerr);
        check(nerr == 0, "basic write OKAY");
        bfm.read(a, d, nerr);
        check(nerr == 0 && d == w, $sformatf("slave %0d address %h written %h read %h",
                                             s + 1, a, w, d));
        if (d == w) basic_pass[s]++;
      end

    foreach (wd[i]) wd[i] = 32'h3b + 2 * i;
    for (int s = 0; s < 2; s++) begin
      logic [31:0] a;
      a = (s == 0) ? 32'h6 : 32'h706;
      bfm.burst_write(a, 4, 0, wd, nerr);
      check(nerr == 0, "burst write OKAY");
      bfm.burst_read(a, 4, 0, rd, nerr);
      ok = (nerr == 0);
      for (int i = 0; i < 4; i++) begin
        check(rd[i] == wd[i], $sformatf("burst slave %0d address %h written %h read %h",
                                        s + 1, a + i, wd[i], rd[i]));
        ok &= (rd[i] == wd[i]);
      end
      if (ok) burst_pass[s]++;
    end

    repeat (3) @(posedge clk);
    check(bfm.n_wait == 0, $sformatf("%0d wait cycles, expected none", bfm.n_wait));
    check(bfm.n_beats == 56, $sformatf("%0d beats completed, expected 56", bfm.n_beats));
    for (int i = 0; i < NUM_CHECKS; i++)
      check(chk_fail[i] == 0, $sformatf("monitor check %0d failed", i));
    check(chk_total[CHK_BASIC_WR] == 20 && chk_total[CHK_BASIC_RD] == 20,
          "monitor counted 20 basic writes and 20 basic reads");
    check(chk_total[CHK_COUNT4] == 4, "monitor counted 4 bursts");
    $display("basic operations: slave 1 %0d/10 pass, slave 2 %0d/10 pass",
             basic_pass[0], basic_pass[1]);
    $display("burst operations: slave 1 %0d/1 pass, slave 2 %0d/1 pass",
             burst_pass[0], burst_pass[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
