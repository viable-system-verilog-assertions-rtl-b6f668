// ahb_slave_check: one self-checking run on the AHB-Lite RAM slave.
//
// Used by tb_ahb_slave, once per wait-state setting. One slave with WS wait
// states is wired straight to the master model:
// HSEL tied high and its HREADYOUT returned as HREADY. The test writes and
// reads random words and checks them against a reference array, checks the
// number of wait cycles per transfer, the two-cycle ERROR and unchanged
// contents for writes to the read-only words, zero reads from them,
// INCR4/8/16 and WRAP bursts with BUSY cycles, and a read issued in the
// data phase of a write to the same word (write forwarding). When done it
// raises 'done' with its check and failure counts.
module ahb_slave_check
  import ahb_pkg::*;
#(
  parameter int unsigned WS  = 0,
  parameter int unsigned SAB = 6,    // 64-word RAM keeps the test short
  parameter int unsigned RO  = 4
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);

  logic rst_n = 1'b0;

  ahb_if bus (.HCLK(clk), .HRESETn(rst_n));
  ahb_master_bfm bfm (.bus(bus.master));

  logic hreadyout;
  ahb_slave #(.SLAVE_ADDR_BITS(SAB), .RO_WORDS(RO), .WAIT_STATES(WS)) dut (
    .HCLK(clk), .HRESETn(rst_n), .HSEL(1'b1),
    .HADDR(bus.HADDR), .HWRITE(bus.HWRITE), .HSIZE(bus.HSIZE),
    .HBURST(bus.HBURST), .HTRANS(bus.HTRANS), .HREADY(bus.HREADY),
    .HWDATA(bus.HWDATA), .HREADYOUT(hreadyout), .HRESP(bus.HRESP),
    .HRDATA(bus.HRDATA));
  assign bus.HREADY = hreadyout;

  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
  end
  logic [31:0] ref_mem [2**SAB];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL (%0d wait states): %s", WS, what);
    end
  endtask

  initial begin
    logic [31:0] d, a;
    logic [31:0] wd [16];
    logic [31:0] rd [16];
    int unsigned nerr, w0, c0;
    for (int i = 0; i < 2**SAB; i++) ref_mem[i] = 32'h0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check(bus.HREADY === 1'b1 && bus.HRESP === 1'b0, "idle after reset is ready/OKAY");

    // Fill every writable word, then read back.
    for (int i = RO; i < 2**SAB; i++) begin
      d = $urandom;
      ref_mem[i] = d;
      w0 = bfm.n_wait;
      bfm.write(32'(i), d, nerr);
      check(nerr == 0, $sformatf("write %0d OKAY", i));
      check(bfm.n_wait - w0 == WS, $sformatf("write %0d took %0d wait states", i, bfm.n_wait - w0));
    end
    for (int i = 0; i < 2**SAB; i++) begin
      w0 = bfm.n_wait;
      bfm.read(32'(i), d, nerr);
      check(nerr == 0 && d == ref_mem[i],
            $sformatf("read %0d got %h expected %h", i, d, ref_mem[i]));
      check(bfm.n_wait - w0 == WS, "read wait states");
    end

    // Read-only words: ERROR, one low cycle, contents unchanged.
    for (int i = 0; i < RO; i++) begin
      w0 = bfm.n_wait;
      bfm.write(32'(i), 32'hdead_beef, nerr);
      check(nerr == 1, $sformatf("write to read-only word %0d gives ERROR", i));
      check(bfm.n_wait - w0 == 1, "ERROR has one HREADY-low cycle");
      bfm.read(32'(i), d, nerr);
      check(nerr == 0 && d == 32'h0, "read-only word reads 0");
    end

    // Bursts (incrementing and wrapping, with and without BUSY).
    foreach (wd[i]) wd[i] = $urandom;
    begin
      int lens [3] = '{4, 8, 16};
      for (int wrap = 0; wrap < 2; wrap++)
        for (int li = 0; li < 3; li++)
          for (int busy = 0; busy < 3; busy += 2) begin
            a = 32'(RO + 3 + li * 5 + busy);
            foreach (wd[i]) wd[i] = $urandom;
            w0 = bfm.n_wait;
            c0 = bfm.n_busy;
            bfm.burst(a, lens[li], busy, wrap[0], 1'b1, wd, rd, nerr);
            check(nerr == 0, "burst write OKAY");
            check(bfm.n_wait - w0 == WS * lens[li], "burst write wait states");
            check(bfm.n_busy - c0 == busy * (lens[li] - 1), "BUSY cycles issued");
            d = a;
            for (int i = 0; i < lens[li]; i++) begin
              ref_mem[d[SAB-1:0]] = wd[i];
              d = next_beat_addr(d, burst_code_of(lens[li], wrap[0]));
            end
            bfm.burst(a, lens[li], busy, wrap[0], 1'b0, wd, rd, nerr);
            d = a;
            for (int i = 0; i < lens[li]; i++) begin
              check(rd[i] == ref_mem[d[SAB-1:0]],
                    $sformatf("burst len %0d wrap %0d beat %0d", lens[li], wrap, i));
              d = next_beat_addr(d, burst_code_of(lens[li], wrap[0]));
            end
          end
    end

    // Write followed at once by a read of the same word (forwarding).
    @(negedge clk);
    bus.HADDR = 32'd9; bus.HWRITE = 1'b1; bus.HTRANS = HTRANS_NONSEQ;
    bus.HBURST = HBURST_SINGLE;
    @(negedge clk);                       // write accepted, data phase
    bus.HWRITE = 1'b0;                    // read of the same word, address phase
    bus.HWDATA = 32'h1234_5678;
    while (!bus.HREADY) @(negedge clk);
    @(negedge clk);                       // read in data phase
    bus.HTRANS = HTRANS_IDLE;
    while (!bus.HREADY) @(negedge clk);
    check(bus.HRDATA == 32'h1234_5678, $sformatf("forwarded read got %h", bus.HRDATA));
    @(negedge clk);
    bfm.read(32'd9, d, nerr);
    check(d == 32'h1234_5678, "forwarded write stored");

    done = 1'b1;
  end

  function automatic logic [2:0] burst_code_of(int unsigned len, bit wrap);
    return bfm.burst_code(len, wrap);
  endfunction

endmodule
