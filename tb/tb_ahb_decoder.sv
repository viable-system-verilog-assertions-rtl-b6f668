// tb_ahb_decoder: self-checking test of the memory map decoder.
//
// Sweeps the boundaries of every slave window and random addresses, and
// compares HSEL, HSEL_DEF and MUX_SEL with the slave index worked out as
// HADDR / 2**SLAVE_ADDR_BITS (index >= NUM_SLAVES means the default slave).
module tb_ahb_decoder;
  import ahb_pkg::*;

  localparam int unsigned NS    = 3;
  localparam int unsigned SAB   = 10;
  localparam int unsigned SEL_W = $clog2(NS + 1);

  logic [31:0]      haddr;
  logic [NS-1:0]    hsel;
  logic             hsel_def;
  logic [SEL_W-1:0] mux_sel;

  ahb_decoder dut (.HADDR(haddr), .HSEL(hsel), .HSEL_DEF(hsel_def), .MUX_SEL(mux_sel));

  int checks = 0;
  int failures = 0;

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try_addr(input logic [31:0] a);
    longint unsigned idx;
    logic [NS-1:0] exp_sel;
    haddr = a;
    #1;
    idx = longint'(a) / (64'd1 << SAB);
    exp_sel = '0;
    if (idx < NS) exp_sel[idx] = 1'b1;
    checks++;
    if (hsel !== exp_sel || hsel_def !== (idx >= NS) ||
        mux_sel !== ((idx < NS) ? SEL_W'(idx) : SEL_W'(NS))) begin
      failures++;
      $display("FAIL: addr %h hsel %b def %b mux %0d", a, hsel, hsel_def, mux_sel);
    end
  endtask

  initial begin
    for (int k = 0; k <= NS + 1; k++) begin
      try_addr(32'(k << SAB));
      try_addr(32'((k << SAB) + 1));
      try_addr(32'(((k + 1) << SAB) - 1));
    end
    // Addresses of the design's basic-operation log: slave 1 and slave 2.
    try_addr(32'h0000_03e9);
    try_addr(32'h0000_05bd);
    try_addr(32'hffff_ffff);
    try_addr(32'h8000_0000);
    for (int i = 0; i < 500; i++) try_addr($urandom_range(0, (NS + 2) << SAB));
    for (int i = 0; i < 100; i++) try_addr($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
