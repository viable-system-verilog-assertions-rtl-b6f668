// ahb_lite_top: single-master AHB-Lite bus system with an assertion monitor.
//
// The master (outside, its signals are this module's ports) sends address,
// control and write data to every slave. The memory map decoder turns HADDR
// into one select per slave; the response multiplexer, steered by the
// decoder's MUX_SEL delayed to the data phase, returns the addressed slave's
// HRDATA, HREADY and HRESP to the master and HREADY back to all slaves.
// NUM_SLAVES RAM slaves of 2**SLAVE_ADDR_BITS words each cover consecutive
// windows of the word address space; the first RO_WORDS words of each slave
// are read-only. Addresses past the last window go to a default slave that
// answers ERROR. The monitor watches the master side of the bus (through an
// ahb_if bundle) and keeps the scoreboard of fifteen protocol checks,
// brought out as chk_total / chk_fail.
//
// Timing is AHB-Lite's: a transfer's address phase is accepted at a rising
// HCLK edge with HREADY high and its data phase follows; every OKAY transfer
// to a RAM slave takes 1 + WAIT_STATES cycles of data phase (one cycle by
// default), an ERROR two.
//
// From the design: one master, three slaves, decoder and multiplexer with
// their selects, 1 Ki-word slave windows, read-only first four words, the
// monitor on the bus, zero-wait writes. This design's choices: the default
// slave, the optional wait states and word addressing.
module ahb_lite_top
  import ahb_pkg::*;
#(
  parameter int unsigned NUM_SLAVES      = 3,
  parameter int unsigned SLAVE_ADDR_BITS = 10,
  parameter int unsigned RO_WORDS        = 4,
  parameter int unsigned WAIT_STATES     = 0,
  parameter int unsigned CNT_W           = 16
) (
  input  logic              HCLK,
  input  logic              HRESETn,
  input  logic [ADDR_W-1:0] HADDR,
  input  logic              HWRITE,
  input  logic [2:0]        HSIZE,
  input  logic [2:0]        HBURST,
  input  logic [1:0]        HTRANS,
  input  logic [DATA_W-1:0] HWDATA,
  output logic [DATA_W-1:0] HRDATA,
  output logic              HREADY,
  output logic              HRESP,
  output logic [CNT_W-1:0]  chk_total [NUM_CHECKS],
  output logic [CNT_W-1:0]  chk_fail  [NUM_CHECKS]
);

  localparam int unsigned SEL_W = $clog2(NUM_SLAVES + 1);

  logic [NUM_SLAVES-1:0] hsel;
  logic                  hsel_def;
  logic [SEL_W-1:0]      mux_sel;
  logic [DATA_W-1:0]     s_hrdata [NUM_SLAVES+1];
  logic [NUM_SLAVES:0]   s_hreadyout;
  logic [NUM_SLAVES:0]   s_hresp;

  ahb_decoder #(
    .NUM_SLAVES     (NUM_SLAVES),
    .SLAVE_ADDR_BITS(SLAVE_ADDR_BITS)
  ) u_decoder (
    .HADDR   (HADDR),
    .HSEL    (hsel),
    .HSEL_DEF(hsel_def),
    .MUX_SEL (mux_sel)
  );

  for (genvar k = 0; k < NUM_SLAVES; k++) begin : g_slave
    ahb_slave #(
      .SLAVE_ADDR_BITS(SLAVE_ADDR_BITS),
      .RO_WORDS       (RO_WORDS),
      .WAIT_STATES    (WAIT_STATES)
    ) u_slave (
      .HCLK     (HCLK),
      .HRESETn  (HRESETn),
      .HSEL     (hsel[k]),
      .HADDR    (HADDR),
      .HWRITE   (HWRITE),
      .HSIZE    (HSIZE),
      .HBURST   (HBURST),
      .HTRANS   (HTRANS),
      .HREADY   (HREADY),
      .HWDATA   (HWDATA),
      .HREADYOUT(s_hreadyout[k]),
      .HRESP    (s_hresp[k]),
      .HRDATA   (s_hrdata[k])
    );
  end

  ahb_default_slave u_default (
    .HCLK     (HCLK),
    .HRESETn  (HRESETn),
    .HSEL     (hsel_def),
    .HTRANS   (HTRANS),
    .HREADY   (HREADY),
    .HREADYOUT(s_hreadyout[NUM_SLAVES]),
    .HRESP    (s_hresp[NUM_SLAVES])
  );
  assign s_hrdata[NUM_SLAVES] = '0;

  ahb_mux #(
    .NUM_SLAVES(NUM_SLAVES)
  ) u_mux (
    .HCLK       (HCLK),
    .HRESETn    (HRESETn),
    .MUX_SEL    (mux_sel),
    .s_hrdata   (s_hrdata),
    .s_hreadyout(s_hreadyout),
    .s_hresp    (s_hresp),
    .HRDATA     (HRDATA),
    .HREADY     (HREADY),
    .HRESP      (HRESP)
  );

  // Monitor view of the master side of the bus.
  ahb_if bus (.HCLK(HCLK), .HRESETn(HRESETn));
  assign bus.HADDR  = HADDR;
  assign bus.HWRITE = HWRITE;
  assign bus.HSIZE  = HSIZE;
  assign bus.HBURST = HBURST;
  assign bus.HTRANS = HTRANS;
  assign bus.HWDATA = HWDATA;
  assign bus.HRDATA = HRDATA;
  assign bus.HREADY = HREADY;
  assign bus.HRESP  = HRESP;

  ahb_monitor #(
    .NUM_SLAVES     (NUM_SLAVES),
    .SLAVE_ADDR_BITS(SLAVE_ADDR_BITS),
    .RO_WORDS       (RO_WORDS),
    .CNT_W          (CNT_W),
    .ZERO_WAIT_WRITES(WAIT_STATES == 0)
  ) u_monitor (
    .bus      (bus.monitor),
    .chk_total(chk_total),
    .chk_fail (chk_fail)
  );

endmodule
