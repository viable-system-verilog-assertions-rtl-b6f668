// ahb_mux: slave-to-master response multiplexer of the AHB-Lite bus.
//
// Returns the read data and transfer response (HRDATA, HREADY, HRESP) of the
// slave whose data phase is in progress. The decoder's MUX_SEL is valid in the
// address phase, so it is registered on every HCLK edge where HREADY is high
// (an address phase is sampled there) and the registered value steers the
// outputs during the following data phase, wait states included.
// Inputs are packed per slave; index NUM_SLAVES is the default slave. After
// reset the select points at the default slave, which is idle and ready.
// HREADY goes to the master and back to every slave.
//
// From the design: a multiplexer steered by the decoder's MUX_SEL that merges
// each slave's transfer response and read data. Registering the select for
// the data phase is the AHB-Lite pipelining, this design's reading.
module ahb_mux
  import ahb_pkg::*;
#(
  parameter int unsigned NUM_SLAVES = 3,
  localparam int unsigned SEL_W     = $clog2(NUM_SLAVES + 1)
) (
  input  logic                    HCLK,
  input  logic                    HRESETn,
  input  logic [SEL_W-1:0]        MUX_SEL,
  input  logic [DATA_W-1:0]       s_hrdata    [NUM_SLAVES+1],
  input  logic [NUM_SLAVES:0]     s_hreadyout,
  input  logic [NUM_SLAVES:0]     s_hresp,
  output logic [DATA_W-1:0]       HRDATA,
  output logic                    HREADY,
  output logic                    HRESP
);

  logic [SEL_W-1:0] sel_q;

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn)    sel_q <= SEL_W'(NUM_SLAVES);
    else if (HREADY) sel_q <= MUX_SEL;
  end

  always_comb begin
    HRDATA = s_hrdata[NUM_SLAVES];
    HREADY = s_hreadyout[NUM_SLAVES];
    HRESP  = s_hresp[NUM_SLAVES];
    for (int unsigned k = 0; k < NUM_SLAVES; k++) begin
      if (sel_q == SEL_W'(k)) begin
        HRDATA = s_hrdata[k];
        HREADY = s_hreadyout[k];
        HRESP  = s_hresp[k];
      end
    end
  end

endmodule
