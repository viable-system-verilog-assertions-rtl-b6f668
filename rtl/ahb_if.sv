// ahb_if: the AHB-Lite bus as one bundle.
//
// Carries the master's address, control and write data and the read data,
// HREADY and transfer response returned to it. Three modports give each
// party its view: 'master' drives address, control and write data; 'slave'
// is the view of a slave wired straight to the master (it drives HRDATA,
// HREADY and HRESP); 'monitor' only observes. In the full bus system the
// response side is driven by the response multiplexer instead. The signal
// set is that of the design's slave top; the master and monitor modports
// are this design's additions. No timing of its own: it is wiring.
interface ahb_if (
  input logic HCLK,
  input logic HRESETn
);
  import ahb_pkg::*;

  logic [ADDR_W-1:0] HADDR;
  logic              HWRITE;
  logic [2:0]        HSIZE;
  logic [2:0]        HBURST;
  logic [1:0]        HTRANS;
  logic [DATA_W-1:0] HWDATA;
  logic [DATA_W-1:0] HRDATA;
  logic              HREADY;
  logic              HRESP;

  modport master (
    input  HCLK, HRESETn, HRDATA, HREADY, HRESP,
    output HADDR, HWRITE, HSIZE, HBURST, HTRANS, HWDATA
  );

  modport slave (
    input  HCLK, HRESETn, HADDR, HWRITE, HSIZE, HBURST, HTRANS, HWDATA,
    output HRDATA, HREADY, HRESP
  );

  modport monitor (
    input HCLK, HRESETn, HADDR, HWRITE, HSIZE, HBURST, HTRANS, HWDATA,
          HRDATA, HREADY, HRESP
  );

endinterface
