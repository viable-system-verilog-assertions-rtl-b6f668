// ahb_default_slave: answers transfers to addresses no slave owns.
//
// A NONSEQ or SEQ transfer accepted while HSEL is high (HREADY high at the
// address-phase edge) is answered with the two-cycle AHB-Lite ERROR: one cycle
// HREADYOUT low with HRESP high, then one with both high. IDLE and BUSY
// transfers, and cycles with no data phase, give HREADYOUT high and OKAY.
// It has no data: HRDATA is not driven here (the multiplexer shows zero).
//
// From the design: unmapped addresses must get an ERROR response. That a
// separate default slave gives it, and its timing, are this design's choice,
// following the AHB-Lite specification.
module ahb_default_slave
  import ahb_pkg::*;
(
  input  logic       HCLK,
  input  logic       HRESETn,
  input  logic       HSEL,
  input  logic [1:0] HTRANS,
  input  logic       HREADY,
  output logic       HREADYOUT,
  output logic       HRESP
);

  typedef enum logic [1:0] {DS_OKAY, DS_ERR1, DS_ERR2} ds_state_e;
  ds_state_e state;

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) state <= DS_OKAY;
    else begin
      case (state)
        DS_ERR1: state <= DS_ERR2;
        default: state <= (HSEL && HREADY && HTRANS[1]) ? DS_ERR1 : DS_OKAY;
      endcase
    end
  end

  assign HREADYOUT = (state != DS_ERR1);
  assign HRESP     = (state != DS_OKAY) ? HRESP_ERROR : HRESP_OKAY;

  // Only HTRANS[1] (NONSEQ or SEQ) matters here.
  logic unused_trans;
  assign unused_trans = HTRANS[0];

endmodule
