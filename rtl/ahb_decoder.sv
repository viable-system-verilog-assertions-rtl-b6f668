// ahb_decoder: memory map decoder of the AHB-Lite bus.
//
// Splits the word address space into NUM_SLAVES windows of
// 2**SLAVE_ADDR_BITS words: slave k (0-based) owns addresses
// k*2**SLAVE_ADDR_BITS up to (k+1)*2**SLAVE_ADDR_BITS-1. HADDR above the last
// window selects the default slave, which answers with ERROR.
// Outputs: one-hot HSEL to the slaves, HSEL_DEF to the default slave and
// MUX_SEL, the index of the addressed slave (NUM_SLAVES for the default
// slave), for the response multiplexer. Purely combinational, valid in the
// address phase; the multiplexer delays MUX_SEL to the data phase.
//
// From the design: one select per slave, the MUX_SEL output and the 1 Ki-word
// window per slave. The default slave select is this design's addition, made
// for the ERROR the design requires on unmapped addresses.
module ahb_decoder
  import ahb_pkg::*;
#(
  parameter int unsigned NUM_SLAVES      = 3,
  parameter int unsigned SLAVE_ADDR_BITS = 10,
  localparam int unsigned SEL_W          = $clog2(NUM_SLAVES + 1)
) (
  input  logic [ADDR_W-1:0]     HADDR,
  output logic [NUM_SLAVES-1:0] HSEL,
  output logic                  HSEL_DEF,
  output logic [SEL_W-1:0]      MUX_SEL
);

  localparam int unsigned REGION_W = ADDR_W - SLAVE_ADDR_BITS;

  logic [REGION_W-1:0] region;
  logic unused_low;

  assign region     = HADDR[ADDR_W-1:SLAVE_ADDR_BITS];
  assign unused_low = ^HADDR[SLAVE_ADDR_BITS-1:0];

  always_comb begin
    HSEL     = '0;
    HSEL_DEF = 1'b1;
    MUX_SEL  = SEL_W'(NUM_SLAVES);
    for (int unsigned k = 0; k < NUM_SLAVES; k++) begin
      if (region == REGION_W'(k)) begin
        HSEL[k]  = 1'b1;
        HSEL_DEF = 1'b0;
        MUX_SEL  = SEL_W'(k);
      end
    end
  end

  // Exactly one of the slaves or the default slave is selected.
  logic [NUM_SLAVES:0] sel_all;
  assign sel_all = {HSEL_DEF, HSEL};
  always_comb begin
    a_onehot: assert (sel_all != '0 && (sel_all & (sel_all - 1'b1)) == '0);
  end

endmodule
