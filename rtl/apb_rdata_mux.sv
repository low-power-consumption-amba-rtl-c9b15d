// apb_rdata_mux - returns the selected slave's response to the bridge.
//
// Every slave drives its own PRDATA and PREADY; the bridge has a single
// PRDATA and PREADY input. This multiplexer passes on the response of the
// slave whose PSELx is high (the bridge guarantees at most one). When no
// select is high - between transfers, or during a transfer to an address that
// belongs to no slave - it returns PRDATA = 0 and PREADY = 1, so a transfer to
// an unmapped address still completes in two cycles instead of hanging.
//
// Purely combinational, AND-OR structure: a slave that is not selected cannot
// disturb the returned data.
//
// The single read-data input of the bridge is the document's; the AND-OR form
// and the response for "no slave selected" are this design's choices.
module apb_rdata_mux
  import apb_pkg::*;
#(
  parameter int unsigned NUM_SLAVES = 4
) (
  input  logic [NUM_SLAVES-1:0] psel,
  input  apb_rsp_t              slv_rsp [NUM_SLAVES],
  output apb_rsp_t              rsp
);

  always_comb begin
    rsp.prdata = '0;
    rsp.pready = ~|psel;
    for (int k = 0; k < NUM_SLAVES; k++) begin
      if (psel[k]) begin
        rsp.prdata = rsp.prdata | slv_rsp[k].prdata;
        rsp.pready = rsp.pready | slv_rsp[k].pready;
      end
    end
  end

endmodule
