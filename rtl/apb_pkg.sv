// apb_pkg - shared widths, the bridge state encoding and the APB bus bundles.
//
// The APB subsystem carries 32-bit addresses and two independent 32-bit data
// buses (one for writes, one for reads), with one write strobe per byte lane
// of the write bus. The bridge state machine has exactly three states; their
// two-bit codes (IDLE 00, SETUP 01, ENABLE 10) follow the state values seen in
// the reference simulation, and make PENABLE equal to the upper state bit.
// The request bundle (apb_req_t) is what the bridge drives to every slave;
// the response bundle (apb_rsp_t) is what one slave drives back. PSELx is kept
// apart from the bundle because there is one select line per slave.
package apb_pkg;

  localparam int unsigned ADDR_W = 32;          // PADDR width
  localparam int unsigned DATA_W = 32;          // PWDATA / PRDATA width
  localparam int unsigned STRB_W = DATA_W / 8;  // one PSTRB bit per byte lane
  localparam int unsigned PROT_W = 3;           // PPROT: privileged, non-secure, instruction

  typedef enum logic [1:0] {
    IDLE   = 2'b00,   // default state, no transfer, PSELx = 0, PENABLE = 0
    SETUP  = 2'b01,   // first cycle of a transfer, PSELx = 1, PENABLE = 0
    ENABLE = 2'b10    // second (and wait) cycles, PSELx = 1, PENABLE = 1
  } apb_state_e;

  typedef struct packed {
    logic [ADDR_W-1:0] paddr;
    logic [PROT_W-1:0] pprot;
    logic              pwrite;
    logic [DATA_W-1:0] pwdata;
    logic [STRB_W-1:0] pstrb;
    logic              penable;
  } apb_req_t;

  typedef struct packed {
    logic [DATA_W-1:0] prdata;
    logic              pready;
  } apb_rsp_t;

endpackage
