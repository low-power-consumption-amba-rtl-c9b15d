// apb_bridge - APB bus master (bridge from the system bus to the APB).
//
// The bridge turns single write or read requests from the system bus into APB
// transfers. A three-state machine sequences every transfer:
//   IDLE   - no transfer; all selects and PENABLE low.
//   SETUP  - one cycle: the selected PSELx is high, PENABLE low.
//   ENABLE - PSELx and PENABLE high. The transfer completes on the first
//            rising edge of PCLK at which PREADY is high; while PREADY is low
//            the bridge stays in ENABLE and holds everything stable.
// From ENABLE the bridge returns to IDLE, or goes straight to SETUP when a
// further request is already waiting (back-to-back transfers, where the
// select of the same slave stays high).
//
// When a request is accepted, its address, direction, protection bits and
// (for a write) data and byte strobes are latched and held for the whole
// transfer. To save power nothing on the APB toggles between transfers:
// PADDR, PWRITE and PPROT keep the values of the last transfer until the next
// one starts, and PWDATA is only reloaded by a write, so a read leaves it
// unchanged. PSTRB is forced to zero on reads. PSELx is decoded from the
// incoming address and registered, and PENABLE is the upper bit of the state
// register, so neither can glitch.
//
// System-bus side: the master raises sys_write (with address, data and byte
// strobes) or sys_read (with address), plus sys_prot, and holds them until
// sys_ready is high at a rising clock edge; that edge accepts the request.
// If both are raised, the write is taken first and the read stays pending.
// sys_ready is high in IDLE and in the completing ENABLE cycle, so a request
// held ready in advance starts with no idle cycle in between. One cycle after
// a transfer completes, sys_done pulses; for a read sys_read_valid pulses too
// and sys_read_data holds the read word until the next read completes.
//
// Latency with a zero-wait slave: accept edge -> SETUP (1 cycle) -> ENABLE
// (1 cycle) -> completion edge; sys_done follows one cycle later. Each cycle
// PREADY is low adds one cycle.
//
// Following the document: the IDLE/SETUP/ENABLE state machine with its
// transitions, latching of address and control for the whole transfer, one
// decoded select per slave, PENABLE as the transfer strobe, PREADY wait
// states, PSTRB/PPROT, and unchanged address/control after a transfer.
// This design's own choices: the request/ready handshake on the system side,
// write-before-read priority, registered PSELx, and the sys_done and
// sys_read_valid pulses.
module apb_bridge
  import apb_pkg::*;
#(
  parameter int unsigned NUM_SLAVES = 4,
  parameter int unsigned SLAVE_LSB  = 12
) (
  input  logic                  pclk,
  input  logic                  presetn,
  // system-bus request side
  input  logic                  sys_write,
  input  logic [ADDR_W-1:0]     sys_write_addr,
  input  logic [DATA_W-1:0]     sys_write_data,
  input  logic [STRB_W-1:0]     sys_write_strb,
  input  logic                  sys_read,
  input  logic [ADDR_W-1:0]     sys_read_addr,
  input  logic [PROT_W-1:0]     sys_prot,
  output logic                  sys_ready,
  output logic                  sys_done,
  output logic                  sys_read_valid,
  output logic [DATA_W-1:0]     sys_read_data,
  output apb_state_e            state,
  // APB side
  output logic [NUM_SLAVES-1:0] psel,
  output apb_req_t              req,
  input  apb_rsp_t              rsp
);

  apb_state_e            state_q, state_d;
  logic [NUM_SLAVES-1:0] psel_q;
  logic [ADDR_W-1:0]     paddr_q;
  logic [PROT_W-1:0]     pprot_q;
  logic                  pwrite_q;
  logic [DATA_W-1:0]     pwdata_q;
  logic [STRB_W-1:0]     pstrb_q;
  logic [DATA_W-1:0]     rdata_q;
  logic                  rvalid_q, done_q;

  logic                  complete;   // ENABLE cycle in which PREADY is high
  logic                  accept;     // a request is taken at this edge
  logic                  take_write;
  logic [ADDR_W-1:0]     next_addr;
  logic [NUM_SLAVES-1:0] next_sel;
  logic                  next_mapped;

  assign complete   = (state_q == ENABLE) && rsp.pready;
  assign sys_ready  = (state_q == IDLE) || complete;
  assign accept     = sys_ready && (sys_write || sys_read);
  assign take_write = sys_write;
  assign next_addr  = take_write ? sys_write_addr : sys_read_addr;

  apb_decoder #(
    .NUM_SLAVES (NUM_SLAVES),
    .SLAVE_LSB  (SLAVE_LSB)
  ) u_decoder (
    .addr   (next_addr),
    .sel    (next_sel),
    .mapped (next_mapped)
  );

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      IDLE:    if (accept) state_d = SETUP;
      SETUP:   state_d = ENABLE;
      ENABLE:  if (rsp.pready) state_d = accept ? SETUP : IDLE;
      default: state_d = IDLE;
    endcase
  end

  always_ff @(posedge pclk or negedge presetn) begin
    if (!presetn) begin
      state_q  <= IDLE;
      psel_q   <= '0;
      paddr_q  <= '0;
      pprot_q  <= '0;
      pwrite_q <= 1'b0;
      pwdata_q <= '0;
      pstrb_q  <= '0;
      rdata_q  <= '0;
      rvalid_q <= 1'b0;
      done_q   <= 1'b0;
    end else begin
      state_q  <= state_d;
      rvalid_q <= complete && !pwrite_q;
      done_q   <= complete;
      if (complete && !pwrite_q) rdata_q <= rsp.prdata;
      if (accept) begin
        psel_q   <= next_sel;
        paddr_q  <= next_addr;
        pprot_q  <= sys_prot;
        pwrite_q <= take_write;
        if (take_write) begin
          pwdata_q <= sys_write_data;
          pstrb_q  <= sys_write_strb;
        end else begin
          pstrb_q  <= '0;
        end
      end else if (complete) begin
        psel_q <= '0;
      end
    end
  end

  assign state          = state_q;
  assign psel           = psel_q;
  assign req.paddr      = paddr_q;
  assign req.pprot      = pprot_q;
  assign req.pwrite     = pwrite_q;
  assign req.pwdata     = pwdata_q;
  assign req.pstrb      = pstrb_q;
  assign req.penable    = state_q[1];
  assign sys_read_data  = rdata_q;
  assign sys_read_valid = rvalid_q;
  assign sys_done       = done_q;

  // Bus rules the bridge must keep.
  a_onehot_sel: assert property (@(posedge pclk) disable iff (!presetn)
    $onehot0(psel_q));
  a_setup_one_cycle: assert property (@(posedge pclk) disable iff (!presetn)
    state_q == SETUP |=> state_q == ENABLE);
  a_hold_in_transfer: assert property (@(posedge pclk) disable iff (!presetn)
    state_q == SETUP || (state_q == ENABLE && !rsp.pready)
      |=> $stable(paddr_q) && $stable(pwrite_q) && $stable(pwdata_q)
          && $stable(pstrb_q) && $stable(psel_q));
  a_no_strobe_on_read: assert property (@(posedge pclk) disable iff (!presetn)
    !pwrite_q |-> pstrb_q == '0);
  a_idle_no_select: assert property (@(posedge pclk) disable iff (!presetn)
    state_q == IDLE |-> psel_q == '0);
  a_unmapped_no_select: assert property (@(posedge pclk) disable iff (!presetn)
    !next_mapped |-> next_sel == '0);

endmodule
