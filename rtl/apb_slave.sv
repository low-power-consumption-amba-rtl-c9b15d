// apb_slave - APB peripheral holding a bank of DEPTH 32-bit registers.
//
// The slave samples the bus only while its PSELx is high. Register index is
// PADDR[2 +: log2(DEPTH)] (byte addresses, word-aligned registers; the other
// address bits are ignored, so the bank repeats through the slave's window).
//
// Write: the data is taken at the rising edge of PCLK that ends the ENABLE
// phase, i.e. when PSELx, PENABLE, PWRITE and PREADY are all high. Only the
// byte lanes whose PSTRB bit is set are written; PSTRB[n] covers
// PWDATA[8n+7:8n].
// Read: while PSELx and PENABLE are high and PWRITE is low, the addressed
// register is driven onto PRDATA; at every other time PRDATA is zero.
// Wait states: the slave holds PREADY low for the first WAIT_STATES cycles of
// each ENABLE phase, which stretches the transfer by that many cycles. With
// WAIT_STATES = 0 PREADY is always high and every transfer takes two cycles.
// Reset (PRESETn low, asynchronous) clears all registers.
//
// Following the document: latching write data at the end of the ENABLE
// phase when PSELx is high, decoding PSELx/PADDR/PWRITE for the write, driving
// read data only while PSELx and PENABLE are high with PWRITE low, byte
// strobes, and PREADY to extend a transfer. This design's own choices: the
// register bank as the peripheral function, its depth, the address mapping,
// the fixed wait-state count and the reset values.
module apb_slave
  import apb_pkg::*;
#(
  parameter int unsigned DEPTH       = 16,
  parameter int unsigned WAIT_STATES = 0
) (
  input  logic     pclk,
  input  logic     presetn,
  input  logic     psel,
  input  apb_req_t req,
  output apb_rsp_t rsp
);

  localparam int unsigned IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CNT_W = (WAIT_STATES > 0) ? $clog2(WAIT_STATES + 1) : 1;

  logic [DATA_W-1:0] regs [DEPTH];
  logic [IDX_W-1:0]  idx;
  logic [CNT_W-1:0]  wait_cnt;
  logic              access;     // ENABLE phase addressed to this slave
  logic              ready;

  assign idx    = req.paddr[2 +: IDX_W];
  assign access = psel && req.penable;
  assign ready  = (WAIT_STATES == 0) || (int'(wait_cnt) == WAIT_STATES);

  always_ff @(posedge pclk or negedge presetn) begin
    if (!presetn) begin
      wait_cnt <= '0;
    end else if (access && !ready) begin
      wait_cnt <= wait_cnt + 1'b1;
    end else begin
      wait_cnt <= '0;
    end
  end

  always_ff @(posedge pclk or negedge presetn) begin
    if (!presetn) begin
      for (int r = 0; r < DEPTH; r++) regs[r] <= '0;
    end else if (access && req.pwrite && ready) begin
      for (int b = 0; b < STRB_W; b++) begin
        if (req.pstrb[b]) regs[idx][8*b +: 8] <= req.pwdata[8*b +: 8];
      end
    end
  end

  assign rsp.prdata = (access && !req.pwrite) ? regs[idx] : '0;
  assign rsp.pready = ready;

  // Bus rules seen from the slave.
  a_setup_then_enable: assert property (@(posedge pclk) disable iff (!presetn)
    psel && !req.penable |=> psel && req.penable);
  a_enable_after_setup: assert property (@(posedge pclk) disable iff (!presetn)
    $rose(access) |-> $past(psel) && !$past(req.penable));
  a_stable_while_waiting: assert property (@(posedge pclk) disable iff (!presetn)
    access && !ready |=> access && $stable(req.paddr) && $stable(req.pwrite)
                         && $stable(req.pwdata) && $stable(req.pstrb));
  a_no_strobe_on_read: assert property (@(posedge pclk) disable iff (!presetn)
    psel && !req.pwrite |-> req.pstrb == '0);

endmodule
