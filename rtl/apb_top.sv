// apb_top - complete APB subsystem: one bridge, NUM_SLAVES register slaves and
// the read-data multiplexer between them.
//
// The bridge is the only master on the APB. It drives one shared request
// bundle (PADDR, PPROT, PWRITE, PWDATA, PSTRB, PENABLE) to every slave and one
// PSELx line to each; the multiplexer hands the selected slave's PRDATA and
// PREADY back. Slave k owns the byte-address window
// [k * 2**SLAVE_LSB, (k+1) * 2**SLAVE_LSB); addresses outside all windows
// select no slave and complete at once with read data zero.
//
// Slave k inserts k * WAIT_STEP wait states into each of its transfers, so
// with the defaults slave 0 answers in the minimum two cycles and the others
// stretch the ENABLE phase by 1, 2 and 3 cycles. Set WAIT_STEP to 0 for an
// all zero-wait bus.
//
// The system-bus master is outside this block: its request and response
// signals are the top's sys_* ports (handshake described in apb_bridge). The
// APB signals and the bridge state are also brought out for observation.
//
// The structure (bridge as the single master, a select per slave, one read
// data path into the bridge) follows the document; the number of slaves,
// their address windows and their wait-state counts are this design's
// choices.
module apb_top
  import apb_pkg::*;
#(
  parameter int unsigned NUM_SLAVES = 4,
  parameter int unsigned SLAVE_LSB  = 12,
  parameter int unsigned DEPTH      = 16,
  parameter int unsigned WAIT_STEP  = 1
) (
  input  logic                  pclk,
  input  logic                  presetn,
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
  output logic [NUM_SLAVES-1:0] psel,
  output apb_req_t              apb_req,
  output apb_rsp_t              apb_rsp
);

  apb_rsp_t slv_rsp [NUM_SLAVES];

  apb_bridge #(
    .NUM_SLAVES (NUM_SLAVES),
    .SLAVE_LSB  (SLAVE_LSB)
  ) u_bridge (
    .pclk           (pclk),
    .presetn        (presetn),
    .sys_write      (sys_write),
    .sys_write_addr (sys_write_addr),
    .sys_write_data (sys_write_data),
    .sys_write_strb (sys_write_strb),
    .sys_read       (sys_read),
    .sys_read_addr  (sys_read_addr),
    .sys_prot       (sys_prot),
    .sys_ready      (sys_ready),
    .sys_done       (sys_done),
    .sys_read_valid (sys_read_valid),
    .sys_read_data  (sys_read_data),
    .state          (state),
    .psel           (psel),
    .req            (apb_req),
    .rsp            (apb_rsp)
  );

  for (genvar k = 0; k < NUM_SLAVES; k++) begin : g_slave
    apb_slave #(
      .DEPTH       (DEPTH),
      .WAIT_STATES (k * WAIT_STEP)
    ) u_slave (
      .pclk    (pclk),
      .presetn (presetn),
      .psel    (psel[k]),
      .req     (apb_req),
      .rsp     (slv_rsp[k])
    );
  end

  apb_rdata_mux #(
    .NUM_SLAVES (NUM_SLAVES)
  ) u_mux (
    .psel    (psel),
    .slv_rsp (slv_rsp),
    .rsp     (apb_rsp)
  );

endmodule
