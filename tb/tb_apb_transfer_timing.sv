// tb_apb_transfer_timing - cycle-exact check of single APB transfers on the
// full subsystem at its default parameters.
//
// Replays the basic write and read transfers: one isolated write to slave 0
// and one isolated read of the same register, each preceded and followed by
// idle cycles. For every PCLK cycle it compares the bridge state, PSELx,
// PENABLE, PADDR, PWRITE and PWDATA with the expected sequence
//   IDLE -> SETUP (select high, enable low, address/control/data valid)
//        -> ENABLE (select and enable high) -> IDLE (select and enable low,
//        address/control/data unchanged),
// checks that the write lands and the read returns it in the ENABLE cycle,
// and then repeats the read on slave 2 (two wait states), where ENABLE must
// last exactly three cycles.
module tb_apb_transfer_timing;
  import apb_pkg::*;

  int checks = 0, failures = 0;

  logic              pclk = 1'b0, presetn = 1'b0;
  logic              sys_write = 1'b0, sys_read = 1'b0;
  logic [ADDR_W-1:0] sys_write_addr = '0, sys_read_addr = '0;
  logic [DATA_W-1:0] sys_write_data = '0;
  logic [STRB_W-1:0] sys_write_strb = '0;
  logic [PROT_W-1:0] sys_prot = '0;
  logic              sys_ready, sys_done, sys_read_valid;
  logic [DATA_W-1:0] sys_read_data;
  apb_state_e        state;
  logic [3:0]        psel;
  apb_req_t          apb_req;
  apb_rsp_t          apb_rsp;

  apb_top dut (.*);

  always #5 pclk = ~pclk;

  task automatic fail(input string msg);
    failures++;
    $display("FAIL t=%0t %s", $time, msg);
  endtask

  // Compare the bus in the current cycle (sampled just before the next edge).
  task automatic expect_cycle(input apb_state_e st, input logic [3:0] sel, input logic en,
                              input logic [ADDR_W-1:0] a, input logic wr,
                              input logic [DATA_W-1:0] wd, input string what);
    @(negedge pclk);
    checks++;
    if (state !== st || psel !== sel || apb_req.penable !== en || apb_req.paddr !== a ||
        apb_req.pwrite !== wr || apb_req.pwdata !== wd)
      fail($sformatf("%s: state=%s psel=%b en=%b addr=%h wr=%b wd=%h", what, state.name(),
                     psel, apb_req.penable, apb_req.paddr, apb_req.pwrite, apb_req.pwdata));
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge pclk);
    presetn = 1'b1;
    // idle after reset: everything zero
    expect_cycle(IDLE, 4'b0000, 1'b0, '0, 1'b0, '0, "reset idle");

    // ---- write transfer (T1..T5) ----
    @(negedge pclk);                       // T1-T2: request presented in IDLE
    sys_write = 1'b1; sys_write_addr = 32'h8; sys_write_data = 32'h0000_000A; sys_write_strb = '1;
    #1;
    checks++;
    if (!sys_ready) fail("bridge not ready in IDLE");
    @(posedge pclk);                       // T2: accepted
    #1 sys_write = 1'b0;
    expect_cycle(SETUP,  4'b0001, 1'b0, 32'h8, 1'b1, 32'hA, "write SETUP");
    expect_cycle(ENABLE, 4'b0001, 1'b1, 32'h8, 1'b1, 32'hA, "write ENABLE");
    checks++;
    if (!apb_rsp.pready) fail("zero-wait slave not ready");
    expect_cycle(IDLE,   4'b0000, 1'b0, 32'h8, 1'b1, 32'hA, "after write");
    checks++;
    if (!sys_done || sys_read_valid) fail("write completion pulses wrong");
    expect_cycle(IDLE,   4'b0000, 1'b0, 32'h8, 1'b1, 32'hA, "idle holds bus");

    // ---- read transfer ----
    @(negedge pclk);
    sys_read = 1'b1; sys_read_addr = 32'h8;
    @(posedge pclk);
    #1 sys_read = 1'b0;
    expect_cycle(SETUP,  4'b0001, 1'b0, 32'h8, 1'b0, 32'hA, "read SETUP");
    checks++;
    if (apb_rsp.prdata !== '0 || apb_req.pstrb !== '0) fail("PRDATA/PSTRB not zero in read SETUP");
    expect_cycle(ENABLE, 4'b0001, 1'b1, 32'h8, 1'b0, 32'hA, "read ENABLE");
    checks++;
    if (apb_rsp.prdata !== 32'hA) fail($sformatf("PRDATA %h in ENABLE", apb_rsp.prdata));
    expect_cycle(IDLE,   4'b0000, 1'b0, 32'h8, 1'b0, 32'hA, "after read");
    checks++;
    if (!sys_read_valid || sys_read_data !== 32'hA) fail("read data not returned");

    // ---- read with two wait states (slave 2) ----
    @(negedge pclk);
    sys_read = 1'b1; sys_read_addr = 32'h2008;
    @(posedge pclk);
    #1 sys_read = 1'b0;
    expect_cycle(SETUP,  4'b0100, 1'b0, 32'h2008, 1'b0, 32'hA, "slow SETUP");
    for (int w = 0; w < 3; w++) begin
      expect_cycle(ENABLE, 4'b0100, 1'b1, 32'h2008, 1'b0, 32'hA, "slow ENABLE");
      checks++;
      if (apb_rsp.pready !== (w == 2)) fail($sformatf("PREADY %b in ENABLE cycle %0d", apb_rsp.pready, w));
    end
    expect_cycle(IDLE,   4'b0000, 1'b0, 32'h2008, 1'b0, 32'hA, "after slow read");
    checks++;
    if (!sys_read_valid || sys_read_data !== 32'h0) fail("slow read data wrong");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
