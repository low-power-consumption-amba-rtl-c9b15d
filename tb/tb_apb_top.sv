// tb_apb_top - end-to-end test of the APB subsystem at its default parameters
// (4 slaves of 16 registers; slave k inserts k wait states).
//
// Phase 1 replays the reference sequence of the design: writes of 0x0a, 0x0f,
// 0x14, 0x19 and 0x1e to registers 2..6 of slave 0, then reads of the same
// registers. Phase 2 runs random traffic over all slaves and an unmapped
// window, with random byte strobes, random idle gaps (zero gaps give
// back-to-back transfers) and, now and then, a write and a read requested in
// the same cycle.
//
// Every read is compared with a reference model of the register banks kept
// here. Every transfer's latency, from the accepting edge to sys_done, is
// compared with 3 + (wait states of the addressed slave) cycles. The test
// counts how often each mechanism happened - write, read, back-to-back
// transfer, return to IDLE, wait state, partial-strobe write, unmapped
// access, write-before-read priority, bus held still while idle - and counts
// a failure for any that never did.
module tb_apb_top;
  import apb_pkg::*;

  localparam int unsigned NS = 4, DEPTH = 16;

  int checks = 0, failures = 0;
  int n_write = 0, n_read = 0, n_b2b = 0, n_idle = 0, n_wait = 0, n_partial = 0;
  int n_unmapped = 0, n_prio = 0, n_hold = 0;

  logic              pclk = 1'b0, presetn = 1'b0;
  logic              sys_write = 1'b0, sys_read = 1'b0;
  logic [ADDR_W-1:0] sys_write_addr = '0, sys_read_addr = '0;
  logic [DATA_W-1:0] sys_write_data = '0;
  logic [STRB_W-1:0] sys_write_strb = '0;
  logic [PROT_W-1:0] sys_prot = '0;
  logic              sys_ready, sys_done, sys_read_valid;
  logic [DATA_W-1:0] sys_read_data;
  apb_state_e        state;
  logic [NS-1:0]     psel;
  apb_req_t          apb_req;
  apb_rsp_t          apb_rsp;

  apb_top dut (.*);

  always #5 pclk = ~pclk;

  int                cycle = 0;
  logic [DATA_W-1:0] ref_mem [NS][DEPTH];
  int                lat_q[$];        // expected sys_done cycle of each accepted transfer
  logic [DATA_W-1:0] rd_q[$];         // expected read data, in order

  task automatic fail(input string msg);
    failures++;
    $display("FAIL t=%0t %s", $time, msg);
  endtask

  function automatic int slave_of(logic [ADDR_W-1:0] a);
    return ((a >> 12) < NS) ? int'(a >> 12) : -1;
  endfunction

  // ---------------- monitor ----------------
  apb_state_e prev_state = IDLE;
  apb_req_t   prev_req;

  always @(posedge pclk) begin
    cycle++;
    if (presetn) begin
      if (state == SETUP && prev_state == ENABLE) n_b2b++;
      if (state == IDLE && prev_state == ENABLE) n_idle++;
      if (state == ENABLE && !apb_rsp.pready) n_wait++;
      if (state == IDLE && prev_state == IDLE) begin
        checks++;
        n_hold++;
        if (apb_req.paddr !== prev_req.paddr || apb_req.pwrite !== prev_req.pwrite ||
            apb_req.pwdata !== prev_req.pwdata)
          fail("bus toggled while idle");
      end
      if (sys_done) begin
        checks++;
        if (lat_q.size() == 0) fail("unexpected sys_done");
        else begin
          int due;
          due = lat_q.pop_front();
          if (cycle != due) fail($sformatf("transfer finished at cycle %0d, expected %0d", cycle, due));
        end
      end
      if (sys_read_valid) begin
        checks++;
        if (rd_q.size() == 0) fail("unexpected read data");
        else begin
          logic [DATA_W-1:0] x;
          x = rd_q.pop_front();
          if (sys_read_data !== x) fail($sformatf("read %h expected %h", sys_read_data, x));
        end
      end
    end
    prev_state = state;
    prev_req   = apb_req;
  end

  // ---------------- driver ----------------
  // Transfers are processed one at a time by the bridge, so the expected
  // completion of a transfer is 3 + waits cycles after the edge that accepts it.
  task automatic record(input bit wr, input logic [ADDR_W-1:0] a,
                        input logic [DATA_W-1:0] d, input logic [STRB_W-1:0] s);
    int k;
    k = slave_of(a);
    lat_q.push_back(cycle + 3 + ((k < 0) ? 0 : k));
    if (k < 0) n_unmapped++;
    if (wr) begin
      n_write++;
      if (s != '1) n_partial++;
      if (k >= 0)
        for (int b = 0; b < STRB_W; b++)
          if (s[b]) ref_mem[k][(a >> 2) % DEPTH][8*b +: 8] = d[8*b +: 8];
    end else begin
      n_read++;
      rd_q.push_back((k < 0) ? '0 : ref_mem[k][(a >> 2) % DEPTH]);
    end
  endtask

  task automatic wait_accept();
    #1;
    while (!sys_ready) begin
      @(negedge pclk);
      #1;
    end
    @(posedge pclk);
    #1;   // let the accepting edge settle before recording
  endtask

  task automatic do_write(input logic [ADDR_W-1:0] a, input logic [DATA_W-1:0] d,
                          input logic [STRB_W-1:0] s);
    @(negedge pclk);
    sys_write = 1'b1; sys_write_addr = a; sys_write_data = d; sys_write_strb = s;
    sys_prot = PROT_W'($urandom);
    wait_accept();
    record(1'b1, a, d, s);
    sys_write = 1'b0;
  endtask

  task automatic do_read(input logic [ADDR_W-1:0] a);
    @(negedge pclk);
    sys_read = 1'b1; sys_read_addr = a;
    wait_accept();
    record(1'b0, a, '0, '0);
    sys_read = 1'b0;
  endtask

  // write and read requested together: the write must go first
  task automatic do_both(input logic [ADDR_W-1:0] wa, input logic [DATA_W-1:0] d,
                         input logic [ADDR_W-1:0] ra);
    @(negedge pclk);
    sys_write = 1'b1; sys_write_addr = wa; sys_write_data = d; sys_write_strb = '1;
    sys_read = 1'b1;  sys_read_addr = ra;
    wait_accept();
    checks++;
    if (apb_req.paddr !== wa || apb_req.pwrite !== 1'b1) fail("write did not win over read");
    else n_prio++;
    record(1'b1, wa, d, '1);
    sys_write = 1'b0;
    wait_accept();
    record(1'b0, ra, '0, '0);
    sys_read = 1'b0;
  endtask

  function automatic logic [ADDR_W-1:0] rand_addr();
    return ADDR_W'((($urandom % (NS + 1)) << 12) | (($urandom % DEPTH) << 2));
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < NS; k++)
      for (int r = 0; r < DEPTH; r++) ref_mem[k][r] = '0;
    repeat (3) @(posedge pclk);
    presetn = 1'b1;
    // phase 1: reference sequence, registers 2..6 of slave 0
    for (int i = 0; i < 5; i++) do_write(ADDR_W'((2 + i) * 4), DATA_W'(10 + 5 * i), '1);
    for (int i = 0; i < 5; i++) do_read(ADDR_W'((2 + i) * 4));
    // phase 2: random traffic
    for (int i = 0; i < 2000; i++) begin
      int kind;
      kind = $urandom % 10;
      if (kind < 4)       do_write(rand_addr(), $urandom, (($urandom % 3) == 0) ? STRB_W'($urandom) : '1);
      else if (kind < 9)  do_read(rand_addr());
      else                do_both(rand_addr(), $urandom, rand_addr());
      repeat ($urandom % 3) @(posedge pclk);
    end
    repeat (12) @(posedge pclk);
    checks++;
    if (lat_q.size() != 0 || rd_q.size() != 0) fail("transfers did not complete");
    $display("writes=%0d reads=%0d back-to-back=%0d idle-returns=%0d wait-cycles=%0d",
             n_write, n_read, n_b2b, n_idle, n_wait);
    $display("partial-strobe=%0d unmapped=%0d write-first=%0d idle-hold=%0d",
             n_partial, n_unmapped, n_prio, n_hold);
    checks++;
    if (n_write == 0 || n_read == 0 || n_b2b == 0 || n_idle == 0 || n_wait == 0 ||
        n_partial == 0 || n_unmapped == 0 || n_prio == 0 || n_hold == 0)
      fail("a mechanism never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
