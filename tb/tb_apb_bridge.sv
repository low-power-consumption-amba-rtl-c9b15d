// tb_apb_bridge - self-checking test of the APB bridge on its own.
//
// The testbench plays both sides of the bridge. On the system side a driver
// issues a random mix of writes (random byte strobes and protection bits) and
// reads, with random idle gaps, including zero gaps so that transfers run
// back to back. On the APB side a slave model answers with a random number
// (0-2) of wait states per transfer and keeps a word-addressed memory;
// addresses in the fifth 4 KiB window select no slave and complete at once.
// During wait states the model drives junk on PRDATA so a read captured too
// early is caught.
//
// Checked against values computed here, independently of the bridge:
//  - each transfer's PADDR, PWRITE, PWDATA, PSTRB, PPROT and PSELx, in order;
//  - SETUP lasts exactly one cycle and ENABLE lasts wait states + 1 cycles;
//  - the read data returned to the system side, and the sys_done pulses;
//  - PSTRB is zero on reads and PWDATA keeps the last write's data on reads;
//  - PADDR, PWRITE, PWDATA and PPROT do not change while the bus is idle;
//  - a back-to-back transfer goes ENABLE -> SETUP without passing IDLE.
module tb_apb_bridge;
  import apb_pkg::*;

  localparam int unsigned NS = 4;
  localparam int unsigned N_OPS = 400;

  int checks = 0, failures = 0;
  int n_b2b = 0, n_wait = 0, n_unmapped = 0, n_idle_hold = 0;

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
  apb_req_t          req;
  apb_rsp_t          rsp;

  apb_bridge #(.NUM_SLAVES(NS), .SLAVE_LSB(12)) dut (.*);

  always #5 pclk = ~pclk;

  typedef struct {
    logic              write;
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] data;
    logic [STRB_W-1:0] strb;
    logic [PROT_W-1:0] prot;
  } op_t;

  op_t               exp_q[$];       // accepted transfers, in order
  logic [DATA_W-1:0] rd_exp_q[$];    // expected read data, in order
  int                done_exp = 0, done_seen = 0, rd_seen = 0;
  logic [DATA_W-1:0] ref_mem [logic [ADDR_W-1:0]];
  logic [DATA_W-1:0] last_wdata = '0;

  function automatic logic [NS-1:0] ref_sel(logic [ADDR_W-1:0] a);
    int unsigned w = a >> 12;
    return (w < NS) ? NS'(1 << w) : '0;
  endfunction

  function automatic logic [DATA_W-1:0] rd_ref(logic [ADDR_W-1:0] a);
    if (ref_sel(a) == '0) return '0;
    return ref_mem.exists(a >> 2) ? ref_mem[a >> 2] : '0;
  endfunction

  // ---------------- APB slave model ----------------
  logic [DATA_W-1:0] mdl_mem [logic [ADDR_W-1:0]];
  int                wait_target = 0, wait_cnt = 0;
  logic [DATA_W-1:0] junk = '0;

  always_comb begin
    rsp.pready = (psel == '0) || (wait_cnt == wait_target);
    if (psel == '0)
      rsp.prdata = '0;
    else if (req.penable && !req.pwrite && rsp.pready)
      rsp.prdata = mdl_mem.exists(req.paddr >> 2) ? mdl_mem[req.paddr >> 2] : '0;
    else
      rsp.prdata = junk;
  end

  always @(posedge pclk) begin
    junk <= $urandom;
    if (presetn && req.penable) begin
      if (rsp.pready) begin
        if (req.pwrite && psel != '0) begin
          logic [DATA_W-1:0] w;
          w = mdl_mem.exists(req.paddr >> 2) ? mdl_mem[req.paddr >> 2] : '0;
          for (int b = 0; b < STRB_W; b++) if (req.pstrb[b]) w[8*b +: 8] = req.pwdata[8*b +: 8];
          mdl_mem[req.paddr >> 2] = w;
        end
        wait_cnt    <= 0;
        wait_target <= $urandom % 3;
      end else begin
        wait_cnt <= wait_cnt + 1;
      end
    end
  end

  // ---------------- monitor ----------------
  apb_state_e        prev_state = IDLE;
  logic [ADDR_W-1:0] prev_paddr;
  logic              prev_pwrite;
  logic [DATA_W-1:0] prev_pwdata;
  logic [PROT_W-1:0] prev_pprot;
  int                enable_cycles = 0, expect_enable = 0;
  bit                have_prev = 1'b0;   // prev_* hold a sampled cycle

  task automatic fail(input string msg);
    failures++;
    $display("FAIL t=%0t %s", $time, msg);
  endtask

  always @(posedge pclk) if (presetn) begin
    // state seen during the cycle that ends at this edge
    if (state == SETUP) begin
      op_t e;
      checks++;
      if (prev_state != IDLE && prev_state != ENABLE) fail("SETUP not entered from IDLE/ENABLE");
      if (prev_state == ENABLE) n_b2b++;
      if (exp_q.size() == 0) fail("unexpected transfer");
      else begin
        e = exp_q.pop_front();
        checks++;
        if (req.paddr !== e.addr || req.pwrite !== e.write || req.pprot !== e.prot
            || psel !== ref_sel(e.addr) || req.penable !== 1'b0)
          fail($sformatf("setup mismatch addr %h/%h write %b/%b sel %b/%b",
                         req.paddr, e.addr, req.pwrite, e.write, psel, ref_sel(e.addr)));
        checks++;
        if (e.write) begin
          if (req.pwdata !== e.data || req.pstrb !== e.strb) fail("write data/strobe mismatch");
          last_wdata = e.data;
        end else begin
          if (req.pstrb !== '0) fail("PSTRB not zero on read");
          if (req.pwdata !== last_wdata) fail("PWDATA changed on a read");
        end
        if (psel == '0) n_unmapped++;
      end
      enable_cycles = 0;
      expect_enable = (psel == '0) ? 1 : wait_target + 1;
    end
    if (state == ENABLE) begin
      enable_cycles++;
      if (req.penable !== 1'b1) fail("PENABLE low in ENABLE");
      if (!rsp.pready && psel != '0) n_wait++;
      if (rsp.pready) begin
        checks++;
        if (enable_cycles != expect_enable)
          fail($sformatf("ENABLE lasted %0d cycles, expected %0d", enable_cycles, expect_enable));
      end
    end
    if (state == IDLE) begin
      if (psel !== '0 || req.penable !== 1'b0) fail("select or enable high in IDLE");
      if (prev_state == IDLE || prev_state == ENABLE) begin
        checks++;
        n_idle_hold++;
        if (have_prev && prev_state == IDLE && (req.paddr !== prev_paddr || req.pwrite !== prev_pwrite ||
            req.pwdata !== prev_pwdata || req.pprot !== prev_pprot))
          fail("APB address/control toggled while idle");
      end
    end
    if (sys_done) done_seen++;
    if (sys_read_valid) begin
      checks++;
      rd_seen++;
      if (rd_exp_q.size() == 0) fail("unexpected read data");
      else begin
        logic [DATA_W-1:0] x;
        x = rd_exp_q.pop_front();
        if (sys_read_data !== x) fail($sformatf("read data %h expected %h", sys_read_data, x));
      end
    end
    prev_state  = state;
    prev_paddr  = req.paddr;
    prev_pwrite = req.pwrite;
    prev_pwdata = req.pwdata;
    prev_pprot  = req.pprot;
    have_prev   = 1'b1;
  end

  // ---------------- system-side driver ----------------
  task automatic issue(input op_t o);
    @(negedge pclk);
    sys_prot = o.prot;
    if (o.write) begin
      sys_write = 1'b1; sys_write_addr = o.addr; sys_write_data = o.data; sys_write_strb = o.strb;
    end else begin
      sys_read = 1'b1; sys_read_addr = o.addr;
    end
    #1;
    while (!sys_ready) begin
      @(negedge pclk);
      #1;
    end
    @(posedge pclk);
    // accepted at this edge: record what the bus must show
    exp_q.push_back(o);
    done_exp++;
    if (o.write) begin
      if (ref_sel(o.addr) != '0) begin
        logic [DATA_W-1:0] w = rd_ref(o.addr);
        for (int b = 0; b < STRB_W; b++) if (o.strb[b]) w[8*b +: 8] = o.data[8*b +: 8];
        ref_mem[o.addr >> 2] = w;
      end
    end else begin
      rd_exp_q.push_back(rd_ref(o.addr));
    end
    #1;
    sys_write = 1'b0;
    sys_read  = 1'b0;
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge pclk);
    presetn = 1'b1;
    for (int i = 0; i < N_OPS; i++) begin
      op_t o;
      o.write = (i < 40) ? 1'b1 : 1'($urandom);
      o.addr  = {($urandom % 5) << 12} | (($urandom % 8) << 2);
      o.data  = $urandom;
      o.strb  = (($urandom % 3) == 0) ? STRB_W'($urandom) : '1;
      o.prot  = PROT_W'($urandom);
      issue(o);
      repeat ($urandom % 3) @(posedge pclk);   // zero gap gives back-to-back transfers
    end
    repeat (10) @(posedge pclk);
    checks++;
    if (done_seen != done_exp || rd_exp_q.size() != 0 || exp_q.size() != 0) fail("transfers lost");
    checks++;
    if (n_b2b == 0 || n_wait == 0 || n_unmapped == 0 || n_idle_hold == 0)
      fail($sformatf("mechanism not exercised: b2b=%0d wait=%0d unmapped=%0d idle=%0d",
                     n_b2b, n_wait, n_unmapped, n_idle_hold));
    $display("back-to-back=%0d wait-cycles=%0d unmapped=%0d reads=%0d", n_b2b, n_wait, n_unmapped, rd_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
