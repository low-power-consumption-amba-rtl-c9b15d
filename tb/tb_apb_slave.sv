// tb_apb_slave - self-checking test of the APB register slave.
//
// Two slaves share one APB request bus, as on a real APB: slave A
// (WAIT_STATES = 0) and slave B (WAIT_STATES = 2), both with 16 registers.
// The testbench acts as the bridge, running SETUP/ENABLE transfers by hand
// with random byte strobes, to random registers of a random slave, and keeps
// its own copy of both register banks. It checks:
//  - read data against the reference copy (after reset, all zero);
//  - byte-lane writes (only lanes with PSTRB set change);
//  - that the slave not selected never changes and drives PRDATA = 0;
//  - PRDATA is zero outside the ENABLE phase of a read;
//  - the ENABLE phase lasts exactly WAIT_STATES + 1 cycles.
module tb_apb_slave;
  import apb_pkg::*;

  int checks = 0, failures = 0;

  logic     pclk = 1'b0, presetn = 1'b0;
  logic     psel_a = 1'b0, psel_b = 1'b0;
  apb_req_t req;
  apb_rsp_t rsp_a, rsp_b;

  apb_slave #(.DEPTH(16), .WAIT_STATES(0)) dut_a (.pclk, .presetn, .psel(psel_a), .req, .rsp(rsp_a));
  apb_slave #(.DEPTH(16), .WAIT_STATES(2)) dut_b (.pclk, .presetn, .psel(psel_b), .req, .rsp(rsp_b));

  always #5 pclk = ~pclk;

  logic [DATA_W-1:0] ref_a [16], ref_b [16];

  task automatic fail(input string msg);
    failures++;
    $display("FAIL t=%0t %s", $time, msg);
  endtask

  // One APB transfer to slave b_not_a; returns the data seen at completion.
  task automatic xfer(input bit to_b, input bit write, input int r,
                      input logic [DATA_W-1:0] wdata, input logic [STRB_W-1:0] strb,
                      output logic [DATA_W-1:0] rdata);
    int cycles = 0;
    apb_rsp_t rsp;
    @(negedge pclk);
    req.paddr   = 32'(r * 4) | (to_b ? 32'h1000 : 32'h0);
    req.pwrite  = write;
    req.pwdata  = write ? wdata : $urandom;
    req.pstrb   = write ? strb : '0;
    req.pprot   = '0;
    req.penable = 1'b0;
    psel_a = !to_b;
    psel_b = to_b;
    #1;
    checks++;
    if (rsp_a.prdata !== '0 || rsp_b.prdata !== '0) fail("PRDATA not zero in SETUP");
    @(negedge pclk);
    req.penable = 1'b1;
    forever begin
      #1;
      cycles++;
      rsp = to_b ? rsp_b : rsp_a;
      checks++;
      if ((to_b ? rsp_a.prdata : rsp_b.prdata) !== '0) fail("unselected slave drives PRDATA");
      if (rsp.pready) break;
      @(negedge pclk);
    end
    rdata = rsp.prdata;
    checks++;
    if (cycles != (to_b ? 3 : 1)) fail($sformatf("ENABLE lasted %0d cycles", cycles));
    @(posedge pclk);
    #1;
    psel_a = 1'b0;
    psel_b = 1'b0;
    req.penable = 1'b0;
  endtask

  initial begin
    #500000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DATA_W-1:0] rd, wd, expv;
    logic [STRB_W-1:0] st;
    req = '0;
    repeat (2) @(posedge pclk);
    presetn = 1'b1;
    for (int r = 0; r < 16; r++) begin
      ref_a[r] = '0;
      ref_b[r] = '0;
    end
    for (int i = 0; i < 600; i++) begin
      bit to_b, wr;
      int r;
      to_b = 1'($urandom);
      wr   = (i < 32) ? 1'b1 : 1'($urandom);
      r    = $urandom % 16;
      wd = $urandom;
      st = (($urandom % 2) == 0) ? '1 : STRB_W'($urandom);
      xfer(to_b, wr, r, wd, st, rd);
      if (wr) begin
        for (int b = 0; b < STRB_W; b++) if (st[b]) begin
          if (to_b) ref_b[r][8*b +: 8] = wd[8*b +: 8];
          else      ref_a[r][8*b +: 8] = wd[8*b +: 8];
        end
      end else begin
        expv = to_b ? ref_b[r] : ref_a[r];
        checks++;
        if (rd !== expv) fail($sformatf("read %s[%0d] = %h expected %h", to_b ? "B" : "A", r, rd, expv));
      end
    end
    // reset clears the banks
    presetn = 1'b0;
    @(posedge pclk);
    presetn = 1'b1;
    for (int r = 0; r < 16; r++) begin
      xfer(1'b0, 1'b0, r, '0, '0, rd);
      checks++;
      if (rd !== '0) fail("register not cleared by reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
