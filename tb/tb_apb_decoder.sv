// tb_apb_decoder - self-checking test of the APB address decoder.
//
// Drives random and corner-case addresses into a 4-slave, 4 KiB-window
// decoder and compares the select vector and the mapped flag with a
// reference computed here from the address map: slave k owns
// [k*4096, (k+1)*4096); everything else selects nothing. Also checks that at
// most one select is ever high. A second instance with 3 slaves checks that
// the unused fourth window (0x3000-0x3FFF) decodes as unmapped.
module tb_apb_decoder;
  import apb_pkg::*;

  int checks = 0, failures = 0;

  logic [ADDR_W-1:0] addr;
  logic [3:0]        sel4;
  logic              map4;
  logic [2:0]        sel3;
  logic              map3;

  apb_decoder #(.NUM_SLAVES(4), .SLAVE_LSB(12)) dut4 (.addr(addr), .sel(sel4), .mapped(map4));
  apb_decoder #(.NUM_SLAVES(3), .SLAVE_LSB(12)) dut3 (.addr(addr), .sel(sel3), .mapped(map3));

  task automatic check_addr(input logic [ADDR_W-1:0] a);
    logic [3:0] exp4;
    logic [2:0] exp3;
    int unsigned win;
    addr = a;
    #1;
    win  = a / 4096;
    exp4 = (win < 4) ? 4'(1 << win) : 4'b0;
    exp3 = (win < 3) ? 3'(1 << win) : 3'b0;
    checks++;
    if (sel4 !== exp4 || map4 !== (win < 4)) begin
      failures++;
      $display("FAIL 4-slave addr=%h sel=%b exp=%b mapped=%b", a, sel4, exp4, map4);
    end
    checks++;
    if (sel3 !== exp3 || map3 !== (win < 3)) begin
      failures++;
      $display("FAIL 3-slave addr=%h sel=%b exp=%b mapped=%b", a, sel3, exp3, map3);
    end
    checks++;
    if (!$onehot0(sel4) || !$onehot0(sel3)) begin
      failures++;
      $display("FAIL more than one select addr=%h", a);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [ADDR_W-1:0] corner [10] = '{32'h0, 32'h8, 32'hFFF, 32'h1000, 32'h2004,
                                       32'h3FFC, 32'h4000, 32'h8000_0000,
                                       32'hFFFF_FFFF, 32'h0001_1000};
    foreach (corner[i]) check_addr(corner[i]);
    for (int i = 0; i < 500; i++) check_addr({18'b0, 14'($urandom)});   // mostly mapped
    for (int i = 0; i < 500; i++) check_addr(32'($urandom));            // mostly unmapped
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
