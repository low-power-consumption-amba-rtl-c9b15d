// tb_apb_rdata_mux - self-checking test of the read-data/ready multiplexer.
//
// Gives each of 4 slave responses random PRDATA and PREADY values, applies
// every one-hot select plus the all-zero select, and checks that the output
// equals the selected slave's response, or PRDATA = 0 and PREADY = 1 when no
// slave is selected.
module tb_apb_rdata_mux;
  import apb_pkg::*;

  int checks = 0, failures = 0;

  logic [3:0] psel;
  apb_rsp_t   slv_rsp [4];
  apb_rsp_t   rsp;

  apb_rdata_mux #(.NUM_SLAVES(4)) dut (.psel(psel), .slv_rsp(slv_rsp), .rsp(rsp));

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 200; it++) begin
      for (int k = 0; k < 4; k++) begin
        slv_rsp[k].prdata = $urandom;
        slv_rsp[k].pready = 1'($urandom);
      end
      for (int s = -1; s < 4; s++) begin
        psel = (s < 0) ? 4'b0 : 4'(1 << s);
        #1;
        checks++;
        if (s < 0) begin
          if (rsp.prdata !== '0 || rsp.pready !== 1'b1) begin
            failures++;
            $display("FAIL idle response %h %b", rsp.prdata, rsp.pready);
          end
        end else if (rsp.prdata !== slv_rsp[s].prdata || rsp.pready !== slv_rsp[s].pready) begin
          failures++;
          $display("FAIL slave %0d: got %h/%b exp %h/%b", s, rsp.prdata, rsp.pready,
                   slv_rsp[s].prdata, slv_rsp[s].pready);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
