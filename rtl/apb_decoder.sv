// apb_decoder - address decoder producing one peripheral select per APB slave.
//
// The address space below the APB bus is split into equal windows of
// 2**SLAVE_LSB bytes. Window k (k < NUM_SLAVES) belongs to slave k: its select
// bit is set when PADDR[SLAVE_LSB +: IDX_W] == k and every address bit above
// that field is zero. Any other address selects no slave at all, so at most
// one select bit is ever high, as an APB bridge requires.
//
// Purely combinational. The bridge feeds it the address it is about to latch
// and registers the result, so the PSELx lines it drives never glitch.
//
// Having a decoder inside the bridge and one select line per slave follows
// the bridge description; the window size, the window order and the handling
// of unmapped addresses are this design's choices.
module apb_decoder
  import apb_pkg::*;
#(
  parameter int unsigned NUM_SLAVES = 4,   // number of PSELx lines
  parameter int unsigned SLAVE_LSB  = 12   // 4 KiB window per slave
) (
  input  logic [ADDR_W-1:0]     addr,
  output logic [NUM_SLAVES-1:0] sel,
  output logic                  mapped    // addr falls in one of the windows
);

  localparam int unsigned IDX_W = (NUM_SLAVES > 1) ? $clog2(NUM_SLAVES) : 1;
  localparam int unsigned HI_LSB = SLAVE_LSB + IDX_W;

  logic [IDX_W-1:0] idx;
  logic             upper_zero;

  always_comb begin
    idx        = addr[SLAVE_LSB +: IDX_W];
    upper_zero = (addr >> HI_LSB) == '0;
    mapped     = upper_zero && (int'(idx) < NUM_SLAVES);
    sel        = '0;
    for (int k = 0; k < NUM_SLAVES; k++) begin
      sel[k] = mapped && (int'(idx) == k);
    end
  end

endmodule
