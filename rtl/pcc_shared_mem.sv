// pcc_shared_mem: the shared memory behind the snooping bus, modelled as a
// perfect last-level cache that holds every line the program touches, so
// each request is served within the bus access slot.
//
// LINES lines of 64 bytes, indexed by the low bits of the line address.
// One read port with a registered output (one cycle) and one write port.
// After reset the memory clears itself one line per cycle and raises
// init_done when all lines are zero; the bus must not be used before that.
//
// The "perfect LLC" role is from the text; its size (256 KB by default),
// the one-cycle read and the clearing sweep are this design's choices.
module pcc_shared_mem
  import pcc_pkg::*;
#(
  parameter int unsigned LINES = 4096
) (
  input  logic   clk,
  input  logic   rst_n,
  input  laddr_t raddr,
  output line_t  rdata,
  input  logic   we,
  input  laddr_t waddr,
  input  line_t  wdata,
  output logic   init_done
);
  localparam int unsigned AW = $clog2(LINES);

  line_t         mem [LINES];
  logic [AW-1:0] init_ptr;

  always_ff @(posedge clk) begin
    rdata <= mem[raddr[AW-1:0]];
    if (!rst_n) begin
      init_ptr  <= '0;
      init_done <= 1'b0;
    end else if (!init_done) begin
      mem[init_ptr] <= '0;
      init_ptr      <= init_ptr + 1'b1;
      if (32'(init_ptr) == LINES - 1) init_done <= 1'b1;
    end else if (we) begin
      mem[waddr[AW-1:0]] <= wdata;
    end
  end
endmodule
