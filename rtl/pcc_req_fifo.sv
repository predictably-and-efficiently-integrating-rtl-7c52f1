// pcc_req_fifo: buffer of a core's outstanding memory requests.
//
// An out-of-order core may have several requests outstanding; the cache
// controller takes them from this buffer one at a time, oldest first. The
// latency that the timing analysis bounds is counted from the moment a
// request reaches the head of this buffer. A buffer of depth 1 models an
// in-order core.
//
// Interface: push/din with full, pop/dout with empty. dout shows the head
// entry combinationally (first-word fall-through); push and pop may happen
// in the same cycle. The depth default of 8 is the outstanding-request limit
// of the out-of-order cores in the text; the ring-buffer organisation is this
// design's choice.
module pcc_req_fifo #(
  parameter int unsigned WIDTH = 65,
  parameter int unsigned DEPTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  output logic             full,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    rd_ptr, wr_ptr;

  function automatic logic [PW-1:0] incr(logic [PW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  assign empty = (count == 0);
  assign full  = (32'(count) == DEPTH);
  assign dout  = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push && !full) begin
        mem[wr_ptr] <= din;
        wr_ptr      <= incr(wr_ptr);
      end
      if (pop && !empty) rd_ptr <= incr(rd_ptr);
      count <= count + (($clog2(DEPTH+1))'(push && !full)) - (($clog2(DEPTH+1))'(pop && !empty));
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));
endmodule
