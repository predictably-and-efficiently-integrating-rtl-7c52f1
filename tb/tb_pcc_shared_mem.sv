// tb_pcc_shared_mem: self-checking test of the shared memory.
//
// Checks that init_done rises exactly LINES cycles after reset, that every
// line then reads as zero, that reads return the line one cycle after the
// address, and that random writes are read back (reference array here).
module tb_pcc_shared_mem;
  import pcc_pkg::*;
  localparam int LINES = 64;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  laddr_t raddr, waddr;
  line_t  rdata, wdata;
  logic   we, init_done;

  pcc_shared_mem #(.LINES(LINES)) dut (.*);

  line_t model [LINES];
  int checks = 0, failures = 0, n;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic line_t rnd_line();
    line_t l;
    for (int i = 0; i < int'(LINE_W) / 32; i++) l[i*32 +: 32] = $urandom;
    return l;
  endfunction

  initial begin
    raddr = '0; waddr = '0; wdata = '0; we = 1'b0;
    for (int i = 0; i < LINES; i++) model[i] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    n = 0;
    while (!init_done && n < 10 * LINES) begin @(negedge clk); n++; end
    check(n == LINES, $sformatf("clearing took %0d cycles, expected %0d", n, LINES));
    for (int i = 0; i < LINES; i++) begin
      raddr = laddr_t'(i);
      @(negedge clk);
      check(rdata == '0, $sformatf("line %0d not cleared", i));
    end
    for (int i = 0; i < 3000; i++) begin
      int ra;
      we    = ($urandom % 2) == 1;
      waddr = laddr_t'($urandom % LINES) | (laddr_t'($urandom % 4) << 6);  // high bits ignored
      wdata = rnd_line();
      ra    = int'($urandom % LINES);
      raddr = laddr_t'(ra);
      @(negedge clk);
      check(rdata == model[ra], $sformatf("read line %0d", ra));
      if (we) model[waddr[5:0]] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
