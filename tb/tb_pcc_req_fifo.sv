// tb_pcc_req_fifo: self-checking test of the outstanding-request buffer.
//
// Random pushes and pops (including simultaneous ones, and attempts only
// when allowed) against a reference queue: head data, empty, full and
// count are compared every cycle; the buffer is filled to its depth of 8
// and drained several times.
module tb_pcc_req_fifo;
  localparam int W = 16, D = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic push, pop, full, empty;
  logic [W-1:0] din, dout;
  logic [$clog2(D+1)-1:0] count;

  pcc_req_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  logic [W-1:0] model [$];
  int checks = 0, failures = 0, n_full = 0, n_empty = 0, n_both = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    push = 0; pop = 0; din = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == D), "full");
      check(int'(count) == model.size(), "count");
      if (model.size() > 0) check(dout == model[0], $sformatf("head %h expected %h", dout, model[0]));
      if (full) n_full++;
      if (empty) n_empty++;
      // phases that favour filling and draining
      push = !full  && ($urandom % 100 < (((i / 200) % 2) ? 80 : 30));
      pop  = !empty && ($urandom % 100 < (((i / 200) % 2) ? 30 : 80));
      din  = W'($urandom);
      if (push && pop) n_both++;
      @(posedge clk);
      #1;
      if (pop)  void'(model.pop_front());
      if (push) model.push_back(din);
    end
    check(n_full > 10 && n_empty > 10 && n_both > 10, "full, empty and push+pop all seen");
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
