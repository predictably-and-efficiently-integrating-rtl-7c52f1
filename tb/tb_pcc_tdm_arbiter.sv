// tb_pcc_tdm_arbiter: self-checking test of pcc_tdm_arbiter (TDM, 4 slots of L_ACC cycles).
//
// A bus model holds each grant for a random 1..L_ACC cycles (bus_free in the
// last one) and four cores raise requests at random, keeping each until it
// is granted, as a cache controller does. Every cycle the grant is compared
// with a reference of the policy written independently here, and the wait of
// every request is compared with the analytical bound N x SLOT.
module tb_pcc_tdm_arbiter;
  import pcc_pkg::*;

  localparam int N     = 4;
  localparam int L_ACC = 14;
  localparam int unsigned W [N] = '{4, 2, 1, 1};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0] req;
  logic         bus_free, gnt_valid;
  logic [1:0]   gnt_id;

  pcc_tdm_arbiter #(.N_CORES(N), .SLOT(L_ACC)) dut (.*);

  int checks = 0, failures = 0;
  int busy, t, t_req [N], max_wait [N], lock [N];
  logic exp_valid; int exp_id;
  int n_grants, n_wait;
  logic g_prev; logic [1:0] g_id;
  int ref_cyc;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s t=%0d", what, t); end
  endtask

  function automatic int bound(int j);
    return N * L_ACC;
  endfunction

  assign bus_free = (busy <= 1);

  initial begin
    g_prev = 1'b0; g_id = '0;
    req = '0; busy = 0; t = 0; n_grants = 0; n_wait = 0;
    for (int c = 0; c < N; c++) begin t_req[c] = 0; max_wait[c] = 0; lock[c] = 0; end
    ref_cyc = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    repeat (20000) begin
      @(negedge clk);
      // effects of the grant taken at the last rising edge
      t++;
      ref_cyc++;
      if (busy > 0) busy--;
      for (int c = 0; c < N; c++) if (lock[c] > 0) lock[c]--;
      if (g_prev) begin
        int w;
        w = t - t_req[g_id] - 1;   // cycles without a grant
        if (w > max_wait[g_id]) max_wait[g_id] = w;
        check(w <= bound(g_id), $sformatf("core %0d waited %0d > %0d", g_id, w, bound(g_id)));
        busy = 1 + ($urandom % L_ACC);

        // half of the time the core has its next request ready at once
        lock[g_id] = ($urandom % 2 == 0) ? 0 : busy + 1 + ($urandom % 3);
        req[g_id] = 1'b0;
        // a request raised at once is counted from the end of the transaction
        if (lock[g_id] == 0) begin req[g_id] = 1'b1; t_req[g_id] = t + busy - 1; end
        n_grants++;

      end
      for (int c = 0; c < N; c++)
        if (!req[c] && lock[c] == 0 && ($urandom % 3 == 0)) begin req[c] = 1'b1; t_req[c] = t; end
      #1;
      // reference decision for this cycle
      begin
        int owner;
        owner     = (ref_cyc / L_ACC) % N;
        exp_id    = owner;
        exp_valid = (ref_cyc % L_ACC == 0) && req[owner] && bus_free;
      end

      check(gnt_valid == exp_valid, $sformatf("gnt_valid %0d expected %0d", gnt_valid, exp_valid));
      if (gnt_valid && exp_valid) check(int'(gnt_id) == exp_id,
                                        $sformatf("gnt_id %0d expected %0d", gnt_id, exp_id));
      if (req != 0 && !gnt_valid) n_wait++;
      g_prev = gnt_valid;
      g_id   = gnt_id;
    end
    for (int c = 0; c < N; c++) $display("core %0d longest wait %0d, bound %0d", c, max_wait[c], bound(c));
    check(n_grants > 100 && n_wait > 100, "grants and waits happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
