// tb_pcc_top_same_trace: the all-data-shared workload. Four in-order cores
// run the same request trace at the same time, so they ask for the same lines
// in the same order and every line is shared by all of them, which maximises
// coherence interference. This is the worst case for sharing that the scheme
// is evaluated with. The benchmark traces themselves are not available;
// the trace here is a fixed hash of the request number (see
// pcc_traffic_checker, SAME_TRACE).
//
// All twelve protocol x arbiter configurations run side by side at the
// evaluated sizes: 16 KB direct-mapped L1s (256 sets), a 4 + 50 cycle bus
// access, weights {4,2,1,1} and a 4096-line shared memory. The trace touches
// 16 lines spaced 32 lines apart, so they fall into 8 sets and evict each
// other. Each core issues 300 requests, then all words are read back. The
// checker checks data, the per-request bound WCL_arb + L_acc (plus the
// controller cycles), the bus transaction lengths and the occurrence of each
// mechanism.
module tb_pcc_top_same_trace;
  import pcc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NCFG = 12;
  logic done [NCFG];
  int   chk  [NCFG], fl [NCFG];

  for (genvar p = 0; p < 3; p++) begin : g_p
    for (genvar a = 0; a < 4; a++) begin : g_a
      pcc_top_bench #(.PROTO(proto_e'(p)), .ARB(arb_e'(a)), .L1_SETS(256), .DATA_LAT(50),
                      .SM_LINES(4096), .POOL_LINES(16), .LINE_STRIDE(32), .N_REQ(300),
                      .N_OOO(0), .SAME_TRACE(1'b1)) u_b (
        .clk, .rst_n, .done(done[p*4+a]), .checks(chk[p*4+a]), .failures(fl[p*4+a]));
    end
  end

  int checks, failures;
  logic all_done;

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
  end

  always @(posedge clk) begin
    all_done = 1'b1;
    for (int i = 0; i < NCFG; i++) all_done &= done[i];
    if (all_done) begin
      checks = 0; failures = 0;
      for (int i = 0; i < NCFG; i++) begin checks += chk[i]; failures += fl[i]; end
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (3000000) @(posedge clk);
    checks = 0; failures = 1;
    for (int i = 0; i < NCFG; i++) begin
      checks += chk[i]; failures += fl[i];
      if (!done[i]) $display("watchdog: configuration %0d did not finish", i);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
