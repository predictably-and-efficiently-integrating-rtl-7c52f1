// tb_pcc_top_ooo: the out-of-order workload. All four cores are
// out-of-order and keep up to 8 requests outstanding in their L1 request
// buffers, under MOESI with each of the four arbiters (TDM, RR, WRR, HRR)
// side by side. A request's latency is counted from the moment it reaches the
// head of its core's buffer, and must stay within the same per-request bound
// WCL_arb + L_acc as for in-order cores: queueing behind a core's own requests
// does not change the bound, nor the interference on the other cores.
//
// Sizes are the evaluated ones: 16 KB direct-mapped L1s (256 sets), a 4 + 50
// cycle bus access, weights {4,2,1,1} and a 4096-line shared memory. The
// random traffic (pcc_traffic_checker) touches 16 lines spaced 32 lines
// apart, in 8 sets; each core issues 400 requests, then all words are read
// back. Data, latency bounds, bus transaction lengths and the occurrence of
// each mechanism are checked.
module tb_pcc_top_ooo;
  import pcc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NCFG = 4;
  logic done [NCFG];
  int   chk  [NCFG], fl [NCFG];

  for (genvar a = 0; a < 4; a++) begin : g_a
    pcc_top_bench #(.PROTO(PROTO_MOESI), .ARB(arb_e'(a)), .L1_SETS(256), .DATA_LAT(50),
                    .SM_LINES(4096), .POOL_LINES(16), .LINE_STRIDE(32), .N_REQ(400),
                    .N_OOO(4)) u_b (
      .clk, .rst_n, .done(done[a]), .checks(chk[a]), .failures(fl[a]));
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
