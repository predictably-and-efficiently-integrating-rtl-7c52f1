// tb_pcc_top: end-to-end test of the whole memory system in all twelve
// protocol x arbiter configurations (MSI, MESI, MOESI with TDM, RR, WRR, HRR).
//
// Each configuration is a pcc_top with 4 cores, 4-set L1s (so that the
// 12-line working set causes evictions), a 4 + 10 cycle bus access and a
// 64-line shared memory, driven by random traffic from two out-of-order and
// two in-order cores. Data values, latency bounds, bus transaction lengths
// and the occurrence of every mechanism are checked by pcc_traffic_checker.
module tb_pcc_top;
  import pcc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NCFG = 12;
  logic done [NCFG];
  int   chk  [NCFG], fl [NCFG];

  for (genvar p = 0; p < 3; p++) begin : g_p
    for (genvar a = 0; a < 4; a++) begin : g_a
      pcc_top_bench #(.PROTO(proto_e'(p)), .ARB(arb_e'(a)), .N_REQ(600)) u_b (
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
