// tb_pcc_l1_cache: directed tests of the L1 cache controller under MSI,
// MESI and MOESI (pcc_l1_scenario, one instance per protocol).
module tb_pcc_l1_cache;
  import pcc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic done [3];
  int   chk [3], fl [3];

  pcc_l1_scenario #(.PROTO(PROTO_MSI))   u_msi   (.clk, .rst_n, .done(done[0]), .checks(chk[0]), .failures(fl[0]));
  pcc_l1_scenario #(.PROTO(PROTO_MESI))  u_mesi  (.clk, .rst_n, .done(done[1]), .checks(chk[1]), .failures(fl[1]));
  pcc_l1_scenario #(.PROTO(PROTO_MOESI)) u_moesi (.clk, .rst_n, .done(done[2]), .checks(chk[2]), .failures(fl[2]));

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
  end

  always @(posedge clk)
    if (done[0] && done[1] && done[2]) begin
      $display("TB_RESULT checks=%0d failures=%0d", chk[0] + chk[1] + chk[2], fl[0] + fl[1] + fl[2]);
      $finish;
    end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", chk[0] + chk[1] + chk[2], fl[0] + fl[1] + fl[2] + 1);
    $finish;
  end
endmodule
