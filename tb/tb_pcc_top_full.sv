// tb_pcc_top_full: pcc_top at its default parameters (4 cores, MSI, TDM,
// 16 KB L1s, 4 + 50 cycle bus access, 4096-line shared memory), driven by
// pcc_traffic_checker: 300 random requests per core over 12 lines spaced
// 4 KB apart, so that they fall into four L1 sets and evict each other,
// followed by a read-back of every word. Checks data, the TDM latency bound
// N x 54 + 54 and the 54-cycle bus access.
module tb_pcc_top_full;
  import pcc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic done;
  int   checks, failures;

  localparam int unsigned N = 4;
  localparam int unsigned REQ_LAT = 4;
  localparam int unsigned DATA_LAT = 50;
  localparam int unsigned SLOT = REQ_LAT + DATA_LAT;
  localparam proto_e PROTO = PROTO_MSI;
  localparam arb_e   ARB   = ARB_TDM;
  localparam int unsigned W [N] = '{4, 2, 1, 1};

  logic      core_req_valid  [N];
  logic      core_req_ready  [N];
  core_req_t core_req        [N];
  logic      core_resp_valid [N];
  word_t     core_resp_rdata [N];
  logic      init_done, obs_c2c, obs_wb;

  pcc_top dut (.*);

  logic [N-1:0] pk_hit, pk_owner, pk_waiting;
  cstate_e      pk_hit_st [N], pk_snoop_st [N];
  logic         pk_hit_we [N];

  for (genvar c = 0; c < N; c++) begin : g_pk
    assign pk_hit[c]      = dut.g_core[c].u_l1.q_pop && dut.g_core[c].u_l1.fsm_q == 2'd0;
    assign pk_hit_st[c]   = dut.g_core[c].u_l1.h_st;
    assign pk_hit_we[c]   = dut.g_core[c].u_l1.hd.we;
    assign pk_owner[c]    = dut.g_core[c].u_l1.snoop_resp_o.owner;
    assign pk_snoop_st[c] = dut.g_core[c].u_l1.s_st;
    assign pk_waiting[c]  = dut.g_core[c].u_l1.bus_req_o.valid;
  end

  pcc_traffic_checker #(.N_CORES(N), .PROTO(PROTO), .ARB(ARB), .REQ_LAT(REQ_LAT),
                        .DATA_LAT(DATA_LAT), .SLOT(SLOT), .WEIGHTS(W), .Q_DEPTH(8),
                        .N_OOO(2), .POOL_LINES(12), .LINE_STRIDE(64), .N_REQ(300)) u_chk (
    .clk, .rst_n, .init_done,
    .core_req_valid, .core_req_ready, .core_req, .core_resp_valid, .core_resp_rdata,
    .gnt_valid   (dut.gnt_valid),
    .gnt_id      (dut.gnt_id),
    .gnt_cmd     (dut.creq[dut.gnt_id].cmd),
    .snoop_commit(dut.snoop_commit),
    .cdone       (dut.cdone),
    .cshared     (dut.cshared),
    .obs_c2c, .obs_wb,
    .pk_hit, .pk_hit_st, .pk_hit_we, .pk_owner, .pk_snoop_st, .pk_waiting,
    .done, .checks, .failures
  );

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
  end

  always @(posedge clk) begin
    if (done) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (2000000) @(posedge clk);
    $display("watchdog: traffic did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
