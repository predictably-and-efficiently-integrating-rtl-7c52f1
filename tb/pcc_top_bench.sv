// pcc_top_bench: one pcc_top configuration with its traffic checker.
//
// Instantiates pcc_top with the given protocol, arbiter and sizes, connects
// pcc_traffic_checker to its core ports and to observation points inside the
// bus and the L1 controllers, and reports done / checks / failures. Used by
// the end-to-end and workload testbenches, which run several protocol x
// arbiter pairs side by side. N_OOO of the 4 cores are out-of-order.
module pcc_top_bench
  import pcc_pkg::*;
#(
  parameter proto_e      PROTO      = PROTO_MSI,
  parameter arb_e        ARB        = ARB_TDM,
  parameter int unsigned L1_SETS    = 4,
  parameter int unsigned DATA_LAT   = 10,
  parameter int unsigned SM_LINES   = 64,
  parameter int unsigned POOL_LINES = 12,
  parameter int unsigned N_REQ      = 400,
  parameter int unsigned N_OOO      = 2,
  parameter int unsigned LINE_STRIDE = 1,
  parameter bit          SAME_TRACE = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned N = 4;
  localparam int unsigned REQ_LAT = 4;
  localparam int unsigned SLOT = REQ_LAT + DATA_LAT;
  localparam int unsigned W [N] = '{4, 2, 1, 1};

  logic      core_req_valid  [N];
  logic      core_req_ready  [N];
  core_req_t core_req        [N];
  logic      core_resp_valid [N];
  word_t     core_resp_rdata [N];
  logic      init_done, obs_c2c, obs_wb;

  pcc_top #(.N_CORES(N), .PROTO(PROTO), .ARB(ARB), .L1_SETS(L1_SETS), .Q_DEPTH(8),
            .REQ_LAT(REQ_LAT), .DATA_LAT(DATA_LAT), .SLOT(SLOT), .WEIGHTS(W),
            .SM_LINES(SM_LINES)) dut (.*);

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
                        .N_OOO(N_OOO), .POOL_LINES(POOL_LINES), .LINE_STRIDE(LINE_STRIDE),
                        .N_REQ(N_REQ), .SAME_TRACE(SAME_TRACE)) u_chk (
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
endmodule
