// pcc_top: N-core predictable cache-coherent memory system.
//
// Each core's requests enter its private L1 (pcc_l1_cache), whose coherence
// controller runs an unmodified MSI, MESI or MOESI protocol (PROTO). All L1s
// and the shared memory sit on one logically unified snooping bus (pcc_bus),
// whose access is granted by a predictable arbiter (pcc_bus_arbiter: TDM, RR,
// WRR or HRR, chosen by ARB). A granted request is served to completion in
// one access of at most L_acc = REQ_LAT + DATA_LAT cycles, with cache-to-
// cache transfers and overlapped write-back, so the worst-case latency of a
// request is WCL_arb + L_acc whatever the protocol or the core pipeline.
//
// Ports are per-core arrays of the core-to-L1 request/response interface
// (valid/ready request, one-cycle response pulse, responses in request
// order). init_done rises once the shared memory has been cleared after
// reset; requests may be queued before, but the bus starts only then.
//
// Defaults are the evaluated system: 4 cores, 16 KB direct-mapped L1s, a
// 54-cycle access (4 request + 50 data), 8 outstanding requests per core and
// WRR/HRR weights {4,2,1,1}. MSI with TDM, the pair of the text's worked
// example, is the default of the 12 configurations; the shared-memory size
// is this design's choice.
module pcc_top
  import pcc_pkg::*;
#(
  parameter int unsigned N_CORES           = 4,
  parameter proto_e      PROTO             = PROTO_MSI,
  parameter arb_e        ARB               = ARB_TDM,
  parameter int unsigned L1_SETS           = 256,
  parameter int unsigned Q_DEPTH           = 8,
  parameter int unsigned REQ_LAT           = 4,
  parameter int unsigned DATA_LAT          = 50,
  parameter int unsigned SLOT              = REQ_LAT + DATA_LAT,
  parameter int unsigned WEIGHTS [N_CORES] = '{4, 2, 1, 1},
  parameter int unsigned SM_LINES          = 4096
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      core_req_valid  [N_CORES],
  output logic      core_req_ready  [N_CORES],
  input  core_req_t core_req        [N_CORES],
  output logic      core_resp_valid [N_CORES],
  output word_t     core_resp_rdata [N_CORES],
  output logic      init_done,
  // completing bus transaction: data came from a cache / was also written back
  output logic      obs_c2c,
  output logic      obs_wb
);
  localparam int unsigned IDW = $clog2(N_CORES);

  bus_req_t           creq  [N_CORES];
  snoop_t             snoop [N_CORES];
  snoop_resp_t        sresp [N_CORES];
  logic [N_CORES-1:0] cgnt, cdone, arb_req;
  line_t              cdata;
  logic               cshared, snoop_commit, bus_free, gnt_valid;
  logic [IDW-1:0]     gnt_id;
  laddr_t             sm_raddr, sm_waddr;
  line_t              sm_rdata, sm_wdata;
  logic               sm_we;

  for (genvar c = 0; c < N_CORES; c++) begin : g_core
    pcc_l1_cache #(.PROTO(PROTO), .SETS(L1_SETS), .Q_DEPTH(Q_DEPTH)) u_l1 (
      .clk, .rst_n,
      .core_req_valid (core_req_valid[c]),
      .core_req_ready (core_req_ready[c]),
      .core_req       (core_req[c]),
      .core_resp_valid(core_resp_valid[c]),
      .core_resp_rdata(core_resp_rdata[c]),
      .bus_req_o      (creq[c]),
      .bus_gnt_i      (cgnt[c]),
      .bus_done_i     (cdone[c]),
      .bus_data_i     (cdata),
      .bus_shared_i   (cshared),
      .snoop_i        (snoop[c]),
      .snoop_commit_i (snoop_commit),
      .snoop_resp_o   (sresp[c])
    );
  end

  pcc_bus_arbiter #(.N_CORES(N_CORES), .ARB(ARB), .SLOT(SLOT), .WEIGHTS(WEIGHTS)) u_arb (
    .clk, .rst_n,
    .req      (arb_req & {N_CORES{init_done}}),
    .bus_free (bus_free),
    .gnt_valid(gnt_valid),
    .gnt_id   (gnt_id)
  );

  pcc_bus #(.N_CORES(N_CORES), .REQ_LAT(REQ_LAT), .DATA_LAT(DATA_LAT)) u_bus (
    .clk, .rst_n,
    .arb_req, .bus_free, .gnt_valid, .gnt_id,
    .creq, .cgnt, .cdone, .cdata, .cshared,
    .snoop, .snoop_commit, .sresp,
    .sm_raddr, .sm_rdata, .sm_we, .sm_waddr, .sm_wdata,
    .obs_c2c, .obs_wb
  );

  pcc_shared_mem #(.LINES(SM_LINES)) u_sm (
    .clk, .rst_n,
    .raddr(sm_raddr), .rdata(sm_rdata),
    .we(sm_we), .waddr(sm_waddr), .wdata(sm_wdata),
    .init_done
  );

  initial assert (SLOT >= REQ_LAT + DATA_LAT);
endmodule
