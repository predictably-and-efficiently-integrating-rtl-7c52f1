// pcc_bus: logically unified snooping bus that serves one granted request at
// a time, without preemption.
//
// Each transaction has a request phase of REQ_LAT cycles, in which the
// coherence message is broadcast to every other cache and to the shared
// memory, followed, unless the message is a data-less upgrade, by a data
// phase of DATA_LAT cycles. REQ_LAT + DATA_LAT is L_acc, the longest
// service time; no other message or data is on the bus in the meantime.
//
// At the last request-phase cycle (snoop_commit) the snoopers' wired-OR
// responses are sampled: the data comes from an owner cache if one answers
// (cache-to-cache transfer) and from the shared memory otherwise; a PutM
// carries the requester's own line. When an owner marks wb (a modified line
// read under MSI/MESI), or the message is a PutM, the same data message is
// written into the shared memory at the end of the data phase, so the
// transfer to the requester and the write-back overlap in one phase. At the
// end of the transaction done_o of the requester pulses with the data and
// the "others shared" flag.
//
// Timing: the arbiter's grant cycle is followed by REQ_LAT + DATA_LAT bus
// cycles; bus_free is high in the last of them, so back-to-back transactions
// start every L_acc cycles. The shared memory read is issued in the first
// request-phase cycle and must return within REQ_LAT - 1 cycles.
//
// The phases, their 4 + 50 cycle lengths and the overlapped transfer are
// taken from the text; the wired-OR snoop response and the point at which
// snoopers change state are this design's choices.
module pcc_bus
  import pcc_pkg::*;
#(
  parameter int unsigned N_CORES  = 4,
  parameter int unsigned REQ_LAT  = 4,
  parameter int unsigned DATA_LAT = 50
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // arbiter
  output logic [N_CORES-1:0]         arb_req,
  output logic                       bus_free,
  input  logic                       gnt_valid,
  input  logic [$clog2(N_CORES)-1:0] gnt_id,
  // caches
  input  bus_req_t                   creq   [N_CORES],
  output logic [N_CORES-1:0]         cgnt,
  output logic [N_CORES-1:0]         cdone,
  output line_t                      cdata,
  output logic                       cshared,
  output snoop_t                     snoop  [N_CORES],
  output logic                       snoop_commit,
  input  snoop_resp_t                sresp  [N_CORES],
  // shared memory
  output laddr_t                     sm_raddr,
  input  line_t                      sm_rdata,
  output logic                       sm_we,
  output laddr_t                     sm_waddr,
  output line_t                      sm_wdata,
  // observation of the transaction that completes (for statistics)
  output logic                       obs_c2c,     // data came from an owner cache
  output logic                       obs_wb       // data also written to shared memory
);
  localparam int unsigned IDW = $clog2(N_CORES);
  localparam int unsigned CW  = $clog2((REQ_LAT > DATA_LAT ? REQ_LAT : DATA_LAT) + 1);

  typedef enum logic [1:0] {B_IDLE, B_REQ, B_DATA} phase_e;

  phase_e         phase_q;
  logic [CW-1:0]  cnt_q;
  bus_req_t       cur_q;
  logic [IDW-1:0] src_q;
  line_t          data_q;
  logic           shared_q, c2c_q, wb_q;

  // broadcast of the current message to every cache but its sender
  always_comb begin
    for (int i = 0; i < int'(N_CORES); i++) begin
      snoop[i].valid = (phase_q == B_REQ) && (src_q != IDW'(i));
      snoop[i].cmd   = cur_q.cmd;
      snoop[i].laddr = cur_q.laddr;
    end
  end

  logic any_owner, any_shared, any_wb, req_end, data_end;
  line_t owner_data;

  always_comb begin
    any_owner  = 1'b0;
    any_shared = 1'b0;
    any_wb     = 1'b0;
    owner_data = '0;
    for (int i = 0; i < int'(N_CORES); i++) begin
      arb_req[i] = creq[i].valid;
      cgnt[i]    = gnt_valid && (gnt_id == IDW'(i));
      if ((phase_q == B_REQ) && (src_q != IDW'(i))) begin
        any_shared = any_shared | sresp[i].shared;
        any_wb     = any_wb     | sresp[i].wb;
        if (sresp[i].owner) begin
          any_owner  = 1'b1;
          owner_data = sresp[i].data;
        end
      end
    end
    req_end      = (phase_q == B_REQ)  && (32'(cnt_q) == REQ_LAT - 1);
    data_end     = (phase_q == B_DATA) && (32'(cnt_q) == DATA_LAT - 1);
    snoop_commit = req_end;
    bus_free     = (phase_q == B_IDLE) || data_end || (req_end && !cmd_has_data(cur_q.cmd));

    cdone = '0;
    if (data_end || (req_end && !cmd_has_data(cur_q.cmd))) cdone[src_q] = 1'b1;
    cdata    = data_q;
    cshared  = req_end ? any_shared : shared_q;

    sm_raddr = cur_q.laddr;
    sm_we    = data_end && (wb_q || cur_q.cmd == CMD_PUTM);
    sm_waddr = cur_q.laddr;
    sm_wdata = data_q;
    obs_c2c  = c2c_q;
    obs_wb   = wb_q;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase_q  <= B_IDLE;
      cnt_q    <= '0;
      cur_q    <= '0;
      src_q    <= '0;
      data_q   <= '0;
      shared_q <= 1'b0;
      c2c_q    <= 1'b0;
      wb_q     <= 1'b0;
    end else begin
      cnt_q <= cnt_q + 1'b1;
      if (bus_free) begin
        phase_q <= B_IDLE;
        if (gnt_valid) begin
          phase_q <= B_REQ;
          cnt_q   <= '0;
          cur_q   <= creq[gnt_id];
          src_q   <= gnt_id;
          c2c_q   <= 1'b0;
          wb_q    <= 1'b0;
        end
      end else if (req_end) begin
        phase_q  <= B_DATA;
        cnt_q    <= '0;
        shared_q <= any_shared;
        c2c_q    <= any_owner && (cur_q.cmd != CMD_PUTM);
        wb_q     <= any_wb;
        data_q   <= (cur_q.cmd == CMD_PUTM) ? cur_q.data
                  : any_owner                ? owner_data : sm_rdata;
      end
    end
  end

  initial assert (REQ_LAT >= 2 && DATA_LAT >= 1);

  // Coherence safety: at most one owner answers a message.
  a_one_owner: assert property (@(posedge clk) disable iff (!rst_n)
                                req_end |-> $onehot0(owner_vec()));
  function automatic logic [N_CORES-1:0] owner_vec();
    logic [N_CORES-1:0] v;
    for (int i = 0; i < int'(N_CORES); i++) v[i] = (src_q != IDW'(i)) && sresp[i].owner;
    return v;
  endfunction
  a_gnt_free: assert property (@(posedge clk) disable iff (!rst_n) gnt_valid |-> bus_free);
endmodule
