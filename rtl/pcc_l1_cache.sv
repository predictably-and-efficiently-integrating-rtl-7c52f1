// pcc_l1_cache: private L1 data cache with an unmodified snooping coherence
// controller (MSI, MESI or MOESI, chosen by PROTO).
//
// Organisation: direct mapped, SETS lines of 64 bytes (16 KB by default),
// write-allocate and write-back. Each set holds a tag, a stable coherence
// state and the line. Requests of the core are queued in a buffer of depth
// Q_DEPTH (pcc_req_fifo) and served in order, one at a time.
//
// Core side: a request at the head of the buffer that hits (any valid state
// for a load; M, or E with a silent E->M, for a store) is answered in the next
// cycle, the 1-cycle L1 hit latency. A miss raises bus_req_o and waits for the
// arbiter. The bus message is chosen in the grant cycle from the line's
// current state, so that snooped messages that arrive while waiting are
// taken into account (an S copy lost to another core's GetM turns an upgrade
// into a GetM):
//   * a different valid line in E, O or M occupies the set -> PUTM (the
//     write-back is a transaction of its own, in this core's own slot; the
//     miss then arbitrates again),
//   * store to a line held in S or O                        -> UPG (no data),
//   * otherwise                                             -> GETS / GETM.
// When the bus signals bus_done_i the line is installed with the data of the
// data phase, the access is performed and the core is answered in the next
// cycle.
//
// Snoop side: while another core's message is on the bus (snoop_i), the
// cache looks the line up and answers combinationally with shared / owner /
// wb flags and its copy of the line. At snoop_commit_i, the end of the
// request phase, it moves its copy to the protocol's next state. A hit that
// would touch the set being committed waits one cycle, so a store cannot
// slip in after the line was sampled for another core.
//
// Protocol behaviour follows the standard protocols and the text (cache-to-
// cache transfers, write-back of M on GetS under MSI/MESI overlapped with the
// transfer, PutM for E/O/M). The queue, the silent S eviction, PutM carrying
// data for E lines, and the grant-time choice of message are this design's
// choices.
module pcc_l1_cache
  import pcc_pkg::*;
#(
  parameter proto_e      PROTO   = PROTO_MSI,
  parameter int unsigned SETS    = 256,
  parameter int unsigned Q_DEPTH = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  // core side
  input  logic        core_req_valid,
  output logic        core_req_ready,
  input  core_req_t   core_req,
  output logic        core_resp_valid,
  output word_t       core_resp_rdata,
  // bus side, own requests
  output bus_req_t    bus_req_o,
  input  logic        bus_gnt_i,
  input  logic        bus_done_i,
  input  line_t       bus_data_i,
  input  logic        bus_shared_i,
  // bus side, snooping
  input  snoop_t      snoop_i,
  input  logic        snoop_commit_i,
  output snoop_resp_t snoop_resp_o
);
  localparam int unsigned IDX_W = $clog2(SETS);
  localparam int unsigned TAG_W = LADDR_W - IDX_W;

  typedef logic [IDX_W-1:0] idx_t;
  typedef logic [TAG_W-1:0] tag_t;
  typedef enum logic [1:0] {S_IDLE, S_WAIT_GNT, S_WAIT_DONE} fsm_e;

  // ---------------------------------------------------------------------
  // Arrays
  // ---------------------------------------------------------------------
  cstate_e state_q [SETS];
  tag_t    tag_q   [SETS];
  line_t   data_q  [SETS];

  // ---------------------------------------------------------------------
  // Request buffer
  // ---------------------------------------------------------------------
  core_req_t hd;
  logic      q_empty, q_full, q_pop;
  logic [$clog2(Q_DEPTH+1)-1:0] q_count;

  pcc_req_fifo #(.WIDTH($bits(core_req_t)), .DEPTH(Q_DEPTH)) u_queue (
    .clk, .rst_n,
    .push (core_req_valid),
    .din  (core_req),
    .full (q_full),
    .pop  (q_pop),
    .dout (hd),
    .empty(q_empty),
    .count(q_count)
  );
  assign core_req_ready = !q_full;

  // ---------------------------------------------------------------------
  // Lookup of the head request
  // ---------------------------------------------------------------------
  fsm_e    fsm_q;
  cmd_e    cur_cmd_q;

  idx_t    h_idx;
  tag_t    h_tag;
  logic [WSEL_W-1:0] h_wsel;
  cstate_e h_st, h_eff_st;
  logic    h_match, h_eff_match, h_hit, h_blocked;

  // snoop lookup
  idx_t    s_idx;
  tag_t    s_tag;
  cstate_e s_st;
  logic    s_hit;

  always_comb begin
    s_idx = snoop_i.laddr[IDX_W-1:0];
    s_tag = snoop_i.laddr[LADDR_W-1:IDX_W];
    s_st  = state_q[s_idx];
    s_hit = snoop_i.valid && (s_st != ST_I) && (tag_q[s_idx] == s_tag);

    snoop_resp_o.shared = s_hit;
    snoop_resp_o.owner  = s_hit && snoop_owner(PROTO, s_st, snoop_i.cmd);
    snoop_resp_o.wb     = s_hit && snoop_wb(PROTO, s_st, snoop_i.cmd);
    snoop_resp_o.data   = data_q[s_idx];
  end

  always_comb begin
    h_idx     = hd.addr[OFFSET_W +: IDX_W];
    h_tag     = hd.addr[ADDR_W-1 -: TAG_W];
    h_wsel    = hd.addr[OFFSET_W-1 -: WSEL_W];
    h_st      = state_q[h_idx];
    h_match   = (h_st != ST_I) && (tag_q[h_idx] == h_tag);
    h_hit     = h_match && access_hit(h_st, hd.we);
    h_blocked = snoop_commit_i && s_hit && (s_idx == h_idx);
    // state of the set as it will be after a snoop committing this cycle
    h_eff_st  = (snoop_commit_i && s_hit && (s_idx == h_idx))
                ? snoop_next(PROTO, h_st, snoop_i.cmd) : h_st;
    h_eff_match = (h_eff_st != ST_I) && (tag_q[h_idx] == h_tag);
  end

  // Bus message chosen in the grant cycle.
  always_comb begin
    bus_req_o       = '0;
    bus_req_o.valid = (fsm_q == S_WAIT_GNT);
    bus_req_o.data  = data_q[h_idx];
    if (!h_eff_match && needs_putm(h_eff_st)) begin
      bus_req_o.cmd   = CMD_PUTM;
      bus_req_o.laddr = {tag_q[h_idx], h_idx};
    end else begin
      bus_req_o.cmd   = miss_cmd(h_eff_match ? h_eff_st : ST_I, hd.we);
      bus_req_o.laddr = {h_tag, h_idx};
    end
  end

  // ---------------------------------------------------------------------
  // Controller
  // ---------------------------------------------------------------------
  line_t   fill_line;
  cstate_e fill_st;

  always_comb begin
    fill_line = (cur_cmd_q == CMD_UPG) ? data_q[h_idx] : bus_data_i;
    fill_st   = req_next(PROTO, cur_cmd_q, bus_shared_i);
    if (hd.we) begin
      fill_line[h_wsel*WORD_W +: WORD_W] = hd.wdata;
      fill_st = ST_M;
    end
  end

  always_comb begin
    q_pop = 1'b0;
    if (fsm_q == S_IDLE && !q_empty && !h_blocked && h_hit) q_pop = 1'b1;
    if (fsm_q == S_WAIT_DONE && bus_done_i && cur_cmd_q != CMD_PUTM) q_pop = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fsm_q           <= S_IDLE;
      cur_cmd_q       <= CMD_GETS;
      core_resp_valid <= 1'b0;
      core_resp_rdata <= '0;
      for (int i = 0; i < int'(SETS); i++) state_q[i] <= ST_I;
    end else begin
      core_resp_valid <= 1'b0;

      // snooped message of another core
      if (snoop_commit_i && s_hit)
        state_q[s_idx] <= snoop_next(PROTO, s_st, snoop_i.cmd);

      case (fsm_q)
        S_IDLE: begin
          if (!q_empty && !h_blocked) begin
            if (h_hit) begin
              core_resp_valid <= 1'b1;
              core_resp_rdata <= data_q[h_idx][h_wsel*WORD_W +: WORD_W];
              if (hd.we) begin
                data_q[h_idx][h_wsel*WORD_W +: WORD_W] <= hd.wdata;
                state_q[h_idx] <= ST_M;     // M stays M, E -> M silently
                core_resp_rdata <= hd.wdata;
              end
            end else begin
              fsm_q <= S_WAIT_GNT;
            end
          end
        end
        S_WAIT_GNT: begin
          if (bus_gnt_i) begin
            cur_cmd_q <= bus_req_o.cmd;
            fsm_q     <= S_WAIT_DONE;
          end
        end
        default: begin  // S_WAIT_DONE
          if (bus_done_i) begin
            fsm_q <= S_IDLE;
            if (cur_cmd_q == CMD_PUTM) begin
              state_q[h_idx] <= ST_I;
            end else begin
              tag_q[h_idx]    <= h_tag;
              data_q[h_idx]   <= fill_line;
              state_q[h_idx]  <= fill_st;
              core_resp_valid <= 1'b1;
              core_resp_rdata <= fill_line[h_wsel*WORD_W +: WORD_W];
            end
          end
        end
      endcase
    end
  end

  // A core never snoops its own message and is never granted while it is not
  // waiting for the bus.
  a_gnt_when_waiting: assert property (@(posedge clk) disable iff (!rst_n)
                                       bus_gnt_i |-> fsm_q == S_WAIT_GNT);
  a_done_when_busy:   assert property (@(posedge clk) disable iff (!rst_n)
                                       bus_done_i |-> fsm_q == S_WAIT_DONE);
  a_no_self_snoop:    assert property (@(posedge clk) disable iff (!rst_n)
                                       snoop_i.valid |-> fsm_q != S_WAIT_DONE);
endmodule
