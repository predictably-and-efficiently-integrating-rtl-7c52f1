// pcc_traffic_checker: traffic generator and scoreboard for pcc_top.
//
// Drives every core port of one pcc_top instance with random loads and
// stores to a small pool of lines, and checks:
//   * data: each core stores only to its own words of each line (word index
//     mod N_CORES == core), with values {core, sequence} that grow. A load of
//     an own word must return the core's latest earlier store; a load of
//     another core's word must return 0 or a value of that core that is not
//     older than the last one this core saw there and not newer than the
//     newest one issued. After the traffic all cores read back every word
//     and must see the final values.
//   * latency, counted from the cycle a request reaches the head of its
//     core's queue: a request served without the bus takes 1 cycle (2 when
//     a snoop of the same set commits in the lookup cycle);
//     one that used the bus takes at most WCL_arb + L_acc + 2 cycles, or
//     2 (WCL_arb + L_acc) + 3 when it first had to write a victim back, with
//     WCL_arb from the arbiter formulas (TDM N*S, RR (N-1)*L_acc, WRR
//     sum_{i!=j} W_i*L_acc, HRR (ceil(HP/W_j)-1)*L_acc). The two and three
//     extra cycles are the lookup and response cycles of the controller.
//   * every bus transaction lasts REQ_LAT + DATA_LAT cycles (REQ_LAT for an
//     upgrade).
// At the end it prints each core's total memory latency, split into hits,
// misses and misses with a replacement, and checks it against the task
// bound WCML = 2 R_T WCL_perReq for R_T requests (plus the controller
// cycles). It also counts how often each mechanism happened (hits, GetS, GetM,
// upgrades, PutM evictions, cache-to-cache transfers, overlapped write-back,
// shared-memory supply, E installs, silent E->M, supply from O, waiting for
// the bus, several outstanding requests) and counts a failure for one that
// the configuration has but that never happened.
//
// Cores below N_OOO keep up to Q_DEPTH requests outstanding; the others wait
// for each response (in-order). done rises when the final read-back is over.
// With SAME_TRACE set, the k-th request of every core is the same one, a
// fixed hash of k (load or store, line, word), so all cores walk the same
// lines in the same order and share all of their data; a store still goes
// to the core's own word of the chosen line.
module pcc_traffic_checker
  import pcc_pkg::*;
#(
  parameter int unsigned N_CORES           = 4,
  parameter proto_e      PROTO             = PROTO_MSI,
  parameter arb_e        ARB               = ARB_TDM,
  parameter int unsigned REQ_LAT           = 4,
  parameter int unsigned DATA_LAT          = 50,
  parameter int unsigned SLOT              = 54,
  parameter int unsigned WEIGHTS [N_CORES] = '{4, 2, 1, 1},
  parameter int unsigned Q_DEPTH           = 8,
  parameter int unsigned N_OOO             = 2,
  parameter int unsigned POOL_LINES        = 12,   // lines touched
  parameter int unsigned LINE_STRIDE       = 1,    // line-address step between pool lines
  parameter int unsigned N_REQ             = 400,  // random requests per core
  parameter bit          SAME_TRACE        = 1'b0, // all cores issue the same trace
  parameter int unsigned SEED              = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init_done,
  output logic        core_req_valid  [N_CORES],
  input  logic        core_req_ready  [N_CORES],
  output core_req_t   core_req        [N_CORES],
  input  logic        core_resp_valid [N_CORES],
  input  word_t       core_resp_rdata [N_CORES],
  // observation of the bus and the caches
  input  logic        gnt_valid,
  input  logic [$clog2(N_CORES)-1:0] gnt_id,
  input  cmd_e        gnt_cmd,
  input  logic        snoop_commit,
  input  logic [N_CORES-1:0] cdone,
  input  logic        cshared,
  input  logic        obs_c2c,
  input  logic        obs_wb,
  input  logic [N_CORES-1:0] pk_hit,        // a queued request hit this cycle
  input  cstate_e     pk_hit_st [N_CORES],  // state of the line it hit
  input  logic        pk_hit_we [N_CORES],
  input  logic [N_CORES-1:0] pk_owner,      // snooper answers as owner
  input  cstate_e     pk_snoop_st [N_CORES],// its state
  input  logic [N_CORES-1:0] pk_waiting,    // controller waits for a grant
  output logic        done,
  output int          checks,
  output int          failures
);
  localparam int unsigned LACC  = REQ_LAT + DATA_LAT;
  localparam int unsigned WORDS = POOL_LINES * LINE_WORDS;

  // ---------------------------------------------------------------------
  // analytical arbitration bound of core j
  // ---------------------------------------------------------------------
  function automatic int unsigned wcl_arb(int unsigned j);
    int unsigned s = 0, hp = 0;
    case (ARB)
      ARB_TDM: return N_CORES * SLOT;
      ARB_RR:  return (N_CORES - 1) * LACC;
      ARB_WRR: begin
        for (int unsigned i = 0; i < N_CORES; i++) if (i != j) s += WEIGHTS[i];
        return s * LACC;
      end
      default: begin
        for (int unsigned i = 0; i < N_CORES; i++) hp += WEIGHTS[i];
        return ((hp + WEIGHTS[j] - 1) / WEIGHTS[j] - 1) * LACC;
      end
    endcase
  endfunction

  // ---------------------------------------------------------------------
  // reference state
  // ---------------------------------------------------------------------
  word_t last_wr   [WORDS];              // newest value issued to each word
  word_t seen      [N_CORES][WORDS];     // newest value each core read there
  int unsigned seq [N_CORES];

  typedef struct {
    logic  we;
    int    widx;
    word_t expect_own;   // value an own-word load must return
    logic  own;
    word_t max_other;    // newest value of the owner issued before the load
    longint push_cyc;
  } pend_t;

  pend_t  pend [N_CORES][$];
  longint cyc;
  longint last_resp [N_CORES];
  int     putm_cnt [N_CORES];
  int     gnt_cnt  [N_CORES];
  int     putm_at_start [N_CORES];
  int     gnt_at_start  [N_CORES];
  int     issued  [N_CORES];
  int     phase;          // 0 random traffic, 1 read-back, 2 done
  int     rb_idx  [N_CORES];
  int     max_lat [N_CORES];
  longint lat_hit [N_CORES], lat_miss [N_CORES], lat_repl [N_CORES];  // total latency by kind
  int     n_resp  [N_CORES];

  // mechanism counters
  int n_hit, n_gets, n_getm, n_upg, n_putm, n_c2c, n_wb_overlap, n_sm_supply;
  int n_e_install, n_silent_em, n_o_supply, n_bus_wait, n_multi_out, n_txn_len, n_hit1;

  function automatic addr_t waddr(int widx);
    int unsigned line = widx / LINE_WORDS;
    int unsigned w    = widx % LINE_WORDS;
    return addr_t'((line * LINE_STRIDE) * LINE_BYTES + w * 4);
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0d)", what, cyc);
    end
  endtask

  // k-th request of the shared trace: word index and load/store, from an
  // integer hash of k (multiply, xor-shift) so every core computes the same.
  task automatic trace_at(input int unsigned k, output int w, output logic we);
    logic [31:0] h;
    h  = (k + SEED) * 32'h9E37_79B1;
    h  = h ^ (h >> 15);
    h  = h * 32'h85EB_CA6B;
    h  = h ^ (h >> 13);
    w  = int'(h[31:8] % WORDS);
    we = h[2] & h[5];                 // one store in four
  endtask

  // ---------------------------------------------------------------------
  // driver
  // ---------------------------------------------------------------------
  logic drive_go;
  assign drive_go = init_done && rst_n;

  always @(posedge clk) begin
    if (!rst_n) begin
      for (int c = 0; c < int'(N_CORES); c++) begin
        core_req_valid[c] <= 1'b0;
        core_req[c]       <= '0;
      end
    end else begin
      for (int c = 0; c < int'(N_CORES); c++) begin
        logic   want;
        pend_t  p;
        int     w;
        logic   we;
        // the request offered last cycle was taken if ready was high
        if (core_req_valid[c] && core_req_ready[c]) core_req_valid[c] <= 1'b0;
        want = 1'b0;
        if (drive_go && !(core_req_valid[c] && !core_req_ready[c])) begin
          if (phase == 0 && issued[c] < int'(N_REQ)) begin
            if (c < int'(N_OOO)) want = (pend[c].size() < int'(Q_DEPTH)) && ($urandom % 4 != 0);
            else                 want = (pend[c].size() == 0) && !(core_req_valid[c]);
          end else if (phase == 1 && rb_idx[c] < int'(WORDS)) begin
            want = (pend[c].size() == 0) && !(core_req_valid[c]);
          end
        end
        if (want) begin
          if (phase == 0) begin
            if (SAME_TRACE) begin
              trace_at(issued[c], w, we);
            end else begin
              w  = int'($urandom % WORDS);
              we = ($urandom % 2) == 1;
            end
            if (we) w = w - (w % int'(N_CORES)) + c;     // own word
            issued[c]++;
          end else begin
            w  = rb_idx[c];
            we = 1'b0;
            rb_idx[c]++;
          end
          p.we        = we;
          p.widx      = w;
          p.own       = (w % int'(N_CORES)) == c;
          p.push_cyc  = cyc;
          p.max_other = last_wr[w];
          if (we) begin
            seq[c]++;
            last_wr[w] = {8'(c), 24'(seq[c])};
          end
          p.expect_own = last_wr[w];
          pend[c].push_back(p);
          core_req_valid[c]      <= 1'b1;
          core_req[c].we         <= we;
          core_req[c].addr       <= waddr(w);
          core_req[c].wdata      <= last_wr[w];
        end
      end
    end
  end

  // ---------------------------------------------------------------------
  // scoreboard
  // ---------------------------------------------------------------------
  longint txn_start;
  cmd_e   txn_cmd;
  logic   txn_busy;

  initial begin
    checks = 0; failures = 0; cyc = 0; phase = 0; done = 1'b0;
    n_hit = 0; n_gets = 0; n_getm = 0; n_upg = 0; n_putm = 0; n_c2c = 0;
    n_wb_overlap = 0; n_sm_supply = 0; n_e_install = 0; n_silent_em = 0;
    n_o_supply = 0; n_bus_wait = 0; n_multi_out = 0; n_txn_len = 0; n_hit1 = 0;
    txn_busy = 1'b0; txn_start = 0; txn_cmd = CMD_GETS;
    for (int i = 0; i < int'(WORDS); i++) begin
      last_wr[i] = '0;
      for (int c = 0; c < int'(N_CORES); c++) seen[c][i] = '0;
    end
    for (int c = 0; c < int'(N_CORES); c++) begin
      seq[c] = 0; issued[c] = 0; rb_idx[c] = 0; putm_cnt[c] = 0; gnt_cnt[c] = 0;
      last_resp[c] = 0; max_lat[c] = 0;
      lat_hit[c] = 0; lat_miss[c] = 0; lat_repl[c] = 0; n_resp[c] = 0;
      putm_at_start[c] = 0; gnt_at_start[c] = 0;
    end
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && init_done) begin
      // bus transactions
      if (|cdone && txn_busy) begin
        check(cyc - txn_start == ((txn_cmd == CMD_UPG) ? REQ_LAT : LACC),
              $sformatf("bus transaction length %0d", cyc - txn_start));
        n_txn_len++;
        if (txn_cmd == CMD_GETS || txn_cmd == CMD_GETM) begin
          if (obs_c2c) n_c2c++; else n_sm_supply++;
          if (obs_c2c && obs_wb) n_wb_overlap++;
          if (txn_cmd == CMD_GETS && !cshared && PROTO != PROTO_MSI) n_e_install++;
        end
        txn_busy = 1'b0;
      end
      if (gnt_valid) begin
        if (gnt_cmd == CMD_PUTM) begin putm_cnt[gnt_id]++; n_putm++; end
        if (gnt_cmd == CMD_GETS) n_gets++;
        if (gnt_cmd == CMD_GETM) n_getm++;
        if (gnt_cmd == CMD_UPG)  n_upg++;
        gnt_cnt[gnt_id]++;
        txn_busy  = 1'b1;
        txn_start = cyc;
        txn_cmd   = gnt_cmd;
      end
      for (int c = 0; c < int'(N_CORES); c++) begin
        if (pk_hit[c]) begin
          n_hit++;
          if (pk_hit_we[c] && pk_hit_st[c] == ST_E) n_silent_em++;
        end
        if (snoop_commit && pk_owner[c] && pk_snoop_st[c] == ST_O) n_o_supply++;
        if (pk_waiting[c] && !(gnt_valid && gnt_id == c)) n_bus_wait++;
        if (pend[c].size() > 1) n_multi_out++;
      end

      // responses
      for (int c = 0; c < int'(N_CORES); c++) begin
        if (core_resp_valid[c]) begin
          pend_t  p;
          longint start, lat;
          int     ngnt, nputm, o;
          word_t  v;
          if (pend[c].size() == 0) begin
            check(1'b0, "response without request");
          end else begin
            p = pend[c].pop_front();
            start = (p.push_cyc + 2 > last_resp[c]) ? p.push_cyc + 2 : last_resp[c];
            lat   = cyc - start;
            ngnt  = gnt_cnt[c] - gnt_at_start[c];
            nputm = putm_cnt[c] - putm_at_start[c];
            v     = core_resp_rdata[c];
            if (ngnt == 0) begin
              // 1 cycle; 2 when the hit had to wait for a snoop of its set
              check(lat == 1 || lat == 2, $sformatf("core %0d hit latency %0d", c, lat));
              if (lat == 1) n_hit1++;
            end
            else if (nputm == 0)
              check(lat <= longint'(wcl_arb(c) + LACC + 2),
                    $sformatf("core %0d miss latency %0d > %0d", c, lat, wcl_arb(c) + LACC + 2));
            else
              check(lat <= longint'(2 * (wcl_arb(c) + LACC) + 3),
                    $sformatf("core %0d miss+wb latency %0d", c, lat));
            if (ngnt > 0 && nputm == 0 && lat > max_lat[c]) max_lat[c] = int'(lat);
            n_resp[c]++;
            if (ngnt == 0)       lat_hit[c]  += lat;
            else if (nputm == 0) lat_miss[c] += lat;
            else                 lat_repl[c] += lat;
            if (p.we) begin
              check(v == p.expect_own, $sformatf("core %0d store echo", c));
            end else if (p.own || phase != 0) begin
              check(v == p.expect_own,
                    $sformatf("core %0d load word %0d got %h expected %h", c, p.widx, v, p.expect_own));
            end else begin
              o = p.widx % int'(N_CORES);
              check((v == 0) || (32'(v[31:24]) == o),
                    $sformatf("core %0d load word %0d foreign value %h", c, p.widx, v));
              check(v >= seen[c][p.widx] && v <= last_wr[p.widx],
                    $sformatf("core %0d load word %0d value %h out of order", c, p.widx, v));
              if (v > seen[c][p.widx]) seen[c][p.widx] = v;
            end
            last_resp[c]     = cyc;
            putm_at_start[c] = putm_cnt[c];
            gnt_at_start[c]  = gnt_cnt[c];
          end
        end
      end

      // phase changes
      if (phase == 0) begin
        logic all_done;
        all_done = 1'b1;
        for (int c = 0; c < int'(N_CORES); c++)
          if (issued[c] < int'(N_REQ) || pend[c].size() != 0 || core_req_valid[c]) all_done = 1'b0;
        if (all_done) phase = 1;
      end else if (phase == 1) begin
        logic all_done;
        all_done = 1'b1;
        for (int c = 0; c < int'(N_CORES); c++)
          if (rb_idx[c] < int'(WORDS) || pend[c].size() != 0 || core_req_valid[c]) all_done = 1'b0;
        if (all_done) begin
          phase = 2;
          report();
          done <= 1'b1;
        end
      end
    end
  end

  task automatic need(input int n, input logic applies, input string what);
    $display("  %-34s %0d", what, n);
    if (applies) check(n > 0, {"mechanism never happened: ", what});
  endtask

  task automatic report();
    $display("config PROTO=%s ARB=%s N=%0d L_acc=%0d", PROTO.name(), ARB.name(), N_CORES, LACC);
    for (int c = 0; c < int'(N_CORES); c++)
      $display("  core %0d: worst observed miss latency %0d (minus 2 controller cycles), analytical WCL_arb+L_acc %0d",
               c, max_lat[c] - 2, wcl_arb(c) + LACC);
    // total memory latency of each core against the task-level bound
    // WCML = 2 R_T WCL_perReq (every request may first write back a victim),
    // with the controller's 3 cycles per request added
    for (int c = 0; c < int'(N_CORES); c++) begin
      longint tot, bound;
      tot   = lat_hit[c] + lat_miss[c] + lat_repl[c];
      bound = longint'(n_resp[c]) * longint'(2 * (wcl_arb(c) + LACC) + 3);
      $display("  core %0d: %0d requests, memory latency hit %0d + miss %0d + replacement %0d = %0d, WCML bound %0d",
               c, n_resp[c], lat_hit[c], lat_miss[c], lat_repl[c], tot, bound);
      check(n_resp[c] > 0 && tot <= bound, $sformatf("core %0d total memory latency %0d > %0d", c, tot, bound));
    end
    need(n_hit,        1'b1, "L1 hits");
    need(n_hit1,       1'b1, "hits answered in 1 cycle");
    need(n_gets,       1'b1, "GetS");
    need(n_getm,       1'b1, "GetM");
    need(n_upg,        1'b1, "upgrade (no data phase)");
    need(n_putm,       1'b1, "PutM write-back of a victim");
    need(n_c2c,        1'b1, "cache-to-cache transfer");
    need(n_wb_overlap, PROTO != PROTO_MOESI, "c2c overlapped with write-back");
    need(n_sm_supply,  1'b1, "data from shared memory");
    need(n_e_install,  PROTO != PROTO_MSI, "E installed on GetS");
    need(n_silent_em,  PROTO != PROTO_MSI, "silent E->M store");
    need(n_o_supply,   PROTO == PROTO_MOESI, "data supplied from O");
    need(n_bus_wait,   1'b1, "cycles waiting for the bus");
    need(n_multi_out,  N_OOO > 0 && Q_DEPTH > 1, "cycles with >1 outstanding");
  endtask
endmodule
