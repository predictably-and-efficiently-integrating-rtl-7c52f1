// pcc_l1_scenario: directed test of one pcc_l1_cache in protocol PROTO.
//
// The module plays the core, the arbiter, the bus and the other caches
// around a 4-set L1 and walks through the protocol's cases, checking the bus
// message, the snoop answer, the data and the latency of each:
// read miss (GetS, E or S installed), 1-cycle hit, store to E (silent) or S
// (upgrade), snooped GetS of an M line (owner, write-back flag, M->S or
// M->O), upgrade of S/O, snooped GetM (owner, invalidation), an upgrade
// that becomes a GetM because another core's GetM took the line while the
// cache waited for its grant, eviction of an M line (PutM with data) and of
// an E or S line (PutM or silent), back-to-back hits from the request
// buffer (one per cycle, in order).
module pcc_l1_scenario
  import pcc_pkg::*;
#(
  parameter proto_e PROTO = PROTO_MSI
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int RL = 4, DL = 6;

  logic        core_req_valid, core_req_ready, core_resp_valid;
  core_req_t   core_req;
  word_t       core_resp_rdata;
  bus_req_t    bus_req_o;
  logic        bus_gnt_i, bus_done_i, bus_shared_i, snoop_commit_i;
  line_t       bus_data_i;
  snoop_t      snoop_i;
  snoop_resp_t snoop_resp_o;

  pcc_l1_cache #(.PROTO(PROTO), .SETS(4), .Q_DEPTH(8)) dut (.*);

  localparam addr_t  A  = 32'h0000_0400;   // line 0x10, set 0
  localparam addr_t  B  = 32'h0000_0500;   // line 0x14, set 0
  localparam laddr_t LA = laddr_t'(32'h10);
  localparam laddr_t LB = laddr_t'(32'h14);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s: %s", PROTO.name(), what); end
  endtask

  function automatic line_t mk_line(word_t base);
    line_t l;
    for (int i = 0; i < int'(LINE_WORDS); i++) l[i*WORD_W +: WORD_W] = base + word_t'(i);
    return l;
  endfunction

  function automatic word_t wrd(line_t l, int i);
    return l[i*WORD_W +: WORD_W];
  endfunction

  // core side
  task automatic issue(input logic we, input addr_t a, input word_t d);
    core_req_valid = 1'b1;
    core_req.we = we; core_req.addr = a; core_req.wdata = d;
    @(negedge clk);
    core_req_valid = 1'b0;
  endtask

  // wait for the response, count cycles since the request was taken
  task automatic wait_resp(output word_t v, output int lat);
    lat = 0;
    while (!core_resp_valid && lat < 1000) begin @(negedge clk); lat++; end
    v = core_resp_rdata;
    @(negedge clk);
  endtask

  // arbiter + bus: wait for the request, check it, grant, finish
  task automatic serve(input cmd_e exp_cmd, input laddr_t exp_la, input line_t data,
                       input logic shared, input string what, output line_t putm_data);
    int n = 0;
    while (!bus_req_o.valid && n < 100) begin @(negedge clk); n++; end
    check(bus_req_o.valid, {what, ": bus request"});
    check(bus_req_o.cmd == exp_cmd, $sformatf("%s: cmd %s expected %s", what, bus_req_o.cmd.name(), exp_cmd.name()));
    check(bus_req_o.laddr == exp_la, $sformatf("%s: laddr %h expected %h", what, bus_req_o.laddr, exp_la));
    putm_data = bus_req_o.data;
    bus_gnt_i = 1'b1;
    @(negedge clk);
    bus_gnt_i = 1'b0;
    check(!bus_req_o.valid, {what, ": request dropped after grant"});
    repeat (cmd_has_data(exp_cmd) ? RL + DL - 1 : RL - 1) @(negedge clk);
    bus_done_i = 1'b1; bus_data_i = data; bus_shared_i = shared;
    @(negedge clk);
    bus_done_i = 1'b0;
  endtask

  // another core's message: check the answer, commit
  task automatic snoop(input cmd_e cmd, input laddr_t la, input logic exp_shared,
                       input logic exp_owner, input logic exp_wb, output line_t data,
                       input string what);
    snoop_i.valid = 1'b1; snoop_i.cmd = cmd; snoop_i.laddr = la;
    repeat (RL - 1) @(negedge clk);
    snoop_commit_i = 1'b1;
    #1;
    check(snoop_resp_o.shared == exp_shared, {what, ": shared"});
    check(snoop_resp_o.owner == exp_owner, {what, ": owner"});
    check(snoop_resp_o.wb == exp_wb, {what, ": write-back"});
    data = snoop_resp_o.data;
    @(negedge clk);
    snoop_commit_i = 1'b0;
    snoop_i = '0;
  endtask

  initial begin
    word_t v; int lat; line_t d, pd;
    logic mesi_like;
    mesi_like = (PROTO != PROTO_MSI);
    checks = 0; failures = 0; done = 1'b0;
    core_req_valid = 1'b0; core_req = '0;
    bus_gnt_i = 1'b0; bus_done_i = 1'b0; bus_shared_i = 1'b0; bus_data_i = '0;
    snoop_i = '0; snoop_commit_i = 1'b0;
    @(posedge rst_n);
    @(negedge clk);

    // 1 read miss, nobody else holds the line
    issue(1'b0, A + 12, '0);
    serve(CMD_GETS, LA, mk_line(32'hA000), 1'b0, "read miss", pd);
    wait_resp(v, lat);
    check(v == 32'hA003, "read miss data");
    check(lat == 0, $sformatf("response 1 cycle after done (%0d)", lat));
    check(dut.state_q[0] == (mesi_like ? ST_E : ST_S), "state after GetS alone");

    // 2 hit: answered in the next cycle, no bus request
    issue(1'b0, A + 4, '0);
    @(negedge clk);
    check(core_resp_valid && core_resp_rdata == 32'hA001, "1-cycle read hit");
    @(negedge clk);

    // 3 store: silent E->M, or upgrade of S
    if (mesi_like) begin
      issue(1'b1, A + 12, 32'h1111);
      @(negedge clk);
      check(core_resp_valid && !bus_req_o.valid, "silent E->M store hit");
      @(negedge clk);
    end else begin
      issue(1'b1, A + 12, 32'h1111);
      serve(CMD_UPG, LA, '0, 1'b0, "store to S", pd);
      wait_resp(v, lat);
      check(v == 32'h1111, "store response");
    end
    check(dut.state_q[0] == ST_M, "M after store");

    // 4 another core reads A: this cache owns it
    snoop(CMD_GETS, LA, 1'b1, 1'b1, PROTO != PROTO_MOESI, d, "snooped GetS of M");
    check(wrd(d, 3) == 32'h1111 && wrd(d, 0) == 32'hA000, "owner supplies the modified line");
    check(dut.state_q[0] == ((PROTO == PROTO_MOESI) ? ST_O : ST_S), "state after snooped GetS");

    // 5 read hit on S/O
    issue(1'b0, A + 12, '0);
    @(negedge clk);
    check(core_resp_valid && core_resp_rdata == 32'h1111, "hit on S/O");
    @(negedge clk);

    // 6 store to S/O: upgrade, no data phase
    issue(1'b1, A + 8, 32'h2222);
    serve(CMD_UPG, LA, '0, 1'b1, "store to S/O", pd);
    wait_resp(v, lat);
    check(v == 32'h2222 && dut.state_q[0] == ST_M, "upgrade done");

    // 7 another core writes A: supply and invalidate
    snoop(CMD_GETM, LA, 1'b1, 1'b1, 1'b0, d, "snooped GetM of M");
    check(wrd(d, 2) == 32'h2222 && wrd(d, 3) == 32'h1111, "owner supplies line on GetM");
    check(dut.state_q[0] == ST_I, "invalidated");

    // 8 read miss while others share it
    issue(1'b0, A + 12, '0);
    serve(CMD_GETS, LA, mk_line(32'h3330), 1'b1, "read miss, shared", pd);
    wait_resp(v, lat);
    check(v == 32'h3333 && dut.state_q[0] == ST_S, "S installed when shared");

    // 9 store to S, but the line is taken by another core's GetM first
    issue(1'b1, A + 12, 32'h4444);
    @(negedge clk);
    check(bus_req_o.valid && bus_req_o.cmd == CMD_UPG, "upgrade requested");
    snoop(CMD_GETM, LA, 1'b1, 1'b0, 1'b0, d, "snooped GetM of S");
    check(dut.state_q[0] == ST_I, "S invalidated while waiting");
    serve(CMD_GETM, LA, mk_line(32'h5550), 1'b0, "upgrade turned GetM", pd);
    wait_resp(v, lat);
    check(v == 32'h4444, "store after GetM");

    // 10 conflict miss on B evicts the modified A with a PutM
    issue(1'b0, B, '0);
    serve(CMD_PUTM, LA, '0, 1'b0, "eviction of M", pd);
    check(wrd(pd, 3) == 32'h4444 && wrd(pd, 0) == 32'h5550, "PutM carries the line");
    serve(CMD_GETS, LB, mk_line(32'hB000), 1'b0, "miss after eviction", pd);
    wait_resp(v, lat);
    check(v == 32'hB000, "B data");

    // 11 A is gone
    snoop(CMD_GETS, LA, 1'b0, 1'b0, 1'b0, d, "snoop of evicted line");

    // 12 B (E or S) evicted by A: PutM for E, silent for S
    issue(1'b0, A, '0);
    if (mesi_like) serve(CMD_PUTM, LB, '0, 1'b0, "eviction of E", pd);
    serve(CMD_GETS, LA, mk_line(32'hC000), 1'b1, "miss on A again", pd);
    wait_resp(v, lat);
    check(v == 32'hC000, "A data again");

    // 13 three queued hits: one response per cycle, in order, each one
    //    cycle after the previous
    for (int i = 0; i < 4; i++) begin
      core_req_valid = (i < 3);
      core_req.we = 1'b0; core_req.addr = A + 4 * i;
      @(negedge clk);
      if (i >= 1) check(core_resp_valid && core_resp_rdata == 32'hC000 + word_t'(i - 1),
                        $sformatf("queued hit %0d", i - 1));
    end
    core_req_valid = 1'b0;
    @(negedge clk);
    check(!core_resp_valid && dut.q_empty, "queue drained");
    done = 1'b1;
  end
endmodule
