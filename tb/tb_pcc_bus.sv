// tb_pcc_bus: self-checking test of the snooping bus sequencer at its
// default 4 + 50 cycle access.
//
// The testbench plays the arbiter (grants a random waiting core when
// bus_free), the caches (random requests and random snoop responses with at
// most one owner) and the shared memory (registered read). For each
// transaction it checks: the message is broadcast to every cache except the
// sender for exactly REQ_LAT cycles; snoop_commit comes in the last of
// them; done comes REQ_LAT + DATA_LAT cycles after the grant (REQ_LAT for an
// upgrade) to the sender only; the data is the owner's line if one answered,
// the sender's line for a PutM, and the shared memory's otherwise; the
// shared memory is written, with the same data, exactly for a PutM or when
// the owner asked for a write-back; the shared flag is the OR of the
// answers; bus_free is high only when a new transaction may start.
module tb_pcc_bus;
  import pcc_pkg::*;
  localparam int N = 4, RL = 4, DL = 50;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0] arb_req, cgnt, cdone;
  logic         bus_free, gnt_valid, cshared, snoop_commit, sm_we, obs_c2c, obs_wb;
  logic [1:0]   gnt_id;
  bus_req_t     creq [N];
  snoop_t       snoop [N];
  snoop_resp_t  sresp [N];
  line_t        cdata, sm_rdata, sm_wdata;
  laddr_t       sm_raddr, sm_waddr;

  pcc_bus #(.N_CORES(N), .REQ_LAT(RL), .DATA_LAT(DL)) dut (.*);

  // shared memory model: line content derived from the address
  function automatic line_t sm_line(laddr_t a);
    return {LINE_W/32{32'(a) ^ 32'h5a5a0000}};
  endfunction
  always_ff @(posedge clk) sm_rdata <= sm_line(sm_raddr);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic line_t rnd_line();
    line_t l;
    for (int i = 0; i < int'(LINE_W) / 32; i++) l[i*32 +: 32] = $urandom;
    return l;
  endfunction

  int n_c2c = 0, n_wb = 0, n_putm = 0, n_upg = 0, n_sm = 0;

  initial begin
    int src, len, owner;
    bus_req_t r;
    logic exp_wb, exp_shared;
    line_t exp_data;
    for (int i = 0; i < N; i++) begin creq[i] = '0; sresp[i] = '0; end
    gnt_valid = 1'b0; gnt_id = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      // new request of a random core
      src = int'($urandom % N);
      r.valid = 1'b1;
      r.cmd   = cmd_e'($urandom % 4);
      r.laddr = laddr_t'($urandom);
      r.data  = rnd_line();
      for (int i = 0; i < N; i++) creq[i] = '0;
      creq[src] = r;
      // snoop answers: random sharers, at most one owner
      owner = ($urandom % 2 == 0) ? int'($urandom % N) : -1;
      if (owner == src) owner = -1;
      exp_shared = 1'b0; exp_wb = 1'b0;
      for (int i = 0; i < N; i++) begin
        sresp[i].shared = (i == owner) || (i != src && $urandom % 3 == 0);
        sresp[i].owner  = (i == owner);
        sresp[i].wb     = (i == owner) && ($urandom % 2 == 0);
        sresp[i].data   = rnd_line();
        if (i != src) exp_shared |= sresp[i].shared;
        if (i != src) exp_wb     |= sresp[i].wb;
      end
      exp_data = (r.cmd == CMD_PUTM) ? r.data : (owner >= 0) ? sresp[owner].data : sm_line(r.laddr);
      #1;
      check(bus_free, "bus free between transactions");
      check(arb_req == (N'(1) << src), "request vector");
      gnt_valid = 1'b1; gnt_id = 2'(src);
      #1;
      check(cgnt == (N'(1) << src), "one-hot grant");
      len = cmd_has_data(r.cmd) ? RL + DL : RL;
      @(negedge clk);
      gnt_valid = 1'b0;
      creq[src] = '0;
      for (int c = 1; c <= len; c++) begin
        if (c <= RL)
          for (int i = 0; i < N; i++)
            check(snoop[i].valid == (i != src) && snoop[i].cmd == r.cmd && snoop[i].laddr == r.laddr,
                  $sformatf("broadcast to %0d in cycle %0d", i, c));
        else
          for (int i = 0; i < N; i++) check(!snoop[i].valid, "no broadcast in data phase");
        check(snoop_commit == (c == RL), $sformatf("snoop_commit in cycle %0d", c));
        check(cdone == ((c == len) ? (N'(1) << src) : '0), $sformatf("done in cycle %0d of %0d", c, len));
        check(bus_free == (c == len), $sformatf("bus_free in cycle %0d", c));
        if (c == RL) check(cshared == exp_shared, "shared flag");
        if (c == len && cmd_has_data(r.cmd)) begin
          check(cdata == exp_data, "data to requester");
          check(sm_we == (exp_wb || r.cmd == CMD_PUTM), "shared-memory write");
          if (sm_we) check(sm_wdata == exp_data && sm_waddr == r.laddr, "write-back data");
          check(obs_c2c == (owner >= 0 && r.cmd != CMD_PUTM), "c2c flag");
        end else begin
          check(!sm_we, "no shared-memory write");
        end
        if (c == len) begin
          if (r.cmd == CMD_PUTM) n_putm++;
          else if (r.cmd == CMD_UPG) n_upg++;
          else if (owner >= 0) begin n_c2c++; if (exp_wb) n_wb++; end
          else n_sm++;
        end
        @(negedge clk);
      end
    end
    check(n_c2c > 5 && n_wb > 2 && n_putm > 5 && n_upg > 5 && n_sm > 5, "all transaction kinds seen");
    $display("c2c %0d (with write-back %0d), from memory %0d, putm %0d, upgrade %0d",
             n_c2c, n_wb, n_sm, n_putm, n_upg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
