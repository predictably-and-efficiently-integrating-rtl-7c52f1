// pcc_rr_arbiter: work-conserving round-robin bus arbiter.
//
// Whenever the bus is free and at least one core requests, the grant goes to
// the first requesting core after the one granted last, in cyclic order.
// The grant is held by the bus until the transaction is fulfilled, so a core
// waits for at most N-1 transactions of L_acc cycles: WCL = (N-1) x L_acc.
//
// Interface as the other arbiters: req, bus_free in; combinational
// gnt_valid/gnt_id out. The policy is the one in the text; starting with
// core 0 having priority after reset is this design's choice.
module pcc_rr_arbiter #(
  parameter int unsigned N_CORES = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [N_CORES-1:0]         req,
  input  logic                       bus_free,
  output logic                       gnt_valid,
  output logic [$clog2(N_CORES)-1:0] gnt_id
);
  localparam int unsigned IDW = $clog2(N_CORES);

  logic [IDW-1:0] last;   // core granted last

  always_comb begin
    int unsigned k;
    k = 0;
    gnt_valid = 1'b0;
    gnt_id    = '0;
    for (int unsigned i = 1; i <= N_CORES; i++) begin
      k = (int'(last) + i) % N_CORES;
      if (!gnt_valid && req[k]) begin
        gnt_valid = bus_free;
        gnt_id    = IDW'(k);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)         last <= IDW'(N_CORES - 1);
    else if (gnt_valid) last <= gnt_id;
  end

  a_gnt_req: assert property (@(posedge clk) disable iff (!rst_n) gnt_valid |-> req[gnt_id]);
endmodule
