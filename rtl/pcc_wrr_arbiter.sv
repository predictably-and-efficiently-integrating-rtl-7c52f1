// pcc_wrr_arbiter: work-conserving weighted round-robin bus arbiter.
//
// Cores are visited in cyclic order. On a visit core i may take up to
// WEIGHTS[i] consecutive transactions while it keeps requesting; when its
// credit is used up, or it has nothing to send when the bus frees, the turn
// passes to the next requesting core. A core j therefore waits for at most
// sum_{i != j} W_i transactions of L_acc cycles.
//
// Interface as the other arbiters: req, bus_free in; combinational
// gnt_valid/gnt_id out. The weighted policy and the bound follow the text;
// losing the rest of a turn when the core is not requesting at the moment
// the bus frees is this design's choice.
module pcc_wrr_arbiter #(
  parameter int unsigned N_CORES          = 4,
  parameter int unsigned WEIGHTS [N_CORES] = '{4, 2, 1, 1}
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [N_CORES-1:0]         req,
  input  logic                       bus_free,
  output logic                       gnt_valid,
  output logic [$clog2(N_CORES)-1:0] gnt_id
);
  localparam int unsigned IDW = $clog2(N_CORES);

  logic [IDW-1:0] cur;    // core whose turn it is
  logic [7:0]     used;   // grants given to cur in this turn
  logic           stay;   // next grant continues cur's turn

  always_comb begin
    int unsigned k;
    k = 0;
    gnt_valid = 1'b0;
    gnt_id    = cur;
    stay      = req[cur] && (32'(used) < WEIGHTS[cur]);
    if (stay) begin
      gnt_valid = bus_free;
    end else begin
      for (int unsigned i = 1; i <= N_CORES; i++) begin
        k = (int'(cur) + i) % N_CORES;
        if (!gnt_valid && req[k]) begin
          gnt_valid = bus_free;
          gnt_id    = IDW'(k);
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cur  <= '0;
      used <= '0;
    end else if (gnt_valid) begin
      cur  <= gnt_id;
      used <= stay ? used + 8'd1 : 8'd1;
    end
  end

  a_gnt_req: assert property (@(posedge clk) disable iff (!rst_n) gnt_valid |-> req[gnt_id]);
endmodule
