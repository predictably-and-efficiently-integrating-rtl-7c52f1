// pcc_tdm_arbiter: time-division-multiplexing bus arbiter.
//
// Time is cut into slots of SLOT cycles, owned by cores 0..N-1 in turn. A
// core may start a bus transaction only in the first cycle of its own slot,
// and only if it is requesting then; otherwise the slot stays empty. With
// SLOT >= L_acc a granted transaction always ends inside its slot, so the
// worst-case arbitration latency is N x SLOT (one full TDM period).
//
// Interface: req[i] is core i's request; bus_free says the bus can start a new
// transaction at the next clock edge. gnt_valid/gnt_id are combinational and
// mark the cycle in which the granted transaction is taken.
//
// The slot rule and the N x S bound follow the text; that an unused slot is
// simply lost and that the first slot after reset belongs to core 0 are this
// design's choices.
module pcc_tdm_arbiter #(
  parameter int unsigned N_CORES = 4,
  parameter int unsigned SLOT    = 54
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [N_CORES-1:0]         req,
  input  logic                       bus_free,
  output logic                       gnt_valid,
  output logic [$clog2(N_CORES)-1:0] gnt_id
);
  localparam int unsigned IDW = $clog2(N_CORES);

  logic [$clog2(SLOT)-1:0] slot_cnt;
  logic [IDW-1:0]          owner;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      slot_cnt <= '0;
      owner    <= '0;
    end else if (32'(slot_cnt) == SLOT - 1) begin
      slot_cnt <= '0;
      owner    <= (owner == IDW'(N_CORES - 1)) ? '0 : owner + 1'b1;
    end else begin
      slot_cnt <= slot_cnt + 1'b1;
    end
  end

  always_comb begin
    gnt_id    = owner;
    gnt_valid = (slot_cnt == '0) && req[owner] && bus_free;
  end

  // A transaction must never still hold the bus when a new slot starts.
  a_slot_fits: assert property (@(posedge clk) disable iff (!rst_n)
                                (slot_cnt == '0) |-> bus_free);
endmodule
