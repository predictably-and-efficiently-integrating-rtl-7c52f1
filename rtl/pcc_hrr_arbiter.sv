// pcc_hrr_arbiter: harmonic round-robin bus arbiter.
//
// A cyclic table of HP = sum(W) entries holds core j W_j times, spread at the
// period HP/W_j (weights are meant to be harmonic, each dividing the larger
// ones, e.g. {4,2,1,1}). The table is built at elaboration: cores are placed
// in order of falling weight, each at the first free entry and then every
// HP/W_j entries, moving to the next free entry where one is taken. The
// arbiter is work-conserving: when the bus frees, it grants the first table
// entry at or after its pointer whose core is requesting, and moves the
// pointer past it. Core j then waits at most (ceil(HP/W_j) - 1) transactions.
//
// Interface as the other arbiters: req, bus_free in; combinational
// gnt_valid/gnt_id out. Table contents and the bound follow the text's
// description; the placement procedure and skipping of idle entries are this
// design's choices.
module pcc_hrr_arbiter #(
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

  function automatic int unsigned sum_w();
    int unsigned s = 0;
    for (int unsigned j = 0; j < N_CORES; j++) s += WEIGHTS[j];
    return s;
  endfunction

  localparam int unsigned HP  = sum_w();
  localparam int unsigned PW  = (HP > 1) ? $clog2(HP) : 1;

  typedef int unsigned tbl_t [HP];

  function automatic tbl_t build_table();
    tbl_t        t;
    logic [HP-1:0] used;
    logic [N_CORES-1:0] placed;
    int unsigned j, best, per, off, pos;
    used   = '0;
    placed = '0;
    for (int unsigned n = 0; n < HP; n++) t[n] = 0;
    for (int unsigned r = 0; r < N_CORES; r++) begin
      // pick the unplaced core with the largest weight
      best = 0;
      for (j = 0; j < N_CORES; j++)
        if (!placed[best] && WEIGHTS[j] > WEIGHTS[best] && !placed[j]) best = j;
        else if (placed[best] && !placed[j]) best = j;
      placed[best] = 1'b1;
      per = (WEIGHTS[best] > 0) ? HP / WEIGHTS[best] : HP;
      off = 0;
      while (off < HP && used[off]) off++;
      for (int unsigned k = 0; k < WEIGHTS[best]; k++) begin
        pos = (off + k * per) % HP;
        while (used[pos]) pos = (pos + 1) % HP;
        used[pos] = 1'b1;
        t[pos]    = best;
      end
    end
    return t;
  endfunction

  localparam tbl_t TABLE = build_table();

  logic [PW-1:0] ptr;       // next table entry to consider
  logic [PW-1:0] gnt_pos;

  always_comb begin
    int unsigned e;
    e = 0;
    gnt_valid = 1'b0;
    gnt_id    = '0;
    gnt_pos   = ptr;
    for (int unsigned i = 0; i < HP; i++) begin
      e = (int'(ptr) + i) % HP;
      if (!gnt_valid && req[TABLE[e]]) begin
        gnt_valid = bus_free;
        gnt_id    = IDW'(TABLE[e]);
        gnt_pos   = PW'(e);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)         ptr <= '0;
    else if (gnt_valid) ptr <= (int'(gnt_pos) == HP - 1) ? '0 : gnt_pos + 1'b1;
  end

  a_gnt_req: assert property (@(posedge clk) disable iff (!rst_n) gnt_valid |-> req[gnt_id]);
endmodule
