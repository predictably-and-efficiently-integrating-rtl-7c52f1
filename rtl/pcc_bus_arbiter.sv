// pcc_bus_arbiter: selects one of the four predictable arbiters.
//
// The coherence side never sees which arbiter is in use: every arbiter takes
// the per-core request vector and a bus_free flag and gives a combinational
// grant. This is what lets any protocol be combined with any arbiter without
// changing either. ARB picks TDM (slot SLOT cycles), RR, WRR or HRR
// (weights WEIGHTS). The default, TDM with 54-cycle slots, is the arbiter of
// the text's worked example and of its comparison with earlier solutions.
module pcc_bus_arbiter
  import pcc_pkg::*;
#(
  parameter int unsigned N_CORES           = 4,
  parameter arb_e        ARB               = ARB_TDM,
  parameter int unsigned SLOT              = 54,
  parameter int unsigned WEIGHTS [N_CORES] = '{4, 2, 1, 1}
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [N_CORES-1:0]         req,
  input  logic                       bus_free,
  output logic                       gnt_valid,
  output logic [$clog2(N_CORES)-1:0] gnt_id
);
  generate
    case (ARB)
      ARB_TDM: begin : g_tdm
        pcc_tdm_arbiter #(.N_CORES(N_CORES), .SLOT(SLOT)) u_arb (.*);
      end
      ARB_RR: begin : g_rr
        pcc_rr_arbiter #(.N_CORES(N_CORES)) u_arb (.*);
      end
      ARB_WRR: begin : g_wrr
        pcc_wrr_arbiter #(.N_CORES(N_CORES), .WEIGHTS(WEIGHTS)) u_arb (.*);
      end
      default: begin : g_hrr
        pcc_hrr_arbiter #(.N_CORES(N_CORES), .WEIGHTS(WEIGHTS)) u_arb (.*);
      end
    endcase
  endgenerate
endmodule
