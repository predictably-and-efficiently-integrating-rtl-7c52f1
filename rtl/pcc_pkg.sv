// pcc_pkg: types, constants and coherence-protocol functions shared by the
// predictable cache-coherent (PCC) multi-core memory system.
//
// The system integrates an unmodified snooping protocol (MSI, MESI or MOESI)
// with a predictable bus arbiter (TDM, RR, WRR or HRR). Once a core is granted
// the bus, its request is serviced to completion without interference: one
// coherence broadcast followed by at most one data phase, in which a data
// message from an owner cache can reach the requesting cache and the shared
// memory at the same time.
//
// The protocol tables here follow the standard stable-state protocols named
// in the text. Transient states are not stored: with a non-preemptive bus a
// core has at most one transaction in flight, and the controller FSM plays the
// role of the transient state (IS^d, IM^d, SM^d, MI^wb).
package pcc_pkg;

  // Coherence protocol and arbiter selections (the 3 x 4 configurations).
  typedef enum logic [1:0] {PROTO_MSI = 2'd0, PROTO_MESI = 2'd1, PROTO_MOESI = 2'd2} proto_e;
  typedef enum logic [1:0] {ARB_TDM = 2'd0, ARB_RR = 2'd1, ARB_WRR = 2'd2, ARB_HRR = 2'd3} arb_e;

  // Stable line states.
  typedef enum logic [2:0] {
    ST_I = 3'd0, ST_S = 3'd1, ST_E = 3'd2, ST_O = 3'd3, ST_M = 3'd4
  } cstate_e;

  // Bus coherence messages. UPG is the data-less upgrade of a line the
  // requester already holds (S, or O under MOESI); PUTM writes back an evicted
  // owned line.
  typedef enum logic [1:0] {CMD_GETS = 2'd0, CMD_GETM = 2'd1, CMD_UPG = 2'd2, CMD_PUTM = 2'd3} cmd_e;

  // Geometry: 32-bit byte addresses, 32-bit words, 64-byte lines.
  localparam int unsigned ADDR_W      = 32;
  localparam int unsigned WORD_W      = 32;
  localparam int unsigned LINE_BYTES  = 64;
  localparam int unsigned LINE_WORDS  = LINE_BYTES / (WORD_W / 8);
  localparam int unsigned LINE_W      = LINE_BYTES * 8;
  localparam int unsigned OFFSET_W    = $clog2(LINE_BYTES);
  localparam int unsigned WSEL_W      = $clog2(LINE_WORDS);
  localparam int unsigned LADDR_W     = ADDR_W - OFFSET_W;   // line address width

  typedef logic [ADDR_W-1:0]  addr_t;
  typedef logic [WORD_W-1:0]  word_t;
  typedef logic [LINE_W-1:0]  line_t;
  typedef logic [LADDR_W-1:0] laddr_t;

  // Request of a core to its private cache.
  typedef struct packed {
    logic  we;     // 1: store of one word, 0: load
    addr_t addr;   // byte address (word aligned)
    word_t wdata;
  } core_req_t;

  // Bus request a cache controller presents while it waits for its grant.
  typedef struct packed {
    logic   valid;
    cmd_e   cmd;
    laddr_t laddr;
    line_t  data;   // write-back data of a PUTM
  } bus_req_t;

  // Broadcast coherence message as seen by all snoopers.
  typedef struct packed {
    logic   valid;
    cmd_e   cmd;
    laddr_t laddr;
  } snoop_t;

  // Response of one snooping cache to the broadcast message.
  typedef struct packed {
    logic  shared;  // holds a valid copy
    logic  owner;   // will supply the data
    logic  wb;      // the supplied data must also be written to shared memory
    line_t data;    // data supplied when owner is set
  } snoop_resp_t;

  // ---------------------------------------------------------------------
  // Protocol functions
  // ---------------------------------------------------------------------

  // Does a line in state st allow the access without a bus transaction?
  // E -> M on a store is silent (MESI, MOESI).
  function automatic logic access_hit(cstate_e st, logic we);
    if (we) return (st == ST_M) || (st == ST_E);
    else    return (st != ST_I);
  endfunction

  // Must a line in state st be written back (PutM) when it is evicted?
  // S is dropped silently; E, O and M send a PutM carrying the line.
  function automatic logic needs_putm(cstate_e st);
    return (st == ST_M) || (st == ST_O) || (st == ST_E);
  endfunction

  // Message a requester issues for an access that missed, given its own
  // current state of the line (tag matching).
  function automatic cmd_e miss_cmd(cstate_e st, logic we);
    if (!we)                                 return CMD_GETS;
    else if ((st == ST_S) || (st == ST_O))   return CMD_UPG;
    else                                     return CMD_GETM;
  endfunction

  // A snooper with the line in state st: does it supply the data?
  function automatic logic snoop_owner(proto_e p, cstate_e st, cmd_e cmd);
    if (cmd == CMD_GETS || cmd == CMD_GETM) begin
      case (p)
        PROTO_MSI:  return st == ST_M;
        PROTO_MESI: return (st == ST_M) || (st == ST_E);
        default:    return (st == ST_M) || (st == ST_E) || (st == ST_O);
      endcase
    end
    return 1'b0;
  endfunction

  // A snooper that supplies data on a GetS of a modified line must also write
  // it to shared memory, except under MOESI where it keeps ownership (O).
  function automatic logic snoop_wb(proto_e p, cstate_e st, cmd_e cmd);
    return (cmd == CMD_GETS) && (st == ST_M) && (p != PROTO_MOESI);
  endfunction

  // Next state of a snooper's copy after another core's message.
  function automatic cstate_e snoop_next(proto_e p, cstate_e st, cmd_e cmd);
    case (cmd)
      CMD_GETS: begin
        case (st)
          ST_M:    return (p == PROTO_MOESI) ? ST_O : ST_S;
          ST_E:    return ST_S;
          default: return st;          // S stays S, O stays O, I stays I
        endcase
      end
      CMD_GETM, CMD_UPG: return ST_I;
      default:           return st;    // PUTM of another core: no effect
    endcase
  endfunction

  // State the requester installs when its GetS/GetM/Upg completes.
  function automatic cstate_e req_next(proto_e p, cmd_e cmd, logic others_shared);
    case (cmd)
      CMD_GETS: return (p != PROTO_MSI && !others_shared) ? ST_E : ST_S;
      CMD_PUTM: return ST_I;
      default:  return ST_M;
    endcase
  endfunction

  // Does the transaction have a data phase?
  function automatic logic cmd_has_data(cmd_e cmd);
    return cmd != CMD_UPG;
  endfunction

endpackage
