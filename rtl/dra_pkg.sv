// dra_pkg: types and constants shared by the DRA linecard and enhanced
// internal bus (EIB) logic.
//
// The EIB is split into control lines and data lines. Control lines carry
// one control packet (ctrl_pkt_t) per clock cycle; the five packet kinds
// REQ_D, REP_D, REL_D, REQ_L and REP_L are the protocol's own. FLT, a
// fault-status announcement, is this design's encoding of the "exchange of
// control packets" by which every linecard learns where faults are. Field
// widths, the broadcast address and the one-cycle packet are design choices.
package dra_pkg;

  // Linecard identifiers. Up to 15 linecards; ID 15 addresses all.
  localparam int unsigned LC_ID_W   = 4;
  localparam logic [LC_ID_W-1:0] LC_BCAST = '1;

  // Bandwidth values are in Mbit/s.
  localparam int unsigned BW_W      = 16;

  // Data-line word and lookup widths.
  localparam int unsigned DATA_W    = 32;
  localparam int unsigned ADDR_W    = 32;   // IPv4 destination address
  localparam int unsigned PROTO_W   = 4;    // protocol implemented by a PDLU
  localparam int unsigned SEQ_W     = 4;    // lookup sequence tag

  // Control packet kinds.
  typedef enum logic [2:0] {
    CP_NONE  = 3'd0,
    CP_REQ_D = 3'd1,   // request a logical path (LP) over the data lines
    CP_REP_D = 3'd2,   // accept a stream; establishes the LP
    CP_REL_D = 3'd3,   // release an LP; carries its ID (ID_r)
    CP_REQ_L = 3'd4,   // remote route lookup request (address enclosed)
    CP_REP_L = 3'd5,   // remote route lookup reply (result enclosed)
    CP_FLT   = 3'd6    // fault-status announcement
  } cp_kind_e;

  // Unit of a linecard in which a fault lies; also names the unit of the
  // receiving linecard that consumes data arriving over the data lines.
  typedef enum logic [1:0] {
    U_PDLU = 2'd0,
    U_SRU  = 2'd1,
    U_LFE  = 2'd2,
    U_PIU  = 2'd3
  } unit_e;

  // Per-linecard fault status: one bit per unit, indexed by unit_e.
  typedef logic [3:0] fault_vec_t;

  typedef struct packed {
    cp_kind_e             kind;
    logic [LC_ID_W-1:0]   src;
    logic [LC_ID_W-1:0]   dst;     // LC_BCAST for broadcasts
    unit_e                unit;    // fault location / target unit
    logic [PROTO_W-1:0]   proto;
    logic [BW_W-1:0]      bw;      // requested bandwidth (REQ_D, REP_D)
    logic [LC_ID_W-1:0]   id_r;    // LP ID being released (REL_D)
    logic [SEQ_W-1:0]     seq;     // lookup tag (REQ_L, REP_L)
    logic [ADDR_W-1:0]    payload; // lookup address / result / fault vector
  } ctrl_pkt_t;

  // One word on the data lines.
  typedef struct packed {
    logic [LC_ID_W-1:0]   src;
    logic [LC_ID_W-1:0]   dst;
    unit_e                unit;    // unit of the receiver that takes the word
    logic                 sop;
    logic                 eop;
    logic [DATA_W-1:0]    data;
  } dword_t;

endpackage
