// np_pkg: types and constants shared by the packet scheduler (LAPS) and the
// traffic-aware power manager (TAP).
//
// A packet is represented inside the front end by a descriptor: the flow
// five-tuple (src/dst IPv4 address, src/dst port, protocol = 104 bits), the
// service it needs (one of the four processing paths of an edge router) and
// its length in bytes. Core IDs and service IDs are sized for the 16-core,
// 4-service configuration; the modules take their sizes as parameters.
// P-states follow the five-level example table (P0 fastest ... P4 slowest),
// C-states the three-level table (C0 active, C1 shallow, C2 deep sleep).
package np_pkg;

  localparam int FLOW_W = 104;  // 32+32+16+16+8 bit five-tuple
  localparam int SVC_W  = 2;    // four services
  localparam int LEN_W  = 16;   // packet length in bytes

  typedef logic [FLOW_W-1:0] flow_id_t;

  typedef struct packed {
    flow_id_t             flow;
    logic [SVC_W-1:0]     svc;
    logic [LEN_W-1:0]     len;
  } pkt_desc_t;

  localparam int DESC_W = $bits(pkt_desc_t);

  typedef enum logic [2:0] {P0 = 3'd0, P1 = 3'd1, P2 = 3'd2, P3 = 3'd3, P4 = 3'd4} pstate_e;

  // C_WAKE: power is being restored; the core is not yet usable.
  typedef enum logic [1:0] {C0 = 2'd0, C1 = 2'd1, C2 = 2'd2, C_WAKE = 2'd3} cstate_e;

  // Relative core frequency of each P-state in 1/100 of F0 (Table of P-states).
  function automatic int unsigned pstate_freq_pct(pstate_e p);
    case (p)
      P0:      return 100;
      P1:      return 85;
      P2:      return 75;
      P3:      return 65;
      default: return 50;
    endcase
  endfunction

endpackage
