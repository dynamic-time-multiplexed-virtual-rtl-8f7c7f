// dtmvc_pkg: types and constants shared by the time-multiplexed virtual
// channel router.
//
// Numbers that come from the design description: five router ports, four
// virtual channels (service levels), four performance settings PS0..PS3, an
// eight-row slot table and a 20-cycle time frame.  Everything else here
// (flit width, header layout, port numbering) is this implementation's
// choice.  The slot-table generator `lead_vc` reproduces the published PS3
// table exactly and interpolates the intermediate settings.
package dtmvc_pkg;

  localparam int NUM_PORTS = 5;
  localparam int NUM_VC    = 4;
  localparam int VC_W      = $clog2(NUM_VC);
  localparam int NUM_PS    = 4;
  localparam int PS_W      = $clog2(NUM_PS);
  localparam int FLIT_W    = 32;
  localparam int COORD_W   = 4;
  localparam int LEN_W     = 8;             // payload flits per packet
  localparam int FLITS_W   = LEN_W + 1;     // header + payload count

  // Port numbering; North is the +Y direction.
  typedef enum logic [2:0] {
    P_EAST  = 3'd0,
    P_WEST  = 3'd1,
    P_NORTH = 3'd2,
    P_SOUTH = 3'd3,
    P_LOCAL = 3'd4
  } port_e;

  // Header flit.  prio is the service level, i.e. the virtual channel the
  // packet travels on.
  typedef struct packed {
    logic [COORD_W-1:0] dest_x;
    logic [COORD_W-1:0] dest_y;
    logic [VC_W-1:0]    prio;
    logic [13:0]        rsvd;
    logic [LEN_W-1:0]   len;
  } header_t;

  // One direction of a router-to-router link; the backward feedback lines
  // (one stop bit per VC) travel as a separate vector.
  typedef struct packed {
    logic              valid;
    logic [VC_W-1:0]   vc;
    logic [FLIT_W-1:0] flit;
  } link_t;

  function automatic logic [FLIT_W-1:0] make_header(
      input logic [COORD_W-1:0] dx, input logic [COORD_W-1:0] dy,
      input logic [VC_W-1:0] pr, input logic [LEN_W-1:0] ln);
    header_t h;
    h = '{dest_x: dx, dest_y: dy, prio: pr, rsvd: '0, len: ln};
    return h;
  endfunction

  // Which VC has the highest priority in slot-table row `entry` at
  // performance setting `ps`.  VC0 leads `entries - 2*ps` rows (never more
  // than entries-(NUM_VC-1) unless ps==0, so every VC leads at least one row
  // at PS1..PS3); the remaining rows rotate through VC1..VC3 in order.
  // PS3 gives rows 0,0,1,1,2,2,3,3; PS2 0,0,0,0,1,1,2,3; PS1 0,0,0,0,0,1,2,3;
  // PS0 all 0.
  function automatic int unsigned lead_vc(input int unsigned ps,
                                          input int unsigned entry,
                                          input int unsigned entries);
    int unsigned l0, rest, j;
    if (ps == 0) return 0;
    l0 = entries - ps * (entries - entries / NUM_VC) / (NUM_PS - 1);
    if (l0 > entries - (NUM_VC - 1)) l0 = entries - (NUM_VC - 1);
    if (entry < l0) return 0;
    rest = entries - l0;
    j    = entry - l0;
    return 1 + (j * (NUM_VC - 1)) / rest;
  endfunction

  // Priority value (0 = highest) of virtual channel `vc` in a row led by
  // `lead`: the order rotates, lead first, then lead+1, ...
  function automatic logic [VC_W-1:0] rot_prio(input int unsigned vc,
                                               input int unsigned lead);
    return VC_W'((vc + NUM_VC - lead) % NUM_VC);
  endfunction

endpackage
