// reactor_pkg: types and constants shared by the REACToR hybrid top-of-rack
// switch datapath and control plane.
//
// Frames move between blocks as 64-bit beats at one beat per clock, which at
// 156.25 MHz (a 6.4 ns period) is the 10 Gb/s line rate of the prototype's
// ports. Byte 0 of a frame is in data[7:0] of its first beat; keep[i] marks
// byte i of a beat as valid and `last` marks the frame's final beat. Every
// stream carries a valid/ready pair next to a beat_t.
//
// The prototype has four host-facing ports, four circuit (OCS) uplinks and
// four packet (EPS) uplinks, and eight 802.1Qbb traffic classes of which
// seven name circuit destinations and one is the EPS-only class. The frame
// format, the class numbering and the schedule entry layout are this design's
// own choices.
package reactor_pkg;

  // Ports per REACToR: n downward ports = u_c circuit uplinks = u_p EPS uplinks.
  localparam int unsigned N_PORTS   = 4;
  localparam int unsigned PORT_W    = $clog2(N_PORTS);

  // 802.1Qbb defines eight priority classes; class 7 is kept for EPS traffic.
  localparam int unsigned N_CLASSES = 8;
  localparam int unsigned CLASS_W   = 3;
  localparam logic [CLASS_W-1:0] EPS_CLASS = 3'd7;

  // Datapath: 64 bits per beat at 156.25 MHz.
  localparam int unsigned DATA_W = 64;
  localparam int unsigned KEEP_W = DATA_W / 8;

  // Mordia OCS: 24 ports; its configuration word holds one 5-bit output port
  // number per input port.
  localparam int unsigned OCS_PORTS = 24;
  localparam int unsigned OCS_IDX_W = 5;
  localparam int unsigned OCS_CFG_W = OCS_PORTS * OCS_IDX_W;

  // Time counters (cycles of 6.4 ns).
  localparam int unsigned DUR_W = 32;
  localparam int unsigned TS_W  = 48;

  typedef struct packed {
    logic [DATA_W-1:0] data;
    logic [KEEP_W-1:0] keep;
    logic              last;
  } beat_t;

  // Where a port's circuit-class frames go during one configuration.
  typedef enum logic [1:0] {
    ROUTE_NONE   = 2'd0,  // no circuit for this port in this configuration
    ROUTE_UPLINK = 2'd1,  // to circuit uplink `idx`, through the OCS
    ROUTE_LOCAL  = 2'd2   // rack-local: to downward port `idx`
  } route_e;

  typedef struct packed {
    logic               valid;   // port has a circuit in this configuration
    logic [CLASS_W-1:0] cls;     // host traffic class served by the circuit
    route_e             route;
    logic [PORT_W-1:0]  idx;
  } port_cfg_t;

  // One circuit configuration P_k of the schedule with its duration phi_k.
  typedef struct packed {
    logic [DUR_W-1:0]                 duration;  // cycles, reconfiguration delay included
    logic [OCS_CFG_W-1:0]             ocs_cfg;   // permutation sent to the OCS
    port_cfg_t [N_PORTS-1:0]          port;
  } sched_entry_t;

  // Classifier verdict for one frame.
  typedef enum logic {
    PATH_EPS     = 1'b0,
    PATH_CIRCUIT = 1'b1
  } path_e;

  // Reported by a classifier for every frame it forwards.
  typedef struct packed {
    logic               vlan;    // frame carried an 802.1Q tag
    logic [CLASS_W-1:0] cls;     // its priority code point (EPS_CLASS if untagged)
    path_e              path;
  } frame_event_t;

  // Controller phase within a configuration slot.
  typedef enum logic [1:0] {
    PH_IDLE = 2'd0,  // no schedule running
    PH_DARK = 2'd1,  // OCS reconfiguring: circuits off, all traffic to EPS
    PH_LIT  = 2'd2   // circuits established
  } phase_e;

endpackage
