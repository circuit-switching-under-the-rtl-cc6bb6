// reactor_top: one four-port REACToR hybrid top-of-rack switch.
//
// A REACToR connects its hosts to two networks at once: a fast, bufferless
// optical circuit switch (OCS) and a slower electrical packet switch (EPS).
// Frames queue in the hosts, one queue per destination; the REACToR lets a
// host's queue for its current circuit destination drain onto the circuit,
// and sends everything else over the EPS, switching circuits every few
// hundred microseconds under a precomputed schedule.
//
// Datapath per host port p:
//   host_rx[p] -> classifier -> circuit path -> circuit_xbar -> cup_tx[k]
//                                                            -> local port
//                            -> EPS path     -> eup_tx[p]
//   cup_rx[p], eup_rx[p], local, PFC frames -> downlink_mux -> host_tx[p]
// Circuit uplink p also receives the circuit traffic for host p, and EPS
// uplink p carries host p's EPS traffic in both directions.
//
// Control: reconfig_controller steps through the schedule held in
// schedule_table. For each configuration it reconfigures the OCS
// (ocs_cfg, ocs_reconfig), waits DELTA cycles, points the classifiers and
// crossbar at the new circuits and unpauses the matching host class with a
// PFC frame (pfc_gen), and pauses that class again PAUSE_LEAD cycles before
// the slot ends. pkt_recorder timestamps every incoming frame and sends the
// records out on rec_*.
//
// External parts meet the design at these ports: the host MACs (host_*),
// the OCS transceivers (cup_*) and control (ocs_*), the EPS links (eup_*),
// the control computer's schedule (sched_*), and the collection host
// (rec_*). All streams are 64-bit beats at 156.25 MHz. The EPS uplinks run
// at the beat rate here; the 1 Gb/s EPS of the prototype is a property of
// the switch and of host rate limits, not of this logic.
// cup_rx_ready and eup_rx_ready are always 1: neither the OCS nor the EPS
// link can be held off, so the downward-port FIFOs drop whole frames
// instead. The local-traffic ready inside each multiplexer is 1 for the
// same reason.
module reactor_top
  import reactor_pkg::*;
#(
  parameter int unsigned MAX_CONFIGS     = 8,
  parameter int unsigned DELTA           = 4688,
  parameter int unsigned PAUSE_LEAD      = 156,
  parameter int unsigned CIRC_FIFO_DEPTH = 512,
  parameter int unsigned EPS_FIFO_DEPTH  = 1024
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           run,
  // hosts
  input  beat_t                          host_rx_beat  [N_PORTS],
  input  logic         [N_PORTS-1:0]     host_rx_valid,
  output logic         [N_PORTS-1:0]     host_rx_ready,
  output beat_t                          host_tx_beat  [N_PORTS],
  output logic         [N_PORTS-1:0]     host_tx_valid,
  input  logic         [N_PORTS-1:0]     host_tx_ready,
  // circuit uplinks (OCS)
  output beat_t                          cup_tx_beat   [N_PORTS],
  output logic         [N_PORTS-1:0]     cup_tx_valid,
  input  logic         [N_PORTS-1:0]     cup_tx_ready,
  input  beat_t                          cup_rx_beat   [N_PORTS],
  input  logic         [N_PORTS-1:0]     cup_rx_valid,
  output logic         [N_PORTS-1:0]     cup_rx_ready,
  // EPS uplinks
  output beat_t                          eup_tx_beat   [N_PORTS],
  output logic         [N_PORTS-1:0]     eup_tx_valid,
  input  logic         [N_PORTS-1:0]     eup_tx_ready,
  input  beat_t                          eup_rx_beat   [N_PORTS],
  input  logic         [N_PORTS-1:0]     eup_rx_valid,
  output logic         [N_PORTS-1:0]     eup_rx_ready,
  // OCS circuit control
  output logic         [OCS_CFG_W-1:0]   ocs_cfg,
  output logic                           ocs_reconfig,
  // schedule from the control computer
  input  logic                           sched_wr_en,
  input  logic [$clog2(MAX_CONFIGS)-1:0] sched_wr_idx,
  input  sched_entry_t                   sched_wr_entry,
  input  logic                           sched_wr_commit,
  input  logic [$clog2(MAX_CONFIGS):0]   sched_wr_num,
  output logic                           sched_pending,
  output logic                           sched_swapped,
  // packet records to the collection host
  output beat_t                          rec_beat,
  output logic                           rec_valid,
  input  logic                           rec_ready,
  // status
  output phase_e                         phase,
  output logic                           period_start,
  output logic                           slot_start,
  output logic         [N_PORTS-1:0]     tx_sof,
  output logic         [1:0]             tx_sof_src [N_PORTS],
  output logic         [2:0]             tx_drop    [N_PORTS],
  output logic         [N_PORTS-1:0]     xbar_unrouted,
  output logic                           xbar_conflict,
  output logic                           rec_lost,
  output logic         [N_PORTS-1:0]     pfc_busy,
  output logic         [N_PORTS-1:0]     ev_valid,
  output frame_event_t                   ev         [N_PORTS],
  output logic         [TS_W-1:0]        timestamp
);

  // schedule table <-> controller
  logic [$clog2(MAX_CONFIGS)-1:0] rd_idx;
  sched_entry_t                   rd_entry;
  logic [$clog2(MAX_CONFIGS):0]   num_configs;
  logic                           swap;

  // controller outputs
  logic      [N_PORTS-1:0]   circ_en;
  logic      [CLASS_W-1:0]   circ_cls    [N_PORTS];
  port_cfg_t [N_PORTS-1:0]   xbar_cfg;
  logic      [N_PORTS-1:0]   pfc_req;
  logic      [N_CLASSES-1:0] pfc_pause   [N_PORTS];
  logic      [N_CLASSES-1:0] pfc_unpause [N_PORTS];

  // classifier -> crossbar
  beat_t                c_beat   [N_PORTS];
  logic   [N_PORTS-1:0] c_valid, c_ready;
  // crossbar -> downlink multiplexers
  beat_t                loc_beat [N_PORTS];
  logic   [N_PORTS-1:0] loc_valid, loc_ready;
  // PFC generators -> downlink multiplexers
  beat_t                pfc_beat [N_PORTS];
  logic   [N_PORTS-1:0] pfc_valid, pfc_ready;

  schedule_table #(.MAX_CONFIGS(MAX_CONFIGS)) u_table (
    .clk, .rst_n,
    .wr_en(sched_wr_en), .wr_idx(sched_wr_idx), .wr_entry(sched_wr_entry),
    .wr_commit(sched_wr_commit), .wr_num(sched_wr_num),
    .rd_idx, .rd_entry, .num_configs,
    .swap, .pending(sched_pending), .swapped(sched_swapped)
  );

  reconfig_controller #(
    .MAX_CONFIGS(MAX_CONFIGS), .DELTA(DELTA), .PAUSE_LEAD(PAUSE_LEAD)
  ) u_ctrl (
    .clk, .rst_n, .run,
    .rd_idx, .rd_entry, .num_configs, .pending(sched_pending), .swap,
    .ocs_cfg, .ocs_reconfig,
    .circ_en, .circ_cls, .xbar_cfg,
    .pfc_req, .pfc_pause, .pfc_unpause,
    .phase, .period_start, .slot_start
  );

  for (genvar p = 0; p < N_PORTS; p++) begin : g_port
    classifier u_cls (
      .clk, .rst_n,
      .circ_en(circ_en[p]), .circ_cls(circ_cls[p]),
      .s_beat(host_rx_beat[p]), .s_valid(host_rx_valid[p]), .s_ready(host_rx_ready[p]),
      .c_beat(c_beat[p]), .c_valid(c_valid[p]), .c_ready(c_ready[p]),
      .e_beat(eup_tx_beat[p]), .e_valid(eup_tx_valid[p]), .e_ready(eup_tx_ready[p]),
      .ev_valid(ev_valid[p]), .ev(ev[p])
    );

    pfc_gen #(.SRC_MAC(48'h02_00_00_00_00_10 + 48'(p))) u_pfc (
      .clk, .rst_n,
      .req(pfc_req[p]), .pause_vec(pfc_pause[p]), .unpause_vec(pfc_unpause[p]),
      .m_beat(pfc_beat[p]), .m_valid(pfc_valid[p]), .m_ready(pfc_ready[p]),
      .busy(pfc_busy[p])
    );

    downlink_mux #(
      .CIRC_FIFO_DEPTH(CIRC_FIFO_DEPTH), .EPS_FIFO_DEPTH(EPS_FIFO_DEPTH)
    ) u_mux (
      .clk, .rst_n,
      .pfc_beat(pfc_beat[p]), .pfc_valid(pfc_valid[p]), .pfc_ready(pfc_ready[p]),
      .ocs_beat(cup_rx_beat[p]), .ocs_valid(cup_rx_valid[p]), .ocs_ready(cup_rx_ready[p]),
      .loc_beat(loc_beat[p]), .loc_valid(loc_valid[p]), .loc_ready(loc_ready[p]),
      .eps_beat(eup_rx_beat[p]), .eps_valid(eup_rx_valid[p]), .eps_ready(eup_rx_ready[p]),
      .m_beat(host_tx_beat[p]), .m_valid(host_tx_valid[p]), .m_ready(host_tx_ready[p]),
      .sof(tx_sof[p]), .sof_src(tx_sof_src[p]), .drop(tx_drop[p])
    );
  end

  circuit_xbar u_xbar (
    .clk, .rst_n,
    .cfg(xbar_cfg),
    .s_beat(c_beat), .s_valid(c_valid), .s_ready(c_ready),
    .up_beat(cup_tx_beat), .up_valid(cup_tx_valid), .up_ready(cup_tx_ready),
    .loc_beat, .loc_valid, .loc_ready,
    .unrouted(xbar_unrouted), .conflict(xbar_conflict)
  );

  pkt_recorder u_rec (
    .clk, .rst_n,
    .ev_valid, .ev,
    .m_beat(rec_beat), .m_valid(rec_valid), .m_ready(rec_ready),
    .timestamp, .lost(rec_lost)
  );

endmodule
