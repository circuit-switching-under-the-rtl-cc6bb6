// reconfig_controller: runs the circuit schedule of a REACToR.
//
// The schedule is a repeating period of configurations; configuration k
// lasts phi_k cycles, reconfiguration delay included. Each configuration
// slot runs this sequence, which follows the REACToR paper's host control
// protocol:
//
//   cycle 0            DARK: the OCS is sent the new permutation
//                      (ocs_reconfig pulse); circuits are off, so every
//                      classifier sends all traffic to the EPS.
//   cycle DELTA        LIT: classifiers and crossbar get the configuration;
//                      each port with a circuit sends its host a PFC frame
//                      that unpauses the class the circuit serves.
//   phi_k-PAUSE_LEAD   a PFC frame pauses that class again. It goes out
//                      PAUSE_LEAD cycles early to hide the host's reaction
//                      time (about 1 us measured for the 82599 NIC).
//   phi_k-1            circuits are switched off at the end of the slot;
//                      frames still arriving go to the EPS.
//
// At the end of the last slot of a period the controller asks the schedule
// table to swap in a pending schedule ("Apply") and pulses period_start,
// which serves as the period heartbeat sent to the hosts. With run low it
// stops at the end of a period. Durations shorter than
// DELTA + PAUSE_LEAD + 2 are stretched to that length.
//
// Defaults are the prototype's, at the 156.25 MHz (6.4 ns) datapath clock:
// DELTA 4688 cycles is the 30 us reconfiguration time the experiments
// assume; PAUSE_LEAD 156 cycles is 1 us. Outputs are registered and follow
// the cycle numbers above by one clock.
module reconfig_controller
  import reactor_pkg::*;
#(
  parameter int unsigned MAX_CONFIGS = 8,
  parameter int unsigned DELTA       = 4688,
  parameter int unsigned PAUSE_LEAD  = 156
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           run,
  // schedule table
  output logic [$clog2(MAX_CONFIGS)-1:0] rd_idx,
  input  sched_entry_t                   rd_entry,
  input  logic [$clog2(MAX_CONFIGS):0]   num_configs,
  input  logic                           pending,
  output logic                           swap,
  // OCS circuit control
  output logic [OCS_CFG_W-1:0]           ocs_cfg,
  output logic                           ocs_reconfig,
  // classifiers and crossbar
  output logic      [N_PORTS-1:0]        circ_en,
  output logic      [CLASS_W-1:0]        circ_cls [N_PORTS],
  output port_cfg_t [N_PORTS-1:0]        xbar_cfg,
  // PFC generators, one per host port
  output logic      [N_PORTS-1:0]        pfc_req,
  output logic      [N_CLASSES-1:0]      pfc_pause   [N_PORTS],
  output logic      [N_CLASSES-1:0]      pfc_unpause [N_PORTS],
  // status
  output phase_e                         phase,
  output logic                           period_start,
  output logic                           slot_start
);

  localparam int unsigned IW      = $clog2(MAX_CONFIGS);
  localparam int unsigned MIN_DUR = DELTA + PAUSE_LEAD + 2;

  logic [DUR_W-1:0] cnt;
  logic [DUR_W-1:0] dur;        // effective duration of the current slot
  port_cfg_t [N_PORTS-1:0] cur;  // port settings of the current slot
  logic [IW-1:0]    idx;
  logic             active;
  logic             slot_end;
  logic             period_end;
  logic             start;

  assign rd_idx     = idx;
  assign slot_end   = active && (cnt == dur - 1);
  assign period_end = slot_end && (32'(idx) == 32'(num_configs) - 1);
  assign start      = !active && run && (num_configs != '0) && !pending;
  assign swap       = period_end || (!active && pending);

  function automatic logic [DUR_W-1:0] eff_dur(input logic [DUR_W-1:0] d);
    return (d < DUR_W'(MIN_DUR)) ? DUR_W'(MIN_DUR) : d;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt          <= '0;
      dur          <= DUR_W'(MIN_DUR);
      cur          <= '0;
      idx          <= '0;
      active       <= 1'b0;
      ocs_cfg      <= '0;
      ocs_reconfig <= 1'b0;
      circ_en      <= '0;
      xbar_cfg     <= '0;
      pfc_req      <= '0;
      phase        <= PH_IDLE;
      period_start <= 1'b0;
      slot_start   <= 1'b0;
      for (int p = 0; p < N_PORTS; p++) begin
        circ_cls[p]    <= '0;
        pfc_pause[p]   <= '0;
        pfc_unpause[p] <= '0;
      end
    end else begin
      ocs_reconfig <= 1'b0;
      pfc_req      <= '0;
      period_start <= 1'b0;
      slot_start   <= 1'b0;

      if (start || (active && cnt == '0)) begin
        // first cycle of a slot: load the configuration, reconfigure the OCS
        cur          <= rd_entry.port;
        dur          <= eff_dur(rd_entry.duration);
        ocs_cfg      <= rd_entry.ocs_cfg;
        ocs_reconfig <= 1'b1;
        circ_en      <= '0;
        xbar_cfg     <= '0;
        phase        <= PH_DARK;
        slot_start   <= 1'b1;
        period_start <= start || (idx == '0);
      end

      if (start) begin
        active <= 1'b1;
        cnt    <= 32'd1;
      end else if (active) begin
        cnt <= slot_end ? '0 : cnt + 1'b1;

        if (cnt == DUR_W'(DELTA)) begin
          // circuits established
          phase    <= PH_LIT;
          xbar_cfg <= cur;
          for (int p = 0; p < N_PORTS; p++) begin
            circ_en[p]     <= cur[p].valid;
            circ_cls[p]    <= cur[p].cls;
            pfc_req[p]     <= cur[p].valid;
            pfc_pause[p]   <= '0;
            pfc_unpause[p] <= N_CLASSES'(1) << cur[p].cls;
          end
        end

        if (cnt == dur - DUR_W'(PAUSE_LEAD)) begin
          for (int p = 0; p < N_PORTS; p++) begin
            pfc_req[p]     <= cur[p].valid;
            pfc_pause[p]   <= N_CLASSES'(1) << cur[p].cls;
            pfc_unpause[p] <= '0;
          end
        end

        if (slot_end) begin
          circ_en  <= '0;
          xbar_cfg <= '0;
          phase    <= PH_DARK;
          if (period_end) begin
            idx <= '0;
            if (!run) begin
              active <= 1'b0;
              phase  <= PH_IDLE;
            end
          end else begin
            idx <= idx + 1'b1;
          end
        end
      end
    end
  end

endmodule
