// circuit_xbar: the circuit and rack-local interconnect of a REACToR.
//
// Each host port's circuit-path frames (from its classifier) go either to a
// circuit uplink, and through it into the OCS, or directly to another
// downward port of the same rack. Which one is set per source port by the
// current configuration (port_cfg_t: route and index). In a valid schedule
// each uplink and each local port has at most one source, as the REACToR paper
// requires ("each circuit uplink ... is exclusive to a particular source
// port"); if two sources name the same output, a source already in the
// middle of a frame on it keeps it, otherwise the lower-numbered source
// wins; the other is held (not ready) and `conflict` is raised.
//
// A source keeps the route it had at the first beat of a frame until the
// frame's last beat, so the controller may change the configuration at any
// time without splitting a frame. Circuit frames of a source with no route
// are discarded and counted by a one-cycle `unrouted` pulse per frame.
//
// Timing: purely combinational forwarding (ready and valid pass straight
// through), plus one register per source for the route lock.
module circuit_xbar
  import reactor_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  port_cfg_t [N_PORTS-1:0]   cfg,
  input  beat_t                     s_beat   [N_PORTS],
  input  logic      [N_PORTS-1:0]   s_valid,
  output logic      [N_PORTS-1:0]   s_ready,
  // towards the OCS
  output beat_t                     up_beat  [N_PORTS],
  output logic      [N_PORTS-1:0]   up_valid,
  input  logic      [N_PORTS-1:0]   up_ready,
  // towards the downward-port multiplexers
  output beat_t                     loc_beat [N_PORTS],
  output logic      [N_PORTS-1:0]   loc_valid,
  input  logic      [N_PORTS-1:0]   loc_ready,
  output logic      [N_PORTS-1:0]   unrouted,
  output logic                      conflict
);

  logic      [N_PORTS-1:0] in_frame;   // source is in the middle of a frame
  route_e                  lk_route [N_PORTS];
  logic      [PORT_W-1:0]  lk_idx   [N_PORTS];
  route_e                  route    [N_PORTS];
  logic      [PORT_W-1:0]  idx      [N_PORTS];

  always_comb begin
    for (int s = 0; s < N_PORTS; s++) begin
      if (in_frame[s]) begin
        route[s] = lk_route[s];
        idx[s]   = lk_idx[s];
      end else begin
        route[s] = cfg[s].valid ? cfg[s].route : ROUTE_NONE;
        idx[s]   = cfg[s].idx;
      end
    end
  end

  // output side: each output takes the lowest-numbered source aimed at it
  always_comb begin
    logic [N_PORTS-1:0] up_taken, loc_taken;
    up_taken  = '0;
    loc_taken = '0;
    conflict  = 1'b0;
    s_ready   = '0;
    for (int o = 0; o < N_PORTS; o++) begin
      up_beat[o]  = '0;
      loc_beat[o] = '0;
    end
    up_valid  = '0;
    loc_valid = '0;
    // pass 0 serves sources in the middle of a frame, which keep their
    // output; pass 1 serves sources starting a frame
    for (int pass = 0; pass < 2; pass++) begin
      for (int s = 0; s < N_PORTS; s++) begin
        if (in_frame[s] == (pass == 0)) begin
          case (route[s])
            ROUTE_UPLINK: begin
              if (up_taken[idx[s]]) conflict = 1'b1;
              else begin
                up_taken[idx[s]] = 1'b1;
                up_beat[idx[s]]  = s_beat[s];
                up_valid[idx[s]] = s_valid[s];
                s_ready[s]       = up_ready[idx[s]];
              end
            end
            ROUTE_LOCAL: begin
              if (loc_taken[idx[s]]) conflict = 1'b1;
              else begin
                loc_taken[idx[s]] = 1'b1;
                loc_beat[idx[s]]  = s_beat[s];
                loc_valid[idx[s]] = s_valid[s];
                s_ready[s]        = loc_ready[idx[s]];
              end
            end
            default: s_ready[s] = 1'b1;  // discard
          endcase
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_frame <= '0;
      unrouted <= '0;
      for (int s = 0; s < N_PORTS; s++) begin
        lk_route[s] <= ROUTE_NONE;
        lk_idx[s]   <= '0;
      end
    end else begin
      for (int s = 0; s < N_PORTS; s++) begin
        unrouted[s] <= 1'b0;
        if (s_valid[s] && s_ready[s]) begin
          if (!in_frame[s]) begin
            lk_route[s] <= route[s];
            lk_idx[s]   <= idx[s];
            unrouted[s] <= (route[s] == ROUTE_NONE);
          end
          in_frame[s] <= !s_beat[s].last;
        end
      end
    end
  end

endmodule
