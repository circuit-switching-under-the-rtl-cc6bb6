// tb_circuit_xbar: self-checking test of the circuit/local crossbar.
//
// Every source port sends random frames while the configuration changes at
// random times, mid-frame included. Each configuration is a random
// permutation; every source independently goes to an uplink, to a local
// port or nowhere. The test notes the route in force when each frame's
// first beat is accepted and checks that the frame arrives whole, in order
// and only on that output, that frames with no route are discarded with one
// `unrouted` pulse each, and that outputs apply backpressure independently.
// (A new configuration may briefly collide with a frame still in flight;
// the frame keeps its output.) Phase 2 aims two sources at one uplink and
// checks that the lower-numbered
// source wins, the other is stalled, and `conflict` is raised.
module tb_circuit_xbar;
  import reactor_pkg::*;
  import tb_frames_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  port_cfg_t [N_PORTS-1:0] cfg;
  beat_t                   s_beat [N_PORTS], up_beat [N_PORTS], loc_beat [N_PORTS];
  logic      [N_PORTS-1:0] s_valid, s_ready, up_valid, up_ready, loc_valid, loc_ready;
  logic      [N_PORTS-1:0] unrouted;
  logic                    conflict;

  circuit_xbar dut (.*);

  for (genvar s = 0; s < N_PORTS; s++) begin : g_src
    tb_stream_src u_src (.clk, .rst_n, .beat(s_beat[s]), .valid(s_valid[s]), .ready(s_ready[s]));
  end

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s at %0t", msg, $time);
    end
  endtask

  beat_q_t exp_f   [N_PORTS][$];   // frames each source sends, in order
  int      exp_d   [N_PORTS][$];   // route of each frame: -1 none, o uplink o, 10+o local o
  bit      in_fr   [N_PORTS];
  beat_q_t got_up  [N_PORTS], got_loc [N_PORTS];
  int      n_disc = 0, n_unr = 0, n_up = 0, n_loc = 0, n_conf = 0;
  bit      wiggle = 1;

  function automatic int dest_of(input port_cfg_t c);
    if (!c.valid || c.route == ROUTE_NONE) return -1;
    return (c.route == ROUTE_UPLINK) ? int'(c.idx) : 10 + int'(c.idx);
  endfunction

  task automatic take(input int s, input int d);
    // a frame from source s came out at d (-1 = discarded)
    while (exp_d[s].size() > 0 && exp_d[s][0] == -1 && d != -1) begin
      chk(0, "discarded frame skipped");
      void'(exp_d[s].pop_front());
      void'(exp_f[s].pop_front());
    end
    chk(exp_d[s].size() > 0 && exp_d[s][0] == d, "frame on its route");
    if (exp_d[s].size() > 0) begin
      void'(exp_d[s].pop_front());
      void'(exp_f[s].pop_front());
    end
  endtask

  always @(negedge clk) begin
    for (int o = 0; o < N_PORTS; o++) begin
      up_ready[o]  = $urandom_range(0, 3) != 0;
      loc_ready[o] = $urandom_range(0, 3) != 0;
    end
    if (wiggle && $urandom_range(0, 40) == 0) begin
      int perm [N_PORTS];
      for (int i = 0; i < N_PORTS; i++) perm[i] = i;
      perm.shuffle();
      for (int s = 0; s < N_PORTS; s++) begin
        int r;
        r = $urandom_range(0, 4);
        cfg[s].valid = (r != 0);
        cfg[s].cls   = 3'(s);
        cfg[s].route = (r <= 1) ? ROUTE_NONE : (r == 2) ? ROUTE_LOCAL : ROUTE_UPLINK;
        cfg[s].idx   = PORT_W'(perm[s]);
      end
    end
  end

  // record the route at each frame's first beat; check outputs
  always @(posedge clk) begin
    if (rst_n) begin
      if (conflict) n_conf++;
      for (int s = 0; s < N_PORTS; s++) begin
        if (s_valid[s] && s_ready[s]) begin
          if (!in_fr[s]) exp_d[s].push_back(dest_of(cfg[s]));
          in_fr[s] = !s_beat[s].last;
        end
        if (unrouted[s]) begin
          n_unr++;
          chk(exp_d[s].size() > 0, "unrouted pulse has a frame");
          // the discarded frame is the newest one without an output
          for (int k = 0; k < exp_d[s].size(); k++)
            if (exp_d[s][k] == -1) begin
              exp_d[s].delete(k);
              exp_f[s].delete(k);
              n_disc++;
              break;
            end
        end
      end
      for (int o = 0; o < N_PORTS; o++) begin
        if (up_valid[o] && up_ready[o]) begin
          got_up[o].push_back(up_beat[o]);
          if (up_beat[o].last) begin
            int s;
            s = frame_src(got_up[o]);
            chk(s < N_PORTS && exp_f[s].size() > 0 && same_frame(got_up[o], exp_f[s][0]), "uplink frame intact");
            if (s < N_PORTS) take(s, o);
            got_up[o].delete();
            n_up++;
          end
        end
        if (loc_valid[o] && loc_ready[o]) begin
          got_loc[o].push_back(loc_beat[o]);
          if (loc_beat[o].last) begin
            int s;
            s = frame_src(got_loc[o]);
            chk(s < N_PORTS && exp_f[s].size() > 0 && same_frame(got_loc[o], exp_f[s][0]), "local frame intact");
            if (s < N_PORTS) take(s, 10 + o);
            got_loc[o].delete();
            n_loc++;
          end
        end
      end
    end
  end

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total;
    for (int s = 0; s < N_PORTS; s++) begin
      cfg[s]   = '{valid: 1'b1, cls: 3'(s), route: ROUTE_UPLINK, idx: PORT_W'(s)};
      in_fr[s] = 0;
    end
    up_ready = '1; loc_ready = '1;
    g_src[0].u_src.gap_pct = 20;
    g_src[1].u_src.gap_pct = 30;
    g_src[2].u_src.gap_pct = 10;
    g_src[3].u_src.gap_pct = 50;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 150; i++) begin
      beat_q_t f0, f1, f2, f3;
      f0 = build_frame(0, 0, 1'b1, $urandom_range(64, 300), i);
      f1 = build_frame(1, 1, 1'b1, $urandom_range(64, 300), i);
      f2 = build_frame(2, 2, 1'b1, $urandom_range(64, 300), i);
      f3 = build_frame(3, 3, 1'b1, $urandom_range(64, 300), i);
      g_src[0].u_src.push(f0); exp_f[0].push_back(f0);
      g_src[1].u_src.push(f1); exp_f[1].push_back(f1);
      g_src[2].u_src.push(f2); exp_f[2].push_back(f2);
      g_src[3].u_src.push(f3); exp_f[3].push_back(f3);
    end
    while (g_src[0].u_src.sent + g_src[1].u_src.sent + g_src[2].u_src.sent + g_src[3].u_src.sent < 600)
      @(posedge clk);
    repeat (10) @(posedge clk);
    total = n_up + n_loc + n_disc;
    chk(total == 600, "every frame delivered or discarded");
    chk(n_unr == n_disc && n_disc > 0, "one unrouted pulse per discarded frame");
    chk(n_up > 50 && n_loc > 50, "both output kinds used");
    for (int s = 0; s < N_PORTS; s++) chk(exp_f[s].size() == 0, "nothing left over");
    $display("phase 1: %0d uplink, %0d local, %0d discarded", n_up, n_loc, n_disc);

    // phase 2: sources 1 and 2 both aimed at uplink 3
    @(negedge clk);
    wiggle = 0;
    for (int s = 0; s < N_PORTS; s++) cfg[s].valid = 1'b0;
    cfg[1] = '{valid: 1'b1, cls: 3'd1, route: ROUTE_UPLINK, idx: PORT_W'(3)};
    cfg[2] = '{valid: 1'b1, cls: 3'd2, route: ROUTE_UPLINK, idx: PORT_W'(3)};
    for (int i = 0; i < 5; i++) begin
      beat_q_t f1, f2;
      f1 = build_frame(1, 1, 1'b1, 200, 300 + i);
      f2 = build_frame(2, 2, 1'b1, 200, 300 + i);
      g_src[1].u_src.push(f1); exp_f[1].push_back(f1);
      g_src[2].u_src.push(f2); exp_f[2].push_back(f2);
    end
    n_conf = 0;
    total = n_up;
    while (g_src[1].u_src.sent < 155) @(posedge clk);
    repeat (50) @(posedge clk);
    chk(n_up == total + 5, "winner's frames all pass");
    chk(g_src[2].u_src.sent == 150, "loser stalled");
    chk(n_conf > 0, "conflict raised");
    // release the loser
    @(negedge clk);
    cfg[1].valid = 1'b0;
    while (g_src[2].u_src.sent < 155) @(posedge clk);
    repeat (10) @(posedge clk);
    chk(n_up == total + 10, "loser's frames pass once free");
    $display("phase 2: %0d conflict cycles", n_conf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
