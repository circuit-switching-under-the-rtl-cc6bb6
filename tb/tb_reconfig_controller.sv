// tb_reconfig_controller: cycle-exact test of the circuit schedule runner.
//
// The controller runs from a real schedule_table. DELTA and PAUSE_LEAD are
// shortened so that many slots fit in a short run. A reference model in
// the test knows each slot's start cycle and duration (stretched to
// DELTA + PAUSE_LEAD + 2 if shorter). For every cycle it predicts and
// checks:
//   - the OCS reconfiguration pulse and permutation at slot offset 0;
//   - circuits dark for exactly DELTA cycles, then lit until the last
//     cycle of the slot (classifier enable, class, crossbar settings,
//     phase);
//   - the unpause request at offset DELTA and the pause request PAUSE_LEAD
//     cycles before the slot ends, for the class of each port's circuit;
//   - period_start at the first slot of each period.
// A new schedule committed mid-period must start exactly at the next
// period boundary, and dropping `run` must stop the controller at the end
// of the period.
module tb_reconfig_controller;
  import reactor_pkg::*;

  localparam int MC      = 8;
  localparam int IW      = $clog2(MC);
  localparam int DELTA   = 20;
  localparam int LEAD    = 6;
  localparam int MIN_DUR = DELTA + LEAD + 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                    run;
  logic                    wr_en, wr_commit, swap, pending, swapped;
  logic [IW-1:0]           wr_idx, rd_idx;
  logic [IW:0]             wr_num, num_configs;
  sched_entry_t            wr_entry, rd_entry;
  logic [OCS_CFG_W-1:0]    ocs_cfg;
  logic                    ocs_reconfig;
  logic [N_PORTS-1:0]      circ_en, pfc_req;
  logic [CLASS_W-1:0]      circ_cls [N_PORTS];
  port_cfg_t [N_PORTS-1:0] xbar_cfg;
  logic [N_CLASSES-1:0]    pfc_pause [N_PORTS], pfc_unpause [N_PORTS];
  phase_e                  phase;
  logic                    period_start, slot_start;

  schedule_table #(.MAX_CONFIGS(MC)) u_table (.*);
  reconfig_controller #(.MAX_CONFIGS(MC), .DELTA(DELTA), .PAUSE_LEAD(LEAD)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s at %0t", msg, $time);
    end
  endtask

  // reference model
  sched_entry_t act_m [MC], shd_m [MC];
  int           act_n = 0, shd_n = 0;
  bit           m_pending = 0;
  bit           running = 0, stopped = 0;
  longint       cyc = 0, slot_r = 0;
  int           slot_k = 0, slot_d = 0;
  int           n_slots = 0, n_periods = 0, n_unpause = 0, n_pause = 0, n_swaps = 0;
  int           n_new_sched = 0;

  function automatic int eff(input logic [31:0] d);
    return (d < MIN_DUR) ? MIN_DUR : int'(d);
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      if (swapped) n_swaps++;
      if (!running) begin
        if (!ocs_reconfig)
          chk(!circ_en && !pfc_req && !period_start && (stopped ? phase == PH_IDLE : 1'b1), "idle outputs");
        else begin
          chk(!stopped, "no restart after stop");
          running = 1;
          slot_r  = cyc;
          slot_k  = 0;
          slot_d  = eff(act_m[0].duration);
        end
      end else if (cyc - slot_r == slot_d) begin
        // next slot begins
        slot_r = cyc;
        slot_k++;
        if (slot_k == act_n) begin
          slot_k = 0;
          n_periods++;
          if (m_pending) begin
            act_m = shd_m;
            act_n = shd_n;
            m_pending = 0;
            n_new_sched++;
          end
          if (stopped) running = 0;
        end
        slot_d = eff(act_m[slot_k].duration);
        chk(running ? ocs_reconfig : (!ocs_reconfig && phase == PH_IDLE), "slot boundary");
      end
      if (running) begin
        int off;
        sched_entry_t e;
        bit lit;
        off = int'(cyc - slot_r);
        e   = act_m[slot_k];
        lit = off >= DELTA && off < slot_d - 1;
        chk(ocs_reconfig == (off == 0), "OCS reconfigure pulse");
        chk(slot_start == (off == 0), "slot_start");
        chk(period_start == (off == 0 && slot_k == 0), "period_start");
        if (off == 0) chk(ocs_cfg == e.ocs_cfg, "OCS permutation");
        chk(phase == (lit ? PH_LIT : (stopped && off == slot_d - 1) ? PH_IDLE : PH_DARK), "phase");
        chk(xbar_cfg == (lit ? e.port : '0), "crossbar configuration");
        for (int p = 0; p < N_PORTS; p++) begin
          bit unp, pau;
          chk(circ_en[p] == (lit && e.port[p].valid), "circuit enable");
          if (lit && e.port[p].valid) chk(circ_cls[p] == e.port[p].cls, "circuit class");
          unp = e.port[p].valid && off == DELTA;
          pau = e.port[p].valid && off == slot_d - LEAD;
          chk(pfc_req[p] == (unp || pau), "PFC request timing");
          if (unp) begin
            chk(pfc_unpause[p] == (8'd1 << e.port[p].cls) && pfc_pause[p] == 0, "unpause class");
            n_unpause++;
          end
          if (pau) begin
            chk(pfc_pause[p] == (8'd1 << e.port[p].cls) && pfc_unpause[p] == 0, "pause class");
            n_pause++;
          end
        end
        if (off == 0) n_slots++;
        // the controller samples run in the last cycle of a period, which
        // is seen here one offset early (outputs are registered)
        if (off == slot_d - 2 && slot_k == act_n - 1 && !run) stopped = 1;
      end
      cyc++;
    end
  end

  function automatic sched_entry_t rand_entry(input int k);
    sched_entry_t e;
    e.duration = (k % 3 == 1) ? 32'($urandom_range(1, MIN_DUR - 1)) : 32'($urandom_range(MIN_DUR, 120));
    e.ocs_cfg  = {$urandom, $urandom, $urandom, $urandom};
    for (int p = 0; p < N_PORTS; p++) begin
      e.port[p].valid = $urandom_range(0, 3) != 0;
      e.port[p].cls   = 3'($urandom_range(0, 6));
      e.port[p].route = route_e'($urandom_range(1, 2));
      e.port[p].idx   = PORT_W'($urandom);
    end
    return e;
  endfunction

  task automatic load(input int n);
    for (int i = 0; i < n; i++) begin
      shd_m[i] = rand_entry(i);
      @(negedge clk);
      wr_en = 1; wr_idx = IW'(i); wr_entry = shd_m[i];
      @(negedge clk);
      wr_en = 0;
    end
    shd_n = n;
    @(negedge clk);
    wr_commit = 1; wr_num = (IW+1)'(n);
    m_pending = 1;
    @(negedge clk);
    wr_commit = 0;
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p0;
    run = 0; wr_en = 0; wr_commit = 0; wr_idx = 0; wr_num = 0; wr_entry = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // first schedule: swapped in at once while idle
    load(3);
    @(negedge clk);
    act_m = shd_m; act_n = shd_n; m_pending = 0;
    chk(!pending && num_configs == 3, "first schedule active while idle");
    run = 1;
    while (n_periods < 4) @(posedge clk);
    // new schedules committed mid-period, several times
    for (int i = 0; i < 4; i++) begin
      p0 = n_periods;
      while (!(running && slot_k == 0 && cyc - slot_r == 5)) @(posedge clk);
      load($urandom_range(1, MC));
      while (n_periods < p0 + 3) @(posedge clk);
    end
    chk(n_new_sched == 4 && n_swaps == 5, "each new schedule applied at a period boundary");
    // stop
    @(negedge clk);
    run = 0;
    while (running) @(posedge clk);
    repeat (200) @(posedge clk);
    chk(stopped && phase == PH_IDLE, "stopped at period end");
    $display("%0d slots, %0d periods, %0d unpause, %0d pause requests", n_slots, n_periods, n_unpause, n_pause);
    chk(n_slots > 30 && n_unpause > 30 && n_pause > 30, "enough activity");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
