// tb_schedule_table: self-checking test of the double-buffered schedule.
//
// Several rounds each write a random schedule into the shadow bank while
// the active one is read back continuously, and check that:
//   - writes never disturb the active schedule;
//   - commit sets pending and holds the new length until the swap;
//   - a swap without anything pending changes nothing;
//   - a swap with a pending schedule makes it active in the next cycle,
//     pulses `swapped` once and clears pending;
//   - a commit of length 0 or more than MAX_CONFIGS is ignored.
// The test keeps its own copy of both schedules.
module tb_schedule_table;
  import reactor_pkg::*;

  localparam int MC = 8;
  localparam int IW = $clog2(MC);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic           wr_en, wr_commit, swap, pending, swapped;
  logic [IW-1:0]  wr_idx, rd_idx;
  logic [IW:0]    wr_num, num_configs;
  sched_entry_t   wr_entry, rd_entry;

  schedule_table #(.MAX_CONFIGS(MC)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s at %0t", msg, $time);
    end
  endtask

  sched_entry_t act_m [MC], shd_m [MC];
  int           act_n = 0;
  int           n_swapped = 0;

  function automatic sched_entry_t rand_entry();
    sched_entry_t e;
    e.duration = $urandom;
    for (int w = 0; w < OCS_CFG_W; w += 32) e.ocs_cfg[w +: 24] = 24'($urandom);
    for (int p = 0; p < N_PORTS; p++) begin
      e.port[p].valid = 1'($urandom);
      e.port[p].cls   = 3'($urandom);
      e.port[p].route = route_e'($urandom_range(0, 2));
      e.port[p].idx   = PORT_W'($urandom);
    end
    return e;
  endfunction

  // continuous read-back of the active schedule
  always @(negedge clk) rd_idx = IW'($urandom_range(0, MC - 1));
  always @(posedge clk) begin
    if (rst_n) begin
      if (swapped) n_swapped++;
      chk(int'(num_configs) == act_n, "active length");
      if (act_n > 0 && int'(rd_idx) < act_n) chk(rd_entry == act_m[rd_idx], "active entry");
    end
  end

  task automatic write(input int i, input sched_entry_t e);
    @(negedge clk);
    wr_en = 1; wr_idx = IW'(i); wr_entry = e;
    @(negedge clk);
    wr_en = 0;
  endtask

  task automatic commit(input int n);
    @(negedge clk);
    wr_commit = 1; wr_num = (IW+1)'(n);
    @(negedge clk);
    wr_commit = 0;
  endtask

  task automatic do_swap();
    @(negedge clk);
    swap = 1;
    @(posedge clk);
    #1 swap = 0;
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; wr_commit = 0; swap = 0; wr_idx = 0; wr_num = 0; wr_entry = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!pending && num_configs == 0, "empty after reset");
    do_swap();
    @(negedge clk);
    chk(num_configs == 0 && !swapped && n_swapped == 0, "swap with nothing pending");

    for (int round = 0; round < 12; round++) begin
      int n, sw0;
      n = $urandom_range(1, MC);
      for (int i = 0; i < n; i++) begin
        shd_m[i] = rand_entry();
        write(i, shd_m[i]);
      end
      // invalid commits are ignored
      commit(0);
      chk(!pending, "length 0 ignored");
      commit(MC + 1);
      chk(!pending, "length above MAX_CONFIGS ignored");
      commit(n);
      chk(pending, "pending after commit");
      repeat ($urandom_range(1, 20)) @(posedge clk);
      chk(pending && int'(num_configs) == act_n, "old schedule runs until swap");
      sw0 = n_swapped;
      @(negedge clk);
      swap = 1;
      @(posedge clk);
      #1 swap = 0;
      // swap takes effect here: update the model
      act_n = n;
      for (int i = 0; i < n; i++) act_m[i] = shd_m[i];
      @(negedge clk);
      chk(!pending, "pending cleared");
      chk(swapped, "swapped pulse");
      @(negedge clk);
      chk(n_swapped == sw0 + 1 && !swapped, "one swapped pulse");
      repeat (20) @(posedge clk);
    end
    $display("%0d schedules swapped in", n_swapped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
