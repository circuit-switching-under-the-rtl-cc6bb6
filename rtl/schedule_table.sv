// schedule_table: double-buffered store of the REACToR circuit schedule.
//
// A schedule is a list of up to MAX_CONFIGS circuit configurations P_k, each
// with its duration phi_k (see sched_entry_t), repeated every scheduling
// period. The control computer writes the next schedule into the shadow bank
// while the controller runs the active one ("Reconfig" in the REACToR paper's
// traces); wr_commit marks it complete with its number of configurations,
// and the controller's swap request at the next period boundary makes it
// active ("Apply"). Until a new schedule is committed, the active schedule
// repeats.
//
// Writes: wr_en with wr_idx and wr_entry stores one configuration in the
// shadow bank; wr_commit with wr_num (1..MAX_CONFIGS) marks it pending.
// wr_num of 0 is ignored. Reads are combinational from the active bank.
// A swap with nothing pending changes nothing. The width of the write port
// stands in for the schedule packets from the control computer, whose format
// the REACToR paper does not give.
module schedule_table
  import reactor_pkg::*;
#(
  parameter int unsigned MAX_CONFIGS = 8
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           wr_en,
  input  logic [$clog2(MAX_CONFIGS)-1:0] wr_idx,
  input  sched_entry_t                   wr_entry,
  input  logic                           wr_commit,
  input  logic [$clog2(MAX_CONFIGS):0]   wr_num,
  input  logic [$clog2(MAX_CONFIGS)-1:0] rd_idx,
  output sched_entry_t                   rd_entry,
  output logic [$clog2(MAX_CONFIGS):0]   num_configs,  // of the active schedule, 0 = none
  input  logic                           swap,
  output logic                           pending,
  output logic                           swapped       // pulses when a schedule became active
);

  localparam int unsigned IW = $clog2(MAX_CONFIGS);

  sched_entry_t        mem [2][MAX_CONFIGS];
  logic                active;              // bank being run
  logic [IW:0]         num [2];

  always_ff @(posedge clk) begin
    if (wr_en) mem[~active][wr_idx] <= wr_entry;
  end

  assign rd_entry    = mem[active][rd_idx];
  assign num_configs = num[active];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active  <= 1'b0;
      num[0]  <= '0;
      num[1]  <= '0;
      pending <= 1'b0;
      swapped <= 1'b0;
    end else begin
      swapped <= 1'b0;
      if (swap && pending) begin
        active  <= ~active;
        pending <= 1'b0;
        swapped <= 1'b1;
      end else if (wr_commit && wr_num != '0 && wr_num <= (IW+1)'(MAX_CONFIGS)) begin
        num[~active] <= wr_num;
        pending      <= 1'b1;
      end
    end
  end

endmodule
