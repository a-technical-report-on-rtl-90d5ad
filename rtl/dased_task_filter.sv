// dased_task_filter: context-switch detection and event filtering.
//
// A programmable array holds the first and last instruction address of each
// monitored task (or any code region), plus one address range that covers
// all valid code of the application, libraries and operating system
// included. For every executed instruction the filter finds the monitored
// task it belongs to (lowest-numbered enabled region that contains it, or
// "none"). When that task differs from the one of the previous executed
// instruction it raises cs with the instruction's address. The processor's
// sbb/func/ret flags pass only when the instruction lies in a monitored task.
// An instruction whose address is not word aligned or lies outside the valid
// code range raises addr_err and is otherwise dropped.
//
// All of this follows the detector's description; the configuration port,
// the inclusive region bounds, the lowest-index priority for overlapping
// regions, the reset values (no task enabled, whole address space valid)
// and the one-cycle registered output are this implementation's choices.
//
// Timing: outputs are registered, one clk after the instruction is presented
// on i_valid/i_addr. One instruction per clock is accepted.
module dased_task_filter
  import dased_pkg::*;
#(
  parameter int unsigned NUM_TASKS = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration (processor clock domain)
  input  logic              cfg_task_we,
  input  logic [$clog2(NUM_TASKS > 1 ? NUM_TASKS : 2)-1:0] cfg_task_idx,
  input  logic              cfg_task_en,
  input  logic [ADDR_W-1:0] cfg_task_start,
  input  logic [ADDR_W-1:0] cfg_task_end,
  input  logic              cfg_code_we,
  input  logic [ADDR_W-1:0] cfg_code_lo,
  input  logic [ADDR_W-1:0] cfg_code_hi,
  // processor instruction trace
  input  logic              i_valid,
  input  logic [ADDR_W-1:0] i_addr,
  input  logic              i_sbb,
  input  logic              i_func,
  input  logic              i_ret,
  // filtered trace
  output logic              o_valid,
  output logic [ADDR_W-1:0] o_addr,
  output logic              o_sbb,
  output logic              o_func,
  output logic              o_ret,
  output logic              o_cs,
  output logic              o_addr_err,
  output logic [$clog2(NUM_TASKS+1)-1:0] o_task
);

  localparam int unsigned TID_W = $clog2(NUM_TASKS + 1);
  localparam logic [TID_W-1:0] NO_TASK = TID_W'(NUM_TASKS);

  logic [NUM_TASKS-1:0] task_en;
  logic [ADDR_W-1:0]    task_start [NUM_TASKS];
  logic [ADDR_W-1:0]    task_end   [NUM_TASKS];
  logic [ADDR_W-1:0]    code_lo, code_hi;
  logic [TID_W-1:0]     cur_task;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      task_en <= '0;
      code_lo <= '0;
      code_hi <= '1;
      for (int i = 0; i < NUM_TASKS; i++) begin
        task_start[i] <= '0;
        task_end[i]   <= '0;
      end
    end else begin
      if (cfg_task_we) begin
        task_en[cfg_task_idx]    <= cfg_task_en;
        task_start[cfg_task_idx] <= cfg_task_start;
        task_end[cfg_task_idx]   <= cfg_task_end;
      end
      if (cfg_code_we) begin
        code_lo <= cfg_code_lo;
        code_hi <= cfg_code_hi;
      end
    end
  end

  logic             bad_addr;
  logic [TID_W-1:0] hit_task;

  always_comb begin
    bad_addr = (i_addr[1:0] != 2'b00) || (i_addr < code_lo) || (i_addr > code_hi);
    hit_task = NO_TASK;
    for (int i = NUM_TASKS - 1; i >= 0; i--) begin
      if (task_en[i] && i_addr >= task_start[i] && i_addr <= task_end[i])
        hit_task = TID_W'(i);
    end
  end

  wire good      = i_valid && !bad_addr;
  wire monitored = hit_task != NO_TASK;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_task   <= NO_TASK;
      o_valid    <= 1'b0;
      o_addr     <= '0;
      o_sbb      <= 1'b0;
      o_func     <= 1'b0;
      o_ret      <= 1'b0;
      o_cs       <= 1'b0;
      o_addr_err <= 1'b0;
    end else begin
      o_valid    <= good;
      o_addr_err <= i_valid && bad_addr;
      o_addr     <= i_addr;
      o_sbb      <= good && monitored && i_sbb;
      o_func     <= good && monitored && i_func;
      o_ret      <= good && monitored && i_ret;
      o_cs       <= good && (hit_task != cur_task);
      if (good) cur_task <= hit_task;
    end
  end

  assign o_task = cur_task;

  // A single instruction is at most one kind of branch.
  assert property (@(posedge clk) disable iff (!rst_n)
                   i_valid |-> $onehot0({i_sbb, i_func, i_ret}))
    else $error("more than one of sbb/func/ret on one instruction");

endmodule
