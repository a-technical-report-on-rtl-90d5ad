// dased_top: Dynamic Application Soft Error Detector (DASED).
//
// The detector sits beside a processor and watches its executed-instruction
// trace (address plus one-bit sbb / func / ret flags for short backwards
// branches, calls and returns). It never stalls or alters the processor.
// Loops profiled in advance are loaded into the profile cache with their
// minimum and maximum iterations per execution; at run time the detector
// counts each loop execution's iterations and reports a control-flow error
// when a count leaves its bounds, and reports at once any instruction whose
// address is misaligned or outside the application's code.
//
// Structure (task filter -> FIFO -> controller <-> profile cache):
//   clk_cpu   : dased_task_filter and the FIFO's write side, at processor speed
//   clk_dased : the controller and profile cache, nominally clk_cpu / 4
// rst_n is asynchronous; it is released separately in each clock domain.
//
// Outputs: addr_err (clk_cpu, one pulse per bad instruction, two clk_cpu
// after it is presented), fifo_overflow (clk_cpu, an event was lost) and the
// loop error report loop_err/loop_err_code/loop_err_index/loop_err_addr
// (clk_dased). cur_task, fifo_level and the stat_* pulses (clk_dased) show
// which mechanisms are active. Configuration is done through the cfg ports while the
// processor is not being monitored: task regions and the code range on
// clk_cpu, profile entries on clk_dased.
module dased_top
  import dased_pkg::*;
#(
  parameter int unsigned NUM_TASKS  = 8,
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned PC_ENTRIES = 32
) (
  input  logic              clk_cpu,
  input  logic              clk_dased,
  input  logic              rst_n,
  // processor trace
  input  logic              i_valid,
  input  logic [ADDR_W-1:0] i_addr,
  input  logic              i_sbb,
  input  logic              i_func,
  input  logic              i_ret,
  // task filter configuration (clk_cpu)
  input  logic              cfg_task_we,
  input  logic [$clog2(NUM_TASKS > 1 ? NUM_TASKS : 2)-1:0] cfg_task_idx,
  input  logic              cfg_task_en,
  input  logic [ADDR_W-1:0] cfg_task_start,
  input  logic [ADDR_W-1:0] cfg_task_end,
  input  logic              cfg_code_we,
  input  logic [ADDR_W-1:0] cfg_code_lo,
  input  logic [ADDR_W-1:0] cfg_code_hi,
  // profile cache configuration (clk_dased)
  input  logic              cfg_pc_we,
  input  logic [$clog2(PC_ENTRIES)-1:0] cfg_pc_idx,
  input  pc_static_t        cfg_pc_data,
  // detection
  output logic              addr_err,
  output logic              fifo_overflow,
  output logic              loop_err,
  output err_code_t         loop_err_code,
  output logic [$clog2(PC_ENTRIES)-1:0] loop_err_index,
  output waddr_t            loop_err_addr,
  // observability
  output logic [$clog2(NUM_TASKS+1)-1:0] cur_task,
  output logic [$clog2(FIFO_DEPTH):0]    fifo_level,
  output logic              stat_loop_start,
  output logic              stat_loop_iter,
  output logic              stat_loop_end,
  output logic              stat_resume
);
  localparam int unsigned IW = $clog2(PC_ENTRIES);

  logic rst_cpu_n, rst_dased_n;

  dased_rst_sync u_rst_cpu   (.clk(clk_cpu),   .rst_n_in(rst_n), .rst_n_out(rst_cpu_n));
  dased_rst_sync u_rst_dased (.clk(clk_dased), .rst_n_in(rst_n), .rst_n_out(rst_dased_n));

  // ---------------- task filter ----------------
  logic              t_valid, t_sbb, t_func, t_ret, t_cs;
  logic [ADDR_W-1:0] t_addr;

  dased_task_filter #(.NUM_TASKS(NUM_TASKS)) u_filter (
    .clk(clk_cpu), .rst_n(rst_cpu_n),
    .cfg_task_we, .cfg_task_idx, .cfg_task_en, .cfg_task_start, .cfg_task_end,
    .cfg_code_we, .cfg_code_lo, .cfg_code_hi,
    .i_valid, .i_addr, .i_sbb, .i_func, .i_ret,
    .o_valid(t_valid), .o_addr(t_addr), .o_sbb(t_sbb), .o_func(t_func), .o_ret(t_ret),
    .o_cs(t_cs), .o_addr_err(addr_err), .o_task(cur_task)
  );

  // ---------------- FIFO ----------------
  logic        f_empty, f_rd_en;
  fifo_entry_t f_head;

  dased_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .clk_cpu, .rst_cpu_n,
    .t_valid, .t_addr, .t_sbb, .t_func, .t_ret, .t_cs,
    .overflow(fifo_overflow), .level(fifo_level),
    .clk_dased, .rst_dased_n,
    .rd_en(f_rd_en), .empty(f_empty), .head(f_head)
  );

  // ---------------- profile cache and controller ----------------
  waddr_t  q_addr;
  offset_t q_offset;
  logic    found;
  logic [IW-1:0] found_index;
  logic [PC_ENTRIES-1:0] in_range, in_loop, in_func, in_cs;
  logic [PC_ENTRIES-1:0] nxt_in_loop, nxt_in_func, nxt_in_cs;
  iter_t   curr_iter [PC_ENTRIES];
  iter_t   min_iter  [PC_ENTRIES];
  iter_t   max_iter  [PC_ENTRIES];
  logic    upd_flags_we, upd_iter_we;
  logic [IW-1:0] upd_iter_idx;
  iter_t   upd_iter_val;

  dased_profile_cache #(.ENTRIES(PC_ENTRIES)) u_cache (
    .clk(clk_dased), .rst_n(rst_dased_n),
    .cfg_we(cfg_pc_we), .cfg_idx(cfg_pc_idx), .cfg_data(cfg_pc_data),
    .q_addr, .q_offset, .found, .found_index, .in_range,
    .in_loop, .in_func, .in_cs, .curr_iter, .min_iter, .max_iter,
    .upd_flags_we, .nxt_in_loop, .nxt_in_func, .nxt_in_cs,
    .upd_iter_we, .upd_iter_idx, .upd_iter_val
  );

  dased_controller #(.ENTRIES(PC_ENTRIES)) u_ctrl (
    .clk(clk_dased), .rst_n(rst_dased_n),
    .fifo_empty(f_empty), .fifo_head(f_head), .fifo_rd_en(f_rd_en),
    .pc_q_addr(q_addr), .pc_q_offset(q_offset),
    .pc_found(found), .pc_found_index(found_index), .pc_in_range(in_range),
    .pc_in_loop(in_loop), .pc_in_func(in_func), .pc_in_cs(in_cs),
    .pc_curr_iter(curr_iter), .pc_min_iter(min_iter), .pc_max_iter(max_iter),
    .pc_upd_flags_we(upd_flags_we), .pc_nxt_in_loop(nxt_in_loop),
    .pc_nxt_in_func(nxt_in_func), .pc_nxt_in_cs(nxt_in_cs),
    .pc_upd_iter_we(upd_iter_we), .pc_upd_iter_idx(upd_iter_idx),
    .pc_upd_iter_val(upd_iter_val),
    .err_valid(loop_err), .err_code(loop_err_code), .err_index(loop_err_index),
    .err_addr(loop_err_addr),
    .stat_loop_start, .stat_loop_iter, .stat_loop_end, .stat_resume
  );

endmodule
