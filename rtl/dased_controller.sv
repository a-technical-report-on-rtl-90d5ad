// dased_controller: applies one profile event per clock to the profile cache.
//
// Whenever the FIFO is not empty the controller pops the head entry and, in
// the same cycle, computes every loop's new flags and the new iteration
// count of the matching loop:
//   1. cs  : InCS = InLoop, then InCS is cleared for loops whose body holds
//            the new context's first address (the loops that resume).
//   2. ret : loops with InFunc or InCS whose body holds the return
//            destination get InFunc and InCS cleared.
//      sbb : if the loop is in the cache, an executing loop counts one more
//            iteration (error if the count now exceeds MaxIter); otherwise a
//            new execution starts with CurrIter = 1 and InLoop = 1.
//   3. every event: a loop with InLoop set, InFunc and InCS clear and the
//      event address outside its body has ended; InLoop is cleared and its
//      CurrIter is checked against [MinIter, MaxIter].
//   4. func: InFunc is set for every loop still executing (InLoop set) that
//      is not suspended by a context switch (InCS clear).
// Steps 1-3 and the flag meanings follow the detector's algorithm. Two
// orderings are this design's own: a call marks loops only after the exit
// check, so that a loop left just before a call is closed by that call
// rather than kept open forever, and a call leaves the loops of switched-out
// tasks alone. The exit check is applied to returns too, as the prose of the
// algorithm says, so that loops inside a function close when it returns.
// The bounds test at a loop's end uses that loop's own count. Detection is
// reported and processing goes on; CurrIter saturates at its all-ones value.
//
// Interface: fifo_empty/fifo_head/fifo_rd_en face the FIFO read side; the
// pc_* ports face dased_profile_cache; pc_q_addr/pc_q_offset are the head
// entry's fields and pc_upd_iter_idx is the lookup result, handed straight
// back to the cache. err_valid pulses one clk after the
// offending entry was popped, with err_code, the loop's index and the
// event's word address; when several loops fail at once, a MaxIter failure
// of the matching loop wins, then the lowest index. stat_* pulse alongside
// for observability. Throughput is one event per clk.
module dased_controller
  import dased_pkg::*;
#(
  parameter int unsigned ENTRIES = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  // FIFO read side
  input  logic        fifo_empty,
  input  fifo_entry_t fifo_head,
  output logic        fifo_rd_en,
  // profile cache
  output waddr_t      pc_q_addr,
  output offset_t     pc_q_offset,
  input  logic        pc_found,
  input  logic [$clog2(ENTRIES)-1:0] pc_found_index,
  input  logic [ENTRIES-1:0] pc_in_range,
  input  logic [ENTRIES-1:0] pc_in_loop,
  input  logic [ENTRIES-1:0] pc_in_func,
  input  logic [ENTRIES-1:0] pc_in_cs,
  input  iter_t       pc_curr_iter [ENTRIES],
  input  iter_t       pc_min_iter  [ENTRIES],
  input  iter_t       pc_max_iter  [ENTRIES],
  output logic        pc_upd_flags_we,
  output logic [ENTRIES-1:0] pc_nxt_in_loop,
  output logic [ENTRIES-1:0] pc_nxt_in_func,
  output logic [ENTRIES-1:0] pc_nxt_in_cs,
  output logic        pc_upd_iter_we,
  output logic [$clog2(ENTRIES)-1:0] pc_upd_iter_idx,
  output iter_t       pc_upd_iter_val,
  // detection
  output logic        err_valid,
  output err_code_t   err_code,
  output logic [$clog2(ENTRIES)-1:0] err_index,
  output waddr_t      err_addr,
  // event statistics (one-cycle pulses)
  output logic        stat_loop_start,
  output logic        stat_loop_iter,
  output logic        stat_loop_end,
  output logic        stat_resume
);
  localparam int unsigned IW = $clog2(ENTRIES);

  logic act;
  logic [ENTRIES-1:0] l, f, c, clr, ended, bad_end;
  logic   max_hit;
  iter_t  nxt_iter;
  logic   c_err;
  err_code_t c_code;
  logic [IW-1:0] c_idx;
  logic   c_start, c_iter, c_resume;

  assign pc_q_addr   = fifo_head.addr;
  assign pc_q_offset = fifo_head.offset;
  assign act         = !fifo_empty;
  assign fifo_rd_en  = act;

  always_comb begin
    l = pc_in_loop;
    f = pc_in_func;
    c = pc_in_cs;
    clr      = '0;
    max_hit  = 1'b0;
    nxt_iter = '0;
    c_start  = 1'b0;
    c_iter   = 1'b0;
    c_resume = 1'b0;
    pc_upd_iter_we  = 1'b0;
    pc_upd_iter_idx = pc_found_index;

    // 1. context switch
    if (fifo_head.cs) begin
      c = l & ~pc_in_range;
      c_resume = |(l & pc_in_range);
    end

    // 2. returns and short backwards branches
    unique case (fifo_head.kind)
      EV_RET: begin
        clr = (f | c) & pc_in_range;
        f   = f & ~clr;
        c   = c & ~clr;
        c_resume = c_resume || (|clr);
      end
      EV_SBB: begin
        if (pc_found) begin
          pc_upd_iter_we = 1'b1;
          if (l[pc_found_index]) begin
            nxt_iter = (pc_curr_iter[pc_found_index] == '1) ? '1
                     : pc_curr_iter[pc_found_index] + 1'b1;
            max_hit  = nxt_iter > pc_max_iter[pc_found_index];
            c_iter   = 1'b1;
          end else begin
            nxt_iter = iter_t'(1);
            l[pc_found_index] = 1'b1;
            c_start  = 1'b1;
          end
        end
      end
      default: ;
    endcase
    pc_upd_iter_val = nxt_iter;

    // 3. loops that have been left
    ended   = l & ~f & ~c & ~pc_in_range;
    bad_end = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (ended[i] && (pc_curr_iter[i] < pc_min_iter[i] || pc_curr_iter[i] > pc_max_iter[i]))
        bad_end[i] = 1'b1;
    end
    l = l & ~ended;

    // 4. function call: mark the loops that are executing
    if (fifo_head.kind == EV_FUNC) f = f | (l & ~c);

    pc_nxt_in_loop  = l;
    pc_nxt_in_func  = f;
    pc_nxt_in_cs    = c;
    pc_upd_flags_we = act;
    pc_upd_iter_we  = act && pc_upd_iter_we;

    // error selection
    c_err  = max_hit || (|bad_end);
    c_code = ERR_NONE;
    c_idx  = '0;
    if (max_hit) begin
      c_code = ERR_MAX;
      c_idx  = pc_found_index;
    end else begin
      for (int i = ENTRIES - 1; i >= 0; i--) begin
        if (bad_end[i]) begin
          c_idx  = IW'(i);
          c_code = (pc_curr_iter[i] < pc_min_iter[i]) ? ERR_MIN : ERR_MAX;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err_valid       <= 1'b0;
      err_code        <= ERR_NONE;
      err_index       <= '0;
      err_addr        <= '0;
      stat_loop_start <= 1'b0;
      stat_loop_iter  <= 1'b0;
      stat_loop_end   <= 1'b0;
      stat_resume     <= 1'b0;
    end else begin
      err_valid       <= act && c_err;
      stat_loop_start <= act && c_start;
      stat_loop_iter  <= act && c_iter;
      stat_loop_end   <= act && (|ended);
      stat_resume     <= act && c_resume;
      if (act && c_err) begin
        err_code  <= c_code;
        err_index <= c_idx;
        err_addr  <= fifo_head.addr;
      end
    end
  end

endmodule
