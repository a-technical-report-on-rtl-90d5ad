// dased_profile_cache: register-based table of profiled loops.
//
// Each entry holds the loop's Tag (word address of its short backwards
// branch, 30 bits), Offset (loop size in instructions, 8 bits), the
// statically profiled MinIter and MaxIter (14 bits each), the dynamic
// CurrIter count (14 bits) and the InLoop, InFunc and InCS flags. A loop is
// identified by Tag and Offset together. Field widths and the 32-entry
// default follow the detector's published organisation; the entry valid
// bit, the configuration port and the lowest-index priority on multiple
// hits are this implementation's choices.
//
// Combinational outputs for the entry at the FIFO head:
//   found/found_index : q_addr/q_offset match a valid entry's Tag/Offset
//   in_range[i]       : q_addr lies in loop i's body [Tag-Offset, Tag]
// All flags and counters are exposed in parallel so the controller can
// update every loop in one cycle. Updates take effect on the next clk:
// upd_flags_we loads all three flag vectors; upd_iter_we writes one
// CurrIter. Writing an entry through cfg_* clears its dynamic state.
module dased_profile_cache
  import dased_pkg::*;
#(
  parameter int unsigned ENTRIES = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  // static profile programming
  input  logic        cfg_we,
  input  logic [$clog2(ENTRIES)-1:0] cfg_idx,
  input  pc_static_t  cfg_data,
  // lookup
  input  waddr_t      q_addr,
  input  offset_t     q_offset,
  output logic        found,
  output logic [$clog2(ENTRIES)-1:0] found_index,
  output logic [ENTRIES-1:0] in_range,
  // contents
  output logic [ENTRIES-1:0] in_loop,
  output logic [ENTRIES-1:0] in_func,
  output logic [ENTRIES-1:0] in_cs,
  output iter_t       curr_iter [ENTRIES],
  output iter_t       min_iter  [ENTRIES],
  output iter_t       max_iter  [ENTRIES],
  // updates from the controller
  input  logic        upd_flags_we,
  input  logic [ENTRIES-1:0] nxt_in_loop,
  input  logic [ENTRIES-1:0] nxt_in_func,
  input  logic [ENTRIES-1:0] nxt_in_cs,
  input  logic        upd_iter_we,
  input  logic [$clog2(ENTRIES)-1:0] upd_iter_idx,
  input  iter_t       upd_iter_val
);
  localparam int unsigned IW = $clog2(ENTRIES);

  pc_static_t st [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_loop <= '0;
      in_func <= '0;
      in_cs   <= '0;
      for (int i = 0; i < ENTRIES; i++) begin
        st[i]        <= '0;
        curr_iter[i] <= '0;
      end
    end else begin
      if (upd_flags_we) begin
        in_loop <= nxt_in_loop;
        in_func <= nxt_in_func;
        in_cs   <= nxt_in_cs;
      end
      if (upd_iter_we) curr_iter[upd_iter_idx] <= upd_iter_val;
      if (cfg_we) begin
        st[cfg_idx]        <= cfg_data;
        curr_iter[cfg_idx] <= '0;
        in_loop[cfg_idx]   <= 1'b0;
        in_func[cfg_idx]   <= 1'b0;
        in_cs[cfg_idx]     <= 1'b0;
      end
    end
  end

  always_comb begin
    found       = 1'b0;
    found_index = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      min_iter[i] = st[i].min_iter;
      max_iter[i] = st[i].max_iter;
      in_range[i] = st[i].valid && in_loop_bounds(q_addr, st[i].tag, st[i].offset);
      if (st[i].valid && st[i].tag == q_addr && st[i].offset == q_offset) begin
        found       = 1'b1;
        found_index = IW'(i);
      end
    end
  end

endmodule
