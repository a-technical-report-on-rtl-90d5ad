// dased_pkg: types and constants shared by the soft error detector blocks.
//
// The detector watches a 32-bit processor with byte addressing and 4-byte
// instructions, so every instruction address is kept as a 30-bit word
// address (iAddr[31:2]). The widths of the profile cache fields (30-bit tag,
// 8-bit loop offset in instructions, 14-bit iteration counts) follow the
// detector's published organisation. The event encoding, the FIFO entry
// layout and the error codes are choices of this implementation.
package dased_pkg;

  localparam int unsigned ADDR_W = 32;  // processor instruction address
  localparam int unsigned TAG_W  = 30;  // word address, iAddr[31:2]
  localparam int unsigned OFF_W  = 8;   // loop size in instructions
  localparam int unsigned ITER_W = 14;  // iteration counters

  typedef logic [TAG_W-1:0]  waddr_t;
  typedef logic [OFF_W-1:0]  offset_t;
  typedef logic [ITER_W-1:0] iter_t;

  // Kind of branch event carried by a FIFO entry. A context switch is a
  // separate flag because it may be detected on the same instruction as a
  // branch event.
  typedef enum logic [1:0] {
    EV_NONE = 2'd0,
    EV_SBB  = 2'd1,   // short backwards branch: addr = branch (tag), offset = loop size
    EV_FUNC = 2'd2,   // function call: addr = call site
    EV_RET  = 2'd3    // function return: addr = return destination
  } ev_kind_t;

  typedef struct packed {
    ev_kind_t kind;
    logic     cs;      // context switch; addr = first instruction of the new context
    waddr_t   addr;
    offset_t  offset;
  } fifo_entry_t;

  // Statically profiled part of a profile cache entry (written by software).
  typedef struct packed {
    logic   valid;
    waddr_t tag;
    offset_t offset;
    iter_t  min_iter;
    iter_t  max_iter;
  } pc_static_t;

  typedef enum logic [1:0] {
    ERR_NONE = 2'd0,
    ERR_ADDR = 2'd1,   // misaligned or out-of-range instruction address
    ERR_MAX  = 2'd2,   // loop iterated more than its maximum
    ERR_MIN  = 2'd3    // loop execution ended with fewer than its minimum
  } err_code_t;

  // True when word address a lies in the loop body [tag - offset, tag].
  // Written as a + offset >= tag to avoid wrap-around below address 0.
  function automatic logic in_loop_bounds(waddr_t a, waddr_t tag, offset_t off);
    logic [TAG_W:0] lo_sum;
    lo_sum = {1'b0, a} + {{(TAG_W+1-OFF_W){1'b0}}, off};
    return (a <= tag) && (lo_sum >= {1'b0, tag});
  endfunction

endpackage
