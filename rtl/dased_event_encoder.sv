// dased_event_encoder: turns the filtered instruction trace into FIFO entries.
//
// Each executed instruction carrying a profile event (sbb, func, ret or cs)
// produces one entry, written when the next valid instruction arrives,
// because two of the events need that next address: for a short backwards
// branch the next instruction is the branch target, giving the loop size
// Offset = (branch - target) in instructions, and for a return it is the
// return destination. The entry holds:
//   sbb : addr = branch address (the loop Tag), offset = loop size
//   func: addr = address of the call instruction
//   ret : addr = return destination
//   cs  : addr = first instruction of the new context (flag, may combine
//         with a branch kind on the same instruction)
// The detector stores exactly these items; deferring every event by one
// instruction, so that at most one entry is written per clock, is this
// implementation's choice. An event therefore enters the FIFO one executed
// instruction late.
module dased_event_encoder
  import dased_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              t_valid,
  input  logic [ADDR_W-1:0] t_addr,
  input  logic              t_sbb,
  input  logic              t_func,
  input  logic              t_ret,
  input  logic              t_cs,
  output logic              push,
  output fifo_entry_t       entry
);
  logic     p_valid;
  ev_kind_t p_kind;
  logic     p_cs;
  waddr_t   p_addr;

  wire waddr_t cur = t_addr[ADDR_W-1:2];

  always_comb begin
    push         = t_valid && p_valid;
    entry.kind   = p_kind;
    entry.cs     = p_cs;
    entry.addr   = (p_kind == EV_RET) ? cur : p_addr;
    entry.offset = (p_kind == EV_SBB) ? offset_t'(p_addr - cur) : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_valid <= 1'b0;
      p_kind  <= EV_NONE;
      p_cs    <= 1'b0;
      p_addr  <= '0;
    end else if (t_valid) begin
      p_valid <= t_sbb || t_func || t_ret || t_cs;
      p_kind  <= t_func ? EV_FUNC : t_ret ? EV_RET : t_sbb ? EV_SBB : EV_NONE;
      p_cs    <= t_cs;
      p_addr  <= cur;
    end
  end
endmodule
