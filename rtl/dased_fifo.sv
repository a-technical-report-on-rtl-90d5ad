// dased_fifo: the detector's event FIFO.
//
// It watches the filtered sbb/func/ret/cs stream from the task filter,
// encodes each event with the address of interest and, for short backwards
// branches, the loop offset (dased_event_encoder), and queues the entries in
// a dual-clock FIFO (dased_async_fifo). The queue lets the controller and
// profile cache run at a fraction (nominally a quarter) of the processor
// clock while absorbing bursts of loop activity.
//
// Interface: the write side (t_*, overflow, level) is on clk_cpu; the read
// side (rd_en, empty, head) on clk_dased. head is valid while empty is low;
// rd_en pops it. overflow pulses when an entry had to be dropped because the
// queue was full. The depth (16) and the drop-on-full policy are this
// implementation's choices; the original design only asks for a small FIFO.
module dased_fifo
  import dased_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic              clk_cpu,
  input  logic              rst_cpu_n,
  input  logic              t_valid,
  input  logic [ADDR_W-1:0] t_addr,
  input  logic              t_sbb,
  input  logic              t_func,
  input  logic              t_ret,
  input  logic              t_cs,
  output logic              overflow,
  output logic [$clog2(DEPTH):0] level,

  input  logic              clk_dased,
  input  logic              rst_dased_n,
  input  logic              rd_en,
  output logic              empty,
  output fifo_entry_t       head
);
  logic        push;
  fifo_entry_t entry;
  logic        full;

  dased_event_encoder u_enc (
    .clk(clk_cpu), .rst_n(rst_cpu_n),
    .t_valid, .t_addr, .t_sbb, .t_func, .t_ret, .t_cs,
    .push, .entry
  );

  dased_async_fifo #(.DEPTH(DEPTH), .T(fifo_entry_t)) u_q (
    .wclk(clk_cpu), .wrst_n(rst_cpu_n),
    .wr_en(push), .wr_data(entry), .wr_full(full), .wr_overflow(overflow), .wr_level(level),
    .rclk(clk_dased), .rrst_n(rst_dased_n),
    .rd_en, .rd_data(head), .rd_empty(empty)
  );
endmodule
