// dased_async_fifo: dual-clock FIFO with Gray-coded pointers.
//
// The write side runs on the processor clock and the read side on the
// slower detector clock. Binary pointers carry one extra wrap bit; their Gray
// codes cross the clock boundary through two-flop synchronizers. Full and
// empty are therefore pessimistic by the synchronizer delay, never wrong.
// A write while full is dropped and reported on wr_overflow (one wclk pulse).
//
// Interface: wr_en/wr_data on wclk; rd_data shows the head entry whenever
// rd_empty is low and rd_en pops it on rclk. wr_level is the write side's
// view of the occupancy. DEPTH must be a power of two.
module dased_async_fifo #(
  parameter int unsigned DEPTH = 16,
  parameter type         T     = logic [7:0]
) (
  input  logic wclk,
  input  logic wrst_n,
  input  logic wr_en,
  input  T     wr_data,
  output logic wr_full,
  output logic wr_overflow,
  output logic [$clog2(DEPTH):0] wr_level,

  input  logic rclk,
  input  logic rrst_n,
  input  logic rd_en,
  output T     rd_data,
  output logic rd_empty
);
  localparam int unsigned AW = $clog2(DEPTH);
  typedef logic [AW:0] ptr_t;

  function automatic ptr_t bin2gray(ptr_t b);
    return b ^ (b >> 1);
  endfunction

  function automatic ptr_t gray2bin(ptr_t g);
    ptr_t b;
    b[AW] = g[AW];
    for (int i = AW - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  T mem [DEPTH];

  ptr_t wptr, wptr_gray, rptr, rptr_gray;
  ptr_t rptr_gray_w, wptr_gray_r;   // synchronized copies

  // ---------------- write side ----------------
  wire ptr_t rptr_w = gray2bin(rptr_gray_w);
  assign wr_full  = (wptr[AW] != rptr_w[AW]) && (wptr[AW-1:0] == rptr_w[AW-1:0]);
  assign wr_level = wptr - rptr_w;

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wptr        <= '0;
      wptr_gray   <= '0;
      wr_overflow <= 1'b0;
    end else begin
      wr_overflow <= wr_en && wr_full;
      if (wr_en && !wr_full) begin
        wptr      <= wptr + 1'b1;
        wptr_gray <= bin2gray(wptr + 1'b1);
      end
    end
  end

  always_ff @(posedge wclk) begin
    if (wr_en && !wr_full) mem[wptr[AW-1:0]] <= wr_data;
  end

  dased_sync #(.WIDTH(AW + 1)) u_sync_r2w (
    .clk(wclk), .rst_n(wrst_n), .d(rptr_gray), .q(rptr_gray_w)
  );

  // ---------------- read side ----------------
  assign rd_empty = (rptr_gray == wptr_gray_r);
  assign rd_data  = mem[rptr[AW-1:0]];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rptr      <= '0;
      rptr_gray <= '0;
    end else if (rd_en && !rd_empty) begin
      rptr      <= rptr + 1'b1;
      rptr_gray <= bin2gray(rptr + 1'b1);
    end
  end

  dased_sync #(.WIDTH(AW + 1)) u_sync_w2r (
    .clk(rclk), .rst_n(rrst_n), .d(wptr_gray), .q(wptr_gray_r)
  );

  initial begin
    assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
      else $error("DEPTH must be a power of two");
  end

endmodule
