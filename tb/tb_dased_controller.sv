// tb_dased_controller: self-checking test of the controller together with
// the profile cache it updates.
//
// Eight loops (some nested, with small iteration bounds so that violations
// are frequent) are programmed into the cache. The testbench then presents
// one random event per clock on the FIFO-side ports: short backwards
// branches of profiled and unprofiled loops, calls, returns and context
// switches at addresses inside and outside the loops. A sequential
// reference model of the detection algorithm, written independently in the
// testbench (calls mark executing loops after the exit check and leave
// suspended loops alone), predicts every loop's InLoop/InFunc/InCS flags and iteration
// count and each error report, which must appear exactly one clock after
// its event (one event per clock is the design's throughput).
module tb_dased_controller;
  import dased_pkg::*;

  localparam int unsigned N = 32;
  localparam int unsigned NL = 8;
  localparam int unsigned IW = $clog2(N);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic fifo_empty, fifo_rd_en;
  fifo_entry_t fifo_head;
  waddr_t q_addr; offset_t q_offset;
  logic found; logic [IW-1:0] found_index;
  logic [N-1:0] in_range, in_loop, in_func, in_cs, nxt_in_loop, nxt_in_func, nxt_in_cs;
  iter_t curr_iter [N], min_iter [N], max_iter [N];
  logic upd_flags_we, upd_iter_we; logic [IW-1:0] upd_iter_idx; iter_t upd_iter_val;
  logic cfg_we; logic [IW-1:0] cfg_idx; pc_static_t cfg_data;
  logic err_valid; err_code_t err_code; logic [IW-1:0] err_index; waddr_t err_addr;
  logic s_start, s_iter, s_end, s_resume;

  dased_profile_cache u_cache (
    .clk, .rst_n, .cfg_we, .cfg_idx, .cfg_data, .q_addr, .q_offset, .found, .found_index,
    .in_range, .in_loop, .in_func, .in_cs, .curr_iter, .min_iter, .max_iter,
    .upd_flags_we, .nxt_in_loop, .nxt_in_func, .nxt_in_cs,
    .upd_iter_we, .upd_iter_idx, .upd_iter_val);

  dased_controller dut (
    .clk, .rst_n, .fifo_empty, .fifo_head, .fifo_rd_en,
    .pc_q_addr(q_addr), .pc_q_offset(q_offset), .pc_found(found), .pc_found_index(found_index),
    .pc_in_range(in_range), .pc_in_loop(in_loop), .pc_in_func(in_func), .pc_in_cs(in_cs),
    .pc_curr_iter(curr_iter), .pc_min_iter(min_iter), .pc_max_iter(max_iter),
    .pc_upd_flags_we(upd_flags_we), .pc_nxt_in_loop(nxt_in_loop), .pc_nxt_in_func(nxt_in_func),
    .pc_nxt_in_cs(nxt_in_cs), .pc_upd_iter_we(upd_iter_we), .pc_upd_iter_idx(upd_iter_idx),
    .pc_upd_iter_val(upd_iter_val), .err_valid, .err_code, .err_index, .err_addr,
    .stat_loop_start(s_start), .stat_loop_iter(s_iter), .stat_loop_end(s_end),
    .stat_resume(s_resume));

  // loop table: tag (word address), offset (instructions), min, max, cache slot
  int m_tag [NL] = '{'h100, 'hF8, 'hF0, 'h200, 'h1F4, 'h300, 'h2F0, 'h400};
  int m_off [NL] = '{20, 5, 2, 10, 3, 40, 6, 255};
  int m_min [NL] = '{1, 2, 1, 3, 1, 2, 1, 1};
  int m_max [NL] = '{3, 5, 2, 6, 4, 4, 3, 16383};
  int m_slot[NL] = '{0, 3, 5, 7, 12, 20, 30, 31};

  // reference state, indexed by cache slot
  bit r_valid [N]; int r_tag [N]; int r_off [N]; int r_min [N]; int r_max [N];
  int r_curr [N]; bit r_l [N]; bit r_f [N]; bit r_c [N];

  int checks = 0, failures = 0;
  int n_err_max = 0, n_err_min = 0, n_start = 0, n_iter = 0, n_end = 0, n_resume = 0;

  function automatic bit inb(int a, int i);
    return r_valid[i] && a <= r_tag[i] && a >= r_tag[i] - r_off[i];
  endfunction

  // Reference: apply one event; returns expected error (code, index).
  function automatic void ref_event(fifo_entry_t e, output bit ev_err, output err_code_t ev_code,
                                    output int ev_idx);
    int a = int'(e.addr);
    bit fnd = 0; int fi = 0; bit maxhit = 0;
    bit ended [N];
    ev_err = 0; ev_code = ERR_NONE; ev_idx = 0;
    if (e.cs) begin
      for (int i = 0; i < N; i++) r_c[i] = r_l[i];
      for (int i = 0; i < N; i++) if (r_l[i] && inb(a, i)) r_c[i] = 0;
    end
    if (e.kind == EV_RET) begin
      for (int i = 0; i < N; i++)
        if ((r_f[i] || r_c[i]) && inb(a, i)) begin r_f[i] = 0; r_c[i] = 0; end
    end else if (e.kind == EV_SBB) begin
      for (int i = N - 1; i >= 0; i--)
        if (r_valid[i] && r_tag[i] == a && r_off[i] == int'(e.offset)) begin fnd = 1; fi = i; end
      if (fnd) begin
        if (r_l[fi]) begin
          if (r_curr[fi] < 16383) r_curr[fi]++;
          if (r_curr[fi] > r_max[fi]) maxhit = 1;
        end else begin
          r_curr[fi] = 1; r_l[fi] = 1;
        end
      end
    end
    if (e.kind != EV_NONE || e.cs) begin
      for (int i = 0; i < N; i++) begin
        ended[i] = r_l[i] && !r_f[i] && !r_c[i] && !inb(a, i);
      end
      for (int i = N - 1; i >= 0; i--) begin
        if (ended[i]) begin
          r_l[i] = 0;
          if (!maxhit && (r_curr[i] < r_min[i] || r_curr[i] > r_max[i])) begin
            ev_err = 1; ev_idx = i;
            ev_code = (r_curr[i] < r_min[i]) ? ERR_MIN : ERR_MAX;
          end
        end
      end
    end
    if (e.kind == EV_FUNC)
      for (int i = 0; i < N; i++) if (r_l[i] && !r_c[i]) r_f[i] = 1;
    if (maxhit) begin ev_err = 1; ev_code = ERR_MAX; ev_idx = fi; end
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fifo_empty = 1; fifo_head = '0; cfg_we = 0; cfg_idx = '0; cfg_data = '0;
    for (int i = 0; i < N; i++) begin
      r_valid[i] = 0; r_tag[i] = 0; r_off[i] = 0; r_min[i] = 0; r_max[i] = 0;
      r_curr[i] = 0; r_l[i] = 0; r_f[i] = 0; r_c[i] = 0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < NL; k++) begin
      automatic int s = m_slot[k];
      @(posedge clk); #1;
      cfg_we = 1; cfg_idx = IW'(s);
      cfg_data = '{valid: 1'b1, tag: waddr_t'(m_tag[k]), offset: offset_t'(m_off[k]),
                   min_iter: iter_t'(m_min[k]), max_iter: iter_t'(m_max[k])};
      r_valid[s] = 1; r_tag[s] = m_tag[k]; r_off[s] = m_off[k];
      r_min[s] = m_min[k]; r_max[s] = m_max[k];
    end
    @(posedge clk); #1;
    cfg_we = 0;

    for (int n = 0; n < 20000; n++) begin
      fifo_entry_t e;
      bit x_err; err_code_t x_code; int x_idx;
      int k, r;
      bit idle;
      k = $urandom_range(0, NL - 1);
      r = $urandom_range(0, 99);
      e = '0;
      idle = ($urandom_range(0, 9) == 0);
      if (r < 55) begin          // short backwards branch of a profiled loop
        e.kind = EV_SBB; e.addr = waddr_t'(m_tag[k]); e.offset = offset_t'(m_off[k]);
      end else if (r < 60) begin // unprofiled loop, or a profiled tag with another size
        e.kind = EV_SBB; e.addr = waddr_t'(m_tag[k]); e.offset = offset_t'(m_off[k] + 1);
      end else if (r < 72) begin // call from inside a loop
        e.kind = EV_FUNC; e.addr = waddr_t'(m_tag[k] - $urandom_range(0, m_off[k]));
      end else if (r < 84) begin // return to inside a loop, or elsewhere
        e.kind = EV_RET;
        e.addr = ($urandom_range(0, 3) == 0) ? waddr_t'($urandom_range(0, 'h500))
                                            : waddr_t'(m_tag[k] - $urandom_range(0, m_off[k]));
      end else begin             // context switch, alone or with a branch
        e.cs = 1;
        e.addr = ($urandom_range(0, 2) == 0) ? waddr_t'($urandom_range(0, 'h500))
                                            : waddr_t'(m_tag[k] - $urandom_range(0, m_off[k]));
        if ($urandom_range(0, 3) == 0) e.kind = EV_FUNC;
      end
      fifo_empty = idle;
      fifo_head  = e;
      if (!idle) ref_event(e, x_err, x_code, x_idx);
      else begin x_err = 0; x_code = ERR_NONE; x_idx = 0; end
      @(posedge clk); #1;
      // one-clock latency: the report and the new state are visible now
      checks++;
      if (fifo_rd_en !== !idle) begin failures++; $display("rd_en wrong at %0d", n); end
      checks++;
      if (err_valid !== x_err || (x_err && (err_code !== x_code || int'(err_index) != x_idx ||
                                            err_addr !== e.addr))) begin
        failures++;
        if (failures < 10)
          $display("n=%0d event %p: err %b/%b code %s/%s idx %0d/%0d", n, e, err_valid, x_err,
                   err_code.name(), x_code.name(), err_index, x_idx);
      end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (in_loop[i] !== r_l[i] || in_func[i] !== r_f[i] || in_cs[i] !== r_c[i] ||
            (r_l[i] && int'(curr_iter[i]) != r_curr[i])) begin
          failures++;
          if (failures < 10)
            $display("n=%0d slot %0d: L %b/%b F %b/%b C %b/%b iter %0d/%0d", n, i, in_loop[i],
                     r_l[i], in_func[i], r_f[i], in_cs[i], r_c[i], curr_iter[i], r_curr[i]);
        end
      end
      if (err_valid && err_code == ERR_MAX) n_err_max++;
      if (err_valid && err_code == ERR_MIN) n_err_min++;
      n_start += int'(s_start); n_iter += int'(s_iter); n_end += int'(s_end);
      n_resume += int'(s_resume);
    end
    checks++;
    if (n_err_max == 0 || n_err_min == 0 || n_start == 0 || n_iter == 0 || n_end == 0 ||
        n_resume == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("max errors %0d, min errors %0d, loop starts %0d, iterations %0d, ends %0d, resumes %0d",
             n_err_max, n_err_min, n_start, n_iter, n_end, n_resume);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
