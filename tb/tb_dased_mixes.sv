// tb_dased_mixes: detection rate and time to detection for task mixes of
// one to five tasks, the mix sizes of the single- and multitasked workloads
// the detector was evaluated on, at the default detector size.
//
// For each mix the detector is reset and reconfigured, a fault-free run must
// produce no error, and then one over-iteration or under-iteration fault is
// injected into each of four jobs per task (each into a different loop).
// Every fault must be reported with the right loop and kind. The time from
// the instruction at which the fault becomes visible (the branch that
// exceeds the maximum, or the last branch of a loop ending too early) to
// the report is measured in processor clocks; the testbench prints minimum,
// mean and maximum per mix, in nanoseconds for a 1 GHz processor with the
// detector at 250 MHz. Detection must come within 64 processor clocks of
// the event that reveals it to the detector; a too-early loop end is only
// revealed by the task's next event outside the loop, so under-iteration
// latency also includes the time to that event. The trace generator and
// processor model are those of tb_dased_top.
module tb_dased_mixes;
  import dased_pkg::*;

  localparam int MAXT = 5;          // largest mix
  localparam int NLOOP = 4;         // loops per task
  localparam int JOBS = 12;         // jobs per task and phase

  logic clk_cpu = 0, clk_dased = 0, rst_n = 0;
  always #5  clk_cpu   = ~clk_cpu;  // 10 time units = 1 ns at 1 GHz
  always #20 clk_dased = ~clk_dased;

  logic i_valid = 0, i_sbb = 0, i_func = 0, i_ret = 0;
  logic [31:0] i_addr = 0;
  logic cfg_task_we = 0, cfg_task_en = 0, cfg_code_we = 0, cfg_pc_we = 0;
  logic [2:0] cfg_task_idx = 0;
  logic [31:0] cfg_task_start = 0, cfg_task_end = 0, cfg_code_lo = 0, cfg_code_hi = 0;
  logic [4:0] cfg_pc_idx = 0;
  pc_static_t cfg_pc_data = '0;
  logic addr_err, fifo_overflow, loop_err;
  err_code_t loop_err_code;
  logic [4:0] loop_err_index;
  waddr_t loop_err_addr;
  logic [3:0] cur_task;
  logic [4:0] fifo_level;
  logic stat_loop_start, stat_loop_iter, stat_loop_end, stat_resume;

  dased_top dut (.*);

  typedef struct {
    logic [29:0] wa;
    bit sbb, func, ret;
    bit pre_ok;
    int mark;            // fault id made visible by this instruction, or -1
  } rec_t;

  rec_t tq [MAXT][$];
  bit   hold, after_br;
  int   nt;              // tasks in the current mix

  int l_tag [NLOOP] = '{'h20, 'h17, 'h104, 'h27};
  int l_off [NLOOP] = '{'h10, 3, 2, 3};
  int l_min [MAXT][NLOOP];
  int l_max [MAXT][NLOOP];

  // faults: slot, kind, time the fault became visible, time reported
  int  f_slot [$]; int f_kind [$]; longint f_t0 [$]; longint f_t1 [$];

  function automatic logic [29:0] base(int t);
    return 30'(32'h4000 * (t + 1));
  endfunction

  function automatic void emit(int t, int off, bit sbb = 0, bit func = 0, bit ret = 0,
                               int mark = -1);
    rec_t r;
    r.wa = base(t) + 30'(off); r.sbb = sbb; r.func = func; r.ret = ret; r.mark = mark;
    r.pre_ok = !hold && !after_br;
    tq[t].push_back(r);
    after_br = sbb || ret;
    if (sbb || func || ret) hold = 0;
  endfunction

  function automatic int iters(int t, int l, int fk);
    if (fk == 1) return l_max[t][l] + 1 + $urandom_range(0, 1);
    if (fk == 2) return l_min[t][l] - 1;
    return $urandom_range(l_min[t][l], l_max[t][l]);
  endfunction

  // Instruction offset at which an execution of n iterations reveals fault
  // kind fk: the (max+1)-th taken branch, or the final, not-taken branch.
  function automatic int mark_it(int t, int l, int n, int fk);
    if (fk == 1) return l_max[t][l];
    if (fk == 2) return n;
    return -1;
  endfunction

  function automatic void run_loop(int t, int l, int fk, int fid);
    int n = iters(t, l, fk);
    int mi = mark_it(t, l, n, fk);
    for (int it = 0; it <= n; it++)
      for (int a = l_tag[l] - l_off[l]; a <= l_tag[l]; a++)
        emit(t, a, (a == l_tag[l]) && (it < n), 0, 0,
             (a == l_tag[l] && it == mi) ? fid : -1);
    hold = 1;
  endfunction

  function automatic void func_f(int t, int fk, int fid);
    emit(t, 'h100); emit(t, 'h101);
    run_loop(t, 2, fk, fid);
    emit(t, 'h105); emit(t, 'h106, 0, 0, 1);
  endfunction

  function automatic void func_g(int t);
    for (int a = 'h200; a < 'h204; a++) emit(t, a);
    emit(t, 'h204, 0, 0, 1);
  endfunction

  // one job of task t with an optional fault (kind fk) in loop fl
  function automatic void job(int t, int fl, int fk, int fid);
    int n0, mi;
    for (int a = 0; a < 4; a++) emit(t, a);
    n0 = iters(t, 0, (fl == 0) ? fk : 0);
    mi = (fl == 0) ? mark_it(t, 0, n0, fk) : -1;
    for (int it = 0; it <= n0; it++) begin
      for (int a = 'h10; a < 'h14; a++) emit(t, a);
      run_loop(t, 1, (fl == 1 && it == 0) ? fk : 0, fid);
      emit(t, 'h18); emit(t, 'h19, 0, 1);
      func_f(t, (fl == 2 && it == 0) ? fk : 0, fid);
      for (int a = 'h1A; a < 'h20; a++) emit(t, a);
      emit(t, 'h20, it < n0, 0, 0, (it == mi) ? fid : -1);
    end
    hold = 1;
    emit(t, 'h21); emit(t, 'h22, 0, 1);
    func_g(t);
    emit(t, 'h23);
    run_loop(t, 3, (fl == 3) ? fk : 0, fid);
    emit(t, 'h28); emit(t, 'h29, 0, 1);
    func_g(t);
    for (int a = 'h2A; a < 'h2C; a++) emit(t, a);
  endfunction

  int checks = 0, failures = 0;
  bit expect_no_err = 1;
  int n_false = 0;

  task automatic fail(string s);
    failures++;
    if (failures < 15) $display("FAIL: %s", s);
  endtask

  always @(posedge clk_dased) if (rst_n && loop_err) begin
    bit matched = 0;
    if (expect_no_err) begin
      n_false++;
      fail($sformatf("false error %s on loop %0d", loop_err_code.name(), loop_err_index));
    end else begin
      for (int k = 0; k < f_slot.size(); k++)
        if (f_slot[k] == int'(loop_err_index) && f_kind[k] == int'(loop_err_code)) begin
          matched = 1;
          if (f_t1[k] < 0) f_t1[k] = $time;
        end
      if (!matched) begin
        n_false++;
        fail($sformatf("unexpected error %s on loop %0d", loop_err_code.name(), loop_err_index));
      end
    end
  end

  task automatic exec(logic [31:0] a, bit sbb, bit func, bit ret, int mark = -1);
    while ($urandom_range(0, 9) == 0) begin
      i_valid = 0;
      @(posedge clk_cpu); #1;
    end
    i_valid = 1; i_addr = a; i_sbb = sbb; i_func = func; i_ret = ret;
    if (mark >= 0) f_t0[mark] = $time;
    @(posedge clk_cpu); #1;
    i_valid = 0; i_sbb = 0; i_func = 0; i_ret = 0;
  endtask

  task automatic os_switch();
    for (int k = 0; k < 12; k++) exec(32'h0000_1000 + 32'(4 * k), 0, k == 5, 0);
  endtask

  task automatic run_tasks();
    int t = 0;
    while (1) begin
      int q, left = 0;
      for (int k = 0; k < nt; k++) left += tq[k].size();
      if (left == 0) break;
      while (tq[t].size() == 0) t = (t + 1) % nt;
      if (nt > 1) os_switch();
      q = $urandom_range(20, 300);
      while (tq[t].size() > 0) begin
        rec_t r = tq[t][0];
        if (q <= 0 && r.pre_ok && nt > 1) break;
        void'(tq[t].pop_front());
        exec({r.wa, 2'b00}, r.sbb, r.func, r.ret, r.mark);
        q--;
      end
      t = (t + 1) % nt;
    end
    os_switch();
    repeat (40) @(posedge clk_dased);
    #1;
  endtask

  initial begin
    repeat (5000000) @(posedge clk_cpu);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (nt = 1; nt <= MAXT; nt++) begin
      int n_det;
      longint lat_min, lat_max, lat_sum, lat_min_max, lat_max_max;
      n_det = 0; lat_min = -1; lat_max = 0; lat_sum = 0; lat_min_max = -1; lat_max_max = 0;
      // profiled bounds
      for (int t = 0; t < nt; t++)
        for (int l = 0; l < NLOOP; l++) begin
          l_min[t][l] = $urandom_range(2, 3);
          l_max[t][l] = l_min[t][l] + $urandom_range(2, 6);
        end
      f_slot.delete(); f_kind.delete(); f_t0.delete(); f_t1.delete();
      expect_no_err = 1;

      // reset and configure
      rst_n = 0;
      repeat (3) @(posedge clk_dased);
      rst_n = 1;
      repeat (4) @(posedge clk_dased);
      @(posedge clk_cpu); #1;
      for (int t = 0; t < 8; t++) begin
        cfg_task_we = 1; cfg_task_idx = 3'(t); cfg_task_en = (t < nt);
        cfg_task_start = {base(t), 2'b00}; cfg_task_end = {base(t), 2'b00} + 32'hFFFC;
        @(posedge clk_cpu); #1;
      end
      cfg_task_we = 0;
      cfg_code_we = 1; cfg_code_lo = 32'h0000_1000; cfg_code_hi = 32'h0006_FFFC;
      @(posedge clk_cpu); #1;
      cfg_code_we = 0;
      @(posedge clk_dased); #1;
      for (int t = 0; t < nt; t++)
        for (int l = 0; l < NLOOP; l++) begin
          cfg_pc_we = 1; cfg_pc_idx = 5'(NLOOP * t + l);
          cfg_pc_data = '{valid: 1'b1, tag: base(t) + 30'(l_tag[l]), offset: 8'(l_off[l]),
                          min_iter: 14'(l_min[t][l]), max_iter: 14'(l_max[t][l])};
          @(posedge clk_dased); #1;
        end
      cfg_pc_we = 0;

      // fault-free run
      hold = 0; after_br = 0;
      for (int t = 0; t < nt; t++) for (int j = 0; j < JOBS; j++) job(t, -1, 0, -1);
      run_tasks();
      checks++;
      if (n_false != 0) fail($sformatf("mix of %0d: false errors in the clean run", nt));

      // faulty run
      expect_no_err = 0;
      for (int t = 0; t < nt; t++)
        for (int j = 0; j < JOBS; j++) begin
          if (j % 3 == 1) begin
            automatic int fl = (j / 3 + t) % NLOOP;
            automatic int fk = ((j / 3 + t) % 2) + 1;
            automatic int fid = f_slot.size();
            f_slot.push_back(NLOOP * t + fl);
            f_kind.push_back(fk == 1 ? int'(ERR_MAX) : int'(ERR_MIN));
            f_t0.push_back(-1); f_t1.push_back(-1);
            job(t, fl, fk, fid);
          end else job(t, -1, 0, -1);
        end
      run_tasks();

      for (int k = 0; k < f_slot.size(); k++) begin
        longint lat;
        checks++;
        if (f_t0[k] < 0 || f_t1[k] < 0) begin
          fail($sformatf("mix of %0d: fault on loop %0d (kind %0d) not detected", nt,
                         f_slot[k], f_kind[k]));
          continue;
        end
        n_det++;
        lat = (f_t1[k] - f_t0[k]) / 10;                 // processor clocks = ns at 1 GHz
        if (lat_min < 0 || lat < lat_min) lat_min = lat;
        if (lat > lat_max) lat_max = lat;
        lat_sum += lat;
        if (f_kind[k] == int'(ERR_MAX)) begin
          checks++;
          if (lat > 64 || lat < 0) fail($sformatf("max-iteration fault reported after %0d clocks", lat));
          if (lat_min_max < 0 || lat < lat_min_max) lat_min_max = lat;
          if (lat > lat_max_max) lat_max_max = lat;
        end
      end
      $display("mix of %0d task(s): %0d of %0d injected control errors detected (%0d%%), false %0d;",
               nt, n_det, f_slot.size(), 100 * n_det / f_slot.size(), n_false);
      $display("    time to detection min %0d ns, mean %0d ns, max %0d ns (over-iteration: %0d..%0d ns)",
               lat_min, (n_det > 0) ? lat_sum / n_det : 0, lat_max, lat_min_max, lat_max_max);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
