// tb_dased_top: end-to-end test of the soft error detector at its default
// size (8 task regions, 16-entry FIFO, 32-entry profile cache).
//
// A behavioural processor model replays a multitasking trace: five tasks
// (like the largest five-task mix of the evaluation) each repeat a job made
// of an outer loop with a nested inner loop and a call to a function that
// has its own loop, a call to a loop-free function and a second loop. An
// operating-system scheduler in unmonitored code preempts the tasks after
// random quanta. The processor runs at 4x the detector clock and stalls on
// random cycles. The expected behaviour is known from the trace itself:
//   phase 1  every loop runs within its profiled bounds: no error may be
//            reported (no false positives across calls and context switches);
//   phase 2  single faults are injected (a loop iterating more than its
//            maximum or fewer than its minimum); each must be reported with
//            its loop index and error kind, and nothing else may be reported;
//   phase 3  misaligned and out-of-range instruction addresses must raise
//            addr_err exactly one cycle after they are presented;
//   phase 4  a one-instruction loop outruns the detector clock and must
//            overflow the FIFO.
// Each mechanism (loop start, iteration, end, resume, context switch,
// filtered events, FIFO backlog, both loop errors, address error, overflow)
// is counted and must have happened.
//
// Preemption is only placed where the detector can observe it correctly:
// not right after a taken short backwards branch or a return (the next
// executed address must be the branch target or return destination), and
// not between a loop's exit and the task's next profile event.
module tb_dased_top;
  import dased_pkg::*;

  localparam int NT = 5;            // tasks
  localparam int NLOOP = 4;         // loops per task
  localparam int JOBS = 12;         // jobs per task and phase

  logic clk_cpu = 0, clk_dased = 0, rst_n = 0;
  always #5  clk_cpu   = ~clk_cpu;
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

  // ---------------------------------------------------------------- trace
  typedef struct {
    logic [29:0] wa;     // word address
    bit sbb, func, ret;
    bit pre_ok;          // the scheduler may switch away before this one
  } rec_t;

  rec_t tq [NT][$];      // per-task instruction queues
  bit   hold;            // between a loop exit and the next profile event
  bit   after_br;        // previous record was a taken sbb or a return

  // loop geometry relative to the task base (word addresses)
  // loop 0: outer  [0x10, 0x20]   loop 1: inner  [0x14, 0x17]
  // loop 2: in F   [0x102,0x104]  loop 3: second [0x24, 0x27]
  int l_tag [NLOOP] = '{'h20, 'h17, 'h104, 'h27};
  int l_off [NLOOP] = '{'h10, 3, 2, 3};
  int l_min [NT][NLOOP];
  int l_max [NT][NLOOP];

  function automatic logic [29:0] base(int t);
    return 30'(32'h4000 * (t + 1));
  endfunction

  function automatic void emit(int t, int off, bit sbb = 0, bit func = 0, bit ret = 0);
    rec_t r;
    r.wa = base(t) + 30'(off); r.sbb = sbb; r.func = func; r.ret = ret;
    r.pre_ok = !hold && !after_br;
    tq[t].push_back(r);
    after_br = sbb || ret;
    if (sbb || func || ret) hold = 0;
  endfunction

  // iterations (taken backward branches) of one loop execution
  function automatic int iters(int t, int l, int fault_l, int fault_kind);
    if (l == fault_l && fault_kind == 1) return l_max[t][l] + 1 + $urandom_range(0, 1);
    if (l == fault_l && fault_kind == 2) return l_min[t][l] - 1;
    return $urandom_range(l_min[t][l], l_max[t][l]);
  endfunction

  // A short loop whose body spans [tag-off, tag]; the body runs n+1 times.
  function automatic void run_loop(int t, int l, int n);
    for (int it = 0; it <= n; it++)
      for (int a = l_tag[l] - l_off[l]; a <= l_tag[l]; a++)
        emit(t, a, (a == l_tag[l]) && (it < n));
    hold = 1;           // the loop has been left
  endfunction

  function automatic void func_f(int t, int fl, int fk);
    emit(t, 'h100); emit(t, 'h101);
    run_loop(t, 2, iters(t, 2, fl, fk));
    emit(t, 'h105); emit(t, 'h106, 0, 0, 1);
  endfunction

  function automatic void func_g(int t);
    for (int a = 'h200; a < 'h204; a++) emit(t, a);
    emit(t, 'h204, 0, 0, 1);
  endfunction

  // one job of task t; fault_l/fault_kind inject a fault into one loop execution
  function automatic void job(int t, int fl, int fk);
    int n0;
    for (int a = 0; a < 4; a++) emit(t, a);
    n0 = iters(t, 0, fl, fk);
    for (int it = 0; it <= n0; it++) begin
      for (int a = 'h10; a < 'h14; a++) emit(t, a);
      run_loop(t, 1, iters(t, 1, (it == 0) ? fl : -1, fk));
      emit(t, 'h18); emit(t, 'h19, 0, 1);
      func_f(t, (it == 0) ? fl : -1, fk);
      for (int a = 'h1A; a < 'h20; a++) emit(t, a);
      emit(t, 'h20, it < n0);
    end
    hold = 1;
    emit(t, 'h21); emit(t, 'h22, 0, 1);
    func_g(t);
    emit(t, 'h23);
    run_loop(t, 3, iters(t, 3, fl, fk));
    emit(t, 'h28); emit(t, 'h29, 0, 1);
    func_g(t);
    for (int a = 'h2A; a < 'h2C; a++) emit(t, a);
  endfunction

  // ---------------------------------------------------------------- checks
  int checks = 0, failures = 0;
  int n_start = 0, n_iter = 0, n_end = 0, n_resume = 0, n_cs = 0, n_backlog = 0;
  int n_err_max = 0, n_err_min = 0, n_addr_err = 0, n_overflow = 0, n_masked = 0;
  int n_instr = 0;
  bit expect_no_err = 1;
  bit fault_seen [NT*NLOOP][4];
  bit fault_inj  [NT*NLOOP][4];
  logic [3:0] last_task = 4'(8);

  task automatic fail(string s);
    failures++;
    if (failures < 15) $display("FAIL: %s", s);
  endtask

  always @(posedge clk_dased) if (rst_n) begin
    n_start  += int'(stat_loop_start);
    n_iter   += int'(stat_loop_iter);
    n_end    += int'(stat_loop_end);
    n_resume += int'(stat_resume);
    if (loop_err) begin
      if (loop_err_code == ERR_MAX) n_err_max++;
      if (loop_err_code == ERR_MIN) n_err_min++;
      checks++;
      if (expect_no_err || !fault_inj[loop_err_index][loop_err_code])
        fail($sformatf("unexpected loop error %s on loop %0d at %h", loop_err_code.name(),
                       loop_err_index, loop_err_addr));
      else fault_seen[loop_err_index][loop_err_code] = 1;
    end
  end

  always @(posedge clk_cpu) if (rst_n) begin
    if (fifo_overflow) n_overflow++;
    if (fifo_level >= 2) n_backlog++;
    if (cur_task != last_task) begin n_cs++; last_task = cur_task; end
  end

  // Present one instruction (with random stall cycles); addr_err must follow
  // one cycle later exactly when the address is bad.
  task automatic exec(logic [31:0] a, bit sbb, bit func, bit ret, bit bad = 0);
    while ($urandom_range(0, 9) == 0) begin
      i_valid = 0;
      @(posedge clk_cpu); #1;
      checks++; if (addr_err) fail("addr_err on a stall cycle");
    end
    i_valid = 1; i_addr = a; i_sbb = sbb; i_func = func; i_ret = ret;
    n_instr++;
    @(posedge clk_cpu); #1;
    i_valid = 0; i_sbb = 0; i_func = 0; i_ret = 0;
    checks++;
    if (addr_err !== bad) fail($sformatf("addr_err=%b for address %h", addr_err, a));
    if (bad) n_addr_err++;
  endtask

  // operating system: scheduler code, valid but not monitored. Its branch
  // flags must be filtered out.
  task automatic os_switch();
    for (int k = 0; k < 12; k++) begin
      bit f = (k == 5);
      exec(32'h0000_1000 + 32'(4 * k), 0, f, 0);
      if (f) n_masked++;
    end
  endtask

  // Run all task queues to completion under preemptive round-robin.
  task automatic run_tasks();
    int t = 0;
    while (1) begin
      int q, left = 0;
      for (int k = 0; k < NT; k++) left += tq[k].size();
      if (left == 0) break;
      while (tq[t].size() == 0) t = (t + 1) % NT;
      os_switch();
      q = $urandom_range(20, 300);
      while (tq[t].size() > 0) begin
        rec_t r = tq[t][0];
        if (q <= 0 && r.pre_ok) break;
        void'(tq[t].pop_front());
        exec({r.wa, 2'b00}, r.sbb, r.func, r.ret);
        q--;
      end
      t = (t + 1) % NT;
    end
    os_switch();
    repeat (20) @(posedge clk_dased);
    #1;
  endtask

  initial begin
    repeat (3000000) @(posedge clk_cpu);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // profiled bounds: minimum 2..3, maximum 4..9 iterations
    for (int t = 0; t < NT; t++)
      for (int l = 0; l < NLOOP; l++) begin
        l_min[t][l] = $urandom_range(2, 3);
        l_max[t][l] = l_min[t][l] + $urandom_range(2, 6);
      end
    for (int s = 0; s < NT*NLOOP; s++)
      for (int c = 0; c < 4; c++) begin fault_seen[s][c] = 0; fault_inj[s][c] = 0; end

    repeat (4) @(posedge clk_dased);
    rst_n = 1;
    repeat (4) @(posedge clk_dased);

    // configure the task regions and the code range (processor clock)
    @(posedge clk_cpu); #1;
    for (int t = 0; t < NT; t++) begin
      cfg_task_we = 1; cfg_task_idx = 3'(t); cfg_task_en = 1;
      cfg_task_start = {base(t), 2'b00}; cfg_task_end = {base(t), 2'b00} + 32'hFFFC;
      @(posedge clk_cpu); #1;
    end
    cfg_task_we = 0;
    cfg_code_we = 1; cfg_code_lo = 32'h0000_1000; cfg_code_hi = 32'h0006_FFFC;
    @(posedge clk_cpu); #1;
    cfg_code_we = 0;

    // load the loop profiles (detector clock); slot = 4*task + loop
    @(posedge clk_dased); #1;
    for (int t = 0; t < NT; t++)
      for (int l = 0; l < NLOOP; l++) begin
        cfg_pc_we = 1; cfg_pc_idx = 5'(NLOOP * t + l);
        cfg_pc_data = '{valid: 1'b1, tag: base(t) + 30'(l_tag[l]), offset: 8'(l_off[l]),
                        min_iter: 14'(l_min[t][l]), max_iter: 14'(l_max[t][l])};
        @(posedge clk_dased); #1;
      end
    cfg_pc_we = 0;

    // ---- phase 1: fault-free multitasking run
    hold = 0; after_br = 0;
    for (int t = 0; t < NT; t++) for (int j = 0; j < JOBS; j++) job(t, -1, 0);
    run_tasks();
    checks++;
    if (n_err_max + n_err_min != 0) fail("errors reported in the fault-free run");
    $display("phase 1: %0d instructions, loop starts %0d, iterations %0d, ends %0d, resumes %0d",
             n_instr, n_start, n_iter, n_end, n_resume);

    // ---- phase 2: injected loop faults, one per faulty job
    expect_no_err = 0;
    for (int t = 0; t < NT; t++) begin
      for (int j = 0; j < JOBS; j++) begin
        if (j % 3 == 1) begin
          automatic int fl = (j / 3 + t) % NLOOP;
          automatic int fk = ((j / 3 + t) % 2) + 1;        // 1: too many, 2: too few
          job(t, fl, fk);
          fault_inj[NLOOP * t + fl][fk == 1 ? ERR_MAX : ERR_MIN] = 1;
        end else job(t, -1, 0);
      end
    end
    run_tasks();
    for (int s = 0; s < NT*NLOOP; s++)
      for (int c = 0; c < 4; c++) begin
        if (fault_inj[s][c]) begin
          checks++;
          if (!fault_seen[s][c]) fail($sformatf("fault %0d on loop %0d not detected", c, s));
        end
      end
    $display("phase 2: max errors %0d, min errors %0d", n_err_max, n_err_min);

    // ---- phase 3: address errors
    for (int k = 0; k < 20; k++) begin
      exec(32'h0000_1002 + 32'(k % 2), 0, 0, 0, 1);          // misaligned
      exec(32'h0000_1004, 0, 0, 0, 0);
      exec(32'h00F0_0000 + 32'(4 * k), 0, 0, 0, 1);          // outside the code
      exec(32'h0000_0FFC, 0, 0, 0, 1);                        // just below the code
    end

    // ---- phase 4: one-instruction loop, one branch per processor clock
    expect_no_err = 1;
    for (int k = 0; k < 80; k++) begin
      i_valid = 1; i_addr = {base(0) + 30'h300, 2'b00}; i_sbb = (k < 79);
      @(posedge clk_cpu); #1;
    end
    i_valid = 0; i_sbb = 0;
    repeat (40) @(posedge clk_dased);

    checks++;
    if (n_start == 0 || n_iter == 0 || n_end == 0 || n_resume == 0 || n_cs == 0 ||
        n_backlog == 0 || n_err_max == 0 || n_err_min == 0 || n_addr_err == 0 ||
        n_overflow == 0 || n_masked == 0)
      fail("a mechanism never happened");
    $display("instructions %0d, context switches %0d, masked OS events %0d, backlog cycles %0d",
             n_instr, n_cs, n_masked, n_backlog);
    $display("address errors %0d, overflows %0d", n_addr_err, n_overflow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
