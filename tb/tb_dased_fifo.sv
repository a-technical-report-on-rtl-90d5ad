// tb_dased_fifo: self-checking test of the event FIFO.
//
// The processor side runs at 4x the detector clock, the ratio the design is
// built for. Phase 1 sends a long random trace with at most one profile
// event every four instructions while the reader pops whenever the FIFO is
// not empty: every entry must arrive, in order and correctly encoded, with
// no overflow (the sustained-rate requirement). Phase 2 stops the reader
// and sends one event per instruction: exactly DEPTH entries are kept, the
// rest must be reported as overflow, and the kept entries must come out in
// order. The expected entries are computed by the testbench from the
// instruction stream (next instruction address gives the loop offset and
// the return destination).
module tb_dased_fifo;
  import dased_pkg::*;

  localparam int unsigned DEPTH = 16;
  logic clk_cpu = 0, clk_dased = 0, rst_n = 0;
  always #5  clk_cpu   = ~clk_cpu;
  always #20 clk_dased = ~clk_dased;

  logic t_valid, t_sbb, t_func, t_ret, t_cs;
  logic [31:0] t_addr;
  logic overflow, empty, rd_en;
  logic [$clog2(DEPTH):0] level;
  fifo_entry_t head;
  logic rd_allow;

  dased_fifo dut (
    .clk_cpu, .rst_cpu_n(rst_n), .t_valid, .t_addr, .t_sbb, .t_func, .t_ret, .t_cs,
    .overflow, .level, .clk_dased, .rst_dased_n(rst_n), .rd_en, .empty, .head
  );

  assign rd_en = rd_allow && !empty;

  int checks = 0, failures = 0;
  fifo_entry_t expq[$];
  int n_overflow = 0, n_recv = 0, max_level = 0;

  // pending event of the previous instruction, for the expected entries
  logic p_have; ev_kind_t p_kind; logic p_cs; logic [29:0] p_addr;

  initial begin
    repeat (200000) @(posedge clk_cpu);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk_cpu) if (rst_n) begin
    if (overflow) n_overflow++;
    if (int'(level) > max_level) max_level = int'(level);
  end

  always @(posedge clk_dased) if (rst_n && rd_en) begin
    fifo_entry_t e;
    n_recv++;
    checks++;
    if (expq.size() == 0) begin
      failures++;
      $display("unexpected entry %p", head);
    end else begin
      e = expq.pop_front();
      if (head !== e) begin
        failures++;
        if (failures < 10) $display("entry mismatch: got %p expected %p", head, e);
      end
    end
  end

  // Present one instruction for one clk_cpu cycle and record the expected entry.
  task automatic instr(logic [29:0] wa, ev_kind_t k, logic cs, bit keep_expected);
    fifo_entry_t e;
    t_valid = 1; t_addr = {wa, 2'b00};
    t_sbb = (k == EV_SBB); t_func = (k == EV_FUNC); t_ret = (k == EV_RET); t_cs = cs;
    if (p_have && keep_expected) begin
      e.kind = p_kind; e.cs = p_cs;
      e.addr = (p_kind == EV_RET) ? wa : p_addr;
      e.offset = (p_kind == EV_SBB) ? 8'(p_addr - wa) : 8'd0;
      expq.push_back(e);
    end
    p_have = (k != EV_NONE) || cs; p_kind = k; p_cs = cs; p_addr = wa;
    @(posedge clk_cpu);
    #1;
    t_valid = 0; t_sbb = 0; t_func = 0; t_ret = 0; t_cs = 0;
  endtask

  initial begin
    logic [29:0] pc;
    int sent;
    t_valid = 0; t_addr = 0; t_sbb = 0; t_func = 0; t_ret = 0; t_cs = 0;
    rd_allow = 1; p_have = 0; p_kind = EV_NONE; p_cs = 0; p_addr = 0;
    repeat (4) @(posedge clk_dased);
    rst_n = 1;
    repeat (4) @(posedge clk_dased);
    @(posedge clk_cpu);
    #1;

    // ---- phase 1: one event every four instructions, reader free-running
    pc = 30'h400;
    for (int n = 0; n < 8000; n++) begin
      ev_kind_t k; logic cs; logic [29:0] nxt;
      k = EV_NONE; cs = 0; nxt = pc + 1;
      if (n % 4 == 3) begin
        case ($urandom_range(0, 4))
          0, 1: begin k = EV_SBB; nxt = pc - 30'($urandom_range(1, 255)); end
          2: begin k = EV_FUNC; nxt = 30'h8000 + 30'($urandom_range(0, 4095)); end
          3: begin k = EV_RET;  nxt = 30'h400 + 30'($urandom_range(0, 4095)); end
          default: begin cs = 1; end
        endcase
      end
      instr(pc, k, cs, 1);
      pc = nxt;
    end
    instr(pc, EV_NONE, 0, 1);
    repeat (40) @(posedge clk_dased);
    checks++;
    if (n_overflow != 0 || expq.size() != 0) begin
      failures++;
      $display("phase 1: overflow %0d, %0d entries missing", n_overflow, expq.size());
    end
    $display("phase 1: %0d entries received, max level %0d", n_recv, max_level);

    // ---- phase 2: burst with the reader stopped
    rd_allow = 0;
    repeat (2) @(posedge clk_dased);
    @(posedge clk_cpu);
    #1;
    sent = 0;
    p_have = 0;
    instr(30'h100, EV_NONE, 0, 1);
    for (int n = 0; n < 40; n++) begin
      instr(30'h100 + 30'(n + 1), EV_FUNC, 0, sent < DEPTH);
      if (n > 0) sent++;
    end
    instr(30'h200, EV_NONE, 0, sent < DEPTH);
    sent++;
    repeat (4) @(posedge clk_cpu);
    checks++;
    if (n_overflow != 40 - DEPTH) begin
      failures++;
      $display("phase 2: %0d overflows, expected %0d", n_overflow, 40 - DEPTH);
    end
    checks++;
    if (int'(level) != DEPTH) begin
      failures++;
      $display("phase 2: level %0d, expected %0d", level, DEPTH);
    end
    rd_allow = 1;
    repeat (DEPTH + 10) @(posedge clk_dased);
    checks++;
    if (expq.size() != 0 || !empty) begin
      failures++;
      $display("phase 2: %0d entries missing, empty=%b", expq.size(), empty);
    end
    $display("overflows %0d, entries received %0d", n_overflow, n_recv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
