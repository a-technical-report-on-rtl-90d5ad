// tb_dased_task_filter: self-checking test of the task filter.
//
// Programs four of the eight task regions (the others stay disabled) and a valid code range, then drives random
// instruction addresses (aligned and misaligned, inside and outside the
// code range, inside and between tasks) with random sbb/func/ret flags. A
// reference model in the testbench computes the expected task, context
// switch, filtered flags and address error, compared one clock later.
module tb_dased_task_filter;
  import dased_pkg::*;

  localparam int unsigned NT = 4;      // regions programmed (of the default 8)
  localparam int unsigned NONE = 8;    // task id reported outside all regions
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_task_we, cfg_task_en, cfg_code_we;
  logic [2:0] cfg_task_idx;
  logic [31:0] cfg_task_start, cfg_task_end, cfg_code_lo, cfg_code_hi;
  logic i_valid, i_sbb, i_func, i_ret;
  logic [31:0] i_addr;
  logic o_valid, o_sbb, o_func, o_ret, o_cs, o_addr_err;
  logic [31:0] o_addr;
  logic [3:0] o_task;

  dased_task_filter dut (.*);

  int checks = 0, failures = 0;
  int n_cs = 0, n_err = 0, n_pass = 0, n_masked = 0;

  // reference copies of the configuration
  logic [31:0] ts [NT] = '{32'h1000, 32'h2000, 32'h3000, 32'h1800};
  logic [31:0] te [NT] = '{32'h1FFC, 32'h2FFC, 32'h37FC, 32'h1900};
  logic        en [NT] = '{1'b1, 1'b1, 1'b0, 1'b1};
  logic [31:0] lo = 32'h0000_0800, hi = 32'h0000_5FFC;

  function automatic int ref_task(logic [31:0] a);
    for (int i = 0; i < NT; i++) if (en[i] && a >= ts[i] && a <= te[i]) return i;
    return NONE;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cur = NONE;
    logic e_valid, e_sbb, e_func, e_ret, e_cs, e_err;
    int   e_task;
    logic [31:0] e_addr;
    cfg_task_we = 0; cfg_code_we = 0; cfg_task_idx = 0; cfg_task_en = 0;
    cfg_task_start = 0; cfg_task_end = 0; cfg_code_lo = 0; cfg_code_hi = 0;
    i_valid = 0; i_addr = 0; i_sbb = 0; i_func = 0; i_ret = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int i = 0; i < NT; i++) begin
      cfg_task_we <= 1; cfg_task_idx <= 3'(i); cfg_task_en <= en[i];
      cfg_task_start <= ts[i]; cfg_task_end <= te[i];
      @(posedge clk);
    end
    cfg_task_we <= 0;
    cfg_code_we <= 1; cfg_code_lo <= lo; cfg_code_hi <= hi;
    @(posedge clk);
    cfg_code_we <= 0;

    for (int n = 0; n < 5000; n++) begin
      logic [31:0] a;
      logic v, bad;
      int k, t;
      // cluster addresses so that runs stay inside one task for a while
      k = $urandom_range(0, 99);
      a = (k < 3) ? $urandom_range(0, 32'h7000) : 32'h0800 + 4 * $urandom_range(0, 32'h1600);
      if (k == 3) a[1:0] = 2'($urandom_range(1, 3));
      v = ($urandom_range(0, 9) != 0);
      i_valid <= v; i_addr <= a;
      case ($urandom_range(0, 5))
        0: begin i_sbb <= 1; i_func <= 0; i_ret <= 0; end
        1: begin i_sbb <= 0; i_func <= 1; i_ret <= 0; end
        2: begin i_sbb <= 0; i_func <= 0; i_ret <= 1; end
        default: begin i_sbb <= 0; i_func <= 0; i_ret <= 0; end
      endcase
      @(posedge clk);
      // reference
      bad = (a[1:0] != 0) || a < lo || a > hi;
      t   = ref_task(a);
      e_err   = v && bad;
      e_valid = v && !bad;
      e_cs    = e_valid && (t != cur);
      e_sbb   = e_valid && (t != NONE) && i_sbb;
      e_func  = e_valid && (t != NONE) && i_func;
      e_ret   = e_valid && (t != NONE) && i_ret;
      if (e_valid) cur = t;
      e_task  = cur;
      e_addr  = a;
      #1;
      checks++;
      if (o_valid !== e_valid || o_addr_err !== e_err || o_cs !== e_cs || o_sbb !== e_sbb ||
          o_func !== e_func || o_ret !== e_ret || int'(o_task) != e_task ||
          (e_valid && o_addr !== e_addr)) begin
        failures++;
        if (failures < 10)
          $display("mismatch n=%0d a=%h: valid %b/%b err %b/%b cs %b/%b sbb %b/%b func %b/%b ret %b/%b task %0d/%0d",
                   n, a, o_valid, e_valid, o_addr_err, e_err, o_cs, e_cs, o_sbb, e_sbb,
                   o_func, e_func, o_ret, e_ret, o_task, e_task);
      end
      n_cs += int'(e_cs); n_err += int'(e_err);
      n_pass += int'(e_sbb || e_func || e_ret);
      n_masked += int'(e_valid && t == NONE && (i_sbb | i_func | i_ret));
    end
    // every behaviour must have been exercised
    checks++; if (n_cs < 10 || n_err < 10 || n_pass < 10 || n_masked < 10) failures++;
    $display("context switches %0d, address errors %0d, passed events %0d, masked events %0d",
             n_cs, n_err, n_pass, n_masked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
