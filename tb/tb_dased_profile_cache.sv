// tb_dased_profile_cache: self-checking test of the profile cache.
//
// Programs random loops (Tag, Offset, MinIter, MaxIter) into random slots,
// then checks the associative lookup (found/found_index for a matching Tag
// and Offset, lowest slot on duplicates, no hit on a mismatching Offset or
// an invalid slot), the per-entry loop-body range test, the flag and
// iteration update ports, and that reprogramming a slot clears its dynamic
// state. Expected values come from a table kept by the testbench.
module tb_dased_profile_cache;
  import dased_pkg::*;

  localparam int unsigned N = 32;
  localparam int unsigned IW = $clog2(N);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_we; logic [IW-1:0] cfg_idx; pc_static_t cfg_data;
  waddr_t q_addr; offset_t q_offset;
  logic found; logic [IW-1:0] found_index;
  logic [N-1:0] in_range, in_loop, in_func, in_cs, nxt_in_loop, nxt_in_func, nxt_in_cs;
  iter_t curr_iter [N], min_iter [N], max_iter [N];
  logic upd_flags_we, upd_iter_we; logic [IW-1:0] upd_iter_idx; iter_t upd_iter_val;

  dased_profile_cache dut (.*);

  pc_static_t tbl [N];
  int checks = 0, failures = 0;
  int n_found = 0, n_miss = 0, n_range = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic bit ref_range(waddr_t a, pc_static_t e);
    longint la = a, lt = e.tag, lo = e.offset;
    return e.valid && la <= lt && la >= lt - lo;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_we = 0; cfg_idx = '0; cfg_data = '0; q_addr = '0; q_offset = '0;
    upd_flags_we = 0; upd_iter_we = 0; upd_iter_idx = '0; upd_iter_val = '0;
    nxt_in_loop = '0; nxt_in_func = '0; nxt_in_cs = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // after reset nothing is found
    q_addr = 30'h0; q_offset = 8'h0; #1;
    check(!found && in_range == '0 && in_loop == '0, "reset state");
    // program 24 slots; the rest stay invalid. Slot 0 covers address 0..3
    // and slot 1 duplicates slot 20 to test the lowest-index rule.
    for (int i = 0; i < N; i++) begin
      pc_static_t e;
      e.valid    = (i < 24);
      e.tag      = (i == 0) ? 30'd3 : 30'(32'h1000 + 64 * i + $urandom_range(0, 40));
      e.offset   = (i == 0) ? 8'd10 : 8'($urandom_range(1, 255));
      e.min_iter = 14'($urandom_range(0, 100));
      e.max_iter = 14'($urandom_range(100, 16383));
      if (i == 20) e = tbl[1];
      tbl[i] = e;
      @(posedge clk); #1;
      cfg_we = 1; cfg_idx = IW'(i); cfg_data = e;
    end
    @(posedge clk); #1;
    cfg_we = 0;
    for (int i = 0; i < N; i++)
      check(min_iter[i] == tbl[i].min_iter && max_iter[i] == tbl[i].max_iter, "bounds readback");

    // lookups and range tests
    for (int n = 0; n < 3000; n++) begin
      int k, xi;
      bit xf;
      k = $urandom_range(0, N - 1);
      case ($urandom_range(0, 3))
        0: begin q_addr = tbl[k].tag; q_offset = tbl[k].offset; end
        1: begin q_addr = tbl[k].tag; q_offset = tbl[k].offset + 8'd1; end
        2: begin q_addr = tbl[k].tag - 30'($urandom_range(0, 300)); q_offset = 8'($urandom); end
        default: begin q_addr = 30'($urandom_range(0, 8)); q_offset = 8'($urandom); end
      endcase
      #1;
      xf = 0; xi = 0;
      for (int i = N - 1; i >= 0; i--)
        if (tbl[i].valid && tbl[i].tag == q_addr && tbl[i].offset == q_offset) begin
          xf = 1; xi = i;
        end
      check(found == xf && (!xf || int'(found_index) == xi), "lookup");
      for (int i = 0; i < N; i++) begin
        check(in_range[i] == ref_range(q_addr, tbl[i]), "range");
        n_range += int'(in_range[i]);
      end
      if (xf) n_found++; else n_miss++;
    end
    check(n_found > 100 && n_miss > 100 && n_range > 100, "coverage of lookups");

    // flag and iteration updates
    for (int n = 0; n < 200; n++) begin
      logic [N-1:0] a, b, c;
      int idx; iter_t v;
      a = N'({$urandom, $urandom}); b = N'({$urandom, $urandom}); c = N'({$urandom, $urandom});
      idx = $urandom_range(0, N - 1); v = 14'($urandom);
      @(posedge clk); #1;
      upd_flags_we = 1; nxt_in_loop = a; nxt_in_func = b; nxt_in_cs = c;
      upd_iter_we = 1; upd_iter_idx = IW'(idx); upd_iter_val = v;
      @(posedge clk); #1;
      upd_flags_we = 0; upd_iter_we = 0;
      check(in_loop == a && in_func == b && in_cs == c && curr_iter[idx] == v, "update");
      // no write enable: state holds
      nxt_in_loop = ~a;
      @(posedge clk); #1;
      check(in_loop == a && curr_iter[idx] == v, "hold");
    end
    // reprogramming a slot clears its dynamic state
    @(posedge clk); #1;
    upd_flags_we = 1; nxt_in_loop = '1; nxt_in_func = '1; nxt_in_cs = '1;
    upd_iter_we = 1; upd_iter_idx = 5'd7; upd_iter_val = 14'd99;
    @(posedge clk); #1;
    upd_flags_we = 0; upd_iter_we = 0;
    cfg_we = 1; cfg_idx = 5'd7; cfg_data = tbl[7];
    @(posedge clk); #1;
    cfg_we = 0;
    check(!in_loop[7] && !in_func[7] && !in_cs[7] && curr_iter[7] == 0 && in_loop[6] && in_loop[8],
          "reprogram clears slot");
    $display("hits %0d, misses %0d, in-range %0d", n_found, n_miss, n_range);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
