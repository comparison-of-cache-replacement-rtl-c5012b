// l2_repl_bench_tb: the three-policy L2 at full size on address streams shaped
// like the single-core bare-metal benchmarks the policies are meant for.
//
// A behavioural model of the core's L1 data cache (32 KiB, 8 ways, 16-byte
// lines, random replacement, write-through without write-allocate) filters the
// accesses: loads that hit in L1 never reach the L2, every store does. The
// benchmark kernels run here in SystemVerilog only to produce their load and
// store addresses (the data themselves are not modelled, except where the
// sort algorithms need values to decide their next access). Sizes are the
// benchmarks' data set sizes; elements are 8 bytes:
//   median 50000, mt-matmul 10000 (100 x 100), mt-vvadd 10000, multiply 45000,
//   qsort 25000, rsort 16384, lfsr64bit 50000.
// Each benchmark starts from reset. The same policy-independent content check
// as in l2_repl_top_tb is applied to every response of every copy, and the
// hit ratio of each policy is printed per benchmark.
module l2_repl_bench_tb;
  import repl_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic req_valid = 1'b0, req_we = 1'b0, req_core = 1'b0;
  logic req_ready;
  logic [ADDR_W-1:0] req_addr = '0;
  logic [PC_W-1:0] req_pc = '0;
  logic resp_valid;
  l2_resp_t [2:0] resp;
  l2_stats_t [2:0] stats;
  logic [31:0] stall_cycles;

  l2_repl_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  string pname [3] = '{"PLRUm", "EBR", "Mockingjay"};

  // policy-independent content model, one per copy: line number -> dirty
  bit lines0 [longint];
  bit lines1 [longint];
  bit lines2 [longint];
  int setcnt [3][1024];
  int n_hit [3], n_miss [3], n_evict [3], n_wb [3];
  int tot_hit [3], tot_evict [3], tot_wb [3];
  int n_stall = 0;
  int n_plrum_clear = 0, n_ebr_wrap = 0, n_mj_train = 0, n_mj_detrain = 0, tot_stall = 0;

  function automatic bit has(int i, longint l);
    case (i) 0: return lines0.exists(l); 1: return lines1.exists(l); default: return lines2.exists(l); endcase
  endfunction
  function automatic bit dirty_of(int i, longint l);
    case (i) 0: return lines0[l]; 1: return lines1[l]; default: return lines2[l]; endcase
  endfunction
  task automatic put(int i, longint l, bit d);
    case (i) 0: lines0[l] = d; 1: lines1[l] = d; default: lines2[l] = d; endcase
  endtask
  task automatic del(int i, longint l);
    case (i) 0: lines0.delete(l); 1: lines1.delete(l); default: lines2.delete(l); endcase
  endtask

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL: %s", msg);
  endtask

  task automatic process(int i, longint addr, bit we);
    longint line, eline;
    int s;
    line = addr >> 5;
    s = int'(line % 1024);
    checks++;
    if (resp[i].hit) begin
      n_hit[i]++;
      if (!has(i, line)) fail($sformatf("%s hit on absent line %h", pname[i], line));
      else put(i, line, dirty_of(i, line) | we);
    end else begin
      n_miss[i]++;
      if (has(i, line)) fail($sformatf("%s miss on present line %h", pname[i], line));
      if (resp[i].evict) begin
        n_evict[i]++;
        eline = longint'(resp[i].evict_addr) >> 5;
        if (!has(i, eline) || int'(eline % 1024) != s || setcnt[i][s] != 8)
          fail($sformatf("%s bad eviction of %h for %h", pname[i], eline, line));
        else begin
          if (resp[i].wb != dirty_of(i, eline)) fail($sformatf("%s write-back flag wrong", pname[i]));
          del(i, eline);
          setcnt[i][s]--;
        end
        if (resp[i].wb) n_wb[i]++;
      end else if (setcnt[i][s] >= 8) fail($sformatf("%s no eviction from a full set", pname[i]));
      put(i, line, we);
      setcnt[i][s]++;
    end
  endtask

  longint acc_addr;
  bit acc_we;
  bit acc_pending = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (resp_valid) begin
        if (!acc_pending) fail("response without request");
        for (int i = 0; i < 3; i++) process(i, acc_addr, acc_we);
      end
      if (req_valid && !req_ready) n_stall++;
      acc_pending = req_valid && req_ready;
      if (req_valid && req_ready) begin acc_addr = longint'(req_addr); acc_we = req_we; end
      // internal mechanisms
      if (dut.g_l2[0].u_l2.g_plrum.u_repl.upd_valid && (&dut.g_l2[0].u_l2.g_plrum.u_repl.row_set))
        n_plrum_clear++;
      if (dut.g_l2[1].u_l2.g_ebr.u_repl.upd_valid && !dut.g_l2[1].u_l2.g_ebr.u_repl.upd_hit
          && (&dut.g_l2[1].u_l2.g_ebr.u_repl.miss_q[dut.g_l2[1].u_l2.g_ebr.u_repl.upd_set]))
        n_ebr_wrap++;
      if (int'(dut.g_l2[2].u_l2.g_mjay.u_repl.st_q) == 2) n_mj_train++;
      if (int'(dut.g_l2[2].u_l2.g_mjay.u_repl.st_q) == 4) n_mj_detrain++;
    end
  end

  task automatic issue(longint addr, bit we, longint pc);
    @(negedge clk);
    req_valid = 1'b1; req_addr = ADDR_W'(addr); req_we = we; req_pc = pc; req_core = 1'b0;
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    #1 req_valid = 1'b0;
  endtask

  task automatic reset_all();
    @(negedge clk);
    rst_n = 1'b0;
    lines0.delete(); lines1.delete(); lines2.delete();
    for (int i = 0; i < 3; i++) begin
      n_hit[i] = 0; n_miss[i] = 0; n_evict[i] = 0; n_wb[i] = 0;
      for (int s = 0; s < 1024; s++) setcnt[i][s] = 0;
    end
    acc_pending = 0;
    n_stall = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
  endtask

  task automatic finish_workload(string name);
    repeat (3) @(negedge clk);
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (stats[i].hits != 32'(n_hit[i]) || stats[i].misses != 32'(n_miss[i])
          || stats[i].evictions != 32'(n_evict[i]) || stats[i].writebacks != 32'(n_wb[i]))
        fail($sformatf("%s counters disagree", pname[i]));
      $display("%-10s %-10s hits %6d misses %6d evictions %6d write-backs %6d hit ratio %5.2f%%",
               name, pname[i], n_hit[i], n_miss[i], n_evict[i], n_wb[i],
               100.0 * real'(n_hit[i]) / real'(n_hit[i] + n_miss[i]));
      tot_hit[i] += n_hit[i]; tot_evict[i] += n_evict[i]; tot_wb[i] += n_wb[i];
    end
    checks++;
    if (stall_cycles != 32'(n_stall)) fail($sformatf("stall counter %0d, expected %0d", stall_cycles, n_stall));
    $display("%-10s stall cycles %0d", name, stall_cycles);
    tot_stall += int'(stall_cycles);
  endtask


  // ---------------------------------------------------------------- L1 model
  longint l1_tag [256][8];
  bit     l1_v   [256][8];
  task automatic l1_clear();
    for (int s = 0; s < 256; s++) for (int w = 0; w < 8; w++) l1_v[s][w] = 0;
  endtask
  task automatic ld(longint addr, longint pc);
    longint line;
    int s, v;
    line = addr >> 4;
    s = int'(line % 256);
    for (int w = 0; w < 8; w++) if (l1_v[s][w] && l1_tag[s][w] == line) return;
    issue(addr, 1'b0, pc);
    v = -1;
    for (int w = 0; w < 8; w++) if (v < 0 && !l1_v[s][w]) v = w;
    if (v < 0) v = $urandom_range(0, 7);
    l1_v[s][v] = 1; l1_tag[s][v] = line;
  endtask
  task automatic st(longint addr, longint pc);
    issue(addr, 1'b1, pc);
  endtask

  localparam longint A = 64'h8010_0000;
  localparam longint B = 64'h8020_0000;
  localparam longint C = 64'h8030_0000;
  longint data [];

  task automatic start(string name);
    reset_all();
    l1_clear();
    $display("-- %s", name);
  endtask

  // quicksort on data[], producing its loads and stores
  task automatic qs(int lo, int hi);
    int i, j;
    longint p, t;
    while (lo < hi) begin
      ld(A + 8 * ((lo + hi) / 2), 64'h8000_0300);
      p = data[(lo + hi) / 2];
      i = lo; j = hi;
      while (i <= j) begin
        ld(A + 8 * i, 64'h8000_0310);
        while (data[i] < p) begin i++; ld(A + 8 * i, 64'h8000_0310); end
        ld(A + 8 * j, 64'h8000_0318);
        while (data[j] > p) begin j--; ld(A + 8 * j, 64'h8000_0318); end
        if (i <= j) begin
          t = data[i]; data[i] = data[j]; data[j] = t;
          st(A + 8 * i, 64'h8000_0320);
          st(A + 8 * j, 64'h8000_0324);
          i++; j--;
        end
      end
      if (j - lo < hi - i) begin qs(lo, j); lo = i; end
      else begin qs(i, hi); hi = j; end
    end
  endtask

  initial begin
    logic [63:0] lfsr;
    for (int i = 0; i < 3; i++) begin tot_hit[i] = 0; tot_evict[i] = 0; tot_wb[i] = 0; end

    start("median");
    for (int k = 1; k < 50000 - 1; k++) begin
      ld(A + 8 * (k - 1), 64'h8000_0100); ld(A + 8 * k, 64'h8000_0104); ld(A + 8 * (k + 1), 64'h8000_0108);
      st(C + 8 * k, 64'h8000_0110);
    end
    finish_workload("median");

    start("mt-matmul");
    for (int i = 0; i < 100; i++)
      for (int j = 0; j < 100; j++) begin
        for (int k = 0; k < 100; k++) begin
          ld(A + 8 * (100 * i + k), 64'h8000_0400);
          ld(B + 8 * (100 * k + j), 64'h8000_0404);
        end
        st(C + 8 * (100 * i + j), 64'h8000_0408);
      end
    finish_workload("mt-matmul");

    start("mt-vvadd");
    for (int k = 0; k < 10000; k++) begin
      ld(A + 8 * k, 64'h8000_0500); ld(B + 8 * k, 64'h8000_0504); st(C + 8 * k, 64'h8000_0508);
    end
    finish_workload("mt-vvadd");

    start("multiply");
    for (int k = 0; k < 45000; k++) begin
      ld(A + 8 * k, 64'h8000_0600); ld(B + 8 * k, 64'h8000_0604); st(C + 8 * k, 64'h8000_0608);
    end
    finish_workload("multiply");

    start("qsort");
    data = new[25000];
    lfsr = 64'hACE1;
    for (int k = 0; k < 25000; k++) begin
      lfsr = {lfsr[62:0], lfsr[63] ^ lfsr[62] ^ lfsr[60] ^ lfsr[59]};
      data[k] = longint'(lfsr[31:0]);
    end
    qs(0, 25000 - 1);
    finish_workload("qsort");

    start("rsort");
    data = new[16384];
    for (int k = 0; k < 16384; k++) begin
      lfsr = {lfsr[62:0], lfsr[63] ^ lfsr[62] ^ lfsr[60] ^ lfsr[59]};
      data[k] = longint'(lfsr[15:0]);
    end
    // two passes of 8-bit LSD radix sort: count, prefix sum, scatter into C and back
    for (int pass = 0; pass < 2; pass++) begin
      int cnt [256];
      longint tmp [];
      tmp = new[16384];
      for (int d = 0; d < 256; d++) begin cnt[d] = 0; st(B + 8 * d, 64'h8000_0700); end
      for (int k = 0; k < 16384; k++) begin
        int d;
        d = int'((data[k] >> (8 * pass)) & 255);
        ld(A + 8 * k, 64'h8000_0704); ld(B + 8 * d, 64'h8000_0708); st(B + 8 * d, 64'h8000_070c);
        cnt[d]++;
      end
      for (int d = 1; d < 256; d++) begin cnt[d] += cnt[d - 1]; ld(B + 8 * d, 64'h8000_0710); st(B + 8 * d, 64'h8000_0714); end
      for (int k = 16384 - 1; k >= 0; k--) begin
        int d;
        d = int'((data[k] >> (8 * pass)) & 255);
        ld(A + 8 * k, 64'h8000_0718); ld(B + 8 * d, 64'h8000_071c);
        cnt[d]--;
        tmp[cnt[d]] = data[k];
        st(C + 8 * cnt[d], 64'h8000_0720); st(B + 8 * d, 64'h8000_0724);
      end
      for (int k = 0; k < 16384; k++) begin
        ld(C + 8 * k, 64'h8000_0728); st(A + 8 * k, 64'h8000_072c);
        data[k] = tmp[k];
      end
    end
    for (int k = 1; k < 16384; k++) begin
      checks++;
      if (data[k - 1] > data[k]) fail("rsort model did not sort");
    end
    finish_workload("rsort");

    start("lfsr64bit");
    for (int k = 0; k < 50000; k++) begin
      if (k % 64 == 0) ld(64'h8000_8000, 64'h8000_0800);
      st(A + 8 * k, 64'h8000_0808);
    end
    finish_workload("lfsr64bit");

    for (int i = 0; i < 3; i++) begin
      checks++;
      if (tot_hit[i] == 0 || tot_evict[i] == 0 || tot_wb[i] == 0) fail($sformatf("%s coverage", pname[i]));
    end
    checks++;
    if (tot_stall == 0 || n_plrum_clear == 0 || n_ebr_wrap == 0 || n_mj_train == 0 || n_mj_detrain == 0)
      fail("a mechanism never happened");
    $display("stalls %0d, PLRUm clears %0d, EBR miss-counter wraps %0d, Mockingjay RDP trainings %0d, detrains %0d",
             tot_stall, n_plrum_clear, n_ebr_wrap, n_mj_train, n_mj_detrain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
