// l2_repl_top_tb: end-to-end test of the three-policy L2 at full size
// (1024 sets, 8 ways, 32-byte lines; no parameter is overridden).
//
// Two benchmark-like access streams are generated here and fed to all three
// L2 copies, with a reset between them:
//   vvadd      c[i] = a[i] + b[i] over three arrays of 25000 8-byte integers:
//              a load per 16-byte L1 line of a and b, a store for every c[i]
//              (the L1 above is write-through, so every store reaches the L2)
//   lfsr_rand  50000 stores of LFSR data to LFSR-chosen indices of a
//              50000-element 8-byte array
// Each copy's responses are checked against a policy-independent model of
// what the cache holds: a hit only for a line present, a miss only for a line
// absent, an eviction only from a full set and only of a line of that set
// that is present, a write-back exactly when that line was written, and the
// final counters equal to the responses seen. The test counts every mechanism
// (hits, misses, evictions, write-backs, back-pressure from Mockingjay, PLRUm
// MRU clears, EBR miss-counter wraps, Mockingjay RDP training and detraining)
// and fails if one never happened. Hit ratios per policy are printed.
module l2_repl_top_tb;
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

  localparam longint A_BASE = 64'h8010_0000;
  localparam longint B_BASE = 64'h8020_0000;
  localparam longint C_BASE = 64'h8030_0000;
  localparam longint R_BASE = 64'h8040_0000;

  initial begin
    for (int i = 0; i < 3; i++) begin tot_hit[i] = 0; tot_evict[i] = 0; tot_wb[i] = 0; end
    reset_all();
    // ---- vvadd: 25000 elements
    for (int k = 0; k < 25000; k++) begin
      if (k % 2 == 0) begin
        issue(A_BASE + 8 * k, 1'b0, 64'h8000_0100);
        issue(B_BASE + 8 * k, 1'b0, 64'h8000_0104);
      end
      issue(C_BASE + 8 * k, 1'b1, 64'h8000_010c);
    end
    finish_workload("vvadd");
    // ---- lfsr64bit_rand: 50000 stores to random indices
    reset_all();
    begin
      logic [63:0] lfsr;
      lfsr = 64'h1;
      for (int k = 0; k < 50000; k++) begin
        lfsr = {lfsr[62:0], lfsr[63] ^ lfsr[62] ^ lfsr[60] ^ lfsr[59]};
        // loop variable and array bound stay in the L2 as well
        if (k % 64 == 0) issue(64'h8000_8000, 1'b0, 64'h8000_0200);
        issue(R_BASE + 8 * longint'(lfsr % 50000), 1'b1, 64'h8000_0208);
      end
    end
    finish_workload("lfsr_rand");
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
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
