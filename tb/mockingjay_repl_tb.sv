// mockingjay_repl_tb: self-checking test of the Mockingjay replacement unit.
//
// A 64-set, 8-way instance (sets 0 and 32 are sampled, giving a 16-set
// sampled cache) is driven with updates drawn from small pools of sets, tags
// and PCs so that sampled-cache hits, RDP training, expiry (detraining), ETR
// clock wraps and negative ETRs all occur. A reference model in this file
// keeps its own sampled cache, RDP, ETR counters, timestamps and ETR clocks and
// computes its own PC hash. After each update the test checks
//   * the number of cycles busy stays high (2 for a non-sampled set; 5 or 6
//     for a sampled set, plus 2 per expired sampled-cache line),
//   * the victim of the updated set and of a random set against the model.
// It fails if any of the counted mechanisms never happened.
module mockingjay_repl_tb;
  localparam int unsigned SETS = 64;
  localparam int unsigned WAYS = 8;
  localparam int unsigned SCS  = 16;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic upd_valid = 1'b0, upd_hit = 1'b0, upd_core = 1'b0;
  logic [5:0] upd_set = '0, vic_set = '0;
  logic [2:0] upd_way = '0, vic_way;
  logic [24:0] upd_tag = '0;
  logic [63:0] upd_pc = '0;
  logic busy;

  mockingjay_repl #(.SETS(SETS), .WAYS(WAYS)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_sampled = 0, n_train = 0, n_init = 0, n_detrain = 0, n_wrap = 0, n_neg = 0, n_scfull = 0;

  // reference state
  int etr [SETS][WAYS];
  int eclk [SETS];
  int ts [SETS];
  bit sc_v [SCS][5];
  int sc_tag [SCS][5];
  int sc_sig [SCS][5];
  int sc_ts [SCS][5];
  bit rdp_v [2048];
  int rdp_rd [2048];

  function automatic int sig_of(logic [63:0] pc, bit hit, bit core);
    logic [10:0] h;
    h = '0;
    for (int b = 2; b < 57; b++) h[(b - 2) % 11] ^= pc[b];
    h[10] ^= hit;
    h[9] ^= core;
    return int'(h);
  endfunction

  // model one update; returns the expected busy cycle count
  function automatic int model_update(int s, int w, bit hit, int tag, logic [63:0] pc, bit core);
    int sig, nbusy, pred_v, pred_rd, nv;
    sig = sig_of(pc, hit, core);
    nbusy = 2;
    if (s % 32 == 0) begin
      int idx, stag, now, found, wway, el, best;
      n_sampled++;
      idx = (s / 32) * 8 + (tag % 8);
      stag = (tag / 8) % 1024;
      now = ts[s];
      found = -1;
      nbusy = 5;
      for (int k = 0; k < 5; k++) if (found < 0 && sc_v[idx][k] && sc_tag[idx][k] == stag) found = k;
      if (found >= 0) begin
        el = (now - sc_ts[idx][found] + 256) % 256;
        if (el <= 63) begin
          int ss;
          ss = sc_sig[idx][found];
          nbusy = 6;
          if (rdp_v[ss]) begin
            n_train++;
            if (el > rdp_rd[ss] && el - rdp_rd[ss] >= 16 && rdp_rd[ss] < 63) rdp_rd[ss]++;
            else if (el < rdp_rd[ss] && rdp_rd[ss] - el >= 16 && rdp_rd[ss] > 0) rdp_rd[ss]--;
          end else begin
            n_init++;
            rdp_v[ss] = 1; rdp_rd[ss] = el;
          end
        end
      end
      for (int k = 0; k < 5; k++) begin
        el = (now - sc_ts[idx][k] + 256) % 256;
        if (sc_v[idx][k] && el > 53 && k != found) begin
          n_detrain++;
          rdp_v[sc_sig[idx][k]] = 1; rdp_rd[sc_sig[idx][k]] = 63;
          sc_v[idx][k] = 0;
          nbusy += 2;
        end
      end
      wway = -1;
      if (found >= 0) wway = found;
      else for (int k = 0; k < 5; k++) if (wway < 0 && !sc_v[idx][k]) wway = k;
      if (wway < 0) begin
        n_scfull++;
        best = -1;
        for (int k = 0; k < 5; k++) begin
          el = (now - sc_ts[idx][k] + 256) % 256;
          if (el > best) begin best = el; wway = k; end
        end
      end
      sc_v[idx][wway] = 1; sc_tag[idx][wway] = stag; sc_sig[idx][wway] = sig; sc_ts[idx][wway] = now;
      ts[s] = (now + 1) % 256;
    end
    pred_v = rdp_v[sig]; pred_rd = rdp_rd[sig];
    nv = (pred_v && pred_rd <= 53) ? pred_rd / 8 : 7;
    if (eclk[s] == 7) begin
      n_wrap++;
      for (int k = 0; k < WAYS; k++)
        if (k != w && etr[s][k] != 7 && etr[s][k] != -7) begin
          etr[s][k]--;
          if (etr[s][k] < 0) n_neg++;
        end
    end
    etr[s][w] = nv;
    eclk[s] = (eclk[s] + 1) % 8;
    return nbusy;
  endfunction

  function automatic int model_victim(int s);
    int best, v, a;
    best = -1; v = 0;
    for (int k = 0; k < WAYS; k++) begin
      a = etr[s][k] < 0 ? -etr[s][k] : etr[s][k];
      if (a > best) begin best = a; v = k; end
    end
    return v;
  endfunction

  task automatic check_victim(int s);
    vic_set = 6'(s);
    #1;
    checks++;
    if (int'(vic_way) != model_victim(s)) begin
      failures++;
      $display("FAIL set %0d: victim %0d, expected %0d", s, vic_way, model_victim(s));
    end
  endtask

  int set_pool [6] = '{0, 32, 0, 1, 5, 32};
  logic [63:0] pc_pool [6] = '{64'h8000_1000, 64'h8000_1044, 64'h8000_2abc, 64'h8000_0010, 64'h8003_3330, 64'h8000_7ff8};

  initial begin
    for (int s = 0; s < SETS; s++) begin
      eclk[s] = 0; ts[s] = 0;
      for (int w = 0; w < WAYS; w++) etr[s][w] = 0;
    end
    for (int i = 0; i < SCS; i++) for (int k = 0; k < 5; k++) begin
      sc_v[i][k] = 0; sc_tag[i][k] = 0; sc_sig[i][k] = 0; sc_ts[i][k] = 0;
    end
    for (int i = 0; i < 2048; i++) begin rdp_v[i] = 0; rdp_rd[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      int s, w, tag, exp_busy, nb;
      bit hit, core;
      logic [63:0] pc;
      s = set_pool[$urandom_range(0, 5)];
      w = $urandom_range(0, WAYS - 1);
      // a small tag pool gives sampled-cache hits; occasional fresh tags fill it
      tag = ($urandom_range(0, 9) == 0) ? int'($urandom_range(0, 32'h1ff_ffff)) : int'($urandom_range(0, 23));
      hit = $urandom_range(0, 1);
      core = ($urandom_range(0, 7) == 0);
      pc = pc_pool[(i / 50 + $urandom_range(0, 1)) % 6];
      @(negedge clk);
      upd_valid = 1'b1; upd_set = 6'(s); upd_way = 3'(w); upd_hit = hit;
      upd_tag = 25'(tag); upd_pc = pc; upd_core = core;
      @(posedge clk);
      #1 upd_valid = 1'b0;
      exp_busy = model_update(s, w, hit, tag, pc, core);
      nb = 0;
      while (busy) begin @(posedge clk); #1 nb++; end
      checks++;
      if (nb != exp_busy) begin
        failures++;
        $display("FAIL update %0d set %0d: busy %0d cycles, expected %0d", i, s, nb, exp_busy);
      end
      check_victim(s);
      check_victim($urandom_range(0, SETS - 1));
    end
    checks++;
    if (n_train == 0 || n_init == 0 || n_detrain == 0 || n_wrap == 0 || n_neg == 0 || n_scfull == 0) begin
      failures++;
      $display("FAIL: a mechanism never happened");
    end
    $display("sampled %0d, RDP init %0d, RDP train %0d, detrain %0d, sampled-cache LRU %0d, ETR clock wraps %0d, negative ETRs %0d",
             n_sampled, n_init, n_train, n_detrain, n_scfull, n_wrap, n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
