// ebr_repl_r2_tb: the EBR unit with recency weight r = 2 (the second weight
// setting worth evaluating), checked exactly like ebr_repl_tb.
//
// A reference model keeps R, E and miss counters in plain arrays and computes
// each line's effectiveness r*R/(f*E) as a real number (E = 0 counts as
// infinite). Random hits and misses go to a 16-set, 8-way instance with r = 2,
// f = 1; after each one the victim of the touched set must be one of the
// ways of lowest effectiveness. The test counts miss-counter wraps (which age
// the E counters), counter saturations and ties resolved to a way other than
// the lowest-numbered one, and fails if any of these never happened.
module ebr_repl_r2_tb;
  localparam int unsigned SETS = 16;
  localparam int unsigned WAYS = 8;
  localparam int unsigned RW = 2;
  localparam int unsigned FW = 1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic upd_valid = 1'b0, upd_hit = 1'b0;
  logic [3:0] upd_set = '0, vic_set = '0;
  logic [2:0] upd_way = '0, vic_way;

  int checks = 0, failures = 0;
  int wraps = 0, r_sats = 0, e_sats = 0, ties = 0, ties_not_first = 0;
  int ref_r [SETS][WAYS];
  int ref_e [SETS][WAYS];
  int ref_m [SETS];

  ebr_repl #(.SETS(SETS), .WAYS(WAYS), .R_WEIGHT(RW), .F_WEIGHT(FW)) dut (.*);

  always #5 clk = ~clk;

  function automatic real eff(int s, int w);
    if (ref_e[s][w] == 0) return 1.0e30;
    return real'(RW * ref_r[s][w]) / real'(FW * ref_e[s][w]);
  endfunction

  task automatic check_victim(int s);
    real mn;
    int nmin, first;
    vic_set = 4'(s);
    #1;
    mn = 1.0e31; nmin = 0; first = -1;
    for (int w = 0; w < WAYS; w++) if (eff(s, w) < mn) mn = eff(s, w);
    for (int w = 0; w < WAYS; w++) if (eff(s, w) == mn) begin nmin++; if (first < 0) first = w; end
    checks++;
    if (eff(s, int'(vic_way)) != mn) begin
      failures++;
      $display("FAIL set %0d: victim %0d eff %f, minimum %f", s, vic_way, eff(s, int'(vic_way)), mn);
    end
    if (nmin > 1) begin
      ties++;
      if (int'(vic_way) != first) ties_not_first++;
    end
  endtask

  task automatic access(int s, int w, bit hit);
    @(negedge clk);
    upd_valid = 1'b1; upd_set = 4'(s); upd_way = 3'(w); upd_hit = hit;
    @(posedge clk); #1 upd_valid = 1'b0;
    if (hit) begin
      if (ref_r[s][w] < 31) ref_r[s][w]++; else r_sats++;
      ref_e[s][w] = 0;
    end else begin
      if (ref_m[s] == 3) begin
        wraps++;
        for (int k = 0; k < WAYS; k++) if (ref_e[s][k] < 7) ref_e[s][k]++; else e_sats++;
      end
      ref_m[s] = (ref_m[s] + 1) % 4;
      ref_r[s][w] = 1;
      ref_e[s][w] = 0;
    end
  endtask

  initial begin
    for (int s = 0; s < SETS; s++) begin
      ref_m[s] = 0;
      for (int w = 0; w < WAYS; w++) begin ref_r[s][w] = 0; ref_e[s][w] = 0; end
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // fill every way of set 5 with a miss, then hit way 2 forty times
    for (int w = 0; w < WAYS; w++) access(5, w, 1'b0);
    for (int i = 0; i < 40; i++) access(5, 2, 1'b1);
    check_victim(5);
    // fill set 7, then 40 misses all refilling way 0: the other ways' E saturate
    for (int w = 0; w < WAYS; w++) access(7, w, 1'b0);
    for (int i = 0; i < 40; i++) access(7, 0, 1'b0);
    check_victim(7);
    // random traffic; a miss replaces the DUT's victim, as a cache would
    for (int i = 0; i < 6000; i++) begin
      int s, w;
      bit hit;
      s = $urandom_range(0, 3);
      hit = ($urandom_range(0, 99) < 55);
      vic_set = 4'(s);
      #1;
      w = hit ? $urandom_range(0, WAYS - 1) : int'(vic_way);
      access(s, w, hit);
      check_victim(s);
    end
    checks++;
    if (wraps == 0 || r_sats == 0 || e_sats == 0 || ties_not_first == 0) begin
      failures++;
      $display("FAIL: coverage wraps=%0d r_sats=%0d e_sats=%0d ties_not_first=%0d",
               wraps, r_sats, e_sats, ties_not_first);
    end
    $display("miss-counter wraps %0d, R saturations %0d, E saturations %0d, ties %0d (%0d not lowest way)",
             wraps, r_sats, e_sats, ties, ties_not_first);
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
