// plrum_repl_tb: self-checking test of the PLRUm replacement unit.
//
// A reference model keeps one MRU bit per line in plain arrays. Random accesses
// to a 16-set, 8-way instance are applied one per cycle; after each one the
// victim of a randomly chosen set is compared with the model's first zero bit.
// The test also counts how often the "all bits set, clear the others" rule
// fired and fails if it never did. A watchdog ends the run if it hangs.
module plrum_repl_tb;
  localparam int unsigned SETS = 16;
  localparam int unsigned WAYS = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic upd_valid = 1'b0;
  logic [3:0] upd_set = '0, vic_set = '0;
  logic [2:0] upd_way = '0, vic_way;

  int checks = 0, failures = 0, resets_seen = 0;
  logic [WAYS-1:0] ref_mru [SETS];

  plrum_repl #(.SETS(SETS), .WAYS(WAYS)) dut (.*);

  always #5 clk = ~clk;

  function automatic int ref_victim(int s);
    for (int w = 0; w < WAYS; w++) if (!ref_mru[s][w]) return w;
    return 0;
  endfunction

  task automatic check_victim(int s);
    vic_set = 4'(s);
    #1;
    checks++;
    if (int'(vic_way) != ref_victim(s)) begin
      failures++;
      $display("FAIL set %0d: victim %0d, expected %0d (bits %b)", s, vic_way, ref_victim(s), ref_mru[s]);
    end
  endtask

  initial begin
    for (int s = 0; s < SETS; s++) ref_mru[s] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int s = 0; s < SETS; s++) check_victim(s);   // all zero: way 0
    // Directed: touch ways in order 0..7 of set 3; the 8th access clears the rest
    for (int w = 0; w < WAYS; w++) begin
      @(negedge clk);
      upd_valid = 1'b1; upd_set = 4'd3; upd_way = 3'(w);
      @(posedge clk); #1 upd_valid = 1'b0;
      ref_mru[3][w] = 1'b1;
      if (&ref_mru[3]) begin ref_mru[3] = '0; ref_mru[3][w] = 1'b1; resets_seen++; end
      check_victim(3);
    end
    checks++;
    if (ref_victim(3) != 0) begin failures++; $display("FAIL directed sequence"); end
    // Random accesses, biased to few sets so the clear rule fires often
    for (int i = 0; i < 4000; i++) begin
      int s, w;
      s = $urandom_range(0, 3);
      w = $urandom_range(0, WAYS - 1);
      @(negedge clk);
      upd_valid = 1'b1; upd_set = 4'(s); upd_way = 3'(w);
      @(posedge clk); #1 upd_valid = 1'b0;
      ref_mru[s][w] = 1'b1;
      if (&ref_mru[s]) begin ref_mru[s] = '0; ref_mru[s][w] = 1'b1; resets_seen++; end
      check_victim($urandom_range(0, SETS - 1));
      check_victim(s);
    end
    checks++;
    if (resets_seen == 0) begin failures++; $display("FAIL: MRU clear never happened"); end
    $display("MRU clears: %0d", resets_seen);
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
