// l2_tag_ctrl_tb: self-checking test of the L2 tag controller with PLRUm.
//
// A 16-set instance receives random reads and writes whose addresses come
// from 12 tags in 4 sets, so hits, fills of invalid ways, evictions and
// dirty write-backs all occur. A reference model (tags, valid and dirty bits,
// and its own MRU bits) predicts every response field: hit, way, evict,
// write-back and the evicted line's address, and the final hit/miss/eviction/
// write-back counters. Requests are issued back to back to check that the
// PLRUm controller accepts one per cycle with its response one cycle later.
module l2_tag_ctrl_tb;
  import repl_pkg::*;
  localparam int unsigned SETS = 16;
  localparam int unsigned WAYS = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic req_valid = 1'b0, req_we = 1'b0, req_core = 1'b0;
  logic req_ready;
  logic [ADDR_W-1:0] req_addr = '0;
  logic [PC_W-1:0] req_pc = '0;
  logic resp_valid;
  l2_resp_t resp;
  l2_stats_t stats;

  l2_tag_ctrl #(.SETS(SETS), .POLICY(POL_PLRUM)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_evict = 0, n_wb = 0;
  bit m_v [SETS][WAYS];
  bit m_d [SETS][WAYS];
  longint m_tag [SETS][WAYS];
  bit m_mru [SETS][WAYS];

  // expected response of the request issued in the previous cycle
  bit e_pending = 0;
  bit e_hit, e_evict, e_wb;
  int e_way;
  longint e_eaddr;

  task automatic model(longint addr, bit we);
    int s, way, all;
    longint tag;
    s = int'((addr >> 5) % SETS);
    tag = addr >> 9;
    e_hit = 0; e_evict = 0; e_wb = 0; e_eaddr = 0; way = -1;
    for (int w = 0; w < WAYS; w++) if (way < 0 && m_v[s][w] && m_tag[s][w] == tag) begin way = w; e_hit = 1; end
    if (way < 0) for (int w = 0; w < WAYS; w++) if (way < 0 && !m_v[s][w]) way = w;
    if (way < 0) begin
      for (int w = 0; w < WAYS; w++) if (way < 0 && !m_mru[s][w]) way = w;
      e_evict = 1;
      e_wb = m_d[s][way];
      e_eaddr = (m_tag[s][way] << 9) | (longint'(s) << 5);
    end
    e_way = way;
    m_d[s][way] = we || (e_hit && m_d[s][way]);
    m_v[s][way] = 1;
    m_tag[s][way] = tag;
    m_mru[s][way] = 1;
    all = 1;
    for (int w = 0; w < WAYS; w++) if (!m_mru[s][w]) all = 0;
    if (all) for (int w = 0; w < WAYS; w++) m_mru[s][w] = (w == way);
    if (e_hit) n_hit++; else n_miss++;
    if (e_evict) n_evict++;
    if (e_wb) n_wb++;
  endtask

  // compare the response with the expectation at every rising edge
  always @(posedge clk) begin
    if (rst_n) begin
      if (e_pending) begin
        checks++;
        if (!resp_valid || resp.hit != e_hit || int'(resp.way) != e_way || resp.evict != e_evict
            || resp.wb != e_wb || (e_evict && longint'(resp.evict_addr) != e_eaddr)) begin
          failures++;
          $display("FAIL resp: got v%0d h%0d w%0d e%0d wb%0d a%h, exp h%0d w%0d e%0d wb%0d a%h",
                   resp_valid, resp.hit, resp.way, resp.evict, resp.wb, resp.evict_addr,
                   e_hit, e_way, e_evict, e_wb, e_eaddr);
        end
      end else if (resp_valid) begin
        checks++; failures++;
        $display("FAIL: unexpected response");
      end
    end
  end

  initial begin
    for (int s = 0; s < SETS; s++) for (int w = 0; w < WAYS; w++) begin
      m_v[s][w] = 0; m_d[s][w] = 0; m_tag[s][w] = 0; m_mru[s][w] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      longint addr;
      bit we;
      addr = (longint'($urandom_range(0, 11)) << 9) | (longint'($urandom_range(0, 3)) << 5)
             | longint'($urandom_range(0, 31));
      we = ($urandom_range(0, 3) == 0);
      @(negedge clk);
      req_valid = 1'b1; req_addr = ADDR_W'(addr); req_we = we;
      req_pc = 64'h8000_0000 + 64'(4 * i);
      checks++;
      if (!req_ready) begin failures++; $display("FAIL: PLRUm controller not ready"); end
      @(posedge clk);
      #1;
      model(addr, we);
      e_pending = 1;
    end
    @(negedge clk);
    req_valid = 1'b0;
    @(posedge clk);
    #1 e_pending = 0;
    @(negedge clk);
    checks++;
    if (stats.hits != 32'(n_hit) || stats.misses != 32'(n_miss) || stats.evictions != 32'(n_evict)
        || stats.writebacks != 32'(n_wb) || stats.stall_cycles != 0) begin
      failures++;
      $display("FAIL stats: %0d/%0d/%0d/%0d exp %0d/%0d/%0d/%0d", stats.hits, stats.misses,
               stats.evictions, stats.writebacks, n_hit, n_miss, n_evict, n_wb);
    end
    checks++;
    if (n_hit == 0 || n_evict == 0 || n_wb == 0) begin failures++; $display("FAIL: coverage"); end
    $display("hits %0d misses %0d evictions %0d write-backs %0d", n_hit, n_miss, n_evict, n_wb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
