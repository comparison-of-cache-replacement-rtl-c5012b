// l2_tag_ctrl: tag directory and lookup controller of the 8-way, write-back L2,
// with a selectable replacement unit (PLRUm, EBR or Mockingjay).
//
// A request (line address, read/write, PC and core ID of the access) is looked
// up in the tag array in the cycle it is accepted. On a hit the matching way is
// used; on a miss the first invalid way is filled, and only when the set is
// full is the replacement unit asked for a victim. The evicted line is
// reported, with its address and a write-back flag when it was dirty. Writes
// allocate and mark the line dirty (write-back, write-allocate). Every
// accepted request, hit or miss, is reported to the replacement unit's update
// logic, which snoops the lookup result; the victim query is answered
// combinationally by the unit's eviction logic. While the replacement unit is
// still busy with the previous update (Mockingjay only), req_ready is low and
// the controller waits.
//
// Only the replacement-relevant state is modelled: tags, valid and dirty
// bits. The data array, the CPU-side packet protocol, the AXI memory side,
// atomics and coherence are outside this block. The geometry (1024 sets,
// 8 ways, 32-byte lines, write-back) is the HPC L2's; the address width, the
// request/response handshake, invalid-way-first filling and the counters'
// exact definitions are this design's choices.
//
// Timing: req_valid && req_ready accepts a request; resp_valid and resp follow
// one cycle later. With PLRUm or EBR one request is accepted per cycle.
module l2_tag_ctrl
  import repl_pkg::*;
#(
  parameter int unsigned SETS   = L2_SETS,
  parameter policy_e     POLICY = POL_MJAY,
  localparam int unsigned WAYS  = L2_WAYS,
  localparam int unsigned OFF_W = $clog2(LINE_BYTES),
  localparam int unsigned SET_W = $clog2(SETS),
  localparam int unsigned WAY_W = $clog2(WAYS),
  localparam int unsigned TAG_W = ADDR_W - OFF_W - SET_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // request
  input  logic              req_valid,
  output logic              req_ready,
  input  logic [ADDR_W-1:0] req_addr,
  input  logic              req_we,
  input  logic [PC_W-1:0]   req_pc,
  input  logic              req_core,
  // response, one cycle after acceptance
  output logic              resp_valid,
  output l2_resp_t          resp,
  // event counters
  output l2_stats_t         stats
);

  logic [WAYS-1:0][TAG_W-1:0] tag_q   [SETS];
  logic [WAYS-1:0]            valid_q [SETS];
  logic [WAYS-1:0]            dirty_q [SETS];

  logic [SET_W-1:0] set;
  logic [TAG_W-1:0] tag;
  assign set = req_addr[OFF_W +: SET_W];
  assign tag = req_addr[ADDR_W-1 -: TAG_W];

  // ---------------------------------------------------------------- lookup
  logic             hit, any_inv;
  logic [WAY_W-1:0] hit_way, inv_way, pol_vic_way, fill_way;
  logic             pol_busy;
  logic             fire;

  always_comb begin
    hit     = 1'b0;
    hit_way = '0;
    any_inv = 1'b0;
    inv_way = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (valid_q[set][w] && tag_q[set][w] == tag) begin
        hit     = 1'b1;
        hit_way = WAY_W'(w);
      end
      if (!valid_q[set][w]) begin
        any_inv = 1'b1;
        inv_way = WAY_W'(w);
      end
    end
    fill_way = hit ? hit_way : (any_inv ? inv_way : pol_vic_way);
  end

  assign req_ready = !pol_busy;
  assign fire      = req_valid && req_ready;

  // ---------------------------------------------------------------- replacement unit
  if (POLICY == POL_PLRUM) begin : g_plrum
    plrum_repl #(.SETS(SETS), .WAYS(WAYS)) u_repl (
      .clk, .rst_n,
      .upd_valid (fire),
      .upd_set   (set),
      .upd_way   (fill_way),
      .vic_set   (set),
      .vic_way   (pol_vic_way)
    );
    assign pol_busy = 1'b0;
  end else if (POLICY == POL_EBR) begin : g_ebr
    ebr_repl #(.SETS(SETS), .WAYS(WAYS)) u_repl (
      .clk, .rst_n,
      .upd_valid (fire),
      .upd_set   (set),
      .upd_way   (fill_way),
      .upd_hit   (hit),
      .vic_set   (set),
      .vic_way   (pol_vic_way)
    );
    assign pol_busy = 1'b0;
  end else begin : g_mjay
    mockingjay_repl #(.SETS(SETS), .WAYS(WAYS), .TAG_W(TAG_W)) u_repl (
      .clk, .rst_n,
      .upd_valid (fire),
      .upd_set   (set),
      .upd_way   (fill_way),
      .upd_hit   (hit),
      .upd_tag   (tag),
      .upd_pc    (req_pc),
      .upd_core  (req_core),
      .busy      (pol_busy),
      .vic_set   (set),
      .vic_way   (pol_vic_way)
    );
  end

  // ---------------------------------------------------------------- state update
  logic evict, wb;
  assign evict = !hit && !any_inv;
  assign wb    = evict && dirty_q[set][fill_way];

  always_ff @(posedge clk) begin
    if (fire) tag_q[set][fill_way] <= tag;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        valid_q[s] <= '0;
        dirty_q[s] <= '0;
      end
      resp_valid <= 1'b0;
      resp       <= '0;
      stats      <= '0;
    end else begin
      resp_valid <= fire;
      if (fire) begin
        valid_q[set][fill_way] <= 1'b1;
        dirty_q[set][fill_way] <= req_we || (hit && dirty_q[set][fill_way]);
        resp.hit        <= hit;
        resp.way        <= 3'(fill_way);
        resp.evict      <= evict;
        resp.wb         <= wb;
        resp.evict_addr <= evict ? {tag_q[set][fill_way], set, OFF_W'(0)} : '0;
        if (hit) stats.hits   <= stats.hits + 1;
        else     stats.misses <= stats.misses + 1;
        if (evict) stats.evictions  <= stats.evictions + 1;
        if (wb)    stats.writebacks <= stats.writebacks + 1;
      end
      if (req_valid && !req_ready) stats.stall_cycles <= stats.stall_cycles + 1;
    end
  end

endmodule
