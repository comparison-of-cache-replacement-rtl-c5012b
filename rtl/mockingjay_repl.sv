// mockingjay_repl: Mockingjay predictive replacement for the 1024-set, 8-way L2.
//
// Mockingjay estimates when each cached line will next be used and evicts the
// line whose estimate is furthest from "now". Its parts:
//   * sampled cache: 5-way, 256-set side cache that logs accesses to every
//     32nd L2 set. Entry = valid, 10-bit partial tag, 11-bit PC signature,
//     8-bit timestamp. Replacement inside it is LRU by timestamp.
//   * reuse distance predictor (RDP): 2048 entries indexed by PC signature,
//     each a valid bit and a 6-bit reuse distance.
//   * ETR counters: one signed 4-bit "estimated time remaining" per L2 line.
//   * per-set 8-bit timestamp (advanced on each access to a sampled set) and
//     per-set 3-bit ETR clock (advanced on each access to the set; when it
//     wraps, the other ETRs of the set count down by one).
// Victim: the way with the largest |ETR| (first such way on a tie).
//
// An update is run by an 8-state FSM, one state per cycle:
//   IDLE       accept upd_valid, form the PC signature
//   SC_SEARCH  (sampled sets only) look the address up in the sampled cache
//   RDP_TRAIN  on a sampled-cache hit: train the RDP entry of the stored
//              signature with the observed reuse distance (temporal difference)
//   SC_LRU     mark lines older than MAX_RD as expired, else choose the way to
//              write: the matching way, an invalid way, or the oldest line
//   DETRAIN    one expired line: set its signature's RDP entry to INF_RD and
//              invalidate it, then return to SC_LRU
//   SC_WRITE   write the access into the sampled cache, advance the timestamp
//   ETR_RD     read the RDP prediction of the access's signature
//   ETR_WR     set the line's ETR (prediction/8, or INF_ETR when there is no
//              valid prediction or it exceeds MAX_RD), tick the ETR clock
// An access to a non-sampled set goes IDLE -> ETR_RD -> ETR_WR; busy is high
// for 2 cycles after the accepting edge. A sampled access keeps busy high for
// 6 cycles when it trains the RDP, 5 when it does not, plus 2 per expired
// sampled-cache line. The L2 controller must hold new requests while
// busy is high. vic_set -> vic_way is combinational.
//
// Sizes, INF_RD = 63, MAX_RD = 53, INF_ETR = 7, the 32-set sampling stride,
// the state sequence and the ETR rules follow the Mockingjay implementation
// for this L2. This design's own choices: the PC hash (repl_pkg), the sampled
// cache index/tag split ({set[9:5], tag[2:0]} and tag[12:3]), the
// temporal-difference step (move the prediction by one towards the sample when
// they differ by 16 or more), training only when the sample is <= INF_RD, and
// reusing the matching sampled-cache way for the new entry.
module mockingjay_repl
  import repl_pkg::*;
#(
  parameter int unsigned SETS          = 1024,
  parameter int unsigned WAYS          = 8,
  parameter int unsigned TAG_W         = 25,   // L2 tag width of the request address
  parameter int unsigned SAMPLE_STRIDE = 32,   // every 32nd set is sampled
  parameter int unsigned SC_SUB        = 8,    // sampled-cache sets per sampled L2 set
  parameter int unsigned SC_WAYS       = 5,
  parameter int unsigned SC_TAG_W      = 10,
  parameter int unsigned SIG_W         = 11,
  parameter int unsigned TS_W          = 8,
  parameter int unsigned RD_W          = 6,
  parameter int unsigned ETR_W         = 4,
  parameter int unsigned ETR_CLK_W     = 3,
  parameter int unsigned INF_RD        = 63,
  parameter int unsigned MAX_RD        = 53,
  parameter int unsigned INF_ETR       = 7,
  localparam int unsigned SET_W    = $clog2(SETS),
  localparam int unsigned WAY_W    = $clog2(WAYS),
  localparam int unsigned STRIDE_W = $clog2(SAMPLE_STRIDE),
  localparam int unsigned SUB_W    = $clog2(SC_SUB),
  localparam int unsigned SC_SETS  = (SETS / SAMPLE_STRIDE) * SC_SUB,
  localparam int unsigned SCI_W    = $clog2(SC_SETS),
  localparam int unsigned SCW_W    = $clog2(SC_WAYS)
) (
  input  logic             clk,
  input  logic             rst_n,
  // update port (accepted only while busy is low)
  input  logic             upd_valid,
  input  logic [SET_W-1:0] upd_set,
  input  logic [WAY_W-1:0] upd_way,
  input  logic             upd_hit,
  input  logic [TAG_W-1:0] upd_tag,
  input  logic [PC_W-1:0]  upd_pc,
  input  logic             upd_core,
  output logic             busy,
  // eviction query
  input  logic [SET_W-1:0] vic_set,
  output logic [WAY_W-1:0] vic_way
);

  typedef struct packed {
    logic                valid;
    logic [SC_TAG_W-1:0] tag;
    logic [SIG_W-1:0]    sig;
    logic [TS_W-1:0]     ts;
  } sc_line_t;

  typedef struct packed {
    logic            valid;
    logic [RD_W-1:0] rd;
  } rdp_entry_t;

  typedef enum logic [2:0] {
    S_IDLE, S_SC_SEARCH, S_RDP_TRAIN, S_SC_LRU, S_DETRAIN, S_SC_WRITE, S_ETR_RD, S_ETR_WR
  } state_e;

  localparam logic signed [ETR_W-1:0] ETR_INF  = ETR_W'(INF_ETR);
  localparam logic signed [ETR_W-1:0] ETR_NINF = -ETR_W'(INF_ETR);

  // ---------------------------------------------------------------- storage
  sc_line_t   [SC_WAYS-1:0]       sc_q      [SC_SETS];
  rdp_entry_t                     rdp_q     [2**SIG_W];
  logic signed [WAYS-1:0][ETR_W-1:0] etr_q  [SETS];
  logic [ETR_CLK_W-1:0]           etr_clk_q [SETS];
  logic [TS_W-1:0]                ts_q      [SETS];

  // ---------------------------------------------------------------- FSM registers
  state_e             st_q;
  logic [SET_W-1:0]   set_r;
  logic [WAY_W-1:0]   way_r;
  logic [SIG_W-1:0]   sig_r;
  logic [SCI_W-1:0]   scidx_r;
  logic [SC_TAG_W-1:0] sctag_r;
  logic               mfound_r;
  logic [SCW_W-1:0]   mway_r;
  logic [SIG_W-1:0]   train_sig_r;
  logic [TS_W-1:0]    sample_r;
  logic [SCW_W-1:0]   lru_way_r;
  rdp_entry_t         pred_r;

  assign busy = (st_q != S_IDLE);

  // ---------------------------------------------------------------- combinational helpers
  sc_line_t [SC_WAYS-1:0] sc_row;
  logic [SC_WAYS-1:0][TS_W-1:0] elapsed;
  logic [TS_W-1:0]    ts_now;
  logic               hit_found;
  logic [SCW_W-1:0]   hit_way;
  logic               any_expired;
  logic [SCW_W-1:0]   exp_way;
  logic               any_invalid;
  logic [SCW_W-1:0]   inv_way;
  logic [SCW_W-1:0]   old_way;
  logic [TS_W-1:0]    old_el;

  always_comb begin
    sc_row      = sc_q[scidx_r];
    ts_now      = ts_q[set_r];
    hit_found   = 1'b0;
    hit_way     = '0;
    any_expired = 1'b0;
    exp_way     = '0;
    any_invalid = 1'b0;
    inv_way     = '0;
    old_way     = '0;
    for (int w = 0; w < SC_WAYS; w++) begin
      elapsed[w] = ts_now - sc_row[w].ts;   // modulo 2**TS_W
    end
    for (int w = SC_WAYS - 1; w >= 0; w--) begin
      if (sc_row[w].valid && sc_row[w].tag == sctag_r) begin
        hit_found = 1'b1;
        hit_way   = SCW_W'(w);
      end
      if (sc_row[w].valid && elapsed[w] > TS_W'(MAX_RD)
          && !(mfound_r && mway_r == SCW_W'(w))) begin
        any_expired = 1'b1;
        exp_way     = SCW_W'(w);
      end
      if (!sc_row[w].valid) begin
        any_invalid = 1'b1;
        inv_way     = SCW_W'(w);
      end
    end
    // oldest line (largest elapsed time), first on a tie
    old_el = elapsed[0];
    for (int w = 1; w < SC_WAYS; w++) begin
      if (elapsed[w] > old_el) begin
        old_el  = elapsed[w];
        old_way = SCW_W'(w);
      end
    end
  end

  // Temporal-difference update of a prediction towards a new sample
  function automatic logic [RD_W-1:0] td_update(input logic [RD_W-1:0] init,
                                                input logic [TS_W-1:0] sample);
    logic [TS_W-1:0] i;
    i = TS_W'(init);
    if (sample > i && (sample - i) >= TS_W'(16)) begin
      return (init == RD_W'(INF_RD)) ? init : init + 1'b1;
    end else if (sample < i && (i - sample) >= TS_W'(16)) begin
      return (init == '0) ? init : init - 1'b1;
    end
    return init;
  endfunction

  // New ETR from a prediction
  logic signed [ETR_W-1:0] etr_new;
  always_comb begin
    if (pred_r.valid && pred_r.rd <= RD_W'(MAX_RD)) etr_new = ETR_W'(pred_r.rd >> 3);
    else                                            etr_new = ETR_INF;
  end

  // ---------------------------------------------------------------- sequential
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= S_IDLE;
      for (int s = 0; s < SC_SETS; s++) sc_q[s] <= '0;
      for (int e = 0; e < 2**SIG_W; e++) rdp_q[e] <= '0;
      for (int s = 0; s < SETS; s++) begin
        etr_q[s]     <= '0;
        etr_clk_q[s] <= '0;
        ts_q[s]      <= '0;
      end
      set_r       <= '0;
      way_r       <= '0;
      sig_r       <= '0;
      scidx_r     <= '0;
      sctag_r     <= '0;
      mfound_r    <= 1'b0;
      mway_r      <= '0;
      train_sig_r <= '0;
      sample_r    <= '0;
      lru_way_r   <= '0;
      pred_r      <= '0;
    end else begin
      unique case (st_q)
        S_IDLE: begin
          if (upd_valid) begin
            set_r    <= upd_set;
            way_r    <= upd_way;
            sig_r    <= SIG_W'(mj_pc_signature(upd_pc, upd_hit, upd_core));
            scidx_r  <= SCI_W'({upd_set >> STRIDE_W, upd_tag[SUB_W-1:0]});
            sctag_r  <= upd_tag[SUB_W +: SC_TAG_W];
            mfound_r <= 1'b0;
            st_q     <= (upd_set[STRIDE_W-1:0] == '0) ? S_SC_SEARCH : S_ETR_RD;
          end
        end
        S_SC_SEARCH: begin
          mfound_r    <= hit_found;
          mway_r      <= hit_way;
          train_sig_r <= sc_row[hit_way].sig;
          sample_r    <= elapsed[hit_way];
          st_q <= (hit_found && elapsed[hit_way] <= TS_W'(INF_RD)) ? S_RDP_TRAIN : S_SC_LRU;
        end
        S_RDP_TRAIN: begin
          if (rdp_q[train_sig_r].valid)
            rdp_q[train_sig_r].rd <= td_update(rdp_q[train_sig_r].rd, sample_r);
          else
            rdp_q[train_sig_r] <= '{valid: 1'b1, rd: RD_W'(sample_r)};
          st_q <= S_SC_LRU;
        end
        S_SC_LRU: begin
          if (any_expired) begin
            lru_way_r <= exp_way;
            st_q      <= S_DETRAIN;
          end else begin
            lru_way_r <= mfound_r    ? mway_r  :
                         any_invalid ? inv_way : old_way;
            st_q      <= S_SC_WRITE;
          end
        end
        S_DETRAIN: begin
          rdp_q[sc_row[lru_way_r].sig] <= '{valid: 1'b1, rd: RD_W'(INF_RD)};
          sc_q[scidx_r][lru_way_r].valid <= 1'b0;
          st_q <= S_SC_LRU;
        end
        S_SC_WRITE: begin
          sc_q[scidx_r][lru_way_r] <= '{valid: 1'b1, tag: sctag_r, sig: sig_r, ts: ts_now};
          ts_q[set_r] <= ts_now + 1'b1;
          st_q <= S_ETR_RD;
        end
        S_ETR_RD: begin
          pred_r <= rdp_q[sig_r];
          st_q   <= S_ETR_WR;
        end
        S_ETR_WR: begin
          for (int w = 0; w < WAYS; w++) begin
            if (WAY_W'(w) == way_r) begin
              etr_q[set_r][w] <= etr_new;
            end else if (&etr_clk_q[set_r] && etr_q[set_r][w] != ETR_INF
                         && etr_q[set_r][w] != ETR_NINF) begin
              etr_q[set_r][w] <= etr_q[set_r][w] - 1'b1;
            end
          end
          etr_clk_q[set_r] <= etr_clk_q[set_r] + 1'b1;
          st_q <= S_IDLE;
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------------------- victim
  logic [ETR_W-1:0] best_abs;
  always_comb begin
    logic [ETR_W-1:0] a;
    vic_way  = '0;
    best_abs = '0;
    for (int w = 0; w < WAYS; w++) begin
      a = etr_q[vic_set][w][ETR_W-1] ? -etr_q[vic_set][w] : etr_q[vic_set][w];
      if (w == 0 || a > best_abs) begin
        best_abs = a;
        vic_way  = WAY_W'(w);
      end
    end
  end

  // The controller must not present an update while the FSM is busy.
  a_no_upd_when_busy: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !upd_valid)
    else $error("mockingjay_repl: update presented while busy");

endmodule
