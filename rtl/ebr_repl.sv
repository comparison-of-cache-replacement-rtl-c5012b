// ebr_repl: Effectiveness-Based Replacement (EBR, static-weight variant).
//
// Each line has a saturating reference counter R and a saturating elapsed
// counter E; each set has a wrapping miss counter. On a hit, R of the line is
// incremented and its E cleared. On a miss, the set's miss counter is
// incremented and, when it wraps (every 4th miss with 2 bits), every E of the
// set is incremented; the line being filled then gets R = 1 and E = 0 (its old
// counters are reset by the eviction and the fill counts as one reference).
// The victim is the way with the lowest effectiveness
//     Eff(i) = r * R(i) / (f * E(i))
// with static weights r and f. Ties are broken pseudo-randomly with a 16-bit
// LFSR: the search for a minimum starts at a random way and wraps around.
//
// Instead of a divider, two effectivenesses are compared exactly by cross
// multiplication, r*R(a)*f*E(b) < r*R(b)*f*E(a); a line with E = 0 has
// infinite effectiveness (never preferred over a line with E > 0). The
// counter widths (R 5 bits, E 3 bits, miss 2 bits), f = 1 and the default
// r = 8 follow the EBR implementation this design is modelled on; r = 2 was
// the other weight evaluated. Cross multiplication, the fill value R = 1 and
// the rotating tie-break are this design's choices.
//
// Interface: upd_valid/upd_set/upd_way/upd_hit report one access (state
// changes at the next edge); vic_set -> vic_way is a combinational query.
// One update per cycle, no busy state.
module ebr_repl #(
  parameter int unsigned SETS     = 1024,
  parameter int unsigned WAYS     = 8,
  parameter int unsigned R_W      = 5,
  parameter int unsigned E_W      = 3,
  parameter int unsigned MISS_W   = 2,
  parameter int unsigned R_WEIGHT = 8,
  parameter int unsigned F_WEIGHT = 1,
  localparam int unsigned SET_W = $clog2(SETS),
  localparam int unsigned WAY_W = $clog2(WAYS)
) (
  input  logic             clk,
  input  logic             rst_n,
  // update port
  input  logic             upd_valid,
  input  logic [SET_W-1:0] upd_set,
  input  logic [WAY_W-1:0] upd_way,
  input  logic             upd_hit,
  // eviction query
  input  logic [SET_W-1:0] vic_set,
  output logic [WAY_W-1:0] vic_way
);

  localparam logic [R_W-1:0] R_MAX = '1;
  localparam logic [E_W-1:0] E_MAX = '1;
  // width of r*R and f*E, and of their cross product
  localparam int unsigned NUM_W  = R_W + $clog2(R_WEIGHT + 1);
  localparam int unsigned DEN_W  = E_W + $clog2(F_WEIGHT + 1);
  localparam int unsigned PROD_W = NUM_W + DEN_W;

  logic [WAYS-1:0][R_W-1:0]  r_q    [SETS];
  logic [WAYS-1:0][E_W-1:0]  e_q    [SETS];
  logic [MISS_W-1:0]         miss_q [SETS];
  logic [15:0]               lfsr_q;

  // ---------------------------------------------------------------- update
  logic [WAYS-1:0][R_W-1:0] r_row, r_next;
  logic [WAYS-1:0][E_W-1:0] e_row, e_next;
  logic [MISS_W-1:0]        miss_next;

  always_comb begin
    r_row     = r_q[upd_set];
    e_row     = e_q[upd_set];
    r_next    = r_row;
    e_next    = e_row;
    miss_next = miss_q[upd_set];
    if (upd_hit) begin
      if (r_row[upd_way] != R_MAX) r_next[upd_way] = r_row[upd_way] + 1'b1;
      e_next[upd_way] = '0;
    end else begin
      miss_next = miss_q[upd_set] + 1'b1;
      if (&miss_q[upd_set]) begin
        for (int w = 0; w < WAYS; w++)
          if (e_row[w] != E_MAX) e_next[w] = e_row[w] + 1'b1;
      end
      r_next[upd_way] = R_W'(1);
      e_next[upd_way] = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        r_q[s]    <= '0;
        e_q[s]    <= '0;
        miss_q[s] <= '0;
      end
      lfsr_q <= 16'hACE1;
    end else begin
      // x^16 + x^14 + x^13 + x^11 + 1, advances every cycle
      lfsr_q <= {lfsr_q[14:0], lfsr_q[15] ^ lfsr_q[13] ^ lfsr_q[12] ^ lfsr_q[10]};
      if (upd_valid) begin
        r_q[upd_set]    <= r_next;
        e_q[upd_set]    <= e_next;
        miss_q[upd_set] <= miss_next;
      end
    end
  end

  // ---------------------------------------------------------------- victim
  logic [WAYS-1:0][NUM_W-1:0] num;
  logic [WAYS-1:0][DEN_W-1:0] den;
  logic [WAYS-1:0]            is_min;

  // a is strictly less effective than b
  function automatic logic eff_less(input logic [NUM_W-1:0] na, input logic [DEN_W-1:0] da,
                                    input logic [NUM_W-1:0] nb, input logic [DEN_W-1:0] db);
    logic [PROD_W-1:0] lhs, rhs;
    if (da == '0) return 1'b0;          // a infinite
    if (db == '0) return 1'b1;          // b infinite, a finite
    lhs = PROD_W'(na) * PROD_W'(db);
    rhs = PROD_W'(nb) * PROD_W'(da);
    return lhs < rhs;
  endfunction

  always_comb begin
    for (int w = 0; w < WAYS; w++) begin
      num[w] = NUM_W'(R_WEIGHT) * NUM_W'(r_q[vic_set][w]);
      den[w] = DEN_W'(F_WEIGHT) * DEN_W'(e_q[vic_set][w]);
    end
    for (int i = 0; i < WAYS; i++) begin
      is_min[i] = 1'b1;
      for (int j = 0; j < WAYS; j++)
        if (eff_less(num[j], den[j], num[i], den[i])) is_min[i] = 1'b0;
    end
  end

  // random tie-break: first minimum at or after a random start way
  logic [WAY_W-1:0] start;
  always_comb begin
    logic found;
    start   = lfsr_q[WAY_W-1:0];
    vic_way = '0;
    found   = 1'b0;
    for (int k = 0; k < WAYS; k++) begin
      logic [WAY_W-1:0] w;
      w = start + WAY_W'(k);
      if (!found && is_min[w]) begin
        vic_way = w;
        found   = 1'b1;
      end
    end
  end

endmodule
