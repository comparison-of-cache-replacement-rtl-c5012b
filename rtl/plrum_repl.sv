// plrum_repl: MRU-bit pseudo-LRU (PLRUm) replacement state for a set-associative cache.
//
// Every line owns one MRU bit. All bits are 0 after reset. When a line is
// accessed (a hit, or the fill after a miss) its bit is set to 1; if that
// makes every bit of the set 1, all other bits of the set are cleared so that
// only the line just accessed stays marked. The victim of a set is the first
// (lowest-numbered) way whose MRU bit is 0. This is the algorithm as the
// PLRUm scheme defines it; only the port layout is this design's own.
//
// Interface:
//   upd_valid/upd_set/upd_way  one access to report; state changes at the next edge
//   vic_set -> vic_way         combinational victim query on the current state
// Timing: one update per cycle, no busy state. Storage: SETS*WAYS bits
// (8192 bits for the 1024-set, 8-way L2).
module plrum_repl #(
  parameter int unsigned SETS  = 1024,
  parameter int unsigned WAYS  = 8,
  localparam int unsigned SET_W = $clog2(SETS),
  localparam int unsigned WAY_W = $clog2(WAYS)
) (
  input  logic             clk,
  input  logic             rst_n,
  // update port
  input  logic             upd_valid,
  input  logic [SET_W-1:0] upd_set,
  input  logic [WAY_W-1:0] upd_way,
  // eviction query
  input  logic [SET_W-1:0] vic_set,
  output logic [WAY_W-1:0] vic_way
);

  logic [WAYS-1:0] mru_q [SETS];

  // Next MRU vector of the updated set
  logic [WAYS-1:0] row_set, row_next;
  always_comb begin
    row_set = mru_q[upd_set];
    row_set[upd_way] = 1'b1;
    if (&row_set) begin
      row_next = '0;
      row_next[upd_way] = 1'b1;
    end else begin
      row_next = row_set;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) mru_q[s] <= '0;
    end else if (upd_valid) begin
      mru_q[upd_set] <= row_next;
    end
  end

  // First way whose MRU bit is clear. The update rule always leaves at least
  // one clear bit when WAYS > 1, so the default of way 0 is never a guess.
  logic [WAYS-1:0] vic_row;
  always_comb begin
    vic_row = mru_q[vic_set];
    vic_way = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (!vic_row[w]) vic_way = WAY_W'(w);
    end
  end

endmodule
