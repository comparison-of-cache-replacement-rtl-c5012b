// l2_repl_top: the three proposed L2 replacement policies side by side.
//
// Three copies of the L2 tag controller, one with PLRUm, one with EBR and one
// with Mockingjay replacement, receive the same stream of L2 requests (line
// address, read/write, PC, core ID) so that their hit ratios, evictions and
// write-backs can be compared on one workload, which is how the policies are
// evaluated. A request is accepted by all three in the same cycle, so the
// shared req_ready is the AND of the three (Mockingjay's update FSM is the
// only source of back-pressure). Each copy keeps its own tags and state and
// reports its own response and counters; index 0 is PLRUm, 1 is EBR, 2 is
// Mockingjay. Because the copies only see requests that all three accept,
// their own stall counters stay at zero here; stall_cycles counts the cycles a
// request waited at the shared input.
//
// Running the three copies in lock-step is this design's arrangement for
// comparison; in a product one of them would be chosen.
//
// Timing: responses appear one cycle after acceptance, all three together.
module l2_repl_top
  import repl_pkg::*;
#(
  parameter int unsigned SETS = L2_SETS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  output logic              req_ready,
  input  logic [ADDR_W-1:0] req_addr,
  input  logic              req_we,
  input  logic [PC_W-1:0]   req_pc,
  input  logic              req_core,
  output logic              resp_valid,
  output l2_resp_t  [2:0]   resp,
  output l2_stats_t [2:0]   stats,
  output logic [31:0]       stall_cycles  // cycles a request waited for req_ready
);

  localparam policy_e POLS [3] = '{POL_PLRUM, POL_EBR, POL_MJAY};

  logic [2:0] ready;
  logic [2:0] rvalid;

  assign req_ready  = &ready;
  assign resp_valid = rvalid[0];

  for (genvar i = 0; i < 3; i++) begin : g_l2
    l2_tag_ctrl #(.SETS(SETS), .POLICY(POLS[i])) u_l2 (
      .clk, .rst_n,
      .req_valid  (req_valid && req_ready),
      .req_ready  (ready[i]),
      .req_addr,
      .req_we,
      .req_pc,
      .req_core,
      .resp_valid (rvalid[i]),
      .resp       (resp[i]),
      .stats      (stats[i])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       stall_cycles <= '0;
    else if (req_valid && !req_ready) stall_cycles <= stall_cycles + 1;
  end

  // All copies accept together, so their responses stay aligned.
  a_resp_aligned: assert property (@(posedge clk) disable iff (!rst_n)
                                   rvalid[0] == rvalid[1] && rvalid[1] == rvalid[2])
    else $error("l2_repl_top: responses out of step");

endmodule
