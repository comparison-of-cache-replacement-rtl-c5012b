// repl_pkg: types, constants and helper functions shared by the L2 replacement
// units (PLRUm, EBR, Mockingjay), the L2 tag controller and the top.
//
// The L2 geometry follows the HPC subsystem L2: 256 KiB, 8 ways, 1024 sets,
// which makes a 32-byte line. The physical address width (40 bits) is this
// design's own choice; the replacement policies only see set, way, tag and PC.
package repl_pkg;

  // L2 geometry
  localparam int unsigned L2_SETS    = 1024;
  localparam int unsigned L2_WAYS    = 8;
  localparam int unsigned LINE_BYTES = 32;   // 256 KiB / (8 ways * 1024 sets)
  localparam int unsigned ADDR_W     = 40;
  localparam int unsigned PC_W       = 64;

  // Replacement policy selector for l2_tag_ctrl
  typedef enum logic [1:0] {
    POL_PLRUM = 2'd0,
    POL_EBR   = 2'd1,
    POL_MJAY  = 2'd2
  } policy_e;

  // Response of one L2 lookup
  typedef struct packed {
    logic              hit;        // line was present
    logic [2:0]        way;        // way hit or filled
    logic              evict;      // a valid line was replaced
    logic              wb;         // the replaced line was dirty
    logic [ADDR_W-1:0] evict_addr; // line address (byte address, offset 0) of the replaced line
  } l2_resp_t;

  // Event counters kept per L2 instance
  typedef struct packed {
    logic [31:0] hits;
    logic [31:0] misses;
    logic [31:0] evictions;
    logic [31:0] writebacks;
    logic [31:0] stall_cycles;
  } l2_stats_t;

  // Mockingjay PC signature: an 11-bit hash of the request PC, the hit/miss
  // bit and the core ID. The hash itself is this design's choice: the PC
  // (without its two always-zero bits) is XOR-folded in 11-bit slices and the
  // hit bit and core ID are XORed into the two top bits.
  function automatic logic [10:0] mj_pc_signature(input logic [PC_W-1:0] pc,
                                                  input logic hit,
                                                  input logic core);
    logic [10:0] h;
    logic [PC_W-1:0] p;
    p = pc >> 2;
    h = '0;
    for (int i = 0; i < 5; i++) begin
      h ^= p[i*11 +: 11];
    end
    h[10] ^= hit;
    h[9]  ^= core;
    return h;
  endfunction

endpackage
