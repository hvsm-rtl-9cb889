// sp_assign: two-level SP assignment of HVSM.
//
// The SMs' SPs are seen through virtual SP IDs: virtual SP 0 is the best
// conditioned physical SP, and SP groups (SPGs) are formed from consecutive
// virtual IDs, so SPG 0 holds the best SPG_SIZE SPs, SPG 1 the next ones and
// so on. When a warp arrives for the SPs:
//   level 1: it goes to the available SPG with the best condition, i.e. the
//            lowest-numbered free SPG;
//   level 2: inside that SPG, the active threads of each pass are packed onto
//            the best SPs first: the k-th active thread of the pass goes to
//            virtual SP (SPG*SPG_SIZE + k), so under branch divergence the
//            idle SPs are always the worst ones of the group.
// An SPG executes a warp in WARP/SPG_SIZE passes (two half warps for the
// 32-thread warp and 16-SP groups of the main configuration), one pass per
// cycle.
//
// Interface: a warp is offered on iss_* and taken in a cycle where
// iss_valid and iss_ready are both high. Its first pass appears on slot one
// cycle later, the following passes on the next cycles. An SPG may take a new
// warp in the cycle of its last pass, so NUM_SPG groups sustain one warp per
// cycle when NUM_SPG >= WARP/SPG_SIZE. slot lists, per virtual SP, the
// thread operation it must execute this cycle; pass_* tells writeback which
// pass of which warp each SPG executes.
//
// The two-level policy is the HVSM one. The pass-per-cycle timing, the
// acceptance rule and the absence of any merging of passes are this design's
// own choices.
module sp_assign
  import hvsm_pkg::*;
#(
  parameter int unsigned NUM_SPG  = 2,
  parameter int unsigned SPG_SIZE = 16,
  parameter int unsigned WARP     = 32,
  localparam int unsigned NUM_SP  = NUM_SPG * SPG_SIZE,
  localparam int unsigned NPASS   = WARP / SPG_SIZE,
  localparam int unsigned PASS_W  = (NPASS > 1) ? $clog2(NPASS) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                iss_valid,
  output logic                iss_ready,
  input  sp_op_e              iss_op,
  input  logic [WID_W-1:0]    iss_warp,
  input  logic [WARP-1:0]     iss_mask,
  input  logic [DATA_W-1:0]   iss_a [WARP],
  input  logic [DATA_W-1:0]   iss_b [WARP],
  output logic [GRP_W-1:0]    iss_grp,          // SPG chosen for the offered warp
  output sp_req_t             slot  [NUM_SP],   // per virtual SP
  output logic [NUM_SPG-1:0]  pass_valid,
  output logic [WID_W-1:0]    pass_warp [NUM_SPG],
  output logic [PASS_W-1:0]   pass_idx  [NUM_SPG],
  output logic [SPG_SIZE-1:0] pass_mask [NUM_SPG]
);

  logic [NUM_SPG-1:0]  busy;
  logic [PASS_W-1:0]   pass   [NUM_SPG];
  sp_op_e              g_op   [NUM_SPG];
  logic [WID_W-1:0]    g_warp [NUM_SPG];
  logic [WARP-1:0]     g_mask [NUM_SPG];
  logic [DATA_W-1:0]   g_a    [NUM_SPG][WARP];
  logic [DATA_W-1:0]   g_b    [NUM_SPG][WARP];

  logic [NUM_SPG-1:0]  free;
  logic                found;
  logic [GRP_W-1:0]    sel;

  // level 1: best (lowest-numbered) free SPG
  always_comb begin
    found = 1'b0;
    sel   = '0;
    for (int g = 0; g < NUM_SPG; g++) begin
      free[g] = !busy[g] || (pass[g] == PASS_W'(NPASS - 1));
      if (free[g] && !found) begin
        found = 1'b1;
        sel   = GRP_W'(g);
      end
    end
    iss_ready = found;
    iss_grp   = sel;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= '0;
      for (int g = 0; g < NUM_SPG; g++) pass[g] <= '0;
    end else begin
      for (int g = 0; g < NUM_SPG; g++) begin
        if (iss_valid && found && (sel == GRP_W'(g))) begin
          busy[g] <= 1'b1;
          pass[g] <= '0;
        end else if (busy[g]) begin
          if (pass[g] == PASS_W'(NPASS - 1)) busy[g] <= 1'b0;
          else                               pass[g] <= pass[g] + 1'b1;
        end
      end
    end
  end

  // warp payload registers, no reset needed: only read while busy
  always_ff @(posedge clk) begin
    for (int g = 0; g < NUM_SPG; g++) begin
      if (iss_valid && found && (sel == GRP_W'(g))) begin
        g_op[g]   <= iss_op;
        g_warp[g] <= iss_warp;
        g_mask[g] <= iss_mask;
        g_a[g]    <= iss_a;
        g_b[g]    <= iss_b;
      end
    end
  end

  // level 2: pack the active threads of the current pass onto the best SPs
  logic [SPG_SIZE-1:0] hmask [NUM_SPG];
  logic [LANE_W:0]     pos;

  always_comb begin
    for (int g = 0; g < NUM_SPG; g++) begin
      hmask[g]      = g_mask[g][32'(pass[g]) * SPG_SIZE +: SPG_SIZE];
      pass_valid[g] = busy[g];
      pass_warp[g]  = g_warp[g];
      pass_idx[g]   = pass[g];
      pass_mask[g]  = busy[g] ? hmask[g] : '0;
      for (int k = 0; k < SPG_SIZE; k++) begin
        slot[g*SPG_SIZE + k] = '0;
      end
      pos = '0;
      for (int l = 0; l < SPG_SIZE; l++) begin
        if (busy[g] && hmask[g][l]) begin
          slot[g*SPG_SIZE + 32'(pos)].valid = 1'b1;
          slot[g*SPG_SIZE + 32'(pos)].op    = g_op[g];
          slot[g*SPG_SIZE + 32'(pos)].a     = g_a[g][32'(pass[g]) * SPG_SIZE + l];
          slot[g*SPG_SIZE + 32'(pos)].b     = g_b[g][32'(pass[g]) * SPG_SIZE + l];
          slot[g*SPG_SIZE + 32'(pos)].warp  = g_warp[g];
          slot[g*SPG_SIZE + 32'(pos)].grp   = GRP_W'(g);
          slot[g*SPG_SIZE + 32'(pos)].lane  = LANE_W'(32'(pass[g]) * SPG_SIZE + l);
          pos = pos + 1'b1;
        end
      end
    end
  end

  initial begin
    assert (WARP % SPG_SIZE == 0) else $error("WARP must be a multiple of SPG_SIZE");
    assert (WARP <= (1 << LANE_W)) else $error("WARP exceeds the lane field");
  end

endmodule
