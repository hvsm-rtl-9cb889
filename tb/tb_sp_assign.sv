// tb_sp_assign: self-checking test of the two-level SP assignment.
//
// Offers warps with random activity masks (full, divergent, empty halves) at
// random rates. A behavioural model of the policy predicts, every cycle,
// which SPG takes the warp (the lowest-numbered free one) and which thread
// every virtual SP executes (active threads packed onto the lowest virtual
// SPs of the group, one pass per cycle starting the cycle after acceptance).
module tb_sp_assign;
  import hvsm_pkg::*;
  localparam int G = 2, S = 16, W = 32, NP = W / S, N = G * S;

  logic clk = 1'b0, rst_n = 1'b0;
  logic iss_valid = 1'b0, iss_ready;
  sp_op_e iss_op = OP_ADD;
  logic [WID_W-1:0] iss_warp = '0;
  logic [W-1:0] iss_mask = '0;
  logic [DATA_W-1:0] iss_a [W];
  logic [DATA_W-1:0] iss_b [W];
  logic [GRP_W-1:0] iss_grp;
  sp_req_t slot [N];
  logic [G-1:0] pass_valid;
  logic [WID_W-1:0] pass_warp [G];
  logic [0:0] pass_idx [G];
  logic [S-1:0] pass_mask [G];

  sp_assign #(.NUM_SPG(G), .SPG_SIZE(S), .WARP(W)) dut (.*);

  int checks = 0, failures = 0;
  int sel_count [G];
  int diverged = 0, stalls = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model state
  bit m_busy [G];
  int m_pass [G];
  sp_op_e m_op [G];
  logic [WID_W-1:0] m_warp [G];
  logic [W-1:0] m_mask [G];
  logic [DATA_W-1:0] m_a [G][W];
  logic [DATA_W-1:0] m_b [G][W];

  sp_req_t e;
  int k, mg;
  bit mfound;

  initial begin
    for (int l = 0; l < W; l++) begin iss_a[l] = '0; iss_b[l] = '0; end
    for (int g = 0; g < G; g++) begin m_busy[g] = 0; m_pass[g] = 0; sel_count[g] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      iss_valid = (t < 1000) ? ($urandom_range(3) == 0) : ($urandom_range(7) != 0);
      iss_op    = sp_op_e'($urandom_range(9));
      iss_warp  = WID_W'($urandom);
      case ($urandom_range(3))
        0: iss_mask = '1;
        1: iss_mask = {$urandom};
        2: iss_mask = {16'h0, 16'($urandom)};
        default: iss_mask = {$urandom} & {$urandom};
      endcase
      for (int l = 0; l < W; l++) begin iss_a[l] = $urandom; iss_b[l] = $urandom; end
      #1;
      // level 1
      mfound = 0; mg = 0;
      for (int g = 0; g < G; g++)
        if (!mfound && (!m_busy[g] || m_pass[g] == NP - 1)) begin mfound = 1; mg = g; end
      checks++;
      if (iss_ready !== mfound || (mfound && iss_grp !== GRP_W'(mg))) begin
        failures++;
        $display("FAIL t=%0d ready/grp %0d %0d exp %0d %0d", t, iss_ready, iss_grp, mfound, mg);
      end
      if (iss_valid && !mfound) stalls++;
      // level 2
      for (int g = 0; g < G; g++) begin
        k = 0;
        checks++;
        if (pass_valid[g] !== m_busy[g]) begin
          failures++; $display("FAIL pass_valid g=%0d", g);
        end
        if (m_busy[g]) begin
          if (m_mask[g][m_pass[g]*S +: S] != '1 && m_mask[g][m_pass[g]*S +: S] != '0) diverged++;
          for (int l = 0; l < S; l++) begin
            if (m_mask[g][m_pass[g]*S + l]) begin
              e = '0;
              e.valid = 1'b1; e.op = m_op[g];
              e.a = m_a[g][m_pass[g]*S + l]; e.b = m_b[g][m_pass[g]*S + l];
              e.warp = m_warp[g]; e.grp = GRP_W'(g); e.lane = LANE_W'(m_pass[g]*S + l);
              checks++;
              if (slot[g*S + k] !== e) begin
                failures++;
                if (failures < 10) $display("FAIL t=%0d slot %0d", t, g*S + k);
              end
              k++;
            end
          end
        end
        for (int kk = k; kk < S; kk++) begin
          checks++;
          if (slot[g*S + kk].valid) begin
            failures++; $display("FAIL t=%0d idle slot %0d valid", t, g*S + kk);
          end
        end
      end
      // model update (what the next clock edge does)
      for (int g = 0; g < G; g++) begin
        if (iss_valid && mfound && mg == g) begin
          m_busy[g] = 1; m_pass[g] = 0; m_op[g] = iss_op; m_warp[g] = iss_warp;
          m_mask[g] = iss_mask; m_a[g] = iss_a; m_b[g] = iss_b;
          sel_count[g]++;
        end else if (m_busy[g]) begin
          if (m_pass[g] == NP - 1) m_busy[g] = 0; else m_pass[g]++;
        end
      end
    end
    $display("SPG0 warps %0d, SPG1 warps %0d, divergent passes %0d, stalls %0d",
             sel_count[0], sel_count[1], diverged, stalls);
    checks++;
    if (sel_count[1] == 0 || sel_count[0] <= sel_count[1] || diverged == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised or SPG0 was not preferred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
