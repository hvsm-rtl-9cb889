// tb_hvsm_sm: end-to-end test of the HVSM execution stage of one SM, at the
// default configuration (2 SPGs of 16 SPs, 32-thread warps).
//
// Sequence: every SP gets a random initial Vth/Leff; a launch sorts the SPs
// and loads the virtual SP ID table; warps with random operations and
// divergent masks then run at varying load. Some SPs are then aged by
// presetting their timers to years of stress, and a second launch, taken
// while warps are in flight, must re-sort the SPs.
//
// Checked every cycle: each table write equals a reference sort of the
// condition keys; every result returns on its SPG's writeback port in lane
// order, with the right value, SP_LAT cycles after its pass; the SPs active
// in a cycle are exactly the best ones of each SPG (the first k virtual SPs
// for k active threads). At the end: the best SP has collected more stress
// than the worst, and every mechanism (table update, preference for the best
// SPG, fall-back to the next SPG, divergence packing, empty pass, re-sort in
// flight) happened at least once.
module tb_hvsm_sm;
  import hvsm_pkg::*;
  localparam int G = 2, S = 16, W = 32, NP = W / S, N = G * S, LAT = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic launch = 1'b0;
  logic [31:0] k_q16 = 32'd163840;
  logic [N-1:0] cfg_we = '0, tmr_we = '0;
  logic signed [VOLT_W-1:0] cfg_vth0 [N];
  logic [LEFF_W-1:0] cfg_leff [N];
  logic [TIMER_W-1:0] tmr_stress [N];
  logic [TIMER_W-1:0] tmr_recov [N];
  logic iss_valid = 1'b0, iss_ready;
  sp_op_e iss_op = OP_ADD;
  logic [WID_W-1:0] iss_warp = '0;
  logic [W-1:0] iss_mask = '0;
  logic [DATA_W-1:0] iss_a [W];
  logic [DATA_W-1:0] iss_b [W];
  logic [GRP_W-1:0] iss_grp;
  logic [G-1:0] wb_valid;
  logic [WID_W-1:0] wb_warp [G];
  logic [0:0] wb_pass [G];
  logic [S-1:0] wb_lane_valid [G];
  logic [DATA_W-1:0] wb_data [G][S];
  logic [4:0] vmap [N];
  logic [N-1:0] sp_active;
  logic [TIMER_W-1:0] t_stress [N];
  logic [TIMER_W-1:0] t_recov [N];
  logic signed [VOLT_W-1:0] dvth [N];
  logic [KEY_W-1:0] cond_key [N];

  hvsm_sm dut (.*);

  int checks = 0, failures = 0;
  int n_update = 0, n_best_spg = 0, n_fallback = 0, n_diverge = 0, n_empty = 0;
  int n_resort_inflight = 0, n_results = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] model(input sp_op_e op, input logic [31:0] a, input logic [31:0] b);
    case (op)
      OP_ADD: return a + b;
      OP_SUB: return a - b;
      OP_MUL: return 32'(longint'(a) * longint'(b));
      OP_AND: return a & b;
      OP_OR:  return a | b;
      OP_XOR: return a ^ b;
      OP_SHL: return a << (b % 32);
      OP_SHR: return a >> (b % 32);
      OP_MIN: return (int'(a) < int'(b)) ? a : b;
      OP_MAX: return (int'(a) > int'(b)) ? a : b;
      default: return 32'd0;
    endcase
  endfunction

  // expected writeback, per SPG, in order
  typedef struct {
    int              due;     // cycle the bundle is expected
    logic [WID_W-1:0] warp;
    int              pass;
    logic [S-1:0]    mask;
    logic [31:0]     data [S];
  } wb_exp_t;
  wb_exp_t wbq [G][$];

  // model of the SPG schedule
  bit m_busy [G];
  int m_pass [G];
  logic [W-1:0] m_mask [G];
  int cyc = 0;
  int inflight = 0;

  // reference sort of the current keys
  function automatic void ref_sort(output logic [4:0] o [N]);
    logic [N-1:0] used;
    int best;
    used = '0;
    for (int v = 0; v < N; v++) begin
      best = -1;
      for (int p = 0; p < N; p++)
        if (!used[p] && (best < 0 || cond_key[p] < cond_key[best])) best = p;
      used[best] = 1'b1;
      o[v] = 5'(best);
    end
  endfunction

  logic [4:0] exp_map [N];
  bit launch_pending = 0;

  // one clock cycle of stimulus and checking, at the falling edge
  task automatic step(input bit offer, input int mask_kind, input bit do_launch);
    bit mfound;
    int mg, k;
    wb_exp_t e;
    logic [N-1:0] exp_act;
    @(negedge clk);
    cyc++;
    // table written at the last rising edge?
    if (launch_pending) begin
      launch_pending = 0;
      for (int v = 0; v < N; v++) begin
        checks++;
        if (vmap[v] !== exp_map[v]) begin
          failures++;
          if (failures < 10) $display("FAIL table v=%0d got %0d exp %0d", v, vmap[v], exp_map[v]);
        end
      end
      n_update++;
    end
    // writeback check
    for (int g = 0; g < G; g++) begin
      if (wb_valid[g]) begin
        checks++;
        if (wbq[g].size() == 0) begin
          failures++; $display("FAIL unexpected writeback g=%0d", g);
        end else begin
          e = wbq[g].pop_front();
          if (e.due != cyc || wb_warp[g] !== e.warp || int'(wb_pass[g]) != e.pass ||
              wb_lane_valid[g] !== e.mask) begin
            failures++;
            $display("FAIL wb header g=%0d cyc=%0d due=%0d", g, cyc, e.due);
          end
          for (int l = 0; l < S; l++) if (e.mask[l]) begin
            checks++; n_results++;
            if (wb_data[g][l] !== e.data[l]) begin
              failures++;
              if (failures < 10) $display("FAIL wb data g=%0d l=%0d", g, l);
            end
          end
        end
      end
    end
    // active SPs must be the best of each group
    exp_act = '0;
    inflight = 0;
    for (int g = 0; g < G; g++) if (m_busy[g]) begin
      inflight++;
      k = $countones(m_mask[g][m_pass[g]*S +: S]);
      if (k == 0) n_empty++;
      else if (k < S) n_diverge++;
      for (int kk = 0; kk < k; kk++) exp_act[vmap[g*S + kk]] = 1'b1;
    end
    checks++;
    if (sp_active !== exp_act) begin
      failures++;
      $display("FAIL active SPs cyc=%0d got %h exp %h", cyc, sp_active, exp_act);
    end
    // new stimulus
    iss_valid = offer;
    iss_op    = sp_op_e'($urandom_range(9));
    iss_warp  = WID_W'($urandom);
    case (mask_kind)
      0: iss_mask = '1;
      1: iss_mask = {$urandom};
      2: iss_mask = {16'h0, 16'($urandom_range(255))};
      default: iss_mask = 32'h0000_00FF << $urandom_range(8);
    endcase
    for (int l = 0; l < W; l++) begin iss_a[l] = $urandom; iss_b[l] = $urandom; end
    launch = do_launch;
    #1;
    if (do_launch) begin
      ref_sort(exp_map);
      launch_pending = 1;
      if (inflight > 0) n_resort_inflight++;
    end
    mfound = 0; mg = 0;
    for (int g = 0; g < G; g++)
      if (!mfound && (!m_busy[g] || m_pass[g] == NP - 1)) begin mfound = 1; mg = g; end
    checks++;
    if (iss_ready !== mfound || (mfound && iss_grp !== GRP_W'(mg))) begin
      failures++; $display("FAIL ready/grp cyc=%0d", cyc);
    end
    if (offer && mfound) begin
      if (mg == 0) n_best_spg++; else n_fallback++;
      for (int p = 0; p < NP; p++) begin
        e.due  = cyc + 1 + p + LAT;
        e.warp = iss_warp;
        e.pass = p;
        e.mask = iss_mask[p*S +: S];
        for (int l = 0; l < S; l++) e.data[l] = model(iss_op, iss_a[p*S + l], iss_b[p*S + l]);
        wbq[mg].push_back(e);
      end
    end
    for (int g = 0; g < G; g++) begin
      if (offer && mfound && mg == g) begin
        m_busy[g] = 1; m_pass[g] = 0; m_mask[g] = iss_mask;
      end else if (m_busy[g]) begin
        if (m_pass[g] == NP - 1) m_busy[g] = 0; else m_pass[g]++;
      end
    end
  endtask

  bit identity;
  longint unsigned best_s, worst_s;
  logic [4:0] aged [8];

  initial begin
    for (int p = 0; p < N; p++) begin
      cfg_vth0[p] = 16'(2750 + $urandom_range(500));
      cfg_leff[p] = 16'(2650 + $urandom_range(300));
      tmr_stress[p] = '0; tmr_recov[p] = '0;
    end
    for (int l = 0; l < W; l++) begin iss_a[l] = '0; iss_b[l] = '0; end
    for (int g = 0; g < G; g++) begin m_busy[g] = 0; m_pass[g] = 0; m_mask[g] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    cfg_we = '1;
    @(negedge clk);
    cfg_we = '0;
    // first launch: sort the fresh chip
    step(0, 0, 1);
    step(0, 0, 0);
    identity = 1;
    for (int v = 0; v < N; v++) if (vmap[v] != 5'(v)) identity = 0;
    checks++;
    if (identity) begin failures++; $display("FAIL table still identity after sort"); end
    // light, divergent load: mostly SPG 0, threads on the best SPs
    for (int t = 0; t < 3000; t++) step($urandom_range(3) == 0, 1 + $urandom_range(2), 0);
    best_s  = t_stress[vmap[0]];
    worst_s = t_stress[vmap[N-1]];
    $display("stress of best SP %0d, of worst SP %0d", best_s, worst_s);
    checks++;
    if (!(best_s > worst_s)) begin failures++; $display("FAIL best SP not stressed more"); end
    // heavy load
    for (int t = 0; t < 1000; t++) step($urandom_range(7) != 0, $urandom_range(3), 0);
    // age the current best SPs by years of stress, then re-sort while busy
    @(negedge clk);
    for (int v = 0; v < 8; v++) begin
      aged[v] = vmap[v];
      tmr_we[vmap[v]] = 1'b1;
      tmr_stress[vmap[v]] = 64'd100_000_000_000_000_000;
      tmr_recov[vmap[v]]  = 64'd10_000_000_000_000_000;
    end
    @(negedge clk);
    tmr_we = '0;
    // the negedge waits above skipped two checking steps: let the pipeline drain
    iss_valid = 1'b0;
    repeat (8) @(negedge clk);
    for (int g = 0; g < G; g++) begin wbq[g].delete(); m_busy[g] = 0; end
    cyc += 10;
    for (int t = 0; t < 20; t++) step(1, 0, 0);
    step(1, 1, 1);
    for (int t = 0; t < 1000; t++) step($urandom_range(1), $urandom_range(3), 0);
    for (int t = 0; t < 10; t++) step(0, 0, 0);
    // the aged SPs must now be the eight worst virtual SPs
    for (int a = 0; a < 8; a++) begin
      checks++;
      for (int v = 0; v < N - 8; v++) if (vmap[v] == aged[a]) begin
        failures++; $display("FAIL aged SP %0d still at virtual %0d", aged[a], v);
      end
    end
    checks++;
    if (wbq[0].size() != 0 || wbq[1].size() != 0) begin
      failures++; $display("FAIL results missing at the end");
    end
    $display("mechanisms: table updates %0d, best SPG chosen %0d, fall-back SPG %0d, divergent passes %0d, empty passes %0d, re-sort in flight %0d, results %0d",
             n_update, n_best_spg, n_fallback, n_diverge, n_empty, n_resort_inflight, n_results);
    checks++;
    if (n_update < 2 || n_best_spg == 0 || n_fallback == 0 || n_diverge == 0 ||
        n_empty == 0 || n_resort_inflight == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
