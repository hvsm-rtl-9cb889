// tb_hvsm_lifetime: seven-year ageing experiment on one SM.
//
// The same chip (same random initial Vth/Leff per SP) runs the same kind of
// light, divergent workload twice: once without condition-aware mapping (no
// launch, so the table keeps the identity mapping of a plain SM) and once
// with HVSM (a launch sorts the SPs first). The share of stress cycles each
// SP collected is then extrapolated to seven years at 700 MHz by presetting
// the detector timers, and the speed variation ratio (slowest SP delay over
// fastest SP delay, from the detectors' condition keys) is compared. HVSM
// must end with the lower ratio, and its best SPs must have carried more
// load than its worst ones.
module tb_hvsm_lifetime;
  import hvsm_pkg::*;
  localparam int G = 2, S = 16, W = 32, N = G * S;
  localparam longint unsigned T7 = 64'd154_600_000_000_000_000;  // 7 y at 700 MHz

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
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [VOLT_W-1:0] pv_vth [N];
  logic [LEFF_W-1:0] pv_leff [N];

  function automatic real spread();
    real mx, mn;
    mx = 0.0; mn = 1.0e30;
    for (int p = 0; p < N; p++) begin
      if (real'(cond_key[p]) > mx) mx = real'(cond_key[p]);
      if (real'(cond_key[p]) < mn) mn = real'(cond_key[p]);
    end
    return mx / mn;
  endfunction

  // one scenario: returns the seven-year ratio
  task automatic run(input bit use_hvsm, input int unsigned seed, output real ratio7,
                     output real ratio0, output longint unsigned best_s,
                     output longint unsigned worst_s);
    int unsigned dummy;
    real f;
    int n;
    dummy = $urandom(seed);
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    cfg_vth0 = pv_vth; cfg_leff = pv_leff; cfg_we = '1;
    @(negedge clk);
    cfg_we = '0;
    ratio0 = spread();
    launch = use_hvsm;
    @(negedge clk);
    launch = 1'b0;
    // light divergent workload: warps with 1..24 active threads, half load
    for (int t = 0; t < 4000; t++) begin
      iss_valid = ($urandom_range(1) == 0);
      iss_op    = sp_op_e'($urandom_range(9));
      n         = 1 + $urandom_range(23);
      iss_mask  = 32'((64'd1 << n) - 1) << $urandom_range(32 - n);
      @(negedge clk);
    end
    iss_valid = 1'b0;
    repeat (6) @(negedge clk);
    best_s  = t_stress[vmap[0]];
    worst_s = t_stress[vmap[N-1]];
    // extrapolate each SP's stress share to seven years
    for (int p = 0; p < N; p++) begin
      f = real'(t_stress[p]) / real'(t_stress[p] + t_recov[p]);
      tmr_stress[p] = 64'($rtoi(f * 1.0e6)) * (T7 / 64'd1_000_000);
      tmr_recov[p]  = T7 - tmr_stress[p];
    end
    tmr_we = '1;
    @(negedge clk);
    tmr_we = '0;
    ratio7 = spread();
  endtask

  real base7, base0, hv7, hv0;
  longint unsigned bs, ws, hbs, hws;

  int unsigned k_arg;

  initial begin
    if ($value$plusargs("K=%d", k_arg)) k_q16 = k_arg;
    for (int l = 0; l < W; l++) begin iss_a[l] = $urandom; iss_b[l] = $urandom; end
    for (int p = 0; p < N; p++) begin
      pv_vth[p]  = 16'(2750 + $urandom_range(500));
      pv_leff[p] = 16'(2650 + $urandom_range(300));
      tmr_stress[p] = '0; tmr_recov[p] = '0;
    end
    run(1'b0, 32'd12345, base7, base0, bs, ws);
    run(1'b1, 32'd12345, hv7, hv0, hbs, hws);
    $display("speed variation ratio: fresh %0.3f, plain mapping after 7 years %0.3f, HVSM after 7 years %0.3f",
             base0, base7, hv7);
    $display("HVSM stress cycles: best SP %0d, worst SP %0d", hbs, hws);
    checks++;
    if (!(hv7 < base7)) begin
      failures++; $display("FAIL HVSM did not reduce the seven-year ratio");
    end
    checks++;
    if (!(hbs > hws)) begin
      failures++; $display("FAIL HVSM did not load its best SP more than its worst");
    end
    checks++;
    if (!(base7 > base0)) begin
      failures++; $display("FAIL ageing did not widen the spread without HVSM");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
