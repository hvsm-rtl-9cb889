// tb_sp_detector: self-checking test of the SP condition detector.
//
// Loads initial conditions and timer values, then compares the detector's
// threshold shift and condition key with the NBTI and alpha-power delay
// models evaluated here in floating point. Also checks that the timers count
// stress cycles while the SP is active and recovery cycles while it is idle,
// and that more stress gives a worse (larger) key.
module tb_sp_detector;
  import hvsm_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic cfg_we = 1'b0, tmr_we = 1'b0, active = 1'b0;
  logic signed [VOLT_W-1:0] cfg_vth0 = '0;
  logic [LEFF_W-1:0] cfg_leff = '0;
  logic [TIMER_W-1:0] tmr_stress = '0, tmr_recov = '0;
  logic [31:0] k_q16 = '0;
  logic [TIMER_W-1:0] t_stress, t_recov;
  logic signed [VOLT_W-1:0] dvth;
  logic [KEY_W-1:0] cond_key;

  int checks = 0, failures = 0;

  sp_detector dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real cbrt_r(input real x);
    if (x < 0.0) return -((-x) ** (1.0 / 3.0));
    return x ** (1.0 / 3.0);
  endfunction

  task automatic check_model(input int vth0, input int leff, input real kval,
                             input longint unsigned ts, input longint unsigned tr);
    real inner, d0, rec, dv_ref, key_ref, x, kq;
    @(negedge clk);
    cfg_we = 1'b1; cfg_vth0 = 16'(vth0); cfg_leff = 16'(leff);
    tmr_we = 1'b1; tmr_stress = ts; tmr_recov = tr;
    k_q16 = 32'($rtoi(kval * 65536.0));
    @(negedge clk);
    cfg_we = 1'b0; tmr_we = 1'b0;
    kq = real'(k_q16) / 65536.0;
    // timers keep running (recovery) after the preset: read them back
    d0 = real'(vth0 - 3000);
    inner = kq * $sqrt(real'(t_stress)) + d0 * d0 * d0;
    if (t_stress + t_recov == 0) rec = 1.0;
    else rec = 1.0 - $sqrt(0.35 * real'(t_recov) / (real'(t_stress) + real'(t_recov)));
    dv_ref = cbrt_r(inner) * rec;
    checks++;
    if ((real'(dvth) - dv_ref > 2.0 + 0.01 * (dv_ref < 0 ? -dv_ref : dv_ref)) ||
        (dv_ref - real'(dvth) > 2.0 + 0.01 * (dv_ref < 0 ? -dv_ref : dv_ref))) begin
      failures++;
      $display("FAIL dvth: vth0=%0d ts=%0d tr=%0d got %0d expected %f", vth0, ts, tr, dvth, dv_ref);
    end
    x = real'(9000 - 3000 - int'(dvth)) / 10000.0;
    key_ref = real'(leff) * 65536.0 * (x ** (-1.3));
    checks++;
    if ((real'(cond_key) > key_ref * 1.003) || (real'(cond_key) < key_ref * 0.997)) begin
      failures++;
      $display("FAIL key: dvth=%0d got %0d expected %f", dvth, cond_key, key_ref);
    end
  endtask

  longint unsigned s0, r0;
  logic [KEY_W-1:0] k_prev;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // fresh chip: only process variation
    check_model(3000, 2800, 0.0, 0, 0);
    check_model(3250, 2800, 0.0, 0, 0);
    check_model(2800, 2700, 0.0, 0, 0);
    // aged, mixed stress and recovery
    check_model(3000, 2800, 2.5, 64'd1_000_000_000, 64'd1_000_000_000);
    check_model(3100, 2900, 2.5, 64'd150_000_000_000_000_000, 64'd10_000_000_000_000_000);
    check_model(2900, 2750, 1.0, 64'd50_000_000_000_000_000, 64'd100_000_000_000_000_000);
    check_model(3000, 2800, 2.5, 64'd1_000_000, 64'd0);
    for (int i = 0; i < 40; i++) begin
      check_model(2700 + int'($urandom_range(600)), 2600 + int'($urandom_range(400)),
                  real'($urandom_range(400)) / 100.0,
                  {4'b0, $urandom, $urandom} >> $urandom_range(40),
                  {4'b0, $urandom, $urandom} >> $urandom_range(40));
    end

    // counting: 37 active cycles, then 23 idle cycles
    @(negedge clk);
    tmr_we = 1'b1; tmr_stress = 64'd100; tmr_recov = 64'd200;
    @(negedge clk);
    tmr_we = 1'b0; active = 1'b1;
    s0 = t_stress; r0 = t_recov;
    repeat (37) @(negedge clk);
    active = 1'b0;
    checks++;
    if (t_stress != s0 + 37 || t_recov != r0) begin
      failures++;
      $display("FAIL stress count %0d %0d", t_stress, t_recov);
    end
    repeat (23) @(negedge clk);
    checks++;
    if (t_stress != s0 + 37 || t_recov != r0 + 23) begin
      failures++;
      $display("FAIL recovery count %0d %0d", t_stress, t_recov);
    end

    // monotonic ageing under pure stress
    k_prev = '0;
    for (int e = 10; e < 58; e += 6) begin
      @(negedge clk);
      tmr_we = 1'b1; tmr_stress = 64'd1 << e; tmr_recov = 64'd0; k_q16 = 32'd163840;
      @(negedge clk);
      tmr_we = 1'b0;
      checks++;
      if (cond_key < k_prev) begin
        failures++;
        $display("FAIL key not monotonic at 2^%0d", e);
      end
      k_prev = cond_key;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
