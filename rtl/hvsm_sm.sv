// hvsm_sm: the SP execution stage of one SM with hardware-variability aware
// SP management (HVSM).
//
// Ageing (NBTI) and process variation make the SPs of one SM switch at
// different speeds, and the slowest SP limits the clock of all of them. HVSM
// lets the best conditioned SPs do most of the work, so the worst ones age
// less and the spread between the fastest and slowest SP shrinks. Its parts,
// all instantiated here:
//   * one sp_detector per SP, counting stress/recovery cycles and computing
//     the SP's condition (relative switch delay) from its stored initial
//     Vth/Leff and the NBTI and delay models;
//   * sort_logic, ranking the SPs by condition;
//   * vsp_table, the virtual-to-physical SP ID table, rewritten from the sort
//     result in the cycle after launch (a kernel launch);
//   * sp_assign, the two-level policy: a warp goes to the best free SP group
//     (SPG, formed from consecutive virtual SPs), and its active threads to
//     the best SPs of the group;
//   * sp_crossbar, between the operand collectors (the iss_* port) and the
//     SPs, routing virtual SPs to physical ones and results back by tag;
//   * the SPs (sp).
//
// Interface and timing: a warp is accepted when iss_valid && iss_ready. Its
// pass p (p = 0 .. WARP/SPG_SIZE-1, one half warp each in the main
// configuration) reaches the SPs p+1 cycles later and leaves on the wb_*
// port of its SPG SP_LAT cycles after that, in lane order (wb_lane_valid
// marks the active lanes). launch samples the current conditions; the new
// table is in force from the following cycle. cfg_* writes the initial
// condition of each SP, tmr_* presets its timers, k_q16 is the NBTI factor K.
// The fetch, decode, scheduling, register file, operand collectors and
// writeback of the SM are outside this block.
//
// Default sizes follow the baseline GPU: 2 SPGs of 16 SPs per SM, 32-thread
// warps. The SP latency of 2 and the one-cycle table update are this
// design's own choices.
module hvsm_sm
  import hvsm_pkg::*;
#(
  parameter int unsigned NUM_SPG  = 2,
  parameter int unsigned SPG_SIZE = 16,
  parameter int unsigned WARP     = 32,
  parameter int unsigned SP_LAT   = 2,
  localparam int unsigned NUM_SP  = NUM_SPG * SPG_SIZE,
  localparam int unsigned ID_W    = $clog2(NUM_SP),
  localparam int unsigned NPASS   = WARP / SPG_SIZE,
  localparam int unsigned PASS_W  = (NPASS > 1) ? $clog2(NPASS) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // HVSM control and configuration
  input  logic                     launch,
  input  logic [31:0]              k_q16,
  input  logic [NUM_SP-1:0]        cfg_we,
  input  logic signed [VOLT_W-1:0] cfg_vth0  [NUM_SP],
  input  logic [LEFF_W-1:0]        cfg_leff  [NUM_SP],
  input  logic [NUM_SP-1:0]        tmr_we,
  input  logic [TIMER_W-1:0]       tmr_stress[NUM_SP],
  input  logic [TIMER_W-1:0]       tmr_recov [NUM_SP],
  // warps from the operand collectors
  input  logic                     iss_valid,
  output logic                     iss_ready,
  input  sp_op_e                   iss_op,
  input  logic [WID_W-1:0]         iss_warp,
  input  logic [WARP-1:0]          iss_mask,
  input  logic [DATA_W-1:0]        iss_a [WARP],
  input  logic [DATA_W-1:0]        iss_b [WARP],
  output logic [GRP_W-1:0]         iss_grp,
  // results to writeback, one bundle per SPG
  output logic [NUM_SPG-1:0]       wb_valid,
  output logic [WID_W-1:0]         wb_warp       [NUM_SPG],
  output logic [PASS_W-1:0]        wb_pass       [NUM_SPG],
  output logic [SPG_SIZE-1:0]      wb_lane_valid [NUM_SPG],
  output logic [DATA_W-1:0]        wb_data       [NUM_SPG][SPG_SIZE],
  // observation of the HVSM state
  output logic [ID_W-1:0]          vmap      [NUM_SP],
  output logic [NUM_SP-1:0]        sp_active,
  output logic [TIMER_W-1:0]       t_stress  [NUM_SP],
  output logic [TIMER_W-1:0]       t_recov   [NUM_SP],
  output logic signed [VOLT_W-1:0] dvth      [NUM_SP],
  output logic [KEY_W-1:0]         cond_key  [NUM_SP]
);

  // ---------------- condition detectors ----------------
  for (genvar p = 0; p < NUM_SP; p++) begin : g_det
    sp_detector u_det (
      .clk        (clk),
      .rst_n      (rst_n),
      .cfg_we     (cfg_we[p]),
      .cfg_vth0   (cfg_vth0[p]),
      .cfg_leff   (cfg_leff[p]),
      .tmr_we     (tmr_we[p]),
      .tmr_stress (tmr_stress[p]),
      .tmr_recov  (tmr_recov[p]),
      .active     (sp_active[p]),
      .k_q16      (k_q16),
      .t_stress   (t_stress[p]),
      .t_recov    (t_recov[p]),
      .dvth       (dvth[p]),
      .cond_key   (cond_key[p])
    );
  end

  // ---------------- sorting and virtual SP ID table ----------------
  logic [ID_W-1:0] sorted [NUM_SP];

  sort_logic #(.NUM_SP(NUM_SP)) u_sort (
    .key   (cond_key),
    .order (sorted)
  );

  vsp_table #(.NUM_SP(NUM_SP)) u_table (
    .clk    (clk),
    .rst_n  (rst_n),
    .wr_en  (launch),
    .wr_map (sorted),
    .map    (vmap)
  );

  // ---------------- two-level assignment ----------------
  sp_req_t             vslot [NUM_SP];
  logic [NUM_SPG-1:0]  pass_valid;
  logic [WID_W-1:0]    pass_warp [NUM_SPG];
  logic [PASS_W-1:0]   pass_idx  [NUM_SPG];
  logic [SPG_SIZE-1:0] pass_mask [NUM_SPG];

  sp_assign #(.NUM_SPG(NUM_SPG), .SPG_SIZE(SPG_SIZE), .WARP(WARP)) u_assign (
    .clk        (clk),
    .rst_n      (rst_n),
    .iss_valid  (iss_valid),
    .iss_ready  (iss_ready),
    .iss_op     (iss_op),
    .iss_warp   (iss_warp),
    .iss_mask   (iss_mask),
    .iss_a      (iss_a),
    .iss_b      (iss_b),
    .iss_grp    (iss_grp),
    .slot       (vslot),
    .pass_valid (pass_valid),
    .pass_warp  (pass_warp),
    .pass_idx   (pass_idx),
    .pass_mask  (pass_mask)
  );

  // ---------------- crossbar and SPs ----------------
  sp_req_t             preq [NUM_SP];
  sp_res_t             pres [NUM_SP];
  logic [SPG_SIZE-1:0] xb_valid [NUM_SPG];

  sp_crossbar #(.NUM_SPG(NUM_SPG), .SPG_SIZE(SPG_SIZE)) u_xbar (
    .map      (vmap),
    .vslot    (vslot),
    .phys_req (preq),
    .phys_res (pres),
    .wb_valid (xb_valid),
    .wb_data  (wb_data)
  );

  for (genvar p = 0; p < NUM_SP; p++) begin : g_sp
    sp #(.LAT(SP_LAT)) u_sp (
      .clk    (clk),
      .rst_n  (rst_n),
      .req    (preq[p]),
      .res    (pres[p]),
      .active (sp_active[p])
    );
  end

  // ---------------- writeback bookkeeping ----------------
  // The pass description travels beside the SP pipeline so that writeback
  // learns of every pass, including one whose threads are all inactive.
  logic [NUM_SPG-1:0]  d_valid [SP_LAT];
  logic [WID_W-1:0]    d_warp  [SP_LAT][NUM_SPG];
  logic [PASS_W-1:0]   d_pass  [SP_LAT][NUM_SPG];
  logic [SPG_SIZE-1:0] d_mask  [SP_LAT][NUM_SPG];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SP_LAT; s++) begin
        d_valid[s] <= '0;
        for (int g = 0; g < NUM_SPG; g++) begin
          d_warp[s][g] <= '0;
          d_pass[s][g] <= '0;
          d_mask[s][g] <= '0;
        end
      end
    end else begin
      d_valid[0] <= pass_valid;
      d_warp[0]  <= pass_warp;
      d_pass[0]  <= pass_idx;
      d_mask[0]  <= pass_mask;
      for (int s = 1; s < SP_LAT; s++) begin
        d_valid[s] <= d_valid[s-1];
        d_warp[s]  <= d_warp[s-1];
        d_pass[s]  <= d_pass[s-1];
        d_mask[s]  <= d_mask[s-1];
      end
    end
  end

  assign wb_valid      = d_valid[SP_LAT-1];
  assign wb_warp       = d_warp[SP_LAT-1];
  assign wb_pass       = d_pass[SP_LAT-1];
  assign wb_lane_valid = xb_valid;

  // every active lane of a pass must come back, and nothing else
  for (genvar g = 0; g < NUM_SPG; g++) begin : g_chk
    a_lanes_match: assert property (@(posedge clk) disable iff (!rst_n)
                                    xb_valid[g] == (wb_valid[g] ? d_mask[SP_LAT-1][g] : '0))
      else $error("hvsm_sm: SPG %0d returned lanes differ from the issued mask", g);
  end

endmodule
