// tb_sp_crossbar: self-checking test of the virtual-to-physical crossbar.
//
// For random permutations in the table, checks that each virtual slot's
// operation reaches physical SP map[v] and nothing else reaches an SP, and
// that results scattered over random physical SPs come back in the lane
// position their tag names, in the bundle of their SPG.
module tb_sp_crossbar;
  import hvsm_pkg::*;
  localparam int G = 2, S = 16, N = G * S;

  logic [4:0] map [N];
  sp_req_t vslot [N];
  sp_req_t phys_req [N];
  sp_res_t phys_res [N];
  logic [S-1:0] wb_valid [G];
  logic [DATA_W-1:0] wb_data [G][S];
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  sp_crossbar #(.NUM_SPG(G), .SPG_SIZE(S)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int perm [N];
  logic [S-1:0] exp_valid [G];
  logic [DATA_W-1:0] exp_data [G][S];

  task automatic shuffle();
    int j, t;
    for (int v = 0; v < N; v++) perm[v] = v;
    for (int v = N - 1; v > 0; v--) begin
      j = $urandom_range(v); t = perm[v]; perm[v] = perm[j]; perm[j] = t;
    end
  endtask

  initial begin
    for (int t = 0; t < 500; t++) begin
      shuffle();
      for (int v = 0; v < N; v++) begin
        map[v] = 5'(perm[v]);
        vslot[v] = '0;
        vslot[v].valid = ($urandom_range(2) != 0);
        vslot[v].op = sp_op_e'($urandom_range(9));
        vslot[v].a = $urandom; vslot[v].b = $urandom;
        vslot[v].warp = WID_W'($urandom); vslot[v].grp = GRP_W'(v / S);
        vslot[v].lane = LANE_W'($urandom);
      end
      // results: each (group, lane) pair at most once, on a random physical SP
      shuffle();
      for (int g = 0; g < G; g++) begin exp_valid[g] = '0; end
      for (int p = 0; p < N; p++) begin
        phys_res[p] = '0;
        if ($urandom_range(3) != 0) begin
          phys_res[p].valid = 1'b1;
          phys_res[p].grp   = GRP_W'(perm[p] / S);
          phys_res[p].lane  = LANE_W'((perm[p] % S) + S * $urandom_range(1));
          phys_res[p].data  = $urandom;
          phys_res[p].warp  = WID_W'($urandom);
          exp_valid[perm[p] / S][perm[p] % S] = 1'b1;
          exp_data[perm[p] / S][perm[p] % S]  = phys_res[p].data;
        end
      end
      @(posedge clk);
      for (int v = 0; v < N; v++) begin
        checks++;
        if (phys_req[map[v]] !== vslot[v]) begin
          failures++;
          if (failures < 10) $display("FAIL forward v=%0d", v);
        end
      end
      for (int g = 0; g < G; g++) begin
        checks++;
        if (wb_valid[g] !== exp_valid[g]) begin
          failures++; $display("FAIL return valid g=%0d", g);
        end
        for (int l = 0; l < S; l++) begin
          if (exp_valid[g][l]) begin
            checks++;
            if (wb_data[g][l] !== exp_data[g][l]) begin
              failures++; $display("FAIL return data g=%0d l=%0d", g, l);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
