// tb_sort_logic: self-checking test of the condition sorter.
//
// Drives random key sets (including many ties) and checks that the output is
// a permutation, that keys are non-decreasing along it (best SP first) and
// that ties keep physical order, against a reference selection sort.
module tb_sort_logic;
  import hvsm_pkg::*;
  localparam int N = 32;

  logic [KEY_W-1:0] key [N];
  logic [4:0] order [N];
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  sort_logic #(.NUM_SP(N)) dut (.key(key), .order(order));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ref_order [N];
  logic [N-1:0] used;

  task automatic ref_sort();
    int best;
    used = '0;
    for (int v = 0; v < N; v++) begin
      best = -1;
      for (int p = 0; p < N; p++)
        if (!used[p] && (best < 0 || key[p] < key[best])) best = p;
      used[best] = 1'b1;
      ref_order[v] = best;
    end
  endtask

  initial begin
    for (int t = 0; t < 400; t++) begin
      for (int p = 0; p < N; p++) begin
        if (t % 3 == 0) key[p] = KEY_W'($urandom_range(7));       // many ties
        else            key[p] = {$urandom, $urandom};
      end
      if (t == 1) for (int p = 0; p < N; p++) key[p] = KEY_W'(N - p);  // reversed
      if (t == 2) for (int p = 0; p < N; p++) key[p] = '1;             // all equal
      @(posedge clk);
      ref_sort();
      for (int v = 0; v < N; v++) begin
        checks++;
        if (int'(order[v]) != ref_order[v]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d v=%0d got %0d exp %0d", t, v, order[v], ref_order[v]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
