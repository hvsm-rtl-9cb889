// tb_vsp_table: self-checking test of the virtual SP ID table.
//
// Checks the identity mapping after reset, that a write replaces the whole
// table in one cycle, and that the table holds its content while wr_en is low.
module tb_vsp_table;
  localparam int N = 32;
  logic clk = 1'b0, rst_n = 1'b0, wr_en = 1'b0;
  logic [4:0] wr_map [N];
  logic [4:0] map [N];
  logic [4:0] expect_map [N];
  int checks = 0, failures = 0;

  vsp_table #(.NUM_SP(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input string what);
    for (int v = 0; v < N; v++) begin
      checks++;
      if (map[v] !== expect_map[v]) begin
        failures++;
        $display("FAIL %s v=%0d got %0d exp %0d", what, v, map[v], expect_map[v]);
      end
    end
  endtask

  // random permutation by Fisher-Yates shuffle
  task automatic shuffle();
    int j;
    logic [4:0] t;
    for (int v = 0; v < N; v++) wr_map[v] = 5'(v);
    for (int v = N - 1; v > 0; v--) begin
      j = $urandom_range(v);
      t = wr_map[v]; wr_map[v] = wr_map[j]; wr_map[j] = t;
    end
  endtask

  initial begin
    for (int v = 0; v < N; v++) wr_map[v] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int v = 0; v < N; v++) expect_map[v] = 5'(v);
    @(negedge clk);
    compare("reset");
    for (int t = 0; t < 50; t++) begin
      shuffle();
      wr_en = 1'b1;
      @(negedge clk);
      wr_en = 1'b0;
      expect_map = wr_map;
      compare("write");
      shuffle();   // new data without wr_en must not be taken
      repeat (3) @(negedge clk);
      compare("hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
