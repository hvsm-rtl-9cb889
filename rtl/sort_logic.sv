// sort_logic: orders the SPs of an SM by condition, best first.
//
// Each physical SP p presents a condition key (its relative switch delay,
// smaller is better). The block ranks every SP by counting how many SPs are
// strictly better, or equally good with a lower physical index, so ties keep
// physical order and every rank is distinct. order[v] is then the physical
// SP whose rank is v: order[0] is the best conditioned SP, order[N-1] the
// worst. This is exactly the content to be written into the virtual SP ID
// table.
//
// The HVSM description gives the function (sort SPs by condition, fast
// enough to finish within a cycle) and refers the circuit to an earlier
// work; the all-pairs comparison rank sort used here is this design's own
// choice. It is purely combinational: N*(N-1) key comparators and a
// one-hot selection per output, no clock.
module sort_logic
  import hvsm_pkg::*;
#(
  parameter int unsigned NUM_SP = 32,
  localparam int unsigned ID_W  = $clog2(NUM_SP)
) (
  input  logic [KEY_W-1:0] key   [NUM_SP],
  output logic [ID_W-1:0]  order [NUM_SP]
);

  logic [ID_W:0] rank [NUM_SP];

  always_comb begin
    for (int i = 0; i < NUM_SP; i++) begin
      rank[i] = '0;
      for (int j = 0; j < NUM_SP; j++) begin
        if (j != i) begin
          if ((key[j] < key[i]) || ((key[j] == key[i]) && (j < i)))
            rank[i] = rank[i] + 1'b1;
        end
      end
    end
    for (int v = 0; v < NUM_SP; v++) begin
      order[v] = '0;
      for (int p = 0; p < NUM_SP; p++) begin
        if (rank[p] == (ID_W+1)'(v)) order[v] = ID_W'(p);
      end
    end
  end

endmodule
