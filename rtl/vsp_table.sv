// vsp_table: the virtual SP ID table of an SM.
//
// Entry v holds the physical SP that acts as virtual SP v. Virtual SP 0 is
// the best conditioned SP, virtual SP N-1 the worst, so the table lists the
// physical SP IDs in descending order of condition, as HVSM prescribes. The
// whole table is rewritten in one cycle when wr_en is high (after the
// sorting logic ran at a kernel launch); the crossbar reads every entry in
// parallel through map.
//
// Reset value: the identity mapping, so before the first sort the SPs are
// used in physical order like an SM without HVSM. That reset value, the
// one-cycle full write and the sanity check below are this design's own
// choices.
module vsp_table #(
  parameter int unsigned NUM_SP = 32,
  localparam int unsigned ID_W  = $clog2(NUM_SP)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            wr_en,
  input  logic [ID_W-1:0] wr_map [NUM_SP],
  output logic [ID_W-1:0] map    [NUM_SP]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < NUM_SP; v++) map[v] <= ID_W'(v);
    end else if (wr_en) begin
      map <= wr_map;
    end
  end

  // The table must stay a permutation: every physical SP appears once.
  function automatic logic is_perm(input logic [ID_W-1:0] m [NUM_SP]);
    logic [NUM_SP-1:0] seen;
    seen = '0;
    for (int v = 0; v < NUM_SP; v++) seen[m[v]] = 1'b1;
    return &seen;
  endfunction

  a_write_is_perm: assert property (@(posedge clk) disable iff (!rst_n)
                                    wr_en |-> is_perm(wr_map))
    else $error("vsp_table: written mapping is not a permutation");

endmodule
