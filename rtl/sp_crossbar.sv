// sp_crossbar: redirects virtual SPs to physical SPs and results back.
//
// Forward path: the operation prepared for virtual SP v (by the operand
// collectors and the SP assignment) is delivered to physical SP map[v],
// where map is the virtual SP ID table. Every physical SP appears once in the
// table, so each physical SP receives exactly one virtual slot. No operand
// or register data moves: only the routing changes.
//
// Return path: each result carries its SPG and lane tag, and is steered by
// that tag to its lane position in the SPG's writeback bundle. Routing
// results by tag rather than by the table keeps results correct even if the
// table is rewritten while operations are in flight.
//
// The forward crossbar between operand collectors and SPs is the HVSM
// structure; the tag-routed return path is this design's own choice. Both
// paths are combinational.
module sp_crossbar
  import hvsm_pkg::*;
#(
  parameter int unsigned NUM_SPG  = 2,
  parameter int unsigned SPG_SIZE = 16,
  localparam int unsigned NUM_SP  = NUM_SPG * SPG_SIZE,
  localparam int unsigned ID_W    = $clog2(NUM_SP),
  localparam int unsigned SUB_W   = (SPG_SIZE > 1) ? $clog2(SPG_SIZE) : 1
) (
  input  logic [ID_W-1:0]   map     [NUM_SP],   // virtual -> physical
  input  sp_req_t           vslot   [NUM_SP],   // per virtual SP
  output sp_req_t           phys_req[NUM_SP],   // per physical SP
  input  sp_res_t           phys_res[NUM_SP],   // per physical SP
  output logic [SPG_SIZE-1:0] wb_valid [NUM_SPG],
  output logic [DATA_W-1:0]   wb_data  [NUM_SPG][SPG_SIZE]
);

  always_comb begin
    for (int p = 0; p < NUM_SP; p++) begin
      phys_req[p] = '0;
      for (int v = 0; v < NUM_SP; v++) begin
        if (map[v] == ID_W'(p)) phys_req[p] = vslot[v];
      end
    end
  end

  always_comb begin
    for (int g = 0; g < NUM_SPG; g++) begin
      wb_valid[g] = '0;
      for (int l = 0; l < SPG_SIZE; l++) wb_data[g][l] = '0;
    end
    for (int p = 0; p < NUM_SP; p++) begin
      for (int g = 0; g < NUM_SPG; g++) begin
        for (int l = 0; l < SPG_SIZE; l++) begin
          if (phys_res[p].valid && (phys_res[p].grp == GRP_W'(g)) &&
              (SUB_W'(phys_res[p].lane) == SUB_W'(l))) begin
            wb_valid[g][l] = 1'b1;
            wb_data[g][l]  = phys_res[p].data;
          end
        end
      end
    end
  end

endmodule
