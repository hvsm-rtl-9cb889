// sp: one streaming processor (SP), the execution unit of one thread.
//
// An SP executes the normal integer instructions of one thread of a warp:
// it takes one operation per cycle from the crossbar and returns its result,
// with the thread's warp, SPG and lane tag, LAT cycles later through a
// register pipeline. active is high in every cycle the SP accepts an
// operation; the SP's condition detector counts those cycles as NBTI stress
// and the others as recovery.
//
// The HVSM description treats the SP as the existing GPU execution unit and
// does not detail it; the operation set (see sp_op_e), the 32-bit width,
// the fixed latency (default 2) and the full pipelining are this design's
// own choices. All SPs run on one clock: condition differences show up as
// ageing, not as per-SP latency.
module sp
  import hvsm_pkg::*;
#(
  parameter int unsigned LAT = 2
) (
  input  logic    clk,
  input  logic    rst_n,
  input  sp_req_t req,
  output sp_res_t res,
  output logic    active
);

  sp_res_t r0;

  always_comb begin
    r0       = '0;
    r0.valid = req.valid;
    r0.warp  = req.warp;
    r0.grp   = req.grp;
    r0.lane  = req.lane;
    unique case (req.op)
      OP_ADD:  r0.data = req.a + req.b;
      OP_SUB:  r0.data = req.a - req.b;
      OP_MUL:  r0.data = req.a * req.b;
      OP_AND:  r0.data = req.a & req.b;
      OP_OR:   r0.data = req.a | req.b;
      OP_XOR:  r0.data = req.a ^ req.b;
      OP_SHL:  r0.data = req.a << req.b[4:0];
      OP_SHR:  r0.data = req.a >> req.b[4:0];
      OP_MIN:  r0.data = ($signed(req.a) < $signed(req.b)) ? req.a : req.b;
      OP_MAX:  r0.data = ($signed(req.a) > $signed(req.b)) ? req.a : req.b;
      default: r0.data = '0;
    endcase
  end

  assign active = req.valid;

  sp_res_t pipe [LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) pipe[i] <= '0;
    end else begin
      pipe[0] <= r0;
      for (int i = 1; i < LAT; i++) pipe[i] <= pipe[i-1];
    end
  end

  assign res = pipe[LAT-1];

endmodule
