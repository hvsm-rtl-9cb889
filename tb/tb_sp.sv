// tb_sp: self-checking test of the streaming processor.
//
// Streams one random operation per cycle into the SP and checks every result,
// its tag and its arrival exactly LAT cycles after issue.
module tb_sp;
  import hvsm_pkg::*;
  localparam int LAT = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  sp_req_t req;
  sp_res_t res;
  logic active;
  int checks = 0, failures = 0;

  sp #(.LAT(LAT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] model(input sp_op_e op, input logic [31:0] a, input logic [31:0] b);
    case (op)
      OP_ADD: return a + b;
      OP_SUB: return a - b;
      OP_MUL: return 32'(longint'(a) * longint'(b));
      OP_AND: return a & b;
      OP_OR:  return a | b;
      OP_XOR: return a ^ b;
      OP_SHL: return a << (b % 32);
      OP_SHR: return a >> (b % 32);
      OP_MIN: return (int'(a) < int'(b)) ? a : b;
      OP_MAX: return (int'(a) > int'(b)) ? a : b;
      default: return 32'd0;
    endcase
  endfunction

  sp_res_t exp_q [$];
  sp_res_t e;
  int cyc = 0;
  int issued_at [$];

  initial begin
    req = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      // check what arrives this cycle
      if (res.valid) begin
        checks++;
        if (exp_q.size() == 0) begin
          failures++;
          $display("FAIL unexpected result");
        end else begin
          e = exp_q.pop_front();
          if (res !== e || (cyc - issued_at.pop_front()) != LAT) begin
            failures++;
            $display("FAIL result got %h exp %h", res, e);
          end
        end
      end
      req = '0;
      req.valid = ($urandom_range(3) != 0);
      req.op    = sp_op_e'($urandom_range(9));
      req.a     = $urandom;
      req.b     = (t % 5 == 0) ? 32'($urandom_range(40)) : $urandom;
      req.warp  = WID_W'($urandom);
      req.grp   = GRP_W'($urandom);
      req.lane  = LANE_W'($urandom);
      checks++;
      if (active !== req.valid) failures++;
      if (req.valid) begin
        e = '0;
        e.valid = 1'b1;
        e.data  = model(req.op, req.a, req.b);
        e.warp  = req.warp;
        e.grp   = req.grp;
        e.lane  = req.lane;
        exp_q.push_back(e);
        issued_at.push_back(cyc);
      end
      cyc++;
    end
    checks++;
    if (exp_q.size() > LAT) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
