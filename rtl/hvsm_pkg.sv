// hvsm_pkg: types, constants and arithmetic helpers shared by the HVSM blocks.
//
// HVSM (hardware-variability aware SP management) steers the threads of a warp
// onto the streaming processors (SPs) of an SM in order of SP condition, so the
// fastest, least aged SPs carry most of the work. This package holds what the
// blocks share: the SP operation set, the payload that travels from the
// operand collectors through the crossbar to an SP and back, and the integer
// square and cube roots used by the per-SP condition detectors.
//
// Fixed-point conventions (this design's own choice):
//   * voltages are signed, 1 LSB = 0.1 mV;
//   * effective channel length is unsigned, 1 LSB = 0.01 nm;
//   * Q16 means 16 fractional bits.
// The operation set of the SP is this design's own choice; the SP itself is
// only named, not detailed, by the HVSM description.
package hvsm_pkg;

  localparam int unsigned DATA_W  = 32;  // SP operand / result width
  localparam int unsigned WID_W   = 6;   // warp identifier width
  localparam int unsigned LANE_W  = 5;   // thread lane within a 32-thread warp
  localparam int unsigned GRP_W   = 4;   // SP group (SPG) identifier width
  localparam int unsigned VOLT_W  = 16;  // signed voltage, 0.1 mV per LSB
  localparam int unsigned LEFF_W  = 16;  // unsigned Leff, 0.01 nm per LSB
  localparam int unsigned TIMER_W = 64;  // stress / recovery timers (cycles)
  localparam int unsigned KEY_W   = 40;  // SP condition key (relative delay)

  // SP operations. All are single-issue integer operations.
  typedef enum logic [3:0] {
    OP_ADD = 4'd0,
    OP_SUB = 4'd1,
    OP_MUL = 4'd2,
    OP_AND = 4'd3,
    OP_OR  = 4'd4,
    OP_XOR = 4'd5,
    OP_SHL = 4'd6,
    OP_SHR = 4'd7,
    OP_MIN = 4'd8,
    OP_MAX = 4'd9
  } sp_op_e;

  // One thread's operation as it leaves the operand collector for an SP.
  typedef struct packed {
    logic                valid;
    sp_op_e              op;
    logic [DATA_W-1:0]   a;
    logic [DATA_W-1:0]   b;
    logic [WID_W-1:0]    warp;
    logic [GRP_W-1:0]    grp;   // SPG that the warp was assigned to
    logic [LANE_W-1:0]   lane;  // thread lane within the warp
  } sp_req_t;

  // One thread's result as it leaves an SP for writeback.
  typedef struct packed {
    logic                valid;
    logic [DATA_W-1:0]   data;
    logic [WID_W-1:0]    warp;
    logic [GRP_W-1:0]    grp;
    logic [LANE_W-1:0]   lane;
  } sp_res_t;

  // Integer square root, floor(sqrt(x)), by the restoring bit-by-bit method.
  function automatic logic [31:0] isqrt64(input logic [63:0] x);
    logic [63:0] rem;
    logic [31:0] root;
    logic [63:0] trial;
    rem  = x;
    root = '0;
    for (int i = 31; i >= 0; i--) begin
      trial = ({32'b0, root} << (i + 1)) + (64'd1 << (2 * i));
      if (rem >= trial) begin
        rem  = rem - trial;
        root = root | (32'd1 << i);
      end
    end
    return root;
  endfunction

  // Signed integer cube root, truncated toward zero, of a 48-bit value.
  // Magnitudes up to 2^47 give roots below 2^16; the root is found bit by
  // bit, keeping a bit when the cube of the trial root still fits.
  function automatic logic signed [17:0] icbrt48(input logic signed [47:0] x);
    logic [47:0] mag;
    logic [16:0] root;
    logic [16:0] trial;
    logic [50:0] cube;
    mag  = x[47] ? 48'(-x) : 48'(x);
    root = '0;
    for (int i = 15; i >= 0; i--) begin
      trial = root | (17'd1 << i);
      cube  = 51'(trial) * 51'(trial) * 51'(trial);
      if (cube <= 51'(mag)) root = trial;
    end
    return x[47] ? -$signed({1'b0, root}) : $signed({1'b0, root});
  endfunction

endpackage
