// shifter_unit: the rotator shared by all subarrays of one bank.
//
// It has two jobs. When weights are loaded, every OPW-bit operand of a row is
// rotated by a bit count, giving the shifted replicas that are stored in
// consecutive rows of a subarray (replica k = every weight rotated left by k).
// When activations are reused for other output neurons, a whole row is
// rotated by whole operands, so that operand I_0 takes the place of I_1,
// I_1 that of I_2, and so on (rotation towards higher lanes).
//
// Both are done by right-rotate-only barrel stages (log2 stages, stage s
// rotates by 2^s units or passes through); a left rotation by k is a right
// rotation by (units - k). In MODE_BIT the unit is one bit inside each lane,
// in MODE_OPERAND it is one OPW-bit lane of the whole row.
//
// Timing: in_valid/mode/amount/in_row are registered; out_row is valid one
// cycle later with out_valid high.
module shifter_unit
  import sisca_pkg::*;
#(
  parameter int unsigned COLS  = sisca_pkg::SA_COLS,
  parameter int unsigned OPW   = sisca_pkg::OP_W,
  localparam int unsigned LANES = COLS / OPW,
  localparam int unsigned AW    = $clog2(LANES) > $clog2(OPW) ? $clog2(LANES) : $clog2(OPW)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             mode_operand,  // 0: rotate bits in each lane, 1: rotate lanes
  input  logic [AW-1:0]    amount,        // left rotation: bits (mode 0) or operands (mode 1)
  input  logic [COLS-1:0]  in_row,
  output logic             out_valid,
  output logic [COLS-1:0]  out_row
);

  localparam int unsigned BS = $clog2(OPW);    // stages of the bit rotator
  localparam int unsigned LS = $clog2(LANES);  // stages of the operand rotator

  // Right-rotate amounts equivalent to the requested left rotations
  logic [BS-1:0] rbit;
  logic [LS-1:0] rlane;
  assign rbit  = BS'(OPW   - int'(amount[BS-1:0]));
  assign rlane = LS'(LANES - int'(amount[LS-1:0]));

  // Bit mode: barrel right-rotate inside every lane
  logic [COLS-1:0] bit_rot;
  always_comb begin
    for (int l = 0; l < int'(LANES); l++) begin
      logic [OPW-1:0] v;
      v = in_row[l*OPW +: OPW];
      for (int s = 0; s < int'(BS); s++)
        if (rbit[s]) v = (v >> (1 << s)) | (v << (OPW - (1 << s)));
      bit_rot[l*OPW +: OPW] = v;
    end
  end

  // Operand mode: barrel right-rotate of the row by whole lanes
  logic [COLS-1:0] lane_rot;
  always_comb begin
    logic [COLS-1:0] v;
    v = in_row;
    for (int s = 0; s < int'(LS); s++)
      if (rlane[s]) v = (v >> (OPW << s)) | (v << (COLS - (OPW << s)));
    lane_rot = v;
  end

  always_ff @(posedge clk) begin
    if (in_valid) out_row <= mode_operand ? lane_rot : bit_rot;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

endmodule
