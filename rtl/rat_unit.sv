// rat_unit: Registers and Adder Tree placed beside one subarray.
//
// A product of two OPW-bit operands is formed in OPW steps. In step k the
// subarray ANDs the activation row with weight replica k, a copy of the
// weight row in which every OPW-bit lane is rotated left by k bits. Bit j of
// lane L in step k is therefore A[j] & W[(j-k) mod OPW], a single term of
// the long multiplication with weight 2^(j + ((j-k) mod OPW)). Within one
// step that weight depends only on the column j inside the lane, not on the
// lane, so the adder tree first counts, for each of the OPW column
// positions, how many lanes have a 1 there (OPW population counts over
// LANES bits), then shifts each count by j + ((j-k) mod OPW) and adds the
// OPW shifted counts into an accumulator register. After OPW steps the
// accumulator holds the sum over all lanes of A*W: the subarray's partial
// sum of the dot product. Summing per column instead of per lane gives the
// same result with one small tree instead of LANES multiplier trees.
//
// Operands are signed two's complement: a term whose activation bit or
// weight bit (but not both) is the sign bit counts negative (Baugh-Wooley
// form), so the same AND rows give the signed product. The partial sum is
// also given reduced to PSUM_W bits (shifted right by FRAC_BITS and
// saturated), the 2-byte value that is sent over the H-tree to the home
// subarray. Signedness, FRAC_BITS, the rounding and the column-count
// arrangement of the tree are this design's choices. The original scheme
// keeps all AND rows in registers and adds them after the last one; here
// each row is reduced as it arrives, which gives the same sum with one
// accumulator register instead of OPW-1 row registers.
//
// Timing: pp_valid/pp_step deliver one AND row per cycle, steps 0 .. OPW-1
// in order (gaps between steps are allowed); step 0 restarts the
// accumulator. The step with pp_step == OPW-1 completes the set: its total
// is registered one cycle later (psum_full, pending high) and the reduced
// psum one cycle after that, when psum_valid is high for one cycle. A new
// set can start in the very next cycle, so one dot product per OPW cycles is
// sustained.
module rat_unit
  import sisca_pkg::*;
#(
  parameter int unsigned COLS      = sisca_pkg::SA_COLS,
  parameter int unsigned OPW       = sisca_pkg::OP_W,
  parameter int unsigned PSW       = sisca_pkg::PSUM_W,
  parameter int unsigned FRAC      = sisca_pkg::FRAC_BITS,
  localparam int unsigned LANES    = COLS / OPW,
  localparam int unsigned PROD_W   = 2 * OPW,
  localparam int unsigned SUM_W    = PROD_W + $clog2(LANES) + 1,
  localparam int unsigned SW       = $clog2(OPW)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          pp_valid,
  input  logic [SW-1:0]                 pp_step,
  input  logic [COLS-1:0]               pp_row,
  output logic                          psum_valid,
  output logic signed [PSW-1:0]         psum,       // reduced, for the H-tree
  output logic signed [SUM_W-1:0]       psum_full,  // exact sum of all lane products
  output logic                          pending     // a result is in the pipeline
);

  // Column masks: COL_MASK[j] selects bit j of every lane.
  typedef logic [COLS-1:0] row_t;
  function automatic row_t col_mask(input int unsigned j);
    row_t m;
    m = '0;
    for (int unsigned l = 0; l < LANES; l++) m[l*OPW + j] = 1'b1;
    return m;
  endfunction

  // Adder tree of one step: sum of the OPW column counts, each weighted by
  // +-2^(j + ((j-k) mod OPW)).
  logic signed [SUM_W-1:0] step_sum;
  always_comb begin
    step_sum = '0;
    for (int unsigned j = 0; j < OPW; j++) begin
      logic [SW-1:0] b;
      logic signed [SUM_W-1:0] term;
      b    = SW'(j) - pp_step;                          // weight bit position
      term = SUM_W'($countones(pp_row & col_mask(j))) << (j + b);
      if ((j == OPW - 1) != (b == SW'(OPW - 1)))
        step_sum = step_sum - term;
      else
        step_sum = step_sum + term;
    end
  end

  // Accumulator register of the running set.
  logic signed [SUM_W-1:0] acc;
  logic last;
  assign last = pp_valid && (pp_step == SW'(OPW - 1));

  always_ff @(posedge clk) begin
    if (pp_valid) acc <= (pp_step == '0) ? step_sum : acc + step_sum;
    if (last) psum_full <= acc + step_sum;
  end

  // Second stage: reduction to the 2-byte partial sum.
  logic stage1_valid;
  always_ff @(posedge clk) begin
    if (stage1_valid) psum <= PSW'(sat_s(64'(psum_full >>> FRAC), PSW));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage1_valid <= 1'b0;
      psum_valid   <= 1'b0;
    end else begin
      stage1_valid <= last;
      psum_valid   <= stage1_valid;
    end
  end

  assign pending = stage1_valid;

endmodule
