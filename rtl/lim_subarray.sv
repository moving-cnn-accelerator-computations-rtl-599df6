// lim_subarray: one SRAM subarray of the last-level cache with the
// logic-in-memory extension.
//
// Besides a normal row read and a lane-masked row write, the subarray can
// raise two wordlines at once. Cells on a shared bitline then pull the
// (split) sense amplifier so that it resolves the bit-wise AND of both rows;
// this is the only "computation" done inside the array. Here the array is a
// register array and the AND is written out as logic, which is the function
// the modified sense amplifiers give; the analog circuit itself is not
// modelled.
//
// Interface: one port, one operation per cycle. op/row_a/row_b/wdata/wmask
// are sampled on the rising clock edge; for SA_READ and SA_AND the result is
// on rdata with rvalid high in the next cycle (1-cycle latency). SA_WRITE
// writes only the OP_W-bit lanes whose wmask bit is set, so a single
// output operand can be placed into a row. Contents are not reset (SRAM).
module lim_subarray
  import sisca_pkg::*;
#(
  parameter int unsigned ROWS = sisca_pkg::SA_ROWS,
  parameter int unsigned COLS = sisca_pkg::SA_COLS,
  parameter int unsigned OPW  = sisca_pkg::OP_W,
  localparam int unsigned LANES = COLS / OPW,
  localparam int unsigned RW    = $clog2(ROWS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  sa_op_e            op,
  input  logic [RW-1:0]     row_a,   // read / write / first AND row
  input  logic [RW-1:0]     row_b,   // second AND row
  input  logic [COLS-1:0]   wdata,
  input  logic [LANES-1:0]  wmask,   // one bit per OPW-bit logical column
  output logic [COLS-1:0]   rdata,
  output logic              rvalid
);

  logic [COLS-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (op == SA_WRITE) begin
      for (int l = 0; l < int'(LANES); l++)
        if (wmask[l]) mem[row_a][l*OPW +: OPW] <= wdata[l*OPW +: OPW];
    end
    if (op == SA_READ)     rdata <= mem[row_a];
    else if (op == SA_AND) rdata <= mem[row_a] & mem[row_b];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rvalid <= 1'b0;
    else        rvalid <= (op == SA_READ) || (op == SA_AND);
  end

endmodule
