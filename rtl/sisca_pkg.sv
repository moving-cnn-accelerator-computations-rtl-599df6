// sisca_pkg: constants, encodings and arithmetic helpers shared by the
// in-cache CNN accelerator.
//
// The accelerator turns each SRAM subarray of a last-level cache into a
// dot-product engine: two wordlines are raised together so the sense
// amplifiers return the bit-wise AND of a weight row and an activation row,
// and a small Registers-and-Adder-Tree (RAT) beside the subarray weights and
// sums those AND bits into products. The sizes below are the main
// configuration: a 32 MB cache of 128 banks x 8 subarrays of 512x512 bits,
// 16-bit operands, so 32 operand lanes ("logical columns") per row.
// FRAC_BITS (binary point of the 16-bit fixed-point format) is this design's
// own choice.
package sisca_pkg;

  // ---------------- main configuration ----------------
  localparam int unsigned SA_ROWS      = 512;  // wordlines per subarray
  localparam int unsigned SA_COLS      = 512;  // bitlines per subarray
  localparam int unsigned OP_W         = 16;   // operand width (weights, activations)
  localparam int unsigned SA_PER_BANK  = 8;    // subarrays per bank
  localparam int unsigned N_BANKS      = 128;  // banks: 128*8*32 KB = 32 MB
  localparam int unsigned GROUP_SIZE   = 18;   // subarrays that share one output neuron
  localparam int unsigned PSUM_W       = 16;   // partial sum sent over the H-tree (2 bytes)
  localparam int unsigned FRAC_BITS    = 8;    // fixed-point binary point (own choice)

  // ---------------- command opcodes of the top ----------------
  typedef enum logic [2:0] {
    OP_WRITE   = 3'd0,  // write one row of one subarray (lane-masked)
    OP_READ    = 3'd1,  // read one row of one subarray
    OP_LOAD_W  = 3'd2,  // write OP_W bit-rotated replicas of a weight row
    OP_ROT     = 3'd3,  // every subarray: operand-level rotate of one row
    OP_MOVE    = 3'd4,  // every subarray: send a row to subarray (s+delta) mod N
    OP_COMPUTE = 3'd5   // every subarray: 16-step in-situ dot product + gather
  } opcode_e;

  // Packet kinds carried by the H-tree
  typedef enum logic {
    PKT_PSUM = 1'b0,    // 16-bit partial sum for a home subarray
    PKT_ROW  = 1'b1     // a whole subarray row
  } pkt_kind_e;

  // Subarray port operations
  typedef enum logic [1:0] {
    SA_NOP   = 2'd0,
    SA_READ  = 2'd1,
    SA_WRITE = 2'd2,
    SA_AND   = 2'd3     // dual-wordline read: mem[row_a] & mem[row_b]
  } sa_op_e;

  // Saturate a wide signed value to a narrower signed width.
  function automatic logic signed [63:0] sat_s(input logic signed [63:0] v, input int unsigned w);
    logic signed [63:0] hi, lo;
    hi = (64'sd1 <<< (w - 1)) - 64'sd1;
    lo = -(64'sd1 <<< (w - 1));
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

endpackage
