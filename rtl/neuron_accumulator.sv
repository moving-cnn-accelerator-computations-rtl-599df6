// neuron_accumulator: gathers the partial sums of one output neuron in its
// home subarray.
//
// A neuron with many inputs is spread over a group of subarrays (18 in the
// main mapping: 576 products, 32 per subarray). Every subarray of the group
// reduces its own products to one PSUM_W-bit partial sum; the home subarray
// adds its own sum and the ones that arrive over the H-tree and, once it has
// counted all of them, emits the output neuron saturated to OPW bits, ready
// to be written into one of its rows. Saturation instead of wrap-around is
// this design's choice.
//
// Interface: `start` clears the sum and loads the number of partial sums to
// expect. Two inputs can each add one partial sum per cycle: loc_* for the
// home subarray's own RAT and rem_* for packets from the H-tree. In the cycle
// after the last expected sum was added, neuron_valid is high for one cycle.
// Sums that arrive while no neuron is being gathered are an error.
module neuron_accumulator
  import sisca_pkg::*;
#(
  parameter int unsigned PSW    = sisca_pkg::PSUM_W,
  parameter int unsigned OPW    = sisca_pkg::OP_W,
  parameter int unsigned MAX_N  = 1024,          // largest group that can be gathered
  localparam int unsigned CW    = $clog2(MAX_N + 1),
  localparam int unsigned ACC_W = PSW + CW + 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [CW-1:0]          expected,
  input  logic                   loc_valid,
  input  logic signed [PSW-1:0]  loc_psum,
  input  logic                   rem_valid,
  input  logic signed [PSW-1:0]  rem_psum,
  output logic                   busy,
  output logic                   neuron_valid,
  output logic signed [OPW-1:0]  neuron
);

  logic signed [ACC_W-1:0] acc;
  logic [CW-1:0]           left;      // partial sums still to come

  logic signed [ACC_W-1:0] add;
  logic [1:0]              n_in;
  always_comb begin
    add  = '0;
    n_in = '0;
    if (loc_valid) begin add = add + ACC_W'(loc_psum); n_in = n_in + 2'd1; end
    if (rem_valid) begin add = add + ACC_W'(rem_psum); n_in = n_in + 2'd1; end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc          <= '0;
      left         <= '0;
      busy         <= 1'b0;
      neuron_valid <= 1'b0;
      neuron       <= '0;
    end else begin
      neuron_valid <= 1'b0;
      if (start) begin
        acc  <= '0;
        left <= expected;
        busy <= (expected != '0);
      end else if (busy && n_in != 2'd0) begin
        acc  <= acc + add;
        left <= left - CW'(n_in);
        if (left == CW'(n_in)) begin
          busy         <= 1'b0;
          neuron_valid <= 1'b1;
          neuron       <= OPW'(sat_s(64'(acc + add), OPW));
        end
      end
    end
  end

  // A partial sum must only arrive while a neuron is being gathered, and no
  // more of them than were announced.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (n_in != 2'd0 && !start) |-> (busy && left >= CW'(n_in)))
    else $error("neuron_accumulator: unexpected partial sum");

endmodule
