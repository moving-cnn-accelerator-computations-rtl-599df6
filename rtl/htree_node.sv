// htree_node: one switch of the H-tree that joins the banks of the cache.
//
// The H-tree is a binary tree with the banks at its leaves. A node covers
// the banks lo .. hi-1; its left subtree covers lo .. mid-1, its right
// subtree mid .. hi-1. A packet is routed by its destination bank: down-left,
// down-right, or up to the parent when the bank lies outside this node. A
// packet may also turn straight back into the port it came from (a bank
// sending to itself, or to its sibling, turns at the lowest common node).
//
// Port 0 faces the parent, port 1 the left child, port 2 the right child.
// Every output has a two-packet queue whose "space" depends only on its own
// fill level, so ready never ripples combinationally from switch to switch;
// each hop costs one cycle and one packet per output per cycle is sustained. When several inputs want the
// same output, a round-robin pointer of that output picks one and the others
// wait (valid/ready backpressure, counted by ev_conflict). Only the
// existence of the H-tree and its use for rows and partial sums come from
// the design's description; the switch itself is this design's own choice.
module htree_node #(
  parameter int unsigned BW = 7,     // destination bank width
  parameter int unsigned DW = 526    // packet width (512-bit row + header)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [BW:0]       lo,      // first bank under this node
  input  logic [BW:0]       mid,     // first bank of the right subtree
  input  logic [BW:0]       hi,      // one past the last bank
  input  logic [2:0]        in_valid,
  output logic [2:0]        in_ready,
  input  logic [BW-1:0]     in_dst  [3],
  input  logic [DW-1:0]     in_data [3],
  output logic [2:0]        out_valid,
  input  logic [2:0]        out_ready,
  output logic [BW-1:0]     out_dst  [3],
  output logic [DW-1:0]     out_data [3],
  output logic              ev_conflict
);

  // output port wanted by each input
  logic [1:0] route [3];
  always_comb begin
    for (int i = 0; i < 3; i++) begin
      logic [BW:0] d;
      d = {1'b0, in_dst[i]};
      if (d >= lo && d < mid)      route[i] = 2'd1;
      else if (d >= mid && d < hi) route[i] = 2'd2;
      else                         route[i] = 2'd0;
    end
  end

  logic [1:0] rr [3];          // input served first by each output
  logic [1:0] grant [3];       // input granted by each output
  logic [2:0] gvalid;          // output takes a packet this cycle
  logic [2:0] space;           // output queue can take a packet
  logic [1:0] cnt [3];         // fill level of each output queue
  logic [BW-1:0] q_dst  [3][2];
  logic [DW-1:0] q_data [3][2];

  for (genvar o = 0; o < 3; o++) begin : g_out
    assign out_valid[o] = (cnt[o] != 2'd0);
    assign out_dst[o]   = q_dst[o][0];
    assign out_data[o]  = q_data[o][0];
  end

  always_comb begin
    in_ready = '0;
    for (int o = 0; o < 3; o++) begin
      space[o]  = (cnt[o] != 2'd2);
      gvalid[o] = 1'b0;
      grant[o]  = '0;
      for (int k = 0; k < 3; k++) begin
        int unsigned i;
        i = (int'(rr[o]) + k) % 3;
        if (!gvalid[o] && in_valid[i] && route[i] == 2'(o)) begin
          gvalid[o] = 1'b1;
          grant[o]  = 2'(i);
        end
      end
      gvalid[o] = gvalid[o] && space[o];
      if (gvalid[o]) in_ready[grant[o]] = 1'b1;
    end
  end

  assign ev_conflict = |(in_valid & ~in_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < 3; o++) begin
        cnt[o] <= '0;
        rr[o]  <= '0;
        for (int e = 0; e < 2; e++) begin
          q_dst[o][e]  <= '0;
          q_data[o][e] <= '0;
        end
      end
    end else begin
      for (int o = 0; o < 3; o++) begin
        logic pop;
        logic [1:0] n;
        pop = out_valid[o] && out_ready[o];
        n   = cnt[o];
        if (pop) begin
          q_dst[o][0]  <= q_dst[o][1];
          q_data[o][0] <= q_data[o][1];
          n = n - 2'd1;
        end
        if (gvalid[o]) begin
          q_dst[o][n[0]]  <= in_dst[grant[o]];
          q_data[o][n[0]] <= in_data[grant[o]];
          n = n + 2'd1;
          rr[o] <= 2'((int'(grant[o]) + 1) % 3);
        end
        cnt[o] <= n;
      end
    end
  end

endmodule
