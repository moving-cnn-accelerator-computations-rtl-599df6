// htree: the cache's H-tree interconnect, a binary tree of htree_node
// switches with the NB banks at its leaves.
//
// Nodes are numbered as a heap: node 1 is the root, node n has children 2n
// and 2n+1, and leaf NB+b is bank b. Node n at depth d covers NB >> d banks
// starting at (n - 2^d) * (NB >> d). Each bank has one injection port
// (valid/ready) and one ejection port; ejection is always accepted by the
// bank. A packet between banks b1 and b2 crosses 2*(levels to their lowest
// common node) switches, one cycle each, so nearby banks talk without
// touching the root. NB must be a power of two, at least 2.
//
// ev_conflicts counts, per cycle, the switches in which a packet had to wait
// for an output taken by another packet (H-tree contention).
module htree #(
  parameter int unsigned NB = 128,   // banks (leaves)
  parameter int unsigned DW = 526,   // packet width
  localparam int unsigned BW = NB > 1 ? $clog2(NB) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NB-1:0]     inj_valid,
  output logic [NB-1:0]     inj_ready,
  input  logic [BW-1:0]     inj_dst  [NB],
  input  logic [DW-1:0]     inj_data [NB],
  output logic [NB-1:0]     ej_valid,
  output logic [DW-1:0]     ej_data  [NB],
  output logic [$clog2(NB)-1:0] ev_conflicts
);

  // channel from element i up to its parent, and from the parent down to i
  logic            up_v [2*NB], up_r [2*NB], dn_v [2*NB], dn_r [2*NB];
  logic [BW-1:0]   up_d [2*NB], dn_d [2*NB];
  logic [DW-1:0]   up_x [2*NB], dn_x [2*NB];
  logic [NB-1:1]   conflict;

  // leaves: banks
  for (genvar b = 0; b < int'(NB); b++) begin : g_leaf
    assign up_v[NB+b]   = inj_valid[b];
    assign inj_ready[b] = up_r[NB+b];
    assign up_d[NB+b]   = inj_dst[b];
    assign up_x[NB+b]   = inj_data[b];
    assign ej_valid[b]  = dn_v[NB+b];
    assign ej_data[b]   = dn_x[NB+b];
    assign dn_r[NB+b]   = 1'b1;
  end

  // the root has no parent
  assign dn_v[1] = 1'b0;
  assign dn_d[1] = '0;
  assign dn_x[1] = '0;
  assign up_r[1] = 1'b1;
  assign dn_v[0] = 1'b0;
  assign dn_d[0] = '0;
  assign dn_x[0] = '0;
  assign up_r[0] = 1'b1;
  assign up_v[0] = 1'b0;
  assign up_d[0] = '0;
  assign up_x[0] = '0;
  assign dn_r[0] = 1'b1;

  for (genvar n = 1; n < int'(NB); n++) begin : g_node
    localparam int unsigned D    = $clog2(n + 1) - 1;    // depth of node n
    localparam int unsigned SPAN = NB >> D;
    localparam int unsigned LO   = (n - (1 << D)) * SPAN;

    logic [2:0]      iv, ir, ov, orr;
    logic [BW-1:0]   id [3], od [3];
    logic [DW-1:0]   ix [3], ox [3];

    // port 0: parent, port 1: left child 2n, port 2: right child 2n+1
    assign iv    = {up_v[2*n+1], up_v[2*n], dn_v[n]};
    assign id[0] = dn_d[n];      assign ix[0] = dn_x[n];
    assign id[1] = up_d[2*n];    assign ix[1] = up_x[2*n];
    assign id[2] = up_d[2*n+1];  assign ix[2] = up_x[2*n+1];
    assign dn_r[n]     = ir[0];
    assign up_r[2*n]   = ir[1];
    assign up_r[2*n+1] = ir[2];

    assign up_v[n]     = ov[0];  assign up_d[n]     = od[0];  assign up_x[n]     = ox[0];
    assign dn_v[2*n]   = ov[1];  assign dn_d[2*n]   = od[1];  assign dn_x[2*n]   = ox[1];
    assign dn_v[2*n+1] = ov[2];  assign dn_d[2*n+1] = od[2];  assign dn_x[2*n+1] = ox[2];
    assign orr = {dn_r[2*n+1], dn_r[2*n], up_r[n]};

    htree_node #(.BW(BW), .DW(DW)) u_node (
      .clk, .rst_n,
      .lo((BW+1)'(LO)), .mid((BW+1)'(LO + SPAN / 2)), .hi((BW+1)'(LO + SPAN)),
      .in_valid(iv), .in_ready(ir), .in_dst(id), .in_data(ix),
      .out_valid(ov), .out_ready(orr), .out_dst(od), .out_data(ox),
      .ev_conflict(conflict[n])
    );
  end

  assign ev_conflicts = $clog2(NB)'($countones(conflict));

  initial assert (NB >= 2 && (NB & (NB - 1)) == 0)
    else $fatal(1, "htree: NB must be a power of two >= 2");

endmodule
