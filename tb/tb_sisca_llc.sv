// tb_sisca_llc: end-to-end test of the in-cache accelerator at a reduced
// size (4 banks x 8 subarrays of 64x64 bits, 4 operands per row).
//
// It runs the layer schedule the design is built for and checks every
// output neuron against a model computed here:
//   1. load bit-rotated weight replicas (2 weight sets) and 2 activation
//      rows into every subarray;
//   2. COMPUTE with groups of 3 subarrays (groups span banks, two subarrays
//      idle): 2 x 2 dot products per subarray, 4 neurons per group; the run
//      must take at least 16 cycles per product and little more;
//   3. rotate both activation rows by one operand and COMPUTE again;
//   4. MOVE every activation row to the subarray 5 further on, check rows,
//      and COMPUTE from the moved rows;
//   5. COMPUTE with one group of all 32 subarrays: 31 partial sums per
//      product cannot reach the home in 16 cycles, so subarrays wait for
//      their outbox.
// Every mechanism (weight load, rotation, move, dot products, neuron writes,
// partial-sum and row packets, port stalls, outbox stalls, H-tree conflicts)
// is counted and must have happened at least once.
module tb_sisca_llc;
  import sisca_pkg::*;
  localparam int unsigned ROWS = 64, COLS = 64, OPW = 16, PSW = 16, FRAC = 8, NB = 4, SPB = 8;
  localparam int unsigned NSA = NB * SPB, LANES = COLS / OPW, RW = $clog2(ROWS), LW = $clog2(LANES);
  localparam int unsigned BW = $clog2(NB), AW = $clog2(SPB), GW = $clog2(NSA), CW = $clog2(NSA + 1);
  localparam int unsigned MW = 4;
  localparam int unsigned NACT = 2, NWSET = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cmd_valid, cmd_ready, rsp_valid;
  opcode_e cmd_op;
  logic [BW-1:0] cmd_bank;
  logic [AW-1:0] cmd_sa;
  logic [RW-1:0] cmd_row, cmd_row2, cmd_out_row;
  logic [COLS-1:0] cmd_data, rsp_data;
  logic [LANES-1:0] cmd_mask;
  logic [MW-1:0] cmd_amount;
  logic [GW-1:0] cmd_delta;
  logic [CW-1:0] cmd_group_n, cmd_n_groups;
  logic [RW:0] cmd_n_act, cmd_n_wset;
  logic [LW-1:0] cmd_out_lane;
  logic [31:0] cnt_products, cnt_neurons, cnt_psum_pkts, cnt_row_pkts, cnt_stall_port,
               cnt_stall_tx, cnt_conflicts;
  int checks = 0, failures = 0;
  int n_load = 0, n_rot = 0, n_move = 0, n_compute = 0;

  sisca_llc #(.ROWS(ROWS), .COLS(COLS), .OPW(OPW), .PSW(PSW), .FRAC(FRAC),
              .NB(NB), .SPB(SPB)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // model of the operands held in each subarray
  logic [OPW-1:0] A [NSA][NACT+1][LANES];   // activation rows 40, 41 (and 42 after a move)
  logic [OPW-1:0] W [NSA][NWSET][LANES];

  function automatic longint sat16(input longint v);
    return v > 32767 ? 32767 : (v < -32768 ? -32768 : v);
  endfunction

  function automatic longint psum_of(input int s, input int a, input int w);
    longint x;
    x = 0;
    for (int l = 0; l < int'(LANES); l++) x += longint'($signed(A[s][a][l])) * longint'($signed(W[s][w][l]));
    return sat16(x >>> FRAC);
  endfunction

  task automatic issue(input opcode_e op, input int s, input int row, input int row2,
                       input logic [COLS-1:0] data, output int cycles);
    wait (cmd_ready);
    #1;
    cmd_valid = 1; cmd_op = op; cmd_bank = BW'(s / SPB); cmd_sa = AW'(s % SPB);
    cmd_row = RW'(row); cmd_row2 = RW'(row2); cmd_data = data; cmd_mask = '1;
    @(posedge clk); #1 cmd_valid = 0;
    cycles = 1;
    while (!cmd_ready) begin @(posedge clk); #1 cycles++; end
  endtask

  task automatic read_row(input int s, input int row, output logic [COLS-1:0] d);
    int c;
    fork
      begin
        @(posedge clk iff rsp_valid);
        d = rsp_data;
      end
      issue(OP_READ, s, row, 0, '0, c);
    join
  endtask

  function automatic logic [COLS-1:0] pack(input logic [OPW-1:0] v [LANES]);
    logic [COLS-1:0] r;
    for (int l = 0; l < int'(LANES); l++) r[l*OPW +: OPW] = v[l];
    return r;
  endfunction

  // run a COMPUTE and check the neurons of every home subarray
  task automatic compute_check(input int gsize, input int a_slot0, input int act_row,
                               input int out_row, input int nact, input int nwset, input string tag);
    int cyc, ngroups;
    logic [COLS-1:0] d;
    ngroups = NSA / gsize;
    cmd_group_n = CW'(gsize); cmd_n_groups = CW'(ngroups);
    cmd_n_act = (RW+1)'(nact); cmd_n_wset = (RW+1)'(nwset);
    cmd_out_row = RW'(out_row); cmd_out_lane = '0;
    issue(OP_COMPUTE, 0, act_row, 0, '0, cyc);
    n_compute++;
    if (gsize < 8) begin
      chk(cyc >= int'(OPW) * nact * nwset && cyc <= int'(OPW) * nact * nwset + 40,
          $sformatf("%s: %0d products took %0d cycles", tag, nact * nwset, cyc));
    end
    for (int g = 0; g < ngroups; g++) begin
      read_row(g * gsize, out_row, d);
      for (int p = 0; p < nact * nwset; p++) begin
        longint e;
        e = 0;
        for (int s = g * gsize; s < (g + 1) * gsize; s++) e += psum_of(s, a_slot0 + p / nwset, p % nwset);
        chk($signed(d[p*OPW +: OPW]) == sat16(e),
            $sformatf("%s: group %0d product %0d neuron %0d expected %0d", tag, g, p,
                      $signed(d[p*OPW +: OPW]), sat16(e)));
      end
    end
  endtask

  initial begin
    int cyc;
    logic [COLS-1:0] d;
    logic [OPW-1:0] v [LANES];
    cmd_valid = 0; cmd_op = OP_WRITE; cmd_bank = '0; cmd_sa = '0; cmd_row = '0; cmd_row2 = '0;
    cmd_data = '0; cmd_mask = '0; cmd_amount = '0; cmd_delta = '0; cmd_group_n = '0;
    cmd_n_groups = '0; cmd_n_act = '0; cmd_n_wset = '0; cmd_out_row = '0; cmd_out_lane = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;

    // ---- 1: operands
    for (int s = 0; s < int'(NSA); s++) begin
      for (int w = 0; w < int'(NWSET); w++) begin
        for (int l = 0; l < int'(LANES); l++) W[s][w][l] = OPW'($urandom);
        issue(OP_LOAD_W, s, w * OPW, 0, pack(W[s][w]), cyc);
        n_load++;
      end
      for (int a = 0; a < int'(NACT); a++) begin
        for (int l = 0; l < int'(LANES); l++) A[s][a][l] = OPW'($urandom_range(0, 4095) - 2048);
        issue(OP_WRITE, s, 40 + a, 0, pack(A[s][a]), cyc);
      end
    end
    // one replica row read back through the command port
    read_row(5, 3, d);
    for (int l = 0; l < int'(LANES); l++)
      chk(d[l*OPW +: OPW] == ((W[5][0][l] << 3) | (W[5][0][l] >> (OPW - 3))), "replica row 3");

    // ---- 2: groups of 3
    compute_check(3, 0, 40, 50, NACT, NWSET, "groups of 3");

    // ---- 3: rotate activations by one operand
    for (int a = 0; a < int'(NACT); a++) begin
      cmd_amount = 1;
      issue(OP_ROT, 0, 40 + a, 0, '0, cyc);
      n_rot++;
      for (int s = 0; s < int'(NSA); s++) begin
        for (int l = 0; l < int'(LANES); l++) v[(l + 1) % LANES] = A[s][a][l];
        A[s][a] = v;
      end
    end
    compute_check(3, 0, 40, 51, NACT, NWSET, "after rotation");

    // ---- 4: move row 40 of every subarray to row 42 of subarray s+5
    cmd_delta = 5;
    issue(OP_MOVE, 0, 40, 42, '0, cyc);
    n_move++;
    for (int s = 0; s < int'(NSA); s++) A[(s + 5) % NSA][2] = A[s][0];
    for (int s = 0; s < int'(NSA); s += 5) begin
      read_row(s, 42, d);
      chk(d == pack(A[s][2]), $sformatf("moved row at subarray %0d", s));
    end
    compute_check(3, 2, 42, 52, 1, NWSET, "after move");

    // ---- 5: one group of 32: congested gather
    compute_check(32, 0, 40, 53, NACT, NWSET, "one group of 32");

    // ---- mechanisms
    $display("loads=%0d rotations=%0d moves=%0d computes=%0d products=%0d neurons=%0d psum_pkts=%0d row_pkts=%0d port_stalls=%0d outbox_stalls=%0d htree_conflicts=%0d",
             n_load, n_rot, n_move, n_compute, cnt_products, cnt_neurons, cnt_psum_pkts, cnt_row_pkts,
             cnt_stall_port, cnt_stall_tx, cnt_conflicts);
    chk(n_load > 0 && n_rot > 0 && n_move > 0 && n_compute > 0, "commands issued");
    chk(cnt_products == 4 + 4 + 2 + 4, "dot products started");
    chk(cnt_neurons == 10 * 4 + 10 * 4 + 10 * 2 + 4, "neurons written");
    chk(cnt_psum_pkts == 20 * 4 + 20 * 4 + 20 * 2 + 31 * 4,
        $sformatf("partial-sum packets %0d", cnt_psum_pkts));
    chk(cnt_row_pkts == NSA, "row packets");
    chk(cnt_stall_port > 0, "subarray port stalls");
    chk(cnt_stall_tx > 0, "outbox stalls");
    chk(cnt_conflicts > 0, "H-tree conflicts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
