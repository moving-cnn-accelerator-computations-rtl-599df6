// tb_sisca_llc_group: one complete neuron of the worked example on
// full-size subarrays (512x512 bits, 32 operand lanes of 16 bits, 8
// subarrays per bank, 16-bit partial sums), with the cache cut to NB = 4
// banks so that it builds and runs in a few minutes; the full 128-bank
// cache only repeats the same banks.
//
// Mapping: a 3x3x64 kernel has 576 weights, spread as 32 per subarray over a
// group of 18 subarrays (32 subarrays here give one group, the full cache
// 56). The groups' subarrays get two weight sets (2 x 16 replica rows) and
// one activation row; then one COMPUTE runs 2 dot products in all active
// subarrays at once. Checked: both neurons of the loaded groups against a
// model, all neurons written, 17 two-byte partial sums per neuron crossing
// the H-tree (34 bytes per group per product), and at least 16 cycles per
// product.
module tb_sisca_llc_group;
  import sisca_pkg::*;
  localparam int unsigned ROWS = SA_ROWS, COLS = SA_COLS, OPW = OP_W, NB = 4, SPB = SA_PER_BANK;
  localparam int unsigned NSA = NB * SPB, LANES = COLS / OPW, RW = $clog2(ROWS), LW = $clog2(LANES);
  localparam int unsigned BW = $clog2(NB), AW = $clog2(SPB), GW = $clog2(NSA), CW = $clog2(NSA + 1);
  localparam int unsigned MW = 5, G = GROUP_SIZE, NGROUPS = NSA / G, NWSET = 2,
                         NLOAD = NGROUPS > 1 ? 2 : 1;

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

  sisca_llc #(.NB(NB)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [OPW-1:0] A [2][G][LANES];
  logic [OPW-1:0] W [2][G][NWSET][LANES];

  function automatic longint sat16(input longint v);
    return v > 32767 ? 32767 : (v < -32768 ? -32768 : v);
  endfunction

  task automatic issue(input opcode_e op, input int s, input int row, input logic [COLS-1:0] data,
                       output int cycles);
    wait (cmd_ready);
    #1;
    cmd_valid = 1; cmd_op = op; cmd_bank = BW'(s / SPB); cmd_sa = AW'(s % SPB);
    cmd_row = RW'(row); cmd_data = data; cmd_mask = '1;
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
      issue(OP_READ, s, row, '0, c);
    join
  endtask

  initial begin
    int cyc, grp [2];
    logic [COLS-1:0] d;
    cmd_valid = 0; cmd_op = OP_WRITE; cmd_bank = '0; cmd_sa = '0; cmd_row = '0; cmd_row2 = '0;
    cmd_data = '0; cmd_mask = '0; cmd_amount = '0; cmd_delta = '0; cmd_group_n = '0;
    cmd_n_groups = '0; cmd_n_act = '0; cmd_n_wset = '0; cmd_out_row = '0; cmd_out_lane = '0;
    grp = '{0, NGROUPS - 1};
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;

    for (int gi = 0; gi < int'(NLOAD); gi++) begin
      for (int m = 0; m < int'(G); m++) begin
        int s;
        s = grp[gi] * G + m;
        for (int w = 0; w < int'(NWSET); w++) begin
          for (int l = 0; l < int'(LANES); l++) begin
            W[gi][m][w][l] = OPW'($urandom_range(0, 511) - 256);
            d[l*OPW +: OPW] = W[gi][m][w][l];
          end
          issue(OP_LOAD_W, s, 32 + w * OPW, d, cyc);
        end
        for (int l = 0; l < int'(LANES); l++) begin
          A[gi][m][l] = OPW'($urandom_range(0, 511) - 256);
          d[l*OPW +: OPW] = A[gi][m][l];
        end
        issue(OP_WRITE, s, 0, d, cyc);
      end
    end

    cmd_group_n = CW'(G); cmd_n_groups = CW'(NGROUPS); cmd_n_act = 1; cmd_n_wset = NWSET;
    cmd_out_row = 100; cmd_out_lane = 5; cmd_row2 = 32;
    issue(OP_COMPUTE, 0, 0, '0, cyc);
    $display("COMPUTE of %0d products in %0d subarrays took %0d cycles", NWSET, NGROUPS * G, cyc);
    chk(cyc >= int'(OPW) * NWSET, "at least 16 cycles per product");

    for (int gi = 0; gi < int'(NLOAD); gi++) begin
      read_row(grp[gi] * G, 100, d);
      for (int w = 0; w < int'(NWSET); w++) begin
        longint e;
        e = 0;
        for (int m = 0; m < int'(G); m++) begin
          longint x;
          x = 0;
          for (int l = 0; l < int'(LANES); l++)
            x += longint'($signed(A[gi][m][l])) * longint'($signed(W[gi][m][w][l]));
          e += sat16(x >>> FRAC_BITS);
        end
        chk($signed(d[(5 + w)*OPW +: OPW]) == sat16(e),
            $sformatf("group %0d neuron %0d: %0d expected %0d", grp[gi], w,
                      $signed(d[(5 + w)*OPW +: OPW]), sat16(e)));
      end
    end
    $display("products=%0d neurons=%0d psum_pkts=%0d port_stalls=%0d outbox_stalls=%0d htree_conflicts=%0d",
             cnt_products, cnt_neurons, cnt_psum_pkts, cnt_stall_port, cnt_stall_tx, cnt_conflicts);
    chk(cnt_neurons == NGROUPS * NWSET, "neurons written");
    chk(cnt_psum_pkts == NGROUPS * (G - 1) * NWSET, "17 partial sums per neuron");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
