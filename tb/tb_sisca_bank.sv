// tb_sisca_bank: self-checking test of one bank (4 tiles, shifter, bank
// controller, H-tree port) with the H-tree replaced by a loop-back that
// returns packets for this bank one cycle later and collects the others.
// Checks plain writes and reads, weight loading through the shifter (16
// bit-rotated replicas, one per cycle), operand rotation of a row in every
// tile, a dot product gathered by home tiles for group sizes 4 and 2 (with
// the port randomly refusing packets), and a row move to the next subarray.
module tb_sisca_bank;
  import sisca_pkg::*;
  localparam int unsigned ROWS = 64, COLS = 64, OPW = 16, PSW = 16, FRAC = 8, NB = 2, SPB = 4;
  localparam int unsigned NSA = NB * SPB, LANES = COLS / OPW, RW = $clog2(ROWS), LW = $clog2(LANES);
  localparam int unsigned BW = 1, AW = 2, GW = $clog2(NSA), CW = $clog2(NSA + 1);
  localparam int unsigned DW = COLS + RW + AW + 2, MW = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [BW-1:0] bank_id = '0;
  logic [CW-1:0] cfg_group_n, cfg_n_groups;
  logic op_valid, op_idle, rd_valid;
  opcode_e op_code;
  logic [AW-1:0] op_sa;
  logic [RW-1:0] op_row;
  logic [COLS-1:0] op_data, rd_data;
  logic [LANES-1:0] op_mask;
  logic [MW-1:0] op_amount;
  logic prod_start, prod_tag, move_start;
  logic [RW-1:0] prod_act_row, prod_w_row, prod_out_row, move_src_row, move_dst_row;
  logic [LW-1:0] prod_out_lane;
  logic [GW-1:0] move_delta;
  logic ht_out_valid, ht_out_ready, ht_in_valid;
  logic [BW-1:0] ht_out_dst;
  logic [DW-1:0] ht_out_data, ht_in_data;
  logic seq_idle, quiet, ev_stall_port, ev_stall_tx;
  logic [1:0] acc_free;
  logic [$clog2(SPB+1)-1:0] ev_neurons;
  int checks = 0, failures = 0, n_neurons = 0;

  sisca_bank #(.ROWS(ROWS), .COLS(COLS), .OPW(OPW), .PSW(PSW), .FRAC(FRAC),
               .NB(NB), .SPB(SPB)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---- H-tree loop-back
  logic [DW-1:0] away [$];
  logic          random_ready = 0;
  logic          inject = 0;           // deliver inject_d as if from another bank
  logic [DW-1:0] inject_d;
  always @(posedge clk) begin
    if (rst_n) begin
      n_neurons += int'(ev_neurons);
      ht_in_valid <= 1'b0;
      if (ht_out_valid && ht_out_ready) begin
        if (ht_out_dst == bank_id) begin
          ht_in_valid <= 1'b1;
          ht_in_data  <= ht_out_data;
        end else begin
          away.push_back(ht_out_data);
        end
      end
      if (inject) begin
        ht_in_valid <= 1'b1;
        ht_in_data  <= inject_d;
      end
      ht_out_ready <= random_ready ? 1'($urandom_range(1)) : 1'b1;
    end else begin
      ht_in_valid <= 1'b0;
      ht_in_data  <= '0;
      ht_out_ready <= 1'b1;
    end
  end

  function automatic logic [OPW-1:0] rotl(input logic [OPW-1:0] v, input int k);
    return (v << k) | (v >> (OPW - k));
  endfunction

  task automatic bank_op(input opcode_e c, input int sa, input int row, input logic [COLS-1:0] d,
                         input int amt, output int cycles);
    wait (op_idle);
    op_valid = 1; op_code = c; op_sa = AW'(sa); op_row = RW'(row); op_data = d;
    op_mask = '1; op_amount = MW'(amt);
    @(posedge clk); #1 op_valid = 0;
    cycles = 1;
    while (!op_idle) begin @(posedge clk); #1 cycles++; end
  endtask

  task automatic read_row(input int sa, input int row, output logic [COLS-1:0] d);
    int c;
    wait (op_idle);
    op_valid = 1; op_code = OP_READ; op_sa = AW'(sa); op_row = RW'(row);
    @(posedge clk); #1 op_valid = 0;
    chk(rd_valid, "read data valid one cycle after the request");
    d = rd_data;
    @(posedge clk); #1;
  endtask

  logic [OPW-1:0] A [SPB][LANES], W [SPB][LANES];

  // expected reduced partial sum of tile t
  function automatic longint tile_psum(input int t);
    longint s;
    s = 0;
    for (int l = 0; l < int'(LANES); l++) s += longint'($signed(A[t][l])) * longint'($signed(W[t][l]));
    s = s >>> FRAC;
    if (s > 32767) s = 32767;
    if (s < -32768) s = -32768;
    return s;
  endfunction

  function automatic longint sat16(input longint v);
    return v > 32767 ? 32767 : (v < -32768 ? -32768 : v);
  endfunction

  task automatic dot_product(input int gsize, input int out_row);
    int c;
    logic [COLS-1:0] d;
    cfg_group_n = CW'(gsize); cfg_n_groups = CW'(NSA / gsize);
    prod_start = 1; prod_act_row = 40; prod_w_row = 0; prod_out_row = RW'(out_row);
    prod_out_lane = 1; prod_tag = 0;
    @(posedge clk); #1 prod_start = 0;
    c = 0;
    while (!quiet && c < 200) begin @(posedge clk); #1 c++; end
    chk(c < 200, "dot product finished");
    for (int h = 0; h < int'(SPB); h += gsize) begin
      longint e;
      e = 0;
      for (int t = h; t < h + gsize; t++) e += tile_psum(t);
      read_row(h, out_row, d);
      chk($signed(d[OPW +: OPW]) == sat16(e),
          $sformatf("group %0d home %0d neuron %0d expected %0d", gsize, h, $signed(d[OPW +: OPW]), sat16(e)));
    end
  endtask

  initial begin
    int cyc;
    logic [COLS-1:0] d, r;
    op_valid = 0; op_code = OP_WRITE; op_sa = '0; op_row = '0; op_data = '0; op_mask = '0; op_amount = '0;
    prod_start = 0; prod_tag = 0; move_start = 0; prod_act_row = '0; prod_w_row = '0;
    prod_out_row = '0; prod_out_lane = '0; move_src_row = '0; move_dst_row = '0; move_delta = '0;
    cfg_group_n = '0; cfg_n_groups = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;

    // ---- write / read
    for (int t = 0; t < int'(SPB); t++) begin
      d = {$urandom, $urandom};
      bank_op(OP_WRITE, t, 60, d, 0, cyc);
      read_row(t, 60, r);
      chk(r == d, "write then read");
    end

    // ---- weight replicas and activations for every tile
    for (int t = 0; t < int'(SPB); t++) begin
      for (int l = 0; l < int'(LANES); l++) begin
        A[t][l] = OPW'($urandom); W[t][l] = OPW'($urandom);
        d[l*OPW +: OPW] = W[t][l];
      end
      bank_op(OP_LOAD_W, t, 0, d, 0, cyc);
      chk(cyc == int'(OPW) + 2, $sformatf("weight load took %0d cycles", cyc));
      for (int k = 0; k < int'(OPW); k++) begin
        read_row(t, k, r);
        for (int l = 0; l < int'(LANES); l++)
          chk(r[l*OPW +: OPW] == rotl(W[t][l], k), $sformatf("replica %0d tile %0d lane %0d", k, t, l));
      end
      for (int l = 0; l < int'(LANES); l++) d[l*OPW +: OPW] = A[t][l];
      bank_op(OP_WRITE, t, 40, d, 0, cyc);
    end

    // ---- operand rotation of row 30 in every tile by 1 and by 3
    for (int amt = 1; amt <= 3; amt += 2) begin
      logic [COLS-1:0] prev_row [SPB];
      for (int t = 0; t < int'(SPB); t++) begin
        prev_row[t] = {$urandom, $urandom};
        bank_op(OP_WRITE, t, 30, prev_row[t], 0, cyc);
      end
      bank_op(OP_ROT, 0, 30, '0, amt, cyc);
      for (int t = 0; t < int'(SPB); t++) begin
        read_row(t, 30, r);
        for (int l = 0; l < int'(LANES); l++)
          chk(r[((l + amt) % LANES)*OPW +: OPW] == prev_row[t][l*OPW +: OPW],
              $sformatf("rotate by %0d tile %0d lane %0d", amt, t, l));
      end
    end

    // ---- dot products
    dot_product(4, 50);
    random_ready = 1;
    dot_product(2, 51);
    random_ready = 0;
    chk(n_neurons == 3, $sformatf("%0d neurons written, expected 3", n_neurons));
    chk(away.size() == 0, "no partial sum left the bank");

    // ---- row move to subarray g+1 (tile 3 sends to bank 1)
    begin
      logic [COLS-1:0] src [SPB], in7;
      logic [DW-1:0] pk;
      for (int t = 0; t < int'(SPB); t++) begin
        src[t] = {$urandom, $urandom};
        bank_op(OP_WRITE, t, 20, src[t], 0, cyc);
      end
      move_start = 1; move_src_row = 20; move_dst_row = 21; move_delta = 1;
      @(posedge clk); #1 move_start = 0;
      repeat (20) @(posedge clk);
      #1 chk(!quiet, "tile 0 still waits for its row");
      chk(away.size() == 1, "one row left the bank");
      if (away.size() == 1) begin
        pk = away.pop_front();
        chk(pk[COLS-1:0] == src[3] && pk[COLS +: RW] == 21 && pk[COLS + RW +: AW] == 0 && pk[DW-1] == PKT_ROW,
            $sformatf("row for bank 1, subarray 0: %h", pk));
      end
      // the row coming from subarray 7 (bank 1) into tile 0
      in7 = {$urandom, $urandom};
      inject_d = {PKT_ROW, 1'b0, 2'd0, 6'd21, in7};
      inject = 1;
      @(posedge clk); #1 inject = 0;
      repeat (2) @(posedge clk);
      #1 chk(quiet, "move complete");
      for (int t = 1; t < int'(SPB); t++) begin
        read_row(t, 21, r);
        chk(r == src[t-1], $sformatf("tile %0d received the row of tile %0d", t, t - 1));
      end
      read_row(0, 21, r);
      chk(r == in7, "tile 0 received the row from bank 1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
