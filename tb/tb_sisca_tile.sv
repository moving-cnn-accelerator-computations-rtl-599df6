// tb_sisca_tile: self-checking test of one compute tile (subarray + RAT +
// home accumulators + sequencer).
//  1. A non-home tile computes a dot product; its PSUM packet must carry
//     (sum of products >>> FRAC) to the home address, 19 cycles after start.
//  2. With the outbox blocked, the next product's last AND step waits.
//  3. A home tile gathers its own sum and two remote sums and writes the
//     neuron into the chosen lane of the output row.
//  4. Back-to-back products on a home tile of a 1-subarray group: the neuron
//     write of one product takes the port from the next product's AND steps.
//  5. A row move sends a ROW packet and writes an arriving row.
module tb_sisca_tile;
  import sisca_pkg::*;
  localparam int unsigned ROWS = 64, COLS = 64, OPW = 16, PSW = 16, FRAC = 8;
  localparam int unsigned NB = 2, SPB = 2, MAX_G = 4;
  localparam int unsigned LANES = COLS / OPW, RW = $clog2(ROWS), LW = $clog2(LANES);
  localparam int unsigned BW = 1, AW = 1, CW = $clog2(MAX_G + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic active, is_home, prod_start, prod_tag, move_start;
  logic [BW-1:0] home_bank, move_dst_bank;
  logic [AW-1:0] home_sa, move_dst_sa;
  logic [CW-1:0] group_n;
  logic [RW-1:0] prod_act_row, prod_w_row, prod_out_row, move_src_row, move_dst_row;
  logic [LW-1:0] prod_out_lane;
  sa_op_e bk_op;
  logic [RW-1:0] bk_row;
  logic [COLS-1:0] bk_wdata, bk_rdata;
  logic [LANES-1:0] bk_wmask;
  logic bk_rvalid;
  logic tx_valid, tx_ready, tx_tag;
  pkt_kind_e tx_kind;
  logic [BW-1:0] tx_dst_bank;
  logic [AW-1:0] tx_dst_sa;
  logic [RW-1:0] tx_row;
  logic [COLS-1:0] tx_payload;
  logic rx_valid, rx_tag;
  pkt_kind_e rx_kind;
  logic [RW-1:0] rx_row;
  logic [COLS-1:0] rx_payload;
  logic seq_idle, quiet, stall_port, stall_tx, neuron_wr;
  logic [1:0] acc_free;
  int checks = 0, failures = 0;
  int n_stall_port = 0, n_stall_tx = 0;

  sisca_tile #(.ROWS(ROWS), .COLS(COLS), .OPW(OPW), .PSW(PSW), .FRAC(FRAC),
               .NB(NB), .SPB(SPB), .MAX_G(MAX_G)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (stall_port) n_stall_port++;
    if (stall_tx) n_stall_tx++;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [OPW-1:0] rotl(input logic [OPW-1:0] v, input int k);
    return (v << k) | (v >> (OPW - k));
  endfunction

  task automatic bank_write(input int row, input logic [COLS-1:0] d);
    bk_op = SA_WRITE; bk_row = RW'(row); bk_wdata = d; bk_wmask = '1;
    @(posedge clk); #1 bk_op = SA_NOP;
  endtask

  task automatic bank_read(input int row, output logic [COLS-1:0] d);
    bk_op = SA_READ; bk_row = RW'(row);
    @(posedge clk); #1 bk_op = SA_NOP;
    d = bk_rdata;
    chk(bk_rvalid, "bank read valid");
  endtask

  // weights at replica base wb, activation at row ar; returns expected psum
  task automatic load_operands(input int wb, input int ar, output longint psum);
    logic [OPW-1:0] a [LANES], w [LANES];
    logic [COLS-1:0] row;
    longint s;
    s = 0;
    for (int l = 0; l < int'(LANES); l++) begin
      a[l] = OPW'($urandom); w[l] = OPW'($urandom);
      s += longint'($signed(a[l])) * longint'($signed(w[l]));
    end
    for (int k = 0; k < int'(OPW); k++) begin
      for (int l = 0; l < int'(LANES); l++) row[l*OPW +: OPW] = rotl(w[l], k);
      bank_write(wb + k, row);
    end
    for (int l = 0; l < int'(LANES); l++) row[l*OPW +: OPW] = a[l];
    bank_write(ar, row);
    psum = s >>> FRAC;
    if (psum > 32767) psum = 32767;
    if (psum < -32768) psum = -32768;
  endtask

  task automatic start_prod(input int ar, input int wb, input int orow, input int olane, input bit tag);
    prod_start = 1; prod_act_row = RW'(ar); prod_w_row = RW'(wb);
    prod_out_row = RW'(orow); prod_out_lane = LW'(olane); prod_tag = tag;
    @(posedge clk); #1 prod_start = 0;
  endtask

  initial begin
    longint p0, p1, p2, e;
    int cyc;
    logic [COLS-1:0] d, mvrow;
    active = 1; is_home = 0; home_bank = 1; home_sa = 0; group_n = 3;
    prod_start = 0; prod_tag = 0; move_start = 0; prod_act_row = '0; prod_w_row = '0;
    prod_out_row = '0; prod_out_lane = '0; move_src_row = '0; move_dst_row = '0;
    move_dst_bank = '0; move_dst_sa = '0;
    bk_op = SA_NOP; bk_row = '0; bk_wdata = '0; bk_wmask = '0;
    tx_ready = 0; rx_valid = 0; rx_tag = 0; rx_kind = PKT_PSUM; rx_row = '0; rx_payload = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;

    // ---- 1: non-home dot product
    load_operands(0, 40, p0);
    chk(quiet && seq_idle, "idle before start");
    start_prod(40, 0, 0, 0, 1'b1);
    cyc = 0;
    while (!tx_valid && cyc < 100) begin @(posedge clk); #1 cyc++; end
    chk(cyc == 19, $sformatf("psum ready after %0d cycles, expected 19", cyc));
    chk(tx_kind == PKT_PSUM && tx_tag == 1'b1 && tx_dst_bank == 1 && tx_dst_sa == 0,
        "psum packet header");
    chk($signed(tx_payload[PSW-1:0]) == p0,
        $sformatf("psum payload %0d expected %0d", $signed(tx_payload[PSW-1:0]), p0));
    chk(!quiet, "not quiet with full outbox");

    // ---- 2: outbox still full -> next product waits at its last step
    load_operands(16, 41, p1);
    start_prod(41, 16, 0, 0, 1'b0);
    repeat (30) @(posedge clk);
    #1 chk(!seq_idle && stall_tx, "last step held while outbox is full");
    tx_ready = 1;
    @(posedge clk); #1 tx_ready = 0;
    cyc = 0;
    while (!tx_valid && cyc < 100) begin @(posedge clk); #1 cyc++; end
    chk($signed(tx_payload[PSW-1:0]) == p1 && tx_tag == 1'b0, "psum after stall");
    tx_ready = 1;
    @(posedge clk); #1 tx_ready = 0;
    @(posedge clk); #1;
    chk(quiet, "quiet after send");

    // ---- 3: home tile, group of 3
    is_home = 1;
    load_operands(0, 42, p2);
    start_prod(42, 0, 50, 2, 1'b0);
    chk(acc_free == 2'b10, "accumulator 0 taken");
    repeat (5) @(posedge clk);
    #1 rx_valid = 1; rx_kind = PKT_PSUM; rx_tag = 0; rx_payload = COLS'(16'sd1234);
    @(posedge clk); #1 rx_payload = COLS'(-16'sd300);
    @(posedge clk); #1 rx_valid = 0;
    cyc = 0;
    while (!neuron_wr && cyc < 100) begin @(posedge clk); #1 cyc++; end
    @(posedge clk); #1;
    chk(quiet && acc_free == 2'b11, "home quiet after neuron write");
    bank_read(50, d);
    e = p2 + 1234 - 300;
    if (e > 32767) e = 32767;
    if (e < -32768) e = -32768;
    chk($signed(d[2*OPW +: OPW]) == e,
        $sformatf("neuron %0d expected %0d", $signed(d[2*OPW +: OPW]), e));
    chk(tx_valid == 0, "home sends no packet");

    // ---- 4: back-to-back products on a home tile of a 1-subarray group
    group_n = 1;
    load_operands(0, 43, p0);
    load_operands(16, 44, p1);
    bank_write(51, '0);
    start_prod(43, 0, 51, 0, 1'b0);
    while (!seq_idle) begin @(posedge clk); #1; end
    start_prod(44, 16, 51, 1, 1'b1);
    cyc = 0;
    while (!quiet && cyc < 200) begin @(posedge clk); #1 cyc++; end
    bank_read(51, d);
    chk($signed(d[0 +: OPW]) == p0 && $signed(d[OPW +: OPW]) == p1,
        $sformatf("two neurons written: %0d %0d expected %0d %0d",
                  $signed(d[0 +: OPW]), $signed(d[OPW +: OPW]), p0, p1));
    chk(n_stall_port > 0, "neuron write took the port from an AND step");
    chk(n_stall_tx > 0, "outbox stall seen");

    // ---- 5: row move
    is_home = 0;
    mvrow = {$urandom, $urandom};
    bank_write(7, mvrow);
    move_start = 1; move_src_row = 7; move_dst_row = 9; move_dst_bank = 1; move_dst_sa = 1;
    @(posedge clk); #1 move_start = 0;
    cyc = 0;
    while (!tx_valid && cyc < 10) begin @(posedge clk); #1 cyc++; end
    chk(tx_kind == PKT_ROW && tx_payload == mvrow && tx_row == 9 && tx_dst_sa == 1,
        $sformatf("row packet kind %0d row %0d sa %0d data %h / %h", tx_kind, tx_row, tx_dst_sa, tx_payload, mvrow));
    tx_ready = 1;
    @(posedge clk); #1 tx_ready = 0;
    chk(!quiet, "still waiting for a row");
    d = {$urandom, $urandom};
    rx_valid = 1; rx_kind = PKT_ROW; rx_row = 12; rx_payload = d;
    @(posedge clk); #1 rx_valid = 0;
    @(posedge clk); #1;
    chk(quiet, "quiet after the move");
    bank_read(12, mvrow);
    chk(mvrow == d, "received row written");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
