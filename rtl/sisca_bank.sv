// sisca_bank: one bank of the last-level cache - SPB compute tiles
// (subarray + RAT), the bank's shared shifter, a bank controller and the
// bank's single port onto the H-tree.
//
// Bank operations (op_valid, accepted only while op_idle is high):
//   OP_WRITE   write op_data (lanes in op_mask) to row op_row of tile op_sa
//   OP_READ    read row op_row of tile op_sa; rd_valid/rd_data one cycle later
//   OP_LOAD_W  pass op_data through the shifter OPW times, rotating every
//              operand left by 0,1,..,OPW-1 bits, and write the replicas to
//              rows op_row .. op_row+OPW-1 of tile op_sa (one per cycle)
//   OP_ROT     for every tile in turn: read row op_row, rotate it by op_amount
//              operands in the shifter, write it back (3 cycles per tile)
// Dot products (prod_*) and row moves (move_*) are broadcast to all tiles at
// once. The bank works out each tile's role from its global subarray index
// g = bank_id*SPB + t: groups are cfg_group_n consecutive subarrays, the
// first of each is the home, and only the first cfg_n_groups groups take
// part. For a move, tile g sends to subarray (g + move_delta) mod (NB*SPB).
//
// H-tree port: the tiles' outboxes are served round robin, one packet per
// cycle when ht_out_ready. Packets arriving on ht_in are always accepted and
// handed to tile ht_in's dst_sa. Packet layout, low to high: payload (COLS),
// row (RW), dst_sa (AW), tag (1), kind (1); the destination bank travels
// beside it on ht_out_dst.
module sisca_bank
  import sisca_pkg::*;
#(
  parameter int unsigned ROWS  = sisca_pkg::SA_ROWS,
  parameter int unsigned COLS  = sisca_pkg::SA_COLS,
  parameter int unsigned OPW   = sisca_pkg::OP_W,
  parameter int unsigned PSW   = sisca_pkg::PSUM_W,
  parameter int unsigned FRAC  = sisca_pkg::FRAC_BITS,
  parameter int unsigned NB    = sisca_pkg::N_BANKS,
  parameter int unsigned SPB   = sisca_pkg::SA_PER_BANK,
  localparam int unsigned NSA   = NB * SPB,
  localparam int unsigned MAX_G = NSA,
  localparam int unsigned LANES = COLS / OPW,
  localparam int unsigned RW    = $clog2(ROWS),
  localparam int unsigned LW    = $clog2(LANES),
  localparam int unsigned BW    = NB > 1 ? $clog2(NB) : 1,
  localparam int unsigned AW    = SPB > 1 ? $clog2(SPB) : 1,
  localparam int unsigned GW    = $clog2(NSA),          // global subarray index
  localparam int unsigned CW    = $clog2(MAX_G + 1),
  localparam int unsigned DW    = COLS + RW + AW + 2,   // H-tree packet
  localparam int unsigned MW    = $clog2(LANES) > $clog2(OPW) ? $clog2(LANES) : $clog2(OPW)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [BW-1:0]     bank_id,
  // mapping of the current layer
  input  logic [CW-1:0]     cfg_group_n,
  input  logic [CW-1:0]     cfg_n_groups,
  // bank operations
  input  logic              op_valid,
  input  opcode_e           op_code,
  input  logic [AW-1:0]     op_sa,
  input  logic [RW-1:0]     op_row,
  input  logic [COLS-1:0]   op_data,
  input  logic [LANES-1:0]  op_mask,
  input  logic [MW-1:0]     op_amount,
  output logic              op_idle,
  output logic              rd_valid,
  output logic [COLS-1:0]   rd_data,
  // broadcast dot product
  input  logic              prod_start,
  input  logic [RW-1:0]     prod_act_row,
  input  logic [RW-1:0]     prod_w_row,
  input  logic [RW-1:0]     prod_out_row,
  input  logic [LW-1:0]     prod_out_lane,
  input  logic              prod_tag,
  // broadcast row move
  input  logic              move_start,
  input  logic [RW-1:0]     move_src_row,
  input  logic [RW-1:0]     move_dst_row,
  input  logic [GW-1:0]     move_delta,
  // H-tree port
  output logic              ht_out_valid,
  input  logic              ht_out_ready,
  output logic [BW-1:0]     ht_out_dst,
  output logic [DW-1:0]     ht_out_data,
  input  logic              ht_in_valid,
  input  logic [DW-1:0]     ht_in_data,
  // status of all tiles
  output logic              seq_idle,
  output logic [1:0]        acc_free,
  output logic              quiet,
  output logic              ev_stall_port,
  output logic              ev_stall_tx,
  output logic [$clog2(SPB+1)-1:0] ev_neurons
);

  // ------------------------------------------------------------ tile roles
  logic [SPB-1:0]  t_active, t_home;
  logic [BW-1:0]   t_home_bank [SPB];
  logic [AW-1:0]   t_home_sa   [SPB];
  logic [BW-1:0]   t_mv_bank   [SPB];
  logic [AW-1:0]   t_mv_sa     [SPB];

  always_comb begin
    for (int t = 0; t < int'(SPB); t++) begin
      logic [GW:0] g, grp, home, dst;
      g    = (GW+1)'(bank_id) * (GW+1)'(SPB) + (GW+1)'(t);
      grp  = (cfg_group_n == '0) ? '0 : g / (GW+1)'(cfg_group_n);
      home = grp * (GW+1)'(cfg_group_n);
      t_active[t]    = (cfg_group_n != '0) && (grp < (GW+1)'(cfg_n_groups));
      t_home[t]      = (home == g);
      t_home_bank[t] = BW'(home / (GW+1)'(SPB));
      t_home_sa[t]   = AW'(home % (GW+1)'(SPB));
      dst            = (g + (GW+1)'(move_delta)) % (GW+1)'(NSA);
      t_mv_bank[t]   = BW'(dst / (GW+1)'(SPB));
      t_mv_sa[t]     = AW'(dst % (GW+1)'(SPB));
    end
  end

  // ------------------------------------------------------------ bank controller
  typedef enum logic [2:0] {B_IDLE, B_READ, B_LOAD, B_ROT_RD, B_ROT_SH, B_ROT_WR} bstate_e;
  bstate_e          bst;
  logic [AW-1:0]    b_sa;
  logic [RW-1:0]    b_row;
  logic [COLS-1:0]  b_data;
  logic [MW-1:0]    b_amt;
  localparam int unsigned SW_B = $clog2(OPW) + 1;
  logic [SW_B-1:0]  b_k;             // replica being shifted
  logic             b_wr_pend;       // replica leaving the shifter this cycle
  logic [RW-1:0]    b_wr_row;

  // shifter
  logic             sh_in_valid, sh_mode, sh_out_valid;
  logic [MW-1:0]    sh_amt;
  logic [COLS-1:0]  sh_in, sh_out;

  shifter_unit #(.COLS(COLS), .OPW(OPW)) u_shift (
    .clk, .rst_n, .in_valid(sh_in_valid), .mode_operand(sh_mode), .amount(sh_amt),
    .in_row(sh_in), .out_valid(sh_out_valid), .out_row(sh_out)
  );

  // tile bank ports
  sa_op_e           t_bk_op [SPB];
  logic [RW-1:0]    t_bk_row;
  logic [COLS-1:0]  t_bk_wdata;
  logic [LANES-1:0] t_bk_wmask;
  logic [SPB-1:0]   t_bk_rvalid;
  logic [COLS-1:0]  t_bk_rdata [SPB];

  always_comb begin
    for (int t = 0; t < int'(SPB); t++) t_bk_op[t] = SA_NOP;
    t_bk_row    = b_row;
    t_bk_wdata  = op_data;
    t_bk_wmask  = op_mask;
    sh_in_valid = 1'b0;
    sh_mode     = 1'b0;
    sh_amt      = '0;
    sh_in       = b_data;
    unique case (bst)
      B_IDLE: begin
        t_bk_row = op_row;
        if (op_valid && op_code == OP_WRITE) t_bk_op[op_sa] = SA_WRITE;
        if (op_valid && op_code == OP_READ)  t_bk_op[op_sa] = SA_READ;
      end
      B_LOAD: begin
        sh_in_valid = (int'(b_k) < int'(OPW));
        sh_amt      = MW'(b_k);
        t_bk_row    = b_wr_row;
        t_bk_wdata  = sh_out;
        t_bk_wmask  = '1;
        if (b_wr_pend) t_bk_op[b_sa] = SA_WRITE;
      end
      B_ROT_RD: t_bk_op[b_sa] = SA_READ;
      B_ROT_SH: begin
        sh_in_valid = t_bk_rvalid[b_sa];
        sh_mode     = 1'b1;
        sh_amt      = b_amt;
        sh_in       = t_bk_rdata[b_sa];
      end
      B_ROT_WR: begin
        t_bk_wdata = sh_out;
        t_bk_wmask = '1;
        t_bk_op[b_sa] = SA_WRITE;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bst       <= B_IDLE;
      b_sa      <= '0;
      b_row     <= '0;
      b_data    <= '0;
      b_amt     <= '0;
      b_k       <= '0;
      b_wr_pend <= 1'b0;
      b_wr_row  <= '0;
    end else begin
      unique case (bst)
        B_IDLE: if (op_valid) begin
          b_sa   <= op_sa;
          b_row  <= op_row;
          b_data <= op_data;
          b_amt  <= op_amount;
          b_k    <= '0;
          b_wr_pend <= 1'b0;
          unique case (op_code)
            OP_READ:   bst <= B_READ;
            OP_LOAD_W: bst <= B_LOAD;
            OP_ROT:    begin bst <= B_ROT_RD; b_sa <= '0; end
            default:   bst <= B_IDLE;
          endcase
        end
        B_READ: bst <= B_IDLE;
        B_LOAD: begin
          // replica k enters the shifter, replica k-1 is written
          b_wr_pend <= (int'(b_k) < int'(OPW));
          b_wr_row  <= b_row + RW'(b_k);
          if (int'(b_k) < int'(OPW)) b_k <= b_k + SW_B'(1);
          else                       bst <= B_IDLE;
        end
        B_ROT_RD: bst <= B_ROT_SH;
        B_ROT_SH: bst <= B_ROT_WR;
        B_ROT_WR: begin
          if (int'(b_sa) == int'(SPB) - 1) bst <= B_IDLE;
          else begin
            b_sa <= b_sa + AW'(1);
            bst  <= B_ROT_RD;
          end
        end
        default: bst <= B_IDLE;
      endcase
    end
  end

  assign op_idle = (bst == B_IDLE);

  always_comb begin
    rd_valid = 1'b0;
    rd_data  = t_bk_rdata[b_sa];
    if (bst == B_READ) rd_valid = t_bk_rvalid[b_sa];
  end

  // ------------------------------------------------------------ tiles
  logic [SPB-1:0]   tx_valid, tx_ready, tx_tag;
  pkt_kind_e        tx_kind [SPB];
  logic [BW-1:0]    tx_dst_bank [SPB];
  logic [AW-1:0]    tx_dst_sa [SPB];
  logic [RW-1:0]    tx_row [SPB];
  logic [COLS-1:0]  tx_payload [SPB];
  logic [SPB-1:0]   rx_valid, t_seq_idle, t_quiet, t_sp, t_st, t_nw;
  logic [1:0]       t_acc_free [SPB];

  // fields of the arriving packet
  logic [COLS-1:0]  in_payload;
  logic [RW-1:0]    in_row;
  logic [AW-1:0]    in_sa;
  logic             in_tag;
  pkt_kind_e        in_kind;
  assign {in_kind, in_tag, in_sa, in_row, in_payload} = ht_in_data;

  for (genvar t = 0; t < int'(SPB); t++) begin : g_tile
    assign rx_valid[t] = ht_in_valid && (in_sa == AW'(t));
    sisca_tile #(.ROWS(ROWS), .COLS(COLS), .OPW(OPW), .PSW(PSW), .FRAC(FRAC),
                 .NB(NB), .SPB(SPB), .MAX_G(MAX_G)) u_tile (
      .clk, .rst_n,
      .active(t_active[t]), .is_home(t_home[t]), .home_bank(t_home_bank[t]),
      .home_sa(t_home_sa[t]), .group_n(cfg_group_n),
      .prod_start, .prod_act_row, .prod_w_row, .prod_out_row, .prod_out_lane, .prod_tag,
      .move_start, .move_src_row, .move_dst_bank(t_mv_bank[t]), .move_dst_sa(t_mv_sa[t]),
      .move_dst_row,
      .bk_op(t_bk_op[t]), .bk_row(t_bk_row), .bk_wdata(t_bk_wdata), .bk_wmask(t_bk_wmask),
      .bk_rvalid(t_bk_rvalid[t]), .bk_rdata(t_bk_rdata[t]),
      .tx_valid(tx_valid[t]), .tx_ready(tx_ready[t]), .tx_kind(tx_kind[t]), .tx_tag(tx_tag[t]),
      .tx_dst_bank(tx_dst_bank[t]), .tx_dst_sa(tx_dst_sa[t]), .tx_row(tx_row[t]),
      .tx_payload(tx_payload[t]),
      .rx_valid(rx_valid[t]), .rx_kind(in_kind), .rx_tag(in_tag), .rx_row(in_row),
      .rx_payload(in_payload),
      .seq_idle(t_seq_idle[t]), .acc_free(t_acc_free[t]), .quiet(t_quiet[t]),
      .stall_port(t_sp[t]), .stall_tx(t_st[t]), .neuron_wr(t_nw[t])
    );
  end

  // ------------------------------------------------------------ H-tree injection (round robin)
  logic [AW-1:0] rr;           // tile served first
  logic [AW-1:0] sel;
  logic          any;
  always_comb begin
    sel = '0;
    any = 1'b0;
    for (int i = 0; i < int'(SPB); i++) begin
      int unsigned c;
      c = (int'(rr) + i) % SPB;
      if (!any && tx_valid[c]) begin
        any = 1'b1;
        sel = AW'(c);
      end
    end
  end

  assign ht_out_valid = any;
  assign ht_out_dst   = tx_dst_bank[sel];
  assign ht_out_data  = {tx_kind[sel], tx_tag[sel], tx_dst_sa[sel], tx_row[sel], tx_payload[sel]};
  always_comb begin
    tx_ready = '0;
    tx_ready[sel] = any && ht_out_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rr <= '0;
    else if (any && ht_out_ready) rr <= AW'((int'(sel) + 1) % SPB);
  end

  // ------------------------------------------------------------ status
  always_comb begin
    acc_free = 2'b11;
    for (int t = 0; t < int'(SPB); t++) acc_free &= t_acc_free[t];
  end
  assign seq_idle      = &t_seq_idle;
  assign quiet         = (&t_quiet) && op_idle;
  assign ev_stall_port = |t_sp;
  assign ev_stall_tx   = |t_st;
  assign ev_neurons    = $countones(t_nw);

endmodule
