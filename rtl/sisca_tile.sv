// sisca_tile: one cache subarray turned into a dot-product engine - the
// logic-in-memory subarray, its RAT (Registers and Adder Tree), the
// home-subarray accumulators and a small sequencer.
//
// Dot product (prod_start): the tile raises wordline pairs (w_row + k,
// act_row) for k = 0 .. OPW-1, one per cycle, so the RAT receives the AND of
// the activation row with every bit-rotated weight replica and sums the
// LANES lane products. The reduced partial sum either goes into
// this tile's own accumulator (home tile of its group) or into the one-entry
// outbox as a PSUM packet addressed to the home tile, to cross the H-tree.
// A home tile gathers `group_n` partial sums (its own plus the remote ones)
// and writes the finished output neuron, as one OPW-bit lane, into
// prod_out_row. Two accumulators, selected by prod_tag, let the next dot
// product run while the previous neuron is still being gathered.
//
// Row move (move_start): the tile reads move_src_row and sends it as a ROW
// packet to (move_dst_bank, move_dst_sa, move_dst_row); it also expects one
// ROW packet from some other tile, which it writes when it arrives.
//
// Subarray port priority, highest first: a row arriving from the H-tree, a
// finished neuron, the bank port (plain reads/writes by the bank), the
// sequencer. A sequencer step that loses the port waits (stall_port). The
// last AND step of a dot product also waits while the outbox still holds the
// previous partial sum (stall_tx), so the RAT result always has room.
//
// Timing: subarray reads take one cycle, the RAT two more, so a partial sum
// is ready 3 cycles after the last AND step (in the outbox one cycle
// later); a dot product without stalls occupies the subarray for exactly
// OPW cycles and the next one may start right after (seq_idle). Everything
// here except the operation order of the original scheme (weights rotated by
// one bit per row, activations unrotated, AND then adder tree, home
// gathering) is this design's own choice.
module sisca_tile
  import sisca_pkg::*;
#(
  parameter int unsigned ROWS  = sisca_pkg::SA_ROWS,
  parameter int unsigned COLS  = sisca_pkg::SA_COLS,
  parameter int unsigned OPW   = sisca_pkg::OP_W,
  parameter int unsigned PSW   = sisca_pkg::PSUM_W,
  parameter int unsigned FRAC  = sisca_pkg::FRAC_BITS,
  parameter int unsigned NB    = sisca_pkg::N_BANKS,
  parameter int unsigned SPB   = sisca_pkg::SA_PER_BANK,
  parameter int unsigned MAX_G = 1024,
  localparam int unsigned LANES = COLS / OPW,
  localparam int unsigned RW    = $clog2(ROWS),
  localparam int unsigned LW    = $clog2(LANES),
  localparam int unsigned SW    = $clog2(OPW),
  localparam int unsigned BW    = NB > 1 ? $clog2(NB) : 1,
  localparam int unsigned AW    = SPB > 1 ? $clog2(SPB) : 1,
  localparam int unsigned CW    = $clog2(MAX_G + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // static role within the current mapping
  input  logic              active,        // takes part in dot products
  input  logic              is_home,
  input  logic [BW-1:0]     home_bank,
  input  logic [AW-1:0]     home_sa,
  input  logic [CW-1:0]     group_n,       // partial sums per neuron
  // dot product command
  input  logic              prod_start,
  input  logic [RW-1:0]     prod_act_row,
  input  logic [RW-1:0]     prod_w_row,    // first of OPW replica rows
  input  logic [RW-1:0]     prod_out_row,
  input  logic [LW-1:0]     prod_out_lane,
  input  logic              prod_tag,
  // row move command
  input  logic              move_start,
  input  logic [RW-1:0]     move_src_row,
  input  logic [BW-1:0]     move_dst_bank,
  input  logic [AW-1:0]     move_dst_sa,
  input  logic [RW-1:0]     move_dst_row,
  // bank port: plain accesses issued by the bank controller
  input  sa_op_e            bk_op,
  input  logic [RW-1:0]     bk_row,
  input  logic [COLS-1:0]   bk_wdata,
  input  logic [LANES-1:0]  bk_wmask,
  output logic              bk_rvalid,
  output logic [COLS-1:0]   bk_rdata,
  // packet out (to the bank's H-tree port)
  output logic              tx_valid,
  input  logic              tx_ready,
  output pkt_kind_e         tx_kind,
  output logic              tx_tag,
  output logic [BW-1:0]     tx_dst_bank,
  output logic [AW-1:0]     tx_dst_sa,
  output logic [RW-1:0]     tx_row,
  output logic [COLS-1:0]   tx_payload,
  // packet in (always accepted)
  input  logic              rx_valid,
  input  pkt_kind_e         rx_kind,
  input  logic              rx_tag,
  input  logic [RW-1:0]     rx_row,
  input  logic [COLS-1:0]   rx_payload,
  // status
  output logic              seq_idle,      // may take the next prod_start
  output logic [1:0]        acc_free,      // accumulator of each tag is free
  output logic              quiet,         // nothing in flight at all
  output logic              stall_port,    // event: AND step lost the port
  output logic              stall_tx,      // event: last step waited for the outbox
  output logic              neuron_wr      // event: a neuron was written
);

  // ------------------------------------------------------------ sequencer
  logic            and_busy;
  logic [SW-1:0]   step;
  logic [RW-1:0]   act_row_q, w_row_q;
  logic            tag_q;
  logic            mv_read;                // move read still to issue
  logic [RW-1:0]   mv_src_q, mv_dst_row_q;
  logic [BW-1:0]   mv_dst_bank_q;
  logic [AW-1:0]   mv_dst_sa_q;
  logic            mv_rx_pending;

  // home bookkeeping, one slot per tag
  logic [RW-1:0]   out_row_q  [2];
  logic [LW-1:0]   out_lane_q [2];
  logic [1:0]      acc_busy, acc_nvalid;
  logic signed [OPW-1:0] acc_neuron [2];
  logic [1:0]      pend;                   // neuron waiting to be written
  logic [OPW-1:0]  pend_val [2];

  // ------------------------------------------------------------ port mux
  sa_op_e          sa_op;
  logic [RW-1:0]   sa_row_a, sa_row_b;
  logic [COLS-1:0] sa_wdata;
  logic [LANES-1:0] sa_wmask;
  logic [COLS-1:0] sa_rdata;
  logic            sa_rvalid;

  typedef enum logic [1:0] {RD_NONE, RD_RAT, RD_MOVE, RD_BANK} rd_dst_e;
  rd_dst_e         rd_dst;                 // who gets the read issued last cycle
  logic [SW-1:0]   rd_step;

  logic rx_row_wr, nw_sel, nw_go, bk_go, seq_and_go, seq_mv_go, last_step, outbox_full;
  logic want_and, want_mv;

  assign rx_row_wr  = rx_valid && (rx_kind == PKT_ROW);
  assign nw_go      = !rx_row_wr && (pend != 2'b00);
  assign nw_sel     = !pend[0];            // write tag 0 first
  assign bk_go      = !rx_row_wr && !nw_go && (bk_op != SA_NOP);
  assign last_step  = (step == SW'(OPW - 1));
  assign want_and   = and_busy && !(last_step && !is_home && outbox_full);
  assign want_mv    = mv_read && !outbox_full;
  assign seq_and_go = want_and && !rx_row_wr && !nw_go && !bk_go;
  assign seq_mv_go  = !and_busy && want_mv && !rx_row_wr && !nw_go && !bk_go;

  always_comb begin
    sa_op    = SA_NOP;
    sa_row_a = '0;
    sa_row_b = '0;
    sa_wdata = '0;
    sa_wmask = '0;
    if (rx_row_wr) begin
      sa_op    = SA_WRITE;
      sa_row_a = rx_row;
      sa_wdata = rx_payload;
      sa_wmask = '1;
    end else if (nw_go) begin
      sa_op    = SA_WRITE;
      sa_row_a = out_row_q[nw_sel];
      sa_wdata = {LANES{pend_val[nw_sel]}};
      sa_wmask = LANES'(1) << out_lane_q[nw_sel];
    end else if (bk_go) begin
      sa_op    = bk_op;
      sa_row_a = bk_row;
      sa_wdata = bk_wdata;
      sa_wmask = bk_wmask;
    end else if (seq_and_go) begin
      sa_op    = SA_AND;
      sa_row_a = w_row_q + RW'(step);
      sa_row_b = act_row_q;
    end else if (seq_mv_go) begin
      sa_op    = SA_READ;
      sa_row_a = mv_src_q;
    end
  end

  lim_subarray #(.ROWS(ROWS), .COLS(COLS), .OPW(OPW)) u_sa (
    .clk, .rst_n, .op(sa_op), .row_a(sa_row_a), .row_b(sa_row_b),
    .wdata(sa_wdata), .wmask(sa_wmask), .rdata(sa_rdata), .rvalid(sa_rvalid)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_dst  <= RD_NONE;
      rd_step <= '0;
    end else begin
      rd_step <= step;
      if (seq_and_go)                      rd_dst <= RD_RAT;
      else if (seq_mv_go)                  rd_dst <= RD_MOVE;
      else if (bk_go && bk_op == SA_READ)  rd_dst <= RD_BANK;
      else                                 rd_dst <= RD_NONE;
    end
  end

  assign bk_rvalid = sa_rvalid && (rd_dst == RD_BANK);
  assign bk_rdata  = sa_rdata;

  // ------------------------------------------------------------ RAT
  logic                    rat_valid, rat_pending;
  logic signed [PSW-1:0]   rat_psum;
  logic                    rat_tag;
  localparam int unsigned SUM_W = 2 * OPW + $clog2(LANES) + 1;
  logic signed [SUM_W-1:0] rat_full;

  rat_unit #(.COLS(COLS), .OPW(OPW), .PSW(PSW), .FRAC(FRAC)) u_rat (
    .clk, .rst_n,
    .pp_valid(sa_rvalid && rd_dst == RD_RAT), .pp_step(rd_step), .pp_row(sa_rdata),
    .psum_valid(rat_valid), .psum(rat_psum), .psum_full(rat_full),
    .pending(rat_pending)
  );

  // ------------------------------------------------------------ sequencer FSM
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      and_busy      <= 1'b0;
      step          <= '0;
      act_row_q     <= '0;
      w_row_q       <= '0;
      tag_q         <= 1'b0;
      rat_tag       <= 1'b0;
      mv_read       <= 1'b0;
      mv_src_q      <= '0;
      mv_dst_row_q  <= '0;
      mv_dst_bank_q <= '0;
      mv_dst_sa_q   <= '0;
      mv_rx_pending <= 1'b0;
      out_row_q     <= '{default: '0};
      out_lane_q    <= '{default: '0};
    end else begin
      if (prod_start && active) begin
        and_busy  <= 1'b1;
        step      <= '0;
        act_row_q <= prod_act_row;
        w_row_q   <= prod_w_row;
        tag_q     <= prod_tag;
        out_row_q[prod_tag]  <= prod_out_row;
        out_lane_q[prod_tag] <= prod_out_lane;
      end else if (seq_and_go) begin
        step <= step + SW'(1);
        if (last_step) begin
          and_busy <= 1'b0;
          rat_tag  <= tag_q;
        end
      end
      if (move_start) begin
        mv_read       <= 1'b1;
        mv_src_q      <= move_src_row;
        mv_dst_row_q  <= move_dst_row;
        mv_dst_bank_q <= move_dst_bank;
        mv_dst_sa_q   <= move_dst_sa;
        mv_rx_pending <= 1'b1;
      end else begin
        if (seq_mv_go) mv_read <= 1'b0;
        if (rx_row_wr) mv_rx_pending <= 1'b0;
      end
    end
  end

  // ------------------------------------------------------------ outbox
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      outbox_full <= 1'b0;
      tx_kind     <= PKT_PSUM;
      tx_tag      <= 1'b0;
      tx_dst_bank <= '0;
      tx_dst_sa   <= '0;
      tx_row      <= '0;
      tx_payload  <= '0;
    end else begin
      if (tx_valid && tx_ready) outbox_full <= 1'b0;
      if (rat_valid && !is_home) begin
        outbox_full <= 1'b1;
        tx_kind     <= PKT_PSUM;
        tx_tag      <= rat_tag;
        tx_dst_bank <= home_bank;
        tx_dst_sa   <= home_sa;
        tx_row      <= '0;
        tx_payload  <= COLS'($unsigned(rat_psum));
      end else if (sa_rvalid && rd_dst == RD_MOVE) begin
        outbox_full <= 1'b1;
        tx_kind     <= PKT_ROW;
        tx_tag      <= 1'b0;
        tx_dst_bank <= mv_dst_bank_q;
        tx_dst_sa   <= mv_dst_sa_q;
        tx_row      <= mv_dst_row_q;
        tx_payload  <= sa_rdata;
      end
    end
  end
  assign tx_valid = outbox_full;

  // ------------------------------------------------------------ home accumulators
  logic rx_psum;
  assign rx_psum = rx_valid && (rx_kind == PKT_PSUM);

  for (genvar t = 0; t < 2; t++) begin : g_acc
    neuron_accumulator #(.PSW(PSW), .OPW(OPW), .MAX_N(MAX_G)) u_acc (
      .clk, .rst_n,
      .start(prod_start && active && is_home && (prod_tag == 1'(t))),
      .expected(group_n),
      .loc_valid(rat_valid && is_home && (rat_tag == 1'(t))),
      .loc_psum(rat_psum),
      .rem_valid(rx_psum && (rx_tag == 1'(t))),
      .rem_psum(PSW'(rx_payload)),
      .busy(acc_busy[t]),
      .neuron_valid(acc_nvalid[t]),
      .neuron(acc_neuron[t])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend     <= '0;
      pend_val <= '{default: '0};
    end else begin
      for (int t = 0; t < 2; t++) begin
        if (acc_nvalid[t]) begin
          pend[t]     <= 1'b1;
          pend_val[t] <= acc_neuron[t];
        end else if (nw_go && nw_sel == 1'(t)) begin
          pend[t] <= 1'b0;
        end
      end
    end
  end

  // ------------------------------------------------------------ status
  logic rat_inflight;
  assign rat_inflight = (rd_dst == RD_RAT) || rat_pending || rat_valid;
  assign seq_idle   = !and_busy;
  assign acc_free   = ~(acc_busy | acc_nvalid | pend);
  assign quiet      = !and_busy && !rat_inflight && !outbox_full && ((acc_busy | acc_nvalid) == 2'b00) &&
                      (pend == 2'b00) && !mv_read && !mv_rx_pending && (rd_dst != RD_MOVE);
  assign stall_port = and_busy && want_and && !seq_and_go;
  assign stall_tx   = and_busy && last_step && !is_home && outbox_full;
  assign neuron_wr  = nw_go;

  // The bank controller only uses the bank port while the tile is quiet, so
  // its accesses are never displaced by higher-priority ones.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (bk_op != SA_NOP) |-> bk_go)
    else $error("sisca_tile: bank access while the subarray port is busy");

  // A ROW packet is only accepted while this tile waits for one.
  assert property (@(posedge clk) disable iff (!rst_n)
                   rx_row_wr |-> mv_rx_pending)
    else $error("sisca_tile: unexpected row packet");

endmodule
