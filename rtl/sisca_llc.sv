// sisca_llc: a last-level cache whose subarrays double as a CNN accelerator.
//
// NB banks of SPB subarrays each (main configuration 128 x 8 subarrays of
// 512x512 bits = 32 MB, 1024 subarrays) are joined by an H-tree. Every
// subarray can AND two of its rows in place and has a Registers-and-Adder-
// Tree beside it, so all subarrays compute 16-bit dot products at the same
// time; only partial sums (2 bytes each) and occasional rows cross the
// H-tree. Each bank has one shifter that makes the bit-rotated weight
// replicas and rotates activation rows by whole operands.
//
// Command port (cmd_valid/cmd_ready, one command at a time):
//   OP_WRITE   cmd_data (lanes in cmd_mask) -> row cmd_row of (cmd_bank, cmd_sa)
//   OP_READ    row cmd_row of (cmd_bank, cmd_sa) -> rsp_valid/rsp_data
//   OP_LOAD_W  cmd_data, a row of weights, -> OPW bit-rotated replicas in rows
//              cmd_row .. cmd_row+OPW-1 of (cmd_bank, cmd_sa)
//   OP_ROT     in every subarray, rotate row cmd_row by cmd_amount operands
//   OP_MOVE    every subarray g sends row cmd_row to row cmd_row2 of
//              subarray (g + cmd_delta) mod NB*SPB
//   OP_COMPUTE sets the mapping (groups of cmd_group_n consecutive subarrays
//              form one neuron, the first being the home; cmd_n_groups groups
//              take part) and runs cmd_n_act x cmd_n_wset dot products in
//              every subarray: activation row cmd_row + a, weight replicas at
//              cmd_row2 + w*OPW. Product p = a*cmd_n_wset + w gives the neuron
//              stored in each home subarray at operand position
//              cmd_out_lane + p, counted from lane 0 of row cmd_out_row.
// The controller starts a dot product in all subarrays at once whenever
// every sequencer is idle and the home accumulators for its tag (p mod 2) are
// free, so the AND steps of one product overlap the gathering of the
// previous one. cmd_ready returns once every subarray is quiet.
//
// Counters (free running from reset) report what happened: dot products
// started, neurons written, partial-sum and row packets injected into the
// H-tree, cycles in which an AND step lost its subarray port, cycles in
// which a subarray waited for its outbox, and H-tree switch conflicts.
module sisca_llc
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
  localparam int unsigned LANES = COLS / OPW,
  localparam int unsigned RW    = $clog2(ROWS),
  localparam int unsigned LW    = $clog2(LANES),
  localparam int unsigned BW    = NB > 1 ? $clog2(NB) : 1,
  localparam int unsigned AW    = SPB > 1 ? $clog2(SPB) : 1,
  localparam int unsigned GW    = $clog2(NSA),
  localparam int unsigned CW    = $clog2(NSA + 1),
  localparam int unsigned DW    = COLS + RW + AW + 2,
  localparam int unsigned MW    = $clog2(LANES) > $clog2(OPW) ? $clog2(LANES) : $clog2(OPW),
  localparam int unsigned PW    = 2 * RW + 1                 // product counter
) (
  input  logic              clk,
  input  logic              rst_n,
  // command
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  opcode_e           cmd_op,
  input  logic [BW-1:0]     cmd_bank,
  input  logic [AW-1:0]     cmd_sa,
  input  logic [RW-1:0]     cmd_row,
  input  logic [RW-1:0]     cmd_row2,
  input  logic [COLS-1:0]   cmd_data,
  input  logic [LANES-1:0]  cmd_mask,
  input  logic [MW-1:0]     cmd_amount,
  input  logic [GW-1:0]     cmd_delta,
  input  logic [CW-1:0]     cmd_group_n,
  input  logic [CW-1:0]     cmd_n_groups,
  input  logic [RW:0]       cmd_n_act,
  input  logic [RW:0]       cmd_n_wset,
  input  logic [RW-1:0]     cmd_out_row,
  input  logic [LW-1:0]     cmd_out_lane,
  // read response
  output logic              rsp_valid,
  output logic [COLS-1:0]   rsp_data,
  // counters
  output logic [31:0]       cnt_products,
  output logic [31:0]       cnt_neurons,
  output logic [31:0]       cnt_psum_pkts,
  output logic [31:0]       cnt_row_pkts,
  output logic [31:0]       cnt_stall_port,
  output logic [31:0]       cnt_stall_tx,
  output logic [31:0]       cnt_conflicts
);

  // ------------------------------------------------------------ controller
  typedef enum logic [2:0] {C_IDLE, C_BANKOP, C_COMPUTE, C_DRAIN} cstate_e;
  cstate_e        cst;
  logic [CW-1:0]  cfg_group_n, cfg_n_groups;
  logic [RW-1:0]  act_base, w_base, out_row;
  logic [RW:0]    n_act, n_wset, a_idx, w_idx;
  logic [PW-1:0]  out_pos;                   // operand position of next neuron
  logic [BW-1:0]  op_bank;
  logic           p_tag;

  // bank-level status
  logic [NB-1:0]  b_idle, b_seq_idle, b_quiet, b_rd_valid, b_sp, b_st;
  logic [1:0]     b_acc_free [NB];
  logic [COLS-1:0] b_rd_data [NB];
  logic [$clog2(SPB+1)-1:0] b_nw [NB];
  logic [1:0]     all_acc_free;
  always_comb begin
    all_acc_free = 2'b11;
    for (int b = 0; b < int'(NB); b++) all_acc_free &= b_acc_free[b];
  end

  logic bank_op_fire, prod_fire, move_fire, broadcast_op;
  assign bank_op_fire = (cst == C_IDLE) && cmd_valid &&
                        (cmd_op inside {OP_WRITE, OP_READ, OP_LOAD_W, OP_ROT});
  assign broadcast_op = (cmd_op == OP_ROT);
  assign move_fire    = (cst == C_IDLE) && cmd_valid && (cmd_op == OP_MOVE);
  assign prod_fire    = (cst == C_COMPUTE) && (a_idx < n_act) &&
                        (&b_seq_idle) && all_acc_free[p_tag];
  assign cmd_ready    = (cst == C_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cst          <= C_IDLE;
      cfg_group_n  <= '0;
      cfg_n_groups <= '0;
      act_base     <= '0;
      w_base       <= '0;
      out_row      <= '0;
      n_act        <= '0;
      n_wset       <= '0;
      a_idx        <= '0;
      w_idx        <= '0;
      out_pos      <= '0;
      op_bank      <= '0;
      p_tag        <= 1'b0;
    end else begin
      unique case (cst)
        C_IDLE: if (cmd_valid) begin
          op_bank <= cmd_bank;
          unique case (cmd_op)
            OP_WRITE, OP_READ, OP_LOAD_W, OP_ROT: cst <= C_BANKOP;
            OP_MOVE:                              cst <= C_DRAIN;
            OP_COMPUTE: begin
              cfg_group_n  <= cmd_group_n;
              cfg_n_groups <= cmd_n_groups;
              act_base     <= cmd_row;
              w_base       <= cmd_row2;
              out_row      <= cmd_out_row;
              out_pos      <= PW'(cmd_out_lane);
              n_act        <= cmd_n_act;
              n_wset       <= cmd_n_wset;
              a_idx        <= '0;
              w_idx        <= '0;
              p_tag        <= 1'b0;
              cst          <= (cmd_n_act == '0 || cmd_n_wset == '0) ? C_IDLE : C_COMPUTE;
            end
            default: cst <= C_IDLE;
          endcase
        end
        C_BANKOP: if (&b_idle) cst <= C_IDLE;
        C_COMPUTE: begin
          if (prod_fire) begin
            p_tag   <= ~p_tag;
            out_pos <= out_pos + PW'(1);
            if (w_idx + 1'b1 == n_wset) begin
              w_idx <= '0;
              a_idx <= a_idx + 1'b1;
              if (a_idx + 1'b1 == n_act) cst <= C_DRAIN;
            end else begin
              w_idx <= w_idx + 1'b1;
            end
          end
        end
        C_DRAIN: if (&b_quiet) cst <= C_IDLE;
        default: cst <= C_IDLE;
      endcase
    end
  end

  // fields of the product being started
  logic [RW-1:0] p_act_row, p_w_row, p_out_row;
  logic [LW-1:0] p_out_lane;
  always_comb begin
    logic [PW-1:0] wr;
    wr         = PW'(w_base) + PW'(w_idx) * PW'(OPW);
    p_act_row  = act_base + RW'(a_idx);
    p_w_row    = RW'(wr);
    p_out_row  = out_row + RW'(out_pos / PW'(LANES));
    p_out_lane = LW'(out_pos % PW'(LANES));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp_valid <= 1'b0;
      rsp_data  <= '0;
    end else begin
      rsp_valid <= (cst == C_BANKOP) && b_rd_valid[op_bank];
      if ((cst == C_BANKOP) && b_rd_valid[op_bank]) rsp_data <= b_rd_data[op_bank];
    end
  end

  // ------------------------------------------------------------ banks and H-tree
  logic [NB-1:0]  inj_valid, inj_ready, ej_valid;
  logic [BW-1:0]  inj_dst  [NB];
  logic [DW-1:0]  inj_data [NB], ej_data [NB];
  logic [$clog2(NB)-1:0] ht_conf;

  for (genvar b = 0; b < int'(NB); b++) begin : g_bank
    sisca_bank #(.ROWS(ROWS), .COLS(COLS), .OPW(OPW), .PSW(PSW), .FRAC(FRAC),
                 .NB(NB), .SPB(SPB)) u_bank (
      .clk, .rst_n, .bank_id(BW'(b)),
      .cfg_group_n, .cfg_n_groups,
      .op_valid(bank_op_fire && (broadcast_op || cmd_bank == BW'(b))),
      .op_code(cmd_op), .op_sa(cmd_sa), .op_row(cmd_row), .op_data(cmd_data),
      .op_mask(cmd_mask), .op_amount(cmd_amount),
      .op_idle(b_idle[b]), .rd_valid(b_rd_valid[b]), .rd_data(b_rd_data[b]),
      .prod_start(prod_fire), .prod_act_row(p_act_row), .prod_w_row(p_w_row),
      .prod_out_row(p_out_row), .prod_out_lane(p_out_lane), .prod_tag(p_tag),
      .move_start(move_fire), .move_src_row(cmd_row), .move_dst_row(cmd_row2),
      .move_delta(cmd_delta),
      .ht_out_valid(inj_valid[b]), .ht_out_ready(inj_ready[b]), .ht_out_dst(inj_dst[b]),
      .ht_out_data(inj_data[b]), .ht_in_valid(ej_valid[b]), .ht_in_data(ej_data[b]),
      .seq_idle(b_seq_idle[b]), .acc_free(b_acc_free[b]), .quiet(b_quiet[b]),
      .ev_stall_port(b_sp[b]), .ev_stall_tx(b_st[b]), .ev_neurons(b_nw[b])
    );
  end

  htree #(.NB(NB), .DW(DW)) u_htree (
    .clk, .rst_n, .inj_valid, .inj_ready, .inj_dst, .inj_data,
    .ej_valid, .ej_data, .ev_conflicts(ht_conf)
  );

  // ------------------------------------------------------------ counters
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_products   <= '0;
      cnt_neurons    <= '0;
      cnt_psum_pkts  <= '0;
      cnt_row_pkts   <= '0;
      cnt_stall_port <= '0;
      cnt_stall_tx   <= '0;
      cnt_conflicts  <= '0;
    end else begin
      logic [31:0] nw, np, nr;
      nw = '0;
      np = '0;
      nr = '0;
      for (int b = 0; b < int'(NB); b++) begin
        nw = nw + 32'(b_nw[b]);
        if (inj_valid[b] && inj_ready[b]) begin
          if (inj_data[b][DW-1] == PKT_ROW) nr = nr + 32'd1;
          else                               np = np + 32'd1;
        end
      end
      cnt_products   <= cnt_products + 32'(prod_fire);
      cnt_neurons    <= cnt_neurons + nw;
      cnt_psum_pkts  <= cnt_psum_pkts + np;
      cnt_row_pkts   <= cnt_row_pkts + nr;
      cnt_stall_port <= cnt_stall_port + 32'($countones(b_sp));
      cnt_stall_tx   <= cnt_stall_tx + 32'($countones(b_st));
      cnt_conflicts  <= cnt_conflicts + 32'(ht_conf);
    end
  end

endmodule
