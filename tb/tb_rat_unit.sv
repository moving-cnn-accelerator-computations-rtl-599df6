// tb_rat_unit: self-checking test of the Registers and Adder Tree.
// For random signed 16-bit activations A and weights W per lane, the
// testbench forms the 16 AND rows the subarray would return (weights
// rotated left by k bits, activations unrotated), feeds them back to back,
// and compares the full sum with the sum of the lane products A*W and the
// reduced partial sum with (sum >>> FRAC) saturated. It
// also checks the 2-cycle latency after the last step and that consecutive
// dot products run without gaps (one per 16 cycles).
module tb_rat_unit;
  import sisca_pkg::*;
  localparam int unsigned COLS = 128, OPW = 16, PSW = 16, FRAC = 8;
  localparam int unsigned LANES = COLS / OPW, SUM_W = 2 * OPW + $clog2(LANES) + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic pp_valid;
  logic [$clog2(OPW)-1:0] pp_step;
  logic [COLS-1:0] pp_row;
  logic psum_valid;
  logic signed [PSW-1:0] psum;
  logic signed [SUM_W-1:0] psum_full;
  logic pending;
  int checks = 0, failures = 0;

  rat_unit #(.COLS(COLS), .OPW(OPW), .PSW(PSW), .FRAC(FRAC)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [OPW-1:0] rotl(input logic [OPW-1:0] v, input int k);
    return (v << k) | (v >> (OPW - k));
  endfunction

  // expected results of each set, queued in order
  longint exp_sum  [$];

  int n_sets = 40;
  int seen = 0;
  int last_valid_cycle = -1, cycle = 0, last_step_cycle = -1;


  // checker
  always @(posedge clk) begin
    cycle++;
    if (pp_valid && pp_step == 4'(OPW - 1)) last_step_cycle = cycle;
    if (rst_n && psum_valid) begin
      longint s, r;
      s = exp_sum.pop_front();
      checks++;
      if (psum_full != s) begin failures++; $display("FAIL sum got %0d exp %0d", psum_full, s); end
      r = s >>> FRAC;
      if (r > 32767) r = 32767;
      if (r < -32768) r = -32768;
      checks++;
      if (psum != r) begin failures++; $display("FAIL psum got %0d exp %0d", psum, r); end
      if (last_valid_cycle >= 0) begin
        checks++;
        if (cycle - last_valid_cycle != int'(OPW)) begin
          failures++;
          $display("FAIL results %0d cycles apart, expected %0d", cycle - last_valid_cycle, OPW);
        end
      end
      last_valid_cycle = cycle;
      checks++;
      if (cycle - last_step_cycle != 2) begin
        failures++;
        $display("FAIL latency %0d cycles after the last step, expected 2", cycle - last_step_cycle);
      end
      seen++;
    end
  end

  initial begin
    pp_valid = 1'b0; pp_step = '0; pp_row = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int s = 0; s < n_sets; s++) begin
      logic [OPW-1:0] a [LANES], w [LANES];
      longint pr [LANES];
      longint sum;
      sum = 0;
      for (int l = 0; l < int'(LANES); l++) begin
        case (s)
          0: begin a[l] = 16'h7fff; w[l] = 16'h7fff; end   // large positive
          1: begin a[l] = 16'h8000; w[l] = 16'h8000; end   // most negative squared
          2: begin a[l] = 16'h8000; w[l] = 16'h7fff; end
          default: begin a[l] = OPW'($urandom); w[l] = OPW'($urandom); end
        endcase
        pr[l] = longint'($signed(a[l])) * longint'($signed(w[l]));
        sum += pr[l];
      end
      exp_sum.push_back(sum);
      for (int k = 0; k < int'(OPW); k++) begin
        pp_valid = 1'b1;
        pp_step  = k[$clog2(OPW)-1:0];
        for (int l = 0; l < int'(LANES); l++) pp_row[l*OPW +: OPW] = a[l] & rotl(w[l], k);
        @(posedge clk); #1;
      end
    end
    pp_valid = 1'b0;
    repeat (4) @(posedge clk);
    checks++;
    if (seen != n_sets) begin failures++; $display("FAIL saw %0d results", seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
