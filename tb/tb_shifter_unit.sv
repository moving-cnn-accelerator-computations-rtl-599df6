// tb_shifter_unit: self-checking test of the bank shifter.
// For random rows and every rotation amount, checks the bit mode (each
// 16-bit operand rotated left by k) and the operand mode (operand i moves to
// operand i+k, wrapping) against rotations computed in the testbench, and
// the 1-cycle latency.
module tb_shifter_unit;
  localparam int unsigned COLS = 128, OPW = 16, LANES = COLS / OPW;
  localparam int unsigned AW = $clog2(LANES) > $clog2(OPW) ? $clog2(LANES) : $clog2(OPW);

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, mode_operand, out_valid;
  logic [AW-1:0] amount;
  logic [COLS-1:0] in_row, out_row;
  int checks = 0, failures = 0;

  shifter_unit #(.COLS(COLS), .OPW(OPW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [COLS-1:0] ref_rot(input logic [COLS-1:0] r, input bit opmode, input int k);
    logic [COLS-1:0] o;
    if (opmode) begin
      for (int i = 0; i < int'(LANES); i++) o[((i + k) % LANES)*OPW +: OPW] = r[i*OPW +: OPW];
    end else begin
      for (int i = 0; i < int'(LANES); i++)
        for (int j = 0; j < int'(OPW); j++) o[i*OPW + (j + k) % OPW] = r[i*OPW + j];
    end
    return o;
  endfunction

  initial begin
    in_valid = 0; mode_operand = 0; amount = '0; in_row = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int it = 0; it < 20; it++) begin
      for (int m = 0; m < 2; m++) begin
        int kmax;
        kmax = m ? LANES : OPW;
        for (int k = 0; k < kmax; k++) begin
          logic [COLS-1:0] r;
          for (int w = 0; w < int'(COLS) / 32; w++) r[w*32 +: 32] = $urandom;
          in_valid = 1; mode_operand = m[0]; amount = AW'(k); in_row = r;
          @(posedge clk); #1 in_valid = 0;
          checks++;
          if (!out_valid || out_row !== ref_rot(r, m[0], k)) begin
            failures++;
            $display("FAIL mode %0d k %0d: got %h exp %h", m, k, out_row, ref_rot(r, m[0], k));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
