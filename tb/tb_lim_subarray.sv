// tb_lim_subarray: self-checking test of the logic-in-memory subarray.
// Fills a small subarray with random rows, then checks plain reads, the
// dual-wordline AND of random row pairs and lane-masked writes against a
// reference copy kept in the testbench, and the 1-cycle read latency.
module tb_lim_subarray;
  import sisca_pkg::*;
  localparam int unsigned ROWS = 32, COLS = 64, OPW = 16, LANES = COLS / OPW;

  logic clk = 1'b0, rst_n = 1'b0;
  sa_op_e op;
  logic [$clog2(ROWS)-1:0] row_a, row_b;
  logic [COLS-1:0] wdata, rdata;
  logic [LANES-1:0] wmask;
  logic rvalid;
  logic [COLS-1:0] ref_mem [ROWS];
  int checks = 0, failures = 0;

  lim_subarray #(.ROWS(ROWS), .COLS(COLS), .OPW(OPW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [COLS-1:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic do_op(input sa_op_e o, input int a, input int b,
                       input logic [COLS-1:0] d, input logic [LANES-1:0] m);
    op = o; row_a = a[$clog2(ROWS)-1:0]; row_b = b[$clog2(ROWS)-1:0]; wdata = d; wmask = m;
    @(posedge clk);
    #1 op = SA_NOP;
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    op = SA_NOP; row_a = '0; row_b = '0; wdata = '0; wmask = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int r = 0; r < int'(ROWS); r++) begin
      ref_mem[r] = {$urandom, $urandom};
      do_op(SA_WRITE, r, 0, ref_mem[r], '1);
    end
    // plain reads, with latency check
    for (int r = 0; r < int'(ROWS); r++) begin
      op = SA_READ; row_a = r[$clog2(ROWS)-1:0];
      @(posedge clk); #1 op = SA_NOP;
      checks++; if (!rvalid) begin failures++; $display("FAIL rvalid low after read"); end
      check(rdata, ref_mem[r], "read");
      @(posedge clk); #1;
      checks++; if (rvalid) begin failures++; $display("FAIL rvalid stays high"); end
    end
    // dual-wordline AND
    for (int i = 0; i < 100; i++) begin
      int a, b;
      a = $urandom_range(ROWS - 1); b = $urandom_range(ROWS - 1);
      do_op(SA_AND, a, b, '0, '0);
      check(rdata, ref_mem[a] & ref_mem[b], "and");
    end
    // lane-masked writes
    for (int i = 0; i < 50; i++) begin
      int r;
      logic [COLS-1:0] d;
      logic [LANES-1:0] m;
      r = $urandom_range(ROWS - 1); d = {$urandom, $urandom}; m = LANES'($urandom);
      do_op(SA_WRITE, r, 0, d, m);
      for (int l = 0; l < int'(LANES); l++)
        if (m[l]) ref_mem[r][l*OPW +: OPW] = d[l*OPW +: OPW];
      do_op(SA_READ, r, 0, '0, '0);
      check(rdata, ref_mem[r], "masked write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
