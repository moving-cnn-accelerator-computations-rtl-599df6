// tb_neuron_accumulator: self-checking test of the home-subarray gather.
// Announces a group size, then feeds partial sums on the local and remote
// inputs at random times (sometimes both in one cycle), and checks that the
// neuron appears exactly one cycle after the last expected sum, equals the
// saturated sum, and that busy falls at the same time.
module tb_neuron_accumulator;
  import sisca_pkg::*;
  localparam int unsigned PSW = 16, OPW = 16, MAX_N = 64;
  localparam int unsigned CW = $clog2(MAX_N + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, loc_valid, rem_valid, busy, neuron_valid;
  logic [CW-1:0] expected;
  logic signed [PSW-1:0] loc_psum, rem_psum;
  logic signed [OPW-1:0] neuron;
  int checks = 0, failures = 0;

  neuron_accumulator #(.PSW(PSW), .OPW(OPW), .MAX_N(MAX_N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; loc_valid = 0; rem_valid = 0; expected = '0; loc_psum = '0; rem_psum = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int trial = 0; trial < 60; trial++) begin
      int n, sent;
      longint sum, e;
      n = (trial == 0) ? 18 : $urandom_range(1, MAX_N);
      sum = 0;
      sent = 0;
      start = 1; expected = CW'(n);
      @(posedge clk); #1 start = 0;
      while (sent < n) begin
        loc_valid = 0; rem_valid = 0;
        if ($urandom_range(3) != 0) begin
          rem_valid = 1;
          // large values in some trials to exercise saturation
          rem_psum = (trial % 4 == 3) ? 16'sd30000 : PSW'($urandom);
          sum += rem_psum; sent++;
        end
        if (sent < n && $urandom_range(2) == 0) begin
          loc_valid = 1; loc_psum = PSW'($urandom);
          sum += loc_psum; sent++;
        end
        @(posedge clk); #1;
        loc_valid = 0; rem_valid = 0;
        if (sent < n) begin
          checks++;
          if (neuron_valid || !busy) begin failures++; $display("FAIL early end trial %0d", trial); end
        end
      end
      e = sum > 32767 ? 32767 : (sum < -32768 ? -32768 : sum);
      checks++;
      if (!neuron_valid || neuron != e || busy) begin
        failures++;
        $display("FAIL trial %0d n=%0d: valid=%0b neuron=%0d expected %0d", trial, n, neuron_valid, neuron, e);
      end
      @(posedge clk); #1;
      checks++;
      if (neuron_valid) begin failures++; $display("FAIL neuron_valid longer than one cycle"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
