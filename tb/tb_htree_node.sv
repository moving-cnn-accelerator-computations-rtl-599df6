// tb_htree_node: self-checking test of one H-tree switch covering banks 4..7
// (left child 4..5, right child 6..7).
// Checks the routing of every input to every output, the one-cycle hop, the
// U-turn into the port a packet came from, backpressure (a blocked output
// holds two packets, then refuses more) and round-robin sharing of one output
// by two inputs.
module tb_htree_node;
  localparam int unsigned BW = 3, DW = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [BW:0] lo = 4, mid = 6, hi = 8;
  logic [2:0] in_valid, in_ready, out_valid, out_ready;
  logic [BW-1:0] in_dst [3], out_dst [3];
  logic [DW-1:0] in_data [3], out_data [3];
  logic ev_conflict;
  int checks = 0, failures = 0;

  htree_node #(.BW(BW), .DW(DW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int port_of(input int dst);
    if (dst >= 4 && dst < 6) return 1;
    if (dst >= 6 && dst < 8) return 2;
    return 0;
  endfunction

  initial begin
    int got [3];
    in_valid = '0; out_ready = '1;
    for (int i = 0; i < 3; i++) begin in_dst[i] = '0; in_data[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // single packets: every input, every destination
    for (int i = 0; i < 3; i++) begin
      for (int d = 0; d < 8; d++) begin
        in_valid = '0; in_valid[i] = 1; in_dst[i] = BW'(d); in_data[i] = DW'(i * 100 + d);
        #1 chk(in_ready[i], "accepted when empty");
        @(posedge clk); #1 in_valid = '0;
        for (int o = 0; o < 3; o++) begin
          if (o == port_of(d))
            chk(out_valid[o] && out_data[o] == DW'(i * 100 + d) && out_dst[o] == BW'(d),
                $sformatf("in %0d dst %0d out %0d", i, d, o));
          else
            chk(!out_valid[o], $sformatf("stray output %0d", o));
        end
        @(posedge clk); #1;
      end
    end
    // backpressure: output 1 blocked
    out_ready = 3'b101;
    in_valid = 3'b001; in_dst[0] = 4; in_data[0] = 1;
    @(posedge clk); #1 in_data[0] = 2;
    @(posedge clk); #1 in_data[0] = 3;
    chk(!in_ready[0] && ev_conflict, "third packet refused while output is blocked");
    out_ready = 3'b111;
    @(posedge clk); #1;
    chk(out_valid[1] && out_data[1] == 2, "queue order after release");
    chk(in_ready[0], "space again after release");
    @(posedge clk); #1 in_valid = '0;
    chk(out_valid[1] && out_data[1] == 3, "third packet after release");
    @(posedge clk); #1;
    chk(!out_valid[1], "queue drained");
    // round robin: inputs 0 and 2 both send to the left child for 20 cycles
    out_ready = 3'b101;                      // fill the queue first
    got = '{0, 0, 0};
    in_valid = 3'b101; in_dst[0] = 5; in_dst[2] = 4; in_data[0] = 16'hA; in_data[2] = 16'hC;
    repeat (3) @(posedge clk);
    #1 out_ready = 3'b111;
    for (int c = 0; c < 20; c++) begin
      @(posedge clk); #1;
      if (out_valid[1]) got[out_data[1] == 16'hA ? 0 : 2]++;
    end
    in_valid = '0;
    chk(got[0] >= 9 && got[2] >= 9, $sformatf("fair share %0d / %0d", got[0], got[2]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
