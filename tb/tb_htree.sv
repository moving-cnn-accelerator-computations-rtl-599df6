// tb_htree: self-checking test of the H-tree with 8 banks.
// 1. Latency: one packet alone from bank 0 to every bank takes one cycle per
//    switch crossed (2 x height of the lowest common node - 1).
// 2. Random traffic: every bank injects packets to random banks; every packet
//    must arrive exactly once, at its bank, in order per source/destination
//    pair. Then all banks send to bank 0 at once, which must cause
//    contention (conflict events) and still deliver everything.
module tb_htree;
  localparam int unsigned NB = 8, BW = 3, DW = 24;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NB-1:0] inj_valid, inj_ready, ej_valid;
  logic [BW-1:0] inj_dst [NB];
  logic [DW-1:0] inj_data [NB], ej_data [NB];
  logic [$clog2(NB)-1:0] ev_conflicts;
  int checks = 0, failures = 0, conflicts = 0;

  htree #(.NB(NB), .DW(DW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // packet payload: {src[3], dst[3], seq[18]}
  int next_seq [NB][NB];       // next expected sequence per (src, dst)
  int sent_seq [NB][NB];
  int received = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      conflicts += int'(ev_conflicts);
      for (int b = 0; b < int'(NB); b++) begin
        if (ej_valid[b]) begin
          int s, d, q;
          s = int'(ej_data[b][23:21]); d = int'(ej_data[b][20:18]); q = int'(ej_data[b][17:0]);
          received++;
          checks++;
          if (d != b || q != next_seq[s][d]) begin
            failures++;
            $display("FAIL packet %0d->%0d seq %0d at bank %0d, expected seq %0d", s, d, q, b, next_seq[s][d]);
          end
          next_seq[s][d] = q + 1;
        end
      end
    end
  end

  int total = 0;

  // one packet per bank at most, replaced only after it was taken
  task automatic traffic(input int cycles, input bit all_to_zero);
    logic [NB-1:0] fired;
    for (int c = 0; c < cycles + 200; c++) begin
      #1 fired = inj_valid & inj_ready;
      @(posedge clk); #1;
      for (int b = 0; b < int'(NB); b++) begin
        if (fired[b]) begin
          total++;
          inj_valid[b] = 0;
        end
        if (!inj_valid[b] && c < cycles && $urandom_range(3) != 0) begin
          int d;
          d = all_to_zero ? 0 : $urandom_range(NB - 1);
          inj_valid[b] = 1;
          inj_dst[b] = BW'(d);
          inj_data[b] = {3'(b), 3'(d), 18'(sent_seq[b][d])};
          sent_seq[b][d]++;
        end
      end
    end
    chk(inj_valid == '0, "all injections accepted");
  endtask

  initial begin
    int cyc, want;
    inj_valid = '0;
    for (int b = 0; b < int'(NB); b++) begin inj_dst[b] = '0; inj_data[b] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // latency
    for (int d = 0; d < int'(NB); d++) begin
      inj_valid[0] = 1; inj_dst[0] = BW'(d); inj_data[0] = {3'd0, 3'(d), 18'(sent_seq[0][d])};
      sent_seq[0][d]++;
      @(posedge clk); #1 inj_valid[0] = 0;
      total++;
      cyc = 1;
      while (!ej_valid[d] && cyc < 50) begin @(posedge clk); #1 cyc++; end
      want = (d < 2) ? 1 : (d < 4 ? 3 : 5);
      chk(cyc == want, $sformatf("latency to bank %0d: %0d cycles, expected %0d", d, cyc, want));
      @(posedge clk); #1;
    end
    traffic(400, 1'b0);
    conflicts = 0;
    traffic(100, 1'b1);
    repeat (50) @(posedge clk);
    chk(received == total, $sformatf("received %0d of %0d packets", received, total));
    chk(conflicts > 0, "contention seen when all banks send to bank 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
