// Self-checking testbench of lumi_counter: random results of every vertex
// class over several periods; each snapshot is compared with counts kept by
// the testbench and must arrive exactly at the end of its period. A second
// instance with 3-bit counters checks that full counters hold their value.
module tb_lumi_counter;
  logic clk = 1'b0, rst_n = 1'b0, ev_valid = 1'b0;
  logic [1:0] nvtx = '0;
  logic [31:0] period = 32'd37;
  logic [3:0][31:0] counts;
  logic [3:0][2:0]  counts_s;
  logic snap_valid, snap_s;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lumi_counter dut (.clk, .rst_n, .ev_valid, .nvtx, .period, .counts, .snap_valid);
  lumi_counter #(.CNT_W(3)) dut_sat (.clk, .rst_n, .ev_valid, .nvtx, .period,
                                     .counts(counts_s), .snap_valid(snap_s));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned acc [4];
  int unsigned exp_snap [4];
  int cyc_in_period, snaps;

  initial begin
    snaps = 0;
    cyc_in_period = 0;
    foreach (acc[i]) acc[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 37 * 20; t++) begin
      bit v;
      logic [1:0] n;
      v = ($urandom % 4) != 0;
      n = 2'($urandom % 4);
      ev_valid = v; nvtx = n;
      if (v) acc[n]++;
      cyc_in_period++;
      @(negedge clk);
      // the snapshot pulses in the cycle after the last cycle of a period
      checks++;
      if (snap_valid !== (cyc_in_period == 37)) begin
        failures++;
        $display("FAIL t=%0d: snap_valid=%0d at cycle %0d of the period", t, snap_valid, cyc_in_period);
      end
      if (cyc_in_period == 37) begin
        snaps++;
        for (int i = 0; i < 4; i++) begin
          checks += 2;
          if (counts[i] != acc[i]) begin
            failures++;
            $display("FAIL snapshot %0d class %0d: got %0d expected %0d", snaps, i, counts[i], acc[i]);
          end
          if (counts_s[i] != 3'((acc[i] > 7) ? 7 : acc[i])) begin
            failures++;
            $display("FAIL saturating class %0d: got %0d expected %0d", i, counts_s[i], acc[i]);
          end
          acc[i] = 0;
        end
        cyc_in_period = 0;
      end
    end
    checks++;
    if (snaps != 20) begin failures++; $display("FAIL: %0d snapshots", snaps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
