// jet_counter_tb - checks the jet multiplicity counter: random candidate
// lists (including empty and non-jet entries, and lists where every entry
// qualifies so that the counts saturate at 31) against random criteria,
// compared one cycle later with a count made by the testbench.
module jet_counter_tb;
  import gct_pkg::*;
  import jet_ref_pkg::*;

  localparam int N = 44, NJC = 12, NEV = 500;

  logic clk = 0, rst = 1;
  jet_cand_t cand [N];
  jc_crit_t crit [NJC];
  logic [JC_W-1:0] count [NJC];
  int expq [$];
  int checks = 0, failures = 0, saturated = 0;

  jet_counter dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (cand[i]) cand[i] = '0;
    foreach (crit[j]) crit[j] = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int cyc = 0; cyc <= NEV; cyc++) begin
      @(negedge clk);
      if (cyc > 0)
        for (int j = 0; j < NJC; j++) begin
          int w;
          w = expq.pop_front();
          checks++;
          if (count[j] != JC_W'(w)) begin
            failures++;
            if (failures < 10) $display("cycle %0d crit %0d: got %0d want %0d", cyc, j, count[j], w);
          end
          if (w == 31) saturated++;
        end
      foreach (crit[j]) crit[j] = rand_crit();
      foreach (cand[i]) begin
        cand[i].obj.rank = RANK_W'($urandom_range(63));
        cand[i].obj.eta  = ETA_W'($urandom_range(21));
        cand[i].obj.phi  = PHI_W'($urandom_range(17));
        cand[i].cls      = jet_class_e'($urandom_range(3));
      end
      if (cyc % 10 == 3) begin
        crit[0] = '{rank_min: 1, eta_min: 0, eta_max: 21, class_mask: 3'b111};
        foreach (cand[i]) begin
          cand[i].cls = JC_CENTRAL;
          if (cand[i].obj.rank == 0) cand[i].obj.rank = 1;
        end
      end
      for (int j = 0; j < NJC; j++) begin
        int n;
        n = 0;
        foreach (cand[i]) if (crit_ok(cand[i].obj.rank, cand[i].obj.eta, int'(cand[i].cls), crit[j])) n++;
        expq.push_back(n > 31 ? 31 : n);
      end
    end
    checks++;
    if (saturated == 0) failures++;
    $display("saturated counts: %0d", saturated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
