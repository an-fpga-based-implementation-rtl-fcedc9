// jet_cluster_tb - checks one jet cluster module against a behavioural
// model of the 3x3 sum-and-compare algorithm written out here: sparse
// random deposits (so that isolated jets, touching deposits, equal
// neighbours, tau and forward jets all occur), reference sort of each
// class, jet counts against random criteria, and the strip energies with
// weights computed from real cos/sin. Outputs are checked exactly
// LAT = 2 + SORT_LAT = 5 cycles after the input. The strip used is
// phi 16..17, so the duplicated column on one side wraps to phi 0.
module jet_cluster_tb;
  import gct_pkg::*;
  import sort_ref_pkg::*;
  import jet_ref_pkg::*;

  localparam int PHI0 = 16, CP = 2, NJC = 12, LAT = 5, NEV = 300;

  logic clk = 0, rst = 1;
  region_t region [N_ETA][CP+2];
  jc_crit_t crit [NJC];
  obj_t cen [4], fwd [4], tau [4];
  logic [JC_W-1:0] jcount [NJC];
  logic [15:0] et;
  logic signed [31:0] ex, ey;

  typedef struct {
    obj_t cen [4]; obj_t fwd [4]; obj_t tau [4];
    int jc [NJC]; int et; longint ex; longint ey;
  } exp_t;
  exp_t expq [$];
  int checks = 0, failures = 0;
  int n_cen = 0, n_fwd = 0, n_tau = 0;

  jet_cluster #(.PHI0(PHI0)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void chk(input string what, input longint got, input longint want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 12) $display("%s: got %0d want %0d", what, got, want);
    end
  endfunction

  function automatic exp_t model();
    exp_t r;
    obj_q_t lc, lf, lt;
    int cnt [NJC];
    foreach (cnt[j]) cnt[j] = 0;
    r.et = 0; r.ex = 0; r.ey = 0;
    for (int e = 0; e < N_ETA; e++) begin
      for (int c = 1; c <= CP; c++) begin
        int ctr, sum, cls, rank;
        bit mx, at;
        obj_t o;
        ctr = region[e][c].et;
        sum = 0; mx = (ctr > 0); at = 1;
        r.et += ctr;
        r.ex += longint'(ctr) * q10cos(20.0 * ((PHI0 + c - 1) % 18) + 10.0);
        r.ey += longint'(ctr) * q10sin(20.0 * ((PHI0 + c - 1) % 18) + 10.0);
        for (int de = -1; de <= 1; de++)
          for (int dp = -1; dp <= 1; dp++) begin
            int v; bit t;
            if (e + de < 0 || e + de >= N_ETA) begin v = 0; t = 1; end
            else begin v = region[e+de][c+dp].et; t = region[e+de][c+dp].tau_ok; end
            sum += v; at &= t;
            if (de == 0 && dp == 0) continue;
            if ((de * 3 + dp) < 0) begin if (v >= ctr) mx = 0; end
            else if (v > ctr) mx = 0;
          end
        rank = sum / 4; if (rank == 0) rank = 1; if (rank > 63) rank = 63;
        o.rank = RANK_W'(rank); o.eta = ETA_W'(e); o.phi = PHI_W'((PHI0 + c - 1) % 18);
        if (!mx) cls = 3;
        else if (e < 4 || e >= 18) cls = 1;
        else if (at) cls = 2;
        else cls = 0;
        lc.push_back(cls == 0 ? o : obj_t'(0));
        lf.push_back(cls == 1 ? o : obj_t'(0));
        lt.push_back(cls == 2 ? o : obj_t'(0));
        for (int j = 0; j < NJC; j++) if (crit_ok(rank, e, cls, crit[j])) cnt[j]++;
      end
    end
    top4(lc, r.cen); top4(lf, r.fwd); top4(lt, r.tau);
    foreach (cnt[j]) r.jc[j] = cnt[j] > 31 ? 31 : cnt[j];
    return r;
  endfunction

  initial begin
    exp_t x;
    foreach (crit[j]) crit[j] = rand_crit();
    crit[0] = '{rank_min: 0, eta_min: 0, eta_max: 21, class_mask: 3'b111};
    foreach (region[e, c]) region[e][c] = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int cyc = 0; cyc < NEV + LAT; cyc++) begin
      @(negedge clk);
      if (cyc >= LAT) begin
        x = expq.pop_front();
        for (int k = 0; k < 4; k++) begin
          chk("cen", cen[k], x.cen[k]); chk("fwd", fwd[k], x.fwd[k]); chk("tau", tau[k], x.tau[k]);
          if (cen[k].rank != 0) n_cen++;
          if (fwd[k].rank != 0) n_fwd++;
          if (tau[k].rank != 0) n_tau++;
        end
        for (int j = 0; j < NJC; j++) chk("jcount", jcount[j], x.jc[j]);
        chk("et", et, x.et); chk("ex", ex, x.ex); chk("ey", ey, x.ey);
      end
      foreach (region[e, c]) begin
        int occ;
        occ = (cyc % 4 == 0) ? 60 : 15;    // dense events now and then: saturating counts
        region[e][c].et = ($urandom_range(99) < occ) ? ET_W'((cyc % 7 == 0) ? $urandom_range(3) : $urandom_range(1023)) : '0;
        region[e][c].tau_ok = ($urandom_range(99) < 85);
      end
      if (cyc % 11 == 0) foreach (region[e, c]) region[e][c].et = ET_W'(5); // flat: equal neighbours
      expq.push_back(model());
    end
    checks++;
    if (n_cen == 0 || n_fwd == 0 || n_tau == 0) failures++;
    $display("jets seen: central %0d forward %0d tau %0d", n_cen, n_fwd, n_tau);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
