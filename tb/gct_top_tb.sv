// gct_top_tb - end-to-end test of the Global Calorimeter Trigger at its
// default parameters (full 72-object sorts, 22 x 18 region grid, 3564-
// crossing orbit, 16-orbit luminosity period, 1024-word test buffer,
// 256-cycle Level-1 latency).
//
// Crossings enter every second clock, as at 80 MHz. Over 17 orbits the
// first crossings of each orbit carry random physics (e/gamma candidates
// with many equal ranks, sparse calorimeter deposits producing central,
// forward and tau jets, a few dense events saturating the jet counts); the
// rest are empty. For each crossing the complete Global Trigger word is
// worked out here from a behavioural model (sorts by repeated maximum,
// 3x3 jets over the whole grid with phi wrap-round, per-module count
// saturation, real-valued cos/sin weights) and compared with gt_out
// exactly 15 cycles later (14 cycles of algorithm, one of test buffer).
// Then:
//   - Level-1 Accepts, random and in bursts against a stalled reader,
//     must deliver DAQ records holding the GT word and the Input Module
//     link data of the right cycle, or count overflows;
//   - after the first luminosity period the per-bunch sums of two jet
//     counts are read back and compared;
//   - the test buffer captures 1024 GT words, which are read back, and
//     then plays them back onto gt_out;
//   - the Input Module path is set up automatically from test patterns
//     (phase training, marker alignment) on eight cables with random
//     phases and skews, and its remapped links are checked.
// Each mechanism is counted; one that never happens is a failure.
module gct_top_tb;
  import gct_pkg::*;
  import sort_ref_pkg::*;
  import jet_ref_pkg::*;

  localparam int LAT = 15, NBX = 3564, ORBITS = 17, PHYS = 80, L1A_LAT = 256;

  logic clk = 0, rst = 1;
  logic bx_valid = 0;
  logic [11:0] bx = '0;
  obj_t eg_in [72], iso_in [72];
  region_t region [N_ETA][N_PHI];
  jc_crit_t crit [NUM_JC];
  logic [1:0] cap_mode = 0;
  logic cap_start = 0, cap_busy, cap_we = 0;
  logic [9:0] cap_addr = '0;
  gt_word_t cap_wdata = '0, cap_rdata, gt_out;
  logic l1a = 0, daq_valid, daq_ready = 1, daq_ctrl;
  logic [31:0] daq_word;
  logic [15:0] daq_overflow, daq_im_overflow, lumi_period;
  logic [11:0] lumi_rd_bx = '0;
  logic lumi_rd_ch = 0;
  logic [23:0] lumi_rd_data;
  logic [3:0] im_samp [8][28];
  logic im_train_phase = 0, im_train_delay = 0, im_cfg_we = 0, im_map_we = 0;
  logic [2:0] im_cfg_cable = '0;
  logic [4:0] im_cfg_bit = '0;
  logic [1:0] im_cfg_phase = '0;
  logic [3:0] im_cfg_delay = '0;
  logic [7:0] im_align_done, im_align_err;
  logic [2:0] im_rd_cable = '0;
  logic [1:0] im_rd_phase [28];
  logic [3:0] im_rd_delay [28];
  logic [8:0] im_map_idx = '0;
  logic [7:0] im_map_src = '0;
  logic [27:0] im_link [12];

  gct_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;                // rising edges so far
  always @(posedge clk) cycle <= cycle + 1;
  gt_word_t exp_at [int];       // expected gt_out by cycle
  gt_word_t seen_at [int];      // observed gt_out by cycle
  logic [GT_W-1:0] seen_im [int];  // observed Input Module links by cycle
  longint lumi_exp [NBX][2];
  // mechanism counters
  int n_tie = 0, n_cen = 0, n_fwd = 0, n_tau = 0, n_sat = 0, n_met = 0;
  int n_daq = 0, n_ovf = 0, n_stall = 0, n_lumi = 0, n_cap = 0, n_play = 0;
  int n_im_phase = 0, n_im_align = 0, n_im_dup = 0;

  initial begin
    #(64'd20_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void chk(input string what, input logic [GT_W-1:0] got, input logic [GT_W-1:0] want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 8) $display("cycle %0d %s:\n got  %h\n want %h", cycle, what, got, want);
    end
  endfunction

  // ------------------------------------------------------------ model
  gt_word_t empty_word;

  function automatic gt_word_t model();
    gt_word_t g;
    obj_q_t l;
    obj_t r [4];
    obj_q_t mc, mf, mt;
    int tot [NUM_JC];
    longint et, sx, sy, mx, my, m;
    real ang, fr;
    l = {}; foreach (eg_in[i]) l.push_back(eg_in[i]);
    top4(l, r); foreach (r[k]) g.eg[k] = r[k];
    l = {}; foreach (iso_in[i]) l.push_back(iso_in[i]);
    top4(l, r); foreach (r[k]) g.iso_eg[k] = r[k];
    foreach (tot[j]) tot[j] = 0;
    et = 0; sx = 0; sy = 0;
    for (int mdl = 0; mdl < 9; mdl++) begin
      obj_q_t lc, lf, lt;
      int cnt [NUM_JC];
      foreach (cnt[j]) cnt[j] = 0;
      for (int e = 0; e < N_ETA; e++)
        for (int c = 0; c < 2; c++) begin
          int p, ctr, sum, cls, rank;
          bit mxm, at;
          obj_t o;
          p = 2 * mdl + c;
          ctr = region[e][p].et;
          et += ctr;
          sx += longint'(ctr) * q10cos(20.0 * p + 10.0);
          sy += longint'(ctr) * q10sin(20.0 * p + 10.0);
          sum = 0; mxm = (ctr > 0); at = 1;
          for (int de = -1; de <= 1; de++)
            for (int dp = -1; dp <= 1; dp++) begin
              int v; bit t;
              if (e + de < 0 || e + de >= N_ETA) begin v = 0; t = 1; end
              else begin v = region[e+de][(p + dp + 18) % 18].et; t = region[e+de][(p + dp + 18) % 18].tau_ok; end
              sum += v; at &= t;
              if (de == 0 && dp == 0) continue;
              if (de * 3 + dp < 0) begin if (v >= ctr) mxm = 0; end
              else if (v > ctr) mxm = 0;
            end
          rank = sum / 4; if (rank < 1) rank = 1; if (rank > 63) rank = 63;
          o.rank = RANK_W'(rank); o.eta = ETA_W'(e); o.phi = PHI_W'(p);
          cls = !mxm ? 3 : (e < 4 || e >= 18) ? 1 : at ? 2 : 0;
          lc.push_back(cls == 0 ? o : obj_t'(0));
          lf.push_back(cls == 1 ? o : obj_t'(0));
          lt.push_back(cls == 2 ? o : obj_t'(0));
          for (int j = 0; j < NUM_JC; j++) if (crit_ok(rank, e, cls, crit[j])) cnt[j]++;
        end
      top4(lc, r); foreach (r[k]) mc.push_back(r[k]);
      top4(lf, r); foreach (r[k]) mf.push_back(r[k]);
      top4(lt, r); foreach (r[k]) mt.push_back(r[k]);
      foreach (cnt[j]) tot[j] += (cnt[j] > 31) ? 31 : cnt[j];
    end
    top4(mc, r); foreach (r[k]) g.cen_jet[k] = r[k];
    top4(mf, r); foreach (r[k]) g.fwd_jet[k] = r[k];
    top4(mt, r); foreach (r[k]) g.tau_jet[k] = r[k];
    foreach (tot[j]) g.jcount[j] = JC_W'((tot[j] > 31) ? 31 : tot[j]);
    g.et_tot = 20'(et);
    mx = -((sx >= 0) ? sx / 1024 : -((-sx + 1023) / 1024));
    my = -((sy >= 0) ? sy / 1024 : -((-sy + 1023) / 1024));
    m = longint'($sqrt(real'(mx * mx + my * my)));
    while (m * m > mx * mx + my * my) m--;
    while ((m + 1) * (m + 1) <= mx * mx + my * my) m++;
    g.met = 21'(m);
    if (mx == 0 && my == 0) g.met_phi = '0;
    else begin
      ang = $atan2(real'(my), real'(mx)) * 180.0 / PI;
      if (ang < 0) ang += 360.0;
      g.met_phi = 6'(int'($floor(ang / 10.0)) % 36);
      fr = ang - 10.0 * $floor(ang / 10.0);
      if (fr < 0.3 || fr > 9.7) g.met_phi = '1;   // marker: sector not checked
    end
    return g;
  endfunction

  function automatic logic [GT_W-1:0] masked(input gt_word_t got, input gt_word_t want);
    if (want.met_phi == '1) got.met_phi = '1;
    return got;
  endfunction

  task automatic random_event(input int kind);
    foreach (eg_in[i]) begin
      eg_in[i]  = rand_obj(kind == 1 ? 5 : 63);
      iso_in[i] = rand_obj(kind == 1 ? 5 : 63);
    end
    foreach (region[e, p]) begin
      int occ;
      occ = (kind == 2) ? 70 : 12;
      region[e][p].et = ($urandom_range(99) < occ) ? ET_W'($urandom_range(kind == 2 ? 3 : 1023)) : '0;
      region[e][p].tau_ok = ($urandom_range(99) < 85);
    end
  endtask

  task automatic empty_event();
    foreach (eg_in[i]) begin eg_in[i] = '0; iso_in[i] = '0; end
    foreach (region[e, p]) begin region[e][p].et = '0; region[e][p].tau_ok = 1'b1; end
  endtask

  // ------------------------------------------------------------ monitors
  // GT output check and record, every cycle at the negative edge.
  bit check_gt = 1;
  always @(negedge clk) if (!rst) begin
    seen_at[cycle] = gt_out;
    seen_im[cycle] = '0;
    for (int l = 0; l < 12; l++) seen_im[cycle][28*l +: 28] = im_link[l];
    if (check_gt && exp_at.exists(cycle)) begin
      gt_word_t w;
      w = exp_at[cycle];
      chk("gt_out", masked(gt_out, w), w);
      if (w.eg[0].rank == w.eg[1].rank && w.eg[0].rank != 0) n_tie++;
      if (w.cen_jet[0].rank != 0) n_cen++;
      if (w.fwd_jet[0].rank != 0) n_fwd++;
      if (w.tau_jet[0].rank != 0) n_tau++;
      if (w.jcount[0] == 5'd31) n_sat++;
      if (w.met != 0) n_met++;
      exp_at.delete(cycle);
    end
  end

  // DAQ readout: every word must be the GT word of L1A_LAT cycles before
  // its accept.
  int daq_exp [$];
  bit daq_full;
  always @(negedge clk) if (!rst) begin
    if (daq_valid && !daq_ready) n_stall++;
  end

  // ------------------------------------------------------------ Input Module
  int im_ph [8][28], im_sk [8][28];
  logic [223:0] im_src [int];
  int im_t = 0;

  function automatic logic [223:0] im_word(input int n);
    return im_src.exists(n) ? im_src[n] : '0;
  endfunction

  always @(posedge clk) begin
    #2;
    im_t++;
    for (int c = 0; c < 8; c++)
      for (int b = 0; b < 28; b++)
        for (int j = 0; j < 4; j++)
          im_samp[c][b][j] = (j == im_ph[c][b]) ? 1'($urandom)
                           : im_word(im_t - im_sk[c][b] - ((j < im_ph[c][b]) ? 1 : 0))[28 * c + b];
  end

  task automatic im_test();
    int P, M, L;
    int map_src [336];
    int used [224];
    foreach (used[i]) used[i] = 0;
    // program the map: link bits take inputs with duplication
    for (int o = 0; o < 336; o++) begin
      map_src[o] = (o * 5) % 224;
      used[map_src[o]]++;
      @(negedge clk);
      im_map_we = 1; im_map_idx = 9'(o); im_map_src = 8'(map_src[o]);
    end
    @(negedge clk);
    im_map_we = 0;
    foreach (used[i]) if (used[i] > 1) n_im_dup++;
    for (int n = im_t - 10; n < im_t + 60; n++) im_src[n] = (n % 2 != 0) ? '1 : '0;
    // let the pattern reach every skewed bit before training starts
    repeat (8) @(negedge clk);
    im_train_phase = 1;
    repeat (40) @(negedge clk);
    im_train_phase = 0;
    n_im_phase++;
    for (int n = im_t - 10; n < im_t + 400; n++) im_src[n] = '0;
    repeat (4) @(negedge clk);
    P = im_t;
    M = P + 3;
    im_src[M] = '1;
    im_train_delay = 1;
    @(negedge clk);
    im_train_delay = 0;
    for (int n = M + 1; n < M + 140000; n++) im_src[n] = {7{$urandom}};
    while (im_align_done != 8'hFF) @(negedge clk);
    checks++;
    if (im_align_err != 0) begin failures++; $display("IM alignment error %b", im_align_err); end
    else n_im_align++;
    // Read back the chosen phase and delay of every bit: the phase is the
    // sample opposite the noisy one, and skew + delay is the same for all.
    for (int c = 0; c < 8; c++) begin
      im_rd_cable = 3'(c);
      #1;
      for (int b = 0; b < 28; b++) begin
        int p, tot;
        p = (im_ph[c][b] + 2) % 4;
        tot = im_sk[c][b] + ((p < im_ph[c][b]) ? 1 : 0) + int'(im_rd_delay[b]);
        checks += 2;
        if (int'(im_rd_phase[b]) != p || tot != (P + 16 - M)) begin
          failures++;
          if (failures < 8) $display("IM cable %0d bit %0d: phase %0d delay %0d, want phase %0d total %0d got %0d",
                                     c, b, im_rd_phase[b], im_rd_delay[b], p, P + 16 - M, tot);
        end
      end
    end
    // synchronised word n appears at cycle n + L, the link one cycle later
    L = P + 16 + 1 - M;
    repeat (3) @(negedge clk);
    for (int i = 0; i < 200; i++) begin
      logic [223:0] w;
      w = im_word(im_t - L - 1);
      for (int o = 0; o < 336; o++) begin
        checks++;
        if (im_link[o / 28][o % 28] != w[map_src[o]]) begin
          failures++;
          if (failures < 8) $display("IM link bit %0d wrong at %0d", o, im_t);
        end
      end
      @(negedge clk);
    end
  endtask

  // ------------------------------------------------------------ main
  initial begin
    foreach (im_ph[c, b]) begin im_ph[c][b] = $urandom_range(3); im_sk[c][b] = $urandom_range(5); end
    foreach (lumi_exp[b, c]) lumi_exp[b][c] = 0;
    crit[0] = '{rank_min: 1, eta_min: 0, eta_max: 21, class_mask: 3'b111};
    crit[1] = '{rank_min: 20, eta_min: 7, eta_max: 14, class_mask: 3'b101};  // high-Et, low-eta jets
    for (int j = 2; j < NUM_JC; j++) crit[j] = rand_crit();
    empty_event();
    empty_word = model();
    repeat (3) @(negedge clk);
    rst = 0;

    im_test();

    // physics over ORBITS orbits, one crossing per two clocks
    fork
      begin
        for (int o = 0; o < ORBITS; o++)
          for (int b = 0; b < NBX; b++) begin
            gt_word_t w;
            if (b < PHYS) random_event((b % 10 == 3) ? 1 : (b % 23 == 7) ? 2 : 0);
            else if (b == PHYS) empty_event();
            w = (b < PHYS) ? model() : empty_word;
            bx_valid = 1; bx = 12'(b);
            exp_at[cycle + LAT] = w;
            exp_at[cycle + LAT + 1] = w;
            if (o < 16) begin
              lumi_exp[b][0] += w.jcount[0];
              lumi_exp[b][1] += w.jcount[1];
            end
            @(negedge clk);
            bx_valid = 0;
            @(negedge clk);
          end
        empty_event();
        bx_valid = 0;
      end
      begin
        // Level-1 Accepts: sparse, then a burst against a stalled reader.
        // Records: header, 14 GT words, 14 Input Module words, trailer.
        int fifo_n, w, rec;
        logic [GT_W-1:0] frag;
        fifo_n = 0; w = 0; rec = 0;
        wait (cycle > 2000);
        for (int i = 0; i < 4000; i++) begin
          bit full_now, pop_now;
          daq_ready = (i > 1500 && i < 1900) ? 1'b0 : ($urandom_range(3) != 0);
          l1a = ((i > 1500 && i < 1540) || (i < 3000 && $urandom_range(59) == 0));
          full_now = (fifo_n == 16);
          #1;
          pop_now = dut.daq_pop;
          if (daq_valid && daq_ready) begin
            int c;
            c = daq_exp[0];
            if (w == 0) chk("daq header", 32'(daq_word), {8'hA0, 24'(rec)});
            else if (w == 29) chk("daq trailer", 32'(daq_word), {8'hF0, 8'd2, 16'd30});
            else begin
              frag = (w <= 14) ? seen_at[c] : seen_im[c];
              chk("daq payload", 32'(daq_word), 32'(({5'b0, frag}) >> (32 * ((w - 1) % 14))));
            end
            w++;
            if (w == 30) begin w = 0; rec++; n_daq++; void'(daq_exp.pop_front()); end
          end
          if (l1a) begin
            if (!full_now) begin daq_exp.push_back(cycle - L1A_LAT); fifo_n++; end
            else n_ovf++;
          end
          if (pop_now) fifo_n--;
          @(negedge clk);
        end
        l1a = 0;
        daq_ready = 1;
        checks++;
        if (daq_overflow != 16'(n_ovf) || daq_im_overflow != 16'(n_ovf)) begin
          failures++;
          $display("overflow %0d/%0d want %0d", daq_overflow, daq_im_overflow, n_ovf);
        end
        checks++;
        if (daq_exp.size() != 0) begin failures++; $display("%0d records not read", daq_exp.size()); end
      end
      begin
        // luminosity readout once the first period has finished
        wait (lumi_period == 16'd1);
        repeat (10) @(negedge clk);
        for (int b = 0; b < PHYS + 20; b++)
          for (int c = 0; c < 2; c++) begin
            lumi_rd_bx = 12'(b); lumi_rd_ch = 1'(c);
            @(negedge clk);
            checks++;
            if (lumi_rd_data != 24'(lumi_exp[b][c])) begin
              failures++;
              if (failures < 8) $display("lumi bx %0d ch %0d: %0d want %0d", b, c, lumi_rd_data, lumi_exp[b][c]);
            end
            if (lumi_exp[b][c] != 0) n_lumi++;
          end
      end
    join

    // test buffer: capture 1024 GT words of physics, read back, play back
    begin
      int c0;
      for (int i = 0; i < 600; i++) begin
        gt_word_t w;
        random_event(i % 10 == 3 ? 1 : 0);
        w = model();
        exp_at[cycle + LAT] = w;
        if (i == 20) begin cap_mode = 1; cap_start = 1; c0 = cycle + 2; end
        else cap_start = 0;
        @(negedge clk);
      end
      while (cap_busy) begin @(negedge clk); end
      n_cap++;
      cap_mode = 0;
      for (int a = 0; a < 1024; a += 7) begin
        cap_addr = 10'(a);
        @(negedge clk);
        chk("capture", cap_rdata, seen_at[c0 + a]);
      end
      check_gt = 0;
      cap_mode = 2; cap_start = 1;
      @(negedge clk);
      cap_start = 0;
      @(negedge clk);
      for (int a = 0; a < 1500; a++) begin
        chk("playback", gt_out, seen_at[c0 + (a % 1024)]);
        n_play++;
        @(negedge clk);
      end
      cap_mode = 0;
    end

    begin
      string names [15] = '{"equal-rank sort", "central jet", "forward jet", "tau jet", "count saturation",
                            "missing Et", "DAQ readout", "DAQ overflow", "DAQ reader stall", "luminosity sums",
                            "capture", "playback", "IM phase training", "IM alignment", "IM duplication"};
      int cnts [15];
      cnts = '{n_tie, n_cen, n_fwd, n_tau, n_sat, n_met, n_daq, n_ovf, n_stall, n_lumi,
                        n_cap, n_play, n_im_phase, n_im_align, n_im_dup};
      for (int i = 0; i < 15; i++) begin
        $display("%-18s %0d", names[i], cnts[i]);
        checks++;
        if (cnts[i] == 0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
