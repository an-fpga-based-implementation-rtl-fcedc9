// gct_top - the Global Calorimeter Trigger.
//
// For every bunch crossing the GCT reduces the Regional Calorimeter
// Trigger output to what the Global Trigger needs:
//   - e/gamma and isolated e/gamma: 72 candidates each, reduced to the
//     four of highest rank by one sort processor (object_sort_tpm) each;
//   - jets: nine jet cluster modules (jet_cluster), each covering two phi
//     columns of the 22 x 18 region grid plus one duplicated neighbour
//     column on either side, find 3x3-window jets and classify them as
//     central, forward or tau; each class is reduced to four per module
//     and then to the four best overall by a 36 -> 4 sort (sort_top4);
//   - energy: the modules' strip sums feed the global energy sum
//     (energy_sum) for total and missing transverse energy;
//   - jet counts: the modules' per-criterion counts are added here,
//     saturating at 31.
// All results of one crossing are lined up to leave together OUT_LAT
// cycles after the crossing enters (default 14, the sort latency the
// document gives, which is the longest path). They then pass through a
// capture/playback buffer (test data can replace the GT output, or the
// output can be recorded), go to the Global Trigger as gt_out, and feed the
// DAQ path and the luminosity monitor (per-bunch sums of two chosen jet
// counts). For each Level-1 Accept the DAQ path reads out the GT word and
// the Input Module's link data, both from L1A_LAT cycles before the
// accept, as one record of 32-bit words (daq_concentrator).
//
// Alongside, one Input Module path is brought out on its own ports: eight
// ECL cables, each synchronised by im_sync, remapped onto twelve 28-bit
// serial links by im_output_map; the phase and delay each bit settled on
// can be read back one cable at a time. The coding of trigger objects on the
// cables is not part of this design, so the algorithm inputs (eg_in,
// iso_in, region) are taken already decoded.
//
// Serial links, TTCRx, control CPU, control FPGA bus and the SLINK driver
// are outside; their signals appear here as ports. One crossing can enter per clock;
// at 80 MHz crossings arrive every second clock (bx_valid).
module gct_top
  import gct_pkg::*;
#(
  parameter int OUT_LAT    = 14,
  parameter int JSORT_LAT  = 6,
  parameter int CAP_DEPTH  = 1024,
  parameter int L1A_LAT    = 256,
  parameter int DAQ_FIFO   = 16,
  parameter int NBX        = 3564,
  parameter int LUMI_ORBITS = 16,
  parameter int LUMI_JC0   = 0,
  parameter int LUMI_JC1   = 1
) (
  input  logic            clk,
  input  logic            rst,
  // ---- from the Regional Calorimeter Trigger (decoded)
  input  logic            bx_valid,
  input  logic [11:0]     bx,
  input  obj_t            eg_in  [72],
  input  obj_t            iso_in [72],
  input  region_t         region [N_ETA][N_PHI],
  // ---- configuration (control processor)
  input  jc_crit_t        crit   [NUM_JC],
  input  logic [1:0]      cap_mode,
  input  logic            cap_start,
  output logic            cap_busy,
  input  logic [$clog2(CAP_DEPTH)-1:0] cap_addr,
  input  logic            cap_we,
  input  gt_word_t        cap_wdata,
  output gt_word_t        cap_rdata,
  // ---- to the Global Trigger
  output gt_word_t        gt_out,
  // ---- DAQ
  input  logic            l1a,
  output logic [31:0]     daq_word,
  output logic            daq_ctrl,
  output logic            daq_valid,
  input  logic            daq_ready,
  output logic [15:0]     daq_overflow,
  output logic [15:0]     daq_im_overflow,
  // ---- luminosity readout
  input  logic [11:0]     lumi_rd_bx,
  input  logic            lumi_rd_ch,
  output logic [23:0]     lumi_rd_data,
  output logic [15:0]     lumi_period,
  // ---- one Input Module
  input  logic [3:0]      im_samp [8][28],
  input  logic            im_train_phase,
  input  logic            im_train_delay,
  input  logic            im_cfg_we,
  input  logic [2:0]      im_cfg_cable,
  input  logic [4:0]      im_cfg_bit,
  input  logic [1:0]      im_cfg_phase,
  input  logic [3:0]      im_cfg_delay,
  output logic [7:0]      im_align_done,
  output logic [7:0]      im_align_err,
  input  logic [2:0]      im_rd_cable,
  output logic [1:0]      im_rd_phase [28],
  output logic [3:0]      im_rd_delay [28],
  input  logic            im_map_we,
  input  logic [8:0]      im_map_idx,
  input  logic [7:0]      im_map_src,
  output logic [27:0]     im_link [12]
);
  localparam int NJ = 9;                       // jet cluster modules
  localparam int JC_LAT = 2 + 3;               // jet_cluster latency
  localparam int ES_LAT = 5;                   // energy_sum latency

  // ------------------------------------------------------------ e/gamma
  obj_t eg_srt [4], iso_srt [4];
  object_sort_tpm u_eg_sort  (.clk(clk), .rst(rst), .in_obj(eg_in),  .out_obj(eg_srt));
  object_sort_tpm u_iso_sort (.clk(clk), .rst(rst), .in_obj(iso_in), .out_obj(iso_srt));

  // ------------------------------------------------------------ jets
  obj_t            jc_cen [NJ*4], jc_fwd [NJ*4], jc_tau [NJ*4];
  logic [JC_W-1:0] jc_cnt [NJ][NUM_JC];
  logic [15:0]     jc_et  [NJ];
  logic signed [31:0] jc_ex [NJ], jc_ey [NJ];

  for (genvar m = 0; m < NJ; m++) begin : g_jet
    region_t strip [N_ETA][4];
    // Data duplication of the Input Modules: columns 2m-1 .. 2m+2 (mod 18).
    always_comb
      for (int e = 0; e < N_ETA; e++)
        for (int c = 0; c < 4; c++)
          strip[e][c] = region[e][(2 * m - 1 + c + N_PHI) % N_PHI];

    jet_cluster #(.PHI0(2 * m), .CORE_PHI(2), .NCRIT(NUM_JC)) u_cluster (
      .clk(clk), .rst(rst), .region(strip), .crit(crit),
      .cen(jc_cen[4*m +: 4]), .fwd(jc_fwd[4*m +: 4]), .tau(jc_tau[4*m +: 4]),
      .jcount(jc_cnt[m]), .et(jc_et[m]), .ex(jc_ex[m]), .ey(jc_ey[m])
    );
  end

  obj_t cen_srt [4], fwd_srt [4], tau_srt [4];
  sort_top4 #(.N(NJ*4), .LAT(JSORT_LAT)) u_cen_sort (.clk(clk), .rst(rst), .in_obj(jc_cen), .out_obj(cen_srt));
  sort_top4 #(.N(NJ*4), .LAT(JSORT_LAT)) u_fwd_sort (.clk(clk), .rst(rst), .in_obj(jc_fwd), .out_obj(fwd_srt));
  sort_top4 #(.N(NJ*4), .LAT(JSORT_LAT)) u_tau_sort (.clk(clk), .rst(rst), .in_obj(jc_tau), .out_obj(tau_srt));

  // ------------------------------------------------------------ energy
  logic [19:0] et_tot;
  logic [20:0] met;
  logic [5:0]  met_phi;
  energy_sum #(.NSRC(NJ)) u_esum (
    .clk(clk), .rst(rst), .et_in(jc_et), .ex_in(jc_ex), .ey_in(jc_ey),
    .et_tot(et_tot), .met(met), .met_phi(met_phi)
  );

  // ------------------------------------------------------------ jet counts
  logic [NUM_JC-1:0][JC_W-1:0] jc_tot;
  always_ff @(posedge clk) begin
    if (rst) jc_tot <= '0;
    else
      for (int j = 0; j < NUM_JC; j++) begin
        int s;
        s = 0;
        for (int m = 0; m < NJ; m++) s += int'(jc_cnt[m][j]);
        jc_tot[j] <= (s > (1 << JC_W) - 1) ? '1 : JC_W'(s);
      end
  end

  // ------------------------------------------------------------ alignment
  gt_word_t gt_c;
  logic [OBJ_W*4-1:0] eg_d, iso_d, cen_d, fwd_d, tau_d;
  logic [46:0]        es_d;
  logic [NUM_JC*JC_W-1:0] jcnt_d;

  pipe_delay #(.W(OBJ_W*4), .N(OUT_LAT - 14)) u_d_eg (.clk(clk), .rst(rst),
    .d({eg_srt[3], eg_srt[2], eg_srt[1], eg_srt[0]}), .q(eg_d));
  pipe_delay #(.W(OBJ_W*4), .N(OUT_LAT - 14)) u_d_iso (.clk(clk), .rst(rst),
    .d({iso_srt[3], iso_srt[2], iso_srt[1], iso_srt[0]}), .q(iso_d));
  pipe_delay #(.W(OBJ_W*4), .N(OUT_LAT - JC_LAT - JSORT_LAT)) u_d_cen (.clk(clk), .rst(rst),
    .d({cen_srt[3], cen_srt[2], cen_srt[1], cen_srt[0]}), .q(cen_d));
  pipe_delay #(.W(OBJ_W*4), .N(OUT_LAT - JC_LAT - JSORT_LAT)) u_d_fwd (.clk(clk), .rst(rst),
    .d({fwd_srt[3], fwd_srt[2], fwd_srt[1], fwd_srt[0]}), .q(fwd_d));
  pipe_delay #(.W(OBJ_W*4), .N(OUT_LAT - JC_LAT - JSORT_LAT)) u_d_tau (.clk(clk), .rst(rst),
    .d({tau_srt[3], tau_srt[2], tau_srt[1], tau_srt[0]}), .q(tau_d));
  pipe_delay #(.W(47), .N(OUT_LAT - JC_LAT - ES_LAT)) u_d_es (.clk(clk), .rst(rst),
    .d({et_tot, met, met_phi}), .q(es_d));
  pipe_delay #(.W(NUM_JC*JC_W), .N(OUT_LAT - JC_LAT - 1)) u_d_jc (.clk(clk), .rst(rst),
    .d(jc_tot), .q(jcnt_d));

  always_comb begin
    gt_c.eg      = eg_d;
    gt_c.iso_eg  = iso_d;
    gt_c.cen_jet = cen_d;
    gt_c.fwd_jet = fwd_d;
    gt_c.tau_jet = tau_d;
    {gt_c.et_tot, gt_c.met, gt_c.met_phi} = es_d;
    gt_c.jcount  = jcnt_d;
  end

  // Crossing number and valid flag travel with the data.
  logic        v_d;
  logic [11:0] bx_d;
  pipe_delay #(.W(13), .N(OUT_LAT)) u_d_bx (.clk(clk), .rst(rst), .d({bx_valid, bx}), .q({v_d, bx_d}));

  // ------------------------------------------------------------ test buffer
  logic [GT_W-1:0] cap_out, cap_rd;
  capture_buffer #(.W(GT_W), .DEPTH(CAP_DEPTH)) u_capture (
    .clk(clk), .rst(rst), .mode(cap_mode), .start(cap_start),
    .din(gt_c), .dout(cap_out), .busy(cap_busy),
    .ctl_addr(cap_addr), .ctl_we(cap_we), .ctl_wdata(cap_wdata), .ctl_rdata(cap_rd)
  );
  assign gt_out    = gt_word_t'(cap_out);
  assign cap_rdata = gt_word_t'(cap_rd);

  // bx/valid matched to the buffer's register stage
  logic        v_o;
  logic [11:0] bx_o;
  always_ff @(posedge clk) begin
    if (rst) begin v_o <= 1'b0; bx_o <= '0; end
    else     begin v_o <= v_d;  bx_o <= bx_d; end
  end

  // ------------------------------------------------------------ DAQ
  // Two sources are read out for each Level-1 Accept: the GT word and the
  // Input Module link data, each held for L1A_LAT cycles and queued in its
  // own derandomiser; the concentrator packs both into one record.
  logic [GT_W-1:0] daq_gt, daq_im, im_flat;
  logic            daq_gt_v, daq_im_v, daq_pop;

  always_comb begin
    im_flat = '0;
    for (int l = 0; l < 12; l++) im_flat[28*l +: 28] = im_link[l];
  end

  daq_derandomiser #(.W(GT_W), .L1A_LAT(L1A_LAT), .FIFO_DEPTH(DAQ_FIFO)) u_daq (
    .clk(clk), .rst(rst), .din(gt_out), .l1a(l1a),
    .out_data(daq_gt), .out_valid(daq_gt_v), .out_ready(daq_pop), .overflow(daq_overflow)
  );
  daq_derandomiser #(.W(GT_W), .L1A_LAT(L1A_LAT), .FIFO_DEPTH(DAQ_FIFO)) u_daq_im (
    .clk(clk), .rst(rst), .din(im_flat), .l1a(l1a),
    .out_data(daq_im), .out_valid(daq_im_v), .out_ready(daq_pop), .overflow(daq_im_overflow)
  );
  daq_concentrator #(.NSRC(2), .W(GT_W)) u_conc (
    .clk(clk), .rst(rst),
    .src_data('{daq_gt, daq_im}), .src_valid('{daq_gt_v, daq_im_v}), .src_pop(daq_pop),
    .out_data(daq_word), .out_ctrl(daq_ctrl), .out_valid(daq_valid), .out_ready(daq_ready)
  );

  // ------------------------------------------------------------ luminosity
  logic [JC_W-1:0] lumi_cnt [2];
  assign lumi_cnt[0] = gt_out.jcount[LUMI_JC0];
  assign lumi_cnt[1] = gt_out.jcount[LUMI_JC1];
  lumi_monitor #(.NBX(NBX), .NCH(2), .CNT_W(JC_W), .ACC_W(24), .INTEG_ORBITS(LUMI_ORBITS)) u_lumi (
    .clk(clk), .rst(rst), .in_valid(v_o), .bx(bx_o),
    .cnt(lumi_cnt), .rd_bx(lumi_rd_bx), .rd_ch(lumi_rd_ch),
    .rd_data(lumi_rd_data), .period(lumi_period)
  );

  // ------------------------------------------------------------ Input Module
  logic [8*28-1:0] im_bits;
  logic [1:0]      im_phase [8][28];
  logic [3:0]      im_delay [8][28];
  for (genvar c = 0; c < 8; c++) begin : g_cable
    im_sync #(.W(28), .DMAX(16)) u_sync (
      .clk(clk), .rst(rst), .samp(im_samp[c]), .dout(im_bits[28*c +: 28]),
      .cfg_we(im_cfg_we && im_cfg_cable == 3'(c)), .cfg_bit(im_cfg_bit),
      .cfg_phase(im_cfg_phase), .cfg_delay(im_cfg_delay),
      .train_phase(im_train_phase), .train_delay(im_train_delay),
      .align_done(im_align_done[c]), .align_err(im_align_err[c]),
      .phase(im_phase[c]), .delay(im_delay[c])
    );
  end

  im_output_map #(.NIN(8*28), .NLINK(12), .LINK_W(28)) u_map (
    .clk(clk), .rst(rst), .din(im_bits), .link(im_link),
    .map_we(im_map_we), .map_idx(im_map_idx), .map_src(im_map_src)
  );

  // Phase and delay chosen for each bit of one cable, for the control CPU.
  assign im_rd_phase = im_phase[im_rd_cable];
  assign im_rd_delay = im_delay[im_rd_cable];
endmodule
