// jet_cluster - one jet cluster Trigger Processor Module.
//
// Each module handles a strip of CORE_PHI phi columns (starting at phi
// index PHI0) over the full eta range. The Input Modules duplicate the
// neighbouring phi column on each side, so the module receives
// CORE_PHI + 2 columns and needs no data from other modules, as the
// document prescribes.
//
// Algorithm, per region of the strip (the "sum-and-compare" on each 3x3
// window of regions):
//   - sum the transverse energy of the 3x3 window around the region;
//   - the region seeds a jet if its own Et is non-zero and it is a local
//     maximum: strictly above the neighbours that come earlier in
//     (eta, phi) order and not below the later ones, so that equal
//     neighbouring deposits give one jet, not two;
//   - the jet is "forward" if its eta index lies in the outer FWD_ETA rows
//     at either end; otherwise it is a "tau" if all nine regions of the
//     window carry the tau-compatible pattern bit, and "central" if not;
//   - its rank is the window sum shifted right by RANK_SHIFT, saturated
//     to 6 bits and at least 1.
// The jets of each class are then reduced to the four highest (the
// document's "initial sort"), the jets are counted against the jet-count
// criteria (jet_counter), and the Et of the strip is summed, both as a
// scalar and weighted by cos/sin of each column's phi centre (Q10) to give
// the strip's Ex and Ey for the global energy sum.
// The document gives the window, the classes and the outputs; the seed
// rule, tau rule, rank scale, strip shape and latencies are this design's.
// Windows beyond the eta edges see zero-energy, tau-compatible regions.
//
// Timing: fully pipelined, one crossing per clock. Cycle 1 registers the
// regions, cycle 2 registers the jet candidates and column sums; sorted
// jets, counts and energies leave together LAT = 2 + SORT_LAT cycles after
// the input.
module jet_cluster
  import gct_pkg::*;
#(
  parameter int PHI0       = 0,
  parameter int CORE_PHI   = 2,
  parameter int NCRIT     = 12,
  parameter int RANK_SHIFT = 2,
  parameter int SORT_LAT   = 3
) (
  input  logic            clk,
  input  logic            rst,
  // region[e][c]: eta e, column c = phi PHI0-1+c (mod 18)
  input  region_t         region [N_ETA][CORE_PHI+2],
  input  jc_crit_t        crit   [NCRIT],
  output obj_t            cen    [4],
  output obj_t            fwd    [4],
  output obj_t            tau    [4],
  output logic [JC_W-1:0] jcount [NCRIT],
  output logic [15:0]     et,
  output logic signed [31:0] ex,  // Q10
  output logic signed [31:0] ey   // Q10
);
  localparam int NC = N_ETA * CORE_PHI;   // candidate windows
  localparam int SW = ET_W + 4;           // 3x3 sum width
  localparam int CSW = ET_W + 5;          // column sum width

  region_t   r_reg  [N_ETA][CORE_PHI+2];
  jet_cand_t cand_c [NC];
  jet_cand_t r_cand [NC];
  logic [CSW-1:0] col_c [CORE_PHI];
  logic [CSW-1:0] r_col [CORE_PHI];
  obj_t cl_cen [NC], cl_fwd [NC], cl_tau [NC];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int e = 0; e < N_ETA; e++)
        for (int c = 0; c < CORE_PHI + 2; c++) r_reg[e][c] <= '0;
    end else begin
      r_reg <= region;
    end
  end

  always_comb begin
    for (int c = 0; c < CORE_PHI; c++) begin
      logic [CSW-1:0] cs;
      cs = '0;
      for (int e = 0; e < N_ETA; e++) cs = cs + CSW'(r_reg[e][c+1].et);
      col_c[c] = cs;
    end
    for (int e = 0; e < N_ETA; e++) begin
      for (int c = 0; c < CORE_PHI; c++) begin
        logic [SW-1:0] sum;
        logic          is_max, all_tau, is_fwd;
        logic [ET_W-1:0] ctr;
        logic [SW-1:0] rk;
        jet_cand_t     jc;
        ctr = r_reg[e][c+1].et;
        sum = '0;
        is_max = (ctr != '0);
        all_tau = 1'b1;
        for (int de = -1; de <= 1; de++) begin
          for (int dp = -1; dp <= 1; dp++) begin
            region_t n;
            // zero Et and a set tau bit beyond the eta edges
            if (e + de < 0 || e + de >= N_ETA) begin
              n.et = '0;
              n.tau_ok = 1'b1;
            end else n = r_reg[e + de][c + 1 + dp];
            sum = sum + SW'(n.et);
            all_tau = all_tau & n.tau_ok;
            if (de < 0 || (de == 0 && dp < 0)) begin
              if (!(ctr > n.et)) is_max = 1'b0;
            end else if (de > 0 || dp > 0) begin
              if (ctr < n.et) is_max = 1'b0;
            end
          end
        end
        is_fwd = (e < FWD_ETA) || (e >= N_ETA - FWD_ETA);
        rk = sum >> RANK_SHIFT;
        jc.obj.eta = ETA_W'(e);
        jc.obj.phi = PHI_W'((PHI0 + c) % N_PHI);
        if (rk == '0)                   jc.obj.rank = RANK_W'(1);
        else if (rk > SW'((1 << RANK_W) - 1)) jc.obj.rank = '1;
        else                            jc.obj.rank = RANK_W'(rk);
        if (!is_max)      jc.cls = JC_NONE;
        else if (is_fwd)  jc.cls = JC_FORWARD;
        else if (all_tau) jc.cls = JC_TAU;
        else              jc.cls = JC_CENTRAL;
        if (!is_max) jc.obj = '0;
        cand_c[e * CORE_PHI + c] = jc;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NC; i++) r_cand[i] <= '0;
      for (int c = 0; c < CORE_PHI; c++) r_col[c] <= '0;
    end else begin
      r_cand <= cand_c;
      r_col  <= col_c;
    end
  end

  // Per-class candidate lists for the initial sort.
  always_comb begin
    for (int i = 0; i < NC; i++) begin
      cl_cen[i] = (r_cand[i].cls == JC_CENTRAL) ? r_cand[i].obj : '0;
      cl_fwd[i] = (r_cand[i].cls == JC_FORWARD) ? r_cand[i].obj : '0;
      cl_tau[i] = (r_cand[i].cls == JC_TAU)     ? r_cand[i].obj : '0;
    end
  end

  sort_top4 #(.N(NC), .LAT(SORT_LAT)) u_sort_cen (.clk(clk), .rst(rst), .in_obj(cl_cen), .out_obj(cen));
  sort_top4 #(.N(NC), .LAT(SORT_LAT)) u_sort_fwd (.clk(clk), .rst(rst), .in_obj(cl_fwd), .out_obj(fwd));
  sort_top4 #(.N(NC), .LAT(SORT_LAT)) u_sort_tau (.clk(clk), .rst(rst), .in_obj(cl_tau), .out_obj(tau));

  jet_counter #(.N(NC), .NCRIT(NCRIT), .LAT(SORT_LAT)) u_count (
    .clk(clk), .rst(rst), .cand(r_cand), .crit(crit), .count(jcount)
  );

  // Strip energy: scalar sum and phi-weighted components (one cycle of
  // logic, then delay to line up with the sorted jets).
  logic [15:0]        et_c;
  logic signed [31:0] ex_c, ey_c;
  always_comb begin
    et_c = '0;
    ex_c = '0;
    ey_c = '0;
    for (int c = 0; c < CORE_PHI; c++) begin
      int k;
      k = 2 * ((PHI0 + c) % N_PHI) + 1;   // column centre at 10*k degrees
      et_c = et_c + 16'(r_col[c]);
      ex_c = ex_c + $signed({1'b0, r_col[c]}) * 32'(cosd10(k));
      ey_c = ey_c + $signed({1'b0, r_col[c]}) * 32'(sind10(k));
    end
  end

  pipe_delay #(.W(16 + 64), .N(SORT_LAT)) u_edly (
    .clk(clk), .rst(rst), .d({et_c, ex_c, ey_c}), .q({et, ex, ey})
  );
endmodule
