// jet_counter - jet multiplicity counts for one set of jet candidates.
//
// For each of NCRIT programmable criteria (minimum rank, eta window and a
// mask of jet classes, see gct_pkg::jc_crit_t) counts how many of the N
// candidates qualify. Counts saturate at 2**JC_W - 1. The document says
// only that the GCT counts jet and tau objects against "several sets of
// rank and position criteria"; the number of criteria (12), the count width
// and the criterion format are this design's choices.
//
// Timing: candidates and criteria sampled every cycle, counts valid LAT
// cycles later (one cycle of logic, then plain register stages).
module jet_counter
  import gct_pkg::*;
#(
  parameter int N      = 44,
  parameter int NCRIT = 12,
  parameter int LAT    = 1
) (
  input  logic            clk,
  input  logic            rst,
  input  jet_cand_t       cand  [N],
  input  jc_crit_t        crit  [NCRIT],
  output logic [JC_W-1:0] count [NCRIT]
);
  localparam int CW = $clog2(N + 1);
  localparam logic [JC_W-1:0] SAT = '1;

  logic [JC_W-1:0] cnt_c [NCRIT];

  function automatic logic qualifies(input jet_cand_t c, input jc_crit_t k);
    logic class_ok;
    unique case (c.cls)
      JC_CENTRAL: class_ok = k.class_mask[0];
      JC_FORWARD: class_ok = k.class_mask[1];
      JC_TAU:     class_ok = k.class_mask[2];
      default:    class_ok = 1'b0;
    endcase
    return class_ok && (c.obj.rank != '0) && (c.obj.rank >= k.rank_min) &&
           (c.obj.eta >= k.eta_min) && (c.obj.eta <= k.eta_max);
  endfunction

  always_comb begin
    for (int j = 0; j < NCRIT; j++) begin
      logic [CW-1:0] n;
      n = '0;
      for (int i = 0; i < N; i++)
        if (qualifies(cand[i], crit[j])) n = n + 1'b1;
      cnt_c[j] = (int'(n) > int'(SAT)) ? SAT : JC_W'(n);
    end
  end

  for (genvar j = 0; j < NCRIT; j++) begin : g_out
    pipe_delay #(.W(JC_W), .N(LAT)) u_dly (.clk(clk), .rst(rst), .d(cnt_c[j]), .q(count[j]));
  end
endmodule
