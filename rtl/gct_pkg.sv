// gct_pkg - types and constants shared by the Global Calorimeter Trigger blocks.
//
// A trigger object (e/gamma, isolated e/gamma, central jet, forward jet, tau)
// travels as one word holding a 6-bit rank and the (eta, phi) calorimeter
// region where it was found. The 6-bit rank follows the document; the
// location encoding (5-bit eta index 0..21, 5-bit phi index 0..17) is this
// design's choice. Rank 0 marks an empty slot.
//
// The calorimeter is a grid of N_ETA x N_PHI regions; the outer FWD_ETA eta
// rows at each end are the forward calorimeter. The grid size is not in the
// document and is taken from the usual CMS region layout.
//
// cosd10/sind10 return cos/sin of (10 * k) degrees in Q10 fixed point
// (round(1024 * cos)); they weight region energies for the missing-energy
// vector and give the sector boundaries of its direction.
package gct_pkg;

  localparam int RANK_W = 6;
  localparam int ETA_W  = 5;
  localparam int PHI_W  = 5;
  localparam int N_ETA  = 22;
  localparam int N_PHI  = 18;
  localparam int FWD_ETA = 4;
  localparam int ET_W   = 10;   // region transverse energy
  localparam int TRIG_Q = 10;   // fixed-point fraction bits of cos/sin weights

  typedef struct packed {
    logic [RANK_W-1:0] rank;
    logic [ETA_W-1:0]  eta;
    logic [PHI_W-1:0]  phi;
  } obj_t;

  localparam int OBJ_W = $bits(obj_t);

  // Jet class flags as used by the jet-count criteria.
  typedef enum logic [1:0] {JC_CENTRAL = 2'd0, JC_FORWARD = 2'd1, JC_TAU = 2'd2, JC_NONE = 2'd3} jet_class_e;

  // One jet-count criterion: a jet counts if its rank is at least rank_min,
  // its eta index is inside [eta_min, eta_max] and its class bit is set in
  // class_mask (bit 0 central, bit 1 forward, bit 2 tau).
  typedef struct packed {
    logic [RANK_W-1:0] rank_min;
    logic [ETA_W-1:0]  eta_min;
    logic [ETA_W-1:0]  eta_max;
    logic [2:0]        class_mask;
  } jc_crit_t;

  localparam int JC_W = 5;  // width of one jet count (saturating)

  // Jet candidate as produced by the cluster algorithm.
  typedef struct packed {
    obj_t       obj;
    jet_class_e cls;
  } jet_cand_t;

  // Region data word as delivered to a jet cluster module.
  typedef struct packed {
    logic [ET_W-1:0] et;
    logic            tau_ok;  // deposit compatible with a one-prong tau decay
  } region_t;

  localparam int NUM_JC = 12;  // jet-count criteria

  // Everything sent to the Global Trigger for one bunch crossing.
  typedef struct packed {
    obj_t [3:0]               eg;       // e/gamma, highest rank first
    obj_t [3:0]               iso_eg;   // isolated e/gamma
    obj_t [3:0]               cen_jet;  // central jets
    obj_t [3:0]               fwd_jet;  // forward jets
    obj_t [3:0]               tau_jet;  // tau jets
    logic [19:0]              et_tot;   // total transverse energy
    logic [20:0]              met;      // missing transverse energy
    logic [5:0]               met_phi;  // its direction, 10-degree sectors
    logic [NUM_JC-1:0][JC_W-1:0] jcount;  // jet multiplicities
  } gt_word_t;

  localparam int GT_W = $bits(gt_word_t);

  // Object a beats object b: higher rank, ties broken by lower input index.
  function automatic logic beats(input logic [RANK_W-1:0] ra, input int ia,
                                 input logic [RANK_W-1:0] rb, input int ib);
    return (ra > rb) || ((ra == rb) && (ia < ib));
  endfunction

  // cos(10*k degrees) * 1024, rounded.
  function automatic int cosd10(input int k);
    int m;
    int t [0:9];
    t = '{1024, 1008, 962, 887, 784, 658, 512, 350, 178, 0};
    m = ((k % 36) + 36) % 36;
    if (m <= 9)       return  t[m];
    else if (m <= 18) return -t[18 - m];
    else if (m <= 27) return -t[m - 18];
    else              return  t[36 - m];
  endfunction

  // sin(10*k degrees) * 1024 = cos(10*(k+27) degrees) * 1024.
  function automatic int sind10(input int k);
    return cosd10(k + 27);
  endfunction

endpackage
