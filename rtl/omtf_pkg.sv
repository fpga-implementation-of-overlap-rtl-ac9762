// omtf_pkg: sizes and data types shared by the Overlap Muon Track Finder
// processor (OMTFP).
//
// The numbers follow the processor described for the CMS overlap region:
// 19 detector layers with up to 14 input channels each, 8 reference
// layers, 80 reference hits, 8 connection areas with up to 6 outputs per
// layer, 50 golden patterns, 10-bit angles and 8 reference hits processed
// per bunch crossing (320 MHz clock, 40 MHz bunch crossings). The weight
// width, the split of the weight-LUT address and the elementary sorter fan-in
// are this design's choices (see the README).
package omtf_pkg;

  // ---- structure of the processor ----
  localparam int MAX_INS_IN_LAYER = 14;  // input channels per layer
  localparam int MAX_CONAR_OUTS   = 6;   // connection-area outputs per layer
  localparam int MAX_LAYERS       = 19;  // detector layers
  localparam int N_CONARS         = 8;   // connection areas
  localparam int N_REF_LAYERS     = 8;   // reference layers
  localparam int N_REFHITS        = 80;  // reference-hit definitions
  localparam int N_PATTERNS       = 50;  // golden patterns
  localparam int REFHITS_PER_BX   = 8;   // clocks (= reference hits) per bunch crossing

  // ---- word widths ----
  localparam int PHI_W     = 10;  // angle in the processor's local frame
  localparam int WEIGHT_W  = 9;   // one weight (one 2048 x 9 block RAM)
  localparam int REFL_W    = $clog2(N_REF_LAYERS);
  localparam int REFHIT_W  = $clog2(N_REFHITS);
  localparam int PAT_W     = $clog2(N_PATTERNS);
  localparam int FIRED_W   = $clog2(MAX_LAYERS + 1);
  localparam int SUM_W     = WEIGHT_W + $clog2(MAX_LAYERS);
  localparam int CONAR_W   = $clog2(N_CONARS);
  localparam int LAYER_W   = $clog2(MAX_LAYERS);
  localparam int INPUT_W   = $clog2(MAX_INS_IN_LAYER);

  // ---- weight LUT address: {reference layer, phi_dist field, phi_hit field} ----
  localparam int DIST_AB = 6;  // signed phi_dist field
  localparam int PHI_AB  = 2;  // signed phi_hit field (coarse position)
  localparam int LUT_AW  = REFL_W + DIST_AB + PHI_AB;

  // ---- pipeline latencies (clock edges) ----
  localparam int GPU_LAT = 4;  // layer data in -> running sum out

  typedef logic signed [PHI_W-1:0] phi_t;

  // One input channel: a hit converted to its azimuthal angle.
  typedef struct packed {
    logic active;
    phi_t phi;
  } hit_t;

  // One connection-area output as delivered to the golden pattern units.
  typedef struct packed {
    logic active;
    phi_t phi;    // original angle, used for the symmetry correction
    phi_t dphi;   // phi - phi_refHit
  } gp_hit_t;

  // Data of one layer for one reference hit.
  typedef struct packed {
    logic                              valid;
    logic [REFL_W-1:0]                 ref_layer;
    gp_hit_t [MAX_CONAR_OUTS-1:0]      hits;
  } layer_data_t;

  // Result of one golden pattern, compared by the muon sorter.
  typedef struct packed {
    logic [FIRED_W-1:0] fired;
    logic [SUM_W-1:0]   sum;
    logic [PAT_W-1:0]   pattern;
  } gp_cand_t;

  // Reference-hit definition.
  typedef struct packed {
    logic [LAYER_W-1:0] layer;      // detector layer scanned
    logic [INPUT_W-1:0] input_nr;   // input channel in that layer
    phi_t               phi_lo;     // accepted angle range
    phi_t               phi_hi;
    logic [REFL_W-1:0]  ref_layer;  // reference-layer number
    logic [CONAR_W-1:0] conar;      // connection area to use
  } refhit_def_t;

  // One layer of a connection area: inputs first .. first+len-1.
  typedef struct packed {
    logic [INPUT_W-1:0] first;
    logic [INPUT_W-1:0] len;
  } conar_layer_def_t;

  // Saturate a value to the signed PHI_W range.
  function automatic phi_t sat_phi(input logic signed [PHI_W:0] v);
    if (v > $signed((PHI_W+1)'(2**(PHI_W-1) - 1)))   return phi_t'(2**(PHI_W-1) - 1);
    else if (v < $signed(-(PHI_W+1)'(2**(PHI_W-1)))) return phi_t'(-(2**(PHI_W-1)));
    else                                              return v[PHI_W-1:0];
  endfunction

  // Depth of a tree of FAN-input sorters over n inputs: smallest LEVELS with
  // FAN**LEVELS >= n (at least one level).
  function automatic int sorter_levels(input int n, input int f);
    int lv, cap;
    lv = 0; cap = 1;
    while (cap < n) begin cap = cap * f; lv++; end
    return (lv == 0) ? 1 : lv;
  endfunction

endpackage
