// omtfp: Overlap Muon Track Finder processor.
//
// Every bunch crossing (bx_load, once per REFHITS_PER_BX clocks) the angles
// of all input channels are registered and scanned for reference hits. The
// priority encoder then hands out up to REFHITS_PER_BX reference hits, one
// per clock, highest priority first; any left when the next crossing loads
// are dropped. For each reference hit the connection-area builder selects
// the inputs of every layer and subtracts phi_refHit, all N_PATS golden
// pattern processors score the data in parallel (sum of weights and fired
// layers), and the muon sorter picks the best pattern. One candidate per
// reference hit leaves the processor:
//   cand_valid    - a reference hit was processed and at least one layer
//                   (the reference layer itself normally) fired;
//   cand_refhit   - reference-hit number, cand_ref_layer its reference layer;
//   cand_pattern  - winning golden pattern (its pT and charge);
//   cand_fired / cand_sum - its fired-layer count and sum of weights.
// A second copy of the input registers is loaded two clocks after the first so
// that the hits stay stable for all reference hits of a crossing while the
// next crossing is already being scanned.
// Timing: bx_load sampled at edge E -> the candidate of the k-th reference
// hit of that crossing (k = 0..7) is on the outputs after edge
// E + 7 + N_LAYERS + SORT_LEVELS + k (E + 29 + k with the defaults).
// Following the processor description: the block chain reference hits ->
// priority encoder -> connection areas -> delta-phi -> GPPs -> sorter, at 8
// reference hits per crossing. Own choices: the double input register and
// the candidate format.
module omtfp
  import omtf_pkg::*;
#(
  parameter int N_PATS     = N_PATTERNS,
  parameter int N_LAYERS   = MAX_LAYERS,
  parameter int SORTER_FAN = 4
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                bx_load,
  input  hit_t                hits_in [MAX_LAYERS][MAX_INS_IN_LAYER],
  output logic                cand_valid,
  output logic [REFHIT_W-1:0] cand_refhit,
  output logic [REFL_W-1:0]   cand_ref_layer,
  output logic [PAT_W-1:0]    cand_pattern,
  output logic [FIRED_W-1:0]  cand_fired,
  output logic [SUM_W-1:0]    cand_sum
);

  localparam int SORT_LEVELS = sorter_levels(N_PATS, SORTER_FAN);
  // from the builder's meta output to the sorter output
  localparam int META_DELAY  = GPU_LAT + N_LAYERS - 1 + SORT_LEVELS;

  // ---- reference hits ----
  hit_t               hits_q  [MAX_LAYERS][MAX_INS_IN_LAYER];
  hit_t               hits_q2 [MAX_LAYERS][MAX_INS_IN_LAYER];
  logic [N_REFHITS-1:0] rh_vec;
  logic               rh_load;

  refhit_detector #(.N_REF(N_REFHITS)) u_det (
    .clk        (clk),
    .rst        (rst),
    .bx_load    (bx_load),
    .hits_in    (hits_in),
    .hits_q     (hits_q),
    .refhit_vec (rh_vec),
    .load_q     (rh_load)
  );

  // second copy, loaded when the first reference hit of the crossing leaves
  // the encoder; it then holds until the last one has been used
  logic rh_load_d;
  always_ff @(posedge clk) begin
    rh_load_d <= rh_load && !rst;
    if (rh_load_d) hits_q2 <= hits_q;
  end

  logic                rh_valid;
  logic [REFHIT_W-1:0] rh_idx;

  refhit_prio_encoder #(.N(N_REFHITS), .GROUP(10), .IDX_W(REFHIT_W)) u_prio (
    .clk       (clk),
    .rst       (rst),
    .load      (rh_load),
    .vec       (rh_vec),
    .out_valid (rh_valid),
    .out_idx   (rh_idx)
  );

  // ---- connection areas ----
  logic                meta_valid;
  logic [REFHIT_W-1:0] meta_refhit;
  logic [REFL_W-1:0]   meta_refl;
  layer_data_t         layers [N_LAYERS];

  conar_builder #(.N_LAYERS(N_LAYERS)) u_conar (
    .clk            (clk),
    .rst            (rst),
    .hits           (hits_q2),
    .refhit_valid   (rh_valid),
    .refhit_idx     (rh_idx),
    .meta_valid     (meta_valid),
    .meta_refhit    (meta_refhit),
    .meta_ref_layer (meta_refl),
    .layers_out     (layers)
  );

  // ---- golden pattern processors ----
  logic [SUM_W-1:0]   sums   [N_PATS];
  logic [FIRED_W-1:0] fireds [N_PATS];

  for (genvar p = 0; p < N_PATS; p++) begin : g_gpp
    gpp #(.PATTERN(p), .N_LAYERS(N_LAYERS)) u_gpp (
      .clk    (clk),
      .rst    (rst),
      .layers (layers),
      .sum    (sums[p]),
      .fired  (fireds[p])
    );
  end

  // ---- muon sorter ----
  logic     best_valid;
  gp_cand_t best;

  muon_sorter #(.N(N_PATS), .FAN(SORTER_FAN)) u_sort (
    .clk        (clk),
    .rst        (rst),
    .sums       (sums),
    .fireds     (fireds),
    .best_valid (best_valid),
    .best       (best)
  );

  // ---- reference-hit information, delayed to meet the sorter output ----
  typedef struct packed {
    logic                valid;
    logic [REFHIT_W-1:0] refhit;
    logic [REFL_W-1:0]   refl;
  } meta_t;

  meta_t md [META_DELAY];
  always_ff @(posedge clk) begin
    md[0] <= '{valid: meta_valid && !rst, refhit: meta_refhit, refl: meta_refl};
    for (int i = 1; i < META_DELAY; i++) begin
      md[i] <= md[i-1];
      if (rst) md[i].valid <= 1'b0;
    end
  end

  assign cand_valid     = md[META_DELAY-1].valid && best_valid && (best.fired != '0);
  assign cand_refhit    = md[META_DELAY-1].refhit;
  assign cand_ref_layer = md[META_DELAY-1].refl;
  assign cand_pattern   = best.pattern;
  assign cand_fired     = best.fired;
  assign cand_sum       = best.sum;

endmodule
