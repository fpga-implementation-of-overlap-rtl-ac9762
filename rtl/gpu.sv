// gpu: Golden Pattern Unit - processes one detector layer for one golden
// pattern and adds its weight to the pattern's running sum.
//
// Pipeline (one new reference hit per clock):
//   edge 1: for each of the NIN used inputs, phi_dist = dphi - dphi_mean,
//           with dphi_mean taken from a table indexed by the reference
//           layer; its magnitude is kept for the comparison;
//   edge 2: the active input with the smallest |phi_dist| is the best
//           matching hit (lowest input wins a tie); the LUT address is formed
//           from the reference layer, phi_dist >>> DIST_SHIFT and
//           phi_hit >>> PHI_SHIFT, and the "check range" logic requires
//           the bits dropped above each field to be a sign extension;
//   edge 3: the weight LUT is read;
//   edge 4: sum_out = sum_in + weight and fired_out = fired_in + 1 when the
//           layer fired (a best hit exists and passed the range check),
//           otherwise the inputs are passed on.
// sum_in / fired_in must come from the previous layer's unit, which sees its
// data one clock earlier; the first unit gets zeros. Latency GPU_LAT = 4.
// Following the processor description: nearest-to-mean hit selection, range
// check, LUT addressed by phi_dist, phi_hit and reference layer, weights
// summed and fired layers counted along the chain. Own choices: the pipeline
// cut, tie rule and address layout.
module gpu
  import omtf_pkg::*;
  import omtf_cfg_pkg::*;
#(
  parameter int PATTERN = 0,
  parameter int LAYER   = 0
) (
  input  logic                clk,
  input  logic                rst,
  input  layer_data_t         din,
  input  logic [SUM_W-1:0]    sum_in,
  input  logic [FIRED_W-1:0]  fired_in,
  output logic [SUM_W-1:0]    sum_out,
  output logic [FIRED_W-1:0]  fired_out
);

  localparam int NIN        = gpu_nin(PATTERN, LAYER);
  localparam int DIST_SHIFT = gpu_dist_shift(PATTERN, LAYER);
  localparam int PHI_SHIFT  = gpu_phi_shift(PATTERN, LAYER);

  typedef logic [N_REF_LAYERS-1:0][PHI_W-1:0] mean_tab_t;

  function automatic mean_tab_t mk_means();
    mean_tab_t t;
    for (int r = 0; r < N_REF_LAYERS; r++)
      t[r] = PHI_W'(gpu_mean(PATTERN, LAYER, r));
    return t;
  endfunction

  localparam mean_tab_t MEANS = mk_means();

  // ---- edge 1 ----
  logic               e1_valid;
  logic [REFL_W-1:0]  e1_refl;
  logic               e1_act  [NIN];
  phi_t               e1_dist [NIN];
  logic [PHI_W-1:0]   e1_abs  [NIN];
  phi_t               e1_phi  [NIN];

  always_ff @(posedge clk) begin
    phi_t m;
    m = phi_t'(MEANS[din.ref_layer]);
    e1_valid <= din.valid && !rst;
    e1_refl  <= din.ref_layer;
    for (int k = 0; k < NIN; k++) begin
      phi_t d;
      d = sat_phi({din.hits[k].dphi[PHI_W-1], din.hits[k].dphi} - {m[PHI_W-1], m});
      e1_act[k]  <= din.hits[k].active;
      e1_dist[k] <= d;
      e1_abs[k]  <= d[PHI_W-1] ? PHI_W'(-d) : PHI_W'(d);
      e1_phi[k]  <= din.hits[k].phi;
    end
  end

  // ---- edge 2: best hit, range check, address ----
  logic               best_found;
  phi_t               best_dist, best_phi;
  always_comb begin
    logic [PHI_W-1:0] best_abs;
    best_found = 1'b0;
    best_abs   = '1;
    best_dist  = '0;
    best_phi   = '0;
    for (int k = 0; k < NIN; k++)
      if (e1_act[k] && (!best_found || e1_abs[k] < best_abs)) begin
        best_found = 1'b1;
        best_abs   = e1_abs[k];
        best_dist  = e1_dist[k];
        best_phi   = e1_phi[k];
      end
  end

  phi_t  dist_sh, phi_sh;
  logic  dist_ok, phi_ok;
  assign dist_sh = best_dist >>> DIST_SHIFT;
  assign phi_sh  = best_phi  >>> PHI_SHIFT;
  // range check: value fits in the signed field
  assign dist_ok = (dist_sh >= -(phi_t'(2**(DIST_AB-1)))) && (dist_sh <= phi_t'(2**(DIST_AB-1) - 1));
  assign phi_ok  = (phi_sh  >= -(phi_t'(2**(PHI_AB-1))))  && (phi_sh  <= phi_t'(2**(PHI_AB-1) - 1));

  logic              e2_valid, e2_fired;
  logic [LUT_AW-1:0] e2_addr;
  always_ff @(posedge clk) begin
    e2_valid <= e1_valid && !rst;
    e2_fired <= e1_valid && best_found && dist_ok && phi_ok;
    e2_addr  <= {e1_refl, dist_sh[DIST_AB-1:0], phi_sh[PHI_AB-1:0]};
  end

  // ---- edge 3: weight LUT ----
  logic [WEIGHT_W-1:0] weight;
  logic                e3_fired;
  weight_lut #(.PATTERN(PATTERN), .LAYER(LAYER)) u_lut (
    .clk  (clk),
    .addr (e2_addr),
    .data (weight)
  );
  always_ff @(posedge clk) e3_fired <= e2_fired && e2_valid && !rst;

  // ---- edge 4: running sum ----
  always_ff @(posedge clk) begin
    if (rst) begin
      sum_out   <= '0;
      fired_out <= '0;
    end else if (e3_fired) begin
      sum_out   <= sum_in + SUM_W'(weight);
      fired_out <= fired_in + 1'b1;
    end else begin
      sum_out   <= sum_in;
      fired_out <= fired_in;
    end
  end

endmodule
