// conar_builder: connection-area builder and delta-phi preprocessing in
// front of the golden pattern processors.
//
// For each reference hit delivered by the priority encoder it
//   stage 1: looks up the reference-hit definition (detector layer, input
//            channel, reference layer, connection area), takes phi_refHit
//            from that channel and, for every layer, multiplexes the
//            connection area's input channels first..first+len-1 onto the
//            MAX_CONAR_OUTS outputs (unused outputs inactive) - registered;
//   stage 2: subtracts phi_refHit from every selected hit angle, saturating
//            to PHI_W bits, and keeps the original angle beside it;
//   skew:    delays layer l by l further clocks, so that the chained golden
//            pattern units, one clock apart per layer, each see their layer
//            at the right time.
// Interface: hits must stay stable while the reference hits of a bunch
// crossing are processed. Timing: refhit_valid at edge E -> meta_* and
// layer 0 after edge E+2, layer l after edge E+2+l.
// Following the processor description: the connection area is a registered
// multiplexer chosen by the reference hit, then phi_refHit is subtracted.
// Own choices: saturation of delta-phi and the shared skew line.
module conar_builder
  import omtf_pkg::*;
  import omtf_cfg_pkg::*;
#(
  parameter int N_LAYERS = MAX_LAYERS
) (
  input  logic                  clk,
  input  logic                  rst,
  input  hit_t                  hits [MAX_LAYERS][MAX_INS_IN_LAYER],
  input  logic                  refhit_valid,
  input  logic [REFHIT_W-1:0]   refhit_idx,
  output logic                  meta_valid,
  output logic [REFHIT_W-1:0]   meta_refhit,
  output logic [REFL_W-1:0]     meta_ref_layer,
  output layer_data_t           layers_out [N_LAYERS]
);

  // stage 1
  logic                s1_valid;
  logic [REFHIT_W-1:0] s1_idx;
  logic [REFL_W-1:0]   s1_refl;
  phi_t                s1_phi_ref;
  hit_t                s1_sel [N_LAYERS][MAX_CONAR_OUTS];

  // stage 2
  layer_data_t         s2 [N_LAYERS];

  always_ff @(posedge clk) begin
    refhit_def_t d;
    d = refhit_def(int'(refhit_idx));
    if (rst) begin
      s1_valid <= 1'b0;
    end else begin
      s1_valid <= refhit_valid;
    end
    s1_idx     <= refhit_idx;
    s1_refl    <= d.ref_layer;
    s1_phi_ref <= hits[d.layer][d.input_nr].phi;
    for (int l = 0; l < N_LAYERS; l++) begin
      conar_layer_def_t c;
      c = conar_def(int'(d.conar), l);
      for (int k = 0; k < MAX_CONAR_OUTS; k++) begin
        if (k < int'(c.len) && int'(c.first) + k < MAX_INS_IN_LAYER)
          s1_sel[l][k] <= hits[l][int'(c.first) + k];
        else
          s1_sel[l][k] <= '0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) meta_valid <= 1'b0;
    else     meta_valid <= s1_valid;
    meta_refhit    <= s1_idx;
    meta_ref_layer <= s1_refl;
    for (int l = 0; l < N_LAYERS; l++) begin
      s2[l].valid     <= s1_valid && !rst;
      s2[l].ref_layer <= s1_refl;
      for (int k = 0; k < MAX_CONAR_OUTS; k++) begin
        s2[l].hits[k].active <= s1_sel[l][k].active;
        s2[l].hits[k].phi    <= s1_sel[l][k].phi;
        s2[l].hits[k].dphi   <= sat_phi({s1_sel[l][k].phi[PHI_W-1], s1_sel[l][k].phi}
                                        - {s1_phi_ref[PHI_W-1], s1_phi_ref});
      end
    end
  end

  // skew: layer l delayed l clocks
  for (genvar l = 0; l < N_LAYERS; l++) begin : g_skew
    if (l == 0) begin : g_direct
      assign layers_out[l] = s2[l];
    end else begin : g_delay
      layer_data_t dl [l];
      always_ff @(posedge clk) begin
        dl[0] <= s2[l];
        for (int i = 1; i < l; i++) dl[i] <= dl[i-1];
      end
      assign layers_out[l] = dl[l-1];
    end
  end

endmodule
