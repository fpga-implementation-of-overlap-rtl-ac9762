// omtf_model_pkg: untimed reference model of the OMTF processor used by the
// testbenches. It recomputes each step (reference-hit match, connection
// area, delta-phi, best hit, range check, weight, sum, pattern choice) with
// plain integer arithmetic, independently of the RTL's pipeline structure,
// from the same configuration functions the hardware is built from.
package omtf_model_pkg;
  import omtf_pkg::*;
  import omtf_cfg_pkg::*;

  typedef layer_data_t layers_t [MAX_LAYERS];
  typedef hit_t        hits_t   [MAX_LAYERS][MAX_INS_IN_LAYER];

  function automatic int satv(input int v);
    int hi, lo;
    hi = 2**(PHI_W-1) - 1;
    lo = -(2**(PHI_W-1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  function automatic int iabs(input int v);
    return v < 0 ? -v : v;
  endfunction

  // floor division by 2**s (arithmetic shift)
  function automatic int fshift(input int v, input int s);
    return v >>> s;
  endfunction

  function automatic bit fits(input int v, input int bits);
    return v >= -(2**(bits-1)) && v <= 2**(bits-1) - 1;
  endfunction

  // Weight of pattern p, layer l for the given layer data; fired = 0 if the
  // layer did not fire (weight then 0).
  function automatic void layer_score(input int p, input int l, input layer_data_t d,
                                      output bit fired, output int weight);
    int nin, best, bestabs, dst, r, df, pf;
    logic [LUT_AW-1:0] a;
    nin = gpu_nin(p, l);
    r = int'(d.ref_layer);
    best = -1; bestabs = 0;
    fired = 0; weight = 0;
    for (int k = 0; k < nin; k++) begin
      if (d.hits[k].active) begin
        dst = satv(int'(d.hits[k].dphi) - satv(gpu_mean(p, l, r)));
        if (best < 0 || iabs(dst) < bestabs) begin
          best = k; bestabs = iabs(dst);
          df = fshift(dst, gpu_dist_shift(p, l));
          pf = fshift(int'(d.hits[k].phi), gpu_phi_shift(p, l));
        end
      end
    end
    if (best >= 0 && d.valid && fits(df, DIST_AB) && fits(pf, PHI_AB)) begin
      a = {REFL_W'(r), DIST_AB'(df), PHI_AB'(pf)};
      fired = 1;
      weight = int'(gpu_weight(p, l, a));
    end
  endfunction

  function automatic void pattern_score(input int p, input int nl, input layers_t ld,
                                        output int sum, output int fired);
    bit f; int w;
    sum = 0; fired = 0;
    for (int l = 0; l < nl; l++) begin
      layer_score(p, l, ld[l], f, w);
      sum += w;
      fired += int'(f);
    end
  endfunction

  // Connection-area data of reference hit idx (not skewed).
  function automatic layers_t conar_model(input hits_t h, input int idx);
    layers_t o;
    refhit_def_t d;
    conar_layer_def_t c;
    int pr;
    d = refhit_def(idx);
    pr = int'(h[d.layer][d.input_nr].phi);
    for (int l = 0; l < MAX_LAYERS; l++) begin
      c = conar_def(int'(d.conar), l);
      o[l].valid = 1'b1;
      o[l].ref_layer = d.ref_layer;
      for (int k = 0; k < MAX_CONAR_OUTS; k++) begin
        if (k < int'(c.len) && int'(c.first) + k < MAX_INS_IN_LAYER) begin
          o[l].hits[k].active = h[l][int'(c.first) + k].active;
          o[l].hits[k].phi    = h[l][int'(c.first) + k].phi;
          o[l].hits[k].dphi   = phi_t'(satv(int'(h[l][int'(c.first) + k].phi) - pr));
        end else begin
          // unused output: inactive, angle 0
          o[l].hits[k].active = 1'b0;
          o[l].hits[k].phi    = '0;
          o[l].hits[k].dphi   = phi_t'(satv(-pr));
        end
      end
    end
    return o;
  endfunction

  function automatic bit refhit_match(input hits_t h, input int i);
    refhit_def_t d;
    d = refhit_def(i);
    return h[d.layer][d.input_nr].active &&
           int'(h[d.layer][d.input_nr].phi) >= int'(d.phi_lo) &&
           int'(h[d.layer][d.input_nr].phi) <= int'(d.phi_hi);
  endfunction

  // Best of np patterns: most fired layers, then largest sum, then lowest index.
  function automatic void best_pattern(input hits_t h, input int idx, input int np,
                                       input int nl, output int bp, output int bs,
                                       output int bf);
    layers_t ld;
    int s, f;
    ld = conar_model(h, idx);
    bp = 0; bs = -1; bf = -1;
    for (int p = 0; p < np; p++) begin
      pattern_score(p, nl, ld, s, f);
      if (f > bf || (f == bf && s > bs)) begin
        bp = p; bs = s; bf = f;
      end
    end
  endfunction

endpackage
