// omtf_cfg_pkg: configuration of the OMTF processor - the reference-hit
// definitions, the connection areas and the golden patterns.
//
// In the real system these numbers come from Monte Carlo simulation of the
// detector and are regenerated whenever the physics tuning changes. This
// package instead computes a complete, deterministic configuration from the
// pattern, layer and reference-layer indices, in the spirit of the random
// "worst case" configurations used to check that the processor builds for
// any set of constants. Every value stays inside the ranges the hardware
// supports, so a physics configuration can replace these functions without
// touching the logic. The formulas:
//   reference layer r       -> detector layer 2*r
//   reference hit i         -> r = i % 8, phi bin b = i / 8 (10 bins of 100),
//                              input channel b + r % 3, connection area 8*b/10
//   connection area c, layer l -> inputs c .. c + 5 - l % 3
//   pattern p               -> pT bin q = p / 2, charge sign + for even p
//   mean(p,l,r)             -> sign * 96 * (l - 2r) / (q + 4)
//   LUT weight              -> max(0, 300 - (5 + q % 4) * d^2 / 2) plus a
//                              0..16 term hashed from (p, l, r, phi field)
package omtf_cfg_pkg;
  import omtf_pkg::*;

  function automatic int ref_layer_det(input int r);
    return 2 * r;
  endfunction

  function automatic refhit_def_t refhit_def(input int i);
    refhit_def_t d;
    int r, b;
    r = i % N_REF_LAYERS;
    b = i / N_REF_LAYERS;
    d.layer     = LAYER_W'(ref_layer_det(r));
    d.input_nr  = INPUT_W'(b + r % 3);
    d.phi_lo    = phi_t'(-500 + 100 * b);
    d.phi_hi    = phi_t'(-500 + 100 * b + 99);
    d.ref_layer = REFL_W'(r);
    d.conar     = CONAR_W'((b * N_CONARS) / 10);
    return d;
  endfunction

  function automatic conar_layer_def_t conar_def(input int c, input int l);
    conar_layer_def_t d;
    d.first = INPUT_W'(c);
    d.len   = INPUT_W'(MAX_CONAR_OUTS - l % 3);
    return d;
  endfunction

  // Number of connection-area outputs a GPU looks at (4..6).
  function automatic int gpu_nin(input int p, input int l);
    return 4 + (p + l) % 3;
  endfunction

  // Delta-phi mean of pattern p in layer l for reference layer r.
  function automatic int gpu_mean(input int p, input int l, input int r);
    int q, s;
    q = p / 2;
    s = (p % 2 == 0) ? 1 : -1;
    return s * 96 * (l - ref_layer_det(r)) / (q + 4);
  endfunction

  // LSBs of phi_dist dropped when forming the LUT address (wider
  // distributions for lower pT).
  function automatic int gpu_dist_shift(input int p, input int l);
    int q;
    q = p / 2;
    if (q < 6)       return 3;
    else if (q < 14) return 2;
    else             return 1 + (l % 2);
  endfunction

  // LSBs of phi_hit dropped when forming the LUT address; the bits above
  // the PHI_AB-bit field must be a sign extension (range check).
  function automatic int gpu_phi_shift(input int p, input int l);
    return PHI_W - PHI_AB - ((p + l) % 2);
  endfunction

  // Contents of the weight LUT of pattern p, layer l.
  function automatic logic [WEIGHT_W-1:0] gpu_weight(input int p, input int l,
                                                     input logic [LUT_AW-1:0] a);
    int r, d, pf, q, w;
    r  = int'(a[LUT_AW-1 -: REFL_W]);
    d  = int'($signed(a[PHI_AB +: DIST_AB]));
    pf = int'(a[PHI_AB-1:0]);
    q  = p / 2;
    w  = 300 - ((5 + q % 4) * d * d) / 2;
    if (w < 0) w = 0;
    w = w + (p * 7 + l * 13 + r * 5 + pf * 3) % 17;
    return WEIGHT_W'(w);
  endfunction

endpackage
