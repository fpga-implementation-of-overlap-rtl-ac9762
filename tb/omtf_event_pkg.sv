// omtf_event_pkg: random bunch-crossing generator for the processor
// testbenches. A crossing holds a number of muon-like tracks: each track
// fires one reference-hit definition (a hit inside its angle range) and
// leaves hits in the other layers of that reference hit's connection area at
// phi_refHit + dphi_mean of a randomly chosen golden pattern plus a small
// spread. Random noise hits are added on top.
package omtf_event_pkg;
  import omtf_pkg::*;
  import omtf_cfg_pkg::*;
  import omtf_model_pkg::*;

  function automatic hits_t make_bx(input int n_tracks, input int n_pats, input int noise_pct);
    hits_t h;
    for (int l = 0; l < MAX_LAYERS; l++)
      for (int k = 0; k < MAX_INS_IN_LAYER; k++) begin
        h[l][k].active = ($urandom_range(0, 99) < noise_pct);
        h[l][k].phi    = phi_t'(int'($urandom_range(0, 1023)) - 512);
      end
    for (int t = 0; t < n_tracks; t++) begin
      int i, r, p, pr;
      refhit_def_t d;
      i  = $urandom_range(0, N_REFHITS - 1);
      d  = refhit_def(i);
      r  = int'(d.ref_layer);
      p  = $urandom_range(0, n_pats - 1);
      pr = int'(d.phi_lo) + int'($urandom_range(0, 99));
      for (int l = 0; l < MAX_LAYERS; l++) begin
        conar_layer_def_t c;
        c = conar_def(int'(d.conar), l);
        if (l != int'(d.layer) && $urandom_range(0, 9) < 7) begin
          int k;
          k = int'(c.first) + int'($urandom_range(0, int'(c.len) - 1));
          h[l][k].active = 1'b1;
          h[l][k].phi    = phi_t'(satv(pr + gpu_mean(p, l, r) + int'($urandom_range(0, 16)) - 8));
        end
      end
      h[d.layer][d.input_nr].active = 1'b1;
      h[d.layer][d.input_nr].phi    = phi_t'(pr);
    end
    return h;
  endfunction
endpackage
