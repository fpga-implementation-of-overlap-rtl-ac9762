// tb_omtfp: end-to-end test of the OMTF processor core with a reduced set
// of 12 golden patterns (all 19 layers, 80 reference hits, 8 connection
// areas). Random crossings arrive every 8 clocks with 0 to 14 tracks plus
// noise. For every crossing the model lists the matching reference hits in
// priority order, keeps the first 8 (the rest are dropped when the next
// crossing loads) and scores all patterns for each; the processor's
// candidate stream must match it in order and content, with the fixed
// latency from bx_load. Counted: crossings with more than 8 reference hits
// (dropped ones), empty crossings, reference hits whose best pattern fired
// no layer (no candidate).
module tb_omtfp;
  import omtf_pkg::*;
  import omtf_cfg_pkg::*;
  import omtf_model_pkg::*;
  import omtf_event_pkg::*;
  localparam int NP = 12, NL = MAX_LAYERS, LV = 2;
  // clocks from the one in which bx_load is applied to the first candidate:
  // load register, encoder load, encoder output, two builder stages, GPU
  // chain, sorter levels
  localparam int LAT0 = 8 + NL + LV;
  localparam int NBX = 60;
  logic clk = 0, rst = 1, bx_load = 0;
  hit_t hits_in [MAX_LAYERS][MAX_INS_IN_LAYER];
  logic cand_valid;
  logic [REFHIT_W-1:0] cand_refhit;
  logic [REFL_W-1:0] cand_ref_layer;
  logic [PAT_W-1:0] cand_pattern;
  logic [FIRED_W-1:0] cand_fired;
  logic [SUM_W-1:0] cand_sum;
  int checks = 0, failures = 0;
  int n_over = 0, n_empty = 0, n_nofire = 0, n_cand = 0;

  omtfp #(.N_PATS(NP)) dut (.*);
  always #5 clk = ~clk;

  // expected candidates keyed by output clock
  int cyc = 0;
  int e_cyc [$], e_rh [$], e_pat [$], e_f [$], e_s [$];

  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (!rst) begin
    bit due;
    due = (e_cyc.size() > 0 && e_cyc[0] == cyc);
    checks++;
    if (cand_valid !== due) begin
      failures++;
      if (failures < 10) $display("cyc %0d valid %0d expected %0d", cyc, cand_valid, due);
    end
    if (due) begin
      if (cand_valid && (int'(cand_refhit) != e_rh[0] || int'(cand_pattern) != e_pat[0] ||
          int'(cand_fired) != e_f[0] || int'(cand_sum) != e_s[0] ||
          int'(cand_ref_layer) != e_rh[0] % N_REF_LAYERS)) begin
        failures++;
        if (failures < 10) $display("cyc %0d got rh %0d p %0d f %0d s %0d exp rh %0d p %0d f %0d s %0d",
          cyc, cand_refhit, cand_pattern, cand_fired, cand_sum, e_rh[0], e_pat[0], e_f[0], e_s[0]);
      end
      n_cand++;
      void'(e_cyc.pop_front()); void'(e_rh.pop_front()); void'(e_pat.pop_front());
      void'(e_f.pop_front()); void'(e_s.pop_front());
    end
  end

  initial begin
    hits_t h;
    for (int l = 0; l < MAX_LAYERS; l++)
      for (int k = 0; k < MAX_INS_IN_LAYER; k++) hits_in[l][k] = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (2) @(negedge clk);
    for (int bx = 0; bx < NBX; bx++) begin
      int nref, load_cyc;
      h = make_bx((bx % 10 == 3) ? 0 : $urandom_range(1, 14), NP, 3);
      hits_in = h;
      bx_load = 1;
      load_cyc = cyc;             // edge that samples the load
      nref = 0;
      for (int i = 0; i < N_REFHITS; i++)
        if (refhit_match(h, i)) begin
          if (nref < REFHITS_PER_BX) begin
            int bp, bs, bf;
            best_pattern(h, i, NP, NL, bp, bs, bf);
            if (bf > 0) begin
              e_cyc.push_back(load_cyc + LAT0 + nref);
              e_rh.push_back(i); e_pat.push_back(bp); e_f.push_back(bf); e_s.push_back(bs);
            end else n_nofire++;
          end
          nref++;
        end
      if (nref > REFHITS_PER_BX) n_over++;
      if (nref == 0) n_empty++;
      @(negedge clk);
      bx_load = 0;
      repeat (REFHITS_PER_BX - 1) @(negedge clk);
    end
    // empty crossings keep loading while the pipeline drains
    for (int l = 0; l < MAX_LAYERS; l++)
      for (int k = 0; k < MAX_INS_IN_LAYER; k++) hits_in[l][k] = '0;
    for (int i = 0; i < LAT0 / 8 + 2; i++) begin
      bx_load = 1;
      @(negedge clk);
      bx_load = 0;
      repeat (REFHITS_PER_BX - 1) @(negedge clk);
    end
    checks++;
    if (e_cyc.size() != 0) begin failures++; $display("%0d candidates never came", e_cyc.size()); end
    checks++;
    if (n_over == 0 || n_empty == 0 || n_cand < 100) begin
      failures++; $display("coverage: overflow %0d empty %0d candidates %0d", n_over, n_empty, n_cand);
    end
    $display("crossings %0d: with >8 reference hits %0d, empty %0d; candidates %0d; reference hits without fired layer %0d",
             NBX, n_over, n_empty, n_cand, n_nofire);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NBX * 8 + 500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
