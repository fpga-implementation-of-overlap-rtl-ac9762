// tb_omtf_full: the end-to-end test of tb_omtf_top run on the design exactly
// at its default size (50 golden patterns, 19 layers, 80 reference hits,
// 6 RPC converters), over 12 crossings. Building it compiles 950 distinct
// golden pattern units and takes several minutes.
// Every 16 clocks each RPC converter receives a frame of random partition
// words (frame_end on clock 3); crossings are loaded on clocks 0 and 8. The
// reference model rebuilds the converter results (widest clusters, angles,
// channel 2*chamber + slot of layer 13 + converter), merges them with the
// directly driven channels exactly as they stand when each crossing is
// loaded, and predicts the candidate stream (first 8 reference hits of a
// crossing, best pattern of each, fixed latency). Counted mechanisms:
// crossings with more than 8 reference hits, empty crossings, clusters
// discarded as too wide, converter frames with two clusters, reference hits
// found on converter-driven channels, candidates.
module tb_omtf_full;
  import omtf_pkg::*;
  import omtf_cfg_pkg::*;
  import omtf_model_pkg::*;
  import omtf_event_pkg::*;
  import rpc_pkg::*;
  import rpc_model_pkg::*;
  localparam int NCONV = 6, L0 = 13, NBX = 12;
  localparam int LV = sorter_levels(N_PATTERNS, 4);
  localparam int LAT0 = 8 + MAX_LAYERS + LV;
  logic clk = 0, rst = 1, bx_load = 0;
  hit_t hits_in [MAX_LAYERS][MAX_INS_IN_LAYER];
  logic     lb_valid [NCONV];
  lb_word_t lb_word [NCONV];
  logic     lb_frame_end [NCONV];
  logic [T-1:0] rpc_time [NCONV];
  logic cand_valid;
  logic [REFHIT_W-1:0] cand_refhit;
  logic [REFL_W-1:0] cand_ref_layer;
  logic [PAT_W-1:0] cand_pattern;
  logic [FIRED_W-1:0] cand_fired;
  logic [SUM_W-1:0] cand_sum;
  int checks = 0, failures = 0;
  int n_over = 0, n_empty = 0, n_wide = 0, n_two = 0, n_rpc_ref = 0, n_cand = 0;

  omtf_top dut (.*);
  always #5 clk = ~clk;

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  int e_cyc [$], e_rh [$], e_pat [$], e_f [$], e_s [$];

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
          int'(cand_fired) != e_f[0] || int'(cand_sum) != e_s[0])) begin
        failures++;
        if (failures < 10) $display("cyc %0d got rh %0d p %0d f %0d s %0d exp rh %0d p %0d f %0d s %0d",
          cyc, cand_refhit, cand_pattern, cand_fired, cand_sum, e_rh[0], e_pat[0], e_f[0], e_s[0]);
      end
      n_cand++;
      void'(e_cyc.pop_front()); void'(e_rh.pop_front()); void'(e_pat.pop_front());
      void'(e_f.pop_front()); void'(e_s.pop_front());
    end
  end

  hit_t rpc_state [NCONV][8];   // converter-driven channels as the design holds them

  // predict the candidates of a crossing loaded in this clock
  task automatic load_bx(input hits_t h);
    int nref, lc;
    hits_t m;
    m = h;
    for (int c = 0; c < NCONV; c++)
      for (int k = 0; k < 8; k++) m[L0 + c][k] = rpc_state[c][k];
    hits_in = h;
    bx_load = 1;
    lc = cyc;
    nref = 0;
    for (int i = 0; i < N_REFHITS; i++)
      if (refhit_match(m, i)) begin
        refhit_def_t d;
        d = refhit_def(i);
        if (int'(d.layer) >= L0 && int'(d.input_nr) < 8) n_rpc_ref++;
        if (nref < REFHITS_PER_BX) begin
          int bp, bs, bf;
          best_pattern(m, i, N_PATTERNS, MAX_LAYERS, bp, bs, bf);
          if (bf > 0) begin
            e_cyc.push_back(lc + LAT0 + nref);
            e_rh.push_back(i); e_pat.push_back(bp); e_f.push_back(bf); e_s.push_back(bs);
          end
        end
        nref++;
      end
    if (nref > REFHITS_PER_BX) n_over++;
    if (nref == 0) n_empty++;
  endtask

  initial begin
    strips_t maps [NCONV];
    int tmax [NCONV];
    bit seen [NCONV];
    hit_t next_state [NCONV][8];
    for (int l = 0; l < MAX_LAYERS; l++)
      for (int k = 0; k < MAX_INS_IN_LAYER; k++) hits_in[l][k] = '0;
    for (int c = 0; c < NCONV; c++) begin
      lb_valid[c] = 0; lb_word[c] = '0; lb_frame_end[c] = 0;
      for (int k = 0; k < 8; k++) begin rpc_state[c][k] = '0; next_state[c][k] = '0; end
    end
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (2) @(negedge clk);
    for (int per = 0; per < NBX / 2 + LAT0 / 16 + 2; per++) begin
      bit drain;
      drain = (per >= NBX / 2);
      for (int c = 0; c < NCONV; c++) begin
        for (int i = 0; i < MAXS; i++) maps[c][i] = 0;
        tmax[c] = 0; seen[c] = 0;
      end
      for (int clk_i = 0; clk_i < 16; clk_i++) begin
        bit forced;
        // RPC words on clocks 0..3, frame end on clock 3
        for (int c = 0; c < NCONV; c++) begin
          // in odd periods converter 1 (layer 14, a reference layer) gets two
          // single-strip clusters in chamber 3, strips 64 and 66; the second
          // (slot 1) drives channel 7 at angle 162, inside reference hit 55's
          // range
          forced = (c == 1 && per % 2 == 1);
          lb_valid[c] = !drain && clk_i < 4 && (forced ? clk_i == 0 : $urandom_range(0, 2) != 0);
          lb_frame_end[c] = (clk_i == 3);
          if (lb_valid[c]) begin
            logic [D-1:0] d;
            int ch, pt, tm;
            ch = $urandom_range(0, 3); pt = $urandom_range(0, 13); tm = $urandom_range(0, 4);
            for (int b = 0; b < D; b++) d[b] = ($urandom_range(0, 4) == 0);
            if ($urandom_range(0, 5) == 0) d = 8'b0011_1100;
            if (forced) begin ch = 3; pt = 8; d = 8'b0000_0101; end
            lb_word[c] = '{cham: C'(ch), part: P'(pt), ptime: T'(tm), data: d};
            if (pt < 12) begin
              for (int b = 0; b < D; b++) if (d[b]) maps[c][ch * 96 + pt * D + b] = 1;
              if (!seen[c] || tm > tmax[c]) tmax[c] = tm;
              seen[c] = 1;
            end
          end
        end
        if (clk_i == 3)
          for (int c = 0; c < NCONV; c++) begin
            cl_t o [4];
            widest(maps[c], 384, 96, M, L, o);
            for (int k = 0; k < 8; k++) next_state[c][k] = '0;
            for (int j = 0; j < L; j++)
              if (o[j].valid)
                next_state[c][2 * (o[j].base / 96) + j] =
                  '{active: 1'b1, phi: phi_t'(angle_of(o[j].base, o[j].size, 96, -192, 96, 1, 1))};
            if (o[1].valid) n_two++;
            for (int i = 0; i < 384; i++)
              if (maps[c][i] && (i % 96 == 0 || !maps[c][i-1]) && run_size(maps[c], 96, i, M) == 0) n_wide++;
          end
        // converter results reach the processor inputs 6 clocks after frame end
        if (clk_i == 9) rpc_state = next_state;
        if (clk_i == 0 || clk_i == 8) begin
          hits_t h;
          if (drain) begin
            for (int l = 0; l < MAX_LAYERS; l++)
              for (int k = 0; k < MAX_INS_IN_LAYER; k++) h[l][k] = '0;
          end else
            h = make_bx(((per * 2 + clk_i / 8) % 9 == 4) ? 0 : $urandom_range(1, 14), N_PATTERNS, 3);
          load_bx(h);
        end
        @(negedge clk);
        bx_load = 0;
      end
    end
    checks++;
    if (e_cyc.size() != 0) begin failures++; $display("%0d candidates never came", e_cyc.size()); end
    checks++;
    if (n_over == 0 || n_empty == 0 || n_wide == 0 || n_two == 0 || n_rpc_ref == 0 || n_cand < 50) begin
      failures++;
      $display("coverage missing");
    end
    $display("crossings >8 refhits %0d, empty %0d, too-wide clusters %0d, two-cluster frames %0d, refhits on converter channels %0d, candidates %0d",
             n_over, n_empty, n_wide, n_two, n_rpc_ref, n_cand);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
