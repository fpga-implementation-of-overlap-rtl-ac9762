// tb_conar_builder: random hit sets are held while a random stream of
// reference-hit numbers (with idle clocks) enters the builder. For each
// reference hit the meta outputs must appear two clocks later and layer l's
// connection-area record (selected inputs, original angles, delta-phi with
// saturation) l clocks after that, matching the model.
module tb_conar_builder;
  import omtf_pkg::*;
  import omtf_cfg_pkg::*;
  import omtf_model_pkg::*;
  logic clk = 0, rst = 1;
  hit_t hits [MAX_LAYERS][MAX_INS_IN_LAYER];
  logic refhit_valid = 0;
  logic [REFHIT_W-1:0] refhit_idx = '0;
  logic meta_valid;
  logic [REFHIT_W-1:0] meta_refhit;
  logic [REFL_W-1:0] meta_ref_layer;
  layer_data_t layers_out [MAX_LAYERS];
  int checks = 0, failures = 0, n_sat = 0;

  conar_builder dut (.*);
  always #5 clk = ~clk;

  // per clock: expected layers (or invalid)
  layers_t expq [3000];
  bit      expv [$];
  int      expi [$];

  initial begin
    for (int l = 0; l < MAX_LAYERS; l++)
      for (int k = 0; k < MAX_INS_IN_LAYER; k++) hits[l][k] = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 3000; t++) begin
      if (t % 40 == 0)
        for (int l = 0; l < MAX_LAYERS; l++)
          for (int k = 0; k < MAX_INS_IN_LAYER; k++) begin
            hits[l][k].active = $urandom_range(0, 1);
            hits[l][k].phi = phi_t'(int'($urandom_range(0, 1023)) - 512);
          end
      refhit_valid = ($urandom_range(0, 3) != 0) && (t % 40 < 30);
      refhit_idx = REFHIT_W'($urandom_range(0, N_REFHITS - 1));
      expv.push_back(refhit_valid);
      expi.push_back(int'(refhit_idx));
      expq[t] = conar_model(hits, int'(refhit_idx));
      @(posedge clk); #1;
      // after edge t+1 (this one is edge t): meta of refhit t-1
      if (t >= 1) begin
        checks++;
        if (meta_valid !== expv[t-1] || (expv[t-1] && int'(meta_refhit) != expi[t-1])) failures++;
      end
      for (int l = 0; l < MAX_LAYERS; l++) begin
        int s;
        s = t - 1 - l;
        if (s >= 0) begin
          checks++;
          if (layers_out[l].valid !== expv[s]) failures++;
          else if (expv[s]) begin
            layer_data_t e;
            e = expq[s][l];
            if (layers_out[l].hits !== e.hits || layers_out[l].ref_layer !== e.ref_layer) begin
              failures++;
              if (failures < 4) begin $display("t=%0d layer %0d refhit %0d mismatch", t, l, expi[s]); for (int k = 0; k < MAX_CONAR_OUTS; k++) $display("  k%0d got %h exp %h", k, layers_out[l].hits[k], e.hits[k]); end
            end
            for (int k = 0; k < MAX_CONAR_OUTS; k++)
              if (e.hits[k].active && (e.hits[k].dphi == phi_t'(511) || e.hits[k].dphi == phi_t'(-512))) n_sat++;
          end
        end
      end
      @(negedge clk);
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("no saturated delta-phi seen"); end
    $display("saturated delta-phi values seen: %0d", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
