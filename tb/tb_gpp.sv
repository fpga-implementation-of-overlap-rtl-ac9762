// tb_gpp: one golden pattern processor with all 19 layers. A new random
// event (19 layer records, hits near the pattern's means or random) starts
// every clock, layer l delayed by l clocks as the connection-area builder
// delivers it. The total sum of weights and fired-layer count of each event
// are checked against the model 4 + 18 clocks after its layer 0.
module tb_gpp;
  import omtf_pkg::*;
  import omtf_cfg_pkg::*;
  import omtf_model_pkg::*;
  localparam int P = 9;
  localparam int NL = MAX_LAYERS;
  localparam int LAT = GPU_LAT + NL - 1;
  logic clk = 0, rst = 1;
  layer_data_t layers [NL];
  logic [SUM_W-1:0] sum;
  logic [FIRED_W-1:0] fired;
  int checks = 0, failures = 0, maxf = 0, minf = 99;

  gpp #(.PATTERN(P), .N_LAYERS(NL)) dut (.clk, .rst, .layers, .sum, .fired);
  always #5 clk = ~clk;

  localparam int NEV = 600;
  layers_t ev [NEV];

  initial begin
    for (int e = 0; e < NEV; e++) begin
      int r;
      r = $urandom_range(0, N_REF_LAYERS - 1);
      for (int l = 0; l < NL; l++) begin
        ev[e][l].valid = 1'b1;
        ev[e][l].ref_layer = REFL_W'(r);
        for (int k = 0; k < MAX_CONAR_OUTS; k++) begin
          int m;
          m = gpu_mean(P, l, r);
          ev[e][l].hits[k].active = ($urandom_range(0, 3) == 0) || (e % 7 == 0);
          ev[e][l].hits[k].dphi = phi_t'(satv(($urandom_range(0, 1) != 0) ? m + int'($urandom_range(0, 40)) - 20
                                                                          : int'($urandom_range(0, 1023)) - 512));
          ev[e][l].hits[k].phi = phi_t'(int'($urandom_range(0, 1023)) - 512);
        end
      end
    end
    for (int l = 0; l < NL; l++) layers[l] = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < NEV + LAT + 2; t++) begin
      @(negedge clk);
      for (int l = 0; l < NL; l++)
        layers[l] = (t - l >= 0 && t - l < NEV) ? ev[t-l][l] : '0;
      if (t - LAT >= 0 && t - LAT < NEV) begin
        int es, ef;
        pattern_score(P, NL, ev[t-LAT], es, ef);
        checks++;
        if (int'(sum) != es || int'(fired) != ef) begin
          failures++;
          if (failures < 10) $display("event %0d got %0d/%0d exp %0d/%0d", t-LAT, sum, fired, es, ef);
        end
        if (ef > maxf) maxf = ef;
        if (ef < minf) minf = ef;
      end
    end
    checks++;
    if (maxf < 10 || minf > 3) begin failures++; $display("coverage fired %0d..%0d", minf, maxf); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
