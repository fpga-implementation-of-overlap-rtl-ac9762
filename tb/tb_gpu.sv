// tb_gpu: feeds a new random layer record every clock into two golden
// pattern units (different pattern/layer, so different input counts,
// shifts and tables). Hits are placed near the pattern's mean, far from it
// (range-check failures) or left inactive. sum_in / fired_in are random and
// arrive three clocks after the data, as from the previous unit. Each output
// is checked against the model: sum_out = sum_in + weight and
// fired_out = fired_in + fired, four clocks after the data.
module tb_gpu;
  import omtf_pkg::*;
  import omtf_cfg_pkg::*;
  import omtf_model_pkg::*;
  localparam int P0 = 3, L0 = 5, P1 = 44, L1 = 12;
  logic clk = 0, rst = 1;
  layer_data_t din;
  logic [SUM_W-1:0]   sum_in, s0, s1;
  logic [FIRED_W-1:0] fired_in, f0, f1;
  int checks = 0, failures = 0, n_fired = 0, n_miss = 0;

  gpu #(.PATTERN(P0), .LAYER(L0)) u0 (.clk, .rst, .din, .sum_in, .fired_in, .sum_out(s0), .fired_out(f0));
  gpu #(.PATTERN(P1), .LAYER(L1)) u1 (.clk, .rst, .din, .sum_in, .fired_in, .sum_out(s1), .fired_out(f1));
  always #5 clk = ~clk;

  layer_data_t hist [$];
  int          sin_h [$], fin_h [$];

  function automatic layer_data_t rand_layer(input int p, input int l);
    layer_data_t d;
    int r, m;
    r = $urandom_range(0, N_REF_LAYERS - 1);
    d.valid = ($urandom_range(0, 7) != 0);
    d.ref_layer = REFL_W'(r);
    m = gpu_mean(p, l, r);
    for (int k = 0; k < MAX_CONAR_OUTS; k++) begin
      int v;
      d.hits[k].active = ($urandom_range(0, 2) != 0);
      case ($urandom_range(0, 3))
        0, 1: v = m + int'($urandom_range(0, 60)) - 30;
        2:    v = m + int'($urandom_range(0, 600)) - 300;
        default: v = int'($urandom_range(0, 1023)) - 512;
      endcase
      d.hits[k].dphi = phi_t'(satv(v));
      d.hits[k].phi  = phi_t'(int'($urandom_range(0, 1023)) - 512);
    end
    return d;
  endfunction

  initial begin
    din = '0; sum_in = '0; fired_in = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      din = rand_layer(($urandom_range(0,1) == 0) ? P0 : P1, ($urandom_range(0,1) == 0) ? L0 : L1);
      hist.push_back(din);
      sum_in   = SUM_W'($urandom_range(0, 4000));
      fired_in = FIRED_W'($urandom_range(0, 17));
      sin_h.push_back(int'(sum_in));
      fin_h.push_back(int'(fired_in));
      if (t >= 3) begin
        // data of t-3, sum_in of now -> checked after next edge
        layer_data_t d;
        bit fa, fb; int wa, wb, si, fi;
        d = hist[t-3];
        si = int'(sum_in); fi = int'(fired_in);
        layer_score(P0, L0, d, fa, wa);
        layer_score(P1, L1, d, fb, wb);
        @(posedge clk); #1;
        checks += 2;
        if (int'(s0) != si + wa || int'(f0) != fi + int'(fa)) begin
          failures++;
          if (failures < 10) $display("u0 t=%0d got %0d/%0d exp %0d/%0d", t, s0, f0, si+wa, fi+int'(fa));
        end
        if (int'(s1) != si + wb || int'(f1) != fi + int'(fb)) begin
          failures++;
          if (failures < 10) $display("u1 t=%0d got %0d/%0d exp %0d/%0d", t, s1, f1, si+wb, fi+int'(fb));
        end
        if (fa) n_fired++; else n_miss++;
      end
    end
    checks++;
    if (n_fired < 100 || n_miss < 100) begin failures++; $display("coverage fired %0d miss %0d", n_fired, n_miss); end
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
