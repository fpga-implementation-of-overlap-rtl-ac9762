// tb_refhit_detector: random hits (many placed inside reference-hit ranges,
// some just outside or inactive) are loaded; the registered vector is checked
// against the definitions, the registered hits against the inputs, and the
// vector must not change on clocks without a load.
module tb_refhit_detector;
  import omtf_pkg::*;
  import omtf_cfg_pkg::*;
  import omtf_model_pkg::*;
  logic clk = 0, rst = 1, bx_load = 0;
  hit_t hits_in [MAX_LAYERS][MAX_INS_IN_LAYER];
  hit_t hits_q  [MAX_LAYERS][MAX_INS_IN_LAYER];
  logic [N_REFHITS-1:0] refhit_vec;
  logic load_q;
  int checks = 0, failures = 0, n_set = 0, n_clear = 0;

  refhit_detector dut (.clk, .rst, .bx_load, .hits_in, .hits_q, .refhit_vec, .load_q);
  always #5 clk = ~clk;

  task automatic randomize_hits();
    for (int l = 0; l < MAX_LAYERS; l++)
      for (int k = 0; k < MAX_INS_IN_LAYER; k++) begin
        hits_in[l][k].active = ($urandom_range(0, 3) != 0);
        hits_in[l][k].phi    = phi_t'(int'($urandom_range(0, 1023)) - 512);
      end
    // put some hits exactly on range edges
    for (int i = 0; i < N_REFHITS; i += 3) begin
      refhit_def_t d;
      d = refhit_def(i);
      case ($urandom_range(0, 3))
        0: hits_in[d.layer][d.input_nr].phi = d.phi_lo;
        1: hits_in[d.layer][d.input_nr].phi = d.phi_hi;
        2: hits_in[d.layer][d.input_nr].phi = d.phi_lo - 1;
        default: hits_in[d.layer][d.input_nr].phi = d.phi_hi + 1;
      endcase
    end
  endtask

  initial begin
    hits_t ref_h;
    randomize_hits();
    repeat (3) @(negedge clk);
    rst = 0;
    for (int r = 0; r < 200; r++) begin
      @(negedge clk);
      randomize_hits();
      ref_h = hits_in;
      bx_load = 1;
      @(negedge clk);
      bx_load = 0;
      checks++;
      if (!load_q) failures++;
      for (int i = 0; i < N_REFHITS; i++) begin
        bit e;
        e = refhit_match(ref_h, i);
        checks++;
        if (refhit_vec[i] !== e) begin
          failures++;
          if (failures < 10) $display("refhit %0d got %0d exp %0d", i, refhit_vec[i], e);
        end
        if (e) n_set++; else n_clear++;
      end
      for (int l = 0; l < MAX_LAYERS; l++)
        for (int k = 0; k < MAX_INS_IN_LAYER; k++) begin
          checks++;
          if (hits_q[l][k] !== ref_h[l][k]) failures++;
        end
      // without a load the outputs hold
      randomize_hits();
      @(negedge clk);
      checks++;
      if (load_q) failures++;
      for (int i = 0; i < N_REFHITS; i++) begin
        checks++;
        if (refhit_vec[i] !== refhit_match(ref_h, i)) failures++;
      end
    end
    checks++;
    if (n_set < 100 || n_clear < 100) failures++;
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
