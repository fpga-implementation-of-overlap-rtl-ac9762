// tb_refhit_prio_encoder: drives random reference-hit vectors into the
// priority encoder with random gaps between loads (shorter and longer than
// the number of set bits) and checks every output clock against a model:
// each clock the lowest pending bit leaves, and a load replaces the pending
// set. Also checks the load-to-first-output latency of one clock.
module tb_refhit_prio_encoder;
  localparam int N = 80;
  logic clk = 0, rst = 1, load = 0;
  logic [N-1:0] vec = '0;
  logic out_valid;
  logic [6:0] out_idx;
  int checks = 0, failures = 0;

  refhit_prio_encoder #(.N(N), .GROUP(10)) dut (.*);

  always #5 clk = ~clk;

  logic [N-1:0] model = '0;
  logic exp_v; int exp_i;
  int n_drop = 0, n_out = 0;

  // model updated at each edge, checked just after it
  always @(posedge clk) begin
    if (rst) begin
      model = '0; exp_v = 0; exp_i = 0;
    end else begin
      exp_v = 0; exp_i = 0;
      for (int b = 0; b < N; b++) if (model[b]) begin exp_v = 1; exp_i = b; break; end
      if (exp_v) model[exp_i] = 1'b0;
      if (load) begin
        if (model != '0) n_drop++;
        model = vec;
      end
    end
    #1;
    if (!rst) begin
      checks++;
      if (out_valid !== exp_v || (exp_v && out_idx !== 7'(exp_i))) begin
        failures++;
        if (failures < 10) $display("mismatch: got %0d/%0d exp %0d/%0d", out_valid, out_idx, exp_v, exp_i);
      end
      if (out_valid) n_out++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int r = 0; r < 400; r++) begin
      int gap, dens;
      gap  = 1 + $urandom_range(0, 12);
      dens = $urandom_range(1, 30);
      @(negedge clk);
      load = 1;
      for (int b = 0; b < N; b++) vec[b] = ($urandom_range(0, 99) < dens);
      if (r % 50 == 0) vec = '1;
      if (r % 50 == 1) vec = '0;
      @(negedge clk);
      load = 0;
      repeat (gap - 1) @(negedge clk);
    end
    repeat (100) @(negedge clk);
    // latency: single bit, output exactly one edge after load
    @(negedge clk); load = 1; vec = '0; vec[37] = 1'b1;
    @(posedge clk); #2 load = 0;
    @(posedge clk); #2;
    checks++;
    if (!(out_valid && out_idx == 7'd37)) begin failures++; $display("latency check failed"); end
    checks++;
    if (n_drop == 0 || n_out < 1000) begin failures++; $display("coverage: drops %0d outputs %0d", n_drop, n_out); end
    $display("reloads that dropped pending bits: %0d, outputs: %0d", n_drop, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
