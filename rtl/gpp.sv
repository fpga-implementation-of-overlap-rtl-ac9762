// gpp: Golden Pattern Processor - the chain of golden pattern units of one
// golden pattern, one unit per detector layer.
//
// All processors receive the same skewed connection-area data: layer l
// arrives l clocks after layer 0. Unit l adds its weight to the running sum
// of units 0..l-1 and counts its layer if it fired, so the last unit
// delivers the pattern's total "sum of weights" and number of fired layers.
// Timing: result after edge GPU_LAT + N_LAYERS - 1 counted from the clock
// in which layer 0 is presented. Following the processor description: GPUs
// of consecutive layers are connected in sequence.
module gpp
  import omtf_pkg::*;
#(
  parameter int PATTERN  = 0,
  parameter int N_LAYERS = MAX_LAYERS
) (
  input  logic               clk,
  input  logic               rst,
  input  layer_data_t        layers [N_LAYERS],
  output logic [SUM_W-1:0]   sum,
  output logic [FIRED_W-1:0] fired
);

  logic [SUM_W-1:0]   s_chain [N_LAYERS+1];
  logic [FIRED_W-1:0] f_chain [N_LAYERS+1];

  assign s_chain[0] = '0;
  assign f_chain[0] = '0;

  for (genvar l = 0; l < N_LAYERS; l++) begin : g_gpu
    gpu #(.PATTERN(PATTERN), .LAYER(l)) u_gpu (
      .clk       (clk),
      .rst       (rst),
      .din       (layers[l]),
      .sum_in    (s_chain[l]),
      .fired_in  (f_chain[l]),
      .sum_out   (s_chain[l+1]),
      .fired_out (f_chain[l+1])
    );
  end

  assign sum   = s_chain[N_LAYERS];
  assign fired = f_chain[N_LAYERS];

endmodule
