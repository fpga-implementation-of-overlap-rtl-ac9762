// rpc_cluster_size_calc: finds the strip clusters (runs of adjacent fired
// strips) of a strip map and their widths.
//
// The map holds N_CH chambers of NS_CH strips each; runs never continue
// across a chamber boundary. For every strip that starts a run the output
// gives the run width, or 0 when the run is wider than MAX_W strips (such a
// cluster is discarded); all other positions are 0. Width counting stops
// at MAX_W + 1, so the logic per strip is a fixed look-ahead window.
// Timing: one clock, in_valid -> out_valid. Following the converter
// description: clusters detected over consecutive partitions, limited to a
// maximum width, too-wide clusters get size 0.
module rpc_cluster_size_calc #(
  parameter int N_CH  = 4,
  parameter int NS_CH = 96,
  parameter int MAX_W = 3,
  parameter int SW    = 2,
  parameter int TW    = 3,
  parameter int NS    = N_CH * NS_CH
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          in_valid,
  input  logic [NS-1:0] strips,
  input  logic [TW-1:0] in_time,
  output logic          out_valid,
  output logic [SW-1:0] size [NS],
  output logic [TW-1:0] out_time
);

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= in_valid;
    out_time <= in_time;
    for (int i = 0; i < NS; i++) begin
      int  run;
      logic go;
      run = 0;
      go  = 1'b1;
      if (strips[i] && (i % NS_CH == 0 || !strips[i-1])) begin
        for (int k = 0; k <= MAX_W; k++)
          if (go && (i % NS_CH) + k < NS_CH && strips[i+k]) run++;
          else go = 1'b0;
      end
      size[i] <= (run > MAX_W) ? '0 : SW'(run);
    end
  end

endmodule
