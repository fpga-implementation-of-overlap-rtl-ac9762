// rpc_cluster_sorter: keeps the L widest clusters of a strip map.
//
// The input gives a width for every strip position (non-zero only where a
// cluster starts). L selection passes run one after the other in the same
// clock: each takes the widest remaining cluster, the lower strip number
// winning a tie, and removes it. An output slot whose pass found nothing is
// marked invalid. Outputs are the clusters' base (first) strip numbers and
// widths, with the frame's time passed along. Timing: one clock.
// Following the converter description: the biggest clusters are selected and
// their base strip numbers are output. Own choice: the tie rule.
module rpc_cluster_sorter #(
  parameter int NS  = 384,
  parameter int L   = 2,
  parameter int SW  = 2,
  parameter int TW  = 3,
  parameter int BW  = $clog2(NS)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          in_valid,
  input  logic [SW-1:0] size [NS],
  input  logic [TW-1:0] in_time,
  output logic          out_valid,
  output logic          cl_valid [L],
  output logic [BW-1:0] cl_base  [L],
  output logic [SW-1:0] cl_size  [L],
  output logic [TW-1:0] out_time
);

  logic          sel_v [L];
  logic [BW-1:0] sel_b [L];
  logic [SW-1:0] sel_s [L];

  always_comb begin
    logic [NS-1:0] used;
    used = '0;
    for (int j = 0; j < L; j++) begin
      sel_v[j] = 1'b0;
      sel_b[j] = '0;
      sel_s[j] = '0;
      for (int i = 0; i < NS; i++)
        if (!used[i] && size[i] > sel_s[j]) begin
          sel_v[j] = 1'b1;
          sel_b[j] = BW'(i);
          sel_s[j] = size[i];
        end
      if (sel_v[j]) used[sel_b[j]] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= in_valid;
    out_time <= in_time;
    for (int j = 0; j < L; j++) begin
      cl_valid[j] <= sel_v[j];
      cl_base[j]  <= sel_b[j];
      cl_size[j]  <= sel_s[j];
    end
  end

endmodule
