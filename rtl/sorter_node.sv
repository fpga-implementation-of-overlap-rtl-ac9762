// sorter_node: elementary sorter of the muon sorter tree. Registers the best
// of FAN golden-pattern candidates: more fired layers wins, then the larger
// sum of weights, then (tie) the lower input position. Inputs marked
// invalid never win; if none is valid the output is invalid.
// Latency: one clock.
module sorter_node
  import omtf_pkg::*;
#(
  parameter int FAN = 4
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      in_valid [FAN],
  input  gp_cand_t  in_cand  [FAN],
  output logic      out_valid,
  output gp_cand_t  out_cand
);

  logic     b_valid;
  gp_cand_t b_cand;

  always_comb begin
    b_valid = 1'b0;
    b_cand  = '0;
    for (int i = 0; i < FAN; i++)
      if (in_valid[i] && (!b_valid ||
          {in_cand[i].fired, in_cand[i].sum} > {b_cand.fired, b_cand.sum})) begin
        b_valid = 1'b1;
        b_cand  = in_cand[i];
      end
  end

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= b_valid;
    out_cand <= b_cand;
  end

endmodule
