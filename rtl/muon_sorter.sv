// muon_sorter: selects the golden pattern that best matches the data of one
// reference hit - the one with the most fired layers and, among those, the
// highest sum of weights.
//
// The selection is a tree of registered elementary sorters with FAN inputs
// each. The number of levels is found from N and FAN (smallest LEVELS with
// FAN**LEVELS >= N) and each level has ceil(N / FAN**k) nodes; the last node
// of a level takes only the inputs that exist. Ties go to the lower pattern
// number. Latency: LEVELS clocks; a new set of inputs every clock.
// Following the processor description: a multilevel tree of sorters whose
// depth is derived automatically from the number of patterns and the
// elementary sorter's inputs. Own choices: FAN = 4 and the tie rule.
module muon_sorter
  import omtf_pkg::*;
#(
  parameter int N   = N_PATTERNS,
  parameter int FAN = 4
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [SUM_W-1:0]   sums   [N],
  input  logic [FIRED_W-1:0] fireds [N],
  output logic               best_valid,
  output gp_cand_t           best
);

  function automatic int nodes_at(input int n, input int f, input int k);
    int c;
    c = n;
    for (int i = 0; i < k; i++) c = (c + f - 1) / f;
    return c;
  endfunction

  localparam int LEVELS = sorter_levels(N, FAN);

  logic     lv_valid [LEVELS+1][N];
  gp_cand_t lv_cand  [LEVELS+1][N];

  for (genvar i = 0; i < N; i++) begin : g_in
    assign lv_valid[0][i]       = 1'b1;
    assign lv_cand[0][i].fired   = fireds[i];
    assign lv_cand[0][i].sum     = sums[i];
    assign lv_cand[0][i].pattern = PAT_W'(i);
  end

  for (genvar k = 1; k <= LEVELS; k++) begin : g_lvl
    localparam int NPREV = nodes_at(N, FAN, k - 1);
    localparam int NNODE = nodes_at(N, FAN, k);
    for (genvar j = 0; j < N; j++) begin : g_node
      if (j < NNODE) begin : g_used
        logic     v [FAN];
        gp_cand_t c [FAN];
        for (genvar i = 0; i < FAN; i++) begin : g_pin
          if (j * FAN + i < NPREV) begin : g_conn
            assign v[i] = lv_valid[k-1][j*FAN+i];
            assign c[i] = lv_cand[k-1][j*FAN+i];
          end else begin : g_tie
            assign v[i] = 1'b0;
            assign c[i] = '0;
          end
        end
        sorter_node #(.FAN(FAN)) u_node (
          .clk       (clk),
          .rst       (rst),
          .in_valid  (v),
          .in_cand   (c),
          .out_valid (lv_valid[k][j]),
          .out_cand  (lv_cand[k][j])
        );
      end else begin : g_unused
        assign lv_valid[k][j] = 1'b0;
        assign lv_cand[k][j]  = '0;
      end
    end
  end

  assign best_valid = lv_valid[LEVELS][0];
  assign best       = lv_cand[LEVELS][0];

endmodule
