// weight_lut: the "weight" look-up table of one golden pattern unit, a
// 2**LUT_AW x WEIGHT_W read-only memory with a registered read (one block
// RAM on the target FPGA).
//
// The address is {reference layer, phi_dist field, phi_hit field}; the data
// is the weight of that layer for pattern PATTERN. Contents are filled at
// initialisation from omtf_cfg_pkg::gpu_weight(PATTERN, LAYER, address),
// so every LUT of the 950-unit processor gets its own table by index,
// without a constant record holding all of them. Timing: data valid one
// clock after addr. Following the processor description: one weight table
// per pattern and layer, addressed by reference layer, phi_dist and phi_hit
// bits, held in block RAM. Own choice: 2048 x 9 geometry.
module weight_lut
  import omtf_pkg::*;
  import omtf_cfg_pkg::*;
#(
  parameter int PATTERN = 0,
  parameter int LAYER   = 0
) (
  input  logic                clk,
  input  logic [LUT_AW-1:0]   addr,
  output logic [WEIGHT_W-1:0] data
);

  logic [WEIGHT_W-1:0] rom [2**LUT_AW];

  initial begin
    for (int a = 0; a < 2**LUT_AW; a++)
      rom[a] = gpu_weight(PATTERN, LAYER, LUT_AW'(a));
  end

  always_ff @(posedge clk) data <= rom[addr];

endmodule
