// srisc_regmap: register map table of the renaming stage.
//
// One physical register number per architectural register. Decode reads the
// mappings of rs1, rs2 and rd combinationally; when the free register
// allocator picks a new destination, the map entry of rd is rewritten at the
// clock edge. The table also reports, as a bit vector over the physical
// registers, which of them are currently mapped, so the allocator can tell
// the unmapped ones. Reset maps architectural register i onto physical
// register i (this design's choice; the description gives no reset state).
module srisc_regmap
  import srisc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  areg_t             rs1,
  input  areg_t             rs2,
  input  areg_t             rd,
  output preg_t             p_rs1,
  output preg_t             p_rs2,
  output preg_t             p_rd,
  input  logic              wr_en,
  input  areg_t             wr_areg,
  input  preg_t             wr_preg,
  output logic [NPHYS-1:0]  mapped
);
  preg_t map [NARCH];

  assign p_rs1 = map[rs1];
  assign p_rs2 = map[rs2];
  assign p_rd  = map[rd];

  always_comb begin
    mapped = '0;
    for (int i = 0; i < NARCH; i++) mapped[map[i]] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NARCH; i++) map[i] <= preg_t'(i);
    end else if (wr_en) begin
      map[wr_areg] <= wr_preg;
    end
  end
endmodule
