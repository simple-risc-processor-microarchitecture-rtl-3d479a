// srisc_free_alloc: Free Register Allocate circuit (combinational).
//
// A physical register may become the renamed destination when its value is
// valid (no older instruction still has to write it), its reader counter is
// zero (no waiting instruction still has to read it) and the instruction
// being renamed does not read it. The register currently mapped to the
// destination's architectural register is taken when it qualifies, as the
// description says the map is changed only when that register is not free;
// otherwise the lowest numbered unmapped register that qualifies is taken.
// found is low when no register qualifies, which stalls decode.
module srisc_free_alloc
  import srisc_pkg::*;
(
  input  logic [NPHYS-1:0] reg_valid,   // v bits of the register set
  input  logic [NPHYS-1:0] cnt_zero,    // cnt == 0 per register
  input  logic [NPHYS-1:0] mapped,      // register is in the map table
  input  preg_t            cur,         // current mapping of the destination
  input  logic [NPHYS-1:0] exclude,     // sources of the instruction being renamed
  output logic             found,
  output preg_t            preg,
  output logic             remap        // preg differs from cur: map table must be written
);
  logic [NPHYS-1:0] usable, spare;
  logic             spare_any;
  preg_t            spare_first;

  assign usable = reg_valid & cnt_zero & ~exclude;
  assign spare  = usable & ~mapped;

  // Lowest numbered spare register.
  always_comb begin
    spare_any   = |spare;
    spare_first = '0;
    for (int i = NPHYS - 1; i >= 0; i--)
      if (spare[i]) spare_first = preg_t'(i);
  end

  assign found = usable[cur] || spare_any;
  assign preg  = usable[cur] ? cur : spare_first;
  assign remap = !usable[cur] && spare_any;
endmodule
