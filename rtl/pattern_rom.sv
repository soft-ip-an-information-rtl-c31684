// pattern_rom: detection patterns for reading the hidden signature.
//
// Entry i describes step i of the detection path through the control FSM:
// the start-state code to scan in, the input vector to apply for one clock,
// and the valid bit that says whether the code difference of that step
// carries a signature byte. The path visits states 8,0,1,2,3,4,5,8,0,1,2,
// 3,6,8,7 (14 steps). The contents come from sde_pkg::PATH; don't-care
// inputs are stored as 0.
//
// Interface: combinational read, pattern = ROM[addr]; addresses at or past
// DEPTH read as all zeros. The path, the codes, the inputs and the valid
// vector follow the design; the word layout is this design's choice.
module pattern_rom #(
  parameter int unsigned DEPTH = sde_pkg::PATH_LEN,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic [AW-1:0]     addr,
  output sde_pkg::pattern_t pattern
);

  sde_pkg::pattern_t rom [DEPTH];

  always_comb begin
    for (int i = 0; i < DEPTH; i++) rom[i] = sde_pkg::PATH[i];
  end

  always_comb begin
    if (32'(addr) < DEPTH) pattern = rom[addr];
    else                   pattern = '0;
  end

endmodule
