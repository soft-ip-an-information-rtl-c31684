// sde_fsm: FSM whose state codes hide a signature, in product-term form.
//
// The state register holds the code chosen by state difference encoding:
// along a chosen path of the state graph, the absolute difference between
// the codes of the start and end state of each selected edge equals one
// byte of the (encrypted) signature. To keep synthesis tools from
// re-encoding or minimising the machine, the logic is written the way the
// encoding flow's HDL generator emits it rather than as an enumerated FSM:
//   * every edge e gets a product term p[e] = (state == SRC[e]) AND
//     (inputs match VAL[e] on the bits set in CARE[e]);
//   * next-state bit b is the OR of the p[e] whose destination code has
//     bit b set; output bit o is the OR of the p[e] that drive o high;
//   * every state bit sits in its own scan_dff, chained from bit 0 to bit
//     SW-1, so a tester can scan in a start state, clock once with chosen
//     inputs, and scan out the destination code.
// A state/input pair that no edge covers makes every product term 0, so the
// next state is the all-zero code and all outputs are 0.
//
// Interface: in/out are the Mealy inputs and outputs, state the current
// code. scan_en = 1 shifts the chain: scan_in enters bit 0, scan_out is bit
// SW-1 (so a code is scanned in MSB first and read out MSB first). clr
// asynchronously loads RESET_CODE.
//
// The default parameters are the UART receiver's control FSM (see sde_pkg).
// The generation rules follow the encoding flow; packaging them as one
// parameterised module is this design's own choice.
module sde_fsm #(
  parameter int unsigned SW = sde_pkg::STATE_W,
  parameter int unsigned NI = sde_pkg::NUM_IN,
  parameter int unsigned NO = sde_pkg::NUM_OUT,
  parameter int unsigned NE = sde_pkg::NUM_EDGES,
  parameter logic [SW-1:0]          RESET_CODE = sde_pkg::RESET_CODE,
  parameter logic [NE-1:0][SW-1:0]  SRC  = sde_pkg::EDGE_SRC,
  parameter logic [NE-1:0][SW-1:0]  DST  = sde_pkg::EDGE_DST,
  parameter logic [NE-1:0][NI-1:0]  CARE = sde_pkg::EDGE_CARE,
  parameter logic [NE-1:0][NI-1:0]  VAL  = sde_pkg::EDGE_VAL,
  parameter logic [NE-1:0][NO-1:0]  OUTV = sde_pkg::EDGE_OUT
) (
  input  logic          clk,
  input  logic          clr,
  input  logic          scan_en,
  input  logic          scan_in,
  output logic          scan_out,
  input  logic [NI-1:0] in,
  output logic [NO-1:0] out,
  output logic [SW-1:0] state
);

  logic [NE-1:0] p;        // one product term per edge
  logic [SW-1:0] nstate;
  logic [SW-1:0] chain_in; // scan input of each bit (SW >= 2 assumed)

  // Product terms: AND over every state bit and every cared-for input bit.
  always_comb begin
    for (int e = 0; e < NE; e++) begin
      p[e] = (&(~(state ^ SRC[e]))) & (&(~((in ^ VAL[e]) & CARE[e])));
    end
  end

  // Sum-of-products next-state and output functions.
  always_comb begin
    nstate = '0;
    out    = '0;
    for (int e = 0; e < NE; e++) begin
      nstate = nstate | ({SW{p[e]}} & DST[e]);
      out    = out    | ({NO{p[e]}} & OUTV[e]);
    end
  end

  // One scan flip-flop per state bit, chained bit 0 -> bit SW-1.
  assign chain_in = {state[SW-2:0], scan_in};

  for (genvar b = 0; b < SW; b++) begin : g_bit
    scan_dff u_ff (
      .clk     (clk),
      .clr     (clr),
      .d       (nstate[b]),
      .si      (chain_in[b]),
      .se      (scan_en),
      .q       (state[b]),
      .rst_val (RESET_CODE[b])
    );
  end

  assign scan_out = state[SW-1];

endmodule
