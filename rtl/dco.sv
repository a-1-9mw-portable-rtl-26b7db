// dco: behavioural model of the 11-bit digitally controlled ring oscillator.
//
// Behavioural model, not synthesizable logic. The ring is a NAND gate (whose
// second input is the enable), two inverters and a chain of delay elements:
// the bottom row of four DCDEs always, and the top row of four more when the
// coarse bit ctrl[10] is 0 (low band). The coarse bit thus only selects the
// path. ctrl[9:3] is the 7-bit code of every DCDE; ctrl[2:0] counts the extra
// one-LSB devices switched on, spread round-robin over the DCDEs in the loop,
// so in the low band one more device changes the ring delay by one eighth of
// a code step. Ring structure, path selection and bit split follow the
// original design; the spreading of the three extra bits and all delay values are
// this design's choices (fitted to the 224 MHz - 1.06 GHz range).
//
// While enable is low the NAND holds the ring node high and the ring settles.
// When enable rises the node falls after the NAND delay: the oscillator
// restarts in a fixed phase. clk_out is the ring node (held high when
// disabled). Period = 2 x (NAND + 2 inverters + DCDE delays [+ the top-row
// route in the low band]).
//
// The path select is applied only at an instant when the two mux inputs
// carry the same level, so that switching never adds a second wavefront to
// the ring; the disconnected top row is held high.
//
// Interface: enable, ctrl (11-bit control word), clk_out.
module dco
  import adpll_pkg::*;
#(
  parameter real NAND_PS  = 10.0,
  parameter real INV_PS   = 10.0,
  parameter real ROUTE_PS = 179.0
) (
  input  logic       enable,
  input  ctrl_word_t ctrl,
  output logic       clk_out
);
  timeunit 1ps; timeprecision 1fs;

  logic               node;               // NAND output, the ring node
  logic               fb;                 // ring feedback into the NAND
  logic               long_sel;           // path select in effect
  logic               top_in, top_route;
  logic [8:0]         chain;              // chain[0] top-row input ... chain[8] bottom-row output
  logic               bot_in;
  logic               inv1, inv2;
  logic [FINE7_W-1:0] code;
  logic [2:0]         v;
  logic [EXTRA_W-1:0] extra [8];

  assign code = ctrl[CW_W-2 -: FINE7_W];
  assign v    = ctrl[EXTRA_W-1:0];

  // Extra devices: round-robin over the elements in the loop, bottom row
  // first (elements 4..7 are the bottom row).
  always_comb begin
    int unsigned n_el, per, rem, idx;
    n_el = long_sel ? 8 : 4;
    per  = 32'(v) / n_el;
    rem  = 32'(v) % n_el;
    for (int unsigned e = 0; e < 8; e++) begin
      int unsigned cnt;
      idx = (e >= 4) ? e - 4 : e + 4;     // order in which elements get devices
      cnt = (e >= 4 || long_sel) ? per + ((idx < rem) ? 1 : 0) : 0;
      extra[e] = EXTRA_W'((1 << cnt) - 1);
    end
  end

  // Every gate below schedules its output once at time zero and then on
  // each input change, so the ring settles from any power-up state while
  // enable is low.
  initial long_sel = 1'b0;

  // NAND with the enable.
  always begin
    node <= #(NAND_PS) ~(enable & fb);
    @(enable or fb);
  end

  // Coarse path select, applied only when the switch is glitch-free.
  always @(ctrl[CW_W-1] or node or chain[4])
    if (long_sel != ~ctrl[CW_W-1] && node == chain[4])
      long_sel = ~ctrl[CW_W-1];

  assign top_in = long_sel ? node : 1'b1;
  always begin
    top_route <= #(ROUTE_PS) top_in;
    @(top_in);
  end
  assign chain[0] = top_route;
  assign bot_in   = long_sel ? chain[4] : node;

  for (genvar i = 0; i < 8; i++) begin : g_dcde
    logic d_in;
    assign d_in = (i == 4) ? bot_in : chain[i];
    dcde u_dcde (
      .in    (d_in),
      .code  (code),
      .extra (extra[i]),
      .out   (chain[i+1])
    );
  end

  always begin
    inv1 <= #(INV_PS) ~chain[8];
    @(chain[8]);
  end
  always begin
    inv2 <= #(INV_PS) ~inv1;
    @(inv1);
  end
  assign fb = inv2;

  assign clk_out = node;
endmodule
