// adpll_pkg: types and constants shared by the ADPLL frequency synthesizer.
//
// The synthesizer multiplies a 50 MHz reference clock to one of six output
// frequencies chosen by one-hot select lines (S300M, S400M, S500M, S600M,
// S850M, S1-G). The DCO is tuned by an 11-bit control word: bit 10 is the
// coarse path select, bits 9:3 the 7-bit DCDE code and bits 2:0 the extra
// minimum-step devices. Frequency is measured by counting DCO edges during
// the high half of the reference clock (10 ns): a target of k x 100 MHz
// needs k rising edges, a target of (k - 0.5) x 100 MHz needs k falling
// edges. The tap/odd table follows the frequency labels printed on the
// counter taps; the multiplication ratios follow the select names.
package adpll_pkg;
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned CW_W      = 11;  // DCO control word width
  localparam int unsigned FINE7_W   = 7;   // DCDE binary-weighted code
  localparam int unsigned EXTRA_W   = 3;   // extra minimum-step devices
  localparam int unsigned N_SEL     = 6;   // number of output frequencies
  localparam int unsigned CNT_LEN   = 10;  // flip-flops in the DCO counter
  localparam int unsigned PGAIN_W   = 4;   // phase gain register width
  localparam int unsigned RATIO_W   = 5;   // holds the largest ratio, 20

  typedef logic [CW_W-1:0] ctrl_word_t;

  // Index of each select line in the sel bus.
  typedef enum logic [2:0] {
    F300M = 3'd0, F400M = 3'd1, F500M = 3'd2,
    F600M = 3'd3, F850M = 3'd4, F1G   = 3'd5
  } freq_e;

  // Counter setting for one output frequency.
  typedef struct packed {
    logic [3:0]         tap;    // 1-based counter flip-flop whose output is compared
    logic               odd;    // count falling instead of rising DCO edges
    logic [RATIO_W-1:0] ratio;  // output frequency / reference frequency
  } count_cfg_t;

  // Decode the one-hot select bus. An all-zero or multi-hot bus falls back
  // to the lowest selected entry, or to 300 MHz when none is set.
  function automatic count_cfg_t decode_sel(input logic [N_SEL-1:0] sel);
    count_cfg_t c;
    c = '{tap: 4'd3, odd: 1'b0, ratio: 5'd6};
    if      (sel[F300M]) c = '{tap: 4'd3,  odd: 1'b0, ratio: 5'd6};
    else if (sel[F400M]) c = '{tap: 4'd4,  odd: 1'b0, ratio: 5'd8};
    else if (sel[F500M]) c = '{tap: 4'd5,  odd: 1'b0, ratio: 5'd10};
    else if (sel[F600M]) c = '{tap: 4'd6,  odd: 1'b0, ratio: 5'd12};
    else if (sel[F850M]) c = '{tap: 4'd9,  odd: 1'b1, ratio: 5'd17};
    else if (sel[F1G])   c = '{tap: 4'd10, odd: 1'b0, ratio: 5'd20};
    return c;
  endfunction
endpackage
