// color_classifier - threshold decision tree from an average RGB value to a
// cube colour code. Purely combinational.
//
// The tree is evaluated in this order, first match wins:
//   1. white : min(R,G,B) >= white_min            (bright on all channels)
//   2. yellow: R >= yellow_g_min, G >= yellow_g_min, B <= yellow_b_max
//   3. red / orange: R >= dom_min and R exceeds B by `margin`
//                    (cross-channel check); G >= orange_g_min -> orange,
//                    otherwise R must also exceed G by `margin` -> red
//   4. blue  : B >= dom_min, B exceeds R and G by `margin`
//   5. green : G >= dom_min, G exceeds R and B by `margin`
//   6. anything else -> unknown
//
// The channel rules follow the published description (white by overall
// brightness, red by red dominance with cross-channel validation, blue by
// blue dominance with a gate, further thresholds for yellow, orange and
// green, an ambiguous result reported as such). The numeric thresholds are
// inputs, loaded from calibration registers; their defaults are this
// design's own.
module color_classifier
  import cubebot_pkg::*;
(
  input  rgb8_t  rgb,
  input  thr_t   thr,
  output color_e color
);
  logic [8:0] r, g, b;
  logic [7:0] mn;

  always_comb begin
    r  = 9'(rgb.r);
    g  = 9'(rgb.g);
    b  = 9'(rgb.b);
    mn = rgb.r;
    if (rgb.g < mn) mn = rgb.g;
    if (rgb.b < mn) mn = rgb.b;

    if (mn >= thr.white_min)
      color = C_WHITE;
    else if (rgb.r >= thr.yellow_g_min && rgb.g >= thr.yellow_g_min && rgb.b <= thr.yellow_b_max)
      color = C_YELLOW;
    else if (rgb.r >= thr.dom_min && r >= b + 9'(thr.margin) && rgb.g >= thr.orange_g_min)
      color = C_ORANGE;
    else if (rgb.r >= thr.dom_min && r >= b + 9'(thr.margin) && r >= g + 9'(thr.margin))
      color = C_RED;
    else if (rgb.b >= thr.dom_min && b >= r + 9'(thr.margin) && b >= g + 9'(thr.margin))
      color = C_BLUE;
    else if (rgb.g >= thr.dom_min && g >= r + 9'(thr.margin) && g >= b + 9'(thr.margin))
      color = C_GREEN;
    else
      color = C_UNKNOWN;
  end

endmodule
