// tb_color_classifier - self-checking test of the threshold colour
// classifier: the six cube colours at nominal values, then random RGB
// triples and random threshold sets against an integer reference model of
// the rule order (white, yellow, orange, red, blue, green, else unknown).
module tb_color_classifier;
  import cubebot_pkg::*;
  int checks = 0, failures = 0;
  rgb8_t rgb;
  thr_t  thr;
  color_e color;

  color_classifier dut (.rgb, .thr, .color);

  function automatic color_e ref_cls(input int r, input int g, input int b, input thr_t t);
    int mn, wmin, dmin, mg, ogm, ygm, ybm;
    wmin = int'(t.white_min); dmin = int'(t.dom_min); mg = int'(t.margin);
    ogm = int'(t.orange_g_min); ygm = int'(t.yellow_g_min); ybm = int'(t.yellow_b_max);
    mn = (r < g) ? r : g;
    mn = (b < mn) ? b : mn;
    if (mn >= wmin) return C_WHITE;
    if (r >= ygm && g >= ygm && b <= ybm) return C_YELLOW;
    if (r >= dmin && r - b >= mg && g >= ogm) return C_ORANGE;
    if (r >= dmin && r - b >= mg && r - g >= mg) return C_RED;
    if (b >= dmin && b - r >= mg && b - g >= mg) return C_BLUE;
    if (g >= dmin && g - r >= mg && g - b >= mg) return C_GREEN;
    return C_UNKNOWN;
  endfunction

  task automatic check(input color_e exp, input string what);
    #1;
    checks++;
    if (color != exp) begin
      failures++;
      $display("FAIL %s: rgb=%0d,%0d,%0d got %0d exp %0d", what, rgb.r, rgb.g, rgb.b, color, exp);
    end
  endtask

  initial begin
    #100000 $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int seen [8];
    thr = THR_DEFAULT;
    rgb = '{r: 8'd250, g: 8'd250, b: 8'd245}; check(C_WHITE,  "white");
    rgb = '{r: 8'd220, g: 8'd30,  b: 8'd30};  check(C_RED,    "red");
    rgb = '{r: 8'd20,  g: 8'd40,  b: 8'd200}; check(C_BLUE,   "blue");
    rgb = '{r: 8'd240, g: 8'd120, b: 8'd20};  check(C_ORANGE, "orange");
    rgb = '{r: 8'd20,  g: 8'd180, b: 8'd60};  check(C_GREEN,  "green");
    rgb = '{r: 8'd230, g: 8'd220, b: 8'd30};  check(C_YELLOW, "yellow");
    rgb = '{r: 8'd90,  g: 8'd90,  b: 8'd90};  check(C_UNKNOWN, "grey");
    for (int i = 0; i < 4000; i++) begin
      color_e e;
      rgb = rgb8_t'($urandom());
      if (i % 2 == 1) thr = thr_t'({$urandom(), $urandom()});
      else            thr = THR_DEFAULT;
      e = ref_cls(int'(rgb.r), int'(rgb.g), int'(rgb.b), thr);
      seen[e]++;
      check(e, "random");
    end
    // Every class must have been produced by the random sweep.
    foreach (seen[k]) if (k != 6) begin
      checks++;
      if (seen[k] == 0) begin failures++; $display("FAIL class %0d never seen", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
