// Reference model for the RGB-to-HSL testbenches.
//
// Computes the expected hue (whole degrees), saturation and luminance (full
// scale 0..255) of an 8-bit RGB pixel with plain signed integer arithmetic:
// the hue offset 60*(x-y)/d is floor-divided as a signed number and wrapped
// into 0..359, and saturation is d over the sum or over its complement
// 510 - sum. It shares no code with the converters.
package hsl_ref_pkg;

  function automatic int floor_div(int n, int d);
    int q;
    q = n / d;
    if ((n % d != 0) && ((n < 0) != (d < 0))) q = q - 1;
    return q;
  endfunction

  // Returns {h, s, l} packed as 9 + 8 + 8 bits.
  function automatic logic [24:0] ref_hsl(int r, int g, int b);
    int mx, mn, d, sum, h, s, l;
    mx = r; if (g > mx) mx = g; if (b > mx) mx = b;
    mn = r; if (g < mn) mn = g; if (b < mn) mn = b;
    d   = mx - mn;
    sum = mx + mn;
    l   = sum / 2;
    if (d == 0) begin
      h = 0;
      s = 0;
    end else begin
      if (r == mx)      h = floor_div(60 * (g - b), d);
      else if (g == mx) h = 120 + floor_div(60 * (b - r), d);
      else              h = 240 + floor_div(60 * (r - g), d);
      if (h < 0) h = h + 360;
      if (sum <= 255) s = (255 * d) / sum;
      else                           s = (255 * d) / (510 - sum);
    end
    return {9'(h), 8'(s), 8'(l)};
  endfunction

endpackage
