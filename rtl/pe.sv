// pe: processing element of the PU. It outputs the absolute difference between the
// search-window pixel held in its chain register and the template pixel held beside it.
// Purely combinational; the SAD adder of the SBSA sums the 64 outputs of its PU.
//
// Published design: a PE outputs the absolute difference of a window and a template pixel.
module pe
  import ime_pkg::*;
(
  input  pix_t sw,   // search-window pixel
  input  pix_t tb,   // template-block pixel
  output pix_t ad    // |sw - tb|
);
  always_comb ad = (sw > tb) ? pix_t'(sw - tb) : pix_t'(tb - sw);
endmodule
