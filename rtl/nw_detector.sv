// nw_detector: narrow-width detecting logic at the write-back stage.
// Thirty-two zero-detection units, one per thread of the warp, each give a 2-bit
// width code; a max-reduction over the codes yields the upper-bound width that is
// sufficient for every thread's value. Because the codes are ordered
// (01 < 10 < 11), the upper bound is simply the largest code.
// Interface: the 32 thread results in, the warp width out. Combinational.
// The structure (32 units and an upper-bound comparison) is the document's; the
// reduction being a linear max chain is this design's choice.
module nw_detector
  import owar_pkg::*;
(
  input  warp_data_t data,
  output width_e     warp_width
);
  width_e thread_w [WARP_SIZE];

  for (genvar t = 0; t < WARP_SIZE; t++) begin : g_zd
    zero_detect u_zd (.value(data[t]), .width(thread_w[t]));
  end

  always_comb begin
    warp_width = W_8;
    for (int t = 0; t < WARP_SIZE; t++)
      if (thread_w[t] > warp_width) warp_width = thread_w[t];
  end
endmodule
