// tb_sa_femip: end-to-end test of sa_femip on 64x64 frames (8x8 cells of
// 8x8 pixels), four frames with changing noise, a reduced feature target
// and a starting threshold low enough to extract features from the first
// frame and to reach the threshold lower bound.
module tb_sa_femip;
  tb_sa_femip_core #(.W(64), .H(64), .NFRAMES(4), .FULL(1'b0), .TH_T(32'd15), .TF_T(20), .OTF_T(1000), .CC_TH_T(32'd12_000_000)) u_core ();
endmodule
