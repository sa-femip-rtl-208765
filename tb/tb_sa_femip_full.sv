// tb_sa_femip_full: sa_femip with every parameter at its default
// (1024x1024 frames, 8x8 cells of 128x128 pixels, thresholds starting at the
// largest value). Two frames: filtering, noise estimation, reconfiguration,
// corner-response thresholding, threshold update, NMS and matching of the
// second frame against the first.
module tb_sa_femip_full;
  tb_sa_femip_core #(.W(1024), .H(1024), .NFRAMES(2), .FULL(1'b1), .MAXCYC(6000000)) u_core ();
endmodule
