// tb_surf_top: end-to-end test of surf_top at a reduced 64x60 image size
// (72x80 raster), three full frames; see surf_tb_harness for what is
// checked.
module tb_surf_top;
  surf_tb_harness #(.FULL(1'b0)) u_harness ();
endmodule
