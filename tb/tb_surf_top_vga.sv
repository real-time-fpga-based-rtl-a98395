// tb_surf_top_vga: one complete 640x480 frame through surf_top in a 672x482
// raster, the smaller of the two evaluated resolutions (420.8 frames/s at a
// 136.3 MHz pixel clock). Only the image and raster sizes are overridden;
// see surf_tb_harness for what is checked. The harness ends the run and has
// its own watchdog; the one here is a last resort in case the harness hangs
// before its own watchdog starts (about ten times the expected run time).
module tb_surf_top_vga;
  surf_tb_harness #(.VGA(1'b1)) u_harness ();

  initial begin
    #100_000_000;
    $display("outer watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
