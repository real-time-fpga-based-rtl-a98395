// tb_surf_top_full: one complete 1920x1080 frame through surf_top with all
// parameters at their defaults; see surf_tb_harness for what is checked.
module tb_surf_top_full;
  surf_tb_harness #(.FULL(1'b1)) u_harness ();
endmodule
