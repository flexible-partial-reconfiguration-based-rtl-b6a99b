// tb_prbram_top: end-to-end test of the overlay on a small 32x16 image in two
// BRAM loads (8 blocks), with the intermediate stages spot-checked. The top
// keeps its default parameters. See tb_prbram_env for the sequence.
module tb_prbram_top;
  tb_prbram_env #(.IMG_W(32), .IMG_H(16), .NLOADS(2), .CHECK_STAGES(1), .WATCHDOG(2000000)) env ();
endmodule
