// tb_prbram_full: the full workload at the top's default size, a 512x512
// image (4096 blocks), encoded twice in one run:
//   - in two BRAM loads of 2048 blocks, which fill the 131072-word block RAM,
//     so the partition is reconfigured 4 x 2 = 8 times (plus once for the
//     aborted run);
//   - in 128 BRAM loads of 32 blocks, 4 x 128 = 512 reconfigurations, the
//     smallest-load end of the series N_pr = 8 ... 512. The DC predictor
//     restarts with every load.
// See tb_prbram_env for the sequence.
module tb_prbram_full;
  tb_prbram_env #(.IMG_W(512), .IMG_H(512), .NLOADS(2), .NLOADS2(128), .CHECK_STAGES(1),
                  .WATCHDOG(70000000)) env ();
endmodule
