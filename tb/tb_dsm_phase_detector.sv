// tb_dsm_phase_detector: end-to-end test of the whole detector at reduced
// size: 8 nodes, 80-instruction intervals, a 4-entry footprint table (so
// that LRU replacement happens), 14 intervals per node. See dsm_tb_core.
module tb_dsm_phase_detector;
  dsm_tb_core #(.FULL(1'b0), .NODES(8), .INTERVAL_LEN(80), .FT_ENTRIES(4),
                .N_INTERVALS(14), .MAX_CYCLES(100000)) u_core ();
endmodule
