// tb_dsm_phase_detector_full: the whole detector at its default size (32
// nodes, 32-entry accumulators, 32-entry footprint tables, intervals of
// 3M/32 = 93,750 instructions), two complete intervals on every node,
// checked against the reference model of dsm_tb_core.
module tb_dsm_phase_detector_full;
  dsm_tb_core #(.FULL(1'b1), .NODES(32), .INTERVAL_LEN(93750), .FT_ENTRIES(32),
                .N_INTERVALS(2), .MAX_CYCLES(400000)) u_core ();
endmodule
