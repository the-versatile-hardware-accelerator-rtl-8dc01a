// End-to-end testbench of sparse_vec_accel with every parameter at its
// default (8 channels, 2048-word reference memories). Reference and
// database vectors carry up to 1,500 nonzero elements out of 20,000
// feature IDs, the vector size the design is meant for. The test body is
// tb_sva_top_run; the memory overflow case is left to the small test, as
// it would need a 2,000-word reference vector.
module tb_sparse_vec_accel_full;
  import sva_pkg::*;
  tb_sva_top_run #(
    .FULL(1'b1), .N(DEF_N_CHANNELS), .SW(DEF_SPLIT_WIDTH), .MEM_DEPTH(DEF_MEM_DEPTH),
    .NDB(30), .ROUNDS(4), .MAX_ID(20000), .MAX_LEN(1500), .DENSITY(8),
    .CHECK_OVF(1'b0), .WATCHDOG(3000000)
  ) run ();
endmodule
