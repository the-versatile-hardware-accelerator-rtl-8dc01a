// End-to-end testbench of sparse_vec_accel at small sizes: 9 channels
// behind splitters of 3 outputs (two levels), 64-word reference memories
// and short FIFOs, so that stalls, wrap-round, overflow and the cascade
// all occur within a few thousand cycles. The test body is tb_sva_top_run.
module tb_sparse_vec_accel;
  tb_sva_top_run #(.FULL(1'b0), .N(9), .SW(3), .MEM_DEPTH(64), .NDB(10), .ROUNDS(6)) run ();
endmodule
