// Testbench for ref_vector_memory (16 words).
// Loads vectors of random length with random write gaps and checks: full
// after the last word, empty until the vector is stored and falling exactly
// two cycles after the last word is taken, the stored words read back in
// order and repeated after wrap-round with random read gaps, reload
// starting a fresh load, and overflow with an over-long vector whose last
// word lands in the final location. A second memory in the distributed RAM
// style gets the same inputs and must match the block RAM one at every
// cycle.
module tb_ref_vector_memory;
  import sva_pkg::*;
  localparam int unsigned D = 16;

  logic clk = 1'b0, rst = 1'b1, reload = 1'b0;
  logic wr_en = 1'b0, full, rd_en = 1'b0, empty, loaded, overflow;
  word_t din = '0, dout;
  int checks = 0, failures = 0, cycles = 0;
  int n_wraps = 0;

  ref_vector_memory #(.DEPTH(D), .USE_BRAM(1'b1)) dut (.*);

  word_t dout_d;
  logic  full_d, empty_d, loaded_d, overflow_d;
  ref_vector_memory #(.DEPTH(D), .USE_BRAM(1'b0)) dut_d (
    .clk, .rst, .reload, .wr_en, .din, .full(full_d), .rd_en, .dout(dout_d),
    .empty(empty_d), .loaded(loaded_d), .overflow(overflow_d)
  );

  always @(negedge clk) begin
    if (!rst) begin
      check({full_d, empty_d, loaded_d, overflow_d} == {full, empty, loaded, overflow},
            "distributed RAM flags match");
      if (!empty) check(dout_d == dout, "distributed RAM data matches");
    end
  end

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", msg, cycles);
    end
  endtask

  // Load vec; returns after the word with the last flag is taken.
  task automatic load(input word_t vec [$]);
    int k = 0;
    while (k < vec.size()) begin
      @(negedge clk);
      wr_en = ($urandom_range(3) != 0);
      din   = vec[k];
      @(posedge clk);
      if (wr_en) begin
        check(!full, "full while loading");
        k++;
      end
    end
    @(negedge clk);
    wr_en = 1'b0;
    check(full, "full after last word");
    check(empty, "empty one cycle after last word");
    @(negedge clk);
    check(!empty && loaded, "readable two cycles after last word");
  endtask

  // Read n words with random gaps and compare with the stored vector.
  task automatic read_check(input word_t stored [$], input int n);
    int k = 0;
    while (k < n) begin
      @(negedge clk);
      check(!empty, "not empty while reading");
      check(dout == stored[k % stored.size()], $sformatf("read word %0d", k));
      rd_en = ($urandom_range(2) != 0);
      @(posedge clk);
      if (rd_en) begin
        k++;
        if (k % stored.size() == 0) n_wraps++;
      end
    end
    @(negedge clk);
    rd_en = 1'b0;
  endtask

  function automatic word_t mk(input int id, input logic last);
    word_t w;
    w.last = last;
    w.id   = ID_W'(id);
    w.val  = VAL_W'($urandom);
    return w;
  endfunction

  initial begin
    word_t v [$];
    word_t exp_v [$];
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    check(empty && !full, "after reset: empty, accepting writes");

    for (int rep = 0; rep < 6; rep++) begin
      int len;
      len = (rep == 0) ? 1 : (rep == 1 ? D : 1 + $urandom_range(D - 1));
      v.delete();
      for (int k = 0; k < len; k++) v.push_back(mk(rep * 50 + k, k == len - 1));
      @(negedge clk);
      reload = 1'b1;
      @(negedge clk);
      reload = 1'b0;
      check(empty && !full && !loaded, "reload empties the memory");
      load(v);
      check(!overflow, "no overflow within depth");
      read_check(v, 3 * len + 2);
    end

    // over-long vector: D + 5 words
    v.delete();
    exp_v.delete();
    for (int k = 0; k < D + 5; k++) v.push_back(mk(900 + k, k == D + 4));
    for (int k = 0; k < D - 1; k++) exp_v.push_back(v[k]);
    exp_v.push_back(v[D + 4]);
    @(negedge clk);
    reload = 1'b1;
    @(negedge clk);
    reload = 1'b0;
    load(v);
    check(overflow, "overflow flagged");
    read_check(exp_v, 2 * D);

    check(n_wraps >= 10, "read pointer wrapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
