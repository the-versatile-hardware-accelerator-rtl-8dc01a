// Testbench for processing_channel (small FIFOs and memory).
// For several rounds it reloads the reference memory, sends one reference
// vector through the reference FIFO and a run of database vectors through
// the database FIFO, and reads the processed FIFO with random gaps. Every
// result (headers, then dot product) is compared with a value computed
// here. Because the reference vector is reused for every database vector,
// the memory's wrap-round is exercised; the slow reader fills the processed
// FIFO and then the database FIFO, so back-pressure is exercised too. From
// the second round on, the next reference vector is queued in the
// reference FIFO while the memory still holds the old one, and only then is
// reload given; the queued words must wait and reach the new load intact.
// The run fails if the processed FIFO or the database FIFO never became
// full.
module tb_processing_channel;
  import sva_pkg::*;

  logic clk = 1'b0, rst = 1'b1, reload = 1'b0;
  logic [HDR_W-1:0] ref_hdr_len = HDR_W'(2), db_hdr_len = HDR_W'(1);
  logic hdr_order = 1'b0;
  logic db_wr_en = 1'b0, db_full, ref_wr_en = 1'b0, ref_full;
  word_t db_din = '0, ref_din = '0;
  logic out_rd_en = 1'b0, out_empty, ref_loaded, mem_overflow, busy, match;
  res_t out_dout;
  int checks = 0, failures = 0, cycles = 0;
  int n_out_full = 0, n_db_full = 0, n_match = 0;
  int rd_pct = 100;
  res_t exp_out [$];

  processing_channel #(.DB_DEPTH(16), .REF_DEPTH(32), .MEM_DEPTH(64), .OUT_DEPTH(8)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (dut.out_full) n_out_full++;
    if (db_full) n_db_full++;
    if (match) n_match++;
  end

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", msg, cycles);
    end
  endtask

  // host reader
  always @(negedge clk) out_rd_en = !out_empty && ($urandom_range(99) < rd_pct);
  always @(posedge clk) begin
    if (!rst && out_rd_en) begin
      check(exp_out.size() > 0, "unexpected result word");
      if (exp_out.size() > 0) begin
        res_t e;
        e = exp_out.pop_front();
        check(out_dout == e, $sformatf("result %h, expected %h", out_dout, e));
      end
    end
  end

  function automatic void gen_vec(output int ids [$], output int vals [$]);
    int len;
    ids.delete();
    vals.delete();
    len = 1 + $urandom_range(20);
    for (int id = 0; id < 64 && ids.size() < len; id++)
      if ($urandom_range(99) < 35) begin
        ids.push_back(id);
        vals.push_back(int'($urandom_range(65535)));
      end
    if (ids.size() == 0) begin
      ids.push_back(5);
      vals.push_back(9);
    end
  endfunction

  task automatic send_ref(input word_t w);
    @(negedge clk);
    while (ref_full) @(negedge clk);
    ref_wr_en = 1'b1;
    ref_din   = w;
    @(negedge clk);
    ref_wr_en = 1'b0;
  endtask

  task automatic send_db(input word_t w);
    @(negedge clk);
    while (db_full || $urandom_range(9) == 0) @(negedge clk);
    db_wr_en = 1'b1;
    db_din   = w;
    @(negedge clk);
    db_wr_en = 1'b0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    for (int round = 0; round < 4; round++) begin
      int rid [$], rv [$], did [$], dv [$];
      res_t rh [2];
      if (round == 0) begin
        @(negedge clk);
        reload = 1'b1;
        @(negedge clk);
        reload = 1'b0;
        check(!ref_loaded, "reload clears the memory");
      end
      rd_pct = (round % 2) ? 10 : 100;
      gen_vec(rid, rv);
      for (int k = 0; k < 2; k++) begin
        word_t w;
        w = '{last: 1'b0, id: ID_W'($urandom), val: VAL_W'($urandom)};
        rh[k] = res_t'({w.id, w.val});
        send_ref(w);
      end
      foreach (rid[k]) send_ref('{last: (k == rid.size() - 1), id: ID_W'(rid[k]), val: VAL_W'(rv[k])});
      if (round > 0) begin
        repeat (5) @(negedge clk);
        check(ref_loaded, "old vector kept while the next one waits");
        reload = 1'b1;
        @(negedge clk);
        reload = 1'b0;
      end
      while (!ref_loaded) @(negedge clk);
      for (int v = 0; v < 12; v++) begin
        longint unsigned sum;
        word_t h;
        gen_vec(did, dv);
        h = '{last: 1'b0, id: ID_W'($urandom), val: VAL_W'($urandom)};
        exp_out.push_back(rh[0]);
        exp_out.push_back(rh[1]);
        exp_out.push_back(res_t'({h.id, h.val}));
        sum = 0;
        foreach (did[j]) foreach (rid[i]) if (rid[i] == did[j]) sum += longint'(rv[i]) * longint'(dv[j]);
        exp_out.push_back(res_t'(sum));
        send_db(h);
        foreach (did[k]) send_db('{last: (k == did.size() - 1), id: ID_W'(did[k]), val: VAL_W'(dv[k])});
      end
      while (exp_out.size() != 0) @(negedge clk);
      check(ref_loaded && !mem_overflow, "reference stays loaded");
      check(!busy, "idle at the end of a round");
    end
    check(n_out_full > 0, "processed FIFO became full");
    check(n_db_full > 0, "database FIFO became full");
    check(n_match > 0, "matching IDs occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
