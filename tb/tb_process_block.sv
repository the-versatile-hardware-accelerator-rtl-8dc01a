// Testbench for process_block.
// Streams pairs of random sparse vectors (sorted unique IDs from a small
// range, so that IDs often match) with random header lengths and both
// header orders. The expected output words (headers in the chosen order,
// then the dot product) are computed here from the same vectors. Phase 1
// runs with no stalls and checks the cycle cost of every pair against
//   max(hr, hd, 1) + merge steps + drained words + 1 + hr + hd + 1.
// Phase 2 adds random gaps on both inputs and random output back-pressure.
// It also counts pairs where the reference ended first, the database ended
// first and both ended together, and fails if any case never occurred.
module tb_process_block;
  import sva_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic [HDR_W-1:0] ref_hdr_len = '0, db_hdr_len = '0;
  logic hdr_order = 1'b0;
  logic ref_empty, ref_rd_en, db_empty, db_rd_en, out_wr_en, out_full, busy, match;
  word_t ref_data, db_data;
  res_t out_data;
  int checks = 0, failures = 0, cycles = 0;
  int n_ref_first = 0, n_db_first = 0, n_both = 0, n_match = 0;
  int gap_pct = 0, full_pct = 0;
  logic ref_gap = 1'b0, db_gap = 1'b0;

  word_t rq [$];
  word_t dq [$];
  res_t  exp_out [$];
  int    exp_cost [$];
  int    last_res_cycle;

  process_block dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  assign ref_empty = (rq.size() == 0) || ref_gap;
  assign db_empty  = (dq.size() == 0) || db_gap;
  assign ref_data  = (rq.size() == 0) ? '0 : rq[0];
  assign db_data   = (dq.size() == 0) ? '0 : dq[0];

  always @(negedge clk) begin
    ref_gap  = ($urandom_range(99) < gap_pct);
    db_gap   = ($urandom_range(99) < gap_pct);
    out_full = ($urandom_range(99) < full_pct);
  end

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", msg, cycles);
    end
  endtask

  always @(posedge clk) begin
    if (!rst) begin
      if (ref_rd_en) begin
        check(!ref_empty, "read from empty reference stream");
        void'(rq.pop_front());
      end
      if (db_rd_en) begin
        check(!db_empty, "read from empty database stream");
        void'(dq.pop_front());
      end
      if (match) n_match++;
      if (out_wr_en) begin
        check(!out_full, "write to full output");
        check(exp_out.size() > 0, "unexpected output word");
        if (exp_out.size() > 0) begin
          res_t e;
          logic is_res;
          e = exp_out.pop_front();
          check(out_data == e, $sformatf("output word %h, expected %h", out_data, e));
        end
      end
    end
  end

  // Random sorted vector of unique IDs below 48.
  function automatic void gen_vec(output int ids [$], output int vals [$]);
    int len;
    ids.delete();
    vals.delete();
    len = 1 + $urandom_range(11);
    for (int id = 0; id < 48 && ids.size() < len; id++) begin
      if ($urandom_range(99) < 30) begin
        ids.push_back(id);
        vals.push_back(int'($urandom_range(65535)));
      end
    end
    if (ids.size() == 0) begin
      ids.push_back(7);
      vals.push_back(3);
    end
  endfunction

  // Queue one vector pair and its expected output and cost.
  task automatic queue_pair(input int hr, input int hd, input logic order);
    int rid [$], rv [$], did [$], dv [$];
    longint unsigned sum;
    int i, j, steps, drain;
    res_t rh [$], dh [$];
    word_t w;
    gen_vec(rid, rv);
    gen_vec(did, dv);
    if ($urandom_range(5) == 0) begin
      // force both vectors to end on the same ID
      did[did.size() - 1] = 60;
      rid[rid.size() - 1] = 60;
    end
    for (int k = 0; k < hr; k++) begin
      w = '{last: 1'b0, id: ID_W'($urandom), val: VAL_W'($urandom)};
      rq.push_back(w);
      rh.push_back(res_t'({w.id, w.val}));
    end
    for (int k = 0; k < hd; k++) begin
      w = '{last: 1'b0, id: ID_W'($urandom), val: VAL_W'($urandom)};
      dq.push_back(w);
      dh.push_back(res_t'({w.id, w.val}));
    end
    for (int k = 0; k < rid.size(); k++)
      rq.push_back('{last: (k == rid.size() - 1), id: ID_W'(rid[k]), val: VAL_W'(rv[k])});
    for (int k = 0; k < did.size(); k++)
      dq.push_back('{last: (k == did.size() - 1), id: ID_W'(did[k]), val: VAL_W'(dv[k])});
    // reference merge
    sum = 0; i = 0; j = 0; steps = 0;
    while (i < rid.size() && j < did.size()) begin
      steps++;
      if (rid[i] == did[j]) begin
        sum += longint'(rv[i]) * longint'(dv[j]);
        i++; j++;
      end else if (rid[i] < did[j]) i++;
      else j++;
    end
    if (i == rid.size() && j == did.size()) n_both++;
    else if (i == rid.size()) n_ref_first++;
    else n_db_first++;
    drain = (rid.size() - i) + (did.size() - j);
    if (order) begin
      foreach (dh[k]) exp_out.push_back(dh[k]);
      foreach (rh[k]) exp_out.push_back(rh[k]);
    end else begin
      foreach (rh[k]) exp_out.push_back(rh[k]);
      foreach (dh[k]) exp_out.push_back(dh[k]);
    end
    exp_out.push_back(res_t'(sum));
    exp_cost.push_back(((hr > hd ? hr : hd) > 0 ? (hr > hd ? hr : hd) : 1) + steps + drain + 1 + hr + hd + 1);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;

    // Phase 1: no stalls, cycle cost of every pair
    for (int grp = 0; grp < 10; grp++) begin
      int hr, hd, t0;
      hr = $urandom_range(MAX_HDR);
      hd = $urandom_range(MAX_HDR);
      @(negedge clk);
      ref_hdr_len = HDR_W'(hr);
      db_hdr_len  = HDR_W'(hd);
      hdr_order   = grp[0];
      exp_cost.delete();
      for (int p = 0; p < 5; p++) queue_pair(hr, hd, hdr_order);
      t0 = cycles;
      for (int p = 0; p < 5; p++) begin
        int cost;
        cost = exp_cost[p];
        // wait for the result word of this pair
        while (!(out_wr_en && exp_out.size() == (5 - p - 1) * (hr + hd + 1) + 1)) @(negedge clk);
        @(negedge clk);
        check(cycles - t0 == cost, $sformatf("pair cost %0d cycles, expected %0d", cycles - t0, cost));
        t0 = cycles;
      end
      check(exp_out.size() == 0, "all outputs seen");
      check(!busy, "idle after the group");
    end

    // Phase 2: random stalls on every side
    gap_pct  = 30;
    full_pct = 30;
    for (int grp = 0; grp < 10; grp++) begin
      @(negedge clk);
      ref_hdr_len = HDR_W'($urandom_range(MAX_HDR));
      db_hdr_len  = HDR_W'($urandom_range(MAX_HDR));
      hdr_order   = $urandom_range(1);
      for (int p = 0; p < 8; p++) queue_pair(ref_hdr_len, db_hdr_len, hdr_order);
      while (exp_out.size() != 0) @(negedge clk);
      check(rq.size() == 0 && dq.size() == 0, "both streams consumed");
    end

    check(n_match > 0, "matching IDs occurred");
    check(n_ref_first > 0, "reference vector ended first");
    check(n_db_first > 0, "database vector ended first");
    check(n_both > 0, "both vectors ended together");
    $display("pairs: ref first %0d, db first %0d, both %0d; matches %0d",
             n_ref_first, n_db_first, n_both, n_match);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
