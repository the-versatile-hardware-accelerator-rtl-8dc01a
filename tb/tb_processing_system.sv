// Testbench for processing_system with 9 channels and splitters of 3
// outputs (a two-level cascade), small FIFOs and memories.
// Each round picks a random set of enabled channels and header settings,
// reloads the enabled channels, restarts the reference splitter, sends one
// reference vector per enabled channel and a run of database vectors, and
// reads every processed FIFO at a random rate. Expected results per channel
// (headers in the chosen order, then the dot product) are computed here,
// with the vector-to-channel mapping of the two-level round-robin. Disabled
// channels must return nothing. The run counts database-stream stalls
// (an enabled channel's database FIFO full), matches, rounds with disabled
// channels and both header orders, and fails if any never happened.
module tb_processing_system;
  import sva_pkg::*;
  import tb_sva_pkg::*;
  localparam int unsigned N  = 9;
  localparam int unsigned SW = 3;

  logic clk = 1'b0, rst = 1'b1;
  logic [N-1:0] enabled = '1, reload = '0, out_rd_en, out_empty;
  logic restart_split = 1'b0, hdr_order = 1'b0;
  logic [HDR_W-1:0] ref_hdr_len = '0, db_hdr_len = '0;
  logic db_wr_en = 1'b0, db_full, ref_wr_en = 1'b0, ref_full;
  word_t db_din = '0, ref_din = '0;
  res_t out_dout [N];
  logic db_master_empty, ref_master_empty;
  logic [N-1:0] ref_loaded, mem_overflow, busy, match, db_ch_full;
  int checks = 0, failures = 0, cycles = 0;
  int n_stall = 0, n_match = 0, n_disabled_rounds = 0, n_order [2] = '{0, 0};
  int rd_pct [N];
  res_t exp_out [N][$];

  processing_system #(
    .N_CH(N), .SPLIT_WIDTH(SW), .MASTER_DEPTH(16), .LINK_DEPTH(4),
    .DB_DEPTH(16), .REF_DEPTH(8), .MEM_DEPTH(64), .OUT_DEPTH(8),
    .MASTER_BRAM(1'b1), .DB_BRAM(1'b0), .REF_BRAM(1'b1), .MEM_BRAM(1'b1), .OUT_BRAM(1'b1)
  ) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (!db_master_empty && |(db_ch_full & enabled)) n_stall++;
    if (|match) n_match++;
  end

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", msg, cycles);
    end
  endtask

  always @(negedge clk)
    for (int c = 0; c < N; c++) out_rd_en[c] = !out_empty[c] && ($urandom_range(99) < rd_pct[c]);

  always @(posedge clk) begin
    if (!rst)
      for (int c = 0; c < N; c++)
        if (out_rd_en[c]) begin
          check(exp_out[c].size() > 0, $sformatf("unexpected word on channel %0d", c));
          if (exp_out[c].size() > 0) begin
            res_t e;
            e = exp_out[c].pop_front();
            check(out_dout[c] == e, $sformatf("channel %0d result %h, expected %h", c, out_dout[c], e));
          end
        end
  end

  task automatic put_ref(input word_t w);
    @(negedge clk);
    while (ref_full) @(negedge clk);
    ref_wr_en = 1'b1;
    ref_din   = w;
    @(negedge clk);
    ref_wr_en = 1'b0;
  endtask

  task automatic put_db(input word_t w);
    @(negedge clk);
    while (db_full) @(negedge clk);
    db_wr_en = 1'b1;
    db_din   = w;
    @(negedge clk);
    db_wr_en = 1'b0;
  endtask

  function automatic word_t hdr_word();
    return '{last: 1'b0, id: ID_W'($urandom), val: VAL_W'($urandom)};
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    for (int round = 0; round < 6; round++) begin
      int nref, hr, hd;
      int map [$];
      int rid [N][$], rv [N][$];
      res_t rh [N][$];
      hr = $urandom_range(MAX_HDR);
      hd = $urandom_range(MAX_HDR);
      @(negedge clk);
      enabled     = (round == 0) ? '1 : (N'($urandom) | N'(1));
      ref_hdr_len = HDR_W'(hr);
      db_hdr_len  = HDR_W'(hd);
      hdr_order   = round[0];
      n_order[round % 2]++;
      $display("round %0d hr %0d hd %0d en %b t=%0d", round, hr, hd, enabled, cycles);
      if (enabled != '1) n_disabled_rounds++;
      for (int c = 0; c < N; c++) rd_pct[c] = (c % 3 == 0) ? 5 : 60;
      reload        = enabled;
      restart_split = 1'b1;
      @(negedge clk);
      reload        = '0;
      restart_split = 1'b0;
      nref = $countones(enabled);
      split_map(512'(enabled), N, SW, nref, map);
      for (int k = 0; k < nref; k++) begin
        int c, ids [$], vals [$];
        c = map[k];
        gen_vec(200, 25, 12, ids, vals);
        rid[c] = ids;
        rv[c]  = vals;
        rh[c].delete();
        for (int h = 0; h < hr; h++) begin
          word_t w;
          w = hdr_word();
          rh[c].push_back(res_t'({w.id, w.val}));
          put_ref(w);
        end
        foreach (ids[i]) put_ref('{last: (i == ids.size() - 1), id: ID_W'(ids[i]), val: VAL_W'(vals[i])});
      end
      while (!ref_master_empty || ((ref_loaded & enabled) != enabled)) @(negedge clk);
      for (int v = 0; v < 10; v++) begin
        int did [$], dv [$];
        res_t dh [$];
        dh.delete();
        gen_vec(200, 25, 12, did, dv);
        for (int h = 0; h < hd; h++) begin
          word_t w;
          w = hdr_word();
          dh.push_back(res_t'({w.id, w.val}));
        end
        for (int c = 0; c < N; c++) if (enabled[c]) begin
          if (hdr_order) begin
            foreach (dh[i]) exp_out[c].push_back(dh[i]);
            foreach (rh[c][i]) exp_out[c].push_back(rh[c][i]);
          end else begin
            foreach (rh[c][i]) exp_out[c].push_back(rh[c][i]);
            foreach (dh[i]) exp_out[c].push_back(dh[i]);
          end
          exp_out[c].push_back(res_t'(dot(rid[c], rv[c], did, dv)));
        end
        foreach (dh[i]) put_db('{last: 1'b0, id: dh[i][ID_W+VAL_W-1:VAL_W], val: dh[i][VAL_W-1:0]});
        foreach (did[i]) put_db('{last: (i == did.size() - 1), id: ID_W'(did[i]), val: VAL_W'(dv[i])});
      end
      begin
        int pending;
        do begin
          @(negedge clk);
          pending = 0;
          for (int c = 0; c < N; c++) pending += exp_out[c].size();
        end while (pending != 0);
      end
      repeat (20) @(negedge clk);
      check(out_empty == '1, "no extra results, disabled channels silent");
      check(busy == '0, "all channels idle");
    end
    check(n_stall > 0, "database stream stalled by a full channel");
    check(n_match > 0, "matching IDs occurred");
    check(n_disabled_rounds > 0, "rounds with disabled channels");
    check(n_order[0] > 0 && n_order[1] > 0, "both header orders used");
    $display("stalls %0d, match cycles %0d", n_stall, n_match);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired: loaded %b outempty %b busy %b refm %b", dut.ref_loaded, dut.out_empty, dut.busy, dut.ref_master_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
