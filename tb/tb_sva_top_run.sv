// End-to-end test body for sparse_vec_accel, driven the way host software
// drives it: through the register bus and the three kinds of streams.
// Instantiated by tb_sparse_vec_accel (small sizes, a two-level splitter)
// and tb_sparse_vec_accel_full (the top with its default parameters: the
// DUT is then instantiated with no parameter list).
//
// Sequence: fill the database master FIFO with junk and clear it with the
// soft reset; then several rounds, each of which sets the header lengths and
// order, picks channels with the mask and the count registers, reloads
// them, restarts the reference splitter, sends one reference vector per
// enabled channel, polls LOADED, streams NDB database vectors while reading
// every processed FIFO at a random rate, compares every word with results
// computed here, and polls BUSY and RESULTS until the channels are idle.
// With CHECK_OVF set, a last round sends an over-long reference vector and
// expects its channel's OVERFLOW bit. Mechanisms counted (each must occur):
// soft reset, header order 0 and 1, channels disabled by mask and by count,
// reload, split delivery, clone delivery to several channels at once,
// database stream stall, reference memory wrap-round, matching IDs, the
// cascade link FIFOs (only when N > SW) and memory overflow (CHECK_OVF).
module tb_sva_top_run #(
  parameter bit          FULL      = 1'b0,
  parameter int unsigned N         = 9,
  parameter int unsigned SW        = 3,
  parameter int unsigned MEM_DEPTH = 64,
  parameter int unsigned NDB       = 10,    // database vectors per round
  parameter int unsigned ROUNDS    = 5,
  parameter int unsigned MAX_ID    = 200,   // ID range of the vectors
  parameter int unsigned MAX_LEN   = 25,    // nonzeros per vector, at most
  parameter int unsigned DENSITY   = 12,    // percent of IDs present
  parameter bit          CHECK_OVF = 1'b1,
  parameter int unsigned WATCHDOG  = 400000
) ();
  import sva_pkg::*;
  import tb_sva_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] reg_addr = '0;
  logic reg_wr_en = 1'b0, reg_rd_en = 1'b0;
  logic [31:0] reg_wdata = '0, reg_rdata;
  logic db_wr_en = 1'b0, db_full, ref_wr_en = 1'b0, ref_full;
  word_t db_din = '0, ref_din = '0;
  logic [N-1:0] out_rd_en, out_empty;
  res_t out_dout [N];

  int checks = 0, failures = 0, cycles = 0;
  int n_soft = 0, n_order0 = 0, n_order1 = 0, n_mask_off = 0, n_count_off = 0;
  int n_reload = 0, n_split = 0, n_clone = 0, n_stall = 0, n_wrap = 0, n_match = 0;
  int n_link = 0, n_ovf = 0;
  int rd_pct [N];
  res_t exp_out [N][$];

  if (FULL) begin : g_full
    sparse_vec_accel dut (.*);
  end else begin : g_small
    sparse_vec_accel #(
      .N_CH(N), .SPLIT_WIDTH(SW), .MASTER_DEPTH(16), .LINK_DEPTH(4),
      .DB_DEPTH(16), .REF_DEPTH(8), .MEM_DEPTH(MEM_DEPTH), .OUT_DEPTH(8),
      // every buffer in the other RAM style from the defaults
      .MASTER_BRAM(1'b0), .DB_BRAM(1'b0), .REF_BRAM(1'b1), .MEM_BRAM(1'b0), .OUT_BRAM(1'b1)
    ) dut (.*);
  end

  always #5 clk = ~clk;

  // Event counters read from inside the design.
  logic [N-1:0] ps_match, ps_dbfull, ps_enabled, ch_db_wr, ch_ref_wr, ch_mem_rd;
  logic         ps_dbm_empty;
  if (FULL) begin : g_mon_full
    assign ps_match     = g_full.dut.match;
    assign ps_dbfull    = g_full.dut.db_ch_full;
    assign ps_enabled   = g_full.dut.enabled;
    assign ps_dbm_empty = g_full.dut.db_master_empty;
    assign ch_db_wr     = g_full.dut.u_ps.ch_db_wr;
    assign ch_ref_wr    = g_full.dut.u_ps.ch_ref_wr;
    for (genvar c = 0; c < N; c++) begin : g_c
      assign ch_mem_rd[c] = g_full.dut.u_ps.g_ch[c].u_ch.mem_rd
                            && g_full.dut.u_ps.g_ch[c].u_ch.u_mem.rd_ptr == g_full.dut.u_ps.g_ch[c].u_ch.u_mem.end_ptr;
    end
  end else begin : g_mon_small
    assign ps_match     = g_small.dut.match;
    assign ps_dbfull    = g_small.dut.db_ch_full;
    assign ps_enabled   = g_small.dut.enabled;
    assign ps_dbm_empty = g_small.dut.db_master_empty;
    assign ch_db_wr     = g_small.dut.u_ps.ch_db_wr;
    assign ch_ref_wr    = g_small.dut.u_ps.ch_ref_wr;
    for (genvar c = 0; c < N; c++) begin : g_c
      assign ch_mem_rd[c] = g_small.dut.u_ps.g_ch[c].u_ch.mem_rd
                            && g_small.dut.u_ps.g_ch[c].u_ch.u_mem.rd_ptr == g_small.dut.u_ps.g_ch[c].u_ch.u_mem.end_ptr;
    end
  end

  always @(posedge clk) begin
    cycles++;
    if (!rst) begin
      n_match += $countones(ps_match);
      if (!ps_dbm_empty && |(ps_dbfull & ps_enabled)) n_stall++;
      if ($countones(ch_db_wr) > 1) n_clone++;
      if (|ch_ref_wr) n_split++;
      n_wrap += $countones(ch_mem_rd);
    end
  end
  if (N > SW && !FULL) begin : g_link_mon
    always @(posedge clk) if (|g_small.dut.u_ps.u_db_split.g_tree.lnk_wr) n_link++;
  end

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", msg, cycles);
    end
  endtask

  // host reading the processed streams
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

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    reg_addr  = a;
    reg_wdata = d;
    reg_wr_en = 1'b1;
    @(negedge clk);
    reg_wr_en = 1'b0;
  endtask

  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    reg_addr  = a;
    reg_rd_en = 1'b1;
    @(negedge clk);
    reg_rd_en = 1'b0;
    d = reg_rdata;
  endtask

  // Read a per-channel status bit set (LOADED, BUSY, ...) from its words.
  task automatic rd_bits(input logic [7:0] base, output logic [N-1:0] v);
    logic [511:0] all;
    logic [31:0]  d;
    all = '0;
    for (int k = 0; k * 32 < N; k++) begin
      rd(base + 8'(k), d);
      all[k*32 +: 32] = d;
    end
    v = all[N-1:0];
  endtask

  // called at a negedge; back-to-back calls write one word per cycle
  task automatic put_ref(input word_t w);
    while (ref_full) @(negedge clk);
    ref_wr_en = 1'b1;
    ref_din   = w;
    @(negedge clk);
    ref_wr_en = 1'b0;
  endtask

  // called at a negedge; back-to-back calls write one word per cycle
  task automatic put_db(input word_t w);
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
    logic [31:0] d;
    logic [N-1:0] v;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;

    rd(8'h03, d);
    check(d[15:0] == N, "INFO reports the channel count");

    // soft reset clears queued junk
    wr(8'h02, 0);                       // no channel takes data
    for (int k = 0; k < 5; k++) put_db(hdr_word());
    rd(8'h04, d);
    check(d[0] == 1'b0, "database master FIFO holds data");
    wr(8'h00, 32'h1);
    wr(8'h00, 32'h0);
    rd(8'h04, d);
    check(d[0] == 1'b1, "soft reset emptied the database master FIFO");
    n_soft++;

    for (int round = 0; round < ROUNDS; round++) begin
      int nref, hr, hd, cnt;
      int map [$];
      int rid [N][$], rv [N][$];
      res_t rh [N][$];
      logic [511:0] mask;
      logic [N-1:0] en;
      hr = (round == 0) ? 2 : $urandom_range(MAX_HDR);
      hd = (round == 0) ? 2 : $urandom_range(MAX_HDR);
      mask = {16{$urandom}};
      if (round == 0) mask = '1;
      mask[0] = 1'b1;
      cnt = (round < 2) ? N : 1 + $urandom_range(N - 2);
      for (int c = 0; c < N; c++) en[c] = mask[c] && (c < cnt);
      for (int c = 0; c < N; c++) begin
        if (!mask[c]) n_mask_off++;
        if (c >= cnt) n_count_off++;
      end
      for (int c = 0; c < N; c++) rd_pct[c] = (c % 3 == 0) ? 10 : 70;

      wr(8'h01, {21'b0, 3'(hd), 5'b0, 3'(hr)});
      wr(8'h00, {29'b0, round[0], 2'b10});   // header order, restart splitter
      if (round[0]) n_order1++; else n_order0++;
      for (int k = 0; k * 32 < N; k++) wr(8'h10 + 8'(k), mask[k*32 +: 32]);
      wr(8'h02, cnt);
      for (int k = 0; k * 32 < N; k++) wr(8'h20 + 8'(k), 32'((512'(en)) >> (k * 32)));
      n_reload++;
      rd_bits(8'h30, v);
      check((v & en) == '0, "reload cleared the enabled channels");

      nref = $countones(en);
      split_map(512'(en), N, SW, nref, map);
      for (int k = 0; k < nref; k++) begin
        int c, ids [$], vals [$];
        c = map[k];
        gen_vec(MAX_ID, MAX_LEN, DENSITY, ids, vals);
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
      do rd_bits(8'h30, v); while ((v & en) != en);

      for (int vv = 0; vv < NDB; vv++) begin
        int did [$], dv [$];
        res_t dh [$];
        dh.delete();
        gen_vec(MAX_ID, MAX_LEN, DENSITY, did, dv);
        for (int h = 0; h < hd; h++) begin
          word_t w;
          w = hdr_word();
          dh.push_back(res_t'({w.id, w.val}));
        end
        for (int c = 0; c < N; c++) if (en[c]) begin
          if (round[0]) begin
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
      rd_bits(8'h50, v);
      check(v == '0, "BUSY clear after the round");
      rd_bits(8'h40, v);
      check(v == '0, "RESULTS clear: no extra words, disabled channels silent");
    end

    if (CHECK_OVF) begin
      word_t w;
      wr(8'h01, 32'h0);
      wr(8'h02, N);
      for (int k = 0; k * 32 < N; k++) wr(8'h10 + 8'(k), 32'hffff_ffff);
      wr(8'h20, 32'h1);
      wr(8'h00, 32'h2);
      for (int k = 0; k < MEM_DEPTH + 3; k++)
        put_ref('{last: (k == MEM_DEPTH + 2), id: ID_W'(k), val: VAL_W'(1)});
      do rd_bits(8'h30, v); while (!v[0]);
      rd_bits(8'h60, v);
      check(v == N'(1), "OVERFLOW set for channel 0 only");
      if (v[0]) n_ovf++;
    end

    check(n_soft > 0, "soft reset used");
    check(n_order0 > 0 && n_order1 > 0, "both header orders used");
    check(n_mask_off > 0, "channels disabled by the mask");
    check(n_count_off > 0, "channels disabled by the count");
    check(n_reload > 0, "reference memories reloaded");
    check(n_split > 0, "reference vectors split over channels");
    check(n_clone > 0, "database words cloned to several channels");
    check(n_stall > 0, "database stream stalled by a full channel");
    check(n_wrap > 0, "reference memory wrapped round");
    check(n_match > 0, "matching IDs accumulated");
    if (N > SW && !FULL) check(n_link > 0, "cascade link FIFOs used");
    if (CHECK_OVF) check(n_ovf > 0, "memory overflow flagged");
    $display("events: clone %0d split %0d stall %0d wrap %0d match %0d link %0d; cycles %0d",
             n_clone, n_split, n_stall, n_wrap, n_match, n_link, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
