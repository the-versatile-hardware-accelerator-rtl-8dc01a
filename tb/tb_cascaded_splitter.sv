// Testbench for cascaded_splitter with 9 channels and splitters of 3
// outputs: a level 1 splitter feeding three level 0 splitters.
// A queue stands in for the input FIFO and per-channel queues for the
// channel FIFOs, with random full flags for back-pressure. CLONE_DATA: every
// enabled channel must receive the whole input sequence, disabled ones
// nothing, and with no back-pressure one word must move per cycle after the
// one-cycle link latency. SPLIT_VEC: with 13 vectors and random enabled
// sets (some groups with one enabled channel, some with several), vector k
// must go whole to the k-th enabled channel counted from channel 0,
// wrapping round.
module tb_cascaded_splitter;
  import sva_pkg::*;
  localparam int unsigned N = 9;
  localparam int unsigned SW = 3;

  logic clk = 1'b0, rst = 1'b1;
  split_mode_e mode = CLONE_DATA;
  logic [N-1:0] enabled = '1, out_wr_en, out_full = '0;
  word_t out_data_a [N];
  logic restart = 1'b0, in_empty, in_rd_en;
  word_t in_data;
  int checks = 0, failures = 0, cycles = 0;
  int full_pct = 0;

  word_t src [$];
  word_t got [N][$];
  word_t exp_q [N][$];

  cascaded_splitter #(.N_CH(N), .SPLIT_WIDTH(SW), .LINK_DEPTH(4)) dut (
    .clk, .rst, .mode, .enabled, .restart, .in_empty, .in_data, .in_rd_en,
    .out_wr_en, .out_data(out_data_a), .out_full
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  assign in_empty = (src.size() == 0);
  assign in_data  = in_empty ? '0 : src[0];

  always @(posedge clk) begin
    if (!rst) begin
      for (int i = 0; i < N; i++) begin
        if (out_wr_en[i]) begin
          got[i].push_back(out_data_a[i]);
          if (out_full[i]) begin
            failures++;
            $display("FAIL write to full output %0d", i);
          end
        end
      end
      if (in_rd_en) void'(src.pop_front());
    end
  end

  always @(negedge clk) begin
    for (int i = 0; i < N; i++) out_full[i] = ($urandom_range(99) < full_pct);
  end

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", msg, cycles);
    end
  endtask

  function automatic word_t mk(input int id, input logic last);
    word_t w;
    w.last = last;
    w.id   = ID_W'(id);
    w.val  = VAL_W'($urandom);
    return w;
  endfunction

  task automatic clear_all();
    for (int i = 0; i < N; i++) begin
      got[i].delete();
      exp_q[i].delete();
    end
  endtask

  task automatic compare_all(input string tag);
    for (int i = 0; i < N; i++) begin
      check(got[i].size() == exp_q[i].size(), $sformatf("%s output %0d word count %0d vs %0d", tag, i, got[i].size(), exp_q[i].size()));
      for (int k = 0; k < got[i].size() && k < exp_q[i].size(); k++)
        check(got[i][k] == exp_q[i][k], $sformatf("%s output %0d word %0d", tag, i, k));
    end
  endtask

  task automatic wait_drained();
    while (src.size() != 0) @(posedge clk);
    @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;

    // 1. clone, all enabled, no back-pressure: one word per cycle
    begin
      int t0;
      clear_all();
      full_pct = 0;
      @(negedge clk);
      for (int k = 0; k < 40; k++) begin
        word_t w;
        w = mk(k, (k % 5) == 4);
        src.push_back(w);
        for (int i = 0; i < N; i++) exp_q[i].push_back(w);
      end
      t0 = cycles;
      wait_drained();
      repeat (3) @(posedge clk);
      check(got[0].size() == 40, "clone words delivered");
      check(cycles - t0 == 44, $sformatf("clone rate: 40 words in %0d cycles", cycles - t0 - 4));
      compare_all("clone-full-rate");
    end

    // 2. clone with random mask and back-pressure
    for (int rep = 0; rep < 4; rep++) begin
      clear_all();
      full_pct = 30;
      @(negedge clk);
      enabled = N'($urandom) | N'(1);
      for (int k = 0; k < 60; k++) begin
        word_t w;
        w = mk(k, (k % 6) == 5);
        src.push_back(w);
        for (int i = 0; i < N; i++) if (enabled[i]) exp_q[i].push_back(w);
      end
      wait_drained();
      repeat (40) @(posedge clk);
      compare_all("clone-mask");
    end

    // 3. split by vectors with restart, random mask and back-pressure
    for (int rep = 0; rep < 4; rep++) begin
      int order [$];

      clear_all();
      full_pct = 25;
      order.delete();
      @(negedge clk);
      mode    = SPLIT_VEC;
      enabled = (rep == 0) ? '1 : (N'($urandom) | N'(9'h010));
      restart = 1'b1;
      @(negedge clk);
      restart = 1'b0;
      for (int c = 0; c < N; c++) if (enabled[c]) order.push_back(c);

      for (int v = 0; v < 13; v++) begin
        int len, ch;
        ch = order[v % order.size()];
        len = 1 + $urandom_range(5);
        for (int k = 0; k < len; k++) begin
          word_t w;
          w = mk(v * 100 + k, k == len - 1);
          src.push_back(w);
          exp_q[ch].push_back(w);
        end
      end
      wait_drained();
      repeat (40) @(posedge clk);
      compare_all("split");
    end

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
