// Testbench for stream_splitter (8 outputs).
// A queue stands in for the input FIFO and per-output queues for the output
// FIFOs, with random full flags for back-pressure. CLONE_DATA: every enabled
// output must receive the whole input sequence, disabled ones nothing, and
// with no back-pressure one word must move per cycle. SPLIT_VEC: vectors
// must go whole to the enabled outputs in turn, each taking its random
// quota (1 to 3, 0 meaning 1) of consecutive vectors, starting at the lowest
// enabled output after restart.
module tb_stream_splitter;
  import sva_pkg::*;
  localparam int unsigned N = 8;

  logic clk = 1'b0, rst = 1'b1;
  split_mode_e mode = CLONE_DATA;
  logic [N-1:0] enabled = '1, out_wr_en, out_full = '0;
  logic restart = 1'b0, in_empty, in_rd_en;
  logic [N-1:0][1:0] quota = '0;
  word_t in_data, out_data;
  int checks = 0, failures = 0, cycles = 0;
  int full_pct = 0;

  word_t src [$];
  word_t got [N][$];
  word_t exp_q [N][$];

  stream_splitter #(.N_OUT(N), .QW(2)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  assign in_empty = (src.size() == 0);
  assign in_data  = in_empty ? '0 : src[0];

  always @(posedge clk) begin
    if (!rst) begin
      for (int i = 0; i < N; i++) begin
        if (out_wr_en[i]) begin
          got[i].push_back(out_data);
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
      check(cycles - t0 == 41, $sformatf("clone rate: 40 words in %0d cycles", cycles - t0 - 1));
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
      enabled = (rep == 0) ? '1 : (N'($urandom) | N'(8'h10));
      restart = 1'b1;
      @(negedge clk);
      restart = 1'b0;
      for (int i = 0; i < N; i++) if (enabled[i]) order.push_back(i);

      quota = (rep == 0) ? '0 : 16'($urandom);
      for (int v = 0, pos = 0, done = 0; v < 13; v++) begin
        int len, q, ch;
        ch = order[pos % order.size()];
        q  = (quota[ch] == 0) ? 1 : int'(quota[ch]);
        len = 1 + $urandom_range(5);
        for (int k = 0; k < len; k++) begin
          word_t w;
          w = mk(v * 100 + k, k == len - 1);
          src.push_back(w);
          exp_q[ch].push_back(w);
        end
        done++;
        if (done >= q) begin
          done = 0;
          pos++;
        end
      end
      wait_drained();
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
