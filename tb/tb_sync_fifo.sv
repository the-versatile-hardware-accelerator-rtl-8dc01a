// Testbench for sync_fifo: random writes and reads against a queue model,
// for both storage styles at once (distributed and block RAM, driven by the
// same inputs). Checks first-word fall-through data, empty and full flags,
// that writes to a full FIFO and reads from an empty one are ignored, and
// that a word written is visible one cycle later, also when the FIFO was
// empty (the block RAM bypass).
module tb_sync_fifo;
  localparam int unsigned W = 12;
  localparam int unsigned D = 8;

  logic clk = 1'b0, rst = 1'b1;
  logic wr_en = 1'b0, rd_en = 1'b0, full, empty;
  logic [W-1:0] din = '0, dout, dout_b;
  logic full_b, empty_b;
  int checks = 0, failures = 0, cycles = 0;
  logic [W-1:0] model [$];
  int n_full = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(D), .USE_BRAM(1'b0)) dut (.*);
  sync_fifo #(.WIDTH(W), .DEPTH(D), .USE_BRAM(1'b1)) dut_b (
    .clk, .rst, .wr_en, .din, .full(full_b), .rd_en, .dout(dout_b), .empty(empty_b)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", msg, cycles);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == D), "full flag");
      if (model.size() > 0) check(dout == model[0], "dout");
      check(empty_b == (model.size() == 0), "empty flag (block RAM)");
      check(full_b == (model.size() == D), "full flag (block RAM)");
      if (model.size() > 0) check(dout_b == model[0], "dout (block RAM)");
      if (full) n_full++;
      // bias towards filling in the first half, draining in the second
      wr_en = ($urandom_range(99) < ((i % 400) < 200 ? 70 : 30));
      rd_en = ($urandom_range(99) < ((i % 400) < 200 ? 30 : 70));
      din   = W'($urandom);
      @(posedge clk);
      begin
        int sz;
        sz = model.size();
        if (rd_en && sz > 0) void'(model.pop_front());
        if (wr_en && sz < D) model.push_back(din);
      end
    end
    check(n_full > 0, "FIFO reached full at least once");
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
