// Testbench for cmd_status_regs with 40 channels (two mask words).
// Checks reset values, the read latency of one cycle, every register of the
// map, header length clamping, the enabled set (mask and count combined,
// worked out here), one-cycle reload and restart pulses on the right
// channels, and the status words built from random status inputs.
module tb_cmd_status_regs;
  import sva_pkg::*;
  localparam int unsigned N = 40;

  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] reg_addr = '0;
  logic reg_wr_en = 1'b0, reg_rd_en = 1'b0;
  logic [31:0] reg_wdata = '0, reg_rdata;
  logic soft_rst, restart_split, hdr_order;
  logic [HDR_W-1:0] ref_hdr_len, db_hdr_len;
  logic [N-1:0] enabled, reload;
  logic db_master_empty = 1'b0, ref_master_empty = 1'b1, db_master_full = 1'b0, ref_master_full = 1'b1;
  logic [N-1:0] ref_loaded = '0, out_empty = '1, busy = '0, mem_overflow = '0;
  int checks = 0, failures = 0, cycles = 0;
  int n_reload_cycles = 0, n_restart_cycles = 0;
  logic [N-1:0] reload_seen = '0;

  cmd_status_regs #(.N_CH(N)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (|reload) n_reload_cycles++;
    reload_seen |= reload;
    if (restart_split) n_restart_cycles++;
  end

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", msg, cycles);
    end
  endtask

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

  initial begin
    logic [31:0] d;
    logic [63:0] m;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;

    check(enabled == '1, "all channels enabled after reset");
    check(!soft_rst && !hdr_order && ref_hdr_len == 0 && db_hdr_len == 0, "control reset values");
    rd(8'h03, d);
    check(d == {8'b0, 8'(MAX_HDR), 16'(N)}, "INFO");
    rd(8'h02, d);
    check(d == N, "CH_COUNT reset value");

    wr(8'h00, 32'h5);
    check(soft_rst && hdr_order, "CTRL bits");
    rd(8'h00, d);
    check(d == 32'h5, "CTRL readback");
    wr(8'h00, 32'h0);
    check(!soft_rst, "soft reset released");

    wr(8'h01, {21'b0, 3'd2, 5'b0, 3'd7});
    check(ref_hdr_len == HDR_W'(MAX_HDR) && db_hdr_len == HDR_W'(2), "HDR clamped and stored");
    rd(8'h01, d);
    check(d == {21'b0, 3'd2, 5'b0, 3'(MAX_HDR)}, "HDR readback");

    for (int rep = 0; rep < 20; rep++) begin
      int cnt;
      logic [N-1:0] e;
      m = {$urandom, $urandom};
      cnt = $urandom_range(N + 5);
      wr(8'h10, m[31:0]);
      wr(8'h11, m[63:32]);
      wr(8'h02, cnt);
      for (int c = 0; c < N; c++) e[c] = m[c] && (c < cnt);
      check(enabled == e, $sformatf("enabled for count %0d", cnt));
      rd(8'h11, d);
      check(d == m[63:32], "mask word 1 readback");
    end

    // reload pulses
    n_reload_cycles = 0;
    reload_seen     = '0;
    wr(8'h21, 32'h0000_0081);
    check(reload == (40'h1 << 32 | 40'h1 << 39), "reload pulse on channels 32 and 39");
    @(negedge clk);
    check(reload_seen == (40'h1 << 32 | 40'h1 << 39), "reload reached channels 32 and 39");
    check(n_reload_cycles == 1, "reload lasts one cycle");
    check(reload == '0, "reload cleared");
    n_restart_cycles = 0;
    wr(8'h00, 32'h2);
    check(restart_split, "restart pulse");
    @(negedge clk);
    check(n_restart_cycles == 1, "restart pulse of one cycle");
    rd(8'h00, d);
    check(d[1] == 1'b0, "restart bit reads 0");

    // status words
    for (int rep = 0; rep < 10; rep++) begin
      logic [63:0] a, b, c2, e2;
      a = {$urandom, $urandom}; b = {$urandom, $urandom};
      c2 = {$urandom, $urandom}; e2 = {$urandom, $urandom};
      @(negedge clk);
      ref_loaded = a[N-1:0]; out_empty = b[N-1:0]; busy = c2[N-1:0]; mem_overflow = e2[N-1:0];
      {db_master_empty, ref_master_empty, db_master_full, ref_master_full} = 4'($urandom);
      rd(8'h30, d); check(d == a[31:0], "LOADED word 0");
      rd(8'h31, d); check(d == {24'b0, a[39:32]}, "LOADED word 1");
      rd(8'h40, d); check(d == ~b[31:0], "RESULTS word 0");
      rd(8'h41, d); check(d == {24'b0, ~b[39:32]}, "RESULTS word 1");
      rd(8'h50, d); check(d == c2[31:0], "BUSY word 0");
      rd(8'h61, d); check(d == {24'b0, e2[39:32]}, "OVERFLOW word 1");
      rd(8'h04, d); check(d == {28'b0, ref_master_full, db_master_full, ref_master_empty, db_master_empty}, "STATUS");
    end
    rd(8'h32, d);
    check(d == 0, "unused address reads zero");

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
