// Synchronous FIFO queue with a native FIFO interface.
//
// Used for every queue of the design: the database and reference master
// FIFOs, the slave FIFOs and the processed FIFO of each channel, and the
// links between the levels of a cascaded splitter. The write side takes
// din when wr_en is high and full is low. The read side is first-word
// fall-through: dout shows the oldest word whenever empty is low, and rd_en
// (honoured only when empty is low) removes it at the clock edge. A write
// is visible at dout on the cycle after it is taken, in both storage styles.
//
// USE_BRAM selects the storage, as the architecture allows per FIFO:
//   0 - distributed RAM style: the array is read combinationally.
//   1 - block RAM style: the array has a registered read port. Each cycle
//       it reads the address the head will have in the next cycle, and a
//       registered bypass covers a word written to that address in the
//       same cycle, so the timing seen at the ports is the same.
// DEPTH must be a power of two. The FIFO behaviour and the choice of RAM
// style follow the architecture; the fall-through timing is this design's
// choice.
module sync_fifo #(
  parameter int unsigned WIDTH    = 8,
  parameter int unsigned DEPTH    = 16,
  parameter bit          USE_BRAM = 1'b0
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         din,
  output logic                     full,
  input  logic                     rd_en,
  output logic [WIDTH-1:0]         dout,
  output logic                     empty
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wr_ptr, rd_ptr, rd_ptr_n;
  logic             do_wr, do_rd;

  assign full     = (wr_ptr[AW] != rd_ptr[AW]) && (wr_ptr[AW-1:0] == rd_ptr[AW-1:0]);
  assign empty    = (wr_ptr == rd_ptr);
  assign do_wr    = wr_en && !full;
  assign do_rd    = rd_en && !empty;
  assign rd_ptr_n = rd_ptr + (AW+1)'(do_rd);

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr[AW-1:0]] <= din;
  end

  if (USE_BRAM) begin : g_bram
    logic [WIDTH-1:0] rdata, byp_data;
    logic             byp;
    always_ff @(posedge clk) begin
      rdata    <= mem[rd_ptr_n[AW-1:0]];
      byp      <= do_wr && (wr_ptr[AW-1:0] == rd_ptr_n[AW-1:0]);
      byp_data <= din;
    end
    assign dout = byp ? byp_data : rdata;
  end else begin : g_dist
    assign dout = mem[rd_ptr[AW-1:0]];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (do_wr) wr_ptr <= wr_ptr + 1'b1;
      rd_ptr <= rd_ptr_n;
    end
  end

  initial begin
    assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
      else $error("sync_fifo: DEPTH must be a power of two");
  end

endmodule
