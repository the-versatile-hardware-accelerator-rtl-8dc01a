// Cascaded stream splitter: one FIFO in, N_CH FIFOs out.
//
// One stream_splitter can drive only SPLIT_WIDTH outputs. For more channels
// the splitters are arranged in two levels: a level 1 splitter writes into
// one small link FIFO per group, and each link FIFO feeds a level 0 splitter
// that drives up to SPLIT_WIDTH channels. Both levels run in the same mode.
// In CLONE_DATA mode every enabled channel receives every word. In SPLIT_VEC
// mode the level 1 splitter gives each group as many consecutive vectors as
// the group has enabled channels, and each level 0 splitter hands them to
// its channels in turn; so after a restart vector k reaches the k-th enabled
// channel counted from channel 0, wrapping round after the last. A group is
// enabled when any of its channels is. When
// N_CH <= SPLIT_WIDTH a single splitter is used and there is no extra
// latency; otherwise the link FIFO adds one cycle. N_CH may be at most
// SPLIT_WIDTH * SPLIT_WIDTH.
// The two-level tree follows the document; the link FIFOs between levels
// and the vector order are this design's choices.
module cascaded_splitter
  import sva_pkg::*;
#(
  parameter int unsigned N_CH        = DEF_N_CHANNELS,
  parameter int unsigned SPLIT_WIDTH = DEF_SPLIT_WIDTH,
  parameter int unsigned LINK_DEPTH  = DEF_LINK_DEPTH
) (
  input  logic             clk,
  input  logic             rst,
  input  split_mode_e      mode,
  input  logic [N_CH-1:0]  enabled,
  input  logic             restart,
  input  logic             in_empty,
  input  word_t            in_data,
  output logic             in_rd_en,
  output logic [N_CH-1:0]  out_wr_en,
  output word_t            out_data [N_CH],
  input  logic [N_CH-1:0]  out_full
);

  if (N_CH <= SPLIT_WIDTH) begin : g_single
    word_t data;
    stream_splitter #(.N_OUT(N_CH)) u_split (
      .clk, .rst, .mode, .enabled, .restart, .quota('1),
      .in_empty, .in_data, .in_rd_en,
      .out_wr_en, .out_data(data), .out_full
    );
    for (genvar c = 0; c < N_CH; c++) begin : g_out
      assign out_data[c] = data;
    end
  end else begin : g_tree
    localparam int unsigned NG = (N_CH + SPLIT_WIDTH - 1) / SPLIT_WIDTH;
    localparam int unsigned QW = $clog2(SPLIT_WIDTH + 1);

    logic [NG-1:0][QW-1:0] grp_quota;

    logic [NG-1:0] grp_en, lnk_wr, lnk_full, lnk_empty, lnk_rd;
    word_t         lnk_din;
    word_t         lnk_dout [NG];

    for (genvar g = 0; g < NG; g++) begin : g_en
      localparam int unsigned LO = g * SPLIT_WIDTH;
      localparam int unsigned HI = ((g + 1) * SPLIT_WIDTH < N_CH) ? (g + 1) * SPLIT_WIDTH : N_CH;
      assign grp_en[g] = |enabled[HI-1:LO];
      always_comb begin
        grp_quota[g] = '0;
        for (int c = LO; c < HI; c++) grp_quota[g] += QW'(enabled[c]);
      end
    end

    stream_splitter #(.N_OUT(NG), .QW(QW)) u_level1 (
      .clk, .rst, .mode, .enabled(grp_en), .restart, .quota(grp_quota),
      .in_empty, .in_data, .in_rd_en,
      .out_wr_en(lnk_wr), .out_data(lnk_din), .out_full(lnk_full)
    );

    for (genvar g = 0; g < NG; g++) begin : g_grp
      localparam int unsigned LO = g * SPLIT_WIDTH;
      localparam int unsigned HI = ((g + 1) * SPLIT_WIDTH < N_CH) ? (g + 1) * SPLIT_WIDTH : N_CH;
      localparam int unsigned W  = HI - LO;
      word_t data;

      sync_fifo #(.WIDTH(WORD_W), .DEPTH(LINK_DEPTH)) u_link (
        .clk, .rst,
        .wr_en(lnk_wr[g]), .din(lnk_din), .full(lnk_full[g]),
        .rd_en(lnk_rd[g]), .dout(lnk_dout[g]), .empty(lnk_empty[g])
      );

      stream_splitter #(.N_OUT(W)) u_level0 (
        .clk, .rst, .mode, .enabled(enabled[HI-1:LO]), .restart, .quota('1),
        .in_empty(lnk_empty[g]), .in_data(lnk_dout[g]), .in_rd_en(lnk_rd[g]),
        .out_wr_en(out_wr_en[HI-1:LO]), .out_data(data), .out_full(out_full[HI-1:LO])
      );

      for (genvar c = LO; c < HI; c++) begin : g_out
        assign out_data[c] = data;
      end
    end
  end

  initial begin
    assert (N_CH <= SPLIT_WIDTH * SPLIT_WIDTH)
      else $error("cascaded_splitter: N_CH exceeds two levels of splitters");
  end

endmodule
