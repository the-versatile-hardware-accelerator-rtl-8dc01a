// Processing system: master FIFOs, splitters and parallel channels.
//
// The host writes database vectors into the database master FIFO and
// reference vectors into the reference master FIFO. A cascaded splitter in
// CLONE_DATA mode copies the database stream into the database FIFO of
// every enabled channel; a second one in SPLIT_VEC mode deals the
// reference vectors out, one whole vector per enabled channel. Each of the
// N_CH processing channels compares its reference vector with every
// database vector and puts the results in its own processed FIFO, which
// the host reads through out_rd_en / out_dout / out_empty (one lane per
// channel). Control inputs come from the command and status registers:
// enabled selects channels, restart_split sends the next reference vector
// to the first enabled channel again, reload[c] empties channel c's
// reference memory, and the header settings go to every process block.
// The database stream only advances when every enabled channel has room,
// so a slow channel stalls the others once its database FIFO is full.
// The arrangement follows the architecture's top level scheme; FIFO depths,
// RAM styles and the control signal set are this design's choices.
module processing_system
  import sva_pkg::*;
#(
  parameter int unsigned N_CH         = DEF_N_CHANNELS,
  parameter int unsigned SPLIT_WIDTH  = DEF_SPLIT_WIDTH,
  parameter int unsigned MASTER_DEPTH = DEF_MASTER_DEPTH,
  parameter int unsigned LINK_DEPTH   = DEF_LINK_DEPTH,
  parameter int unsigned DB_DEPTH     = DEF_DB_DEPTH,
  parameter int unsigned REF_DEPTH    = DEF_REF_DEPTH,
  parameter int unsigned MEM_DEPTH    = DEF_MEM_DEPTH,
  parameter int unsigned OUT_DEPTH    = DEF_OUT_DEPTH,
  parameter bit          MASTER_BRAM  = DEF_MASTER_BRAM,
  parameter bit          DB_BRAM      = DEF_DB_BRAM,
  parameter bit          REF_BRAM     = DEF_REF_BRAM,
  parameter bit          MEM_BRAM     = DEF_MEM_BRAM,
  parameter bit          OUT_BRAM     = DEF_OUT_BRAM
) (
  input  logic             clk,
  input  logic             rst,
  // control
  input  logic [N_CH-1:0]  enabled,
  input  logic             restart_split,
  input  logic [N_CH-1:0]  reload,
  input  logic [HDR_W-1:0] ref_hdr_len,
  input  logic [HDR_W-1:0] db_hdr_len,
  input  logic             hdr_order,
  // database master FIFO write side
  input  logic             db_wr_en,
  input  word_t            db_din,
  output logic             db_full,
  // reference master FIFO write side
  input  logic             ref_wr_en,
  input  word_t            ref_din,
  output logic             ref_full,
  // processed FIFO read sides, one per channel
  input  logic [N_CH-1:0]  out_rd_en,
  output res_t             out_dout [N_CH],
  output logic [N_CH-1:0]  out_empty,
  // status
  output logic             db_master_empty,
  output logic             ref_master_empty,
  output logic [N_CH-1:0]  ref_loaded,
  output logic [N_CH-1:0]  mem_overflow,
  output logic [N_CH-1:0]  busy,
  output logic [N_CH-1:0]  match,
  output logic [N_CH-1:0]  db_ch_full
);
  word_t            dbm_q, rfm_q;
  logic             dbm_rd, rfm_rd;
  logic [N_CH-1:0]  ch_db_wr, ch_db_full, ch_ref_wr, ch_ref_full;
  word_t            ch_db_din  [N_CH];
  word_t            ch_ref_din [N_CH];

  assign db_ch_full = ch_db_full;

  sync_fifo #(.WIDTH(WORD_W), .DEPTH(MASTER_DEPTH), .USE_BRAM(MASTER_BRAM)) u_db_master (
    .clk, .rst,
    .wr_en(db_wr_en), .din(db_din), .full(db_full),
    .rd_en(dbm_rd), .dout(dbm_q), .empty(db_master_empty)
  );

  sync_fifo #(.WIDTH(WORD_W), .DEPTH(MASTER_DEPTH), .USE_BRAM(MASTER_BRAM)) u_ref_master (
    .clk, .rst,
    .wr_en(ref_wr_en), .din(ref_din), .full(ref_full),
    .rd_en(rfm_rd), .dout(rfm_q), .empty(ref_master_empty)
  );

  cascaded_splitter #(.N_CH(N_CH), .SPLIT_WIDTH(SPLIT_WIDTH), .LINK_DEPTH(LINK_DEPTH)) u_db_split (
    .clk, .rst, .mode(CLONE_DATA), .enabled, .restart(1'b0),
    .in_empty(db_master_empty), .in_data(dbm_q), .in_rd_en(dbm_rd),
    .out_wr_en(ch_db_wr), .out_data(ch_db_din), .out_full(ch_db_full)
  );

  cascaded_splitter #(.N_CH(N_CH), .SPLIT_WIDTH(SPLIT_WIDTH), .LINK_DEPTH(LINK_DEPTH)) u_ref_split (
    .clk, .rst, .mode(SPLIT_VEC), .enabled, .restart(restart_split),
    .in_empty(ref_master_empty), .in_data(rfm_q), .in_rd_en(rfm_rd),
    .out_wr_en(ch_ref_wr), .out_data(ch_ref_din), .out_full(ch_ref_full)
  );

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    processing_channel #(
      .DB_DEPTH(DB_DEPTH), .REF_DEPTH(REF_DEPTH),
      .MEM_DEPTH(MEM_DEPTH), .OUT_DEPTH(OUT_DEPTH),
      .DB_BRAM(DB_BRAM), .REF_BRAM(REF_BRAM), .MEM_BRAM(MEM_BRAM), .OUT_BRAM(OUT_BRAM)
    ) u_ch (
      .clk, .rst,
      .reload(reload[c]), .ref_hdr_len, .db_hdr_len, .hdr_order,
      .db_wr_en(ch_db_wr[c]), .db_din(ch_db_din[c]), .db_full(ch_db_full[c]),
      .ref_wr_en(ch_ref_wr[c]), .ref_din(ch_ref_din[c]), .ref_full(ch_ref_full[c]),
      .out_rd_en(out_rd_en[c]), .out_dout(out_dout[c]), .out_empty(out_empty[c]),
      .ref_loaded(ref_loaded[c]), .mem_overflow(mem_overflow[c]),
      .busy(busy[c]), .match(match[c])
    );
  end

endmodule
