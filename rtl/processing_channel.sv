// Processing channel: one reference vector against the database stream.
//
// The channel has a database slave FIFO, which the database splitter keeps
// filled, and a much smaller reference slave FIFO, which only carries one
// reference vector into the reference vector memory. The memory streams
// the stored vector over and over to the process block, which compares it
// with each database vector in turn and writes headers and results into
// the processed FIFO, read by the host. All FIFO ports are native FIFO
// ports: the splitters write db_wr_en / db_din and ref_wr_en / ref_din
// (back-pressure on db_full / ref_full), and the host reads out_rd_en /
// out_dout / out_empty (first-word fall-through). reload empties the
// memory so that the next vector arriving through the reference FIFO is
// stored; it should be given while no database vector is part-way through
// the process block. The FIFOs decouple channels whose speed differs with
// their data. Structure and buffer roles follow the document; the depths
// and the default RAM style of each buffer (block RAM for the database FIFO
// and the memory, distributed RAM for the small FIFOs; *_BRAM parameters)
// are this design's choices.
module processing_channel
  import sva_pkg::*;
#(
  parameter int unsigned DB_DEPTH  = DEF_DB_DEPTH,
  parameter int unsigned REF_DEPTH = DEF_REF_DEPTH,
  parameter int unsigned MEM_DEPTH = DEF_MEM_DEPTH,
  parameter int unsigned OUT_DEPTH = DEF_OUT_DEPTH,
  parameter bit          DB_BRAM   = DEF_DB_BRAM,
  parameter bit          REF_BRAM  = DEF_REF_BRAM,
  parameter bit          MEM_BRAM  = DEF_MEM_BRAM,
  parameter bit          OUT_BRAM  = DEF_OUT_BRAM
) (
  input  logic             clk,
  input  logic             rst,
  // control
  input  logic             reload,
  input  logic [HDR_W-1:0] ref_hdr_len,
  input  logic [HDR_W-1:0] db_hdr_len,
  input  logic             hdr_order,
  // database slave FIFO write side
  input  logic             db_wr_en,
  input  word_t            db_din,
  output logic             db_full,
  // reference slave FIFO write side
  input  logic             ref_wr_en,
  input  word_t            ref_din,
  output logic             ref_full,
  // processed FIFO read side
  input  logic             out_rd_en,
  output res_t             out_dout,
  output logic             out_empty,
  // status
  output logic             ref_loaded,
  output logic             mem_overflow,
  output logic             busy,
  output logic             match
);
  word_t db_q, rf_q, mem_q;
  res_t  pb_out;
  logic  db_empty, db_rd, rf_empty, rf_rd, mem_full, mem_empty, mem_rd;
  logic  pb_wr, out_full;

  sync_fifo #(.WIDTH(WORD_W), .DEPTH(DB_DEPTH), .USE_BRAM(DB_BRAM)) u_db_fifo (
    .clk, .rst,
    .wr_en(db_wr_en), .din(db_din), .full(db_full),
    .rd_en(db_rd), .dout(db_q), .empty(db_empty)
  );

  sync_fifo #(.WIDTH(WORD_W), .DEPTH(REF_DEPTH), .USE_BRAM(REF_BRAM)) u_ref_fifo (
    .clk, .rst,
    .wr_en(ref_wr_en), .din(ref_din), .full(ref_full),
    .rd_en(rf_rd), .dout(rf_q), .empty(rf_empty)
  );

  // Move words from the reference FIFO into the memory while it loads.
  assign rf_rd = !rf_empty && !mem_full;

  ref_vector_memory #(.DEPTH(MEM_DEPTH), .USE_BRAM(MEM_BRAM)) u_mem (
    .clk, .rst, .reload,
    .wr_en(rf_rd), .din(rf_q), .full(mem_full),
    .rd_en(mem_rd), .dout(mem_q), .empty(mem_empty),
    .loaded(ref_loaded), .overflow(mem_overflow)
  );

  process_block u_proc (
    .clk, .rst,
    .ref_hdr_len, .db_hdr_len, .hdr_order,
    .ref_empty(mem_empty), .ref_data(mem_q), .ref_rd_en(mem_rd),
    .db_empty, .db_data(db_q), .db_rd_en(db_rd),
    .out_wr_en(pb_wr), .out_data(pb_out), .out_full,
    .busy, .match
  );

  sync_fifo #(.WIDTH(RES_W), .DEPTH(OUT_DEPTH), .USE_BRAM(OUT_BRAM)) u_out_fifo (
    .clk, .rst,
    .wr_en(pb_wr), .din(pb_out), .full(out_full),
    .rd_en(out_rd_en), .dout(out_dout), .empty(out_empty)
  );

endmodule
