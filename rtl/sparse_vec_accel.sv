// Sparse vector accelerator: top level.
//
// The accelerator compares a group of reference sparse vectors with a long
// stream of database sparse vectors, all channels in parallel: channel c
// holds one reference vector and returns, for every database vector, its
// headers and the dot product with the reference (the cosine similarity for
// unit-length TF-IDF vectors). The top joins the processing system to the
// command and status registers. Towards the host it has:
//   - the register bus (reg_*), see cmd_status_regs for the map;
//   - the write sides of the database and reference master FIFOs;
//   - one processed-stream read side per channel (first-word fall-through).
// In a system these ports face the host link's streaming core (FIFO and
// memory-mapped channels over PCIe or a SoC's AXI port), which is not part
// of this design. Everything runs on one clock. rst resets all; the soft
// reset bit of the CTRL register resets the processing system only.
// Parameters default to the evaluated build: eight channels, splitters of
// eight outputs. The block structure follows the document; the sizes other
// than these two are this design's choices.
module sparse_vec_accel
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
  // register bus
  input  logic [7:0]       reg_addr,
  input  logic             reg_wr_en,
  input  logic [31:0]      reg_wdata,
  input  logic             reg_rd_en,
  output logic [31:0]      reg_rdata,
  // database stream
  input  logic             db_wr_en,
  input  word_t            db_din,
  output logic             db_full,
  // reference stream
  input  logic             ref_wr_en,
  input  word_t            ref_din,
  output logic             ref_full,
  // processed streams
  input  logic [N_CH-1:0]  out_rd_en,
  output res_t             out_dout [N_CH],
  output logic [N_CH-1:0]  out_empty
);
  logic             soft_rst, ps_rst, restart_split, hdr_order;
  logic [HDR_W-1:0] ref_hdr_len, db_hdr_len;
  logic [N_CH-1:0]  enabled, reload, ref_loaded, mem_overflow, busy, match, db_ch_full;
  logic             db_master_empty, ref_master_empty;

  assign ps_rst = rst || soft_rst;

  cmd_status_regs #(.N_CH(N_CH)) u_regs (
    .clk, .rst,
    .reg_addr, .reg_wr_en, .reg_wdata, .reg_rd_en, .reg_rdata,
    .soft_rst, .restart_split, .hdr_order, .ref_hdr_len, .db_hdr_len,
    .enabled, .reload,
    .db_master_empty, .ref_master_empty,
    .db_master_full(db_full), .ref_master_full(ref_full),
    .ref_loaded, .out_empty, .busy, .mem_overflow
  );

  processing_system #(
    .N_CH(N_CH), .SPLIT_WIDTH(SPLIT_WIDTH), .MASTER_DEPTH(MASTER_DEPTH),
    .LINK_DEPTH(LINK_DEPTH), .DB_DEPTH(DB_DEPTH), .REF_DEPTH(REF_DEPTH),
    .MEM_DEPTH(MEM_DEPTH), .OUT_DEPTH(OUT_DEPTH),
    .MASTER_BRAM(MASTER_BRAM), .DB_BRAM(DB_BRAM), .REF_BRAM(REF_BRAM),
    .MEM_BRAM(MEM_BRAM), .OUT_BRAM(OUT_BRAM)
  ) u_ps (
    .clk, .rst(ps_rst),
    .enabled, .restart_split, .reload, .ref_hdr_len, .db_hdr_len, .hdr_order,
    .db_wr_en, .db_din, .db_full,
    .ref_wr_en, .ref_din, .ref_full,
    .out_rd_en, .out_dout, .out_empty,
    .db_master_empty, .ref_master_empty,
    .ref_loaded, .mem_overflow, .busy, .match, .db_ch_full
  );

endmodule
