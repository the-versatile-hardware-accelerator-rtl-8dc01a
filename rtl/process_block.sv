// Process block: sparse dot product of a reference and a database vector.
//
// The block reads two first-word fall-through streams of word_t words, one
// from the reference vector memory and one from the database slave FIFO,
// and writes res_t words to the processed FIFO. For each pair of vectors:
//   1. HDR   - it takes ref_hdr_len header words from the reference stream
//              and db_hdr_len from the database stream (both in parallel,
//              one word per stream per cycle) and keeps them.
//   2. MERGE - it compares the IDs at the heads of the two streams, one
//              comparison per clock cycle. Equal IDs: the two values are
//              multiplied and the product is added to the accumulator, and
//              both words are consumed. Otherwise the word with the smaller
//              ID is consumed. IDs must ascend within a vector.
//   3. DRAIN - as soon as one vector has ended (its last word consumed) the
//              rest of the other is read and discarded, so both streams
//              stand at the start of their next vectors.
//   4. FLUSH - one cycle for the two-stage multiply-accumulate pipeline
//              (product register, then accumulator) to empty.
//   5. OUT   - it writes the kept headers, in the order set by hdr_order
//              (0: reference headers first, 1: database headers first),
//              then the accumulated sum: ref_hdr_len + db_hdr_len + 1
//              words, one per cycle while the output is not full.
// A pair begins only when both streams hold data; until then nothing is
// read and busy is low. Change the header settings, or reload the
// reference memory, only while busy is low and no database vector is
// waiting.
// With no stalls one pair costs max(ref_hdr_len, db_hdr_len, 1) + merge
// and drain steps + 1 + ref_hdr_len + db_hdr_len + 1 cycles.
// The sum is the cosine similarity when software sends TF-IDF vectors
// scaled to unit length; the block does no division. Values are unsigned.
// The compare-and-accumulate algorithm, the output after either vector ends
// and the headers of fixed, selectable size sent in a chosen order follow
// the document; the field widths, the draining, the header length limit
// and the fixed-point format are this design's choices.
module process_block
  import sva_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  // configuration (hold steady while vectors are in flight)
  input  logic [HDR_W-1:0] ref_hdr_len,
  input  logic [HDR_W-1:0] db_hdr_len,
  input  logic             hdr_order,
  // reference stream
  input  logic             ref_empty,
  input  word_t            ref_data,
  output logic             ref_rd_en,
  // database stream
  input  logic             db_empty,
  input  word_t            db_data,
  output logic             db_rd_en,
  // processed stream
  output logic             out_wr_en,
  output res_t             out_data,
  input  logic             out_full,
  // status
  output logic             busy,
  output logic             match    // a matching ID pair was accumulated
);
  typedef enum logic [2:0] {HDR, MERGE, DRAIN_REF, DRAIN_DB, FLUSH, OUT} state_e;

  localparam int unsigned OW = $clog2(2 * MAX_HDR + 2);
  localparam int unsigned IW = $clog2(MAX_HDR);  // header array index

  state_e                 state;
  logic [HDR_W-1:0]       rc, dc;
  logic [ID_W+VAL_W-1:0]  ref_hdr [MAX_HDR];
  logic [ID_W+VAL_W-1:0]  db_hdr  [MAX_HDR];
  logic [OW-1:0]          oidx;
  logic [2*VAL_W-1:0]     prod;
  logic                   prod_v;
  res_t                   acc;

  logic take_ref, take_db, hit;
  logic started, go;  // the current pair has begun
  logic [OW-1:0] n_out;

  assign n_out = OW'(ref_hdr_len) + OW'(db_hdr_len);  // index of the result word
  assign hit   = (ref_data.id == db_data.id);
  // A pair begins only when both streams hold data, so nothing of the next
  // reference vector is read while the database stream is idle.
  assign go    = started || (!ref_empty && !db_empty);
  assign busy  = (state != HDR) || started;
  assign match = (state == MERGE) && take_ref && take_db;

  // Stream reads.
  always_comb begin
    take_ref = 1'b0;
    take_db  = 1'b0;
    case (state)
      HDR: begin
        take_ref = go && !ref_empty && (rc < ref_hdr_len);
        take_db  = go && !db_empty  && (dc < db_hdr_len);
      end
      MERGE: if (!ref_empty && !db_empty) begin
        take_ref = hit || (ref_data.id < db_data.id);
        take_db  = hit || (ref_data.id > db_data.id);
      end
      DRAIN_REF: take_ref = !ref_empty;
      DRAIN_DB:  take_db  = !db_empty;
      default: ;
    endcase
  end
  assign ref_rd_en = take_ref;
  assign db_rd_en  = take_db;

  // Output word selection.
  always_comb begin
    logic [OW-1:0] first_len;
    logic [ID_W+VAL_W-1:0] h;
    first_len = hdr_order ? OW'(db_hdr_len) : OW'(ref_hdr_len);
    h = '0;
    if (oidx < first_len) begin
      h = hdr_order ? db_hdr[oidx[IW-1:0]] : ref_hdr[oidx[IW-1:0]];
    end else if (oidx < n_out) begin
      h = hdr_order ? ref_hdr[IW'(oidx - first_len)] : db_hdr[IW'(oidx - first_len)];
    end
    out_data  = (oidx == n_out) ? acc : res_t'(h);
    out_wr_en = (state == OUT) && !out_full;
  end

  // Header capture.
  always_ff @(posedge clk) begin
    if (state == HDR) begin
      if (take_ref) ref_hdr[rc[IW-1:0]] <= {ref_data.id, ref_data.val};
      if (take_db)  db_hdr[dc[IW-1:0]]  <= {db_data.id, db_data.val};
    end
  end

  // Multiply-accumulate pipeline.
  always_ff @(posedge clk) begin
    if (rst) begin
      prod_v <= 1'b0;
      prod   <= '0;
      acc    <= '0;
    end else begin
      prod_v <= match;
      prod   <= ref_data.val * db_data.val;
      if (state == OUT && out_wr_en && oidx == n_out) acc <= '0;
      else if (prod_v)                                acc <= acc + res_t'(prod);
    end
  end

  // Sequencing.
  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= HDR;
      started <= 1'b0;
      rc      <= '0;
      dc    <= '0;
      oidx  <= '0;
    end else begin
      case (state)
        HDR: begin
          logic [HDR_W-1:0] rc_n, dc_n;
          rc_n = rc + HDR_W'(take_ref);
          dc_n = dc + HDR_W'(take_db);
          rc <= rc_n;
          dc <= dc_n;
          if (go) started <= 1'b1;
          if (go && rc_n >= ref_hdr_len && dc_n >= db_hdr_len) begin
            started <= 1'b0;
            state <= MERGE;
            rc    <= '0;
            dc    <= '0;
          end
        end
        MERGE: begin
          if (take_ref && ref_data.last && take_db && db_data.last) state <= FLUSH;
          else if (take_ref && ref_data.last)                         state <= DRAIN_DB;
          else if (take_db && db_data.last)                           state <= DRAIN_REF;
        end
        DRAIN_REF: if (take_ref && ref_data.last) state <= FLUSH;
        DRAIN_DB:  if (take_db && db_data.last)   state <= FLUSH;
        FLUSH: begin
          state <= OUT;
          oidx  <= '0;
        end
        OUT: if (out_wr_en) begin
          if (oidx == n_out) begin
            state <= HDR;
            oidx  <= '0;
          end else begin
            oidx <= oidx + 1'b1;
          end
        end
        default: state <= HDR;
      endcase
    end
  end

  initial begin
    assert (RES_W >= 2 * VAL_W) else $error("process_block: RES_W too small");
  end

endmodule
