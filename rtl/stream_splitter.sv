// Stream splitter: one FIFO in, N_OUT FIFOs out.
//
// The splitter reads word_t words from a first-word fall-through FIFO
// (in_empty / in_data / in_rd_en) and writes them to the write ports of
// N_OUT output FIFOs (out_wr_en / out_data / out_full). It has the two modes
// the document gives:
//   CLONE_DATA - every word is written to every enabled output in the same
//                cycle; the word moves only when no enabled output is full,
//                so the slowest channel throttles the stream (stall).
//   SPLIT_VEC  - words go to one output only; after quota[o] words with the
//                last flag (quota[o] vectors; 0 counts as 1) the splitter
//                moves on to the next enabled output, wrapping round, so
//                consecutive vectors reach different outputs. A splitter
//                that feeds channels has a quota of 1 everywhere; one that
//                feeds other splitters gives each the number of enabled
//                channels behind it.
// enabled selects the outputs that may receive data. restart returns the
// SPLIT_VEC pointer to the lowest enabled output and clears the vector
// count; it is meant to be used
// between groups of vectors. One word moves per clock cycle at most; the path
// from out_full to in_rd_en is combinational, which is what limits N_OUT.
// Modes, the enable input and the 8-output size follow the document; the
// wrap-round order, the quota and the restart input are this design's
// choices.
module stream_splitter
  import sva_pkg::*;
#(
  parameter int unsigned N_OUT = DEF_SPLIT_WIDTH,
  parameter int unsigned QW    = 1   // width of a quota
) (
  input  logic              clk,
  input  logic              rst,
  input  split_mode_e       mode,
  input  logic [N_OUT-1:0]  enabled,
  input  logic              restart,
  input  logic [N_OUT-1:0][QW-1:0] quota,
  // input FIFO read side
  input  logic              in_empty,
  input  word_t             in_data,
  output logic              in_rd_en,
  // output FIFO write sides
  output logic [N_OUT-1:0]  out_wr_en,
  output word_t             out_data,
  input  logic [N_OUT-1:0]  out_full
);
  localparam int unsigned PW = (N_OUT > 1) ? $clog2(N_OUT) : 1;

  logic [PW-1:0] cur, nxt_en, first_en;
  logic          fire;
  logic [QW-1:0] vcnt;  // vectors sent to the current output

  // Next enabled output after cur, searching circularly (cur itself last).
  always_comb begin
    nxt_en = cur;
    for (int k = N_OUT; k >= 1; k--) begin
      int unsigned idx;
      idx = (int'(cur) + k) % N_OUT;
      if (enabled[idx]) nxt_en = PW'(idx);
    end
  end

  // Lowest enabled output.
  always_comb begin
    first_en = '0;
    for (int k = N_OUT - 1; k >= 0; k--) begin
      if (enabled[k]) first_en = PW'(k);
    end
  end

  always_comb begin
    out_data  = in_data;
    out_wr_en = '0;
    fire      = 1'b0;
    if (mode == CLONE_DATA) begin
      fire      = !in_empty && (|enabled) && ((out_full & enabled) == '0);
      out_wr_en = fire ? enabled : '0;
    end else begin
      fire = !in_empty && enabled[cur] && !out_full[cur];
      if (fire) out_wr_en[cur] = 1'b1;
    end
    in_rd_en = fire;
  end

  always_ff @(posedge clk) begin
    if (rst || restart) begin
      cur  <= first_en;
      vcnt <= '0;
    end else if (mode == SPLIT_VEC) begin
      // Leave a disabled output at once; otherwise move after its quota of
      // vectors has been sent.
      if (!enabled[cur]) begin
        cur  <= nxt_en;
        vcnt <= '0;
      end else if (fire && in_data.last) begin
        if (32'(vcnt) + 1 >= 32'(quota[cur])) begin
          cur  <= nxt_en;
          vcnt <= '0;
        end else begin
          vcnt <= vcnt + 1'b1;
        end
      end
    end
  end

endmodule
