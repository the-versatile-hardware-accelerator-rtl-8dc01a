// Reference vector memory of a processing channel.
//
// Holds one reference vector so that it need not be resent from the host
// for every database vector. Both sides use the native FIFO interface,
// though there is no queue inside:
//   write side - wr_en / din / full. After reload the memory takes words
//                until it has taken one with the last flag; it then raises
//                full and takes nothing more until the next reload.
//                Words beyond DEPTH are dropped and raise overflow; the
//                word with the last flag then overwrites the final
//                location, so the stored vector is still terminated.
//   read side  - first-word fall-through: empty stays high until a whole
//                vector is stored; then dout shows the word at the read
//                pointer, and rd_en moves the pointer on. After the last
//                stored word the pointer returns to the first one, so the
//                reader sees the vector repeated as an endless stream.
// reload clears both pointers and starts a new load. One cycle after the
// last word is written the memory primes its output, and empty falls the
// cycle after that. USE_BRAM selects the storage: 1 gives the array a
// registered read port (block RAM style), reading ahead the address the
// pointer moves to; 0 reads it combinationally (distributed RAM style).
// Port timing is the same for both.
// Wrap-round reading, the reload signal, the FIFO-style ports and the
// choice of RAM style follow the architecture; the full/overflow behaviour
// and the priming cycle are this design's choices.
module ref_vector_memory
  import sva_pkg::*;
#(
  parameter int unsigned DEPTH    = DEF_MEM_DEPTH,
  parameter bit          USE_BRAM = 1'b1
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   reload,
  // write side
  input  logic   wr_en,
  input  word_t  din,
  output logic   full,
  // read side
  input  logic   rd_en,
  output word_t  dout,
  output logic   empty,
  // status
  output logic   loaded,
  output logic   overflow
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  typedef enum logic [1:0] {LOADING, PRIME, READY} state_e;

  state_e        state;
  word_t         mem [DEPTH];
  logic [AW-1:0] wr_ptr, end_ptr, rd_ptr, rd_addr;
  logic          do_wr, do_rd;
  logic          at_end;  // last location written

  assign full   = (state != LOADING);
  assign empty  = (state != READY);
  assign loaded = (state == READY);
  assign do_wr  = wr_en && (state == LOADING);
  assign do_rd  = rd_en && (state == READY);

  // Address of the word to show next at dout.
  always_comb begin
    if (state == PRIME)          rd_addr = '0;
    else if (rd_ptr == end_ptr)  rd_addr = '0;
    else                         rd_addr = rd_ptr + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (do_wr && (!at_end || din.last)) mem[wr_ptr] <= din;
  end

  if (USE_BRAM) begin : g_bram
    always_ff @(posedge clk) begin
      if (state == PRIME || do_rd) dout <= mem[rd_addr];
    end
  end else begin : g_dist
    assign dout = mem[rd_ptr];
  end

  always_ff @(posedge clk) begin
    if (rst || reload) begin
      state    <= LOADING;
      wr_ptr   <= '0;
      end_ptr  <= '0;
      rd_ptr   <= '0;
      overflow <= 1'b0;
      at_end   <= 1'b0;
    end else begin
      case (state)
        LOADING: if (do_wr) begin
          end_ptr <= wr_ptr;
          if (at_end)                        overflow <= 1'b1;
          else if (wr_ptr == AW'(DEPTH - 1)) at_end   <= 1'b1;
          else                               wr_ptr   <= wr_ptr + 1'b1;
          if (din.last) state <= PRIME;
        end
        PRIME: begin
          rd_ptr <= '0;
          state  <= READY;
        end
        READY: if (do_rd) rd_ptr <= rd_addr;
        default: state <= LOADING;
      endcase
    end
  end

endmodule
