// Command and status registers.
//
// A small register space through which host software controls the
// processing system and reads its state. Every bit is wired to one
// function: resets, control and status signals. Beside the registers,
// a little logic turns the settings into the signals the processing system
// needs: the set of enabled channels (which ones, from a mask, and how
// many, from a count), and one-cycle reload and restart pulses.
//
// Bus: reg_wr_en writes reg_wdata to reg_addr at the clock edge; reg_rd_en
// returns the register at reg_addr on reg_rdata one cycle later (held until
// the next read). Unused addresses read as zero. Register map (32-bit words,
// NW = ceil(N_CH / 32), channel c is bit c%32 of word c/32):
//   0x00 CTRL     rw  bit0 soft reset of the processing system (held while 1)
//                     bit1 restart reference splitter (write 1: pulse, reads 0)
//                     bit2 header order (0: reference headers first)
//   0x01 HDR      rw  [2:0] reference header words, [10:8] database header
//                     words; values above MAX_HDR are stored as MAX_HDR
//   0x02 CH_COUNT rw  number of channels in use, counted from channel 0
//   0x03 INFO     ro  [15:0] N_CH, [23:16] MAX_HDR
//   0x04 STATUS   ro  bit0 database master FIFO empty, bit1 reference master
//                     FIFO empty, bit2 database master FIFO full, bit3
//                     reference master FIFO full
//   0x10+k CH_MASK  rw  channel enable mask (reset: all ones)
//   0x20+k RELOAD   wo  write 1s: reload pulse to those channels' memories
//   0x30+k LOADED   ro  reference vector stored
//   0x40+k RESULTS  ro  processed FIFO not empty
//   0x50+k BUSY     ro  process block part-way through a vector pair
//   0x60+k OVERFLOW ro  reference vector longer than the memory
// Channels in use = CH_MASK and the lowest CH_COUNT channels.
// The register space, its per-bit wiring and the channel-selection and
// reload logic are named by the document; the map, widths and bus timing
// are this design's choices.
module cmd_status_regs
  import sva_pkg::*;
#(
  parameter int unsigned N_CH = DEF_N_CHANNELS
) (
  input  logic             clk,
  input  logic             rst,
  // host register bus
  input  logic [7:0]       reg_addr,
  input  logic             reg_wr_en,
  input  logic [31:0]      reg_wdata,
  input  logic             reg_rd_en,
  output logic [31:0]      reg_rdata,
  // control outputs
  output logic             soft_rst,
  output logic             restart_split,
  output logic             hdr_order,
  output logic [HDR_W-1:0] ref_hdr_len,
  output logic [HDR_W-1:0] db_hdr_len,
  output logic [N_CH-1:0]  enabled,
  output logic [N_CH-1:0]  reload,
  // status inputs
  input  logic             db_master_empty,
  input  logic             ref_master_empty,
  input  logic             db_master_full,
  input  logic             ref_master_full,
  input  logic [N_CH-1:0]  ref_loaded,
  input  logic [N_CH-1:0]  out_empty,
  input  logic [N_CH-1:0]  busy,
  input  logic [N_CH-1:0]  mem_overflow
);
  localparam int unsigned NW = (N_CH + 31) / 32;
  localparam int unsigned CW = $clog2(N_CH + 1);

  logic [NW*32-1:0] mask;
  logic [CW-1:0]    ch_count;
  logic [N_CH-1:0]  count_sel;

  function automatic logic [HDR_W-1:0] clamp_hdr(input logic [2:0] v);
    return (32'(v) > MAX_HDR) ? HDR_W'(MAX_HDR) : HDR_W'(v);
  endfunction

  function automatic logic [31:0] word_of(input logic [N_CH-1:0] v, input int unsigned k);
    logic [NW*32-1:0] w;
    w = (NW*32)'(v);
    return w[k*32 +: 32];
  endfunction

  always_comb begin
    for (int c = 0; c < N_CH; c++) count_sel[c] = (c < int'(ch_count));
  end
  assign enabled = mask[N_CH-1:0] & count_sel;

  always_ff @(posedge clk) begin
    if (rst) begin
      soft_rst      <= 1'b0;
      restart_split <= 1'b0;
      hdr_order     <= 1'b0;
      ref_hdr_len   <= '0;
      db_hdr_len    <= '0;
      ch_count      <= CW'(N_CH);
      mask          <= '1;
      reload        <= '0;
    end else begin
      restart_split <= 1'b0;
      reload        <= '0;
      if (reg_wr_en) begin
        case (reg_addr[7:4])
          4'h0: case (reg_addr[3:0])
            4'h0: begin
              soft_rst      <= reg_wdata[0];
              restart_split <= reg_wdata[1];
              hdr_order     <= reg_wdata[2];
            end
            4'h1: begin
              ref_hdr_len <= clamp_hdr(reg_wdata[2:0]);
              db_hdr_len  <= clamp_hdr(reg_wdata[10:8]);
            end
            4'h2: ch_count <= (reg_wdata > 32'(N_CH)) ? CW'(N_CH) : CW'(reg_wdata);
            default: ;
          endcase
          4'h1: if (32'(reg_addr[3:0]) < NW) mask[reg_addr[3:0]*32 +: 32] <= reg_wdata;
          4'h2: if (32'(reg_addr[3:0]) < NW) begin
            for (int b = 0; b < 32; b++) begin
              if (int'(reg_addr[3:0]) * 32 + b < N_CH) reload[int'(reg_addr[3:0]) * 32 + b] <= reg_wdata[b];
            end
          end
          default: ;
        endcase
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      reg_rdata <= '0;
    end else if (reg_rd_en) begin
      reg_rdata <= '0;
      if (reg_addr[7:4] == 4'h0) begin
        case (reg_addr[3:0])
          4'h0: reg_rdata <= {29'b0, hdr_order, 1'b0, soft_rst};
          4'h1: reg_rdata <= {21'b0, 3'(db_hdr_len), 5'b0, 3'(ref_hdr_len)};
          4'h2: reg_rdata <= 32'(ch_count);
          4'h3: reg_rdata <= {8'b0, 8'(MAX_HDR), 16'(N_CH)};
          4'h4: reg_rdata <= {28'b0, ref_master_full, db_master_full,
                              ref_master_empty, db_master_empty};
          default: ;
        endcase
      end else if (32'(reg_addr[3:0]) < NW) begin
        case (reg_addr[7:4])
          4'h1: reg_rdata <= mask[reg_addr[3:0]*32 +: 32];
          4'h3: reg_rdata <= word_of(ref_loaded, 32'(reg_addr[3:0]));
          4'h4: reg_rdata <= word_of(~out_empty, 32'(reg_addr[3:0]));
          4'h5: reg_rdata <= word_of(busy, 32'(reg_addr[3:0]));
          4'h6: reg_rdata <= word_of(mem_overflow, 32'(reg_addr[3:0]));
          default: ;
        endcase
      end
    end
  end

  initial begin
    assert (N_CH <= 512) else $error("cmd_status_regs: at most 512 channels");
  end

endmodule
