// dcache: private direct-mapped L1 data cache of one core.
//
// Organisation (as in the original design): 4 lines, each four 32-bit words
// (128 bits), a 26-bit tag and a valid bit. Address bits [5:4] pick the line,
// [3:2] the word and [1:0] the byte; the rest is the tag. A core access hits
// when the selected line is valid and its tag equals the address tag.
//
// Core side: cpu_re/cpu_we with cpu_addr, cpu_wdata and cpu_size (byte,
// halfword, word). A load returns, in the same cycle, the addressed byte,
// halfword or word right-aligned and zero-extended on cpu_rdata (sign
// extension is left to the core). A store writes the addressed byte lanes at
// the clock edge when it hits and cpu_stall is low. cpu_stall comes from the
// coherency controller: the cache itself never decides whether a store may
// proceed, because that depends on the line's coherence state.
//
// Controller side: coh_line/coh_valid/coh_tag show the line at coh_idx (used
// to flush or write back a line). fill_en writes a whole line with its tag and
// sets it valid at the clock edge; inval_en clears the valid bit of line
// coh_idx. Fill takes priority over invalidate and over a core store to the
// same line; the controller never issues them together for one line.
//
// Byte numbering within a word is little-endian (byte 0 = bits 7:0), and
// accesses are assumed naturally aligned: both are this design's choices.
// Reset clears the valid bits only; the data array needs no reset.
module dcache
  import msi_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  // core side
  input  logic   cpu_re,
  input  logic   cpu_we,
  input  addr_t  cpu_addr,
  input  word_t  cpu_wdata,
  input  size_e  cpu_size,
  input  logic   cpu_stall,
  output word_t  cpu_rdata,
  output logic   cpu_hit,
  // coherency controller side
  input  index_t coh_idx,
  output line_t  coh_line,
  output logic   coh_valid,
  output tag_t   coh_tag,
  input  logic   fill_en,
  input  tag_t   fill_tag,
  input  line_t  fill_line,
  input  logic   inval_en
);

  logic [NUM_LINES-1:0] valid_q;
  tag_t                 tag_q  [NUM_LINES];
  line_t                data_q [NUM_LINES];

  index_t                idx;
  logic [WORD_SEL_W-1:0] wsel;
  logic [BYTE_SEL_W-1:0] bsel;
  word_t                 word_rd;
  word_t                 shifted;
  logic [3:0]            byte_en;
  word_t                 wdata_sh;
  line_t                 line_wr;

  assign idx  = addr_index(cpu_addr);
  assign wsel = cpu_addr[BYTE_SEL_W +: WORD_SEL_W];
  assign bsel = cpu_addr[BYTE_SEL_W-1:0];

  assign cpu_hit = (cpu_re || cpu_we) && valid_q[idx] && (tag_q[idx] == addr_tag(cpu_addr));

  // load path: word selector, then byte/halfword select
  always_comb begin
    word_rd = data_q[idx][wsel*WORD_W +: WORD_W];
    shifted = word_rd >> (8 * bsel);
    unique case (cpu_size)
      SIZE_BYTE: cpu_rdata = {24'b0, shifted[7:0]};
      SIZE_HALF: cpu_rdata = {16'b0, shifted[15:0]};
      default:   cpu_rdata = word_rd;
    endcase
  end

  // store path: byte enables and lane-aligned data
  always_comb begin
    unique case (cpu_size)
      SIZE_BYTE: byte_en = 4'b0001 << bsel;
      SIZE_HALF: byte_en = 4'b0011 << bsel;
      default:   byte_en = 4'b1111;
    endcase
    wdata_sh = cpu_wdata << (8 * bsel);
    line_wr  = data_q[idx];
    for (int b = 0; b < 4; b++)
      if (byte_en[b])
        line_wr[wsel*WORD_W + 8*b +: 8] = wdata_sh[8*b +: 8];
  end

  assign coh_line  = data_q[coh_idx];
  assign coh_valid = valid_q[coh_idx];
  assign coh_tag   = tag_q[coh_idx];

  always_ff @(posedge clk) begin
    if (rst) begin
      valid_q <= '0;
    end else if (fill_en) begin
      valid_q[coh_idx] <= 1'b1;
    end else if (inval_en) begin
      valid_q[coh_idx] <= 1'b0;
    end
  end

  // a fill of the same line wins over a store (the last assignment)
  always_ff @(posedge clk) begin
    if (cpu_we && !cpu_stall && cpu_hit)
      data_q[idx] <= line_wr;
    if (fill_en) begin
      tag_q[coh_idx]  <= fill_tag;
      data_q[coh_idx] <= fill_line;
    end
  end

endmodule
