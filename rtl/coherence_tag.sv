// coherence_tag: duplicate tag store with MSI state for both data caches.
//
// For each cache (copy 1 for MIPS1, copy 2 for MIPS2) and each of its 4
// indices the store keeps the 26-bit tag of the line and the 5-bit MSI state
// word of that line (see msi_pkg). It mirrors the tags of the data caches so
// that coherence lookups never compete with the cores for the cache tag
// arrays, which is the duplicate-tag arrangement of the original design.
//
// Lookup (combinational): each core's address is looked up in both copies at
// the address's index. mp_hit[p][j] is "core p's address matches the tag in
// copy j" while core p requests (MP1Hit1, MP1Hit2, MP2Hit1, MP2Hit2 in the
// original design's naming). look_msi[p][j] and look_tag[p][j] give the entry of copy
// j at core p's index, so the controller also sees the line it would evict.
// out_msi[p] is the state in core p's own copy (OutMESI1/OutMESI2).
//
// Update (clock edge): wr_en[j] writes the tag and index of wr_addr[j] and the
// state wr_msi[j] into copy j (InMESIWr, InMESIA, InMESI). Reset sets every
// tag to 0 and every state to 00000.
//
// The original schematic draws the state ports 7 bits wide, but its text,
// tables and waveforms use a 5-bit state; 5 bits are used here.
module coherence_tag
  import msi_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic  mp_re   [NCORES],
  input  logic  mp_we   [NCORES],
  input  addr_t mp_addr [NCORES],
  input  logic  wr_en   [NCORES],
  input  addr_t wr_addr [NCORES],
  input  msi_t  wr_msi  [NCORES],
  output logic  mp_hit   [NCORES][NCORES],
  output msi_t  look_msi [NCORES][NCORES],
  output tag_t  look_tag [NCORES][NCORES],
  output msi_t  out_msi  [NCORES]
);

  tag_t tag_q [NCORES][NUM_LINES];
  msi_t msi_q [NCORES][NUM_LINES];

  always_comb begin
    for (int p = 0; p < NCORES; p++) begin
      for (int j = 0; j < NCORES; j++) begin
        look_tag[p][j] = tag_q[j][addr_index(mp_addr[p])];
        look_msi[p][j] = msi_q[j][addr_index(mp_addr[p])];
        mp_hit[p][j]   = (mp_re[p] || mp_we[p]) && (look_tag[p][j] == addr_tag(mp_addr[p]));
      end
      out_msi[p] = look_msi[p][p];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int j = 0; j < NCORES; j++)
        for (int k = 0; k < NUM_LINES; k++) begin
          tag_q[j][k] <= '0;
          msi_q[j][k] <= MSI_NONE;
        end
    end else begin
      for (int j = 0; j < NCORES; j++)
        if (wr_en[j]) begin
          tag_q[j][addr_index(wr_addr[j])] <= addr_tag(wr_addr[j]);
          msi_q[j][addr_index(wr_addr[j])] <= wr_msi[j];
        end
    end
  end

endmodule
