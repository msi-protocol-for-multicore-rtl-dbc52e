// top_level: coherent data memory system of a dual-core MIPS processor.
//
// Two cores (MIPS1, MIPS2; outside this module) each have a private
// direct-mapped data cache and share one main memory. Coherence is kept by
// snooping through a duplicate tag store (coherence_tag) that holds, for each
// cache line of each cache, its tag and a 5-bit MSI state word, and by a
// central coherency controller (coherence_controller) that stalls a core,
// flushes or writes back lines, fills caches from memory and invalidates the
// other copy as the MSI protocol requires.
//
// Core ports, index 0 = MIPS1, 1 = MIPS2: memread/memwrite with dataadr,
// writedata and size (0 byte, 1 halfword, 2 word) ask for a load or a store.
// The core holds them while mp_stall is high; the access completes in the
// first cycle with mp_stall low (load data on mp_readdata in that cycle,
// store written at its clock edge). Loads and stores that hit without a
// coherence action take one cycle. Others run one controller transaction and
// complete 3 + m*(MEM_LATENCY+2) cycles after they are first presented, m
// being the number of line transfers (flush, write-back, fill: 0 to 3); with
// the default latency a plain miss takes 7 cycles, an upgrade of a shared line
// 3. A core that has to wait for the other core's transaction waits longer.
// coh_stall is high while a transaction runs and coh_case gives its protocol
// case. out_msi shows the state the coherency tag holds for each core's
// current address in that core's own tag copy.
//
// What follows the original design: the parts and how they connect, the cache geometry,
// the 5-bit MSI state and the protocol cases. This design's own: the port
// signalling, the line-wide memory port and the memory size and latency.
module top_level
  import msi_pkg::*;
#(
  parameter int unsigned MEM_LINES   = 256,
  parameter int unsigned MEM_LATENCY = 2
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [NCORES-1:0]             mp_memread,
  input  logic [NCORES-1:0]             mp_memwrite,
  input  logic [NCORES-1:0][ADDR_W-1:0] mp_dataadr,
  input  logic [NCORES-1:0][WORD_W-1:0] mp_writedata,
  input  logic [NCORES-1:0][1:0]        mp_size,
  output logic [NCORES-1:0][WORD_W-1:0] mp_readdata,
  output logic [NCORES-1:0]             mp_stall,
  output logic                          coh_stall,
  output coh_case_e                     coh_case,
  output msi_t  [NCORES-1:0]            out_msi
);

  // core requests as arrays
  logic  mp_re   [NCORES];
  logic  mp_we   [NCORES];
  addr_t mp_addr [NCORES];
  logic  stall   [NCORES];

  // coherency tag <-> controller
  logic  mp_hit      [NCORES][NCORES];
  msi_t  look_msi    [NCORES][NCORES];
  tag_t  look_tag    [NCORES][NCORES];
  logic  tag_wr_en   [NCORES];
  addr_t tag_wr_addr [NCORES];
  msi_t  tag_wr_msi  [NCORES];
  msi_t  own_msi     [NCORES];

  // controller <-> caches
  index_t coh_idx;
  line_t  cache_line [NCORES];
  logic   fill_en    [NCORES];
  tag_t   fill_tag;
  logic   inval_en   [NCORES];

  // controller <-> memory
  logic  mem_req, mem_we, mem_ack;
  addr_t mem_addr;
  line_t mem_wdata, mem_rdata;

  for (genvar p = 0; p < NCORES; p++) begin : g_core
    logic cache_hit;    // the cache's own tag check (mirrored by the coherency tag)
    logic coh_valid;
    tag_t coh_tag;

    assign mp_re[p]    = mp_memread[p];
    assign mp_we[p]    = mp_memwrite[p];
    assign mp_addr[p]  = mp_dataadr[p];
    assign mp_stall[p] = stall[p];
    assign out_msi[p]  = own_msi[p];

    dcache u_dcache (
      .clk       (clk),
      .rst       (rst),
      .cpu_re    (mp_memread[p]),
      .cpu_we    (mp_memwrite[p]),
      .cpu_addr  (mp_dataadr[p]),
      .cpu_wdata (mp_writedata[p]),
      .cpu_size  (size_e'(mp_size[p])),
      .cpu_stall (stall[p]),
      .cpu_rdata (mp_readdata[p]),
      .cpu_hit   (cache_hit),
      .coh_idx   (coh_idx),
      .coh_line  (cache_line[p]),
      .coh_valid (coh_valid),
      .coh_tag   (coh_tag),
      .fill_en   (fill_en[p]),
      .fill_tag  (fill_tag),
      .fill_line (mem_rdata),
      .inval_en  (inval_en[p])
    );

    // The duplicate tags must agree with the cache: a core whose access the
    // controller lets through without a stall must hit in its own cache.
    always_ff @(posedge clk)
      if (!rst && (mp_memread[p] || mp_memwrite[p]) && !stall[p])
        assert (cache_hit)
          else $error("top_level: core %0d access passed without a cache hit", p);

    // An invalidation must hit the copy of the requested line.
    always_ff @(posedge clk)
      if (!rst && inval_en[p])
        assert (coh_valid && coh_tag == fill_tag)
          else $error("top_level: core %0d invalidation misses its line", p);
  end

  coherence_tag u_coherence_tag (
    .clk      (clk),
    .rst      (rst),
    .mp_re    (mp_re),
    .mp_we    (mp_we),
    .mp_addr  (mp_addr),
    .wr_en    (tag_wr_en),
    .wr_addr  (tag_wr_addr),
    .wr_msi   (tag_wr_msi),
    .mp_hit   (mp_hit),
    .look_msi (look_msi),
    .look_tag (look_tag),
    .out_msi  (own_msi)
  );

  coherence_controller u_coherence_controller (
    .clk         (clk),
    .rst         (rst),
    .mp_re       (mp_re),
    .mp_we       (mp_we),
    .mp_addr     (mp_addr),
    .stall       (stall),
    .coh_stall   (coh_stall),
    .coh_case    (coh_case),
    .mp_hit      (mp_hit),
    .look_msi    (look_msi),
    .look_tag    (look_tag),
    .tag_wr_en   (tag_wr_en),
    .tag_wr_addr (tag_wr_addr),
    .tag_wr_msi  (tag_wr_msi),
    .coh_idx     (coh_idx),
    .cache_line  (cache_line),
    .fill_en     (fill_en),
    .fill_tag    (fill_tag),
    .inval_en    (inval_en),
    .mem_req     (mem_req),
    .mem_we      (mem_we),
    .mem_addr    (mem_addr),
    .mem_wdata   (mem_wdata),
    .mem_ack     (mem_ack)
  );

  main_memory #(
    .MEM_LINES (MEM_LINES),
    .LATENCY   (MEM_LATENCY)
  ) u_main_memory (
    .clk   (clk),
    .rst   (rst),
    .req   (mem_req),
    .we    (mem_we),
    .addr  (mem_addr),
    .wdata (mem_wdata),
    .rdata (mem_rdata),
    .ack   (mem_ack)
  );

endmodule
